// nand_nor_decoder: one-hot address decoder built from the NAND/NOR structure
// used for the word-select (WS) and column-select lines of the pixel array.
//
// The address is split into an upper and a lower part. For every output line one
// NAND gate matches the upper part (with the enable as an extra input) and one
// NAND gate matches the lower part, each fed with true or complemented address
// bits; a NOR of the two NAND outputs drives the select line high only when both
// parts match. This is the two-NAND-into-NOR arrangement of the published
// decoder; the buffer chain that follows it in silicon only adds drive strength
// and has no logic function, so it is not modelled.
//
// Interface: en (1), addr (N) -> sel (2**N), exactly one line high when en is
// high, none otherwise. Purely combinational, no latency.
module nand_nor_decoder #(
  parameter int unsigned N = 9
) (
  input  logic               en,
  input  logic [N-1:0]       addr,
  output logic [(1<<N)-1:0]  sel
);
  // the lower NAND matches the low N/2 bits, the upper NAND the rest
  localparam int unsigned NLO = N / 2;

  for (genvar o = 0; o < (1 << N); o++) begin : g_line
    localparam logic [N-1:0] CODE = N'(o);
    logic [N-1:0] lit;     // true or complemented address literal per bit
    logic nand_hi, nand_lo;
    for (genvar b = 0; b < N; b++) begin : g_lit
      assign lit[b] = CODE[b] ? addr[b] : ~addr[b];
    end
    assign nand_hi = ~(en & (&lit[N-1:NLO]));
    if (NLO > 0) begin : g_lo
      assign nand_lo = ~(&lit[NLO-1:0]);
    end else begin : g_nolo
      assign nand_lo = 1'b0;
    end
    assign sel[o] = ~(nand_hi | nand_lo);
  end

endmodule
