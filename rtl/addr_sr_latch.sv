// addr_sr_latch: set/reset hold stage on the address lines.
//
// Each address bit is held by a set/reset cell: while load is high the cell is
// set when the incoming bit is 1 and reset when it is 0; while load is low
// neither input is active and the cell keeps its value, so the decoders behind it
// see a stable address and do not glitch while the pins change. The published
// chip puts an SR latch on the address lines for this reason; here the cell is
// sampled on the rising clock edge so the whole design stays synchronous (a
// design choice). Active-low reset clears all bits.
//
// Interface: d (W) is captured when load is high; q (W) appears one clock later.
module addr_sr_latch #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] s, r;

  assign s = {W{load}} &  d;
  assign r = {W{load}} & ~d;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= s | (q & ~r);
endmodule
