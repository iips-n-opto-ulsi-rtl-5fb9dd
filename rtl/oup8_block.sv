// oup8_block: one block of the 8-phase SRAM pixel array.
//
// Every pixel stores a 3-bit phase code in three SRAM cells and uses it to pick
// one of the eight global phase signals p[7:0] through an 8:1 multiplexer; the
// picked signal goes through the high-voltage inverter onto the pixel mirror, so
// mirror = ~p[code]. Pixels are arranged in ROWS rows; each row is cut into
// GROUPS column words of PPW pixels. A one-hot word-select line (ws) from the row
// decoder and a one-hot column-select line (csel) from the column decoder pick one
// word: when we is high its PPW codes are overwritten from wd on the rising clock
// edge (the write driver), and rd always shows the codes of the selected word
// (the bit lines, an AND-OR over rows and words; all zero when nothing is
// selected).
//
// The pixel function (three bits, 8:1 phase mux, inverter to mirror) and the
// block/row/word organisation follow the published 8-phase chip. The cell
// storage is modelled as flip-flops written on a clock edge, and the 1.8 V to
// 3.3 V level translation has no logic function; both are this model's choices.
// Full-chip sizes are 512 rows and 64 words of 8 pixels; the defaults are smaller
// because the elaboration tools need about 15 KB and 2 ms per pixel.
//
// Timing: write takes effect at the clock edge; rd and mirror are combinational.
module oup8_block import oup_pkg::*; #(
  parameter int unsigned ROWS   = 64,
  parameter int unsigned GROUPS = 8,
  parameter int unsigned PPW    = PIX_PER_WORD
) (
  input  logic                              clk,
  input  logic                              we,
  input  logic [ROWS-1:0]                   ws,
  input  logic [GROUPS-1:0]                 csel,
  input  logic [PPW-1:0][P8_BITS-1:0]       wd,
  output logic [PPW-1:0][P8_BITS-1:0]       rd,
  input  logic [P8_PHASES-1:0]              p,
  output logic [ROWS-1:0][GROUPS*PPW-1:0]   mirror
);
  localparam int unsigned C = GROUPS * PPW;

  logic [ROWS-1:0][PPW*P8_BITS-1:0] row_rd;   // bit-line contribution of each row

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [C-1:0][P8_BITS-1:0] q;       // SRAM bits of this row
    logic [C-1:0]              m;       // mirror drive of this row
    logic [PPW-1:0][P8_BITS-1:0] sel_word;

    for (genvar g = 0; g < GROUPS; g++) begin : g_word
      always_ff @(posedge clk)
        if (we && ws[r] && csel[g]) q[g*PPW +: PPW] <= wd;
      for (genvar i = 0; i < PPW; i++) begin : g_pix
        // 8:1 phase multiplexer followed by the mirror inverter
        assign m[g*PPW+i] = ~p[q[g*PPW+i]];
      end
    end

    always_comb begin
      sel_word = '0;
      for (int g = 0; g < GROUPS; g++)
        if (csel[g]) sel_word = sel_word | q[g*PPW +: PPW];
    end

    assign row_rd[r] = ws[r] ? sel_word : '0;
    assign mirror[r] = m;
  end

  always_comb begin
    rd = '0;
    for (int r = 0; r < ROWS; r++) rd = rd | row_rd[r];
  end
endmodule
