// oupn_block: one block of the proposed 256-phase (n-phase) pixel array.
//
// Each pixel holds an 8-bit phase code in an 8-stage shift register. The code is
// written serially: while the pixel's word is selected (one-hot ws from the row
// decoder and csel from the column decoder) and we is high, every clock shifts
// one bit of din into the first stage, so a code is loaded in eight clocks, most
// significant bit first. The code is kept in Gray code.
//
// To produce one of 256 drive levels the pixel is clocked by the global clock,
// which runs 256 times per frame. A single global circuit broadcasts the frame
// count in Gray code (cnt), a frame_start strobe and the ITO (counter electrode)
// level. Each pixel has one drive flip-flop, on: it is set by frame_start and
// cleared in the tick where cnt equals the stored code, so it is high for exactly
// "code" ticks of every 256 (0 gives 0 %, 255 gives 255/256). The mirror is
// driven with on XOR ito through the output inverter, so the voltage across the
// liquid crystal is on for "code"/256 of each frame while the ITO level alternates
// frame by frame.
//
// The shift register per pixel, the serial addressable data write, the global
// clock at 256 times the frame rate, the global ITO circuit and the Gray-coded
// count follow the published proposal. How the stored code becomes a waveform
// (set at frame start, clear on a match with the count) and the XOR with the ITO
// level are this design's own choices, since the proposal does not detail them.
// Full-chip sizes are 512 rows and 64 words of 8 pixels; the defaults are smaller
// for the elaboration tools.
//
// Timing: shift at the clock edge; on changes one clock after cnt/frame_start.
module oupn_block import oup_pkg::*; #(
  parameter int unsigned ROWS   = 64,
  parameter int unsigned GROUPS = 8,
  parameter int unsigned PPW    = PIX_PER_WORD
) (
  input  logic                              gclk,
  input  logic                              rst_n,
  input  logic                              we,
  input  logic [ROWS-1:0]                   ws,
  input  logic [GROUPS-1:0]                 csel,
  input  logic [PPW-1:0]                    din,
  input  logic [PN_BITS-1:0]                cnt,
  input  logic                              frame_start,
  input  logic                              ito,
  output logic [ROWS-1:0][GROUPS*PPW-1:0]   mirror
);
  localparam int unsigned C = GROUPS * PPW;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [C-1:0][PN_BITS-1:0] sr;     // per-pixel shift registers
    logic [C-1:0]              on, on_d;
    logic [C-1:0]              m;

    for (genvar g = 0; g < GROUPS; g++) begin : g_word
      always_ff @(posedge gclk)
        if (we && ws[r] && csel[g])
          for (int i = 0; i < PPW; i++)
            sr[g*PPW+i] <= {sr[g*PPW+i][PN_BITS-2:0], din[i]};
      for (genvar i = 0; i < PPW; i++) begin : g_pix
        logic match;
        assign match        = (sr[g*PPW+i] == cnt);
        assign on_d[g*PPW+i] = ~match & (frame_start | on[g*PPW+i]);
        assign m[g*PPW+i]    = ~(on[g*PPW+i] ~^ ito);   // output inverter
      end
    end

    always_ff @(posedge gclk or negedge rst_n)
      if (!rst_n) on <= '0;
      else        on <= on_d;

    assign mirror[r] = m;
  end
endmodule
