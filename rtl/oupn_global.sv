// oupn_global: the single global circuit of the 256-phase processor.
//
// It counts global clocks in a Gray-code counter: 256 counts make one frame (one
// period of the phase clock), and the count is broadcast to all pixels. The
// frame_start strobe is high while the count is zero. The ITO (counter electrode)
// level toggles each time a new frame begins, so the liquid crystal sees no DC
// component over two frames. The external phase clock (ext_clk) is brought in
// through a two-flop synchroniser; each rising edge restarts the count at zero,
// which keeps frames locked to the external clock even if it is not exactly 256
// global clocks long.
//
// The global clock at 256 times the phase clock, the single circuit that makes
// the ITO signal, the external clock feeding it and the Gray code follow the
// published proposal; the toggle-per-frame ITO and the restart on the external
// edge are this design's choices.
//
// Interface/timing: cnt, frame_start and ito are registered or decoded from
// registers in the gclk domain; an ext_clk rising edge appears as a restart three
// gclk edges later. Active-low asynchronous reset.
module oupn_global import oup_pkg::*; (
  input  logic               gclk,
  input  logic               rst_n,
  input  logic               ext_clk,
  output logic [PN_BITS-1:0] cnt,
  output logic               frame_start,
  output logic               ito
);
  logic [2:0] ext_sync;
  logic       restart, wrap;

  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) ext_sync <= '0;
    else        ext_sync <= {ext_sync[1:0], ext_clk};

  assign restart = ext_sync[1] & ~ext_sync[2];

  gray_counter #(.W(PN_BITS)) u_cnt (
    .clk   (gclk),
    .rst_n (rst_n),
    .en    (1'b1),
    .clear (restart),
    .gray  (cnt),
    .wrap  (wrap)
  );

  assign frame_start = (cnt == '0);

  // ITO flips whenever the next count is zero (natural wrap or restart)
  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n)                   ito <= 1'b0;
    else if (restart || wrap)     ito <= ~ito;
endmodule
