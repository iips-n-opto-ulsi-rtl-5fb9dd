// oup_top: the two beam-steering Opto-ULSI processors side by side.
//
// p8_* is the 8-phase SRAM-pixel processor (oup8_array): a pixel stores a 3-bit
// code that selects one of eight externally supplied phase signals for its
// mirror. pn_* is the proposed 256-phase processor (oupn_array): a pixel stores an
// 8-bit code in a shift register and turns it into one of 256 drive levels using
// a global clock 256 times faster than the phase clock and a Gray-coded count
// from a single global circuit. The two chips share nothing; each keeps its own
// clock, reset and pins. Array sizes are set by ROW_BITS and COL_BITS (9 and 6
// give the full 1024 x 1024 arrays; the defaults are smaller).
module oup_top import oup_pkg::*; #(
  parameter int unsigned ROW_BITS = 6,
  parameter int unsigned COL_BITS = 3
) (
  // 8-phase processor
  input  logic                            p8_clk,
  input  logic                            p8_rst_n,
  input  logic                            p8_cs,
  input  logic                            p8_rw_n,
  input  logic [BLOCK_BITS-1:0]           p8_al,
  input  logic [ROW_BITS-1:0]             p8_a_row,
  input  logic [COL_BITS-1:0]             p8_a_col,
  input  logic [P8_PHASES-1:0]            p8_p,
  input  logic [PIX_PER_WORD*P8_BITS-1:0] p8_dio_in,
  output logic [PIX_PER_WORD*P8_BITS-1:0] p8_dio_out,
  output logic                            p8_dio_oe,
  output logic [2*(1<<ROW_BITS)-1:0][2*(1<<COL_BITS)*PIX_PER_WORD-1:0] p8_mirror,
  // 256-phase processor
  input  logic                            pn_gclk,
  input  logic                            pn_rst_n,
  input  logic                            pn_ext_clk,
  input  logic                            pn_cs,
  input  logic                            pn_we,
  input  logic [BLOCK_BITS-1:0]           pn_al,
  input  logic [ROW_BITS-1:0]             pn_a_row,
  input  logic [COL_BITS-1:0]             pn_a_col,
  input  logic [PIX_PER_WORD-1:0]         pn_din,
  output logic                            pn_ito,
  output logic [PN_BITS-1:0]              pn_cnt,
  output logic [2*(1<<ROW_BITS)-1:0][2*(1<<COL_BITS)*PIX_PER_WORD-1:0] pn_mirror
);
  oup8_array #(.ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS)) u_oup8 (
    .clk(p8_clk), .rst_n(p8_rst_n), .cs(p8_cs), .rw_n(p8_rw_n), .al(p8_al),
    .a_row(p8_a_row), .a_col(p8_a_col), .p(p8_p), .dio_in(p8_dio_in),
    .dio_out(p8_dio_out), .dio_oe(p8_dio_oe), .mirror(p8_mirror)
  );

  oupn_array #(.ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS)) u_oupn (
    .gclk(pn_gclk), .rst_n(pn_rst_n), .ext_clk(pn_ext_clk), .cs(pn_cs), .we(pn_we),
    .al(pn_al), .a_row(pn_a_row), .a_col(pn_a_col), .din(pn_din),
    .ito(pn_ito), .cnt(pn_cnt), .mirror(pn_mirror)
  );
endmodule
