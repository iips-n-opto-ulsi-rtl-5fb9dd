// oupn_array: the proposed 256-phase Opto-ULSI processor.
//
// It has the same 2x2 block arrangement and per-block NAND/NOR decoding as the
// 8-phase chip, but every pixel is an 8-stage shift register plus one drive
// flip-flop (see oupn_block), clocked by the global clock gclk that runs 256
// times per phase-clock period. One global circuit (oupn_global) makes the
// Gray-coded frame count, the frame strobe and the ITO level for all blocks and
// is aligned to the external clock ext_clk.
//
// Writing a pixel word: hold cs and we high with the word's address for eight
// gclk cycles and present one bit per pixel on din each cycle, most significant
// bit of the (Gray-coded) phase code first. The address and din pass through the
// SR hold stage, so each bit lands in the shift registers two gclk edges after it
// was presented. Pixels keep driving their mirrors while they are written.
// mirror[y][x] is each pixel's drive, ito the counter-electrode level.
//
// The data path for writing (serial, one bit per pixel per clock, 8 pixels per
// word) is this design's choice; the published block diagram shows only the
// address, the external clock to the ITO and the internal global clock. The full
// chip has ROW_BITS = 9 and COL_BITS = 6; the defaults are smaller so that the
// elaboration tools finish.
module oupn_array import oup_pkg::*; #(
  parameter int unsigned ROW_BITS = 6,
  parameter int unsigned COL_BITS = 3
) (
  input  logic                         gclk,
  input  logic                         rst_n,
  input  logic                         ext_clk,
  input  logic                         cs,
  input  logic                         we,
  input  logic [BLOCK_BITS-1:0]        al,
  input  logic [ROW_BITS-1:0]          a_row,
  input  logic [COL_BITS-1:0]          a_col,
  input  logic [PIX_PER_WORD-1:0]      din,
  output logic                         ito,
  output logic [PN_BITS-1:0]           cnt,
  output logic [2*(1<<ROW_BITS)-1:0][2*(1<<COL_BITS)*PIX_PER_WORD-1:0] mirror
);
  localparam int unsigned ROWS   = 1 << ROW_BITS;
  localparam int unsigned GROUPS = 1 << COL_BITS;
  localparam int unsigned COLS   = GROUPS * PIX_PER_WORD;
  localparam int unsigned AW     = BLOCK_BITS + ROW_BITS + COL_BITS;

  logic [AW-1:0]           addr_q;
  logic                    wr_q;
  logic [PIX_PER_WORD-1:0] din_q;
  logic [3:0]              bsel;
  logic                    frame_start;
  logic [3:0][ROWS-1:0][COLS-1:0] blk_mirror;

  oupn_global u_global (
    .gclk(gclk), .rst_n(rst_n), .ext_clk(ext_clk),
    .cnt(cnt), .frame_start(frame_start), .ito(ito)
  );

  addr_sr_latch #(.W(AW)) u_alatch (
    .clk(gclk), .rst_n(rst_n), .load(cs), .d({al, a_row, a_col}), .q(addr_q)
  );

  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) begin
      wr_q  <= 1'b0;
      din_q <= '0;
    end else begin
      wr_q  <= cs & we;
      din_q <= din;
    end

  nand_nor_decoder #(.N(BLOCK_BITS)) u_bdec (
    .en(wr_q), .addr(addr_q[AW-1 -: BLOCK_BITS]), .sel(bsel)
  );

  for (genvar b = 0; b < 4; b++) begin : g_blk
    logic [ROWS-1:0]   ws;
    logic [GROUPS-1:0] csel;

    nand_nor_decoder #(.N(ROW_BITS)) u_rdec (
      .en(bsel[b]), .addr(addr_q[COL_BITS +: ROW_BITS]), .sel(ws)
    );
    nand_nor_decoder #(.N(COL_BITS)) u_cdec (
      .en(bsel[b]), .addr(addr_q[COL_BITS-1:0]), .sel(csel)
    );

    oupn_block #(.ROWS(ROWS), .GROUPS(GROUPS), .PPW(PIX_PER_WORD)) u_blk (
      .gclk(gclk), .rst_n(rst_n), .we(wr_q), .ws(ws), .csel(csel), .din(din_q),
      .cnt(cnt), .frame_start(frame_start), .ito(ito), .mirror(blk_mirror[b])
    );

    for (genvar r = 0; r < ROWS; r++) begin : g_map
      assign mirror[(b/2)*ROWS + r][(b%2)*COLS +: COLS] = blk_mirror[b][r];
    end
  end
endmodule
