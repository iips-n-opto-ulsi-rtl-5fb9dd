// oup8_array: the 8-phase Opto-ULSI processor, a 2x2 arrangement of pixel blocks.
//
// The pixel array is split into four equal blocks (Block0 bottom-left, Block1
// bottom-right, Block2 top-left, Block3 top-right) so that each block's bit and
// word lines stay short. Every block has its own NAND/NOR row decoder and column
// decoder, enabled by the decoded 2-bit block field al. The chip pins are chip
// select cs, read/write rw_n (1 = read, 0 = write), the eight phase signals
// p[7:0], the row address a_row (A[14:6] on the full chip), the column address
// a_col (A[5:0]), the block address al[1:0], the 24-bit data bus DIO (split here
// into dio_in, dio_out and the output enable dio_oe, since the top has no
// tri-state pins) and the reset pad, read as active-low reset (rst_n).
//
// Access: on a rising clock edge with cs high, the address goes into the SR hold
// latch and rw_n and dio_in are captured. In the next cycle the decoders select
// one word of eight pixels in one block: a write stores dio_in at the following
// edge; a read puts the word on dio_out with dio_oe high after that edge. So both
// operations complete two edges after cs was sampled, one access per clock.
// mirror[y][x] is the drive of every pixel (y counts rows upward from Block0).
//
// The block split, per-block decoding, the address fields, the 24-bit data bus,
// the 3-bit pixel and the SR latch on the address follow the published chip; the
// synchronous timing and the pin split of DIO are this design's choices. The
// full chip has ROW_BITS = 9 and COL_BITS = 6 (1024 x 1024 pixels); the defaults
// are smaller so that the elaboration tools finish.
module oup8_array import oup_pkg::*; #(
  parameter int unsigned ROW_BITS = 6,
  parameter int unsigned COL_BITS = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cs,
  input  logic                         rw_n,
  input  logic [BLOCK_BITS-1:0]        al,
  input  logic [ROW_BITS-1:0]          a_row,
  input  logic [COL_BITS-1:0]          a_col,
  input  logic [P8_PHASES-1:0]         p,
  input  logic [PIX_PER_WORD*P8_BITS-1:0] dio_in,
  output logic [PIX_PER_WORD*P8_BITS-1:0] dio_out,
  output logic                         dio_oe,
  output logic [2*(1<<ROW_BITS)-1:0][2*(1<<COL_BITS)*PIX_PER_WORD-1:0] mirror
);
  localparam int unsigned ROWS   = 1 << ROW_BITS;
  localparam int unsigned GROUPS = 1 << COL_BITS;
  localparam int unsigned COLS   = GROUPS * PIX_PER_WORD;
  localparam int unsigned AW     = BLOCK_BITS + ROW_BITS + COL_BITS;
  localparam int unsigned DW     = PIX_PER_WORD * P8_BITS;

  logic [AW-1:0] addr_q;
  logic          op_valid, op_read;
  logic [DW-1:0] wd_q;
  logic [3:0]    bsel;
  logic [3:0][DW-1:0] blk_rd;
  logic [3:0][ROWS-1:0][COLS-1:0] blk_mirror;

  addr_sr_latch #(.W(AW)) u_alatch (
    .clk(clk), .rst_n(rst_n), .load(cs), .d({al, a_row, a_col}), .q(addr_q)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      op_valid <= 1'b0;
      op_read  <= 1'b0;
      wd_q     <= '0;
    end else begin
      op_valid <= cs;
      if (cs) begin
        op_read <= rw_n;
        wd_q    <= dio_in;
      end
    end

  nand_nor_decoder #(.N(BLOCK_BITS)) u_bdec (
    .en(op_valid), .addr(addr_q[AW-1 -: BLOCK_BITS]), .sel(bsel)
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

    oup8_block #(.ROWS(ROWS), .GROUPS(GROUPS), .PPW(PIX_PER_WORD)) u_blk (
      .clk(clk), .we(~op_read), .ws(ws), .csel(csel),
      .wd(wd_q), .rd(blk_rd[b]), .p(p), .mirror(blk_mirror[b])
    );

    for (genvar r = 0; r < ROWS; r++) begin : g_map
      assign mirror[(b/2)*ROWS + r][(b%2)*COLS +: COLS] = blk_mirror[b][r];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dio_out <= '0;
      dio_oe  <= 1'b0;
    end else begin
      dio_oe <= op_valid & op_read;
      if (op_valid && op_read) dio_out <= blk_rd[0] | blk_rd[1] | blk_rd[2] | blk_rd[3];
    end
endmodule
