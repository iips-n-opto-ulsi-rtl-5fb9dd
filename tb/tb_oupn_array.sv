// tb_oupn_array: loads a random phase level into every pixel of the 256-phase
// processor at its default size through the pins (serial, eight global clocks per
// word, words of all four blocks back to back), then lets the global circuit run
// free. Over one whole frame it counts, for every pixel, the global clocks in
// which the mirror differs from the ITO level and checks that this equals the
// pixel's level. It also checks that the frame is 256 global clocks long.
module tb_oupn_array;
  import oup_pkg::*;
  localparam int unsigned RB = 6, CB = 3;
  localparam int unsigned ROWS = 1 << RB, GROUPS = 1 << CB, COLS = GROUPS * PIX_PER_WORD;
  logic gclk = 0, rst_n = 0, ext_clk = 0, cs = 0, we = 0;
  logic [1:0] al = '0;
  logic [RB-1:0] a_row = '0;
  logic [CB-1:0] a_col = '0;
  logic [PIX_PER_WORD-1:0] din = '0;
  logic ito;
  logic [PN_BITS-1:0] cnt;
  logic [2*ROWS-1:0][2*COLS-1:0] mirror;
  logic [PN_BITS-1:0] level [2*ROWS][2*COLS];
  int unsigned on_ticks [2*ROWS][2*COLS];
  int checks = 0, failures = 0, frame_len;

  oupn_array dut (.gclk(gclk), .rst_n(rst_n), .ext_clk(ext_clk), .cs(cs), .we(we), .al(al),
                  .a_row(a_row), .a_col(a_col), .din(din), .ito(ito), .cnt(cnt), .mirror(mirror));

  always #5 gclk = ~gclk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge gclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < 2*ROWS; y++)
      for (int x = 0; x < 2*COLS; x++) level[y][x] = PN_BITS'($urandom);
    level[0][0] = 0; level[0][1] = 255;
    repeat (2) @(posedge gclk);
    @(negedge gclk) rst_n = 1;
    for (int b = 0; b < 4; b++)
      for (int r = 0; r < ROWS; r++)
        for (int g = 0; g < GROUPS; g++)
          for (int k = PN_BITS - 1; k >= 0; k--) begin
            @(negedge gclk);
            cs = 1; we = 1; al = 2'(b); a_row = RB'(r); a_col = CB'(g);
            for (int i = 0; i < PIX_PER_WORD; i++)
              din[i] = bin2gray(level[(b/2)*ROWS + r][(b%2)*COLS + g*PIX_PER_WORD + i])[k];
          end
    @(negedge gclk) cs = 0; we = 0;
    repeat (3) @(posedge gclk);
    // align to a frame
    do begin @(posedge gclk); #1; end while (cnt != 0);
    for (int y = 0; y < 2*ROWS; y++) for (int x = 0; x < 2*COLS; x++) on_ticks[y][x] = 0;
    frame_len = 0;
    for (int t = 0; t < 256; t++) begin
      @(posedge gclk); #1;
      frame_len++;
      for (int y = 0; y < 2*ROWS; y++)
        for (int x = 0; x < 2*COLS; x++) if (mirror[y][x] != ito) on_ticks[y][x]++;
    end
    check(cnt == 0, "frame is 256 global clocks");
    for (int y = 0; y < 2*ROWS; y++)
      for (int x = 0; x < 2*COLS; x++)
        check(on_ticks[y][x] == level[y][x],
              $sformatf("level y=%0d x=%0d exp=%0d got=%0d", y, x, level[y][x], on_ticks[y][x]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
