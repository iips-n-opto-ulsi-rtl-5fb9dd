// tb_oupn_block: loads random 8-bit phase codes serially into every pixel of a
// small 256-phase pixel block, then plays two frames of a Gray-coded count with a
// frame strobe and a toggling ITO level, as the global circuit would. For every
// pixel it counts the global clocks in a frame where the drive differs from the
// ITO level and checks that the count equals the pixel's level (the binary value
// of its Gray code), and that the drive is in phase with the frame in both ITO
// polarities. Codes 0 and 255 are forced into two pixels.
module tb_oupn_block;
  import oup_pkg::*;
  localparam int unsigned ROWS = 8, GROUPS = 4, PPW = 8, C = GROUPS * PPW;
  logic gclk = 0, rst_n = 0, we = 0, frame_start = 0, ito = 0;
  logic [ROWS-1:0] ws = '0;
  logic [GROUPS-1:0] csel = '0;
  logic [PPW-1:0] din = '0;
  logic [PN_BITS-1:0] cnt = '0;
  logic [ROWS-1:0][C-1:0] mirror;
  logic [PN_BITS-1:0] level [ROWS][C];
  int on_ticks [ROWS][C];
  int checks = 0, failures = 0;

  oupn_block #(.ROWS(ROWS), .GROUPS(GROUPS), .PPW(PPW)) dut (
    .gclk(gclk), .rst_n(rst_n), .we(we), .ws(ws), .csel(csel), .din(din),
    .cnt(cnt), .frame_start(frame_start), .ito(ito), .mirror(mirror));

  always #5 gclk = ~gclk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge gclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < C; c++) level[r][c] = PN_BITS'($urandom);
    level[0][0] = 8'd0; level[1][5] = 8'd255; level[2][7] = 8'd1; level[3][9] = 8'd128;
    @(negedge gclk) rst_n = 1;
    // serial load, MSB of the Gray code first
    for (int r = 0; r < ROWS; r++)
      for (int g = 0; g < GROUPS; g++)
        for (int b = PN_BITS - 1; b >= 0; b--) begin
          @(negedge gclk);
          we = 1; ws = '0; ws[r] = 1; csel = '0; csel[g] = 1;
          for (int i = 0; i < PPW; i++) din[i] = bin2gray(level[r][g*PPW+i])[b];
        end
    @(negedge gclk) we = 0; ws = '0; csel = '0;
    // three frames with alternating ITO levels; the first is only settling
    for (int f = 0; f < 3; f++) begin
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < C; c++) on_ticks[r][c] = 0;
      for (int t = 0; t < 256; t++) begin
        @(negedge gclk);
        cnt = bin2gray(PN_BITS'(t)); frame_start = (t == 0);
        if (t == 0) ito = ~ito;
        @(posedge gclk); #1;
        // drive as seen after this tick, still inside the frame for t < 255
        if (t < 255)
          for (int r = 0; r < ROWS; r++)
            for (int c = 0; c < C; c++) if (mirror[r][c] != ito) on_ticks[r][c]++;
      end
      // the drive is set at tick 0 and cleared at tick "level", so it is on
      // after exactly "level" of the edges 0..254
      if (f > 0)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < C; c++)
            check(on_ticks[r][c] == int'(level[r][c]),
                  $sformatf("duty r=%0d c=%0d level=%0d got=%0d", r, c, level[r][c], on_ticks[r][c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
