// tb_oup_top: end-to-end test of both processors in the top at default sizes.
//
// 8-phase side: every word of all four blocks is written through the pins, a
// random mix of back-to-back reads and writes follows, read data and the
// two-edge latency are checked, and the mirror drive of every pixel is checked
// for each of the eight phase lines.
// 256-phase side: every pixel is loaded serially with a random level, one frame
// of the free-running global circuit is measured pixel by pixel (drive against
// ITO for exactly "level" of 256 global clocks), then an external clock edge is
// applied mid-frame and the count must restart with an ITO toggle.
// Each mechanism (write, read, block select, phase-line select, serial load,
// frame wrap, ITO toggle, external restart, levels 0 and 255) is counted and a
// failure is recorded for any that never happened.
module tb_oup_top;
  import oup_pkg::*;
  localparam int unsigned RB = 6, CB = 3;
  localparam int unsigned ROWS = 1 << RB, GROUPS = 1 << CB, COLS = GROUPS * PIX_PER_WORD;
  localparam int unsigned DW = PIX_PER_WORD * P8_BITS;

  // 8-phase pins
  logic p8_clk = 0, p8_rst_n = 0, p8_cs = 0, p8_rw_n = 1;
  logic [1:0] p8_al = '0;
  logic [RB-1:0] p8_a_row = '0;
  logic [CB-1:0] p8_a_col = '0;
  logic [P8_PHASES-1:0] p8_p = '0;
  logic [DW-1:0] p8_dio_in = '0, p8_dio_out;
  logic p8_dio_oe;
  logic [2*ROWS-1:0][2*COLS-1:0] p8_mirror;
  // 256-phase pins
  logic pn_gclk = 0, pn_rst_n = 0, pn_ext_clk = 0, pn_cs = 0, pn_we = 0;
  logic [1:0] pn_al = '0;
  logic [RB-1:0] pn_a_row = '0;
  logic [CB-1:0] pn_a_col = '0;
  logic [PIX_PER_WORD-1:0] pn_din = '0;
  logic pn_ito, ito_before;
  logic [PN_BITS-1:0] pn_cnt;
  logic [2*ROWS-1:0][2*COLS-1:0] pn_mirror;

  oup_top dut (.*);

  always #5 p8_clk = ~p8_clk;
  always #4 pn_gclk = ~pn_gclk;

  logic [P8_BITS-1:0] code8 [2*ROWS][2*COLS];
  logic [PN_BITS-1:0] level [2*ROWS][2*COLS];
  int unsigned on_ticks [2*ROWS][2*COLS];
  logic [DW-1:0] exp_q [$];
  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0, n_phase = 0, n_serial = 0, n_wrap = 0, n_ito = 0,
      n_restart = 0, n_lvl0 = 0, n_lvl255 = 0;
  int n_block [4] = '{0, 0, 0, 0};
  bit done8 = 0, donen = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 8-phase processor ----------------
  logic [2:0] rd_pipe = '0;
  always @(posedge p8_clk) begin
    #1;
    if (rd_pipe[1] != p8_dio_oe) check(0, "p8 read latency");
    if (p8_dio_oe) begin
      n_read++;
      check(exp_q.size() > 0 && p8_dio_out == exp_q[0], "p8 read data");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end
  always @(posedge p8_clk) rd_pipe <= {rd_pipe[1:0], p8_cs & p8_rw_n};

  task automatic p8_access(input bit rd, input int b, input int r, input int g, input logic [DW-1:0] d);
    int y, x0;
    y = (b / 2) * ROWS + r; x0 = (b % 2) * COLS + g * PIX_PER_WORD;
    @(negedge p8_clk);
    p8_cs = 1; p8_rw_n = rd; p8_al = 2'(b); p8_a_row = RB'(r); p8_a_col = CB'(g); p8_dio_in = d;
    n_block[b]++;
    if (!rd) begin
      n_write++;
      for (int i = 0; i < PIX_PER_WORD; i++) code8[y][x0+i] = d[i*P8_BITS +: P8_BITS];
    end else begin
      logic [DW-1:0] e;
      for (int i = 0; i < PIX_PER_WORD; i++) e[i*P8_BITS +: P8_BITS] = code8[y][x0+i];
      exp_q.push_back(e);
    end
  endtask

  initial begin
    repeat (2) @(posedge p8_clk);
    @(negedge p8_clk) p8_rst_n = 1;
    for (int b = 0; b < 4; b++)
      for (int r = 0; r < ROWS; r++)
        for (int g = 0; g < GROUPS; g++) p8_access(0, b, r, g, DW'($urandom));
    for (int k = 0; k < 300; k++)
      p8_access($urandom_range(0, 1), $urandom_range(0, 3), $urandom_range(0, ROWS-1),
                $urandom_range(0, GROUPS-1), DW'($urandom));
    @(negedge p8_clk) p8_cs = 0;
    repeat (3) @(posedge p8_clk);
    check(exp_q.size() == 0, "p8 all reads returned");
    for (int k = 0; k < P8_PHASES; k++) begin
      @(negedge p8_clk) p8_p = P8_PHASES'(1 << k);
      #1;
      for (int y = 0; y < 2*ROWS; y++)
        for (int x = 0; x < 2*COLS; x++) begin
          check(p8_mirror[y][x] == ~p8_p[code8[y][x]], "p8 mirror");
          if (code8[y][x] == P8_BITS'(k)) n_phase++;
        end
    end
    done8 = 1;
  end

  // ---------------- 256-phase processor ----------------
  logic [PN_BITS-1:0] prev_cnt;
  always @(posedge pn_gclk) begin
    #1;
    if (pn_rst_n && pn_cnt == 0 && prev_cnt == 8'h80) n_wrap++;   // Gray 255 -> 0
    prev_cnt = pn_cnt;
  end
  logic ito_q = 0;
  always @(posedge pn_gclk) begin
    #1;
    if (pn_ito != ito_q) n_ito++;
    ito_q = pn_ito;
  end

  initial begin
    for (int y = 0; y < 2*ROWS; y++)
      for (int x = 0; x < 2*COLS; x++) level[y][x] = PN_BITS'($urandom);
    level[1][2] = 0; level[100][3] = 255;
    repeat (2) @(posedge pn_gclk);
    @(negedge pn_gclk) pn_rst_n = 1;
    for (int b = 0; b < 4; b++)
      for (int r = 0; r < ROWS; r++)
        for (int g = 0; g < GROUPS; g++)
          for (int k = PN_BITS - 1; k >= 0; k--) begin
            @(negedge pn_gclk);
            pn_cs = 1; pn_we = 1; pn_al = 2'(b); pn_a_row = RB'(r); pn_a_col = CB'(g);
            for (int i = 0; i < PIX_PER_WORD; i++)
              pn_din[i] = bin2gray(level[(b/2)*ROWS + r][(b%2)*COLS + g*PIX_PER_WORD + i])[k];
            if (k == 0) n_serial++;
          end
    @(negedge pn_gclk) pn_cs = 0; pn_we = 0;
    repeat (3) @(posedge pn_gclk);
    do begin @(posedge pn_gclk); #1; end while (pn_cnt != 0);
    for (int y = 0; y < 2*ROWS; y++) for (int x = 0; x < 2*COLS; x++) on_ticks[y][x] = 0;
    for (int t = 0; t < 256; t++) begin
      @(posedge pn_gclk); #1;
      for (int y = 0; y < 2*ROWS; y++)
        for (int x = 0; x < 2*COLS; x++) if (pn_mirror[y][x] != pn_ito) on_ticks[y][x]++;
    end
    check(pn_cnt == 0, "pn frame length 256");
    for (int y = 0; y < 2*ROWS; y++)
      for (int x = 0; x < 2*COLS; x++) begin
        check(on_ticks[y][x] == level[y][x], $sformatf("pn level y=%0d x=%0d", y, x));
        if (level[y][x] == 0)   n_lvl0++;
        if (level[y][x] == 255) n_lvl255++;
      end
    // external clock restart mid-frame
    repeat (77) @(posedge pn_gclk);
    @(negedge pn_gclk) pn_ext_clk = 1; ito_before = pn_ito;
    repeat (3) @(posedge pn_gclk);
    #1;
    check(pn_cnt == 0 && pn_ito != ito_before, "pn restart on external clock");
    if (pn_cnt == 0) n_restart++;
    donen = 1;
  end

  initial begin
    wait (done8 && donen);
    check(n_write > 0, "mechanism: p8 write");
    check(n_read > 0, "mechanism: p8 read");
    for (int b = 0; b < 4; b++) check(n_block[b] > 0, "mechanism: block select");
    check(n_phase > 0, "mechanism: phase line select");
    check(n_serial > 0, "mechanism: serial load");
    check(n_wrap > 0, "mechanism: frame wrap");
    check(n_ito > 0, "mechanism: ITO toggle");
    check(n_restart > 0, "mechanism: external restart");
    check(n_lvl0 > 0 && n_lvl255 > 0, "mechanism: extreme levels");
    $display("mechanisms: p8 writes=%0d reads=%0d blocks=%0d/%0d/%0d/%0d phase-selects=%0d",
             n_write, n_read, n_block[0], n_block[1], n_block[2], n_block[3], n_phase);
    $display("mechanisms: pn serial words=%0d wraps=%0d ito toggles=%0d restarts=%0d",
             n_serial, n_wrap, n_ito, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
