// tb_oupn_global: checks the global circuit of the 256-phase processor. With a
// free-running count it measures that frame_start recurs every 256 global clocks,
// that the count is Gray code stepping one bit at a time, and that ITO toggles
// once per frame. It then drives an external clock edge mid-frame and checks the
// count restarts at zero three global clocks later, with an ITO toggle.
module tb_oupn_global;
  import oup_pkg::*;
  logic gclk = 0, rst_n = 0, ext_clk = 0;
  logic [PN_BITS-1:0] cnt, prev;
  logic frame_start, ito, ito_prev;
  int checks = 0, failures = 0;
  int last_start, t, starts, ito_toggles;

  oupn_global dut (.gclk(gclk), .rst_n(rst_n), .ext_clk(ext_clk),
                   .cnt(cnt), .frame_start(frame_start), .ito(ito));

  always #5 gclk = ~gclk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s t=%0d cnt=%h", what, t, cnt);
    end
  endtask

  initial begin
    repeat (5000) @(posedge gclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge gclk);
    @(negedge gclk) rst_n = 1;
    last_start = -1; starts = 0; ito_toggles = 0;
    for (t = 0; t < 4 * 256; t++) begin
      prev = cnt; ito_prev = ito;
      @(posedge gclk); #1;
      check($countones(cnt ^ prev) == 1, "one bit per step");
      check(frame_start == (cnt == 0), "frame_start decode");
      check(gray2bin(cnt) == PN_BITS'(gray2bin(prev) + 1), "count step");
      if (ito != ito_prev) begin
        ito_toggles++;
        check(cnt == 0, "ITO toggles at frame start");
      end
      if (frame_start) begin
        if (last_start >= 0) check(t - last_start == 256, "frame length 256");
        last_start = t; starts++;
      end
    end
    check(starts == 4, "four frames");
    check(ito_toggles == 4, "ITO toggles per frame");
    // external clock restart in mid-frame
    while (gray2bin(cnt) != 100) @(posedge gclk);
    @(negedge gclk) ext_clk = 1;
    ito_prev = ito;
    repeat (3) @(posedge gclk);
    #1 check(cnt == 0, "restart on external edge");
    check(ito != ito_prev, "ITO toggles on restart");
    repeat (10) @(posedge gclk);
    #1 check(gray2bin(cnt) == 10, "counting after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
