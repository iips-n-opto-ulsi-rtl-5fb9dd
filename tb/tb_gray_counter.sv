// tb_gray_counter: runs the 8-bit Gray counter through several full periods and
// checks every value against binary-to-Gray conversion of an independent binary
// count, that exactly one bit changes per step, that wrap is high only on the last
// code, that en low holds the count and that clear returns it to zero.
module tb_gray_counter;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic [W-1:0] gray, prev;
  logic wrap;
  int unsigned ref_bin;
  int checks = 0, failures = 0, wraps = 0;

  gray_counter #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .clear(clear),
                             .gray(gray), .wrap(wrap));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] b2g(input logic [W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s gray=%h ref=%0d", what, gray, ref_bin);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_bin = 0;
    repeat (2) @(posedge clk);
    #1 check(gray == '0, "reset");
    rst_n = 1; en = 1;
    for (int i = 0; i < 3 * (1 << W); i++) begin
      @(negedge clk);
      check(wrap == (ref_bin == (1 << W) - 1), "wrap flag");
      prev = gray;
      @(posedge clk); #1;
      ref_bin = (ref_bin + 1) % (1 << W);
      if (ref_bin == 0) wraps++;
      check(gray == b2g(W'(ref_bin)), "value");
      check($countones(gray ^ prev) == 1, "single bit change");
    end
    check(wraps == 3, "three wraps");
    // hold
    @(negedge clk) en = 0; prev = gray;
    repeat (3) @(posedge clk);
    #1 check(gray == prev, "hold");
    // clear
    @(negedge clk) en = 1; clear = 1;
    @(posedge clk); #1 check(gray == '0, "clear");
    clear = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
