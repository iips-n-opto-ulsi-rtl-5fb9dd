// tb_addr_sr_latch: drives random addresses with load randomly high or low and
// checks that the output follows the input one clock after a load and holds its
// value otherwise; reset must clear it.
module tb_addr_sr_latch;
  localparam int unsigned W = 17;
  logic clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  addr_sr_latch #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    checks++; if (q !== '0) failures++;
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 2) == 0);
      d    = W'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 5) $display("mismatch i=%0d q=%h exp=%h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
