// tb_nand_nor_decoder: exhaustive check of the NAND/NOR decoder at its default
// width. For every address, with the enable high exactly the addressed line must
// be high; with the enable low no line may be high. Expected values come from a
// shift of a single 1.
module tb_nand_nor_decoder;
  localparam int unsigned N = 9;
  logic en;
  logic [N-1:0] addr;
  logic [(1<<N)-1:0] sel, exp_sel;
  int checks = 0, failures = 0;

  nand_nor_decoder #(.N(N)) dut (.en(en), .addr(addr), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < (1 << N); a++) begin
        en = e[0]; addr = N'(a);
        #1;
        exp_sel = '0;
        if (e == 1) exp_sel[a] = 1'b1;
        checks++;
        if (sel !== exp_sel) begin
          failures++;
          if (failures < 5) $display("mismatch en=%0d addr=%0d", e, a);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
