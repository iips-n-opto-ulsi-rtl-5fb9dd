// tb_oup8_block: writes random 3-bit codes into random words of a small 8-phase
// pixel block, reads words back through the bit lines, and checks every pixel's
// mirror drive (~p[code]) against a reference copy of the codes for random phase
// inputs. It also checks that an unselected block reads zero and that a write
// without a column select changes nothing.
module tb_oup8_block;
  import oup_pkg::*;
  localparam int unsigned ROWS = 16, GROUPS = 4, PPW = 8, C = GROUPS * PPW;
  logic clk = 0, we = 0;
  logic [ROWS-1:0] ws = '0;
  logic [GROUPS-1:0] csel = '0;
  logic [PPW-1:0][P8_BITS-1:0] wd = '0, rd;
  logic [P8_PHASES-1:0] p = '0;
  logic [ROWS-1:0][C-1:0] mirror;
  logic [P8_BITS-1:0] ref_code [ROWS][C];
  int checks = 0, failures = 0;

  oup8_block #(.ROWS(ROWS), .GROUPS(GROUPS), .PPW(PPW)) dut (
    .clk(clk), .we(we), .ws(ws), .csel(csel), .wd(wd), .rd(rd), .p(p), .mirror(mirror));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s", what);
    end
  endtask

  task automatic write_word(input int r, input int g, input logic [PPW-1:0][P8_BITS-1:0] d);
    @(negedge clk);
    we = 1; ws = '0; ws[r] = 1; csel = '0; csel[g] = 1; wd = d;
    @(posedge clk);
    for (int i = 0; i < PPW; i++) ref_code[r][g*PPW+i] = d[i];
    @(negedge clk) we = 0; ws = '0; csel = '0;
  endtask

  task automatic check_mirrors();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < C; c++)
        check(mirror[r][c] == ~p[ref_code[r][c]], "mirror");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int r = 0; r < ROWS; r++)
      for (int g = 0; g < GROUPS; g++)
        write_word(r, g, (PPW*P8_BITS)'({$urandom, $urandom}));
    // random overwrites
    for (int k = 0; k < 50; k++)
      write_word($urandom_range(0, ROWS-1), $urandom_range(0, GROUPS-1),
                 (PPW*P8_BITS)'({$urandom, $urandom}));
    // write with no column select: nothing may change
    @(negedge clk) we = 1; ws = '0; ws[3] = 1; csel = '0; wd = '1;
    @(negedge clk) we = 0; ws = '0;
    // read back every word
    for (int r = 0; r < ROWS; r++)
      for (int g = 0; g < GROUPS; g++) begin
        @(negedge clk) ws = '0; ws[r] = 1; csel = '0; csel[g] = 1;
        #1;
        for (int i = 0; i < PPW; i++) check(rd[i] == ref_code[r][g*PPW+i], "read");
      end
    @(negedge clk) ws = '0; csel = '0;
    #1 check(rd == '0, "idle bit lines");
    // mirror drive for each single phase line and random phase patterns
    for (int k = 0; k < P8_PHASES + 8; k++) begin
      p = (k < P8_PHASES) ? P8_PHASES'(1 << k) : P8_PHASES'($urandom);
      #1 check_mirrors();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
