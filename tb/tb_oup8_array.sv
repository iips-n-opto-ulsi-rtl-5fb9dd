// tb_oup8_array: exercises the 8-phase processor through its pins at the default
// size. It writes random codes into words of all four blocks, reads them back and
// checks the data and the two-edge read latency (dio_oe), then checks the mirror
// drive of every pixel of the 2x2 array against a reference map of codes for each
// single phase line. Back-to-back accesses (one per clock) are included.
module tb_oup8_array;
  import oup_pkg::*;
  localparam int unsigned RB = 6, CB = 3;
  localparam int unsigned ROWS = 1 << RB, GROUPS = 1 << CB, COLS = GROUPS * PIX_PER_WORD;
  localparam int unsigned DW = PIX_PER_WORD * P8_BITS;
  logic clk = 0, rst_n = 0, cs = 0, rw_n = 1;
  logic [1:0] al = '0;
  logic [RB-1:0] a_row = '0;
  logic [CB-1:0] a_col = '0;
  logic [P8_PHASES-1:0] p = '0;
  logic [DW-1:0] dio_in = '0, dio_out;
  logic dio_oe;
  logic [2*ROWS-1:0][2*COLS-1:0] mirror;
  logic [P8_BITS-1:0] ref_code [2*ROWS][2*COLS];
  logic [DW-1:0] exp_q [$];
  int checks = 0, failures = 0, reads = 0;

  oup8_array dut (.clk(clk), .rst_n(rst_n), .cs(cs), .rw_n(rw_n), .al(al), .a_row(a_row),
                  .a_col(a_col), .p(p), .dio_in(dio_in), .dio_out(dio_out), .dio_oe(dio_oe),
                  .mirror(mirror));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s", what);
    end
  endtask

  // read results: dio_oe must rise exactly two edges after the read was sampled
  logic [2:0] rd_pipe = '0;
  always @(posedge clk) begin
    #1;
    if (rd_pipe[1] != dio_oe) check(0, "read latency");
    if (dio_oe) begin
      reads++;
      check(exp_q.size() > 0 && dio_out == exp_q[0], "read data");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end
  always @(posedge clk) rd_pipe <= {rd_pipe[1:0], cs & rw_n};

  function automatic int px_y(input int b, input int r); return (b / 2) * ROWS + r; endfunction
  function automatic int px_x(input int b, input int g, input int i);
    return (b % 2) * COLS + g * PIX_PER_WORD + i;
  endfunction

  task automatic access(input bit rd, input int b, input int r, input int g, input logic [DW-1:0] d);
    @(negedge clk);
    cs = 1; rw_n = rd; al = 2'(b); a_row = RB'(r); a_col = CB'(g); dio_in = d;
    if (!rd) for (int i = 0; i < PIX_PER_WORD; i++) ref_code[px_y(b, r)][px_x(b, g, i)] = d[i*P8_BITS +: P8_BITS];
    else begin
      logic [DW-1:0] e;
      for (int i = 0; i < PIX_PER_WORD; i++) e[i*P8_BITS +: P8_BITS] = ref_code[px_y(b, r)][px_x(b, g, i)];
      exp_q.push_back(e);
    end
  endtask

  task automatic idle();
    @(negedge clk) cs = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int b = 0; b < 4; b++)
      for (int r = 0; r < ROWS; r++)
        for (int g = 0; g < GROUPS; g++)
          access(0, b, r, g, DW'($urandom));
    // back-to-back mixed reads and writes
    for (int k = 0; k < 400; k++)
      access($urandom_range(0, 1), $urandom_range(0, 3), $urandom_range(0, ROWS-1),
             $urandom_range(0, GROUPS-1), DW'($urandom));
    idle(); repeat (3) @(posedge clk);
    check(exp_q.size() == 0, "all reads returned");
    check(reads > 100, "reads happened");
    for (int k = 0; k < P8_PHASES; k++) begin
      @(negedge clk) p = P8_PHASES'(1 << k);
      #1;
      for (int y = 0; y < 2*ROWS; y++)
        for (int x = 0; x < 2*COLS; x++)
          check(mirror[y][x] == ~p[ref_code[y][x]], "mirror");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
