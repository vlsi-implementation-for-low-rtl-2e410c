// tb_dsp_alu: checks every ALU command: subtract, add (with Z = |B| > |A|),
// AND, OR, pass, multiply, compare-equal and compare-greater, plus an
// unknown code, on directed and random operands. Expected values are worked
// out with integer arithmetic on the operands' signed values.
module tb_dsp_alu;
  import cell16_pkg::*;

  logic [3:0] op, fn;
  sm_t        a, b, c;
  logic       flag, ovf;
  int         checks = 0, failures = 0;
  logic       clk = 0;

  dsp_alu dut (.op, .fn, .a, .b, .c, .flag, .ovf);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic expect_cf(string name, logic [15:0] exp_c, logic exp_f);
    checks++;
    if (c !== exp_c || flag !== exp_f) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d: c=%h flag=%0d, expected %h %0d", name, sm_to_int(a), sm_to_int(b),
               c, flag, exp_c, exp_f);
    end
  endtask

  task automatic try(int av, int bv);
    logic [15:0] aw, bw, w;
    longint      p;
    a  = int_to_sm(av);
    b  = int_to_sm(bv);
    aw = a;
    bw = b;
    fn = 4'b0000;
    op = 4'b0001; #1; expect_cf("sub", int_to_sm(av - bv), iabs(bv) > iabs(av));
    op = 4'b1001; #1; expect_cf("add", int_to_sm(av + bv), iabs(bv) > iabs(av));
    op = 4'b0010; #1; w = aw & bw; expect_cf("and", w, w == 0);
    op = 4'b0011; #1; w = aw | bw; expect_cf("or", w, w == 0);
    op = 4'b0101; #1; expect_cf("pass", aw, aw == 0);
    op = 4'b0110; #1;
    p = (longint'(iabs(av)) * iabs(bv) + 32) / 64;
    expect_cf("mult", int_to_sm(((av < 0) != (bv < 0)) ? -int'(p) : int'(p)), 1'b0);
    op = 4'b1101; fn = 4'b0000; #1; expect_cf("eq", aw, av == bv);
    op = 4'b1101; fn = 4'b0010; #1; expect_cf("gt", aw, av > bv);
    op = 4'b1100; fn = 4'b0000; #1; expect_cf("unknown", aw, 1'b0);
  endtask

  initial begin
    try(64, 64); try(64, -64); try(-64, 64); try(-100, -30); try(30, 100); try(0, 0);
    try(-5, -7); try(7, 5); try(-7, 3); try(0, -1);
    for (int i = 0; i < 1000; i++)
      try(int'($urandom_range(600)) - 300, int'($urandom_range(600)) - 300);
    // -0 compares equal to +0
    a = '{sign: 1'b1, mag: '0}; b = SM_ZERO; op = 4'b1101; fn = 4'b0000; #1;
    checks++; if (!flag) begin failures++; $display("FAIL -0 == +0"); end
    // overflow of add and multiply
    a = int_to_sm(30000); b = int_to_sm(10000); op = 4'b1001; #1;
    checks++; if (!ovf || c.mag != 15'h7fff) begin failures++; $display("FAIL add ovf"); end
    op = 4'b0110; #1;
    checks++; if (!ovf || !flag || c.mag != 15'h7fff) begin failures++; $display("FAIL mult ovf"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
