// tb_sm_mult: checks the sign-magnitude multiplier against integer
// arithmetic: y = sign(a*b) * round(|a|*|b| / 64), saturated at the largest
// magnitude with ovf, +0 for a zero product.
module tb_sm_mult;
  import cell16_pkg::*;

  sm_t  a, b, y;
  logic ovf;
  int   checks = 0, failures = 0;
  logic clk = 0;

  sm_mult dut (.a, .b, .y, .ovf);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(int av, int bv);
    longint p, m;
    bit     neg, o;
    a = int_to_sm(av);
    b = int_to_sm(bv);
    #1;
    p   = longint'(av < 0 ? -av : av) * longint'(bv < 0 ? -bv : bv);
    m   = (p + 32) / 64;
    o   = m > 32767;
    if (o) m = 32767;
    neg = ((av < 0) != (bv < 0)) && m != 0;
    checks++;
    if (y.mag != m[14:0] || y.sign != neg || ovf != o) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d ovf=%0d", av, bv, sm_to_int(y), ovf);
    end
  endtask

  initial begin
    try(64, 64); try(-64, 64); try(64, -64); try(-64, -64);
    try(32, 1); try(31, 1); try(0, -5); try(32767, 32767); try(1000, 3000);
    for (int i = 0; i < 3000; i++)
      try(int'($urandom_range((i % 2) ? 32767 : 400)) * (($urandom_range(1) == 1) ? -1 : 1),
          int'($urandom_range(400)) * (($urandom_range(1) == 1) ? -1 : 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
