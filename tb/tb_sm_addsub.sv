// tb_sm_addsub: checks the sign-magnitude adder/subtractor against integer
// arithmetic. Every row of the add/subtract table is driven once with
// operands on both sides of |B| > |A|, then random operands follow, some
// chosen to overflow. Expected: y = A +- B (saturated to the largest
// magnitude, +0 for zero), z = |B| > |A|, ovf when |A +- B| is too large.
module tb_sm_addsub;
  import cell16_pkg::*;

  sm_t  a, b, y;
  logic sub, z, ovf;
  int   checks = 0, failures = 0;
  logic clk = 0;

  sm_addsub dut (.a, .b, .sub, .y, .z, .ovf);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(int av, int bv, bit s);
    int exp_v, lim;
    a   = int_to_sm(av);
    b   = int_to_sm(bv);
    sub = s;
    #1;
    lim   = (1 << MAG_W) - 1;
    exp_v = s ? av - bv : av + bv;
    checks++;
    if (sm_to_int(y) != ((exp_v > lim) ? lim : (exp_v < -lim) ? -lim : exp_v) ||
        (y.mag == 0 && y.sign) ||
        z != ((bv < 0 ? -bv : bv) > (av < 0 ? -av : av)) ||
        ovf != ((exp_v > lim) || (exp_v < -lim))) begin
      failures++;
      $display("FAIL a=%0d b=%0d sub=%0d -> y=%0d z=%0d ovf=%0d", av, bv, s, sm_to_int(y), z, ovf);
    end
  endtask

  initial begin
    // table rows: (A, B) magnitudes 40/25 and 25/40, all sign/op mixes
    for (int sa = 0; sa < 2; sa++)
      for (int sb = 0; sb < 2; sb++)
        for (int s = 0; s < 2; s++) begin
          try(sa ? -40 : 40, sb ? -25 : 25, s[0]);
          try(sa ? -25 : 25, sb ? -40 : 40, s[0]);
          try(sa ? -30 : 30, sb ? -30 : 30, s[0]);
        end
    for (int i = 0; i < 3000; i++) begin
      int av, bv;
      av = int'($urandom_range(32767)) * (($urandom_range(1) == 1) ? -1 : 1);
      bv = int'($urandom_range((i % 3 == 0) ? 32767 : 200)) * (($urandom_range(1) == 1) ? -1 : 1);
      try(av, bv, $urandom_range(1) == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
