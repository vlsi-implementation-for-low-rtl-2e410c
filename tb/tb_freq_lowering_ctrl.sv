// tb_freq_lowering_ctrl: drives windows of 8 periods in which a chosen
// number of periods reach full value (|I| and |Q| >= 61/64) and checks the
// divider against a reference worked out here: more than 6 good periods
// double breakm, 4 or fewer halve it, 5 or 6 keep it, and it stays within
// 1..4. Also checked: proc_en keeps one sample in breakm, the divider returns
// to 1 when the loop is not active, and the n_up / n_down strobes.
module tb_freq_lowering_ctrl;
  import cell16_pkg::*;

  logic       clk = 0, rst, active, pend, proc_en, n_up, n_down;
  sm_t        i_fin, q_fin;
  logic [4:0] sample;
  logic [1:0] bm;
  int         checks = 0, failures = 0;
  int         ref_bm = 0, ups = 0, downs = 0;

  freq_lowering_ctrl dut (.clk, .rst, .active, .period_end(pend), .i_final(i_fin), .q_final(q_fin),
                          .sample, .breakm_log2(bm), .proc_en, .n_up, .n_down);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window(int n_good);
    int order[8];
    bit exp_up, exp_down;
    for (int k = 0; k < 8; k++) order[k] = (k < n_good) ? 1 : 0;
    order.shuffle();
    for (int k = 0; k < 8; k++) begin
      bit g;
      g = order[k] != 0;
      // a period: 32 samples, proc_en checked on each
      for (int n = 0; n < 32; n++) begin
        sample = 5'(n);
        pend   = (n == 31);
        if (n == 31) begin
          // a bad period misses on one channel only, either one
          i_fin = int_to_sm((g || $urandom_range(1) == 1) ? -64 : 50);
          q_fin = int_to_sm((g || i_fin.mag == 50) ? 62 : 60);
        end
        #1;
        checks++;
        if (proc_en != ((n % (1 << ref_bm)) == 0)) begin
          failures++;
          $display("FAIL proc_en n=%0d bm=%0d", n, ref_bm);
        end
        @(posedge clk); #1;
      end
    end
    pend = 0;
    exp_up = 0; exp_down = 0;
    if (n_good > 6 && ref_bm < 2) begin ref_bm++; exp_up = 1; end
    else if (n_good <= 4 && ref_bm > 0) begin ref_bm--; exp_down = 1; end
    checks++;
    if (int'(bm) != ref_bm || n_up != exp_up || n_down != exp_down) begin
      failures++;
      $display("FAIL after window good=%0d: bm=%0d up=%0d down=%0d, expected %0d %0d %0d",
               n_good, bm, n_up, n_down, ref_bm, exp_up, exp_down);
    end
    ups += int'(n_up); downs += int'(n_down);
  endtask

  initial begin
    rst = 1; active = 0; pend = 0; sample = 0; i_fin = SM_ZERO; q_fin = SM_ZERO;
    repeat (2) @(posedge clk);
    #1 rst = 0; active = 1;
    window(8); window(7); window(8);       // up, up, stays at 4
    window(6); window(5);                  // no change
    window(4); window(0); window(2);       // down, down, stays at 1
    window(7);                             // up
    for (int w = 0; w < 30; w++) window(int'($urandom_range(8)));
    // inactive resets to breakm = 1
    window(8);
    active = 0;
    @(posedge clk); #1;
    ref_bm = 0;
    checks++;
    if (bm != 0) begin failures++; $display("FAIL not reset when inactive"); end
    active = 1;
    checks++;
    if (ups < 3 || downs < 2) begin failures++; $display("FAIL ups=%0d downs=%0d", ups, downs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
