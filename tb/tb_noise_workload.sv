// tb_noise_workload: the modem with white noise on the channel, at noise
// peak amplitudes of 25%, 100%, 200% and 400% of the message amplitude.
//
// The loop is first locked on a clean channel with rate lowering allowed.
// Then, for each noise level, 300 periods of random QPSK symbols are sent
// through rx_in = sout + n, where n is uniform in +-level (a new value every
// sample). Counted per level: bit errors of the sign decisions at the period
// ends, and the periods spent at each breakm. Checked: no bit errors at 25%
// and 100%, no more errors at a lower level than at a higher one, and the
// noisier levels push breakm down (less time at breakm 4 at 400% than at
// 25%). Integration over a period averages the noise: for uniform noise of
// peak a the error on an output is about a * 0.58 * sqrt(2/32) at breakm 1,
// and twice that at breakm 4, where only 8 samples are integrated.
module tb_noise_workload;
  import cell16_pkg::*;

  logic        clk = 0, reset;
  logic [1:0]  digitalin;
  logic        button = 0, sw_iq = 1, btn_hold = 0, cdma_mode = 0, lower_en, relock = 0, rx_ext_en;
  logic [3:0]  user_i = 0, user_q = 0;
  logic [1:0]  rx_user = 0;
  logic [6:0]  tx_phase = 7'd20, pll_phase;
  logic [15:0] sout, rx_in, idemod, qdemod, i_final, q_final, corr_i, corr_q;
  logic [7:0]  digitalout;
  logic        period_end, lock, rate_up, rate_down, sat, rx_bit_i, rx_bit_q, corr_valid;
  logic [2:0]  breakm;

  int checks = 0, failures = 0;
  int noise_pct = 0;

  cell16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel: transmitted sample plus uniform noise, new each cycle
  int noise_v = 0;
  always @(negedge clk) begin
    int a;
    a = (64 * noise_pct) / 100;
    noise_v = (a == 0) ? 0 : int'($urandom_range(2 * a)) - a;
  end
  always_comb rx_in = int_to_sm(sm_to_int(sm_t'(sout)) + noise_v);

  logic [1:0] exp_bits;
  int errors, at_bm[5];

  always @(negedge clk) if (!reset && period_end) begin
    sm_t fi, fq;
    fi = sm_t'(i_final);
    fq = sm_t'(q_final);
    if (lock && rx_ext_en) begin
      if ((fi.sign == exp_bits[1]) || (fi.mag == 0)) errors++;
      if ((fq.sign == exp_bits[0]) || (fq.mag == 0)) errors++;
      at_bm[breakm]++;
    end
    exp_bits = digitalin;
  end

  task automatic run_periods(int n);
    repeat (n) begin
      @(negedge clk iff period_end);
      @(negedge clk);
      digitalin = 2'($urandom_range(3));
    end
  endtask

  int err_at[4], bm4_at[4];
  localparam int LEVELS[4] = '{25, 100, 200, 400};

  initial begin
    reset = 1; digitalin = 2'b01; lower_en = 1; rx_ext_en = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    exp_bits = digitalin;
    for (int p = 0; p < 200 && !lock; p++) run_periods(1);
    checks++;
    if (!lock) begin failures++; $display("FAIL no lock"); end
    run_periods(20);
    for (int l = 0; l < 4; l++) begin
      // switch the channel at a period boundary
      @(negedge clk iff period_end);
      noise_pct = LEVELS[l];
      rx_ext_en = 1;
      run_periods(1);
      errors = 0;
      foreach (at_bm[k]) at_bm[k] = 0;
      run_periods(300);
      err_at[l] = errors;
      bm4_at[l] = at_bm[4];
      $display("noise %0d%%: bit errors %0d of 600, periods at breakm 1/2/4: %0d/%0d/%0d",
               LEVELS[l], errors, at_bm[1], at_bm[2], at_bm[4]);
    end
    checks++;
    if (err_at[0] != 0 || err_at[1] != 0) begin failures++; $display("FAIL errors at low noise"); end
    for (int l = 1; l < 4; l++) begin
      checks++;
      if (err_at[l] < err_at[l-1]) begin failures++; $display("FAIL errors fell with more noise"); end
    end
    checks++;
    if (bm4_at[3] >= bm4_at[0]) begin failures++; $display("FAIL breakm did not react to noise"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
