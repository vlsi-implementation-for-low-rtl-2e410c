// tb_cell16: end-to-end run of the modem at its default sizes.
//
// The transmitter's output is looped into the receiver (or, for one stretch,
// replaced by an attenuated copy through the external receive input). The
// bench follows the run period by period, knowing which switch bits each
// period carries, and checks:
//   1. phase search: with the transmit phase 40 steps (40*pi/64) away the
//      loop steps its phase once per period and locks within a step or two
//      of 40; after lock every period decodes to the transmitted I/Q bits
//      with both outputs at full value (>= 61/64);
//   2. clock lowering: with lower_en set the divider climbs 1 -> 2 -> 4 after
//      two windows of good periods, and decoding stays right at breakm 4;
//   3. a weak channel (7/8 amplitude): periods no longer reach full value,
//      the divider falls back to 1, and the bits are still right;
//   4. relock: a new transmit phase (100 steps) and a relock pulse start a
//      new search, which locks near 100;
//   5. CDMA: four users spread with their sequences; each sequence the
//      despreader's correlation for the selected user must match
//      64 * sum_k d_k * <code_k, code_user> within 24/64 and its bit the
//      user's bit when the correlation is not near zero;
//   6. LEDs: the byte on digitalout matches the selected word and byte,
//      live and held.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_cell16;
  import cell16_pkg::*;

  logic        clk = 0, reset;
  logic [1:0]  digitalin;
  logic        button, sw_iq, btn_hold, cdma_mode, lower_en, relock, rx_ext_en;
  logic [3:0]  user_i, user_q;
  logic [1:0]  rx_user;
  logic [6:0]  tx_phase, pll_phase;
  logic [15:0] sout, rx_in, idemod, qdemod, i_final, q_final, corr_i, corr_q;
  logic [7:0]  digitalout;
  logic        period_end, lock, rate_up, rate_down, sat, rx_bit_i, rx_bit_q, corr_valid;
  logic [2:0]  breakm;

  int checks = 0, failures = 0;

  cell16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // external channel: 7/8 of the transmitted amplitude
  always_comb begin
    sm_t s;
    s     = sm_t'(sout);
    s.mag = 15'((int'(s.mag) * 7) / 8);
    if (s.mag == 0) s.sign = 0;
    rx_in = s;
  end

  localparam logic [5:0] C [4] = '{6'b111000, 6'b001011, 6'b100110, 6'b011010};

  // ---- period tracking (at negedges, where the outputs are settled) ----
  int    n_period = 0;              // periods ended so far
  logic  [1:0] exp_bits;            // bits of the period now being received
  logic  [3:0] exp_ui, exp_uq;      // users' bits of the sequence being received
  int    n_steps = 0, n_locks = 0, n_ups = 0, n_downs = 0, n_bm4 = 0, n_decoded = 0, n_weak = 0;
  int    n_relock = 0, n_corr = 0, n_led_live = 0, n_led_hold = 0, n_led_hi = 0;
  bit    was_locked = 0;
  logic  [6:0] last_phase = 0;
  logic  [15:0] cap_i, cap_q;
  int    since_end = 99;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0t: %s", $time, msg);
  endtask

  bit per_ext = 0, per_cdma = 0;   // channel or mode used at some point of this period

  always @(negedge clk) if (!reset) begin
    since_end++;
    if (rx_ext_en) per_ext = 1;
    if (cdma_mode) per_cdma = 1;
    // LED check, a few cycles after a period end with the controls held
    if (since_end == 3) begin
      logic [15:0] w;
      if (btn_hold) w = sw_iq ? cap_i : cap_q;
      else          w = sw_iq ? idemod : qdemod;
      if (btn_hold) n_led_hold++; else n_led_live++;
      if (button) n_led_hi++;
      checks++;
      if (!btn_hold) begin
        // running value moved one sample since the LEDs were loaded: compare
        // against the value one cycle earlier, kept below
        w = sw_iq ? prev_i : prev_q;
      end
      if (digitalout != (button ? w[15:8] : w[7:0])) fail($sformatf("LEDs %h", digitalout));
    end
    if (period_end) begin
      sm_t fi, fq;
      fi = sm_t'(i_final);
      fq = sm_t'(q_final);
      cap_i = i_final; cap_q = q_final;
      since_end = 0;
      if (!per_cdma) begin
        if (lock) begin
          bit full;
          full = fi.mag >= 61 && fq.mag >= 61;
          checks++;
          if (fi.sign == exp_bits[1] || fq.sign == exp_bits[0] || (!per_ext && !full))
            fail($sformatf("decode: I=%0d Q=%0d bits=%b period=%0d bm=%0d ext=%0d ph=%0d", sm_to_int(fi), sm_to_int(fq), exp_bits, n_period, breakm, per_ext, pll_phase));
          n_decoded++;
          if (breakm == 4) n_bm4++;
          if (per_ext) n_weak++;
        end else if (was_locked == 0 && n_period > 0) begin
          checks++;
          if (pll_phase != last_phase) fail("phase moved during a period");
        end
      end
      n_period++;
      exp_bits = digitalin;   // captured by the transmitter at the coming edge
      per_ext  = rx_ext_en;
      per_cdma = cdma_mode;
    end
  end

  logic [15:0] prev_i, prev_q;
  always @(posedge clk) begin
    prev_i <= idemod;
    prev_q <= qdemod;
  end

  // phase, lock and rate events, seen after the edges
  always @(posedge clk) if (!reset) begin
    #1;
    if (pll_phase != last_phase && !lock) n_steps++;
    last_phase = pll_phase;
    if (lock && !was_locked) begin
      n_locks++;
      $display("lock at phase %0d after %0d periods", pll_phase, n_period);
    end
    was_locked = lock;
    if (rate_up)   begin n_ups++;   $display("breakm up to %0d", breakm); end
    if (rate_down) begin n_downs++; $display("breakm down to %0d", breakm); end
  end

  // CDMA correlation check of the sequence that just ended
  task automatic check_corr();
    int e;
    e = 0;
    for (int k = 0; k < 4; k++)
      for (int c = 0; c < 6; c++)
        e += (exp_ui[k] ? 64 : -64) * (C[k][c] ? 1 : -1) * (C[int'(rx_user)][c] ? 1 : -1);
    checks++;
    if (!corr_valid) fail("no correlation after a sequence");
    checks++;
    if (sm_to_int(sm_t'(corr_i)) > e + 24 || sm_to_int(sm_t'(corr_i)) < e - 24)
      fail($sformatf("corr_i %0d expected %0d", sm_to_int(sm_t'(corr_i)), e));
    if (e > 100 || e < -100) begin
      checks++;
      if (rx_bit_i != exp_ui[rx_user]) fail("CDMA bit");
    end
    n_corr++;
  endtask

  // wait for n period ends, changing the switches and LED controls after each
  task automatic periods(int n);
    repeat (n) begin
      @(negedge clk iff period_end);
      @(negedge clk);
      digitalin = 2'($urandom_range(3));
      @(negedge clk);
      button = $urandom_range(1); sw_iq = $urandom_range(1); btn_hold = $urandom_range(1);
    end
  endtask

  task automatic wait_lock(int max_periods);
    for (int p = 0; p < max_periods && !lock; p++) periods(1);
    checks++;
    if (!lock) fail("no lock");
  endtask

  initial begin
    reset = 1; digitalin = 2'b10; button = 0; sw_iq = 1; btn_hold = 0; cdma_mode = 0; lower_en = 0;
    relock = 0; rx_ext_en = 0; user_i = 0; user_q = 0; rx_user = 1; tx_phase = 7'd40;
    repeat (3) @(negedge clk);
    reset = 0;
    exp_bits = digitalin;

    // 1. phase search and lock
    wait_lock(200);
    checks++;
    if (pll_phase < 38 || pll_phase > 42) fail($sformatf("locked at phase %0d", pll_phase));
    periods(20);

    // 2. clock lowering
    lower_en = 1;
    periods(40);
    checks++;
    if (breakm != 4) fail($sformatf("breakm %0d, expected 4", breakm));

    // 3. weak channel
    rx_ext_en = 1;
    periods(24);
    checks++;
    if (breakm != 1) fail($sformatf("breakm %0d on weak channel, expected 1", breakm));
    rx_ext_en = 0;
    periods(4);

    // 4. relock at another phase
    @(negedge clk iff period_end);
    tx_phase = 7'd100;
    @(negedge clk);
    relock = 1;
    @(negedge clk);
    relock = 0;
    n_relock++;
    wait_lock(200);
    checks++;
    if (pll_phase < 98 || pll_phase > 102) fail($sformatf("relocked at phase %0d", pll_phase));
    periods(10);

    // 5. CDMA: switch at a sequence boundary (next period is chip 0)
    while ((n_period % 6) != 5) periods(1);
    @(negedge clk iff period_end);
    // the transmitter starts chip 0 at the coming edge
    cdma_mode = 1;
    user_i = 4'($urandom_range(15)); user_q = 4'($urandom_range(15));
    exp_ui = user_i; exp_uq = user_q;
    for (int s = 0; s < 12; s++) begin
      repeat (6) @(negedge clk iff period_end);
      // a new sequence begins at the coming edge; the old one is checked when
      // corr_valid rises one cycle later, so keep its bits until then
      user_i = 4'($urandom_range(15)); user_q = 4'($urandom_range(15));
      @(negedge clk);
      check_corr();
      exp_ui = user_i; exp_uq = user_q;
      rx_user = 2'($urandom_range(3));
    end
    cdma_mode = 0;
    periods(6);

    // mechanisms
    checks++; if (n_steps < 30)   fail($sformatf("phase steps %0d", n_steps));
    checks++; if (n_locks < 2)    fail($sformatf("locks %0d", n_locks));
    checks++; if (n_ups < 2)      fail($sformatf("rate ups %0d", n_ups));
    checks++; if (n_downs < 1)    fail($sformatf("rate downs %0d", n_downs));
    checks++; if (n_bm4 < 5)      fail($sformatf("periods at breakm 4: %0d", n_bm4));
    checks++; if (n_weak < 5)     fail($sformatf("weak-channel periods %0d", n_weak));
    checks++; if (n_relock < 1)   fail("no relock");
    checks++; if (n_corr < 10)    fail($sformatf("correlations %0d", n_corr));
    checks++; if (n_led_live < 5 || n_led_hold < 5 || n_led_hi < 5) fail("LED modes not all seen");
    $display("phase steps=%0d locks=%0d ups=%0d downs=%0d bm4 periods=%0d weak periods=%0d relocks=%0d",
             n_steps, n_locks, n_ups, n_downs, n_bm4, n_weak, n_relock);
    $display("decoded periods=%0d correlations=%0d led live/hold/high=%0d/%0d/%0d",
             n_decoded, n_corr, n_led_live, n_led_hold, n_led_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
