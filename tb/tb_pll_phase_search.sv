// tb_pll_phase_search: plays a channel whose transmit phase is pt (in pi/64
// steps). Each period the demodulator outputs are worked out here as
// I*cos(d) + Q*sin(d) and Q*cos(d) - I*sin(d), d = pt - phase, for random
// training symbols, and fed to the phase search. Checked: the phase advances
// by one step per unlocked period, the loop locks exactly when both outputs
// reach 61/64 with the expected signs (a reference search run alongside),
// and the phase then stays frozen; train low holds the search; relock
// restarts it from phase 0. Several transmit phases are tried, including
// ones that need a wrap past 2*pi.
module tb_pll_phase_search;
  import cell16_pkg::*;

  logic       clk = 0, rst, train, relock, pend, exp_i, exp_q, lock, match;
  sm_t        i_fin, q_fin;
  logic [6:0] phase;
  int         checks = 0, failures = 0;

  pll_phase_search dut (.clk, .rst, .train, .relock, .period_end(pend), .i_final(i_fin), .q_final(q_fin),
                        .exp_i, .exp_q, .phase, .lock, .match);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979;

  function automatic int rnd(real v);
    return (v < 0.0) ? -$rtoi(-v + 0.5) : $rtoi(v + 0.5);
  endfunction

  int ref_phase, locks = 0;
  bit ref_lock;

  task automatic period(int pt, bit tr);
    int  vi, vq, oi, oq;
    real d;
    bit  ok;
    vi = ($urandom_range(1) == 1) ? 1 : -1;
    vq = ($urandom_range(1) == 1) ? 1 : -1;
    d  = 2.0 * PI * real'(pt - ref_phase) / 128.0;
    oi = rnd(64.0 * (real'(vi) * $cos(d) + real'(vq) * $sin(d)));
    oq = rnd(64.0 * (real'(vq) * $cos(d) - real'(vi) * $sin(d)));
    ok = ((vi > 0) ? oi >= 61 : oi <= -61) && ((vq > 0) ? oq >= 61 : oq <= -61);
    i_fin = int_to_sm(oi); q_fin = int_to_sm(oq);
    exp_i = vi > 0; exp_q = vq > 0; train = tr;
    // a few idle cycles, then the end of the period
    pend = 0;
    repeat (3) @(posedge clk);
    #1 pend = 1;
    @(posedge clk);
    #1 pend = 0;
    if (tr && !ref_lock) begin
      if (ok) ref_lock = 1;
      else    ref_phase = (ref_phase + 1) % 128;
    end
    checks++;
    if (lock != ref_lock || int'(phase) != ref_phase) begin
      failures++;
      $display("FAIL pt=%0d: lock=%0d phase=%0d, expected %0d %0d", pt, lock, phase, ref_lock, ref_phase);
    end
  endtask

  initial begin
    rst = 1; train = 1; relock = 0; pend = 0; i_fin = SM_ZERO; q_fin = SM_ZERO; exp_i = 0; exp_q = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 8; t++) begin
      int pt;
      pt = (t == 0) ? 0 : (t == 1) ? 127 : (t == 2) ? 64 : int'($urandom_range(127));
      ref_phase = 0; ref_lock = 0;
      for (int p = 0; p < 400 && !ref_lock; p++) period(pt, !(p >= 5 && p < 8));
      checks++;
      if (!lock) begin failures++; $display("FAIL no lock for pt=%0d", pt); end
      else locks++;
      // frozen once locked
      for (int p = 0; p < 5; p++) period(pt, 1'b1);
      #1 relock = 1;
      @(posedge clk);
      #1 relock = 0;
      checks++;
      if (lock || phase != 0) begin failures++; $display("FAIL relock did not restart"); end
    end
    $display("locks=%0d", locks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
