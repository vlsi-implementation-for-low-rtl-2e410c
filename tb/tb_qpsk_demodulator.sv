// tb_qpsk_demodulator: feeds whole periods of a carrier
// s(n) = I*cos(th + pt) + Q*sin(th + pt), th = 2*pi*n/32, made here with
// real arithmetic and rounded to 1/64, into the demodulator with a local
// phase pr, and checks at the end of each period that
//   Idemod = I*cos(pt - pr) + Q*sin(pt - pr),  Qdemod = Q*cos(pt - pr) - I*sin(pt - pr)
// within 3/64, for breakm = 1, 2 and 4 (only every breakm-th sample
// processed). It also checks that period_end comes with the last sample only,
// that a sample with proc_en low leaves the running value alone, and that the
// running value is registered.
module tb_qpsk_demodulator;
  import cell16_pkg::*;

  logic       clk = 0, rst, s_valid, proc_en, pend, sat;
  logic [4:0] s_sample;
  sm_t        s_in, idemod, qdemod, i_fin, q_fin;
  logic [1:0] bm;
  logic [6:0] phase;
  int         checks = 0, failures = 0;

  qpsk_demodulator dut (.clk, .rst, .s_valid, .s_sample, .s_in, .proc_en, .breakm_log2(bm), .phase,
                        .idemod, .qdemod, .period_end(pend), .i_final(i_fin), .q_final(q_fin), .sat);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979;

  function automatic int rnd(real v);
    return (v < 0.0) ? -$rtoi(-v + 0.5) : $rtoi(v + 0.5);
  endfunction

  task automatic fail_if(bit bad, string msg);
    checks++;
    if (bad) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    rst = 1; s_valid = 0; s_sample = 0; s_in = SM_ZERO; proc_en = 0; bm = 0; phase = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int p = 0; p < 150; p++) begin
      int  vi, vq, pt, pr, ei, eq, prev_v;
      real d;
      vi = (p % 4 == 3) ? int'($urandom_range(6)) - 3 : (($urandom_range(1) == 1) ? 1 : -1);
      vq = (p % 4 == 3) ? int'($urandom_range(6)) - 3 : (($urandom_range(1) == 1) ? 1 : -1);
      pt = int'($urandom_range(127));
      pr = (p % 2 == 0) ? pt : int'($urandom_range(127));
      bm = 2'(p % 3);
      phase = 7'(pr);
      d  = 2.0 * PI * real'(pt - pr) / 128.0;
      ei = rnd(64.0 * (real'(vi) * $cos(d) + real'(vq) * $sin(d)));
      eq = rnd(64.0 * (real'(vq) * $cos(d) - real'(vi) * $sin(d)));
      for (int n = 0; n < 32; n++) begin
        real th;
        th       = 2.0 * PI * real'(n * 4 + pt) / 128.0;
        s_valid  = 1;
        s_sample = 5'(n);
        s_in     = int_to_sm(rnd(64.0 * (real'(vi) * $cos(th) + real'(vq) * $sin(th))));
        proc_en  = (n % (1 << bm)) == 0;
        prev_v   = sm_to_int(idemod);
        #1;
        fail_if(pend != (n == 31), $sformatf("period_end at n=%0d", n));
        if (n == 31) begin
          fail_if(sm_to_int(i_fin) > ei + 3 || sm_to_int(i_fin) < ei - 3 ||
                  sm_to_int(q_fin) > eq + 3 || sm_to_int(q_fin) < eq - 3,
                  $sformatf("p=%0d bm=%0d I=%0d Q=%0d pt=%0d pr=%0d: got %0d %0d expected %0d %0d",
                            p, bm, vi, vq, pt, pr, sm_to_int(i_fin), sm_to_int(q_fin), ei, eq));
        end
        @(posedge clk); #1;
        if (!proc_en)
          fail_if(sm_to_int(idemod) != prev_v, $sformatf("idemod moved on a skipped sample n=%0d", n));
        if (n == 31)
          fail_if(sm_to_int(idemod) > ei + 3 || sm_to_int(idemod) < ei - 3, "registered final value");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
