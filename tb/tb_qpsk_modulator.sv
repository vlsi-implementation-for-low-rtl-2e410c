// tb_qpsk_modulator: drives sample indices and random symbols (levels
// +-1 and, for CDMA chips, up to +-4) with a transmit phase offset, and
// checks that each output sample arrives one cycle after its input with
// the right side information and equals I*cos + Q*sin of the carrier phase
// n*4 + tx_phase (pi/64 units), within the rounding of the table and the products (1/64 plus 1/128 per
// unit of level) of the exact value. The symbol
// must stay the one given at sample 0 even when the inputs change mid-period.
module tb_qpsk_modulator;
  import cell16_pkg::*;

  logic       clk = 0, rst, tick;
  logic [4:0] sample, o_sample;
  logic [2:0] chip, o_chip;
  sm_t        il, ql, sout;
  logic       ib, qb, o_valid, o_ib, o_qb, o_sat;
  logic [6:0] txp;
  int         checks = 0, failures = 0;

  qpsk_modulator dut (.clk, .rst, .tick, .sample, .chip, .i_level(il), .q_level(ql), .i_bit(ib),
                      .q_bit(qb), .tx_phase(txp), .sout, .o_valid, .o_sample, .o_chip, .o_i_bit(o_ib),
                      .o_q_bit(o_qb), .o_sat);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hi, hq; bit hib, hqb;

  initial begin
    rst = 1; tick = 0; sample = 0; chip = 0; il = SM_ZERO; ql = SM_ZERO; ib = 0; qb = 0; txp = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int p = 0; p < 60; p++) begin
      txp = 7'($urandom_range(127));
      for (int n = 0; n < 32; n++) begin
        int vi, vq;
        real th, e, tol;
        bit  bi, bq;
        vi = (p % 3 == 2) ? int'($urandom_range(8)) - 4 : (($urandom_range(1) == 1) ? 1 : -1);
        vq = (p % 3 == 2) ? int'($urandom_range(8)) - 4 : (($urandom_range(1) == 1) ? 1 : -1);
        bi = $urandom_range(1); bq = $urandom_range(1);
        sample = 5'(n); chip = 3'(p % 6); tick = 1;
        il = int_to_sm(64 * vi); ql = int_to_sm(64 * vq); ib = bi; qb = bq;
        if (n == 0) begin hi = vi; hq = vq; hib = bi; hqb = bq; end
        @(posedge clk); #1;
        th = 2.0 * 3.14159265358979 * real'((n * 4 + int'(txp)) % 128) / 128.0;
        e  = 64.0 * (real'(hi) * $cos(th) + real'(hq) * $sin(th));
        tol = 1.0 + 0.5 * real'((hi < 0 ? -hi : hi) + (hq < 0 ? -hq : hq));
        checks++;
        if (!o_valid || o_sample != 5'(n) || o_chip != 3'(p % 6) || o_ib != hib || o_qb != hqb ||
            o_sat || (real'(sm_to_int(sout)) - e > tol) || (e - real'(sm_to_int(sout)) > tol)) begin
          failures++;
          $display("FAIL p=%0d n=%0d sout=%0d expected %f valid=%0d", p, n, sm_to_int(sout), e, o_valid);
        end
      end
    end
    tick = 0;
    @(posedge clk); #1;
    checks++;
    if (o_valid) begin failures++; $display("FAIL o_valid without tick"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
