// tb_cdma_despreader: feeds sequences of six chip values (as the
// demodulator would deliver them at each period end) and checks the
// correlation with the selected user's sequence, worked out here as
// sum over chips of value * (+-1 chip of that user), its sign as the decided
// bit, and that corr_valid comes once per sequence, after the sixth chip.
// One run sends the spread sum of four users' bits, so the selected user's
// bit is recovered when the other users' cross-correlation does not cancel it.
module tb_cdma_despreader;
  import cell16_pkg::*;

  logic       clk = 0, rst, pend, bit_i, bit_q, cvalid;
  logic [2:0] chip;
  logic [1:0] user;
  sm_t        i_fin, q_fin, ci, cq;
  int         checks = 0, failures = 0, n_valid = 0;

  localparam logic [5:0] C [4] = '{6'b111000, 6'b001011, 6'b100110, 6'b011010};

  cdma_despreader dut (.clk, .rst, .period_end(pend), .chip, .user, .i_final(i_fin), .q_final(q_fin),
                       .corr_i(ci), .corr_q(cq), .bit_i, .bit_q, .corr_valid(cvalid));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pend = 0; chip = 0; user = 0; i_fin = SM_ZERO; q_fin = SM_ZERO;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int s = 0; s < 200; s++) begin
      int ei, eq, u;
      bit spread;
      logic [3:0] di, dq;
      u = int'($urandom_range(3));
      user = 2'(u);
      spread = (s % 2 == 0);
      di = 4'($urandom_range(15)); dq = 4'($urandom_range(15));
      ei = 0; eq = 0;
      for (int c = 0; c < 6; c++) begin
        int vi, vq;
        if (spread) begin
          vi = 0; vq = 0;
          for (int k = 0; k < 4; k++) begin
            vi += (di[k] ? 64 : -64) * (C[k][c] ? 1 : -1);
            vq += (dq[k] ? 64 : -64) * (C[k][c] ? 1 : -1);
          end
        end else begin
          vi = int'($urandom_range(600)) - 300;
          vq = int'($urandom_range(600)) - 300;
        end
        ei += vi * (C[u][c] ? 1 : -1);
        eq += vq * (C[u][c] ? 1 : -1);
        chip = 3'(c); i_fin = int_to_sm(vi); q_fin = int_to_sm(vq);
        // idle cycles between chip ends
        repeat (2) begin
          @(posedge clk); #1;
          checks++;
          if (cvalid) begin failures++; $display("FAIL corr_valid without chip end"); end
        end
        pend = 1;
        @(posedge clk); #1;
        pend = 0;
        checks++;
        if (cvalid != (c == 5)) begin failures++; $display("FAIL corr_valid at chip %0d", c); end
      end
      n_valid += int'(cvalid);
      checks++;
      if (sm_to_int(ci) != ei || sm_to_int(cq) != eq || bit_i != (ei > 0) || bit_q != (eq > 0)) begin
        failures++;
        $display("FAIL s=%0d user=%0d: corr %0d %0d expected %0d %0d", s, u, sm_to_int(ci), sm_to_int(cq), ei, eq);
      end
      if (spread && ei != 0) begin
        checks++;
        if (bit_i != di[u]) begin failures++; $display("FAIL user %0d bit lost", u); end
      end
    end
    checks++;
    if (n_valid != 200) begin failures++; $display("FAIL n_valid=%0d", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
