// tb_led_display: checks the LED word selection: switch = 1 shows Iout and
// 0 Qout; byte button 0 shows bits 7..0 and 1 bits 15..8 (LED 7 = sign);
// hold button shows the values captured at the last period end instead of
// the running ones. LEDs are registered, so each check is one cycle after
// the inputs change.
module tb_led_display;
  import cell16_pkg::*;

  logic       clk = 0, rst, pend, sw_iq, btn_byte, btn_hold;
  sm_t        iout, qout, i_fin, q_fin;
  logic [7:0] leds;
  int         checks = 0, failures = 0;

  led_display dut (.clk, .rst, .iout, .qout, .i_final(i_fin), .q_final(q_fin), .period_end(pend),
                   .sw_iq, .btn_byte, .btn_hold, .leds);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] cap_i, cap_q;
    rst = 1; pend = 0; sw_iq = 0; btn_byte = 0; btn_hold = 0;
    iout = SM_ZERO; qout = SM_ZERO; i_fin = SM_ZERO; q_fin = SM_ZERO;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cap_i = 0; cap_q = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [15:0] w;
      iout  = int_to_sm(int'($urandom_range(400)) - 200);
      qout  = int_to_sm(int'($urandom_range(400)) - 200);
      i_fin = int_to_sm(int'($urandom_range(400)) - 200);
      q_fin = int_to_sm(int'($urandom_range(400)) - 200);
      pend  = ($urandom_range(7) == 0);
      sw_iq = $urandom_range(1); btn_byte = $urandom_range(1); btn_hold = $urandom_range(1);
      if (btn_hold) w = sw_iq ? cap_i : cap_q;
      else          w = sw_iq ? iout : qout;
      @(posedge clk); #1;
      if (pend) begin cap_i = i_fin; cap_q = q_fin; end
      checks++;
      if (leds != (btn_byte ? w[15:8] : w[7:0])) begin
        failures++;
        $display("FAIL t=%0d sw=%0d byte=%0d hold=%0d leds=%h expected %h", t, sw_iq, btn_byte, btn_hold,
                 leds, btn_byte ? w[15:8] : w[7:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
