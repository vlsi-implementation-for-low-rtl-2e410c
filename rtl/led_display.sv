// led_display: shows a demodulator output on the board's eight LEDs.
//
// sw_iq selects the word: 1 = Iout, 0 = Qout. btn_byte selects the byte:
// 0 shows bits 7..0 (bit 6 is 1.0, bits 5..0 the fraction), 1 shows bits
// 15..8, so that LED 7 then shows the sign bit (lit = negative). While
// btn_hold is pressed the LEDs show the value captured at the end of each
// period; released, they follow the running value. The switch and button
// roles follow the design's board description; the running view with
// btn_hold released is this design's choice.
//
// Ports: iout, qout (running), i_final/q_final with period_end (end-of-period
// values); leds registered, one cycle after its inputs. Synchronous
// active-high reset.
module led_display
  import cell16_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  sm_t        iout,
  input  sm_t        qout,
  input  sm_t        i_final,
  input  sm_t        q_final,
  input  logic       period_end,
  input  logic       sw_iq,
  input  logic       btn_byte,
  input  logic       btn_hold,
  output logic [7:0] leds
);

  sm_t i_cap, q_cap, shown;

  always_comb begin
    if (btn_hold) shown = sw_iq ? i_cap : q_cap;
    else          shown = sw_iq ? iout  : qout;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_cap <= SM_ZERO;
      q_cap <= SM_ZERO;
      leds  <= '0;
    end else begin
      if (period_end) begin
        i_cap <= i_final;
        q_cap <= q_final;
      end
      leds <= btn_byte ? shown[15:8] : shown[7:0];
    end
  end

endmodule
