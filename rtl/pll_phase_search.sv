// pll_phase_search: the receiver's phase-lock search.
//
// The local carrier phase is searched in steps of pi/64. At the end of every
// period, while not locked, the final Idemod and Qdemod are compared with the
// symbol the receiver knows it should get (the training sequence): an
// expected +1 needs Idemod >= +THRESH, an expected -1 needs
// Idemod <= -THRESH, and the same for Q. When both match the loop locks and
// the phase is frozen; otherwise the phase advances by one step, wrapping at
// 2*pi. Matching both channels against the known symbol is what keeps the
// loop from locking on a phase that reaches full amplitude with the wrong
// signs. This follows the design's receiver model, which uses a threshold of
// 0.95; in this number format 0.95 lies between 60/64 and 61/64, so THRESH =
// 61 (0.953). Lock is released only by reset or by `relock` (this design's
// addition, for a new training run), and `train` low holds the search (used
// while the channel carries data that is not known).
//
// Ports: period_end with i_final/q_final (the demodulator's end-of-period
// values), exp_i/exp_q (1 = +1, 0 = -1); phase and lock registered, updated at
// the clock edge that ends the period. Synchronous active-high reset to
// phase 0, unlocked.
module pll_phase_search
  import cell16_pkg::*;
#(
  parameter int unsigned THRESH = 61
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               train,
  input  logic               relock,
  input  logic               period_end,
  input  sm_t                i_final,
  input  sm_t                q_final,
  input  logic               exp_i,
  input  logic               exp_q,
  output logic [PHASE_W-1:0] phase,
  output logic               lock,
  output logic               match
);

  function automatic logic hits(sm_t v, logic expect_pos);
    return (v.mag >= MAG_W'(THRESH)) && (v.sign == !expect_pos);
  endfunction

  always_comb match = hits(i_final, exp_i) && hits(q_final, exp_q);

  always_ff @(posedge clk) begin
    if (rst || relock) begin
      phase <= '0;
      lock  <= 1'b0;
    end else if (period_end && train && !lock) begin
      if (match) lock  <= 1'b1;
      else       phase <= phase + 1'b1;
    end
  end

endmodule
