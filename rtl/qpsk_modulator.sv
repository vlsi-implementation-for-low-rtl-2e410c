// qpsk_modulator: puts the I and Q baseband levels on the carrier,
// Sout = I * cos(w t + phi) + Q * sin(w t + phi).
//
// The carrier phase for sample n of a period is
// n * CARRIER_CYCLES * 2**PHASE_W / LONGSAMPLE + tx_phase, in steps of
// pi/64 (sincos_rom). I and Q are sign-magnitude levels (+-1 for plain QPSK,
// the summed chip levels in CDMA). The levels and the data bits that go with
// them are taken at the first sample of each period and held for the period,
// so a symbol never changes inside a period.
// The products and the sum are formed with the sign-magnitude multiplier and
// adder. The mixing formula follows the document; one carrier cycle per
// period (CARRIER_CYCLES = 1) is this design's choice.
//
// Timing: the output sample and its side information (o_valid, o_sample,
// o_chip, o_i_bit, o_q_bit, and o_sat when a product or the sum saturated)
// are registered, one cycle after the input sample.
// Synchronous active-high reset clears o_valid and the held symbol.
module qpsk_modulator
  import cell16_pkg::*;
#(
  parameter int unsigned LONGSAMPLE     = 32,
  parameter int unsigned SEQ_LEN        = 6,
  parameter int unsigned CARRIER_CYCLES = 1
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          tick,
  input  logic [$clog2(LONGSAMPLE)-1:0] sample,
  input  logic [$clog2(SEQ_LEN)-1:0]    chip,
  input  sm_t                           i_level,
  input  sm_t                           q_level,
  input  logic                          i_bit,
  input  logic                          q_bit,
  input  logic [PHASE_W-1:0]            tx_phase,
  output sm_t                           sout,
  output logic                          o_valid,
  output logic [$clog2(LONGSAMPLE)-1:0] o_sample,
  output logic [$clog2(SEQ_LEN)-1:0]    o_chip,
  output logic                          o_i_bit,
  output logic                          o_q_bit,
  output logic                          o_sat
);

  localparam int unsigned STEP = (CARRIER_CYCLES << PHASE_W) / LONGSAMPLE;

  sm_t              i_hold, q_hold, i_cur, q_cur;
  logic             ib_hold, qb_hold;
  logic [PHASE_W-1:0] phase;
  sm_t              c, s, pi_, pq, sum;
  logic             ovf_i, ovf_q, ovf_s, z_unused;

  // Symbol held for the period; the first sample uses the new one directly.
  always_comb begin
    i_cur = (sample == '0) ? i_level : i_hold;
    q_cur = (sample == '0) ? q_level : q_hold;
    phase = PHASE_W'(int'(sample) * int'(STEP)) + tx_phase;
  end

  sincos_rom u_rom (.phase(phase), .cos_o(c), .sin_o(s));
  sm_mult    u_mul_i (.a(i_cur), .b(c), .y(pi_), .ovf(ovf_i));
  sm_mult    u_mul_q (.a(q_cur), .b(s), .y(pq), .ovf(ovf_q));
  sm_addsub  u_add (.a(pi_), .b(pq), .sub(1'b0), .y(sum), .z(z_unused), .ovf(ovf_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      i_hold   <= SM_ZERO;
      q_hold   <= SM_ZERO;
      ib_hold  <= 1'b0;
      qb_hold  <= 1'b0;
      o_valid  <= 1'b0;
      sout     <= SM_ZERO;
      o_sample <= '0;
      o_chip   <= '0;
      o_i_bit  <= 1'b0;
      o_q_bit  <= 1'b0;
      o_sat    <= 1'b0;
    end else begin
      o_valid <= tick;
      if (tick) begin
        if (sample == '0) begin
          i_hold  <= i_level;
          q_hold  <= q_level;
          ib_hold <= i_bit;
          qb_hold <= q_bit;
        end
        sout     <= sum;
        o_sat    <= ovf_i | ovf_q | ovf_s;
        o_sample <= sample;
        o_chip   <= chip;
        o_i_bit  <= (sample == '0) ? i_bit : ib_hold;
        o_q_bit  <= (sample == '0) ? q_bit : qb_hold;
      end
    end
  end

endmodule
