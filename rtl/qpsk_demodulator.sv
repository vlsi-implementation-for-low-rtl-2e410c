// qpsk_demodulator: the receiver's two mixers and integrate-and-dump
// accumulators, giving Idemod and Qdemod.
//
// For every processed sample n of a period the input is multiplied by the
// local carrier, cos for I and sin for Q, at phase
// n * CARRIER_CYCLES * 2**PHASE_W / LONGSAMPLE + phase (phase comes from the
// phase search), and the products are summed over the period:
//   Idemod = AMPL / LONGSAMPLE * sum(s * cos),  Qdemod likewise with sin.
// The sum restarts at sample 0, as in the design's receiver model. With
// AMPL = 2 a clean symbol of +-1 integrates to +-1.0 at the end of the period.
// When the clock-lowering control sets breakm = 2**breakm_log2 only every
// breakm-th sample is processed (proc_en), and each product is weighted by
// breakm (freqmultadj in the model) so the integral keeps its scale.
// The mixers and the accumulators use the DSP's ALU (multiply and add
// commands). The running sum is kept unscaled, with six fraction bits; the
// division by LONGSAMPLE / AMPL is a right shift when it is read, so the
// per-sample rounding is not multiplied. That, and LONGSAMPLE, AMPL and
// CARRIER_CYCLES being powers of two, are this design's choices.
//
// Ports: s_valid marks a sample s_in with its index s_sample; proc_en says
// whether that sample is processed. idemod/qdemod are the running values
// (registered). period_end is high in the cycle the last sample of a period
// is presented; i_final/q_final are then the values the period ends with
// (combinational, so that the phase search and clock control can act before
// the next period's first sample). sat flags a processed sample whose
// product or sum saturated (combinational). Synchronous active-high reset.
module qpsk_demodulator
  import cell16_pkg::*;
#(
  parameter int unsigned LONGSAMPLE     = 32,
  parameter int unsigned CARRIER_CYCLES = 1,
  parameter int unsigned AMPL           = 2
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          s_valid,
  input  logic [$clog2(LONGSAMPLE)-1:0] s_sample,
  input  sm_t                           s_in,
  input  logic                          proc_en,
  input  logic [1:0]                    breakm_log2,
  input  logic [PHASE_W-1:0]            phase,
  output sm_t                           idemod,
  output sm_t                           qdemod,
  output logic                          period_end,
  output sm_t                           i_final,
  output sm_t                           q_final,
  output logic                          sat
);

  localparam int unsigned STEP  = (CARRIER_CYCLES << PHASE_W) / LONGSAMPLE;
  localparam int unsigned SHIFT = $clog2(LONGSAMPLE) - $clog2(AMPL);

  sm_t                acc_i, acc_q;
  sm_t                mix_c, mix_s, prod_i, prod_q, term_i, term_q;
  sm_t                add_i, add_q, next_i, next_q;
  logic [PHASE_W-1:0] lo_phase;
  logic               take, first;
  logic               f1, f2, f3, f4, v1, v2, v3, v4;

  function automatic sm_t scale_down(sm_t x);
    sm_t r;
    r.mag  = x.mag >> SHIFT;
    r.sign = x.sign && (r.mag != '0);
    return r;
  endfunction

  function automatic sm_t scale_up(sm_t x, logic [1:0] sh);
    sm_t r;
    logic [MAG_W+2:0] m;
    m      = {3'b000, x.mag} << sh;
    r.mag  = (m[MAG_W+2:MAG_W] != '0) ? '1 : m[MAG_W-1:0];
    r.sign = x.sign;
    return r;
  endfunction

  always_comb begin
    lo_phase = PHASE_W'(int'(s_sample) * int'(STEP)) + phase;
    take     = s_valid && proc_en;
    first    = (s_sample == '0);
    term_i   = scale_up(prod_i, breakm_log2);
    term_q   = scale_up(prod_q, breakm_log2);
  end

  sincos_rom u_lo (.phase(lo_phase), .cos_o(mix_c), .sin_o(mix_s));

  // Mixers: ALU multiply.
  dsp_alu u_mix_i (.op(OP_MULT), .fn(4'b0000), .a(s_in), .b(mix_c), .c(prod_i), .flag(f1), .ovf(v1));
  dsp_alu u_mix_q (.op(OP_MULT), .fn(4'b0000), .a(s_in), .b(mix_s), .c(prod_q), .flag(f2), .ovf(v2));

  // Integrators: ALU add.
  dsp_alu u_int_i (.op(OP_ADD), .fn(4'b0000), .a(acc_i), .b(term_i), .c(add_i), .flag(f3), .ovf(v3));
  dsp_alu u_int_q (.op(OP_ADD), .fn(4'b0000), .a(acc_q), .b(term_q), .c(add_q), .flag(f4), .ovf(v4));

  always_comb begin
    next_i = acc_i;
    next_q = acc_q;
    if (take) begin
      next_i = first ? term_i : add_i;
      next_q = first ? term_q : add_q;
    end
    period_end = s_valid && (s_sample == $clog2(LONGSAMPLE)'(LONGSAMPLE - 1));
    sat        = take && (v1 || v2 || v3 || v4);
    i_final    = scale_down(next_i);
    q_final    = scale_down(next_q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_i <= SM_ZERO;
      acc_q <= SM_ZERO;
    end else begin
      acc_i <= next_i;
      acc_q <= next_q;
    end
  end

  always_comb begin
    idemod = scale_down(acc_i);
    qdemod = scale_down(acc_q);
  end

endmodule
