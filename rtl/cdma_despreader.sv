// cdma_despreader: correlates the chip-rate demodulator outputs with one
// user's chip sequence.
//
// Every period of the QPSK receiver is one chip. At the end of each chip the
// final Idemod and Qdemod are multiplied by the selected user's chip (+-1)
// and added up over the SEQ_LEN chips of the sequence; the sum restarts at
// chip 0 and is delivered after the last chip, as in the design's CDMA model
// (which despreads with the second user's sequence). With the default codes
// a user's own sequence correlates to SEQ_LEN, so a lone user's bit arrives
// as +-6.0; other users add their cross-correlation (+-2 per user for the
// default codes). The sign gives the decided bit. CODES must match the
// spreader's; selecting the user by an input and the default codes are this
// design's choices.
//
// Ports: period_end with i_final/q_final and the chip index; user selects the
// sequence. corr_i/corr_q, bit_i/bit_q (1 = positive) and corr_valid are
// registered at the end of the last chip. Synchronous active-high reset.
module cdma_despreader
  import cell16_pkg::*;
#(
  parameter int unsigned N_USERS = 4,
  parameter int unsigned SEQ_LEN = 6,
  parameter logic [N_USERS-1:0][SEQ_LEN-1:0] CODES = {6'b011010, 6'b100110, 6'b001011, 6'b111000}
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         period_end,
  input  logic [$clog2(SEQ_LEN)-1:0]   chip,
  input  logic [$clog2(N_USERS)-1:0]   user,
  input  sm_t                          i_final,
  input  sm_t                          q_final,
  output sm_t                          corr_i,
  output sm_t                          corr_q,
  output logic                         bit_i,
  output logic                         bit_q,
  output logic                         corr_valid
);

  sm_t  acc_i, acc_q, sum_i, sum_q, chip_i, chip_q;
  logic code_pos, z_i, z_q, ovf_i, ovf_q;

  always_comb begin
    code_pos    = CODES[user][chip];
    chip_i      = i_final;
    chip_q      = q_final;
    chip_i.sign = (i_final.sign ^ !code_pos) && (i_final.mag != '0);
    chip_q.sign = (q_final.sign ^ !code_pos) && (q_final.mag != '0);
  end

  sm_addsub u_add_i (.a(acc_i), .b(chip_i), .sub(1'b0), .y(sum_i), .z(z_i), .ovf(ovf_i));
  sm_addsub u_add_q (.a(acc_q), .b(chip_q), .sub(1'b0), .y(sum_q), .z(z_q), .ovf(ovf_q));

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_i      <= SM_ZERO;
      acc_q      <= SM_ZERO;
      corr_i     <= SM_ZERO;
      corr_q     <= SM_ZERO;
      bit_i      <= 1'b0;
      bit_q      <= 1'b0;
      corr_valid <= 1'b0;
    end else begin
      corr_valid <= 1'b0;
      if (period_end) begin
        acc_i <= (chip == '0) ? chip_i : sum_i;
        acc_q <= (chip == '0) ? chip_q : sum_q;
        if (chip == $clog2(SEQ_LEN)'(SEQ_LEN - 1)) begin
          corr_i     <= sum_i;
          corr_q     <= sum_q;
          bit_i      <= !sum_i.sign && (sum_i.mag != '0);
          bit_q      <= !sum_q.sign && (sum_q.mag != '0);
          corr_valid <= 1'b1;
        end
      end
    end
  end

endmodule
