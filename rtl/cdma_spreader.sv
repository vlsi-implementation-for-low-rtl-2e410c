// cdma_spreader: spreads the I and Q bits of N_USERS users with their chip
// sequences and sums them (combinational).
//
// For chip c each user k contributes data_k * code_k[c], where a data bit or
// code chip of 1 stands for +1 and 0 for -1. The sums over the users form the
// chip-rate baseband levels Icdmat and Qcdmat of the design's CDMA model,
// which the QPSK modulator then puts on the carrier. Levels are sign-magnitude
// words in units of 1/64, so a level of +1 is 64.
// Four users and sequences of six chips follow the CDMA model; the code
// values themselves are not given there and the defaults of CODES are this
// design's choice (bit c of CODES[k] is chip c of user k).
//
// Ports: chip index; user_i, user_q (one bit per user); i_level, q_level.
module cdma_spreader
  import cell16_pkg::*;
#(
  parameter int unsigned N_USERS = 4,
  parameter int unsigned SEQ_LEN = 6,
  parameter logic [N_USERS-1:0][SEQ_LEN-1:0] CODES = {6'b011010, 6'b100110, 6'b001011, 6'b111000}
) (
  input  logic [$clog2(SEQ_LEN)-1:0] chip,
  input  logic [N_USERS-1:0]         user_i,
  input  logic [N_USERS-1:0]         user_q,
  output sm_t                        i_level,
  output sm_t                        q_level
);

  int si, sq;

  always_comb begin
    si = 0;
    sq = 0;
    for (int k = 0; k < int'(N_USERS); k++) begin
      si += (user_i[k] == CODES[k][chip]) ? 1 : -1;
      sq += (user_q[k] == CODES[k][chip]) ? 1 : -1;
    end
    i_level = int_to_sm(si * int'(ONE));
    q_level = int_to_sm(sq * int'(ONE));
  end

endmodule
