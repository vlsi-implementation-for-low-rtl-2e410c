// cell16: low-power QPSK / CDMA modem with a phase-search receiver whose
// processing rate is lowered once it is locked.
//
// Transmit side: symbol_timer counts samples (one per clock), periods of
// LONGSAMPLE samples and the chips of a spreading sequence. In QPSK mode the
// two board switches give the I and Q bits (digitalin[1] = Imod,
// digitalin[0] = Qmod) as levels of +-1; in CDMA mode cdma_spreader forms the
// summed chip levels of four users. qpsk_modulator puts them on the carrier
// with a transmit phase offset tx_phase, giving sout.
// Receive side: the demodulator takes sout (or rx_in when rx_ext_en is set,
// for an outside channel with noise or delay) one cycle later, together with
// the sample index. qpsk_demodulator mixes and integrates over each period.
// pll_phase_search steps its carrier phase by pi/64 per period until the
// outputs match the transmitted (known) training symbol, then locks. Once
// locked, and when lower_en allows it, freq_lowering_ctrl raises the rate
// divider breakm to 2 and 4 while the periods keep reaching full value, and
// lowers it again when they do not; the demodulator then processes only one
// sample in breakm. In CDMA mode the phase is frozen and cdma_despreader
// correlates the chip outputs with user rx_user's sequence. led_display drives
// the eight LEDs (digitalout) from the switches and buttons.
// The signal chain follows the design's receiver, frequency-lowering and CDMA
// models; the sideband timing, the external receive input, the mode and
// enable pins and the fixed one-sample-per-clock rate are this design's
// choices. Numbers on the ports are 16-bit sign-magnitude words with bit 15
// the sign and bit 6 = 1.0.
//
// Timing: sout is registered; idemod/qdemod are the running integrals;
// lock, pll_phase and breakm change at the clock edge that ends a period;
// corr_* are registered after the last chip of a sequence. Synchronous
// active-high reset.
module cell16
  import cell16_pkg::*;
#(
  parameter int unsigned LONGSAMPLE = 32,
  parameter int unsigned SEQ_LEN    = 6,
  parameter int unsigned N_USERS    = 4,
  parameter int unsigned CYCLETOT   = 8
) (
  input  logic                       clk,
  input  logic                       reset,
  // board switches and buttons
  input  logic [1:0]                 digitalin,
  input  logic                       button,
  input  logic                       sw_iq,
  input  logic                       btn_hold,
  output logic [7:0]                 digitalout,
  // modes
  input  logic                       cdma_mode,
  input  logic                       lower_en,
  input  logic                       relock,
  // CDMA users and receiver selection
  input  logic [N_USERS-1:0]         user_i,
  input  logic [N_USERS-1:0]         user_q,
  input  logic [$clog2(N_USERS)-1:0] rx_user,
  // channel
  input  logic [PHASE_W-1:0]         tx_phase,
  output logic [WORD_W-1:0]          sout,
  input  logic                       rx_ext_en,
  input  logic [WORD_W-1:0]          rx_in,
  // receiver state
  output logic [WORD_W-1:0]          idemod,
  output logic [WORD_W-1:0]          qdemod,
  output logic                       period_end,
  output logic [WORD_W-1:0]          i_final,
  output logic [WORD_W-1:0]          q_final,
  output logic                       lock,
  output logic [PHASE_W-1:0]         pll_phase,
  output logic [2:0]                 breakm,
  output logic                       rate_up,
  output logic                       rate_down,
  output logic                       sat,
  output logic [WORD_W-1:0]          corr_i,
  output logic [WORD_W-1:0]          corr_q,
  output logic                       rx_bit_i,
  output logic                       rx_bit_q,
  output logic                       corr_valid
);

  localparam int unsigned SW = $clog2(LONGSAMPLE);
  localparam int unsigned CW = $clog2(SEQ_LEN);

  // ---- transmit ----
  logic [SW-1:0] t_sample;
  logic [CW-1:0] t_chip;
  logic          t_start, t_end, t_seq_end;
  sm_t           cd_i, cd_q, lvl_i, lvl_q, tx_s;
  logic          m_valid, m_i_bit, m_q_bit, m_sat;
  logic [SW-1:0] m_sample;
  logic [CW-1:0] m_chip;

  symbol_timer #(.LONGSAMPLE(LONGSAMPLE), .SEQ_LEN(SEQ_LEN)) u_timer (
    .clk, .rst(reset), .tick(1'b1),
    .sample(t_sample), .chip(t_chip),
    .period_start(t_start), .period_end(t_end), .seq_end(t_seq_end)
  );

  cdma_spreader #(.N_USERS(N_USERS), .SEQ_LEN(SEQ_LEN)) u_spread (
    .chip(t_chip), .user_i, .user_q, .i_level(cd_i), .q_level(cd_q)
  );

  always_comb begin
    if (cdma_mode) begin
      lvl_i = cd_i;
      lvl_q = cd_q;
    end else begin
      lvl_i = '{sign: !digitalin[1], mag: MAG_W'(ONE)};
      lvl_q = '{sign: !digitalin[0], mag: MAG_W'(ONE)};
    end
  end

  qpsk_modulator #(.LONGSAMPLE(LONGSAMPLE), .SEQ_LEN(SEQ_LEN)) u_mod (
    .clk, .rst(reset), .tick(1'b1),
    .sample(t_sample), .chip(t_chip),
    .i_level(lvl_i), .q_level(lvl_q),
    .i_bit(digitalin[1]), .q_bit(digitalin[0]),
    .tx_phase,
    .sout(tx_s), .o_valid(m_valid), .o_sample(m_sample), .o_chip(m_chip),
    .o_i_bit(m_i_bit), .o_q_bit(m_q_bit), .o_sat(m_sat)
  );

  // ---- receive ----
  sm_t        rx_s, d_i, d_q, f_i, f_q, c_i, c_q;
  logic       d_end, d_sat, proc_en, match;
  logic [1:0] bm_log2;

  always_comb rx_s = rx_ext_en ? sm_t'(rx_in) : tx_s;

  qpsk_demodulator #(.LONGSAMPLE(LONGSAMPLE)) u_demod (
    .clk, .rst(reset),
    .s_valid(m_valid), .s_sample(m_sample), .s_in(rx_s),
    .proc_en, .breakm_log2(bm_log2), .phase(pll_phase),
    .idemod(d_i), .qdemod(d_q),
    .period_end(d_end), .i_final(f_i), .q_final(f_q), .sat(d_sat)
  );

  pll_phase_search u_pll (
    .clk, .rst(reset), .train(!cdma_mode), .relock,
    .period_end(d_end), .i_final(f_i), .q_final(f_q),
    .exp_i(m_i_bit), .exp_q(m_q_bit),
    .phase(pll_phase), .lock, .match
  );

  freq_lowering_ctrl #(.LONGSAMPLE(LONGSAMPLE), .CYCLETOT(CYCLETOT)) u_rate (
    .clk, .rst(reset), .active(lock && lower_en && !cdma_mode),
    .period_end(d_end), .i_final(f_i), .q_final(f_q), .sample(m_sample),
    .breakm_log2(bm_log2), .proc_en, .n_up(rate_up), .n_down(rate_down)
  );

  cdma_despreader #(.N_USERS(N_USERS), .SEQ_LEN(SEQ_LEN)) u_despread (
    .clk, .rst(reset), .period_end(d_end && cdma_mode), .chip(m_chip), .user(rx_user),
    .i_final(f_i), .q_final(f_q),
    .corr_i(c_i), .corr_q(c_q), .bit_i(rx_bit_i), .bit_q(rx_bit_q), .corr_valid
  );

  led_display u_leds (
    .clk, .rst(reset), .iout(d_i), .qout(d_q), .i_final(f_i), .q_final(f_q),
    .period_end(d_end), .sw_iq, .btn_byte(button), .btn_hold, .leds(digitalout)
  );

  always_comb begin
    sout       = tx_s;
    idemod     = d_i;
    qdemod     = d_q;
    period_end = d_end;
    i_final    = f_i;
    q_final    = f_q;
    breakm     = 3'(1 << bm_log2);
    sat        = m_sat || d_sat;
    corr_i     = c_i;
    corr_q     = c_q;
  end

endmodule
