// freq_lowering_ctrl: lowers the receiver's processing rate once the phase
// loop is locked.
//
// breakm is the rate divider: the demodulator processes one sample in
// breakm (proc_en) and weights it by breakm. It is kept between 1 and 4,
// as in the design's frequency-lowering model. While active (locked and
// allowed), periods are counted in windows of CYCLETOT; phasecount counts the
// periods of the window that ended well, meaning both demodulator outputs
// reached their full value (|Idemod| and |Qdemod| >= THRESH). At the end of a
// window, phasecount > CORANG doubles breakm (the rate is halved) and
// phasecount <= CORANG1 halves it; the counts then restart. Out of lock breakm
// returns to 1 and the window restarts.
// The doubling/halving and the 1..4 limits follow the model. What phasecount
// measures is not spelled out there; counting the periods that reach full
// value is this design's reading, and CYCLETOT, CORANG and CORANG1 are
// chosen here.
//
// Ports: active, period_end with i_final/q_final; breakm_log2 (0, 1, 2) and
// n_up / n_down strobes (registered, change at the clock edge ending a
// window); proc_en for the sample index `sample` (combinational).
// Synchronous active-high reset to breakm = 1.
module freq_lowering_ctrl
  import cell16_pkg::*;
#(
  parameter int unsigned LONGSAMPLE = 32,
  parameter int unsigned CYCLETOT   = 8,
  parameter int unsigned CORANG     = 6,
  parameter int unsigned CORANG1    = 4,
  parameter int unsigned THRESH     = 61
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          active,
  input  logic                          period_end,
  input  sm_t                           i_final,
  input  sm_t                           q_final,
  input  logic [$clog2(LONGSAMPLE)-1:0] sample,
  output logic [1:0]                    breakm_log2,
  output logic                          proc_en,
  output logic                          n_up,
  output logic                          n_down
);

  localparam int unsigned CW = $clog2(CYCLETOT + 1);

  logic [CW-1:0] cycle, phasecount, count_next;
  logic          good;

  always_comb begin
    good       = (i_final.mag >= MAG_W'(THRESH)) && (q_final.mag >= MAG_W'(THRESH));
    count_next = phasecount + CW'(good);
    unique case (breakm_log2)
      2'd0:    proc_en = 1'b1;
      2'd1:    proc_en = (sample[0] == 1'b0);
      default: proc_en = (sample[1:0] == 2'b00);
    endcase
  end

  always_ff @(posedge clk) begin
    n_up   <= 1'b0;
    n_down <= 1'b0;
    if (rst || !active) begin
      cycle       <= '0;
      phasecount  <= '0;
      breakm_log2 <= '0;
    end else if (period_end) begin
      if (cycle == CW'(CYCLETOT - 1)) begin
        cycle      <= '0;
        phasecount <= '0;
        if (count_next > CW'(CORANG)) begin
          if (breakm_log2 < 2'd2) begin
            breakm_log2 <= breakm_log2 + 1'b1;
            n_up        <= 1'b1;
          end
        end else if (count_next <= CW'(CORANG1)) begin
          if (breakm_log2 > 2'd0) begin
            breakm_log2 <= breakm_log2 - 1'b1;
            n_down      <= 1'b1;
          end
        end
      end else begin
        cycle      <= cycle + 1'b1;
        phasecount <= count_next;
      end
    end
  end

endmodule
