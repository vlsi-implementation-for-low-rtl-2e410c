// symbol_timer: sample, symbol-period and chip counters of the modem.
//
// One carrier sample is taken per clock cycle in which `tick` is high. A
// symbol period is LONGSAMPLE samples; sample counts 0 .. LONGSAMPLE-1 and
// the counter `chip` steps once per period through the SEQ_LEN chips of a
// spreading sequence. These are the counters sample/longsample and sq of the
// design's receiver and CDMA models, counted from 0 here instead of from 1.
// LONGSAMPLE is not given in the document; 32 is this design's choice. A
// sequence of SEQ_LEN = 6 chips follows the CDMA model, which dumps its
// correlation when sq reaches 6.
//
// Ports: tick; sample, chip, period_start (sample 0), period_end (last
// sample), seq_end (last sample of the last chip). Outputs are registered
// counters and the strobes decode them, so they hold for the tick cycle.
// Synchronous active-high reset to sample 0, chip 0.
module symbol_timer #(
  parameter int unsigned LONGSAMPLE = 32,
  parameter int unsigned SEQ_LEN    = 6
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          tick,
  output logic [$clog2(LONGSAMPLE)-1:0] sample,
  output logic [$clog2(SEQ_LEN)-1:0]    chip,
  output logic                          period_start,
  output logic                          period_end,
  output logic                          seq_end
);

  localparam int unsigned SW = $clog2(LONGSAMPLE);
  localparam int unsigned CW = $clog2(SEQ_LEN);

  always_ff @(posedge clk) begin
    if (rst) begin
      sample <= '0;
      chip   <= '0;
    end else if (tick) begin
      if (period_end) begin
        sample <= '0;
        chip   <= (chip == CW'(SEQ_LEN - 1)) ? '0 : chip + 1'b1;
      end else begin
        sample <= sample + 1'b1;
      end
    end
  end

  always_comb begin
    period_start = (sample == '0);
    period_end   = (sample == SW'(LONGSAMPLE - 1));
    seq_end      = period_end && (chip == CW'(SEQ_LEN - 1));
  end

endmodule
