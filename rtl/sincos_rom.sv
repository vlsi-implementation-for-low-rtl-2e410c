// sincos_rom: carrier table giving cos and sin of a quantised phase
// (combinational).
//
// The phase input counts steps of 2*pi / 2**PHASE_W; with the default
// PHASE_W = 7 a step is pi/64, the phase step of the receiver's phase search.
// Entry k holds round(AMPL * cos(2*pi*k / 2**PHASE_W)) as a sign-magnitude
// word in units of 1/64; the sine is read from the same table a quarter turn
// earlier (sin x = cos(x - pi/2)). The table is computed at elaboration from
// that formula. AMPL = 64 is a carrier amplitude of 1.0. The document uses the
// mixers cos(2 pi f t + phi) and sin(2 pi f t + phi); holding them in a table
// is this design's choice.
//
// Ports: phase; cos_o, sin_o.
module sincos_rom
  import cell16_pkg::*;
#(
  parameter int unsigned PHASE_BITS = PHASE_W,
  parameter int unsigned AMPL       = ONE
) (
  input  logic [PHASE_BITS-1:0] phase,
  output sm_t                   cos_o,
  output sm_t                   sin_o
);

  localparam int unsigned N = 1 << PHASE_BITS;

  typedef logic [WORD_W-1:0] table_t [N];

  function automatic table_t make_table();
    table_t t;
    real    pi, v;
    pi = 3.14159265358979323846;
    for (int k = 0; k < int'(N); k++) begin
      v = $cos(2.0 * pi * real'(k) / real'(N)) * real'(AMPL);
      t[k] = WORD_W'(int_to_sm($rtoi(v + ((v < 0.0) ? -0.5 : 0.5))));
    end
    return t;
  endfunction

  localparam table_t COS_TABLE = make_table();

  logic [PHASE_BITS-1:0] sin_idx;

  always_comb begin
    sin_idx = phase - PHASE_BITS'(N / 4);
    cos_o   = sm_t'(COS_TABLE[phase]);
    sin_o   = sm_t'(COS_TABLE[sin_idx]);
  end

endmodule
