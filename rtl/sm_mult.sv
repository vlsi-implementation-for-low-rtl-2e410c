// sm_mult: sign-magnitude fixed-point multiplier (combinational).
//
// The sign of the product is the XOR of the operand signs. The magnitudes
// are multiplied to a product with twice the fraction bits, which is rounded
// to the nearest 1/64 (half an LSB is added before the six fraction bits are
// dropped) and saturated at the largest magnitude, raising ovf.
// The document names a multiplier among the DSP's math units and gives the
// number format; rounding and saturation are this design's choice.
//
// Ports: a, b operands; y = a * b; ovf when the magnitude saturated.
module sm_mult
  import cell16_pkg::*;
(
  input  sm_t  a,
  input  sm_t  b,
  output sm_t  y,
  output logic ovf
);

  logic [2*MAG_W-1:0] prod;
  logic [2*MAG_W-1:0] scaled;

  always_comb begin
    prod   = a.mag * b.mag;
    scaled = (prod + (2*MAG_W)'(ONE / 2)) >> FRAC_W;
    ovf    = (scaled >> MAG_W) != '0;
    y.mag  = ovf ? '1 : scaled[MAG_W-1:0];
    y.sign = (a.sign ^ b.sign) && (y.mag != '0);
  end

endmodule
