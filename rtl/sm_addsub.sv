// sm_addsub: sign-magnitude adder/subtractor (combinational).
//
// Works the way the design's add/subtract table lays out: the sign of B is
// flipped for a subtraction, and Z is set when |B| > |A|. When A and the
// (effective) B have the same sign the magnitudes are added and A's sign is
// kept. When the signs differ the smaller magnitude is taken from the larger:
// A - B with A's sign when Z = 0, B - A with B's effective sign when Z = 1.
// Every row of the table (A + B, -A + -B, A + -B, ..., -A - -B) reduces to
// these three cases.
// Own choices: a zero result is always given a positive sign (the table would
// leave -0 in the "-A + B, Z = 0" row), and a magnitude carry out saturates
// the result at the largest magnitude and raises ovf.
//
// Ports: a, b, sub (1 = A - B); y the result, z = |B| > |A|, ovf.
module sm_addsub
  import cell16_pkg::*;
(
  input  sm_t  a,
  input  sm_t  b,
  input  logic sub,
  output sm_t  y,
  output logic z,
  output logic ovf
);

  logic           b_sign_eff;
  logic [MAG_W:0] sum;

  always_comb begin
    b_sign_eff = b.sign ^ sub;
    z          = (b.mag > a.mag);
    ovf        = 1'b0;
    sum        = '0;
    y          = SM_ZERO;
    if (a.sign == b_sign_eff) begin
      sum    = {1'b0, a.mag} + {1'b0, b.mag};
      ovf    = sum[MAG_W];
      y.mag  = ovf ? '1 : sum[MAG_W-1:0];
      y.sign = a.sign;
    end else if (z) begin
      y.mag  = b.mag - a.mag;
      y.sign = b_sign_eff;
    end else begin
      y.mag  = a.mag - b.mag;
      y.sign = a.sign;
    end
    if (y.mag == '0) y.sign = 1'b0;
  end

endmodule
