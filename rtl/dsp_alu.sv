// dsp_alu: arithmetic/logic unit of the cell16 signal processor
// (combinational).
//
// Commands (four-bit op, plus a four-bit function field for the compare
// group) follow the design's command table:
//   0001 C = A - B      1001 C = A + B      (sign-magnitude, via sm_addsub)
//   0010 C = A AND B    0011 C = A OR B     (bitwise on the 16-bit words)
//   0101 C = A          0110 C = A * B      (sign-magnitude, via sm_mult)
//   1101 0000  flag = (A == B)     1101 0010  flag = (A > B)
// For add and subtract the flag is the adder's Z (|B| > |A|), as in the
// add/subtract table; for multiply it is the overflow; for the logic and pass
// commands it is (C == 0). The compare commands leave C = A. Comparisons are
// of signed values; +0 and -0 compare equal.
// The table's other codes (jumps, memory moves) belong to the processor's
// sequencer, not to the ALU; any code the ALU does not know gives C = A and a
// zero flag. Reading 1101 0000 as a compare (it could also be read as the move
// A = B) is this design's choice.
//
// Ports: op, fn, a, b; c the result, flag as above, ovf when an add,
// subtract or multiply saturated.
module dsp_alu
  import cell16_pkg::*;
(
  input  logic [3:0] op,
  input  logic [3:0] fn,
  input  sm_t        a,
  input  sm_t        b,
  output sm_t        c,
  output logic       flag,
  output logic       ovf
);

  sm_t  as_y, mul_y;
  logic as_z, as_ovf, mul_ovf;
  logic a_neg, b_neg, a_gt_b, a_eq_b;

  sm_addsub u_addsub (
    .a  (a),
    .b  (b),
    .sub(op == OP_SUB),
    .y  (as_y),
    .z  (as_z),
    .ovf(as_ovf)
  );

  sm_mult u_mult (
    .a  (a),
    .b  (b),
    .y  (mul_y),
    .ovf(mul_ovf)
  );

  always_comb begin
    // Signed comparison of sign-magnitude values; -0 counts as 0.
    a_neg  = a.sign && (a.mag != '0);
    b_neg  = b.sign && (b.mag != '0);
    a_eq_b = (a.mag == b.mag) && ((a_neg == b_neg) || (a.mag == '0));
    if (a_neg != b_neg) a_gt_b = b_neg;
    else if (a_neg)     a_gt_b = (a.mag < b.mag);
    else                a_gt_b = (a.mag > b.mag);

    c    = a;
    flag = 1'b0;
    ovf  = 1'b0;
    unique case (op)
      OP_SUB, OP_ADD: begin c = as_y;  flag = as_z;    ovf = as_ovf;  end
      OP_MULT:        begin c = mul_y; flag = mul_ovf; ovf = mul_ovf; end
      OP_AND:         begin c = a & b; flag = (c == '0); end
      OP_OR:          begin c = a | b; flag = (c == '0); end
      OP_PASS:        begin c = a;     flag = (c == '0); end
      OP_CMP: begin
        c = a;
        if (fn == FN_EQ)      flag = a_eq_b;
        else if (fn == FN_GT) flag = a_gt_b;
      end
      default: ;
    endcase
  end

endmodule
