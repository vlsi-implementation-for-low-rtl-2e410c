// cell16_pkg: types and constants shared by the cell16 modem datapath.
//
// Numbers are 16-bit sign-magnitude words: bit 15 is the sign (1 = negative)
// and bits 14..0 the magnitude with six fraction bits, so bit 6 weighs 1.0 and
// bit 0 weighs 1/64 (the weights 1, .5, ... .015625 of bits 6..0 follow the
// design's number table; the sign in bit 15 follows its waveform dumps).
// The carrier phase is quantised to 128 steps of pi/64 around the circle,
// the phase step of the receiver's phase search.
package cell16_pkg;

  localparam int unsigned WORD_W  = 16;
  localparam int unsigned MAG_W   = WORD_W - 1;
  localparam int unsigned FRAC_W  = 6;
  localparam int unsigned ONE     = 1 << FRAC_W;   // magnitude of 1.0

  localparam int unsigned PHASE_W = 7;             // 128 phase steps of pi/64

  // A sign-magnitude number.
  typedef struct packed {
    logic             sign;
    logic [MAG_W-1:0] mag;
  } sm_t;

  localparam sm_t SM_ZERO = '{sign: 1'b0, mag: '0};

  // ALU command codes. The four-bit code is followed by a four-bit function
  // field that only the compare group (4'b1101) uses.
  typedef enum logic [3:0] {
    OP_SUB  = 4'b0001,  // C = A - B
    OP_AND  = 4'b0010,  // C = A AND B
    OP_OR   = 4'b0011,  // C = A OR B
    OP_PASS = 4'b0101,  // C = A
    OP_MULT = 4'b0110,  // C = A * B
    OP_ADD  = 4'b1001,  // C = A + B
    OP_CMP  = 4'b1101   // compare group, see FN_*
  } alu_op_e;

  localparam logic [3:0] FN_EQ = 4'b0000;  // flag = (A == B)
  localparam logic [3:0] FN_GT = 4'b0010;  // flag = (A > B)

  // Signed integer value of a word in units of 1/64.
  function automatic int sm_to_int(sm_t x);
    return x.sign ? -int'(x.mag) : int'(x.mag);
  endfunction

  // Word of a signed integer in units of 1/64 (magnitude saturates).
  function automatic sm_t int_to_sm(int v);
    sm_t r;
    int unsigned m;
    m = (v < 0) ? unsigned'(-v) : unsigned'(v);
    if (m > (1 << MAG_W) - 1) m = (1 << MAG_W) - 1;
    r.sign = (v < 0) && (m != 0);
    r.mag  = MAG_W'(m);
    return r;
  endfunction

endpackage
