// fp_pkg: types and constants shared by the single precision FPU.
//
// An IEEE-754 binary32 word is split into a 1-bit sign, an 8-bit biased
// exponent and a 23-bit stored mantissa (fraction); the significand of a
// normal number is the fraction with an implicit leading one. The exponent
// bias is 127. The field widths and the bias follow the single precision
// format; the operation encoding and the canonical NaN are this design's own.
package fp_pkg;

  localparam int unsigned EXP_W = 8;
  localparam int unsigned MAN_W = 23;
  localparam int unsigned SIG_W = MAN_W + 1;          // significand incl. hidden bit
  localparam int unsigned BIAS  = 127;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;          // exponent of Inf / NaN

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp32_t;

  // Operation select of the arithmetic unit.
  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_SUB = 2'b01,
    OP_MUL = 2'b10
  } fp_op_e;

  // Quiet NaN returned for invalid operations and NaN inputs.
  localparam fp32_t QNAN = '{sign: 1'b0, exp: EXP_MAX, man: 23'h40_0000};

  // Status flags reported with every result.
  typedef struct packed {
    logic exception;   // an operand was Inf or NaN
    logic overflow;    // finite operands, result rounded to Inf
    logic underflow;   // non-zero exact result came out subnormal or zero
  } fp_flags_t;

endpackage
