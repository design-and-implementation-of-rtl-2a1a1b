// fpmul_pkg: types and constants shared by the single-precision multiplier.
//
// IEEE 754 binary32 layout: sign in bit 31, 8-bit biased exponent (bias 127)
// in bits 30:23, 23-bit mantissa with a hidden leading 1 in bits 22:0.
// The adder kinds name the five two-operand adders that can be placed at the
// exponent stage and at the final stage of the significand multiplier; the
// reduction kinds choose how the Booth partial products are accumulated.
// The rounding modes are the five rules of IEEE 754.
// The exception flag set follows the IEEE list minus divide-by-zero, which a
// multiplier cannot raise.
package fpmul_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned MAN_W  = 23;
  localparam int unsigned SIG_W  = MAN_W + 1;     // significand with hidden 1
  localparam int unsigned PROD_W = 2 * SIG_W;     // 48-bit significand product
  localparam int unsigned BIAS   = 127;
  localparam int unsigned EXT_W  = EXP_W + 2;     // exponent path width (sign + overflow bit)

  typedef enum logic [2:0] {
    ADD_RIPPLE,   // ripple carry adder
    ADD_CLA,      // carry look-ahead adder
    ADD_SKIP,     // carry skip adder
    ADD_SELECT,   // carry select adder
    ADD_SAVE      // carry save layer + carry propagate adder
  } adder_kind_e;

  typedef enum logic {
    RED_CSA_TREE,   // Wallace tree of 3:2 compressors
    RED_ADDER_TREE  // tree of two-operand adders
  } reduce_kind_e;

  // The five IEEE rounding rules; the reference results of the design are
  // those of RND_ZERO (truncation), the default of the multiplier.
  typedef enum logic [2:0] {
    RND_NEAREST_EVEN,   // to nearest, ties to even
    RND_NEAREST_AWAY,   // to nearest, ties away from zero
    RND_ZERO,           // towards zero (truncation)
    RND_POS_INF,        // towards +infinity
    RND_NEG_INF         // towards -infinity
  } round_mode_e;

  typedef struct packed {
    logic                 sign;
    logic [EXP_W-1:0]     exp;
    logic [MAN_W-1:0]     man;
  } fp32_t;

  // Operand classes of the special-number table
  typedef struct packed {
    logic zero;     // exponent 0, mantissa 0
    logic denorm;   // exponent 0, mantissa non-zero
    logic inf;      // exponent 255, mantissa 0
    logic nan;      // exponent 255, mantissa non-zero
  } fp_class_t;

  typedef struct packed {
    logic invalid;
    logic overflow;
    logic underflow;
    logic inexact;
  } fp_flags_t;

  localparam fp32_t QNAN = '{sign: 1'b0, exp: '1, man: 23'h40_0000};

endpackage
