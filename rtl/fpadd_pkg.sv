// fpadd_pkg: types and constants shared by the binary32 adder blocks.
//
// The adder follows the classic five-step floating-point addition
// (exponent difference, alignment, significand add, normalization,
// rounding) with a final stage that handles special operands and
// exceptions. The structs below are the bundles handed from one step to
// the next. Bit layouts of the control field follow the design's
// specification: bits [1:0] select the rounding mode, bit 4 the
// operation; bits 2 and 3 as the overflow and underflow trap enables
// and the flag-field order are this design's choice.
package fpadd_pkg;

  localparam int unsigned EXP_W   = 8;              // exponent field width
  localparam int unsigned FRAC_W  = 23;             // stored fraction width
  localparam int unsigned SIG_W   = FRAC_W + 1;     // significand with hidden bit
  localparam int unsigned WIN_W   = SIG_W + 3;      // bits of each significand that are added
  localparam int unsigned SHIFT_CAP = WIN_W;        // alignment shift limit
  localparam int unsigned ALN_W   = SIG_W + SHIFT_CAP; // aligned smaller significand
  localparam int unsigned SUM_W   = WIN_W + 3;      // carry + window + guard + pre-sticky
  localparam int unsigned EXPI_W  = 10;             // signed internal exponent
  localparam logic [EXP_W-1:0] EXP_MAX = '1;
  // Exponent adjustment applied to a trapped overflow / underflow result
  // (IEEE 754-1985 value for single precision).
  localparam int TRAP_BIAS = 192;

  // Rounding modes, control field bits [1:0].
  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'b00,
    RM_TO_ZERO      = 2'b01,
    RM_TO_POS_INF   = 2'b10,
    RM_TO_NEG_INF   = 2'b11
  } rmode_e;

  // The 5-bit control field.
  typedef struct packed {
    logic   sub;      // bit 4: 0 = A + B, 1 = A - B
    logic   uf_trap;  // bit 3: underflow trap enable
    logic   of_trap;  // bit 2: overflow trap enable
    rmode_e rm;       // bits [1:0]
  } ctrl_t;

  // The 4-bit flag field.
  typedef struct packed {
    logic invalid;    // bit 3
    logic overflow;   // bit 2
    logic underflow;  // bit 1
    logic inexact;    // bit 0
  } flags_t;

  // Operand classification produced by the special-case detector.
  typedef struct packed {
    logic exp_zero;   // exponent field all zeros (zero or denormal)
    logic zero;
    logic denorm;
    logic inf;
    logic nan;
    logic snan;       // signalling NaN (fraction MSB clear)
  } fp_class_t;

  // Alignment result: the operands ordered by magnitude.
  typedef struct packed {
    logic              sign_l;   // sign of the larger-magnitude operand
    logic              sign_s;   // effective sign of the smaller operand
    logic              eff_sub;  // signs differ: magnitudes are subtracted
    logic [EXP_W-1:0]  exp_l;    // effective exponent of the larger (>= 1)
    logic [SIG_W-1:0]  sig_l;    // significand of the larger, hidden bit included
    logic [ALN_W-1:0]  sig_s;    // smaller significand, right-shifted into ALN_W bits
  } align_t;

  // Normalization result.
  typedef struct packed {
    logic [SIG_W-1:0]         sig;   // normalized significand (MSB clear if denormal)
    logic signed [EXPI_W-1:0] exp;   // exponent field value: 0 for a denormal
    logic                     rnd;   // first bit below the significand
    logic                     stk;   // OR of all lower bits
    logic                     tiny;  // nonzero result below the smallest normal
    logic                     zero;  // exact zero
  } norm_t;

  // Rounding result: packed exponent/fraction after the increment.
  typedef struct packed {
    logic signed [EXPI_W-1:0] exp;
    logic [FRAC_W-1:0]        frac;
    logic                     inexact;
  } round_t;

endpackage
