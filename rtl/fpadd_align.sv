// fpadd_align: operand ordering and significand alignment.
//
// Steps a and b of floating-point addition. The effective sign of B is
// flipped for subtraction. The operands are ordered by magnitude by
// comparing their exponent and fraction bits as one unsigned number, so
// the larger one is always the minuend later on. An exponent field of
// zero (zero or denormal) gets hidden bit 0 and effective exponent 1.
// The smaller significand is placed in the top SIG_W bits of an ALN_W-bit
// field and shifted right by the exponent difference; a difference above
// SIG_W + 3 is clamped to SIG_W + 3, which still leaves the shifted value
// nonzero below the rounding positions and so keeps every sticky and
// guard bit the later steps need. Purely combinational.
//
// The ordering by a full exponent-and-fraction comparison and the clamp
// at SIG_W + 3 follow the design's specification; the 51-bit field and
// the effective exponent 1 for denormals are this design's choices.
module fpadd_align
  import fpadd_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,   // 1: compute a - b
  output align_t      o
);

  logic             sign_b;
  logic             a_ge_b;
  logic [31:0]      major, minor;
  logic [EXP_W-1:0] exp_major, exp_minor, diff;
  logic [SIG_W-1:0] sig_minor;
  logic [$clog2(ALN_W+1)-1:0] shamt;

  always_comb begin
    sign_b = b[31] ^ sub;
    a_ge_b = (a[30:0] >= b[30:0]);
    major  = a_ge_b ? a : {sign_b, b[30:0]};
    minor  = a_ge_b ? {sign_b, b[30:0]} : a;

    exp_major = (major[30:23] == '0) ? EXP_W'(1) : major[30:23];
    exp_minor = (minor[30:23] == '0) ? EXP_W'(1) : minor[30:23];
    sig_minor = {minor[30:23] != '0, minor[22:0]};

    diff  = exp_major - exp_minor;
    shamt = (diff > EXP_W'(SHIFT_CAP)) ? ($bits(shamt))'(SHIFT_CAP) : diff[$bits(shamt)-1:0];

    o.sign_l  = major[31];
    o.sign_s  = minor[31];
    o.eff_sub = major[31] ^ minor[31];
    o.exp_l   = exp_major;
    o.sig_l   = {major[30:23] != '0, major[22:0]};
    o.sig_s   = {sig_minor, {SHIFT_CAP{1'b0}}} >> shamt;
  end

endmodule
