// fpadd: IEEE 754 single-precision floating-point adder/subtractor.
//
// Computes result = a + b (ctrl[4] = 0) or a - b (ctrl[4] = 1) on binary32
// operands, with the four IEEE rounding modes, denormal inputs and
// outputs, the overflow / underflow / inexact / invalid flags, and
// optional overflow and underflow traps that return the result with its
// exponent shifted by 192.
//
//   ctrl[4]   operation: 0 add, 1 subtract
//   ctrl[3]   underflow trap enable
//   ctrl[2]   overflow trap enable
//   ctrl[1:0] rounding: 00 nearest-even, 01 toward zero,
//             10 toward +inf, 11 toward -inf
//   flags     [3] invalid, [2] overflow, [1] underflow, [0] inexact
//
// The datapath is the six sub-blocks of the specification in a chain:
// special (operand classes) -> align -> mantadd -> normalize -> rounder
// -> final. The whole adder is combinational: the result is valid one
// propagation delay after the inputs; registering it is left to the user.
// The trap-enable bit positions and the flag order are this design's
// choice.
module fpadd
  import fpadd_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  ctrl,
  output logic [31:0] result,
  output logic [3:0]  flags
);

  ctrl_t            c;
  fp_class_t        cls_a, cls_b;
  align_t           al;
  logic [SUM_W-1:0] sum;
  norm_t            nrm;
  round_t           rnd;
  flags_t           fl;

  assign c = ctrl_t'(ctrl);

  fpadd_special   u_special_a (.x(a), .cls(cls_a));
  fpadd_special   u_special_b (.x(b), .cls(cls_b));

  fpadd_align     u_align     (.a(a), .b(b), .sub(c.sub), .o(al));

  fpadd_mantadd   u_mantadd   (.al(al), .sum(sum));

  fpadd_normalize u_normalize (.sum(sum), .exp_l(al.exp_l), .uf_trap(c.uf_trap), .n(nrm));

  fpadd_rounder   u_rounder   (.n(nrm), .sign(al.sign_l), .rm(c.rm), .r(rnd));

  fpadd_final     u_final     (.ca(cls_a), .cb(cls_b), .a(a), .b(b), .ctrl(c),
                               .r(rnd), .n(nrm), .sign(al.sign_l), .eff_sub(al.eff_sub),
                               .result(result), .flags(fl));

  assign flags = fl;

endmodule
