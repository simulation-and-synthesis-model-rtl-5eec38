// fpadd_mantadd: significand adder/subtractor.
//
// Step c. Only the top WIN_W = SIG_W + 3 bits of the aligned significands
// enter the adder. Of the smaller significand's bits below that window,
// the most significant is kept as the guard bit and the OR of the rest as
// the pre-sticky bit; both are appended below the window so that, on
// subtraction, the borrow out of the discarded bits is taken correctly.
// The larger magnitude is always the minuend, so the result is never
// negative.
//
// The 27-bit window, guard and pre-sticky bits follow the design's
// specification; appending them to the operation (rather than only
// storing them) is this design's choice.
//
// Output layout (SUM_W = 30 bits): [29] carry, [28:5] significand
// position, [4:2] extra window bits, [1] guard, [0] pre-sticky.
// Purely combinational.
module fpadd_mantadd
  import fpadd_pkg::*;
(
  input  align_t           al,
  output logic [SUM_W-1:0] sum
);

  logic [SUM_W-1:0] op_l, op_s;
  logic             guard, pre_sticky;

  always_comb begin
    guard      = al.sig_s[ALN_W-WIN_W-1];
    pre_sticky = |al.sig_s[ALN_W-WIN_W-2:0];
    op_l = {1'b0, al.sig_l, 3'b000, 1'b0, 1'b0};
    op_s = {1'b0, al.sig_s[ALN_W-1 -: WIN_W], guard, pre_sticky};
    sum  = al.eff_sub ? (op_l - op_s) : (op_l + op_s);
  end

  // The aligner hands over the larger magnitude as sig_l.
  always_comb
    if (al.eff_sub)
      assert (op_l >= op_s) else $error("mantadd: subtrahend exceeds minuend");

endmodule
