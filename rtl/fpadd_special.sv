// fpadd_special: special-case detector for one binary32 operand.
//
// Decodes the exponent and fraction fields into the internal class flags
// the adder uses: exponent-all-zero (the datapath's "zero input", which
// also covers denormals), true zero, denormal, infinity, NaN and
// signalling NaN. Purely combinational.
//
// The classes follow the IEEE 754 special-value table; treating a NaN
// whose fraction MSB is clear as signalling follows IEEE 754-2008 and is
// this design's choice.
module fpadd_special
  import fpadd_pkg::*;
(
  input  logic [31:0] x,
  output fp_class_t   cls
);

  logic exp_zero, exp_ones, frac_zero;

  always_comb begin
    exp_zero  = (x[30:23] == '0);
    exp_ones  = (x[30:23] == EXP_MAX);
    frac_zero = (x[22:0] == '0);

    cls.exp_zero = exp_zero;
    cls.zero     = exp_zero & frac_zero;
    cls.denorm   = exp_zero & ~frac_zero;
    cls.inf      = exp_ones & frac_zero;
    cls.nan      = exp_ones & ~frac_zero;
    cls.snan     = exp_ones & ~frac_zero & ~x[22];
  end

endmodule
