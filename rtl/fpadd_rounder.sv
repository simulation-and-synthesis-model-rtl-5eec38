// fpadd_rounder: rounding of the normalized significand.
//
// Step e. The increment is decided from the rounding mode (control bits
// [1:0]), the result sign, the significand LSB and the round and sticky
// bits. It is added to the packed {exponent, fraction} word, so a carry
// out of the fraction lands in the exponent: an all-ones significand
// rounds to 1.0 with the exponent incremented, and a denormal that rounds
// up to 2^-126 becomes the smallest normal. Inexact is set when either
// the round or the sticky bit is high. Purely combinational.
//
// The mode encoding follows the design's specification. Adding the
// increment to the packed word replaces the specification's "increment
// by two on significand overflow" trick with the same result.
module fpadd_rounder
  import fpadd_pkg::*;
(
  input  norm_t  n,
  input  logic   sign,
  input  rmode_e rm,
  output round_t r
);

  logic                          lost, inc;
  logic [EXPI_W+FRAC_W-1:0]      packed_in, packed_out;

  always_comb begin
    lost = n.rnd | n.stk;
    unique case (rm)
      RM_NEAREST_EVEN: inc = n.rnd & (n.stk | n.sig[0]);
      RM_TO_ZERO:      inc = 1'b0;
      RM_TO_POS_INF:   inc = lost & ~sign;
      RM_TO_NEG_INF:   inc = lost & sign;
      default:         inc = 1'b0;
    endcase
    packed_in  = {n.exp, n.sig[FRAC_W-1:0]};
    packed_out = packed_in + (EXPI_W+FRAC_W)'(inc);
    r.exp      = packed_out[EXPI_W+FRAC_W-1 -: EXPI_W];
    r.frac     = packed_out[FRAC_W-1:0];
    r.inexact  = lost;
  end

endmodule
