// fpadd_normalize: leading-zero count, normalization shift and flags.
//
// Step d. A carry out of the adder shifts the sum right by one and bumps
// the exponent. Otherwise a priority encoder counts the leading zeros of
// the sum and it is shifted left by that amount while the count is
// subtracted from the larger exponent. If that would take the exponent
// below 1 the shift is limited to exponent - 1 and the result is a
// denormal (exponent field 0). With the underflow trap enabled the shift
// is not limited: a tiny result is fully normalized and its exponent may
// drop to zero or below, ready for the trap bias in the final stage.
// After the shift, the top SIG_W bits are the significand, the next bit
// is the round bit and the OR of all bits below is the sticky bit. The
// zero-result and tiny flags are produced here as well.
// Purely combinational.
//
// The leading-zero count, the exponent adjustment and the limited shift
// for denormals follow the design's specification. Round = first bit
// below the significand and the unlimited shift under the underflow
// trap are this design's choices.
module fpadd_normalize
  import fpadd_pkg::*;
(
  input  logic [SUM_W-1:0] sum,
  input  logic [EXP_W-1:0] exp_l,    // larger operand's effective exponent (>= 1)
  input  logic             uf_trap,
  output norm_t            n
);

  localparam int LZ_W = $clog2(SUM_W);

  logic [LZ_W-1:0]          lzc, shift;
  logic [SUM_W-2:0]         shifted;
  logic signed [EXPI_W-1:0] exp_in, exp_norm;
  logic                     limited;

  always_comb begin
    // Priority encoder over bits [SUM_W-2:0]: the highest set bit wins.
    lzc = LZ_W'(SUM_W - 1);
    for (int i = 0; i < SUM_W - 1; i++)
      if (sum[i]) lzc = LZ_W'(SUM_W - 2 - i);

    exp_in  = EXPI_W'(exp_l);
    limited = ~uf_trap && (EXPI_W'(lzc) > exp_in - 1);
    shift   = limited ? LZ_W'(exp_l - 1) : lzc;

    n.zero = (sum == '0);
    n.tiny = ~n.zero && ~sum[SUM_W-1] && (EXPI_W'(lzc) >= exp_in);

    if (sum[SUM_W-1]) begin
      shifted  = sum[SUM_W-1:1];
      n.sig    = sum[SUM_W-1 -: SIG_W];
      n.rnd    = sum[SUM_W-1-SIG_W];
      n.stk    = |sum[SUM_W-2-SIG_W:0];
      exp_norm = exp_in + 1;
    end else begin
      shifted  = sum[SUM_W-2:0] << shift;
      n.sig    = shifted[SUM_W-2 -: SIG_W];
      n.rnd    = shifted[SUM_W-2-SIG_W];
      n.stk    = |shifted[SUM_W-3-SIG_W:0];
      exp_norm = exp_in - EXPI_W'(shift);
    end
    // A denormal (or zero) significand carries exponent field 0.
    n.exp = n.sig[SIG_W-1] ? exp_norm : '0;
  end

endmodule
