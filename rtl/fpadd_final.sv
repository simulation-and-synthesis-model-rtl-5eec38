// fpadd_final: special-case selection, exceptions and result assembly.
//
// Pieces together the 32-bit result and the flag field.
//  * A NaN operand gives that NaN with its quiet bit set (A first).
//    Infinity minus infinity gives the default NaN 0x7FC00000. Infinity
//    plus a finite number, or two equal-signed infinities, gives the
//    infinity. Following the design's specification, invalid is raised
//    whenever an operand is a NaN or an infinity; no other flag is set
//    then.
//  * An exact zero sum takes the common sign of the operands, or +0 for
//    opposite signs (-0 when rounding toward -inf), as IEEE 754 requires.
//  * Overflow (rounded exponent >= 255) always raises the overflow flag.
//    Untrapped, the result is infinity or the largest finite number as the
//    rounding mode dictates and inexact is raised. Trapped, the exponent is
//    returned reduced by TRAP_BIAS = 192 (IEEE 754-1985 value).
//  * Underflow: a tiny result raises underflow when it is inexact, or
//    always when the underflow trap is enabled; a trapped result is
//    returned normalized with its exponent raised by TRAP_BIAS.
//  * Inexact follows the rounder, plus untrapped overflow and underflow.
// Purely combinational.
module fpadd_final
  import fpadd_pkg::*;
(
  input  fp_class_t   ca,
  input  fp_class_t   cb,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  ctrl_t       ctrl,
  input  round_t      r,
  input  norm_t       n,
  input  logic        sign,      // sign of the larger-magnitude operand
  input  logic        eff_sub,
  output logic [31:0] result,
  output flags_t      flags
);

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  logic                     sign_b;
  logic                     ovf, to_inf;
  logic signed [EXPI_W-1:0] exp_adj;

  always_comb begin
    sign_b  = b[31] ^ ctrl.sub;
    ovf     = (r.exp >= $signed(EXPI_W'(EXP_MAX)));
    exp_adj = r.exp;
    result  = '0;
    flags   = '0;
    // Untrapped overflow goes to infinity unless the mode rounds toward zero
    // for this sign.
    unique case (ctrl.rm)
      RM_NEAREST_EVEN: to_inf = 1'b1;
      RM_TO_ZERO:      to_inf = 1'b0;
      RM_TO_POS_INF:   to_inf = ~sign;
      RM_TO_NEG_INF:   to_inf = sign;
      default:         to_inf = 1'b1;
    endcase

    if (ca.nan || cb.nan) begin
      result        = ca.nan ? (a | 32'h0040_0000) : (b | 32'h0040_0000);
      flags.invalid = 1'b1;
    end else if (ca.inf && cb.inf) begin
      result        = (a[31] == sign_b) ? a : QNAN;
      flags.invalid = 1'b1;
    end else if (ca.inf) begin
      result        = a;
      flags.invalid = 1'b1;
    end else if (cb.inf) begin
      result        = {sign_b, b[30:0]};
      flags.invalid = 1'b1;
    end else if (n.zero) begin
      result = {eff_sub ? (ctrl.rm == RM_TO_NEG_INF) : sign, 31'b0};
    end else if (ovf) begin
      flags.overflow = 1'b1;
      if (ctrl.of_trap) begin
        exp_adj       = r.exp - EXPI_W'(TRAP_BIAS);
        result        = {sign, exp_adj[EXP_W-1:0], r.frac};
        flags.inexact = r.inexact;
      end else begin
        result        = to_inf ? {sign, EXP_MAX, 23'b0} : {sign, EXP_MAX - 8'd1, {FRAC_W{1'b1}}};
        flags.inexact = 1'b1;
      end
    end else if (n.tiny && ctrl.uf_trap) begin
      exp_adj         = r.exp + EXPI_W'(TRAP_BIAS);
      result          = {sign, exp_adj[EXP_W-1:0], r.frac};
      flags.underflow = 1'b1;
      flags.inexact   = r.inexact;
    end else begin
      result          = {sign, r.exp[EXP_W-1:0], r.frac};
      flags.underflow = n.tiny & r.inexact;
      flags.inexact   = r.inexact;
    end
  end

endmodule
