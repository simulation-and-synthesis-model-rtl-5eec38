// tb_fpadd_final: self-checking testbench of the result/exception stage.
//
// Drives operand encodings together with synthetic normalizer and
// rounder outputs and compares with hand-worked results: NaN
// propagation and quieting, infinity arithmetic, signs of exact zeros,
// untrapped overflow in all four rounding modes and both signs, trapped
// overflow and underflow with the 192 exponent bias, tiny results with
// and without inexact, and a plain normal result. Operand classes are
// computed in the testbench from the magnitude bits.
module tb_fpadd_final;
  import fpadd_pkg::*;

  fp_class_t   ca, cb;
  logic [31:0] a, b, result;
  ctrl_t       ctrl;
  round_t      r;
  norm_t       n;
  logic        sign, eff_sub;
  flags_t      flags;
  int checks = 0, failures = 0;

  fpadd_final dut (.ca(ca), .cb(cb), .a(a), .b(b), .ctrl(ctrl), .r(r), .n(n),
                   .sign(sign), .eff_sub(eff_sub), .result(result), .flags(flags));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp_class_t classify(input logic [31:0] v);
    fp_class_t c;
    c.exp_zero = v[30:0] < 31'h0080_0000;
    c.zero     = v[30:0] == 0;
    c.denorm   = c.exp_zero && !c.zero;
    c.inf      = v[30:0] == 31'h7F80_0000;
    c.nan      = v[30:0] > 31'h7F80_0000;
    c.snan     = c.nan && v[30:0] < 31'h7FC0_0000;
    return c;
  endfunction

  // operands, control, then datapath values (rounded exponent/fraction/
  // inexact, tiny, zero, sign of larger, effective subtraction), expected
  task automatic t(input logic [31:0] ta, input logic [31:0] tb_, input logic [4:0] tc,
                   input int rexp, input logic [22:0] rfrac, input logic rinx,
                   input logic tiny, input logic zero, input logic tsign, input logic tsub,
                   input logic [31:0] exp_r, input logic [3:0] exp_f);
    a = ta; b = tb_; ca = classify(ta); cb = classify(tb_); ctrl = ctrl_t'(tc);
    r = '{exp: EXPI_W'(rexp), frac: rfrac, inexact: rinx};
    n = '0; n.tiny = tiny; n.zero = zero;
    sign = tsign; eff_sub = tsub;
    #1;
    checks++;
    if (result !== exp_r || flags !== flags_t'(exp_f)) begin
      failures++;
      $display("FAIL case %0d: got %h/%b expected %h/%b", checks, result, flags, exp_r, exp_f);
    end
  endtask

  localparam logic [31:0] ONE = 32'h3F80_0000, INF = 32'h7F80_0000, NINF = 32'hFF80_0000;

  initial begin
    // NaN operands: quieted and passed through, A first; invalid
    t(32'h7FA0_0000, ONE, 5'b00000, 0, 0, 0, 0, 1, 0, 0, 32'h7FE0_0000, 4'b1000);
    t(ONE, 32'hFFC0_0123, 5'b00000, 0, 0, 0, 0, 0, 0, 0, 32'hFFC0_0123, 4'b1000);
    t(32'h7FC0_0001, 32'h7F80_0005, 5'b00000, 0, 0, 0, 0, 0, 0, 0, 32'h7FC0_0001, 4'b1000);
    // infinities
    t(INF, INF, 5'b10000, 0, 0, 0, 0, 0, 0, 1, 32'h7FC0_0000, 4'b1000);
    t(INF, NINF, 5'b00000, 0, 0, 0, 0, 0, 0, 1, 32'h7FC0_0000, 4'b1000);
    t(INF, INF, 5'b00000, 0, 0, 0, 0, 0, 0, 0, INF, 4'b1000);
    t(NINF, ONE, 5'b00000, 0, 0, 0, 0, 0, 1, 1, NINF, 4'b1000);
    t(ONE, INF, 5'b10000, 0, 0, 0, 0, 0, 1, 1, NINF, 4'b1000);
    t(32'h0000_0000, INF, 5'b00000, 0, 0, 0, 0, 0, 0, 0, INF, 4'b1000);
    // exact zero results
    t(ONE, ONE, 5'b10000, 0, 0, 0, 0, 1, 0, 1, 32'h0000_0000, 4'b0000);
    t(ONE, ONE, 5'b10011, 0, 0, 0, 0, 1, 0, 1, 32'h8000_0000, 4'b0000);
    t(32'h8000_0000, 32'h8000_0000, 5'b00010, 0, 0, 0, 0, 1, 1, 0, 32'h8000_0000, 4'b0000);
    // untrapped overflow, each rounding mode and sign
    t(ONE, ONE, 5'b00000, 255, 23'h123, 1, 0, 0, 0, 0, 32'h7F80_0000, 4'b0101);
    t(ONE, ONE, 5'b00001, 255, 23'h123, 1, 0, 0, 0, 0, 32'h7F7F_FFFF, 4'b0101);
    t(ONE, ONE, 5'b00010, 255, 23'h123, 1, 0, 0, 0, 0, 32'h7F80_0000, 4'b0101);
    t(ONE, ONE, 5'b00011, 255, 23'h123, 1, 0, 0, 0, 0, 32'h7F7F_FFFF, 4'b0101);
    t(ONE, ONE, 5'b00000, 255, 23'h0,   0, 0, 0, 1, 0, 32'hFF80_0000, 4'b0101);
    t(ONE, ONE, 5'b00001, 255, 23'h0,   0, 0, 0, 1, 0, 32'hFF7F_FFFF, 4'b0101);
    t(ONE, ONE, 5'b00010, 255, 23'h0,   0, 0, 0, 1, 0, 32'hFF7F_FFFF, 4'b0101);
    t(ONE, ONE, 5'b00011, 255, 23'h0,   0, 0, 0, 1, 0, 32'hFF80_0000, 4'b0101);
    // trapped overflow: exponent 256 - 192 = 64
    t(ONE, ONE, 5'b00100, 256, 23'h123, 1, 0, 0, 0, 0, 32'h2000_0123, 4'b0101);
    t(ONE, ONE, 5'b00100, 255, 23'h123, 0, 0, 0, 1, 0, 32'h9F80_0123, 4'b0100);
    // trapped underflow: exponent -5 + 192 = 187
    t(ONE, ONE, 5'b01000, -5, 23'h55, 0, 1, 0, 1, 1, 32'hDD80_0055, 4'b0010);
    // tiny without trap: underflow only when inexact
    t(ONE, ONE, 5'b00000, 0, 23'h1234, 1, 1, 0, 0, 1, 32'h0000_1234, 4'b0011);
    t(ONE, ONE, 5'b00000, 0, 23'h1234, 0, 1, 0, 0, 1, 32'h0000_1234, 4'b0000);
    // overflow trap enabled but no overflow
    t(ONE, ONE, 5'b01100, 127, 23'h40_0000, 1, 0, 0, 1, 0, 32'hBFC0_0000, 4'b0001);
    t(ONE, ONE, 5'b00000, 254, 23'h7F_FFFF, 0, 0, 0, 0, 0, 32'h7F7F_FFFF, 4'b0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
