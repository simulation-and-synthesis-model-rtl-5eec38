// tb_fpadd_align: self-checking testbench of the alignment step.
//
// For random operand pairs (close and distant exponents, denormals,
// zeros, equal magnitudes) it checks, using exact integer values in units
// of 2^-149:
//  * the selected larger operand is not smaller in magnitude than the
//    other and keeps its own sign; the other carries the effective sign;
//  * eff_sub is set exactly when the effective signs differ;
//  * the aligned smaller significand, weighted by the larger exponent,
//    equals the smaller operand's exact value when the exponent difference
//    is at most 27, and is the bare significand when it is larger.
module tb_fpadd_align;
  import fpadd_pkg::*;

  logic [31:0] a, b;
  logic        sub;
  align_t      o;
  int checks = 0, failures = 0;
  int n_far = 0, n_swap = 0;

  fpadd_align dut (.a(a), .b(b), .sub(sub), .o(o));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [399:0] exact(input logic [31:0] v);
    logic [399:0] m;
    m = 400'({v[30:23] != 0, v[22:0]});
    return (v[30:23] == 0) ? m : m << (v[30:23] - 1);
  endfunction

  function automatic int eexp(input logic [31:0] v);
    return (v[30:23] == 0) ? 1 : int'(v[30:23]);
  endfunction

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic ts);
    logic [31:0]  maj, mnr;
    logic         sb;
    logic [399:0] lhs, rhs;
    int           d;
    bit           ok;
    a = ta; b = tb_; sub = ts;
    #1;
    sb  = tb_[31] ^ ts;
    if (exact(ta) >= exact(tb_)) begin maj = ta; mnr = {sb, tb_[30:0]}; end
    else begin maj = {sb, tb_[30:0]}; mnr = ta; n_swap++; end
    // equal magnitudes: either order is fine, the RTL keeps a first
    d  = eexp(maj) - eexp(mnr);
    ok = (o.sign_l == maj[31]) && (o.sign_s == mnr[31]) && (o.eff_sub == (ta[31] != sb)) &&
         (int'(o.exp_l) == eexp(maj)) && (o.sig_l == {maj[30:23] != 0, maj[22:0]});
    if (d <= 27) begin
      lhs = 400'(o.sig_s) << (eexp(maj) - 1);
      rhs = exact(mnr) << 27;
    end else begin
      n_far++;
      lhs = 400'(o.sig_s);
      rhs = 400'({mnr[30:23] != 0, mnr[22:0]});
    end
    ok &= (lhs == rhs);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h sub=%b o=%h", ta, tb_, ts, o);
    end
  endtask

  initial begin
    logic [31:0] ra, rb;
    check(32'h3F80_0000, 32'h3F80_0000, 1'b1);
    check(32'h3F80_0000, 32'h4000_0000, 1'b0);
    check(32'h0000_0001, 32'h7F7F_FFFF, 1'b0);
    check(32'h0000_0000, 32'h0000_0000, 1'b1);
    for (int i = 0; i < 50000; i++) begin
      ra = $urandom; rb = $urandom;
      ra[30:23] = 8'($urandom_range(0, 254));
      case (i % 5)
        0: rb[30:23] = ra[30:23];
        1: rb[30:23] = 8'(int'(ra[30:23]) + $urandom_range(0, 60) - 30);
        2: rb[30:23] = 8'h00;
        3: rb[30:0]  = ra[30:0];
        default: ;
      endcase
      if (rb[30:23] == 8'hFF) rb[30:23] = 8'hFE;
      check(ra, rb, 1'($urandom));
    end
    if (n_far == 0 || n_swap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
