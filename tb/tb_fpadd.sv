// tb_fpadd: end-to-end self-checking testbench of the binary32 adder.
//
// Runs the adder at its only configuration (no parameters) through
//  * the documented example cases: two normals, two zeros, zero plus
//    infinity, zero plus a denormal, zero plus a NaN, with hand-worked
//    expected values;
//  * a set of hand-worked corner cases (rounding ties, overflow with and
//    without trap, trapped underflow, inf - inf, exact cancellation);
//  * N_RANDOM random vectors over all 32 control-field values, with
//    operands drawn to hit near and far exponents, denormals, large
//    exponents and special values, checked against the exact-integer
//    golden model in fpadd_ref_pkg.
// It counts how often each datapath situation occurred and counts a
// failure for any that never did. The adder is combinational; each vector
// is applied and sampled one time unit later.
module tb_fpadd;
  import fpadd_ref_pkg::*;

  localparam int N_RANDOM = 400000;

  logic [31:0] a, b, result;
  logic [4:0]  ctrl;
  logic [3:0]  flags;
  int checks = 0, failures = 0;

  fpadd dut (.a(a), .b(b), .ctrl(ctrl), .result(result), .flags(flags));

  // coverage counters
  int n_carry, n_cancel, n_far, n_dn_in, n_dn_out, n_rcarry, n_ovf, n_ovf_trap,
      n_uf_trap, n_nan, n_inf, n_infinf, n_zero, n_sub;
  int n_inexact_rm [4];

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb_, input logic [4:0] tc,
                       input logic [31:0] exp_r, input logic [3:0] exp_f);
    a = ta; b = tb_; ctrl = tc;
    #1;
    checks++;
    if (result !== exp_r || flags !== exp_f) begin
      failures++;
      if (failures <= 20)
        $display("FAIL a=%h b=%h ctrl=%b : got %h/%b expected %h/%b",
                 ta, tb_, tc, result, flags, exp_r, exp_f);
    end
  endtask

  task automatic check_ref(input logic [31:0] ta, input logic [31:0] tb_, input logic [4:0] tc);
    ref_t r;
    r = ref_add(ta, tb_, tc);
    n_carry   += int'(r.carry);
    n_cancel  += int'(r.cancel);
    n_far     += int'(r.far);
    n_dn_in   += int'(r.denorm_in);
    n_dn_out  += int'(r.denorm_out);
    n_rcarry  += int'(r.round_carry);
    n_ovf     += int'(r.ovf && !r.ovf_trap);
    n_ovf_trap+= int'(r.ovf_trap);
    n_uf_trap += int'(r.uf_trap);
    n_nan     += int'(r.nan);
    n_inf     += int'(r.inf);
    n_infinf  += int'(r.inf_minus_inf);
    n_zero    += int'(r.zero_out);
    n_sub     += int'(tc[4]);
    n_inexact_rm[tc[1:0]] += int'(r.inexact);
    apply(ta, tb_, tc, r.result, r.flags);
  endtask

  function automatic logic [31:0] rand_operand(input logic [7:0] near_exp);
    logic [31:0] v;
    int kind;
    v = $urandom;
    kind = $urandom_range(0, 99);
    if (kind < 35)       v[30:23] = 8'(int'(near_exp) + $urandom_range(0, 6) - 3);   // close exponents
    else if (kind < 55)  v[30:23] = 8'(int'(near_exp) + $urandom_range(0, 60) - 30); // around the shift cap
    else if (kind < 70)  ;                                                           // anything
    else if (kind < 78)  v[30:23] = 8'd0;                                            // denormal
    else if (kind < 81)  v[30:0]  = '0;                                              // zero
    else if (kind < 89)  v[30:23] = 8'($urandom_range(248, 254));                    // large
    else if (kind < 94)  v[30:23] = 8'($urandom_range(1, 4));                        // small normal
    else if (kind < 97)  v[30:0]  = {8'hFF, 23'd0};                                  // infinity
    else                 v[30:23] = 8'hFF;                                           // NaN (or inf)
    // sometimes make the fractions nearly equal for deep cancellation
    if ($urandom_range(0, 9) == 0) v[22:8] = '1;
    return v;
  endfunction

  initial begin
    logic [31:0] ra, rb;
    logic [4:0]  rc;
    logic [7:0]  e;
    n_inexact_rm = '{default: 0};
    {n_carry, n_cancel, n_far, n_dn_in, n_dn_out, n_rcarry, n_ovf, n_ovf_trap,
     n_uf_trap, n_nan, n_inf, n_infinf, n_zero, n_sub} = '0;

    // ---- documented example cases, round to nearest even, add ----
    apply(32'h3FC0_0000, 32'h4010_0000, 5'b00000, 32'h4070_0000, 4'b0000); // 1.5 + 2.25 = 3.75
    apply(32'h0000_0000, 32'h0000_0000, 5'b00000, 32'h0000_0000, 4'b0000); // 0 + 0
    apply(32'h0000_0000, 32'h7F80_0000, 5'b00000, 32'h7F80_0000, 4'b1000); // 0 + inf
    apply(32'h0000_0000, 32'h0000_1234, 5'b00000, 32'h0000_1234, 4'b0000); // 0 + denormal
    apply(32'h0000_0000, 32'h7FC0_0001, 5'b00000, 32'h7FC0_0001, 4'b1000); // 0 + NaN
    // ---- hand-worked corner cases ----
    apply(32'h3F80_0000, 32'h3F80_0000, 5'b00000, 32'h4000_0000, 4'b0000); // 1 + 1 = 2
    apply(32'h3F80_0000, 32'h3F80_0000, 5'b10000, 32'h0000_0000, 4'b0000); // 1 - 1 = +0
    apply(32'h3F80_0000, 32'h3F80_0000, 5'b10011, 32'h8000_0000, 4'b0000); // 1 - 1 = -0 (RM)
    apply(32'h8000_0000, 32'h8000_0000, 5'b00000, 32'h8000_0000, 4'b0000); // -0 + -0 = -0
    apply(32'h3F80_0000, 32'h3380_0000, 5'b00000, 32'h3F80_0000, 4'b0001); // 1 + 2^-24: tie, stays even
    apply(32'h3F80_0001, 32'h3380_0000, 5'b00000, 32'h3F80_0002, 4'b0001); // odd LSB tie rounds up
    apply(32'h3F80_0000, 32'h3380_0000, 5'b00010, 32'h3F80_0001, 4'b0001); // toward +inf
    apply(32'h3F80_0000, 32'h3380_0000, 5'b00011, 32'h3F80_0000, 4'b0001); // toward -inf
    apply(32'h3F80_0000, 32'h3380_0000, 5'b10011, 32'h3F7F_FFFF, 4'b0000); // 1 - 2^-24 is exact
    apply(32'h3F80_0000, 32'h3380_0000, 5'b10001, 32'h3F7F_FFFF, 4'b0000); // 1 - 2^-24, RZ
    apply(32'h3F80_0000, 32'h3380_0000, 5'b10000, 32'h3F7F_FFFF, 4'b0000); // 1 - 2^-24, RNE
    apply(32'h3F80_0000, 32'h0000_0001, 5'b10001, 32'h3F7F_FFFF, 4'b0001); // far shift keeps sticky
    apply(32'h3F80_0000, 32'h3300_0001, 5'b10000, 32'h3F7F_FFFF, 4'b0001); // 1 - (2^-25 + e): rounds down
    apply(32'h3F80_0000, 32'h3300_0000, 5'b10000, 32'h3F80_0000, 4'b0001); // 1 - 2^-25: tie, to even
    apply(32'h4B7F_FFFF, 32'h3F00_0000, 5'b00000, 32'h4B80_0000, 4'b0001); // round carry: 16777215.5
    apply(32'h7F7F_FFFF, 32'h7F7F_FFFF, 5'b00000, 32'h7F80_0000, 4'b0101); // overflow -> inf
    apply(32'h7F7F_FFFF, 32'h7F7F_FFFF, 5'b00001, 32'h7F7F_FFFF, 4'b0101); // overflow RZ -> max
    apply(32'hFF7F_FFFF, 32'hFF7F_FFFF, 5'b00010, 32'hFF7F_FFFF, 4'b0101); // -overflow RP -> -max
    apply(32'h7F7F_FFFF, 32'h7F7F_FFFF, 5'b00100, 32'h1FFF_FFFF, 4'b0100); // trapped: exponent 255 - 192 = 63
    apply(32'h0080_0000, 32'h0000_0001, 5'b10000, 32'h007F_FFFF, 4'b0000); // normal - denormal = denormal
    apply(32'h0080_0000, 32'h0000_0001, 5'b11000, 32'h607F_FFFE, 4'b0010); // trapped: exponent 0 + 192
    apply(32'h007F_FFFF, 32'h0000_0001, 5'b00000, 32'h0080_0000, 4'b0000); // denormals sum to normal
    apply(32'h7F80_0000, 32'h7F80_0000, 5'b10000, 32'h7FC0_0000, 4'b1000); // inf - inf
    apply(32'h7F80_0000, 32'hFF80_0000, 5'b10000, 32'h7F80_0000, 4'b1000); // inf - (-inf)
    apply(32'h3F80_0000, 32'h7F80_0000, 5'b10000, 32'hFF80_0000, 4'b1000); // 1 - inf
    apply(32'h7F80_0001, 32'h3F80_0000, 5'b00000, 32'h7FC0_0001, 4'b1000); // sNaN quieted

    // ---- random vectors against the golden model ----
    for (int i = 0; i < N_RANDOM; i++) begin
      e  = 8'($urandom_range(0, 255));
      ra = rand_operand(e);
      rb = rand_operand(ra[30:23]);
      rc = 5'($urandom);
      if ($urandom_range(0, 1) == 0) check_ref(ra, rb, rc);
      else                           check_ref(rb, ra, rc);
    end

    $display("coverage: carry=%0d cancel=%0d far=%0d denorm_in=%0d denorm_out=%0d round_carry=%0d",
             n_carry, n_cancel, n_far, n_dn_in, n_dn_out, n_rcarry);
    $display("coverage: overflow=%0d overflow_trap=%0d underflow_trap=%0d nan=%0d inf=%0d inf-inf=%0d zero=%0d sub=%0d",
             n_ovf, n_ovf_trap, n_uf_trap, n_nan, n_inf, n_infinf, n_zero, n_sub);
    $display("coverage: inexact per rounding mode RNE=%0d RZ=%0d RP=%0d RM=%0d",
             n_inexact_rm[0], n_inexact_rm[1], n_inexact_rm[2], n_inexact_rm[3]);
    foreach (n_inexact_rm[k]) if (n_inexact_rm[k] == 0) failures++;
    if (n_carry == 0 || n_cancel == 0 || n_far == 0 || n_dn_in == 0 || n_dn_out == 0 ||
        n_rcarry == 0 || n_ovf == 0 || n_ovf_trap == 0 || n_uf_trap == 0 || n_nan == 0 ||
        n_inf == 0 || n_infinf == 0 || n_zero == 0 || n_sub == 0) begin
      failures++;
      $display("a datapath situation was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
