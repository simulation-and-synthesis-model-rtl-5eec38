// tb_fpadd_normalize: self-checking testbench of the normalizer.
//
// For a random adder output with a chosen number of leading zeros, a
// random larger exponent and a random underflow-trap setting, the
// expected result is derived from the position p of the sum's top set
// bit: the true exponent is exp_l + p - 28. If it is at least 1, or the
// trap is on, the significand is the 24 bits from p down; otherwise the
// sum is aligned to exponent 1 and the result is denormal. Round bit and
// sticky bit are the next bit and the OR of all the rest.
module tb_fpadd_normalize;
  import fpadd_pkg::*;

  logic [SUM_W-1:0] sum;
  logic [EXP_W-1:0] exp_l;
  logic             uf_trap;
  norm_t            n;
  int checks = 0, failures = 0;
  int n_carry = 0, n_denorm = 0, n_trap_tiny = 0, n_zero = 0, n_deep = 0;

  fpadd_normalize dut (.sum(sum), .exp_l(exp_l), .uf_trap(uf_trap), .n(n));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] t;
    norm_t        e;
    int           p, etrue, top;
    for (int i = 0; i < 60000; i++) begin
      sum     = {$urandom, $urandom};
      sum     = sum >> $urandom_range(0, SUM_W);
      exp_l   = 8'($urandom_range(1, 254));
      if (i % 3 == 0) exp_l = 8'($urandom_range(1, 30));
      uf_trap = 1'($urandom);
      #1;
      e = '0;
      p = -1;
      for (int k = 0; k < SUM_W; k++) if (sum[k]) p = k;
      if (p < 0) begin
        e.zero = 1;
        n_zero++;
      end else begin
        etrue  = int'(exp_l) + p - 28;
        e.tiny = (etrue < 1);
        // position in t of the significand MSB is 'top'
        t = 128'(sum) << 64;
        if (etrue >= 1 || uf_trap) begin
          top   = p + 64;
          e.exp = EXPI_W'(etrue);
          if (p == 29) n_carry++;
          if (p < 26) n_deep++;
          if (etrue < 1) n_trap_tiny++;
        end else begin
          top   = 28 + 64 - (int'(exp_l) - 1);
          e.exp = '0;
          n_denorm++;
        end
        e.sig = t[top -: 24];
        e.rnd = t[top - 24];
        e.stk = (t & ((128'(1) << (top - 24)) - 1)) != 0;
        if (!e.sig[23]) e.exp = '0;
      end
      checks++;
      if (n !== e) begin
        failures++;
        if (failures < 10) $display("FAIL sum=%h exp_l=%0d trap=%b got %h expected %h",
                                    sum, exp_l, uf_trap, n, e);
      end
    end
    if (n_carry == 0 || n_denorm == 0 || n_trap_tiny == 0 || n_zero == 0 || n_deep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
