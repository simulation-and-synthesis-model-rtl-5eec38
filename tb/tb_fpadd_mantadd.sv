// tb_fpadd_mantadd: self-checking testbench of the significand adder.
//
// The exact result X = sig_l * 2^27 +/- sig_s is formed in a wide
// integer. The adder keeps X only down to the guard position plus a
// sticky bit, so it must satisfy sum >> 1 == X >> 23 (the borrow from the
// discarded bits included) and sum[0] == (X[22:0] != 0). As the aligner
// guarantees, sig_s never exceeds sig_l * 2^27.
module tb_fpadd_mantadd;
  import fpadd_pkg::*;

  align_t           al;
  logic [SUM_W-1:0] sum;
  int checks = 0, failures = 0;
  int n_sub_sticky = 0;

  fpadd_mantadd dut (.al(al), .sum(sum));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x;
    int sh;
    for (int i = 0; i < 50000; i++) begin
      al = '0;
      al.sig_l   = {1'b1, 23'($urandom)};
      al.eff_sub = 1'($urandom);
      sh = $urandom_range(0, 27);
      al.sig_s = ALN_W'({1'b1, 23'($urandom)}) << (27 - sh);
      if (i % 7 == 0) al.sig_s[22:0] = '0;
      if (i % 11 == 0) al.sig_s = {al.sig_l, 27'd0};   // equal operands
      // the aligner always hands over the larger magnitude as sig_l
      if (al.sig_s > {al.sig_l, 27'd0}) {al.sig_l, al.sig_s} = {al.sig_s[ALN_W-1 -: SIG_W], al.sig_l, 27'd0};
      x = al.eff_sub ? ({13'd0, al.sig_l, 27'd0} - {13'd0, al.sig_s})
                     : ({13'd0, al.sig_l, 27'd0} + {13'd0, al.sig_s});
      #1;
      checks++;
      if ((64'(sum) >> 1) != (x >> 23) || sum[0] != (x[22:0] != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL sig_l=%h sig_s=%h sub=%b sum=%h x=%h",
                                    al.sig_l, al.sig_s, al.eff_sub, sum, x);
      end
      if (al.eff_sub && al.sig_s[22:0] != 0) n_sub_sticky++;
    end
    if (n_sub_sticky == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
