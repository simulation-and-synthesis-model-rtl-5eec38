// tb_fpadd_rounder: self-checking testbench of the rounding step.
//
// The discarded part is read as a quarter-step fraction q = {rnd, stk}:
// 0 exact, 1 below half, 2 exactly half, 3 above half. The expected
// rounded significand is chosen from that per rounding mode, and the
// carry cases are worked out explicitly: an all-ones significand becomes
// 1.0 with the exponent one higher, and a denormal reaching 2^23 becomes
// the smallest normal (exponent 1).
module tb_fpadd_rounder;
  import fpadd_pkg::*;

  norm_t  n;
  logic   sign;
  rmode_e rm;
  round_t r;
  int checks = 0, failures = 0;
  int n_up [4];
  int n_wrap = 0, n_dn2n = 0;

  fpadd_rounder dut (.n(n), .sign(sign), .rm(rm), .r(r));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    round_t     e;
    logic [1:0] q;
    logic       up;
    logic [24:0] s;
    n_up = '{default: 0};
    for (int i = 0; i < 40000; i++) begin
      n = '0;
      n.sig = {1'b1, 23'($urandom)};
      n.exp = EXPI_W'($urandom_range(1, 254));
      case (i % 6)
        0: n.sig[22:0] = '1;                                // all ones
        1: begin n.sig[23] = 1'b0; n.exp = '0; end          // denormal
        2: begin n.sig = {1'b0, 23'h7FFFFF}; n.exp = '0; end
        3: n.exp = EXPI_W'(-$urandom_range(0, 22));         // trapped tiny
        default: ;
      endcase
      n.rnd = 1'($urandom);
      n.stk = 1'($urandom);
      sign  = 1'($urandom);
      rm    = rmode_e'($urandom_range(0, 3));
      #1;
      q = {n.rnd, n.stk};
      unique case (rm)
        RM_NEAREST_EVEN: up = (q == 2'd3) || (q == 2'd2 && n.sig[0]);
        RM_TO_ZERO:      up = 1'b0;
        RM_TO_POS_INF:   up = (q != 0) && !sign;
        default:         up = (q != 0) && sign;
      endcase
      s = {1'b0, n.sig} + 25'(up);
      e.inexact = (q != 0);
      e.exp     = n.exp;
      e.frac    = s[22:0];
      if (s[24]) begin
        e.exp = n.exp + 1;
        e.frac = '0;
        n_wrap++;
      end else if (!n.sig[23] && s[23]) begin
        e.exp = 1;
        n_dn2n++;
      end
      if (up) n_up[rm]++;
      checks++;
      if (r !== e) begin
        failures++;
        if (failures < 10) $display("FAIL n=%h sign=%b rm=%0d got %h expected %h", n, sign, rm, r, e);
      end
    end
    if (n_wrap == 0 || n_dn2n == 0 || n_up[0] == 0 || n_up[2] == 0 || n_up[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
