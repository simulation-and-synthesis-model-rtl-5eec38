// fpadd_ref_pkg: golden model of binary32 addition for the testbenches.
//
// Works differently from the RTL: both operands are turned into exact
// integers in units of 2^-149 (the smallest denormal), added exactly in a
// wide integer, and the exact sum is then rounded once to binary32 by
// comparing the discarded part with one half ULP. Special operands,
// exception flags and trap results follow the adder's specification:
// invalid for any NaN or infinity operand, overflow flag on every
// overflow, trap bias 192. Besides the expected result and flags it
// reports which datapath situations the vector exercises so that
// testbenches can check their coverage.
package fpadd_ref_pkg;

  typedef struct packed {
    logic [31:0] result;
    logic [3:0]  flags;    // invalid, overflow, underflow, inexact
    // situations exercised
    logic carry;           // magnitude sum carried into a new binade
    logic cancel;          // subtraction lost two or more leading bits
    logic far;             // exponent difference above 27
    logic denorm_in;
    logic denorm_out;
    logic round_carry;     // rounding up overflowed the significand
    logic ovf;
    logic ovf_trap;
    logic uf_trap;
    logic nan;
    logic inf;
    logic inf_minus_inf;
    logic zero_out;
    logic inexact;
  } ref_t;

  localparam int W = 300;

  function automatic int msb(logic [W-1:0] v);
    int p = -1;
    for (int i = 0; i < W; i++) if (v[i]) p = i;
    return p;
  endfunction

  function automatic ref_t ref_add(logic [31:0] a, logic [31:0] b, logic [4:0] ctrl);
    ref_t r;
    logic        sa, sb, s;
    logic [1:0]  rm;
    logic [W-1:0] ia, ib, m, rem, half, keep;
    int          pa, pb, p, e, ediff;
    logic        ina, inb, inf_a, inf_b, inexact, inc;
    r  = '0;
    rm = ctrl[1:0];
    sa = a[31];
    sb = b[31] ^ ctrl[4];
    ina   = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    inb   = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    inf_a = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    inf_b = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    r.denorm_in = (a[30:23] == 0 && a[22:0] != 0) || (b[30:23] == 0 && b[22:0] != 0);
    if (ina || inb) begin
      r.nan = 1;
      r.result = ina ? {a[31:23], 1'b1, a[21:0]} : {b[31:23], 1'b1, b[21:0]};
      r.flags = 4'b1000;
      return r;
    end
    if (inf_a || inf_b) begin
      r.inf = 1;
      r.flags = 4'b1000;
      if (inf_a && inf_b && sa != sb) begin
        r.inf_minus_inf = 1;
        r.result = 32'h7FC0_0000;
      end else
        r.result = inf_a ? {sa, 8'hFF, 23'd0} : {sb, 8'hFF, 23'd0};
      return r;
    end
    // exact integers in units of 2^-149
    ia = W'(a[30:23] == 0 ? {1'b0, a[22:0]} : {1'b1, a[22:0]}) << (a[30:23] == 0 ? 0 : a[30:23] - 1);
    ib = W'(b[30:23] == 0 ? {1'b0, b[22:0]} : {1'b1, b[22:0]}) << (b[30:23] == 0 ? 0 : b[30:23] - 1);
    pa = msb(ia);
    pb = msb(ib);
    ediff = (a[30:23] == 0 ? 1 : int'(a[30:23])) - (b[30:23] == 0 ? 1 : int'(b[30:23]));
    r.far = (ediff > 27) || (ediff < -27);
    if (sa == sb) begin m = ia + ib; s = sa; end
    else if (ia >= ib) begin m = ia - ib; s = sa; end
    else begin m = ib - ia; s = sb; end
    p = msb(m);
    r.carry  = (sa == sb) && (p > ((pa > pb) ? pa : pb)) && p >= 23;
    r.cancel = (sa != sb) && (p >= 0) && (p < ((pa > pb) ? pa : pb) - 1);
    if (m == 0) begin
      r.zero_out = 1;
      r.result = {(sa == sb) ? sa : (rm == 2'b11), 31'd0};
      return r;
    end
    if (p < 23) begin
      // below the smallest normal: exact, since both operands are
      // multiples of 2^-149
      if (ctrl[3]) begin
        r.uf_trap = 1;
        keep = m << (23 - p);
        e = p - 22 + 192;
        r.result = {s, 8'(e), keep[22:0]};
        r.flags = 4'b0010;
      end else begin
        r.denorm_out = 1;
        r.result = {s, 8'd0, m[22:0]};
      end
      return r;
    end
    e    = p - 22;
    keep = m >> (p - 23);
    rem  = m & ((W'(1) << (p - 23)) - 1);
    half = (p >= 24) ? (W'(1) << (p - 24)) : '0;
    inexact = (rem != 0);
    unique case (rm)
      2'b00: inc = inexact && ((rem > half) || (rem == half && keep[0]));
      2'b01: inc = 0;
      2'b10: inc = inexact && !s;
      default: inc = inexact && s;
    endcase
    keep = keep + W'(inc);
    if (keep[24]) begin
      r.round_carry = 1;
      keep = keep >> 1;
      e = e + 1;
    end
    r.inexact = inexact;
    if (e >= 255) begin
      r.ovf = 1;
      if (ctrl[2]) begin
        r.ovf_trap = 1;
        r.result = {s, 8'(e - 192), keep[22:0]};
        r.flags = {3'b010, inexact};
      end else begin
        if (rm == 2'b00 || (rm == 2'b10 && !s) || (rm == 2'b11 && s))
          r.result = {s, 8'hFF, 23'd0};
        else
          r.result = {s, 8'hFE, 23'h7FFFFF};
        r.flags = 4'b0101;
      end
      return r;
    end
    r.result = {s, 8'(e), keep[22:0]};
    r.flags  = {3'b000, inexact};
    return r;
  endfunction

endpackage
