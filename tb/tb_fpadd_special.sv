// tb_fpadd_special: self-checking testbench of the operand classifier.
//
// Expected classes come from comparing the magnitude bits of the operand
// (a[30:0]) with the boundary encodings of binary32: below 0x0080_0000 the
// exponent is zero, 0x7F80_0000 is infinity, anything above it a NaN.
// Directed boundary values are followed by random ones.
module tb_fpadd_special;
  import fpadd_pkg::*;

  logic [31:0] x;
  fp_class_t   cls;
  int checks = 0, failures = 0;

  fpadd_special dut (.x(x), .cls(cls));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] v);
    logic [30:0] mag;
    fp_class_t   e;
    x = v;
    #1;
    mag = v[30:0];
    e.exp_zero = mag < 31'h0080_0000;
    e.zero     = mag == 0;
    e.denorm   = mag != 0 && mag < 31'h0080_0000;
    e.inf      = mag == 31'h7F80_0000;
    e.nan      = mag > 31'h7F80_0000;
    e.snan     = mag > 31'h7F80_0000 && mag < 31'h7FC0_0000;
    checks++;
    if (cls !== e) begin
      failures++;
      $display("FAIL x=%h got %b expected %b", v, cls, e);
    end
  endtask

  initial begin
    logic [31:0] v;
    check(32'h0000_0000); check(32'h8000_0000); check(32'h0000_0001); check(32'h807F_FFFF);
    check(32'h0080_0000); check(32'h3F80_0000); check(32'h7F7F_FFFF); check(32'h7F80_0000);
    check(32'hFF80_0000); check(32'h7F80_0001); check(32'h7FBF_FFFF); check(32'h7FC0_0000);
    check(32'hFFFF_FFFF);
    for (int i = 0; i < 20000; i++) begin
      v = $urandom;
      case (i % 4)
        0: v[30:23] = 8'h00;
        1: v[30:23] = 8'hFF;
        2: if (i % 8 == 2) v[22:0] = '0;
        default: ;
      endcase
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
