// tb_gf_mult: exhaustive check of the combinational GF(2^8) multiplier.
//
// All 65,536 operand pairs are applied and each product is compared with a
// carry-less multiply and long-division reduction by x^8+x^4+x^3+x^2+1. A few
// products worked out by hand are checked as well.
module tb_gf_mult;
  import gf_ref_pkg::*;

  logic [7:0] a, b, p;
  int checks = 0, failures = 0;

  gf_mult #(.Q(8), .POLY(9'h11D)) dut (.a, .b, .p);

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %02h * %02h = %02h, expected %02h", what, a, b, p, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked products
    a = 8'h80; b = 8'h02; #1; check(8'h1D, "x^7*x");
    a = 8'h01; b = 8'hA7; #1; check(8'hA7, "identity");
    a = 8'h00; b = 8'hFF; #1; check(8'h00, "zero");
    a = 8'h03; b = 8'h03; #1; check(8'h05, "(x+1)^2");
    a = 8'hC0; b = 8'h04; #1; check(8'h27, "x^7+x^6 times x^2");
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        check(8'(gf_mul_ref(i, j, 'h11D, 8)), "exhaustive");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
