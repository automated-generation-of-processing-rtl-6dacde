// Testbench of pu_mul: 64 x 64 signed products (random, squares, negative
// and extreme operands) against a product of sign-extended 128-bit values.
module tb_pu_mul;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic [63:0] a, b; logic [127:0] p, r;

  pu_mul #(.IN_W(64)) dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (i % 3 == 1) b = a;
      if (i == 0) begin a = 64'h8000_0000_0000_0000; b = a; end
      if (i == 2) begin a = '1; b = 64'd5; end
      #1;
      r = {{64{a[63]}}, a} * {{64{b[63]}}, b};
      `CHECK(p == r, "signed product")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
