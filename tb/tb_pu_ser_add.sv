// Testbench of pu_ser_add: a word-serial adder (SUB=0) and subtractor (SUB=1)
// with 16-bit words add or subtract operands of 1 to 5 words, lowest word
// first, with random idle cycles (en low) between the words and between
// operands. Every sum word and the final carry are compared with the same
// operation on whole numbers.
module tb_pu_ser_add;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  localparam int W = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic en = 0, first = 0;
  logic [W-1:0] a = 0, b = 0, s_add, s_sub;
  logic co_add, co_sub;

  pu_ser_add #(.W(W), .SUB(1'b0)) u_add (.clk, .rst, .en, .first, .a, .b, .s(s_add), .co(co_add));
  pu_ser_add #(.W(W), .SUB(1'b1)) u_sub (.clk, .rst, .en, .first, .a, .b, .s(s_sub), .co(co_sub));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5*W-1:0] va, vb, vs, vd; logic [5*W:0] full;
    int n;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 1500; t++) begin
      n = 1 + $urandom % 5;
      va = {$urandom, $urandom, $urandom}; vb = {$urandom, $urandom, $urandom};
      if (t % 7 == 0) vb = va;
      if (t % 11 == 0) va = '1;
      va &= (5*W)'((81'd1 << (n * W)) - 1); vb &= (5*W)'((81'd1 << (n * W)) - 1);
      vs = va + vb; vd = va - vb;
      for (int k = 0; k < n; k++) begin
        en = 1; first = (k == 0);
        a = va[k*W +: W]; b = vb[k*W +: W];
        #1;
        `CHECK(s_add == vs[k*W +: W], "sum word")
        `CHECK(s_sub == vd[k*W +: W], "difference word")
        if (k == n - 1) begin
          full = {1'b0, va} + {1'b0, vb};
          `CHECK(co_add == full[n*W], "carry out of the top word")
          `CHECK(co_sub == (va >= vb), "no borrow out of the top word")
        end
        @(negedge clk);
        en = 0; first = $urandom; a = $urandom; b = $urandom;
        repeat ($urandom % 3) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
