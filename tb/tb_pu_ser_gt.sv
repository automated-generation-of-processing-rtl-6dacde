// Testbench of pu_ser_gt: word-serial comparison of operands of 1 to 4
// 16-bit words, lowest word first, with random idle cycles between words.
// Three instances are checked against whole-number comparisons:
//   signed a > b (INIT 0), unsigned a > b (INIT 0), unsigned a >= b (INIT 1).
// Equal operands and operands that differ only in the lowest word are
// forced often, so that the chained result of the lower words matters.
module tb_pu_ser_gt;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  localparam int W = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic en = 0, first = 0, msw = 0;
  logic [W-1:0] a = 0, b = 0;
  logic g_s, g_u, ge_u;

  pu_ser_gt #(.W(W), .INIT(1'b0), .SIGNED_CMP(1'b1)) u_s  (.clk, .rst, .en, .first, .msw, .a, .b, .go(g_s));
  pu_ser_gt #(.W(W), .INIT(1'b0), .SIGNED_CMP(1'b0)) u_u  (.clk, .rst, .en, .first, .msw, .a, .b, .go(g_u));
  pu_ser_gt #(.W(W), .INIT(1'b1), .SIGNED_CMP(1'b0)) u_ge (.clk, .rst, .en, .first, .msw, .a, .b, .go(ge_u));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4*W-1:0] va, vb; logic signed [4*W-1:0] sa, sb;
    int n, n_eq = 0, n_low = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      n = 1 + $urandom % 4;
      va = {$urandom, $urandom}; vb = {$urandom, $urandom};
      case (t % 5)
        0: begin vb = va; n_eq++; end
        1: begin vb = va; vb[W-1:0] = $urandom; n_low++; end
        2: begin vb = va; vb[n*W-1 -: 1] = ~va[n*W-1]; end
        default: ;
      endcase
      // sign-extend the n-word operands for the signed reference
      sa = $signed(va << ((4 - n) * W)) >>> ((4 - n) * W);
      sb = $signed(vb << ((4 - n) * W)) >>> ((4 - n) * W);
      va = va & ((64'd1 << (n * W)) - 1); if (n == 4) va = sa;
      vb = vb & ((64'd1 << (n * W)) - 1); if (n == 4) vb = sb;
      for (int k = 0; k < n; k++) begin
        en = 1; first = (k == 0); msw = (k == n - 1);
        a = va[k*W +: W]; b = vb[k*W +: W];
        #1;
        if (k == n - 1) begin
          `CHECK(g_s == (sa > sb), "signed greater")
          `CHECK(g_u == (va > vb), "unsigned greater")
          `CHECK(ge_u == (va >= vb), "unsigned greater or equal")
        end
        @(negedge clk);
        en = 0; first = $urandom; msw = $urandom; a = $urandom; b = $urandom;
        repeat ($urandom % 3) @(negedge clk);
      end
    end
    `CHECK(n_eq > 0 && n_low > 0, "equal and low-word cases")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
