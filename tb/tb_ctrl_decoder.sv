// Testbench of ctrl_decoder: every command code at word 0, random garbage on
// CTRL during words 1..4; the decoded lines must follow the command table
// and hold for the whole frame.
module tb_ctrl_decoder;
  import fpu_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce = 0; logic [2:0] addr = 0, ctrl = 0; dec_t dec;
  always #5 clk = ~clk;

  ctrl_decoder dut (.clk, .rst, .ce_i(ce), .addr_i(addr), .ctrl_i(ctrl), .dec_o(dec));

  function automatic dec_t expect_dec(logic [2:0] c);
    // {use_current, first, release, void}
    case (c)
      3'd0: return 4'b0001;
      3'd1: return 4'b0000;
      3'd2: return 4'b1000;
      3'd3: return 4'b0100;
      3'd4: return 4'b0011;
      3'd5: return 4'b0110;
      default: return 4'b0001;
    endcase
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] c;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 64; f++) begin
      c = 3'(f % 8);
      for (int k = 0; k < 5; k++) begin
        ce = 1; addr = 3'(k); ctrl = (k == 0) ? c : 3'($urandom);
        #1;
        `CHECK(dec == expect_dec(c), "decoded command")
        @(negedge clk);
      end
      ce = 0; ctrl = 3'($urandom);
      #1;
      `CHECK(dec == expect_dec(c), "held after frame")
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
