// Testbench of masking_unit with two control operations valid at words 1 and
// 3: a result raised at any other word must be ignored, a result at its own
// word must clear Reg Valid for the rest of the frame, and export must be
// signalled on the last word exactly for frames that violated.
module tb_masking_unit;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce = 0; logic [2:0] addr = 0; logic [1:0] ctrl = 0;
  logic valid_o, last_o, export_o;
  int n_exp = 0;
  always #5 clk = ~clk;

  masking_unit #(.WORDS(5), .NC(2), .CTRL_WORD({3'd3, 3'd1})) dut (
    .clk, .rst, .ce_i(ce), .addr_i(addr), .ctrl_i(ctrl), .valid_o, .last_o, .export_o);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 300; f++) begin
      ok = 1;
      for (int k = 0; k < 5; k++) begin
        ce = 1; addr = 3'(k); ctrl = 2'($urandom);
        if ($urandom % 2) ctrl = 0;
        if ((k == 1 && ctrl[0]) || (k == 3 && ctrl[1])) ok = 0;
        #1;
        `CHECK(valid_o == ok, "valid so far")
        `CHECK(last_o == (k == 4), "last word")
        `CHECK(export_o == (k == 4 && !ok), "export decision")
        if (export_o) n_exp++;
        @(negedge clk);
        if ($urandom % 4 == 0) begin ce = 0; ctrl = '1; @(negedge clk); end
      end
    end
    `CHECK(n_exp > 10 && n_exp < 290, "both outcomes seen")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
