// Testbench of ctrl_encoder: random end-of-frame events of the three kinds;
// each must give one COMMIT pulse a cycle later with the matching
// UPDATED_CONTROL code, and no event no pulse.
module tb_ctrl_encoder;
  import fpu_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic alu_done = 0, alu_export = 0, rel_done = 0, commit; logic [2:0] uc;

  ctrl_encoder dut (.clk, .rst, .alu_done_i(alu_done), .alu_export_i(alu_export),
                    .rel_done_i(rel_done), .commit_o(commit), .updated_control_o(uc));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kind; logic [2:0] e;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      kind = $urandom % 4;
      alu_done = (kind == 1 || kind == 2); alu_export = (kind == 2) || (kind == 0 && $urandom % 2);
      rel_done = (kind == 3);
      case (kind)
        1: e = {1'b0, CST_VALID};
        2: e = {1'b1, CST_EMPTY};
        3: e = {1'b1, CST_EMPTY};
        default: e = 'x;
      endcase
      @(negedge clk);
      `CHECK(commit == (kind != 0), "commit pulse")
      if (kind != 0) `CHECK(uc == e, "UPDATED_CONTROL code")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
