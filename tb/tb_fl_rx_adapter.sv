// Testbench of fl_rx_adapter: FrameLink frames of 1..4 words with random
// gaps; after each eof the result must be the frame's first word, with a
// one-cycle result_valid pulse, and it must hold between frames.
module tb_fl_rx_adapter;
  import fpu_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  fl_t fl = '0; logic src_rdy = 0, dst_rdy; logic [31:0] result; logic rvalid;

  fl_rx_adapter dut (.clk, .rst, .fl_i(fl), .src_rdy_i(src_rdy), .dst_rdy_o(dst_rdy),
                     .result_o(result), .result_valid_o(rvalid));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len; logic [31:0] first, prev = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 300; f++) begin
      len = 1 + $urandom % 4;
      for (int k = 0; k < len; k++) begin
        src_rdy = 1; fl.data = $urandom; fl.sof = (k == 0); fl.eof = (k == len - 1);
        if (k == 0) first = fl.data;
        `CHECK(dst_rdy, "always ready")
        @(negedge clk);
        `CHECK(rvalid == (k == len - 1), "result_valid only after eof")
        `CHECK(result == ((k == len - 1) ? first : prev), "result value")
        if ($urandom % 3 == 0) begin
          src_rdy = 0; fl = '1; @(negedge clk);
          `CHECK(!rvalid, "pulse lasts one cycle")
        end
      end
      prev = first;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
