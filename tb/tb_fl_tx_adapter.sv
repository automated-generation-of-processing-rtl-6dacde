// Testbench of fl_tx_adapter: frames of 1..6 words, half of them without a
// start flag, random source gaps and random dst_rdy back-pressure. Every word
// must come out once, in order, held while not accepted, with sof on the
// first and eof on the last word of each frame.
module tb_fl_tx_adapter;
  import fpu_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_start = 0, in_last = 0, in_ready, src_rdy, dst_rdy = 0;
  logic [31:0] in_data = 0; fl_t fl;
  int n_stall = 0;

  fl_tx_adapter dut (.clk, .rst, .in_valid, .in_data, .in_start, .in_last, .in_ready,
                     .fl_o(fl), .src_rdy_o(src_rdy), .dst_rdy_i(dst_rdy));

  logic [33:0] exp_q[$];   // {sof, eof, data}

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) dst_rdy <= ($urandom % 3 != 0);

  logic [33:0] held; logic was_stalled = 0;
  always @(posedge clk) if (!rst) begin
    if (was_stalled) `CHECK({fl.sof, fl.eof, fl.data} == held && src_rdy, "held while stalled")
    was_stalled = src_rdy && !dst_rdy;
    if (was_stalled) n_stall++;
    held = {fl.sof, fl.eof, fl.data};
    if (src_rdy && dst_rdy) begin
      `CHECK(exp_q.size() > 0, "word expected")
      if (exp_q.size() > 0) `CHECK({fl.sof, fl.eof, fl.data} == exp_q.pop_front(), "word, sof, eof")
    end
  end

  initial begin
    int len; logic mark;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 300; f++) begin
      len = 1 + $urandom % 6; mark = $urandom % 2;
      for (int k = 0; k < len; k++) begin
        while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = $urandom; in_start = mark && (k == 0); in_last = (k == len - 1);
        exp_q.push_back({k == 0, in_last, in_data});
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      in_valid = 0;
    end
    repeat (100) @(negedge clk);
    `CHECK(exp_q.size() == 0, "all words delivered")
    `CHECK(n_stall > 0, "back-pressure seen")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
