// Testbench of fl_fifo: random frames of 1..5 words, each either committed
// or dropped at its last word, random read back-pressure; the read side must
// deliver exactly the committed frames, in order, with their last flags, and
// free_o must track the fill level.
module tb_fl_fifo;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_last = 0, wr_commit = 0, wr_drop = 0, rd_ready = 0;
  logic [31:0] wr_data = 0, rd_data; logic rd_valid, rd_last; logic [4:0] free_o;

  fl_fifo #(.W(32), .DEPTH(16)) dut (.clk, .rst, .wr_en, .wr_data, .wr_last, .wr_commit,
    .wr_drop, .free_o, .rd_valid, .rd_data, .rd_last, .rd_ready);

  logic [32:0] exp_q[$];
  int n_drop = 0, n_commit = 0, n_read = 0, used = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) rd_ready <= ($urandom % 3 != 0);

  always @(posedge clk) if (!rst && rd_valid && rd_ready) begin
    `CHECK(exp_q.size() > 0, "read only committed data")
    if (exp_q.size() > 0) `CHECK({rd_last, rd_data} == exp_q.pop_front(), "read data")
    n_read++;
    used--;
  end

  initial begin
    logic [32:0] frame[$];
    int len; logic keep;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 400; f++) begin
      len = 1 + $urandom % 5; keep = $urandom % 2;
      while (free_o < 5'(len)) @(negedge clk);
      frame = {};
      for (int k = 0; k < len; k++) begin
        wr_en = 1; wr_data = $urandom; wr_last = (k == len - 1);
        wr_commit = keep && (k == len - 1); wr_drop = !keep && (k == len - 1);
        frame.push_back({wr_last, wr_data});
        @(negedge clk);
      end
      wr_en = 0; wr_commit = 0; wr_drop = 0;
      if (keep) begin
        foreach (frame[i]) exp_q.push_back(frame[i]);
        used += len; n_commit++;
      end else n_drop++;
      #1;
      `CHECK(int'(free_o) >= 16 - used - exp_q.size() - 5, "free count sane")
    end
    repeat (200) @(negedge clk);
    `CHECK(exp_q.size() == 0, "all committed frames read")
    `CHECK(free_o == 16, "empty at end")
    `CHECK(n_drop > 0 && n_commit > 0, "both commit and drop")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
