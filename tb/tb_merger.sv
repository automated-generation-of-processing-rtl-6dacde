// Testbench of merger at its default sizes: frames of N_WORDS ALU words with
// random gaps, some with en low between them. Every enabled word must appear
// one cycle later on the write-back port with its address; the word at
// CTX_APP must carry the decoder result present in that cycle instead of
// the ALU word. Cycles with en low must write nothing.
module tb_merger;
  import fpu_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  localparam int N = N_WORDS, AW = $clog2(N);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic en = 0; logic [AW-1:0] addr = 0; logic [31:0] ctx = 0, app = 0;
  logic wr; logic [AW-1:0] waddr; logic [31:0] wdata;

  merger dut (.clk, .rst, .en_i(en), .addr_i(addr), .ctx_i(ctx), .app_i(app),
              .upd_con_wr_o(wr), .upd_addr_o(waddr), .upd_context_o(wdata));

  logic [AW+31:0] exp_q[$];
  int n_frames = 0, n_app = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && wr) begin
    `CHECK(exp_q.size() > 0, "write expected")
    if (exp_q.size() > 0) `CHECK({waddr, wdata} == exp_q.pop_front(), "write address and data")
  end

  initial begin
    logic on;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 300; f++) begin
      on = ($urandom % 4 != 0);
      for (int k = 0; k < N; k++) begin
        en = on; addr = AW'(k); ctx = $urandom; app = $urandom;
        if (on) begin
          exp_q.push_back({AW'(k), (k == CTX_APP) ? app : ctx});
          if (k == CTX_APP) n_app++;
        end
        @(negedge clk);
      end
      if (on) n_frames++;
      en = 0; app = $urandom; ctx = $urandom;
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    `CHECK(exp_q.size() == 0, "all writes seen")
    `CHECK(n_frames > 100 && n_app == n_frames, "frames merged")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
