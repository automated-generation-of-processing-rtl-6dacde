// Testbench of addr_counter: frames of 5 words with gaps between frames; the
// address of every stage must equal the input address delayed by that many
// cycles, and the counter must wrap after word 4.
module tb_addr_counter;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  localparam int S = 7;
  logic clk = 0, rst = 1, ce = 0;
  logic [S:0] ce_o; logic [S:0][2:0] addr_o; logic last_o;
  always #5 clk = ~clk;

  addr_counter #(.WORDS(5), .STAGES(S)) dut (.clk, .rst, .ce_i(ce), .ce_o, .addr_o, .last_o);

  logic [S:0] ce_h; logic [S:0][2:0] a_h;
  int exp_addr = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce_h = '0; a_h = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      ce = (exp_addr != 0) || ($urandom % 3 != 0);
      #1;
      `CHECK(ce_o[0] == ce, "stage 0 ce")
      if (ce) begin
        `CHECK(addr_o[0] == 3'(exp_addr), "stage 0 address")
        `CHECK(last_o == (exp_addr == 4), "last flag")
      end
      for (int s = 1; s <= S; s++) begin
        `CHECK(ce_o[s] == ce_h[s-1], "stage ce delay")
        if (ce_h[s-1]) `CHECK(addr_o[s] == a_h[s-1], "stage address delay")
      end
      @(posedge clk);
      ce_h = {ce_h[S-1:0], ce};
      a_h  = {a_h[S-1:0], 3'(exp_addr)};
      if (ce) exp_addr = (exp_addr == 4) ? 0 : exp_addr + 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
