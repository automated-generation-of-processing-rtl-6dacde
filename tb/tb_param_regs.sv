// Testbench of param_regs: writes and reads back the default context and the
// limit over MI, checks that both appear on their outputs, that the debug
// counters count their events and that writes to debug addresses are
// ignored.
module tb_param_regs;
  import fpu_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] addr = 0; logic [31:0] dwr = 0, drd; logic wr = 0, rd = 0, ardy, drdy;
  logic evu = 0, eve = 0, evr = 0;
  logic [N_WORDS-1:0][31:0] defaults; logic [2:0][31:0] limit;

  param_regs dut (.clk, .rst, .mi_addr(addr), .mi_dwr(dwr), .mi_wr(wr), .mi_rd(rd),
    .mi_ardy(ardy), .mi_drd(drd), .mi_drdy(drdy), .ev_update_i(evu), .ev_export_i(eve),
    .ev_release_i(evr), .defaults_o(defaults), .limit_o(limit));

  task automatic mwrite(input logic [7:0] a, input logic [31:0] d);
    addr = a; dwr = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  task automatic mread(input logic [7:0] a, output logic [31:0] d);
    addr = a; rd = 1; @(negedge clk); rd = 0;
    `CHECK(drdy, "drdy after read")
    d = drd;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v[N_WORDS+3], r; int nu = 0, ne = 0, nr = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    `CHECK(ardy, "address always accepted")
    `CHECK(limit == '1, "limit resets to all ones")
    for (int i = 0; i < N_WORDS + 3; i++) begin v[i] = $urandom; mwrite(8'(i), v[i]); end
    for (int i = 0; i < N_WORDS + 3; i++) begin mread(8'(i), r); `CHECK(r == v[i], "readback") end
    for (int i = 0; i < N_WORDS; i++) `CHECK(defaults[i] == v[i], "defaults output")
    for (int i = 0; i < 3; i++) `CHECK(limit[i] == v[N_WORDS + i], "limit output")
    for (int i = 0; i < 200; i++) begin
      evu = $urandom % 2; eve = $urandom % 2; evr = $urandom % 2;
      nu += evu; ne += eve; nr += evr;
      @(negedge clk);
    end
    evu = 0; eve = 0; evr = 0;
    mwrite(8'd16, 32'hdead_beef);
    mread(8'd16, r); `CHECK(r == 32'(nu), "update counter")
    mread(8'd17, r); `CHECK(r == 32'(ne), "export counter")
    mread(8'd18, r); `CHECK(r == 32'(nr), "release counter")
    mread(8'd40, r); `CHECK(r == 0, "unmapped reads 0")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
