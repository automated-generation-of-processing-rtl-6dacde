// Testbench of binder: two sources send numbered frames of random length
// with random valid gaps and random output back-pressure. Frames must come
// out whole (never interleaved), each source's frames in order, and the two
// sources must take turns when both wait.
module tb_binder;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [1:0] v, l, r; logic [1:0][31:0] d;
  logic ov, ol, os, ordy; logic [31:0] od;

  binder #(.W(32)) dut (.clk, .rst,
    .in0_valid(v[0]), .in0_data(d[0]), .in0_last(l[0]), .in0_ready(r[0]),
    .in1_valid(v[1]), .in1_data(d[1]), .in1_last(l[1]), .in1_ready(r[1]),
    .out_valid(ov), .out_data(od), .out_last(ol), .out_src(os), .out_ready(ordy));

  // source s sends word {s, frame#, word#}; frame length = 1 + frame# % 4
  int fno[2], wno[2], got_f[2], got_w, cur_src;
  logic in_frame = 0; int n_switch = 0, last_src = -1;

  always_comb for (int s = 0; s < 2; s++) begin
    d[s] = {8'(s), 12'(fno[s]), 12'(wno[s])};
    l[s] = (wno[s] == fno[s] % 4);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    ordy <= ($urandom % 4 != 0);
    for (int s = 0; s < 2; s++)
      if (!v[s] || r[s]) v[s] <= (fno[s] < 200) && ($urandom % 5 != 0);
  end

  always @(posedge clk) if (!rst) begin
    for (int s = 0; s < 2; s++) if (v[s] && r[s]) begin
      if (l[s]) begin fno[s]++; wno[s] = 0; end else wno[s]++;
    end
    if (ov && ordy) begin
      if (!in_frame) begin
        cur_src = od[31:24]; got_w = 0; in_frame = 1;
        `CHECK(os == 1'(cur_src), "source flag")
        if (last_src >= 0 && last_src != cur_src) n_switch++;
        last_src = cur_src;
      end
      `CHECK(od[31:24] == 8'(cur_src), "no interleaving")
      `CHECK(od[23:12] == 12'(got_f[cur_src]), "frames in order")
      `CHECK(od[11:0] == 12'(got_w), "words in order")
      got_w++;
      if (ol) begin in_frame = 0; got_f[cur_src]++; end
    end
  end

  initial begin
    fno = '{0, 0}; wno = '{0, 0}; got_f = '{0, 0}; v = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    wait (got_f[0] == 200 && got_f[1] == 200);
    `CHECK(n_switch > 100, "sources take turns")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
