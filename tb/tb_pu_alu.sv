// Testbench of pu_alu at its default sizes. Frames of context and header
// are sent back to back at the minimum spacing of SPACING cycles and with
// random gaps. Every output word must appear exactly PIPE_LEN cycles after
// the input word with the same address and equal a reference model of
//   x = max(x, a - b); y += sqr(a - b); viol = (y >= limit)
// with the last context word passed unchanged. The control result must be
// on output word CTRL_ADDR only. Some frames take their context from the
// feedback read port while the previous frame is still leaving, as the
// FlowPU does for back-to-back packets of one flow.
module tb_pu_alu;
  import fpu_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  localparam int N = N_WORDS, L = PIPE_LEN, SP = SPACING;
  localparam int AW = $clog2(N);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ce0 = 0; logic [AW-1:0] a0 = 0;
  logic [L:0] ce; logic [L:0][AW-1:0] addr;
  logic [31:0] x_i = 0, y_i = 0, z_o, fb_o;
  logic [2:0][31:0] params;
  logic [0:0] ctrl_o;
  logic [AW-1:0] fb_addr = 0;

  // independent per-stage address delay line
  always_ff @(posedge clk) begin
    if (rst) begin ce[L:1] <= '0; addr[L:1] <= '0; end
    else begin ce[L:1] <= ce[L-1:0]; addr[L:1] <= addr[L-1:0]; end
  end
  assign ce[0] = ce0;
  assign addr[0] = a0;

  pu_alu dut (.clk, .rst, .ce_i(ce), .addr_i(addr), .x_i, .y_i, .params_i(params),
              .z_o, .ctrl_o, .fb_addr_i(fb_addr), .fb_o);

  typedef logic [N-1:0][31:0] frame_t;
  frame_t exp_q[$]; logic exp_v_q[$];
  int n_viol = 0, n_ok = 0, n_min_gap = 0, n_fb = 0;

  function automatic frame_t model(frame_t c, frame_t h, logic [95:0] lim, output logic v);
    logic [63:0] x, d; logic [95:0] y; logic [127:0] sq; frame_t r;
    x = {c[CTX_X0+1], c[CTX_X0]}; y = {c[CTX_Y0+2], c[CTX_Y0+1], c[CTX_Y0]};
    d = {h[HDR_A0+1], h[HDR_A0]} - {h[HDR_B0+1], h[HDR_B0]};
    sq = {{64{d[63]}}, d} * {{64{d[63]}}, d};
    y = y + sq[95:0];
    v = (y >= lim);
    r = c;
    {r[CTX_X0+1], r[CTX_X0]} = ($signed(x) > $signed(d)) ? x : d;
    {r[CTX_Y0+2], r[CTX_Y0+1], r[CTX_Y0]} = y;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker: at stage L the word with address addr[L] leaves
  frame_t cur; logic cur_v;
  always @(negedge clk) if (!rst && ce[L]) begin
    if (addr[L] == 0) begin
      `CHECK(exp_q.size() > 0, "output frame expected")
      cur = exp_q.pop_front(); cur_v = exp_v_q.pop_front();
      if (cur_v) n_viol++; else n_ok++;
    end
    `CHECK(z_o == cur[addr[L]], "Z word after PIPE_LEN cycles")
    `CHECK(ctrl_o[0] == (cur_v && addr[L] == AW'(CTRL_ADDR)), "control result on its word")
  end

  initial begin
    frame_t c, h, r, last;
    logic v, use_fb;
    params = {32'h8000_0000, 64'h0};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 400; f++) begin
      use_fb = (f > 0) && ($urandom % 3 == 0);
      for (int k = 0; k < N; k++) begin c[k] = $urandom; h[k] = $urandom; end
      if (f % 2) c[CTX_Y0+2] = c[CTX_Y0+2] >> 3;
      if (use_fb) begin c = last; n_fb++; end
      r = model(c, h, params, v);
      exp_q.push_back(r); exp_v_q.push_back(v);
      for (int k = 0; k < N; k++) begin
        ce0 = 1; a0 = AW'(k); y_i = h[k];
        fb_addr = AW'(k);
        if (use_fb) begin
          #1;
          `CHECK(fb_o == last[k], "feedback port word while the frame enters")
          x_i = fb_o;
        end else x_i = c[k];
        @(negedge clk);
      end
      last = r;
      ce0 = 0;
      // minimum spacing is SPACING cycles start to start
      if (f % 3 != 2) begin repeat (SP - N) @(negedge clk); n_min_gap++; end
      else repeat (SP - N + ($urandom % 6)) @(negedge clk);
    end
    repeat (2 * SP) @(negedge clk);
    // feedback read port holds the last result
    for (int k = 0; k < N; k++) begin
      fb_addr = AW'(k); #1;
      `CHECK(fb_o == last[k], "feedback port returns last result")
    end
    `CHECK(exp_q.size() == 0, "all frames came out")
    `CHECK(n_viol > 0 && n_ok > 0, "control result both ways")
    `CHECK(n_min_gap > 0 && n_fb > 0, "minimum spacing and feedback exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
