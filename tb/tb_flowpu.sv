// End-to-end testbench of the FlowPU at its default sizes.
//
// The testbench plays the Endpoint, the Application Decoder and the host:
// it sets the default context and the control limit over MI, then sends a
// random mix of commands (update, update with the feedback route, create,
// release, release-and-create, no operation) with random contexts and
// headers, as fast as in_ready allows, while DO is stalled now and then.
// A reference model computes, for every frame, the context that must be
// written back (every ALU frame, with the decoder word merged in), the record
// that must be exported on DO (released contexts and violating updates) and
// the UPDATED_CONTROL code, and the monitors compare DO,
// UPD_CON_WR/UPDATED_CONTEXT and COMMIT with it. It also checks the
// start-to-start spacing of ALU frames (at least SPACING cycles, and exactly
// SPACING for back-to-back feedback updates), the write-back latency
// (PIPE_LEN + 1 cycles from input word 0), the debug counters, and that every
// mechanism of the unit happened at least once. A final burst of feedback
// updates checks the sustained rate of one frame per SPACING cycles.
module tb_flowpu;
  import fpu_pkg::*;
  `include "tb_check.svh"

  localparam int unsigned N = N_WORDS;
  localparam int unsigned L = PIPE_LEN;
  localparam int unsigned SP = SPACING;
  localparam int NFRAMES = 400;
  localparam int BURST = 30;

  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready;
  logic [WORD_W-1:0] context_i = 0, header_i = 0, payload_i = 0;
  logic [2:0] ctrl_i = 0;
  logic pckt_end_i = 0, pld_valid_i = 0, pckt_start_i = 0, pld_end_i = 0, pld_ready_o;
  logic upd_con_wr_o; logic [$clog2(N)-1:0] upd_addr_o;
  logic [WORD_W-1:0] updated_context_o; logic [2:0] updated_control_o; logic commit_o;
  fl_t tx_fl, rx_fl = '0, do_fl;
  logic tx_src_rdy, tx_dst_rdy = 1, rx_src_rdy = 0, rx_dst_rdy, do_src_rdy, do_dst_rdy = 1;
  logic [7:0] mi_addr = 0; logic [WORD_W-1:0] mi_dwr = 0, mi_drd;
  logic mi_wr = 0, mi_rd = 0, mi_ardy, mi_drdy;

  flowpu dut (
    .clk, .rst, .in_valid, .in_ready, .context_i, .header_i, .ctrl_i, .pckt_end_i,
    .payload_i, .pld_valid_i, .pckt_start_i, .pld_end_i, .pld_ready_o,
    .upd_con_wr_o, .upd_addr_o, .updated_context_o, .updated_control_o, .commit_o,
    .tx_app_dec_o(tx_fl), .tx_app_dec_src_rdy_o(tx_src_rdy), .tx_app_dec_dst_rdy_i(tx_dst_rdy),
    .rx_app_dec_i(rx_fl), .rx_app_dec_src_rdy_i(rx_src_rdy), .rx_app_dec_dst_rdy_o(rx_dst_rdy),
    .do_o(do_fl), .do_src_rdy_o(do_src_rdy), .do_dst_rdy_i(do_dst_rdy),
    .mi_addr, .mi_dwr, .mi_wr, .mi_rd, .mi_ardy, .mi_drd, .mi_drdy
  );

  typedef logic [N-1:0][WORD_W-1:0] frame_t;

  // ---------------- reference model ----------------
  frame_t defaults_m, last_res_m;
  logic [95:0] limit_m;
  logic [WORD_W-1:0] app_m = '0;

  function automatic frame_t ref_update(frame_t ctx, frame_t hdr, output logic viol);
    logic [63:0] x, a, b, d, xn;
    logic [95:0] y, yn;
    logic [127:0] sq;
    frame_t r;
    x = {ctx[CTX_X0+1], ctx[CTX_X0]};
    y = {ctx[CTX_Y0+2], ctx[CTX_Y0+1], ctx[CTX_Y0]};
    a = {hdr[HDR_A0+1], hdr[HDR_A0]};
    b = {hdr[HDR_B0+1], hdr[HDR_B0]};
    d = a - b;
    xn = ($signed(x) > $signed(d)) ? x : d;
    sq = $signed(d) * $signed(d);
    yn = y + sq[95:0];
    viol = (yn >= limit_m);
    r = ctx;                          // the decoder word passes the ALU
    {r[CTX_X0+1], r[CTX_X0]} = xn;
    {r[CTX_Y0+2], r[CTX_Y0+1], r[CTX_Y0]} = yn;
    return r;
  endfunction

  // Expected outputs.
  frame_t exp_rel_q[$], exp_res_q[$], exp_wb_q[$];
  logic [2:0] exp_ctrl_q[$];

  // Mechanism counters.
  int n_update, n_feedback, n_create, n_release, n_release_new, n_nop;
  int n_export_viol, n_kept, n_writeback, n_do_stall, n_room_stall, n_app_merge, n_back_to_back;
  int n_do_records, n_full_rate = 0;

  // ---------------- stimulus helpers ----------------
  task automatic mi_write(input logic [7:0] a, input logic [WORD_W-1:0] d);
    @(negedge clk); mi_addr = a; mi_dwr = d; mi_wr = 1;
    @(negedge clk); mi_wr = 0;
  endtask

  task automatic mi_read(input logic [7:0] a, output logic [WORD_W-1:0] d);
    @(negedge clk); mi_addr = a; mi_rd = 1;
    @(negedge clk); mi_rd = 0;
    `CHECK(mi_drdy, "MI read: drdy one cycle after rd")
    d = mi_drd;
  endtask

  longint unsigned cycle = 0;
  always @(posedge clk) cycle++;
  longint unsigned last_alu_start = 0;
  logic last_was_alu = 0;
  longint unsigned start_cycle_q[$];   // word-0 cycle of frames that write back

  task automatic send_frame(input cmd_e cmd, input frame_t ctx, input frame_t hdr);
    logic viol;
    frame_t r, x_in;
    logic alu;
    // called at a negedge; wait for the unit to accept word 0
    while (!in_ready) begin
      if (dut.gap == 0) n_room_stall++;
      @(negedge clk);
    end
    alu = !(cmd == CMD_NOP || cmd == CMD_RELEASE);
    if (alu && last_was_alu && cycle - last_alu_start == SP && cmd == CMD_UPDATE_CUR)
      n_back_to_back++;
    if (alu && last_was_alu)
      `CHECK(cycle - last_alu_start >= SP, "ALU frames at least SPACING cycles apart")
    // reference model
    case (cmd)
      CMD_CREATE, CMD_RELEASE_NEW: x_in = defaults_m;
      CMD_UPDATE_CUR:              x_in = last_res_m;
      default:                     x_in = ctx;
    endcase
    if (cmd == CMD_RELEASE || cmd == CMD_RELEASE_NEW) exp_rel_q.push_back(ctx);
    if (cmd == CMD_RELEASE) exp_ctrl_q.push_back({1'b1, CST_EMPTY});
    if (alu) begin
      r = ref_update(x_in, hdr, viol);
      last_res_m = r;
      if (viol) begin
        exp_res_q.push_back(r);
        exp_ctrl_q.push_back({1'b1, CST_EMPTY});
      end else
        exp_ctrl_q.push_back({1'b0, CST_VALID});
      r[CTX_APP] = app_m;
      exp_wb_q.push_back(r);
      start_cycle_q.push_back(cycle);
      last_alu_start = cycle;
      last_was_alu = 1;
    end
    case (cmd)
      CMD_UPDATE: n_update++;
      CMD_UPDATE_CUR: n_feedback++;
      CMD_CREATE: n_create++;
      CMD_RELEASE: n_release++;
      CMD_RELEASE_NEW: n_release_new++;
      default: n_nop++;
    endcase
    for (int k = 0; k < N; k++) begin
      in_valid = 1; context_i = ctx[k]; header_i = hdr[k];
      ctrl_i = (k == 0) ? cmd : 3'($urandom);
      pckt_end_i = (k == N - 1);
      @(negedge clk);
    end
    // returns at the negedge where the next frame may start
    in_valid = 0; pckt_end_i = 0;
  endtask

  function automatic frame_t rand_frame();
    frame_t f;
    for (int k = 0; k < N; k++) f[k] = $urandom;
    return f;
  endfunction

  // ---------------- Application Decoder model ----------------
  int tx_words = 0;
  logic [WORD_W-1:0] tx_sum = 0;
  always @(posedge clk) begin
    rx_src_rdy <= 0;
    if (tx_src_rdy && tx_dst_rdy) begin
      if (tx_fl.sof) begin tx_words = 0; tx_sum = 0; end
      tx_words++;
      tx_sum += tx_fl.data;
      if (tx_fl.eof) begin
        rx_fl <= '{sof: 1'b1, eof: 1'b1, data: tx_sum ^ WORD_W'(tx_words)};
        rx_src_rdy <= 1;
      end
    end
  end

  task automatic send_payload(input int nwords);
    logic [WORD_W-1:0] s = 0;
    for (int k = 0; k < nwords; k++) begin
      @(negedge clk);
      pld_valid_i = 1; payload_i = $urandom; pckt_start_i = (k == 0);
      pld_end_i = (k == nwords - 1);
      s += payload_i;
      while (!pld_ready_o) @(negedge clk);
    end
    @(negedge clk);
    pld_valid_i = 0; pld_end_i = 0; pckt_start_i = 0;
    repeat (6) @(negedge clk);
    app_m = s ^ WORD_W'(nwords);
    `CHECK(dut.app_word == app_m, "application decoder answer received")
  endtask

  // ---------------- monitors ----------------
  frame_t do_buf; int do_k = 0;
  always @(posedge clk) if (!rst) begin
    if (do_src_rdy && !do_dst_rdy) n_do_stall++;
    if (do_src_rdy && do_dst_rdy) begin
      `CHECK(do_fl.sof == (do_k == 0), "DO sof on first word")
      `CHECK(do_fl.eof == (do_k == N - 1), "DO eof on last word")
      do_buf[do_k] = do_fl.data;
      do_k++;
      if (do_k == N) begin
        do_k = 0;
        n_do_records++;
        if (exp_rel_q.size() > 0 && exp_rel_q[0] == do_buf) begin
          void'(exp_rel_q.pop_front());
          `CHECK(1, "DO record = released context")
        end else if (exp_res_q.size() > 0 && exp_res_q[0] == do_buf) begin
          void'(exp_res_q.pop_front());
          n_export_viol++;
          `CHECK(1, "DO record = violating update")
        end else
          `CHECK(0, "DO record matches neither expected stream")
      end
    end
  end

  frame_t wb_buf; int wb_k = 0;
  always @(posedge clk) if (!rst) begin
    if (upd_con_wr_o) begin
      `CHECK(upd_addr_o == ($clog2(N))'(wb_k), "write-back address sequence")
      if (wb_k == 0 && start_cycle_q.size() > 0) begin
        // word 0 left the merger register: PIPE_LEN + 1 cycles after input word 0
        `CHECK(cycle - start_cycle_q.pop_front() == L + 2, "write-back latency")
      end
      wb_buf[wb_k] = updated_context_o;
      wb_k++;
      if (wb_k == N) begin
        wb_k = 0;
        n_writeback++;
        if (wb_buf[CTX_APP] != 0) n_app_merge++;
        `CHECK(exp_wb_q.size() > 0, "write-back expected")
        if (exp_wb_q.size() > 0)
          `CHECK(exp_wb_q.pop_front() == wb_buf, "written-back context and decoder word = reference")
      end
    end
    if (commit_o) begin
      `CHECK(exp_ctrl_q.size() > 0, "commit expected")
      if (updated_control_o == {1'b0, CST_VALID}) n_kept++;
      if (exp_ctrl_q.size() > 0)
        `CHECK(exp_ctrl_q.pop_front() == updated_control_o, "UPDATED_CONTROL code")
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- DO back-pressure ----------------
  logic stall_phase = 0;
  always @(negedge clk) do_dst_rdy <= stall_phase ? ($urandom % 8 == 0) : ($urandom % 4 != 0);

  // ---------------- main sequence ----------------
  initial begin
    logic [WORD_W-1:0] rd;
    int cmdsel;
    cmd_e cmd;
    repeat (4) @(negedge clk);
    rst = 0;
    // defaults and limit over MI
    defaults_m = rand_frame();
    defaults_m[CTX_Y0+2] = 0;  // small y so that created contexts usually pass
    for (int k = 0; k < N; k++) mi_write(8'(k), defaults_m[k]);
    limit_m = {32'h8000_0000, 64'h0};
    mi_write(8'(N + 0), limit_m[31:0]);
    mi_write(8'(N + 1), limit_m[63:32]);
    mi_write(8'(N + 2), limit_m[95:64]);
    for (int k = 0; k < N; k++) begin
      mi_read(8'(k), rd);
      `CHECK(rd == defaults_m[k], "MI readback of defaults")
    end
    last_res_m = '0;
    // a first packet of payload for the application decoder
    send_payload(7);
    for (int f = 0; f < NFRAMES; f++) begin
      frame_t c, h;
      c = rand_frame();
      h = rand_frame();
      if (f == NFRAMES / 2) begin
        repeat (3 * SP) @(negedge clk);
        send_payload(3);
      end
      stall_phase = (f >= 100 && f < 160);
      cmdsel = $urandom % 16;
      if (f < 2) cmd = CMD_UPDATE;
      else if (cmdsel < 5) cmd = CMD_UPDATE;
      else if (cmdsel < 10) cmd = CMD_UPDATE_CUR;
      else if (cmdsel < 12) cmd = CMD_CREATE;
      else if (cmdsel < 13) cmd = CMD_RELEASE;
      else if (cmdsel < 14) cmd = CMD_RELEASE_NEW;
      else cmd = CMD_NOP;
      if ($urandom % 2) c[CTX_Y0+2] = c[CTX_Y0+2] >> 2;  // some contexts below the limit
      send_frame(cmd, c, h);
      if ($urandom % 8 == 0) repeat ($urandom % 4) @(negedge clk);
    end
    stall_phase = 0;
    // sustained rate: a created context updated by BURST back-to-back
    // feedback frames with small a - b (no violation, nothing exported);
    // word 0 of frame i must be accepted i * SPACING cycles after the first
    repeat (400) @(negedge clk);
    begin
      frame_t c, h;
      longint unsigned t_first;
      c = rand_frame();
      for (int i = 0; i <= BURST; i++) begin
        h = rand_frame();
        h[HDR_A0] = h[HDR_A0] & 32'hffff; h[HDR_A0+1] = 0;
        h[HDR_B0] = h[HDR_B0] & 32'hffff; h[HDR_B0+1] = 0;
        send_frame(i == 0 ? CMD_CREATE : CMD_UPDATE_CUR, c, h);
        if (i == 0) t_first = last_alu_start;
      end
      `CHECK(last_alu_start - t_first == longint'(BURST * SP), "burst at one frame per SPACING cycles")
      if (last_alu_start - t_first == longint'(BURST * SP)) n_full_rate++;
      $display("burst: %0d frames of %0d bits in %0d cycles = %0d bits per cycle",
               BURST, N * WORD_W, last_alu_start - t_first, BURST * N * WORD_W / (last_alu_start - t_first));
    end
    repeat (400) @(negedge clk);
    // everything expected has come out
    `CHECK(exp_rel_q.size() == 0, "all released contexts exported")
    `CHECK(exp_res_q.size() == 0, "all violating updates exported")
    `CHECK(exp_wb_q.size() == 0, "all write-backs seen")
    `CHECK(exp_ctrl_q.size() == 0, "all commits seen")
    // debug counters
    mi_read(8'd16, rd);
    `CHECK(rd == n_update + n_feedback + n_create + n_release_new, "debug: ALU frames")
    mi_read(8'd17, rd);
    `CHECK(rd == n_do_records, "debug: exported records")
    mi_read(8'd18, rd);
    `CHECK(rd == n_release + n_release_new, "debug: released contexts")
    // every mechanism happened
    `CHECK(n_update > 0, "mechanism: update from CONTEXT")
    `CHECK(n_feedback > 0, "mechanism: feedback route")
    `CHECK(n_back_to_back > 0, "mechanism: back-to-back feedback at SPACING")
    `CHECK(n_create > 0, "mechanism: create from defaults")
    `CHECK(n_release > 0, "mechanism: release")
    `CHECK(n_release_new > 0, "mechanism: release and create")
    `CHECK(n_nop > 0, "mechanism: no operation")
    `CHECK(n_export_viol > 0, "mechanism: control violation exported")
    `CHECK(n_writeback > 0, "mechanism: write-back")
    `CHECK(n_kept > 0, "mechanism: record kept (result dropped from FIFO)")
    `CHECK(n_do_stall > 0, "mechanism: DO back-pressure")
    `CHECK(n_room_stall > 0, "mechanism: input held for FIFO room")
    `CHECK(n_app_merge > 0, "mechanism: decoder result merged")
    `CHECK(n_full_rate > 0, "mechanism: sustained full-rate burst")
    $display("update=%0d feedback=%0d b2b=%0d create=%0d release=%0d release_new=%0d nop=%0d export=%0d kept=%0d writeback=%0d do_stall=%0d room_stall=%0d app=%0d",
             n_update, n_feedback, n_back_to_back, n_create, n_release, n_release_new, n_nop,
             n_export_viol, n_kept, n_writeback, n_do_stall, n_room_stall, n_app_merge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
