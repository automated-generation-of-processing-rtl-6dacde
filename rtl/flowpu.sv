// Flow Processing Unit (FlowPU): the context update engine of a flow
// monitoring probe.
//
// For every packet the Endpoint delivers three word-serial, N_WORDS-long
// frames in step: the stored flow context (CONTEXT), the packet's unified
// header (HEADER) and, with the first word, a command (CTRL). The unit
//   * decodes the command (Control Decoder) into use_current / first /
//     release / void,
//   * picks the context for the update (MUX): the Endpoint's copy, the
//     default context from the Parameters registers, or the result the ALU
//     produced for the previous packet (feedback route, so two back-to-back
//     packets of one flow need no stall),
//   * runs the generated pipeline (pu_alu) on context and header; every
//     stage gets its word address from the Address Counter,
//   * checks the control operation of the updated frame (Masking Unit and
//     Reg Valid): a frame that violated it is committed in the result FIFO
//     and leaves through the Binder to DO as a flow record; any other frame
//     is dropped from that FIFO; every updated frame is written back to the
//     Endpoint (Merger, UPD_CON_WR/UPDATED_CONTEXT) with the latest
//     Application Decoder result in its decoder word, and the Control
//     Encoder's COMMIT code tells the Endpoint whether to keep it,
//   * copies released contexts (release commands) into the release FIFO,
//     from where the Binder exports them too, without using the ALU,
//   * reports the outcome of each frame on UPDATED_CONTROL/COMMIT (Control
//     Encoder),
//   * forwards the payload to the Application Decoder (TX_APP_DEC) and
//     receives its answer (RX_APP_DEC) through FrameLink adapters.
//
// Timing: the words of a frame must arrive on consecutive cycles once the
// first is accepted (in_ready high at word 0). The next frame may start
// SPACING cycles after a frame that uses the ALU and N_WORDS cycles after
// any other frame (both 6 at the default sizes, so frames can follow each
// other without a gap); in_ready also waits for room in both FIFOs. Output
// word k of an update leaves the ALU PIPE_LEN cycles after input word k and
// the Merger one cycle later; COMMIT comes one cycle after the last output
// word.
// The block set and their connections follow the FlowPU block diagram;
// handshakes, command codes, FIFO depths and the Endpoint protocol are this
// design's own, since the Endpoint interface is not specified.
module flowpu
  import fpu_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned MI_AW      = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  // IN_ENDPOINT_INTERFACE
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [WORD_W-1:0]      context_i,
  input  logic [WORD_W-1:0]      header_i,
  input  logic [2:0]             ctrl_i,
  input  logic                   pckt_end_i,
  input  logic [WORD_W-1:0]      payload_i,
  input  logic                   pld_valid_i,
  input  logic                   pckt_start_i,
  input  logic                   pld_end_i,
  output logic                   pld_ready_o,
  // OUT_ENDPOINT_INTERFACE
  output logic                   upd_con_wr_o,
  output logic [$clog2(N_WORDS)-1:0] upd_addr_o,
  output logic [WORD_W-1:0]      updated_context_o,
  output logic [2:0]             updated_control_o,
  output logic                   commit_o,
  // TX_APP_DEC (FrameLink)
  output fl_t                    tx_app_dec_o,
  output logic                   tx_app_dec_src_rdy_o,
  input  logic                   tx_app_dec_dst_rdy_i,
  // RX_APP_DEC (FrameLink)
  input  fl_t                    rx_app_dec_i,
  input  logic                   rx_app_dec_src_rdy_i,
  output logic                   rx_app_dec_dst_rdy_o,
  // DO (FrameLink): flow records
  output fl_t                    do_o,
  output logic                   do_src_rdy_o,
  input  logic                   do_dst_rdy_i,
  // MI: parameters and debug registers
  input  logic [MI_AW-1:0]       mi_addr,
  input  logic [WORD_W-1:0]      mi_dwr,
  input  logic                   mi_wr,
  input  logic                   mi_rd,
  output logic                   mi_ardy,
  output logic [WORD_W-1:0]      mi_drd,
  output logic                   mi_drdy
);
  localparam int unsigned L  = PIPE_LEN;
  localparam int unsigned AW = (N_WORDS > 1) ? $clog2(N_WORDS) : 1;
  localparam int unsigned PW = $clog2(FIFO_DEPTH);

  // ---------------- frame acceptance ----------------
  logic                 ce;                   // a word is accepted
  logic [L:0]           ce_st;
  logic [L:0][AW-1:0]   addr_st;
  logic                 word_last;
  logic                 in_frame;             // words 1.. of a frame expected
  localparam int unsigned GW = $clog2(SPACING + 1);
  logic [GW-1:0]        gap;                  // cycles until the next start
  logic [PW:0]          rel_free, res_free;
  logic                 room;
  dec_t                 dec;

  assign room     = (rel_free >= (PW+1)'(N_WORDS)) && (res_free >= (PW+1)'(2*N_WORDS));
  assign in_ready = in_frame || (gap == '0 && room);
  assign ce       = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame <= 1'b0;
      gap      <= '0;
    end else begin
      if (ce && addr_st[0] == '0)
        gap <= dec.void_op ? GW'(N_WORDS - 1) : GW'(SPACING - 1);
      else if (gap != '0)
        gap <= gap - 1'b1;
      if (ce) in_frame <= !word_last;
    end
  end

  addr_counter #(.WORDS(N_WORDS), .STAGES(L)) u_addr_counter (
    .clk, .rst, .ce_i(ce), .ce_o(ce_st), .addr_o(addr_st), .last_o(word_last)
  );

  ctrl_decoder u_ctrl_decoder (
    .clk, .rst, .ce_i(ce), .addr_i(addr_st[0]), .ctrl_i, .dec_o(dec)
  );

  // Per-stage flags: word belongs to an ALU frame / to a release-only frame.
  logic [L:0] alu_st, relonly_st;
  logic [L:1] alu_q, relonly_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      alu_q     <= '0;
      relonly_q <= '0;
    end else begin
      alu_q     <= {alu_q[L-1:1],     ce && !dec.void_op};
      relonly_q <= {relonly_q[L-1:1], ce &&  dec.void_op && dec.release_ctx};
    end
  end
  assign alu_st     = {alu_q,     ce && !dec.void_op};
  assign relonly_st = {relonly_q, ce &&  dec.void_op && dec.release_ctx};

  // ---------------- parameters / debug ----------------
  logic [N_WORDS-1:0][WORD_W-1:0] defaults;
  logic [Y_WORDS-1:0][WORD_W-1:0] limit;
  logic ev_update, ev_export, ev_release;

  param_regs #(.MI_AW(MI_AW)) u_param_regs (
    .clk, .rst, .mi_addr, .mi_dwr, .mi_wr, .mi_rd, .mi_ardy, .mi_drd, .mi_drdy,
    .ev_update_i(ev_update), .ev_export_i(ev_export), .ev_release_i(ev_release),
    .defaults_o(defaults), .limit_o(limit)
  );

  // ---------------- context MUX and ALU ----------------
  logic [WORD_W-1:0] fb_word, ctx_word, z_word;
  logic [N_CTRL-1:0] alu_ctrl;

  always_comb begin
    if (dec.first)            ctx_word = defaults[addr_st[0]];
    else if (dec.use_current) ctx_word = fb_word;
    else                      ctx_word = context_i;
  end

  pu_alu u_alu (
    .clk, .rst,
    .ce_i(ce_st & alu_st), .addr_i(addr_st),
    .x_i(ctx_word), .y_i(header_i), .params_i(limit),
    .z_o(z_word), .ctrl_o(alu_ctrl),
    .fb_addr_i(addr_st[0]), .fb_o(fb_word)
  );

  // ---------------- control check ----------------
  logic out_ce;
  logic frame_ok, frame_last, frame_export;
  assign out_ce = ce_st[L] && alu_st[L];

  masking_unit #(.CTRL_WORD(AW'(CTRL_ADDR))) u_masking_unit (
    .clk, .rst, .ce_i(out_ce), .addr_i(addr_st[L]), .ctrl_i(alu_ctrl),
    .valid_o(frame_ok), .last_o(frame_last), .export_o(frame_export)
  );

  // ---------------- FIFOs and Binder ----------------
  logic             rel_valid, rel_last, rel_ready;
  logic [WORD_W-1:0] rel_data;
  logic             res_valid, res_last, res_ready;
  logic [WORD_W-1:0] res_data;

  fl_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_release_fifo (
    .clk, .rst,
    .wr_en(ce && dec.release_ctx), .wr_data(context_i), .wr_last(pckt_end_i),
    .wr_commit(ce && dec.release_ctx && pckt_end_i), .wr_drop(1'b0),
    .free_o(rel_free),
    .rd_valid(rel_valid), .rd_data(rel_data), .rd_last(rel_last), .rd_ready(rel_ready)
  );

  fl_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_result_fifo (
    .clk, .rst,
    .wr_en(out_ce), .wr_data(z_word), .wr_last(frame_last),
    .wr_commit(frame_export), .wr_drop(frame_last && !frame_export),
    .free_o(res_free),
    .rd_valid(res_valid), .rd_data(res_data), .rd_last(res_last), .rd_ready(res_ready)
  );

  logic             bd_valid, bd_last, bd_src, bd_ready;
  logic [WORD_W-1:0] bd_data;

  binder #(.W(WORD_W)) u_binder (
    .clk, .rst,
    .in0_valid(rel_valid), .in0_data(rel_data), .in0_last(rel_last), .in0_ready(rel_ready),
    .in1_valid(res_valid), .in1_data(res_data), .in1_last(res_last), .in1_ready(res_ready),
    .out_valid(bd_valid), .out_data(bd_data), .out_last(bd_last), .out_src(bd_src),
    .out_ready(bd_ready)
  );

  fl_tx_adapter u_do_adapter (
    .clk, .rst,
    .in_valid(bd_valid), .in_data(bd_data), .in_start(1'b0), .in_last(bd_last),
    .in_ready(bd_ready),
    .fl_o(do_o), .src_rdy_o(do_src_rdy_o), .dst_rdy_i(do_dst_rdy_i)
  );

  // ---------------- Application Decoder interface ----------------
  logic [WORD_W-1:0] app_word;
  logic              app_valid;

  fl_tx_adapter u_tx_app_adapter (
    .clk, .rst,
    .in_valid(pld_valid_i), .in_data(payload_i), .in_start(pckt_start_i),
    .in_last(pld_end_i), .in_ready(pld_ready_o),
    .fl_o(tx_app_dec_o), .src_rdy_o(tx_app_dec_src_rdy_o), .dst_rdy_i(tx_app_dec_dst_rdy_i)
  );

  fl_rx_adapter u_rx_app_adapter (
    .clk, .rst,
    .fl_i(rx_app_dec_i), .src_rdy_i(rx_app_dec_src_rdy_i), .dst_rdy_o(rx_app_dec_dst_rdy_o),
    .result_o(app_word), .result_valid_o(app_valid)
  );

  // ---------------- write-back to the Endpoint ----------------
  merger u_merger (
    .clk, .rst,
    .en_i(out_ce), .addr_i(addr_st[L]), .ctx_i(z_word), .app_i(app_word),
    .upd_con_wr_o, .upd_addr_o, .upd_context_o(updated_context_o)
  );

  ctrl_encoder u_ctrl_encoder (
    .clk, .rst,
    .alu_done_i(frame_last), .alu_export_i(frame_export),
    .rel_done_i(ce_st[L] && relonly_st[L] && addr_st[L] == AW'(N_WORDS - 1)),
    .commit_o, .updated_control_o
  );

  assign ev_update  = frame_last;
  assign ev_export  = bd_valid && bd_ready && bd_last;
  assign ev_release = ce && dec.release_ctx && pckt_end_i;

  // ---------------- protocol rules ----------------
  // Once a frame has begun, its words come on consecutive cycles.
  assert property (@(posedge clk) disable iff (rst) in_frame |-> in_valid)
    else $error("flowpu: gap inside an input frame");
  // PCKT_END marks the last word of the frame.
  assert property (@(posedge clk) disable iff (rst) ce |-> (pckt_end_i == word_last))
    else $error("flowpu: PCKT_END not on the last word");
  assert property (@(posedge clk) disable iff (rst) frame_last |-> (frame_ok != frame_export))
    else $error("flowpu: Reg Valid and the export decision disagree");

endmodule
