// FrameLink transmit adapter of the FlowPU (used for TX_APP_DEC and DO).
//
// Turns a word stream (valid/ready, with start and last flags) into a
// FrameLink port: data with start-of-frame and end-of-frame marks and the
// source-ready/destination-ready handshake. The start of a frame is marked on
// the word flagged start_i and also, without it, on the first word after a
// word flagged last, so a source that does not mark starts still yields
// well-formed frames. The output is one register stage: a word is held, with
// src_rdy high, until dst_rdy accepts it, and the next word is taken in the
// same cycle. FrameLink here is simplified to active-high flags, one word per
// transfer and no partial last word; that simplification is this design's.
module fl_tx_adapter
  import fpu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] in_data,
  input  logic              in_start,
  input  logic              in_last,
  output logic              in_ready,
  output fl_t               fl_o,
  output logic              src_rdy_o,
  input  logic              dst_rdy_i
);
  logic at_start;   // next word opens a frame

  assign in_ready = !src_rdy_o || dst_rdy_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      src_rdy_o <= 1'b0;
      at_start  <= 1'b1;
      fl_o      <= '0;
    end else if (in_ready) begin
      src_rdy_o <= in_valid;
      if (in_valid) begin
        fl_o.data <= in_data;
        fl_o.sof  <= in_start || at_start;
        fl_o.eof  <= in_last;
        at_start  <= in_last;
      end
    end
  end

  // FrameLink rule: a word offered is held until it is accepted.
  assert property (@(posedge clk) disable iff (rst)
                   src_rdy_o && !dst_rdy_i |=> src_rdy_o && $stable(fl_o))
    else $error("fl_tx_adapter: word changed before it was accepted");
endmodule
