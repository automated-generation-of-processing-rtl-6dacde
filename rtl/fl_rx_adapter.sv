// FrameLink receive adapter of the FlowPU (RX_APP_DEC).
//
// Receives the result frames of the Application Decoder and keeps the first
// word of the most recent complete frame for the Merger. The adapter is
// always ready (dst_rdy_o = 1). A frame starts with sof; its first word is
// held aside and becomes result_o when the word with eof arrives, at which
// point result_valid_o pulses for one cycle. result_o keeps its value until
// the next complete frame. Which words of the decoder's answer are used is
// this design's choice: the document does not define that interface.
module fl_rx_adapter
  import fpu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  fl_t               fl_i,
  input  logic              src_rdy_i,
  output logic              dst_rdy_o,
  output logic [WORD_W-1:0] result_o,
  output logic              result_valid_o
);
  logic [WORD_W-1:0] first_q;

  assign dst_rdy_o = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      first_q        <= '0;
      result_o       <= '0;
      result_valid_o <= 1'b0;
    end else begin
      result_valid_o <= 1'b0;
      if (src_rdy_i) begin
        if (fl_i.sof) first_q <= fl_i.data;
        if (fl_i.eof) begin
          result_o       <= fl_i.sof ? fl_i.data : first_q;
          result_valid_o <= 1'b1;
        end
      end
    end
  end
endmodule
