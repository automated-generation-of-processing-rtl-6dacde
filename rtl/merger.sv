// Merger of the FlowPU: builds the record written back to the Endpoint.
//
// While an updated frame leaves the ALU (en_i high on each of its words),
// the merger passes each word to UPDATED_CONTEXT with UPD_CON_WR high and
// its word address, except the decoder word (address APP_WORD), which it
// replaces with the latest result of the Application Decoder (app_i).
// Outputs are registered, one cycle after the ALU word. Whether the Endpoint
// keeps the record is said afterwards by the Control Encoder's COMMIT code.
// Giving the decoder result its own context word is this design's choice of
// how the two are merged.
module merger
  import fpu_pkg::*;
#(
  parameter int unsigned WORDS    = N_WORDS,
  parameter int unsigned APP_WORD = CTX_APP,
  parameter int unsigned AW       = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en_i,
  input  logic [AW-1:0]     addr_i,
  input  logic [WORD_W-1:0] ctx_i,
  input  logic [WORD_W-1:0] app_i,
  output logic              upd_con_wr_o,
  output logic [AW-1:0]     upd_addr_o,
  output logic [WORD_W-1:0] upd_context_o
);
  always_ff @(posedge clk) begin
    if (rst) begin
      upd_con_wr_o  <= 1'b0;
      upd_addr_o    <= '0;
      upd_context_o <= '0;
    end else begin
      upd_con_wr_o <= en_i;
      if (en_i) begin
        upd_addr_o    <= addr_i;
        upd_context_o <= (addr_i == AW'(APP_WORD)) ? app_i : ctx_i;
      end
    end
  end
endmodule
