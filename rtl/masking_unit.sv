// Masking Unit and Reg Valid register of the FlowPU.
//
// The ALU presents the results of its N_CTRL control operations while the
// updated frame leaves it; result i is only meaningful while the output word
// with address CTRL_WORD[i] is on Z. The Masking Unit uses the output-stage
// address from the Address Counter to let each result through at its word
// only. Reg Valid holds whether the frame now leaving the ALU has violated no
// control operation so far; it is set again at word 0 of every frame.
// valid_o includes the current word (combinational), last_o marks the last
// word of the frame and export_o (= last_o & !valid_o) says that the frame is
// to be exported as a flow record. The per-word positions are this design's
// choice; in the ALU of this design the result is complete on word 4.
module masking_unit
  import fpu_pkg::*;
#(
  parameter int unsigned WORDS = N_WORDS,
  parameter int unsigned NC    = N_CTRL,
  parameter int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1,
  parameter logic [NC-1:0][AW-1:0] CTRL_WORD = '0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ce_i,
  input  logic [AW-1:0] addr_i,
  input  logic [NC-1:0] ctrl_i,
  output logic          valid_o,
  output logic          last_o,
  output logic          export_o
);
  logic [NC-1:0] mask;
  logic          reg_valid;
  logic          base;

  always_comb begin
    for (int i = 0; i < NC; i++) mask[i] = ce_i && (addr_i == CTRL_WORD[i]);
    base    = (addr_i == '0) ? 1'b1 : reg_valid;
    valid_o = base & ~|(ctrl_i & mask);
    last_o  = ce_i && (addr_i == AW'(WORDS - 1));
    export_o = last_o & ~valid_o;
  end

  always_ff @(posedge clk) begin
    if (rst)       reg_valid <= 1'b1;
    else if (ce_i) reg_valid <= valid_o;
  end
endmodule
