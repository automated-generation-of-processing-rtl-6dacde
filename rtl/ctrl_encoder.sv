// Control Encoder of the FlowPU: encodes the metadata that tells the
// Endpoint what became of a flow context.
//
// At the end of every frame that the unit handled it pulses COMMIT for one
// cycle with UPDATED_CONTROL = {exported, state}:
//   updated by the ALU, no violation     -> state VALID, exported 0
//   updated by the ALU, violation        -> state EMPTY, exported 1
//   released by command, no new context  -> state EMPTY, exported 1
// VALID tells the Endpoint to keep the record the Merger has just written,
// EMPTY to discard the stored context (it has left as a flow record).
// alu_done_i marks the last ALU output word (alu_export_i: it violated),
// rel_done_i the last word of a context released without an update. Both
// may not come in the same cycle. Outputs are registered. The encoding is
// this design's choice.
module ctrl_encoder
  import fpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       alu_done_i,
  input  logic       alu_export_i,
  input  logic       rel_done_i,
  output logic       commit_o,
  output logic [2:0] updated_control_o
);
  always_ff @(posedge clk) begin
    if (rst) begin
      commit_o          <= 1'b0;
      updated_control_o <= '0;
    end else begin
      commit_o <= alu_done_i || rel_done_i;
      if (alu_done_i)
        updated_control_o <= alu_export_i ? {1'b1, CST_EMPTY} : {1'b0, CST_VALID};
      else if (rel_done_i)
        updated_control_o <= {1'b1, CST_EMPTY};
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(alu_done_i && rel_done_i))
    else $error("ctrl_encoder: two frames ended in one cycle");
endmodule
