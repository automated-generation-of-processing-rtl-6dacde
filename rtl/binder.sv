// Binder of the FlowPU: joins the two flow-record streams, contexts released
// by command (in0, from the release FIFO) and contexts that violated a
// control operation (in1, from the result FIFO), into the single stream that
// goes to the DO port. Frames are never interleaved: once a frame has begun
// on the output, the binder stays with its source until the word flagged
// last has passed. Between frames the sources take turns (round robin) when
// both have a frame waiting. All ports are valid/ready streams; the output
// is combinational from the selected input. Arbitration is this design's
// choice; the block diagram gives only the block and its connections.
module binder #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in0_valid,
  input  logic [W-1:0] in0_data,
  input  logic         in0_last,
  output logic         in0_ready,
  input  logic         in1_valid,
  input  logic [W-1:0] in1_data,
  input  logic         in1_last,
  output logic         in1_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         out_last,
  output logic         out_src,
  input  logic         out_ready
);
  logic busy, cur, prio;   // in a frame; its source; source preferred next
  logic sel;

  always_comb begin
    if (busy)                    sel = cur;
    else if (in0_valid && in1_valid) sel = prio;
    else                         sel = in1_valid;
    out_valid = sel ? in1_valid : in0_valid;
    out_data  = sel ? in1_data  : in0_data;
    out_last  = sel ? in1_last  : in0_last;
    out_src   = sel;
    in0_ready = out_ready && !sel;
    in1_ready = out_ready &&  sel;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cur  <= 1'b0;
      prio <= 1'b0;
    end else if (out_valid && out_ready) begin
      if (out_last) begin
        busy <= 1'b0;
        prio <= ~sel;
      end else begin
        busy <= 1'b1;
        cur  <= sel;
      end
    end
  end
endmodule
