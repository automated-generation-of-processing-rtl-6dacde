// Frame FIFO with commit and drop, used for both FIFOs of the FlowPU.
//
// Words are written with wr_en and carry a last-of-frame flag. Written words
// stay invisible to the read side until the frame is committed (wr_commit,
// together with or after its last word). wr_drop discards every word written
// since the last commit, the word written in the same cycle included, which
// is how a frame that violated no control operation is removed from the
// export path. The read side is a valid/ready stream with a combinational
// read of the array. free_o counts the entries not yet written. DEPTH must be
// a power of two. Writing into a full FIFO is a usage error (assertion).
// The commit/drop mechanism is this design's reading of "the frame is
// dropped from the FIFO".
module fl_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned PW    = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         wr_last,
  input  logic         wr_commit,
  input  logic         wr_drop,
  output logic [PW:0]  free_o,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  output logic         rd_last,
  input  logic         rd_ready
);
  logic [W:0]  mem [DEPTH];
  logic [PW:0] wptr, cptr, rptr;
  logic [PW:0] wptr_n;

  assign wptr_n = wptr + (PW+1)'(wr_en);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr[PW-1:0]] <= {wr_last, wr_data};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      cptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_drop)        wptr <= cptr;
      else                wptr <= wptr_n;
      if (wr_commit && !wr_drop) cptr <= wptr_n;
      if (rd_valid && rd_ready) rptr <= rptr + 1'b1;
    end
  end

  assign free_o   = (PW+1)'(DEPTH) - (wptr - rptr);
  assign rd_valid = (rptr != cptr);
  assign {rd_last, rd_data} = mem[rptr[PW-1:0]];

  // A write into a full FIFO would overwrite unread data.
  assert property (@(posedge clk) disable iff (rst) wr_en |-> free_o != 0)
    else $error("fl_fifo: write while full");
endmodule
