// Word-serial comparator: one compare cell reused over consecutive cycles,
// least significant word first (the "comparison" group of the example
// data-flow graph, allocated as one cell per stage).
//
// In the cycle with first high the partial result coming into the cell is
// INIT: 0 gives a > b, 1 gives a >= b. In later cycles it is the result the
// cell saved in the previous cycle with en high. msw marks the most
// significant word, compared as two's complement when SIGNED_CMP is set.
// go is combinational and is the full result in the msw cycle.
module pu_ser_gt #(
  parameter int unsigned W          = 32,
  parameter bit          INIT       = 1'b0,
  parameter bit          SIGNED_CMP = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         first,
  input  logic         msw,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         go
);
  logic g_q, gi;

  assign gi = first ? INIT : g_q;

  pu_gt_cell #(.W(W)) u_cell (
    .a(a), .b(b), .signed_i(SIGNED_CMP && msw), .gi(gi), .go(go)
  );

  always_ff @(posedge clk) begin
    if (rst)     g_q <= INIT;
    else if (en) g_q <= go;
  end
endmodule
