// Word-serial adder/subtractor: one word cell reused over consecutive
// cycles, least significant word first.
//
// This is how the generated pipeline allocates a functional unit: the
// "addition" or "subtraction" group of the example data-flow graph has one
// cell per word, but the words of an operand reach a stage in different
// cycles, so a single cell serves them all and a register carries the carry
// from one word to the next. In the cycle with first high the carry into the
// cell is SUB (0 for a + b, 1 for a - b, where b is inverted as a + ~b + 1);
// in later cycles it is the carry saved from the previous word. The carry is
// saved in every cycle with en high. s and co are combinational from the
// inputs of the current cycle; which words the cell sees in which cycle is
// set by the caller's per-stage program (the word address).
module pu_ser_add #(
  parameter int unsigned W   = 32,
  parameter bit          SUB = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         first,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         co
);
  logic         c_q, ci;
  logic [W-1:0] bi;

  assign ci = first ? SUB : c_q;
  assign bi = SUB ? ~b : b;

  pu_add_cell #(.W(W)) u_cell (.a(a), .b(bi), .ci(ci), .s(s), .co(co));

  always_ff @(posedge clk) begin
    if (rst)     c_q <= 1'b0;
    else if (en) c_q <= co;
  end
endmodule
