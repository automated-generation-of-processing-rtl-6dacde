// One word cell of a multi-word adder: sum = a + b + ci, with carry out.
// It is the "+" box of the generated data-flow graph; wider additions and
// subtractions are chains of these cells. Purely combinational.
module pu_add_cell #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  always_comb {co, s} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, ci};
endmodule
