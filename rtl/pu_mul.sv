// Signed multiplier, the "multiplication" block of the example data-flow
// graph (there it squares a - b by feeding the same value to both inputs).
// p = a * b, two's complement, full 2*IN_W-bit product. Purely combinational;
// the ALU places a pipeline register after it.
module pu_mul #(
  parameter int unsigned IN_W = 64
) (
  input  logic [IN_W-1:0]   a,
  input  logic [IN_W-1:0]   b,
  output logic [2*IN_W-1:0] p
);
  always_comb p = $signed(a) * $signed(b);
endmodule
