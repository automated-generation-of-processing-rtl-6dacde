// One word cell of a multi-word "greater than" comparator (the ">" box of
// the generated data-flow graph). The cell says a > b for the operand formed
// by this word and all less significant words: its own word decides unless
// the two words are equal, in which case the result of the less significant
// words (gi) is passed on. With signed_i high the word is compared as a two's
// complement number, which is right for the most significant word of a
// signed operand. Purely combinational.
module pu_gt_cell #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         signed_i,
  input  logic         gi,
  output logic         go
);
  logic word_gt;
  always_comb begin
    if (signed_i) word_gt = $signed(a) > $signed(b);
    else          word_gt = a > b;
    go = word_gt | ((a == b) & gi);
  end
endmodule
