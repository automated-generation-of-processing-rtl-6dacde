// Processing unit ("ALU") generated for the example operations
//     x = max(x, a - b);   y += sqr(a - b);
// plus one control operation, "y has reached the limit in PARAMS".
//
// Interface: the context frame enters on X (x_i) and the header frame on Y
// (y_i), one word per cycle, side by side, lowest address first. The clock
// enable and word address of every pipeline stage come from the Address
// Counter (ce_i/addr_i, index = stage, stage s = s cycles after the input).
// PARAMS (params_i) holds the 3-word limit. The updated context leaves on Z
// (z_o): word k leaves exactly LAT = PIPE_LEN cycles after input word k, in
// the cycle flagged by ce_i[LAT] and addr_i[LAT]. ctrl_o is the control
// result (1 = violated); it is complete on output word CTRL_ADDR only.
//
// The pipeline is word serial. Each functional unit of the example data-flow
// graph is allocated once per stage and reused for successive words; what it
// does in which cycle (its "program") is selected by that stage's address:
//   stage 0, words 2..3  d = a - b   one add cell, b inverted, carry-in 1,
//                                    carry saved between the two words
//                        gt = x > d  compare cells on the words of x and
//                                    the live words of d; 0 into the first
//   stage 1, word 3      sq = d * d  one multiplier, kept to y's 3 words
//   stage 4, words 0..1  x' = gt ? x : d   one selector
//   stage 4, words 2..4  y' = y + sq one add cell, carry-in 0, carry saved
//                        viol = y' >= limit, one compare cell, 1 into the
//                                    first, result complete on word 4
//   stage 4, word 5      the decoder word passes unchanged
// Words of the frame are kept in capture registers until the output stage
// uses them. The output words are also written into a result register,
// read by fb_addr_i for the feedback route of the FlowPU. A new frame may
// start SPACING cycles after the previous one, so the unit holds at most
// parts of two frames; input frames can follow each other without a gap.
// The operations and the cells follow the example; the schedule, the field
// placement, the truncation of sqr() to the width of y and the control
// operation are this design's choices.
module pu_alu
  import fpu_pkg::*;
#(
  parameter int unsigned W     = WORD_W,
  parameter int unsigned WORDS = N_WORDS,
  parameter int unsigned LAT   = PIPE_LEN,
  parameter int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [LAT:0]                  ce_i,
  input  logic [LAT:0][AW-1:0]          addr_i,
  input  logic [W-1:0]                  x_i,
  input  logic [W-1:0]                  y_i,
  input  logic [Y_WORDS-1:0][W-1:0]     params_i,
  output logic [W-1:0]                  z_o,
  output logic [N_CTRL-1:0]             ctrl_o,
  input  logic [AW-1:0]                 fb_addr_i,
  output logic [W-1:0]                  fb_o
);
  // The schedule below is written for this layout and latency.
  if (LAT != HDR_B0 + 2 || HDR_B0 != HDR_A0 + AB_WORDS || CTX_X0 + X_WORDS > HDR_B0
      || CTX_Y0 != CTX_X0 + X_WORDS || WORDS <= CTX_APP) begin : g_bad_layout
    $error("pu_alu: frame layout or LAT does not match the schedule");
  end

  // ---------------- capture registers ----------------
  logic [WORDS-1:0][W-1:0] xcap, ycap;

  always_ff @(posedge clk) begin
    if (ce_i[0]) begin
      xcap[addr_i[0]] <= x_i;
      ycap[addr_i[0]] <= y_i;
    end
  end

  // ---------------- stage 0: d = a - b and gt = x > d ----------------
  logic          s0_run, s0_first, s0_msw;
  logic [AW-1:0] s0_j;               // word of a, b, x in this cycle
  logic [W-1:0]  d_word;
  logic          gt_live;
  logic          d_co;               // carry out of the top word, not needed
  logic [AB_WORDS-1:0][W-1:0] d_q;
  logic          gt_q;

  always_comb begin
    s0_j     = addr_i[0] - AW'(HDR_B0);
    s0_run   = ce_i[0] && s0_j < AW'(AB_WORDS);
    s0_first = addr_i[0] == AW'(HDR_B0);
    s0_msw   = addr_i[0] == AW'(HDR_B0 + AB_WORDS - 1);
  end

  pu_ser_add #(.W(W), .SUB(1'b1)) u_sub (
    .clk, .rst, .en(s0_run), .first(s0_first),
    .a(ycap[AW'(HDR_A0) + s0_j]), .b(y_i), .s(d_word), .co(d_co)
  );

  pu_ser_gt #(.W(W), .INIT(1'b0), .SIGNED_CMP(1'b1)) u_cmp (
    .clk, .rst, .en(s0_run), .first(s0_first), .msw(s0_msw),
    .a(xcap[AW'(CTX_X0) + s0_j]), .b(d_word), .go(gt_live)
  );

  always_ff @(posedge clk) begin
    if (s0_run) d_q[s0_j[$clog2(AB_WORDS)-1:0]] <= d_word;
    if (s0_run && s0_msw) gt_q <= gt_live;
  end

  // ---------------- stage 1: sq = d * d ----------------
  logic [2*AB_WORDS*W-1:0]     sq_w;
  logic [Y_WORDS-1:0][W-1:0]   sq_q;

  pu_mul #(.IN_W(AB_WORDS*W)) u_mul (.a(d_q), .b(d_q), .p(sq_w));

  always_ff @(posedge clk) begin
    if (ce_i[1] && addr_i[1] == AW'(HDR_B0 + AB_WORDS - 1)) sq_q <= sq_w[Y_WORDS*W-1:0];
  end

  // ---------------- output stage: selection, addition, control ----------------
  logic [AW-1:0] oj;
  logic          o_sel, o_add, o_first, o_msw;
  logic [AW-1:0] o_xk, o_yk;         // word within the x and y fields
  logic [W-1:0]  yn_word, z_w;
  logic          viol_live;
  logic          yn_co;              // y wraps modulo 2^96

  always_comb begin
    oj      = addr_i[LAT];
    o_xk    = oj - AW'(CTX_X0);       // unsigned: wraps above the field
    o_yk    = oj - AW'(CTX_Y0);
    o_sel   = ce_i[LAT] && o_xk < AW'(X_WORDS);
    o_add   = ce_i[LAT] && o_yk < AW'(Y_WORDS);
    o_first = oj == AW'(CTX_Y0);
    o_msw   = oj == AW'(CTX_Y0 + Y_WORDS - 1);
  end

  pu_ser_add #(.W(W), .SUB(1'b0)) u_add (
    .clk, .rst, .en(o_add), .first(o_first),
    .a(xcap[oj]), .b(sq_q[o_yk[$clog2(Y_WORDS)-1:0]]), .s(yn_word), .co(yn_co)
  );

  pu_ser_gt #(.W(W), .INIT(1'b1), .SIGNED_CMP(1'b0)) u_limit (
    .clk, .rst, .en(o_add), .first(o_first), .msw(o_msw),
    .a(yn_word), .b(params_i[o_yk[$clog2(Y_WORDS)-1:0]]), .go(viol_live)
  );

  always_comb begin
    if (o_sel)      z_w = gt_q ? xcap[oj] : d_q[o_xk[$clog2(AB_WORDS)-1:0]];
    else if (o_add) z_w = yn_word;
    else            z_w = xcap[oj];
  end

  // Result register for the feedback route.
  logic [WORDS-1:0][W-1:0] res;
  always_ff @(posedge clk) begin
    if (rst)            res <= '0;
    else if (ce_i[LAT]) res[oj] <= z_w;
  end

  assign z_o    = ce_i[LAT] ? z_w : '0;
  assign ctrl_o = N_CTRL'(o_add && o_msw && viol_live);
  assign fb_o   = res[fb_addr_i];

endmodule
