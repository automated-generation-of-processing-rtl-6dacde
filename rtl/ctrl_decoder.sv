// Control Decoder of the FlowPU.
//
// Decodes the command that the Endpoint sends on CTRL with the first word of
// every frame into the four select lines of the unit: use_current (take the
// context from the ALU feedback route), first (take the default context),
// release (copy the incoming context to the export FIFO) and void (do not
// run the ALU on this frame). The command is sampled when ce_i is high at
// word address 0 and is held for the remaining words of the frame, so the
// outputs are valid, combinationally, for every word of the frame.
// The names of the four lines follow the FlowPU block diagram; the command
// codes (fpu_pkg::cmd_e) are this design's own.
module ctrl_decoder
  import fpu_pkg::*;
#(
  parameter int unsigned AW = (N_WORDS > 1) ? $clog2(N_WORDS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ce_i,
  input  logic [AW-1:0] addr_i,
  input  logic [2:0]    ctrl_i,
  output dec_t          dec_o
);
  dec_t dec_live, dec_q;

  always_comb begin
    dec_live = '0;
    unique case (ctrl_i)
      CMD_NOP:         dec_live.void_op     = 1'b1;
      CMD_UPDATE:      ;
      CMD_UPDATE_CUR:  dec_live.use_current = 1'b1;
      CMD_CREATE:      dec_live.first       = 1'b1;
      CMD_RELEASE:     begin dec_live.release_ctx = 1'b1; dec_live.void_op = 1'b1; end
      CMD_RELEASE_NEW: begin dec_live.release_ctx = 1'b1; dec_live.first   = 1'b1; end
      default:         dec_live.void_op     = 1'b1;
    endcase
  end

  wire first_word = ce_i && (addr_i == '0);

  always_ff @(posedge clk) begin
    if (rst)             dec_q <= dec_t'(4'b0001);
    else if (first_word) dec_q <= dec_live;
  end

  assign dec_o = first_word ? dec_live : dec_q;
endmodule
