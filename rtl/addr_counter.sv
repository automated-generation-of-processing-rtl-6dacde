// Address Counter of the FlowPU.
//
// Gives every stage of the processing pipeline the address of the frame word
// it holds, so that more than one frame can be in the pipeline at a time.
// Words of a frame arrive one per cycle with ce_i high, lowest address first;
// the counter numbers them 0 .. N_WORDS-1 and wraps to 0 after the last one.
// Stage 0 is the word now at the input (combinational from the counter);
// stage s is that address and clock enable delayed by s cycles in a shift
// register. The Masking Unit and the output of the ALU use stage PIPE_LEN.
// The counter restarts at 0 on reset. The stage taps are this design's
// interpretation of "an address for every stage of the pipeline".
module addr_counter
  import fpu_pkg::*;
#(
  parameter int unsigned WORDS  = N_WORDS,
  parameter int unsigned STAGES = PIPE_LEN,
  parameter int unsigned AW     = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       ce_i,
  output logic [STAGES:0]            ce_o,
  output logic [STAGES:0][AW-1:0]    addr_o,
  output logic                       last_o   // stage-0 word is the last of its frame
);
  logic [AW-1:0]       cnt;
  logic [STAGES:1]          ce_q;
  logic [STAGES:1][AW-1:0]  addr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      ce_q   <= '0;
      addr_q <= '0;
    end else begin
      if (ce_i) cnt <= (cnt == AW'(WORDS - 1)) ? '0 : cnt + 1'b1;
      ce_q[1]   <= ce_i;
      addr_q[1] <= cnt;
      for (int s = 2; s <= STAGES; s++) begin
        ce_q[s]   <= ce_q[s-1];
        addr_q[s] <= addr_q[s-1];
      end
    end
  end

  always_comb begin
    ce_o[0]   = ce_i;
    addr_o[0] = cnt;
    for (int s = 1; s <= STAGES; s++) begin
      ce_o[s]   = ce_q[s];
      addr_o[s] = addr_q[s];
    end
  end

  assign last_o = ce_i && (cnt == AW'(WORDS - 1));
endmodule
