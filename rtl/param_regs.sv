// Parameters and Debug registers of the FlowPU, reached from the host over
// the MI memory interface.
//
// Word map (word addresses, WORD_W-bit data):
//   0 .. N_WORDS-1            default context, read and write (to MUX)
//   N_WORDS .. N_WORDS+2      limit of the control operation, LSW first,
//                             read and write (PARAMS of the ALU)
//   16                        debug: frames updated by the ALU, read only
//   17                        debug: flow records exported, read only
//   18                        debug: contexts released by command, read only
// Other addresses read as 0. A write takes effect at the clock edge with
// mi_wr high; a read with mi_rd high returns mi_drd with mi_drdy one cycle
// later. mi_ardy is always high. The register map and MI timing are this
// design's choice; the block diagram names only the block and the port.
module param_regs
  import fpu_pkg::*;
#(
  parameter int unsigned MI_AW = 8
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [MI_AW-1:0]            mi_addr,
  input  logic [WORD_W-1:0]           mi_dwr,
  input  logic                        mi_wr,
  input  logic                        mi_rd,
  output logic                        mi_ardy,
  output logic [WORD_W-1:0]           mi_drd,
  output logic                        mi_drdy,
  input  logic                        ev_update_i,
  input  logic                        ev_export_i,
  input  logic                        ev_release_i,
  output logic [N_WORDS-1:0][WORD_W-1:0] defaults_o,
  output logic [Y_WORDS-1:0][WORD_W-1:0] limit_o
);
  localparam int unsigned DBG0 = 16;

  logic [2:0][WORD_W-1:0] dbg;

  assign mi_ardy = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      defaults_o <= '0;
      limit_o    <= '1;
      dbg        <= '0;
      mi_drd     <= '0;
      mi_drdy    <= 1'b0;
    end else begin
      if (mi_wr) begin
        for (int i = 0; i < N_WORDS; i++)
          if (mi_addr == MI_AW'(i)) defaults_o[i] <= mi_dwr;
        for (int i = 0; i < Y_WORDS; i++)
          if (mi_addr == MI_AW'(N_WORDS + i)) limit_o[i] <= mi_dwr;
      end
      if (ev_update_i)  dbg[0] <= dbg[0] + 1'b1;
      if (ev_export_i)  dbg[1] <= dbg[1] + 1'b1;
      if (ev_release_i) dbg[2] <= dbg[2] + 1'b1;
      mi_drdy <= mi_rd;
      if (mi_rd) begin
        mi_drd <= '0;
        for (int i = 0; i < N_WORDS; i++)
          if (mi_addr == MI_AW'(i)) mi_drd <= defaults_o[i];
        for (int i = 0; i < Y_WORDS; i++)
          if (mi_addr == MI_AW'(N_WORDS + i)) mi_drd <= limit_o[i];
        for (int i = 0; i < 3; i++)
          if (mi_addr == MI_AW'(DBG0 + i)) mi_drd <= dbg[i];
      end
    end
  end
endmodule
