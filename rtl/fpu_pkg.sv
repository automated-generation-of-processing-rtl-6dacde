// Shared types and constants of the Flow Processing Unit (FlowPU).
//
// The FlowPU updates a flow context with the fields of a packet header in a
// word-serial pipeline. A context frame and a header frame are each split into
// N_WORDS words of WORD_W bits and enter the unit side by side, one word per
// cycle, lowest address first. The frame layout below is the one this design
// uses for the worked example operations
//     x = max(x, a - b);   y += sqr(a - b);
// with x, a and b two words wide and y three words wide, as in the example
// data-flow graph, plus one word for the Application Decoder's result. The
// placement of fields in the frames, the word width and the command encoding
// are this design's own choices.
package fpu_pkg;

  // Width of one frame word.
  parameter int unsigned WORD_W   = 32;
  // Words per context/header frame.
  parameter int unsigned N_WORDS  = 6;

  // Field sizes in words (example operations).
  parameter int unsigned X_WORDS  = 2;
  parameter int unsigned Y_WORDS  = 3;
  parameter int unsigned AB_WORDS = 2;

  // Context frame (port X): word 0..1 = x (LSW first), word 2..4 = y,
  // word 5 = latest Application Decoder result (not touched by the ALU).
  parameter int unsigned CTX_X0   = 0;
  parameter int unsigned CTX_Y0   = 2;
  parameter int unsigned CTX_APP  = 5;
  // Header frame (port Y): word 0..1 = a, word 2..3 = b, words 4..5 unused.
  parameter int unsigned HDR_A0   = 0;
  parameter int unsigned HDR_B0   = 2;

  // Latency from an input word to the output word with the same address:
  // a - b and x > d finish with input word HDR_B0+1, so output word 0 (the
  // first word of max(x, a - b)) can leave one cycle later.
  parameter int unsigned PIPE_LEN = HDR_B0 + 2;
  // Shortest start-to-start distance of two frames that use the ALU: a
  // frame is N_WORDS cycles long, and the feedback route needs the previous
  // result word k one cycle before the new frame's word k.
  parameter int unsigned SPACING  = (N_WORDS > PIPE_LEN + 1) ? N_WORDS : PIPE_LEN + 1;
  // Output word at which the control operation's result is complete.
  parameter int unsigned CTRL_ADDR = CTX_Y0 + Y_WORDS - 1;

  // Number of control operations the ALU evaluates.
  parameter int unsigned N_CTRL   = 1;

  // Commands carried on CTRL with the first word of a frame.
  typedef enum logic [2:0] {
    CMD_NOP         = 3'd0,  // no operation, frame is ignored
    CMD_UPDATE      = 3'd1,  // update the context delivered on CONTEXT
    CMD_UPDATE_CUR  = 3'd2,  // update the context just produced by the ALU
    CMD_CREATE      = 3'd3,  // start a new context from the default values
    CMD_RELEASE     = 3'd4,  // export the context as a flow record, no update
    CMD_RELEASE_NEW = 3'd5   // export the context, then start a new one
  } cmd_e;

  // State of a flow context as written back to the Endpoint.
  typedef enum logic [1:0] {
    CST_EMPTY    = 2'd0,  // no context stored (released or exported)
    CST_VALID    = 2'd1   // context holds an updated record
  } ctx_state_e;

  // Decoded command (outputs of the Control Decoder).
  typedef struct packed {
    logic use_current;  // take the context from the ALU feedback route
    logic first;        // take the context from the default values
    logic release_ctx;  // send the incoming context to the export FIFO
    logic void_op;      // frame is not processed by the ALU
  } dec_t;

  // Forward half of a FrameLink port (active-high in this design).
  typedef struct packed {
    logic              sof;
    logic              eof;
    logic [WORD_W-1:0] data;
  } fl_t;

endpackage
