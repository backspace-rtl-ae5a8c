// bs_pkg: types and constants shared by the BackSpace debug hardware.
//
// The debug hardware is driven by a host (the debug manager) through a small
// command set: reset the circuit under debug (CUD), run it to a cycle target
// with or without the breakpoint armed, load the breakpoint registers by
// shifting in their bits, and dump the CUD state through its scan chain.
// The command names follow the reset / run / load / dump commands of the
// manager's API; their binary encoding is this design's own choice.
package bs_pkg;

  // Host commands accepted by bs_ctrl.
  typedef enum logic [2:0] {
    CMD_NOP    = 3'd0,  // no action, completes at once
    CMD_RESET  = 3'd1,  // hold the CUD in reset, clear cycle count and trace buffer
    CMD_RUN    = 3'd2,  // run until the cycle count reaches the argument
    CMD_RUN_BP = 3'd3,  // as CMD_RUN, but also stop when the breakpoint matches
    CMD_LOAD   = 3'd4,  // shift 2*N_STATE breakpoint CSR bits in from the host
    CMD_DUMP   = 3'd5   // shift the CUD state out (MSB first), restoring it
  } bs_cmd_e;

  // Why the last run stopped.
  typedef enum logic [1:0] {
    STOP_NONE  = 2'd0,  // no run since reset
    STOP_LIMIT = 2'd1,  // cycle target reached
    STOP_BREAK = 2'd2   // breakpoint matched
  } bs_stop_e;

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_RESET = 3'd1,
    ST_RUN   = 3'd2,
    ST_LOAD  = 3'd3,
    ST_DUMP  = 3'd4
  } bs_state_e;

  // Default sizes of the evaluated system: a 3007-latch processor core with
  // 1276 of its latches monitored as the signature, one cycle of signature.
  localparam int unsigned N_STATE_DEF  = 3007;
  localparam int unsigned N_MON_DEF    = 1276;
  localparam int unsigned TB_DEPTH_DEF = 1;
  localparam int unsigned CNT_W_DEF    = 32;

endpackage
