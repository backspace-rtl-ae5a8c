// bs_top: BackSpace on-chip debug hardware around a circuit under debug.
//
// BackSpace reconstructs what a chip did before a crash by running it at full
// speed, stopping it, scanning out its state and a short signature of its
// history, and letting formal analysis compute the few states that can
// precede that state with that signature. Each candidate is then set as a
// breakpoint and the chip re-run; the candidate that is hit becomes the new
// crash state, and the process repeats one cycle further back.
//
// This module is the hardware half of that loop:
//   u_state  the CUD's N_STATE state flip-flops with full scan (bs_scan_reg);
//   u_bp     the maskable breakpoint on the whole state (bs_breakpoint);
//   u_sigc   signature creation, a fixed subset of N_MON state bits
//            (bs_sig_create);
//   u_sigb   signature collection, a TB_DEPTH-entry trace buffer that stops on
//            the breakpoint (bs_sig_collect);
//   u_ctrl   the command controller for reset / run / load / dump (bs_ctrl).
// The CUD's combinational logic is outside: it receives cud_state, cud_rst
// and cud_en and returns cud_next_state. cud_en tells it (and anything that
// talks to it) when its state advances; while cud_en is low the core is
// stopped.
//
// Host interface: see bs_ctrl for the commands and their timing. The signature
// buffer is read directly through sig_rd_addr / sig_rd_data (0 = newest), the
// state through the dump stream. After a run stopped by the breakpoint, the
// state is the matched one and the newest signature belongs to its predecessor.
//
// The block structure and default sizes (3007 state bits, 1276 monitored
// bits, one signature) follow the described processor system; the external
// interface is this design's own.
module bs_top
  import bs_pkg::*;
#(
  parameter int unsigned        N_STATE    = N_STATE_DEF,
  parameter int unsigned        N_MON      = N_MON_DEF,
  parameter int unsigned        TB_DEPTH   = TB_DEPTH_DEF,
  parameter int unsigned        CNT_W      = CNT_W_DEF,
  parameter int unsigned        RST_CYCLES = 4,
  parameter logic [N_STATE-1:0] MON_MASK   = {{(N_STATE - N_MON){1'b0}}, {N_MON{1'b1}}},
  localparam int unsigned       AW         = (TB_DEPTH > 1) ? $clog2(TB_DEPTH) : 1,
  localparam int unsigned       CW         = $clog2(TB_DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host commands
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  bs_cmd_e            cmd_op,
  input  logic [CNT_W-1:0]   cmd_arg,
  output logic               done,
  output logic               busy,
  output bs_stop_e           stop_reason,
  output logic [CNT_W-1:0]   cycle_count,
  // breakpoint CSR bits in
  input  logic               csr_valid,
  input  logic               csr_bit,
  output logic               csr_ready,
  // state dump out
  output logic               dump_valid,
  output logic               dump_bit,
  // signature read-out
  input  logic [AW-1:0]      sig_rd_addr,
  output logic [N_MON-1:0]   sig_rd_data,
  output logic [CW-1:0]      sig_count,
  output logic               sig_stopped,
  // circuit under debug
  output logic [N_STATE-1:0] cud_state,
  input  logic [N_STATE-1:0] cud_next_state,
  output logic               cud_rst,
  output logic               cud_en
);

  logic             scan_en, scan_in, scan_out;
  logic             bp_arm, bp_shift, bp_in, bp_hit;
  logic             sig_clear, sig_wr;
  logic [N_MON-1:0] sig;

  bs_scan_reg #(.N_STATE(N_STATE)) u_state (
    .clk      (clk),
    .func_en  (cud_en),
    .d        (cud_next_state),
    .scan_en  (scan_en),
    .scan_in  (scan_in),
    .q        (cud_state),
    .scan_out (scan_out)
  );

  bs_breakpoint #(.N_STATE(N_STATE)) u_bp (
    .clk       (clk),
    .rst_n     (rst_n),
    .csr_shift (bp_shift),
    .csr_in    (bp_in),
    .csr_out   (),
    .arm       (bp_arm),
    .state     (cud_state),
    .hit       (bp_hit)
  );

  bs_sig_create #(.N_STATE(N_STATE), .N_MON(N_MON), .MON_MASK(MON_MASK)) u_sigc (
    .state (cud_state),
    .sig   (sig)
  );

  bs_sig_collect #(.S_WIDTH(N_MON), .TB_DEPTH(TB_DEPTH)) u_sigb (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (sig_clear),
    .wr_en   (sig_wr),
    .stop    (bp_hit),
    .sig_in  (sig),
    .rd_addr (sig_rd_addr),
    .rd_data (sig_rd_data),
    .count   (sig_count),
    .stopped (sig_stopped)
  );

  bs_ctrl #(.N_STATE(N_STATE), .CNT_W(CNT_W), .RST_CYCLES(RST_CYCLES)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .cmd_valid    (cmd_valid),
    .cmd_ready    (cmd_ready),
    .cmd_op       (cmd_op),
    .cmd_arg      (cmd_arg),
    .done         (done),
    .busy         (busy),
    .stop_reason  (stop_reason),
    .cycle_count  (cycle_count),
    .csr_valid    (csr_valid),
    .csr_bit      (csr_bit),
    .csr_ready    (csr_ready),
    .dump_valid   (dump_valid),
    .dump_bit     (dump_bit),
    .cud_rst      (cud_rst),
    .cud_en       (cud_en),
    .scan_en      (scan_en),
    .scan_in      (scan_in),
    .scan_out     (scan_out),
    .bp_arm       (bp_arm),
    .bp_csr_shift (bp_shift),
    .bp_csr_in    (bp_in),
    .bp_hit       (bp_hit),
    .sig_clear    (sig_clear),
    .sig_wr       (sig_wr)
  );

endmodule
