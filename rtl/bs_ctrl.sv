// bs_ctrl: debug command controller.
//
// Turns the host's commands into actions on the circuit under debug (CUD) and
// on the debug circuits:
//   CMD_RESET   holds the CUD reset for RST_CYCLES clocks (the CUD clock runs
//               so its reset logic takes effect), clears the cycle count and
//               empties the trace buffer.
//   CMD_RUN     runs the CUD until the cycle count since reset reaches
//               cmd_arg (the crash point of a run), breakpoint disarmed.
//   CMD_RUN_BP  runs as CMD_RUN with the breakpoint armed: the run stops on
//               the first clock at which the state matches, or at cmd_arg,
//               whichever comes first (cmd_arg then acts as a time-out).
//   CMD_LOAD    accepts 2*N_STATE breakpoint CSR bits on the csr_valid /
//               csr_ready stream and shifts them into the breakpoint circuit.
//   CMD_DUMP    shifts the CUD state out of its scan chain, one bit per clock
//               on dump_bit with dump_valid high, MSB first; the chain is fed
//               back into itself so the state is unchanged afterwards.
// A command is taken when cmd_valid and cmd_ready are both high; cmd_ready is
// high only in the idle state, so one command runs at a time. done pulses for
// one clock when a command has finished.
//
// Timing: a run advances the CUD one state per clock (cud_en high). The
// breakpoint signal is combinational, so the CUD is frozen in the very cycle
// its state matches: the matching state stays in the flip-flops and the trace
// buffer keeps the signature of its predecessor. cycle_count is the number of
// CUD clocks since the end of the last reset; stop_reason tells whether the
// last run ended at its target or at the breakpoint.
//
// The command set (reset, run, load, dump) and stopping at a cycle target
// follow the described debug flow, where these steps were carried out by a
// supervising processor; doing them in one hardware controller, the encoding,
// the handshakes and the reset length are this design's choices.
module bs_ctrl
  import bs_pkg::*;
#(
  parameter int unsigned N_STATE    = 3007,
  parameter int unsigned CNT_W      = 32,
  parameter int unsigned RST_CYCLES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // host command interface
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  bs_cmd_e          cmd_op,
  input  logic [CNT_W-1:0] cmd_arg,
  output logic             done,
  output logic             busy,
  output bs_stop_e         stop_reason,
  output logic [CNT_W-1:0] cycle_count,
  // breakpoint CSR bit stream from the host (CMD_LOAD)
  input  logic             csr_valid,
  input  logic             csr_bit,
  output logic             csr_ready,
  // state dump stream to the host (CMD_DUMP)
  output logic             dump_valid,
  output logic             dump_bit,
  // circuit under debug and its scan chain
  output logic             cud_rst,
  output logic             cud_en,
  output logic             scan_en,
  output logic             scan_in,
  input  logic             scan_out,
  // breakpoint circuit
  output logic             bp_arm,
  output logic             bp_csr_shift,
  output logic             bp_csr_in,
  input  logic             bp_hit,
  // signature collection
  output logic             sig_clear,
  output logic             sig_wr
);

  localparam int unsigned BIT_W = $clog2(2 * N_STATE + 1);

  bs_state_e        st;
  logic [BIT_W-1:0] nbits;      // bits moved (load, dump) or reset clocks
  logic [CNT_W-1:0] target;
  logic             armed;

  logic at_target;
  assign at_target = (cycle_count >= target);

  always_comb begin
    cmd_ready    = (st == ST_IDLE);
    busy         = (st != ST_IDLE);
    cud_rst      = (st == ST_RESET);
    bp_arm       = (st == ST_RUN) && armed;
    cud_en       = (st == ST_RESET) || ((st == ST_RUN) && !bp_hit && !at_target);
    sig_wr       = (st == ST_RUN) && !bp_hit && !at_target;
    sig_clear    = (st == ST_RESET);
    csr_ready    = (st == ST_LOAD);
    bp_csr_shift = (st == ST_LOAD) && csr_valid;
    bp_csr_in    = csr_bit;
    scan_en      = (st == ST_DUMP);
    scan_in      = scan_out;
    dump_valid   = (st == ST_DUMP);
    dump_bit     = scan_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= ST_IDLE;
      nbits       <= '0;
      target      <= '0;
      armed       <= 1'b0;
      done        <= 1'b0;
      stop_reason <= STOP_NONE;
      cycle_count <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        ST_IDLE: begin
          if (cmd_valid) begin
            nbits <= '0;
            unique case (cmd_op)
              CMD_RESET:  st <= ST_RESET;
              CMD_RUN,
              CMD_RUN_BP: begin
                st     <= ST_RUN;
                target <= cmd_arg;
                armed  <= (cmd_op == CMD_RUN_BP);
              end
              CMD_LOAD:   st <= ST_LOAD;
              CMD_DUMP:   st <= ST_DUMP;
              default:    done <= 1'b1;   // CMD_NOP and unused codes
            endcase
          end
        end
        ST_RESET: begin
          nbits <= nbits + 1'b1;
          if (nbits == BIT_W'(RST_CYCLES - 1)) begin
            st          <= ST_IDLE;
            done        <= 1'b1;
            cycle_count <= '0;
            stop_reason <= STOP_NONE;
          end
        end
        ST_RUN: begin
          if (bp_hit) begin
            st          <= ST_IDLE;
            done        <= 1'b1;
            stop_reason <= STOP_BREAK;
          end else if (at_target) begin
            st          <= ST_IDLE;
            done        <= 1'b1;
            stop_reason <= STOP_LIMIT;
          end else begin
            cycle_count <= cycle_count + 1'b1;
          end
        end
        ST_LOAD: begin
          if (csr_valid) begin
            nbits <= nbits + 1'b1;
            if (nbits == BIT_W'(2 * N_STATE - 1)) begin
              st   <= ST_IDLE;
              done <= 1'b1;
            end
          end
        end
        ST_DUMP: begin
          nbits <= nbits + 1'b1;
          if (nbits == BIT_W'(N_STATE - 1)) begin
            st   <= ST_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  // The CUD is never clocked functionally and shifted in the same cycle.
  a_scan_xor_run: assert property (@(posedge clk) disable iff (!rst_n) !(scan_en && cud_en));
  // The breakpoint can only fire during an armed run.
  a_hit_in_run: assert property (@(posedge clk) disable iff (!rst_n) bp_hit |-> (st == ST_RUN && armed));
  // A run never passes its cycle target.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) (st == ST_RUN) |-> !(cud_en && at_target));

endmodule
