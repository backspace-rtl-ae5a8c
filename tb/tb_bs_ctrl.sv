// tb_bs_ctrl: self-checking test of the debug command controller.
// The controller is connected to a small reference scan chain and a
// breakpoint stand-in driven by the testbench. Checked: reset length,
// runs that stop exactly at the cycle target, armed runs that stop at the
// breakpoint, a disarmed breakpoint, the number of CSR bits taken by a load,
// and a dump that streams the state MSB first and leaves it unchanged.
module tb_bs_ctrl;
  import bs_pkg::*;
  localparam int unsigned N = 12, CW = 16, RC = 3;

  logic          clk = 1'b0;
  logic          rst_n, cmd_valid, cmd_ready, done, busy;
  bs_cmd_e       cmd_op;
  logic [CW-1:0] cmd_arg, cycle_count;
  bs_stop_e      stop_reason;
  logic          csr_valid, csr_bit, csr_ready, dump_valid, dump_bit;
  logic          cud_rst, cud_en, scan_en, scan_in, scan_out;
  logic          bp_arm, bp_csr_shift, bp_csr_in, bp_hit, sig_clear, sig_wr;
  int unsigned   checks = 0, failures = 0;

  bs_ctrl #(.N_STATE(N), .CNT_W(CW), .RST_CYCLES(RC)) dut (.*);

  always #5 clk = ~clk;

  // Reference CUD: an N-bit counter with a scan chain.
  logic [N-1:0] st;
  int           hit_at;        // cycle count at which the stand-in breakpoint fires
  int           en_cycles, rst_cycles, shift_cycles, sigwr_cycles, clr_cycles;
  logic [N-1:0] shifted_bits;
  always_ff @(posedge clk) begin
    if (scan_en) st <= {st[N-2:0], scan_in};
    else if (cud_en) st <= cud_rst ? '0 : st + 1'b1;
    if (cud_en && !cud_rst) en_cycles <= en_cycles + 1;
    if (cud_rst) rst_cycles <= rst_cycles + 1;
    if (bp_csr_shift) shift_cycles <= shift_cycles + 1;
    if (sig_wr) sigwr_cycles <= sigwr_cycles + 1;
    if (sig_clear) clr_cycles <= clr_cycles + 1;
  end
  assign scan_out = st[N-1];
  assign bp_hit   = bp_arm && (int'(st) == hit_at);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic issue(input bs_cmd_e op, input logic [CW-1:0] arg);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_arg = arg;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic wait_done();
    while (!done) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] dumped;
    rst_n = 0; cmd_valid = 0; cmd_op = CMD_NOP; cmd_arg = '0;
    csr_valid = 0; csr_bit = 0; hit_at = -1; st = 'h5a5;
    en_cycles = 0; rst_cycles = 0; shift_cycles = 0; sigwr_cycles = 0; clr_cycles = 0;
    @(negedge clk); rst_n = 1;
    check(cmd_ready && !busy, "idle after reset");

    // reset command
    issue(CMD_RESET, '0); wait_done();
    check(rst_cycles == RC && clr_cycles == RC, "reset held for RST_CYCLES clocks");
    check(st == '0 && cycle_count == 0 && stop_reason == STOP_NONE, "state after reset");

    // run to a cycle target
    issue(CMD_RUN, 17); wait_done();
    check(en_cycles == 17 && sigwr_cycles == 17, "run advances exactly to the target");
    check(cycle_count == 17 && st == 17 && stop_reason == STOP_LIMIT, "run stop status");
    // a further run continues from there
    issue(CMD_RUN, 20); wait_done();
    check(en_cycles == 20 && cycle_count == 20 && st == 20, "run continues to a later target");
    // a target already passed stops at once
    issue(CMD_RUN, 5); wait_done();
    check(en_cycles == 20 && stop_reason == STOP_LIMIT, "passed target stops at once");

    // disarmed breakpoint does not stop a plain run
    issue(CMD_RESET, '0); wait_done();
    en_cycles = 0; hit_at = 9;
    issue(CMD_RUN, 15); wait_done();
    check(en_cycles == 15 && stop_reason == STOP_LIMIT, "breakpoint ignored in plain run");

    // armed run stops at the breakpoint and holds the matching state
    issue(CMD_RESET, '0); wait_done();
    en_cycles = 0; sigwr_cycles = 0; hit_at = 11;
    issue(CMD_RUN_BP, 40); wait_done();
    check(en_cycles == 11 && sigwr_cycles == 11 && st == 11, "stopped in the matching state");
    check(stop_reason == STOP_BREAK && cycle_count == 11, "break status");
    // armed run that never matches ends at its time-out
    issue(CMD_RESET, '0); wait_done();
    en_cycles = 0; hit_at = 100;
    issue(CMD_RUN_BP, 30); wait_done();
    check(en_cycles == 30 && stop_reason == STOP_LIMIT, "time-out without match");

    // load: exactly 2N CSR bits are taken, with gaps in the stream
    issue(CMD_LOAD, '0);
    for (int i = 0; i < 2 * N; ) begin
      csr_valid = 1'($urandom);
      csr_bit = 1'($urandom);
      check(csr_ready, "csr_ready during load");
      @(negedge clk);
      if (csr_valid) i++;
    end
    csr_valid = 0;
    check(shift_cycles == 2 * N && !busy, "load takes 2*N_STATE bits");

    // dump: MSB first, state unchanged afterwards
    issue(CMD_DUMP, '0);
    for (int i = N - 1; i >= 0; i--) begin
      while (!dump_valid) @(negedge clk);
      dumped[i] = dump_bit;
      @(negedge clk);
    end
    check(dumped == 30, "dumped state");
    check(st == 30 && !dump_valid, "state restored after dump");
    check(cud_en == 0, "core stopped while idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
