// tb_bs_top: end-to-end test of the BackSpace debug hardware at full size.
//
// The circuit under debug is a deterministic stand-in written here: its
// N_STATE-bit state holds a 16-bit cycle counter in the low bits and a
// shift register with feedback in the rest, so no state repeats within a
// test. The testbench plays the host's part of the BackSpace loop:
//   1. reset, run to a crash cycle, dump the state, read the signature;
//   2. for each step back: form the candidate predecessor states (the true
//      one, known from a reference run, and a decoy that agrees with the
//      signature but differs in an unmonitored bit), load each as a
//      breakpoint, reset and re-run; the decoy must end at its time-out, the
//      true one must stop at the breakpoint one cycle earlier than the last
//      crash state, with the right state and signature;
//   3. a masked partial breakpoint on the counter bits only, and an exact
//      breakpoint that is ignored by a plain (disarmed) run.
// Every mechanism is counted and must occur at least once.
module tb_bs_top;
  import bs_pkg::*;
  localparam int unsigned N  = N_STATE_DEF;
  localparam int unsigned NM = N_MON_DEF;
  localparam int unsigned CW = CNT_W_DEF;
  localparam int unsigned CRASH = 60;    // cycle of the first crash state
  localparam int unsigned STEPS = 6;     // cycles to back up
  localparam int unsigned HMAX  = 128;

  logic            clk = 1'b0;
  logic            rst_n, cmd_valid, cmd_ready, done, busy;
  bs_cmd_e         cmd_op;
  logic [CW-1:0]   cmd_arg, cycle_count;
  bs_stop_e        stop_reason;
  logic            csr_valid, csr_bit, csr_ready, dump_valid, dump_bit;
  logic [0:0]      sig_rd_addr;
  logic [NM-1:0]   sig_rd_data;
  logic [0:0]      sig_count;
  logic            sig_stopped;
  logic [N-1:0]    cud_state, cud_next_state;
  logic            cud_rst, cud_en;
  int unsigned     checks = 0, failures = 0;

  bs_top dut (.*);

  always #5 clk = ~clk;

  // ---- stand-in circuit under debug ----
  localparam logic [N-1:0] RESET_STATE = {{(N - 17){1'b0}}, 1'b1, 16'h0000};
  function automatic logic [N-1:0] cud_step(input logic [N-1:0] s);
    logic [N-17:0] up;
    logic [15:0]   cnt;
    cnt = s[15:0] + 16'd1;
    up  = s[N-1:16];
    up  = {up[N-18:0], up[N-17] ^ s[0] ^ s[3]};
    return {up, cnt};
  endfunction
  assign cud_next_state = cud_rst ? RESET_STATE : cud_step(cud_state);

  // reference history: hist[k] is the state after k run cycles
  logic [N-1:0] hist [HMAX];

  // ---- mechanism counters ----
  int n_reset, n_limit, n_break, n_decoy, n_masked, n_disarmed, n_load, n_dump, n_sigread;
  int en_cycles;
  always_ff @(posedge clk) if (cud_en && !cud_rst) en_cycles <= en_cycles + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic command(input bs_cmd_e op, input logic [CW-1:0] arg);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_arg = arg;
    @(negedge clk);
    cmd_valid = 0;
    if (op != CMD_LOAD) while (!done) @(negedge clk);
  endtask

  task automatic do_reset();
    command(CMD_RESET, '0);
    en_cycles = 0;
    n_reset++;
  endtask

  task automatic load_bp(input logic [N-1:0] tgt, input logic [N-1:0] msk);
    logic [2*N-1:0] bits;
    bits = {msk, tgt};
    command(CMD_LOAD, '0);
    for (int i = 2 * N - 1; i >= 0; i--) begin
      csr_valid = 1; csr_bit = bits[i];
      @(negedge clk);
    end
    csr_valid = 0;
    check(!busy, "load finished after 2*N_STATE bits");
    n_load++;
  endtask

  // dump stream capture, MSB first
  logic [N-1:0] dump_sr;
  int           dump_n;
  always_ff @(posedge clk) if (dump_valid) begin
    dump_sr <= {dump_sr[N-2:0], dump_bit};
    dump_n  <= dump_n + 1;
  end

  task automatic dump_check(input logic [N-1:0] expect_s, input string what);
    int n0;
    n0 = dump_n;
    command(CMD_DUMP, '0);
    n_dump++;
    check(dump_n - n0 == N, "dump length");
    check(dump_sr == expect_s, what);
    check(cud_state == expect_s, "state unchanged by dump");
  endtask

  task automatic sig_check(input logic [N-1:0] pred, input string what);
    sig_rd_addr = '0; #1;
    check(sig_count == 1, "one signature held");
    check(sig_rd_data == pred[NM-1:0], what);
    n_sigread++;
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] decoy, msk;
    int unsigned  c;
    rst_n = 0; cmd_valid = 0; cmd_op = CMD_NOP; cmd_arg = '0;
    csr_valid = 0; csr_bit = 0; sig_rd_addr = '0;
    dump_n = 0; en_cycles = 0;
    n_reset = 0; n_limit = 0; n_break = 0; n_decoy = 0; n_masked = 0;
    n_disarmed = 0; n_load = 0; n_dump = 0; n_sigread = 0;
    hist[0] = RESET_STATE;
    for (int k = 1; k < HMAX; k++) hist[k] = cud_step(hist[k-1]);
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. crash run
    do_reset();
    check(cud_state == hist[0] && cycle_count == 0, "reset state");
    command(CMD_RUN, CW'(CRASH));
    check(stop_reason == STOP_LIMIT && cycle_count == CRASH && en_cycles == CRASH,
          "crash run stops at its cycle target");
    n_limit++;
    dump_check(hist[CRASH], "crash state dumped");
    dump_check(hist[CRASH], "second dump gives the same state");
    sig_check(hist[CRASH-1], "crash signature is the predecessor's monitored bits");

    // 2. backspace
    c = CRASH;
    for (int step = 0; step < STEPS; step++) begin
      // decoy: same signature, one unmonitored bit different; never reached
      decoy = hist[c-1];
      decoy[NM + step] = ~decoy[NM + step];
      check(decoy[NM-1:0] == sig_rd_data, "decoy agrees with the signature");
      do_reset();
      load_bp(decoy, '0);
      command(CMD_RUN_BP, CW'(c + 5));
      check(stop_reason == STOP_LIMIT && cycle_count == c + 5, "decoy candidate times out");
      n_decoy++; n_limit++;
      // true predecessor
      do_reset();
      load_bp(hist[c-1], '0);
      command(CMD_RUN_BP, CW'(c + 5));
      check(stop_reason == STOP_BREAK, "true candidate hits the breakpoint");
      check(cycle_count == c - 1 && en_cycles == c - 1, "breakpoint one cycle before the last crash");
      check(sig_stopped, "signature collection stopped by the breakpoint");
      n_break++;
      dump_check(hist[c-1], "new crash state dumped");
      if (c >= 2) sig_check(hist[c-2], "new signature");
      c = c - 1;
    end
    check(c == CRASH - STEPS, "backed up the planned number of cycles");

    // 3a. masked breakpoint on the counter bits only
    msk = '1;
    msk[15:0] = '0;
    do_reset();
    load_bp({{(N - 16){1'b0}}, 16'd25}, msk);
    command(CMD_RUN_BP, 100);
    check(stop_reason == STOP_BREAK && cycle_count == 25, "masked match on counter bits");
    dump_check(hist[25], "state at masked match");
    n_masked++; n_break++;

    // 3b. the same exact breakpoint is ignored by a plain run
    load_bp(hist[10], '0);
    do_reset();
    command(CMD_RUN, 30);
    check(stop_reason == STOP_LIMIT && cycle_count == 30, "plain run ignores the breakpoint");
    n_disarmed++; n_limit++;
    command(CMD_RUN_BP, 40);
    check(stop_reason == STOP_LIMIT && cycle_count == 40, "state already past the target is not hit");
    n_limit++;

    // every mechanism occurred
    check(n_reset > 0,    "mechanism: reset");
    check(n_limit > 0,    "mechanism: stop at cycle target");
    check(n_break > 0,    "mechanism: stop at breakpoint");
    check(n_decoy > 0,    "mechanism: candidate not reached");
    check(n_masked > 0,   "mechanism: masked partial match");
    check(n_disarmed > 0, "mechanism: disarmed breakpoint");
    check(n_load > 0,     "mechanism: breakpoint load");
    check(n_dump > 0,     "mechanism: state dump");
    check(n_sigread > 0,  "mechanism: signature read-out");
    $display("mechanisms: reset=%0d limit=%0d break=%0d decoy=%0d masked=%0d disarmed=%0d load=%0d dump=%0d sigread=%0d",
             n_reset, n_limit, n_break, n_decoy, n_masked, n_disarmed, n_load, n_dump, n_sigread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
