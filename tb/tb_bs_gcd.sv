// tb_bs_gcd: BackSpace of a running GCD computation, at full size.
//
// The circuit under debug is a stand-in for a processor running Euclid's
// algorithm by repeated subtraction: two 32-bit registers a and b sit in the
// core state at bits A_LO.. and A_LO+32.., every other state bit is zero, and
// each clock the larger register is reduced by the smaller one until they are
// equal. Only a[0] lies inside the monitored bits (the signature is the lowest
// N_MON state bits), so the signature is weak and candidates often survive it.
//
// The testbench plays the host software. It runs the core into a crash state
// CRASH cycles after reset, then backs up BACK cycles. For each step it
// computes the pre-image of the current state by hand (the predecessor is
// either (a+b, b) or (a, a+b)), drops candidates that disagree with the
// read-out signature, and tries the survivors as breakpoints in random order,
// with a reset and re-run for each. A candidate that is not reached ends at
// its time-out and counts as a retry. The state that is hit becomes the next
// crash state. Every reconstructed state is compared with an independent
// forward run of the algorithm, and each hit must come exactly one cycle
// earlier than the previous crash state.
module tb_bs_gcd;
  import bs_pkg::*;
  localparam int unsigned N     = N_STATE_DEF;
  localparam int unsigned NM    = N_MON_DEF;
  localparam int unsigned CW    = CNT_W_DEF;
  localparam int unsigned A_LO  = NM - 1;       // a[0] is the only monitored bit
  localparam int unsigned B_LO  = A_LO + 32;
  localparam logic [31:0] A0    = 32'd400_002;
  localparam logic [31:0] B0    = 32'd10;
  localparam int unsigned CRASH = 30_000;
  localparam int unsigned BACK  = 500;

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

  function automatic logic [N-1:0] pack(input logic [31:0] a, input logic [31:0] b);
    logic [N-1:0] s;
    s = '0;
    s[A_LO +: 32] = a;
    s[B_LO +: 32] = b;
    return s;
  endfunction

  // stand-in core: one subtraction step per clock
  logic [31:0] ca, cb;
  assign ca = cud_state[A_LO +: 32];
  assign cb = cud_state[B_LO +: 32];
  always_comb begin
    if (cud_rst)      cud_next_state = pack(A0, B0);
    else if (ca > cb) cud_next_state = pack(ca - cb, cb);
    else if (cb > ca) cud_next_state = pack(ca, cb - ca);
    else              cud_next_state = cud_state;
  end

  // independent forward run: ga[k], gb[k] after k clocks
  logic [31:0] ga [CRASH + 1];
  logic [31:0] gb [CRASH + 1];

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

  task automatic load_exact(input logic [N-1:0] tgt);
    command(CMD_LOAD, '0);
    for (int i = N - 1; i >= 0; i--) begin   // mask: all zero
      csr_valid = 1; csr_bit = 1'b0;
      @(negedge clk);
    end
    for (int i = N - 1; i >= 0; i--) begin   // target, LSB last
      csr_valid = 1; csr_bit = tgt[i];
      @(negedge clk);
    end
    csr_valid = 0;
  endtask

  logic [N-1:0] dump_sr;
  always_ff @(posedge clk) if (dump_valid) dump_sr <= {dump_sr[N-2:0], dump_bit};

  task automatic dump_state(output logic [31:0] a, output logic [31:0] b);
    command(CMD_DUMP, '0);
    a = dump_sr[A_LO +: 32];
    b = dump_sr[B_LO +: 32];
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0]  a, b, da, db;
    logic [N-1:0] cand [2];
    int           ncand, size_hist [3], retries, runs, c, found;
    rst_n = 0; cmd_valid = 0; cmd_op = CMD_NOP; cmd_arg = '0;
    csr_valid = 0; csr_bit = 0; sig_rd_addr = '0;
    size_hist = '{0, 0, 0}; retries = 0; runs = 0;
    ga[0] = A0; gb[0] = B0;
    for (int k = 1; k <= CRASH; k++) begin
      ga[k] = (ga[k-1] > gb[k-1]) ? ga[k-1] - gb[k-1] : ga[k-1];
      gb[k] = (gb[k-1] > ga[k-1]) ? gb[k-1] - ga[k-1] : gb[k-1];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // crash run
    command(CMD_RESET, '0);
    command(CMD_RUN, CW'(CRASH));
    runs++;
    check(stop_reason == STOP_LIMIT && cycle_count == CRASH, "crash run stopped at its target");
    dump_state(a, b);
    check(a == ga[CRASH] && b == gb[CRASH], "crash state");
    c = CRASH;

    for (int step = 0; step < BACK; step++) begin
      // pre-image of (a, b), filtered by the signature
      ncand = 0;
      if (a > 0 && pack(a + b, b)[NM-1:0] == sig_rd_data) begin
        cand[ncand] = pack(a + b, b); ncand++;
      end
      if (b > 0 && pack(a, a + b)[NM-1:0] == sig_rd_data) begin
        cand[ncand] = pack(a, a + b); ncand++;
      end
      size_hist[ncand]++;
      check(ncand > 0, "pre-image not empty");
      if (ncand == 2 && $urandom_range(1) == 1) begin
        logic [N-1:0] t;
        t = cand[0]; cand[0] = cand[1]; cand[1] = t;
      end
      found = 0;
      for (int k = 0; k < ncand && !found; k++) begin
        command(CMD_RESET, '0);
        load_exact(cand[k]);
        command(CMD_RUN_BP, CW'(c + 2));
        runs++;
        if (stop_reason == STOP_BREAK) begin
          found = 1;
          check(cycle_count == c - 1, "breakpoint hit one cycle before the crash state");
        end else begin
          retries++;
          check(cycle_count == c + 2, "unreached candidate ends at its time-out");
        end
      end
      check(found == 1, "one candidate is reached");
      dump_state(da, db);
      c = c - 1;
      check(da == ga[c] && db == gb[c], "reconstructed state matches the forward run");
      a = da; b = db;
    end

    $display("backed up %0d cycles from cycle %0d: chip runs %0d, retries %0d, pre-image sizes after signature: 1 x%0d, 2 x%0d",
             BACK, CRASH, runs, retries, size_hist[1], size_hist[2]);
    check(retries > 0, "mechanism: candidate not reached");
    check(size_hist[2] > 0, "mechanism: signature leaves two candidates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
