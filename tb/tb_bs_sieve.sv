// tb_bs_sieve: BackSpace of a running Sieve of Eratosthenes, at full size.
//
// The circuit under debug is a stand-in for a processor running the sieve:
// F flag bits (1 = still possibly prime) and the loop registers i and j. Each
// clock either marks one multiple (flag[j] <= 0, j <= j + i) or, once j has
// passed the array, moves on to i + 1, starting at 2(i+1) if i+1 is still
// flagged and skipping it otherwise. It stops when i reaches F/2.
// i, j and the done bit lie in the monitored bits; the flags do not.
//
// The testbench plays the host software. From the crash state it works out
// each pre-image by enumeration: the signature gives the predecessor's i and
// j, and the one flag a marking step may have cleared can have been 0 or 1
// before, so a marking step has two candidates and an advance step one. Each
// candidate is kept only if one step of the algorithm from it gives the
// current state and it agrees with the signature. Survivors are tried as
// breakpoints in random order, with a reset and re-run each. Every
// reconstructed state is checked against an independent forward run, and
// each hit must come exactly one cycle earlier than the previous one.
module tb_bs_sieve;
  import bs_pkg::*;
  localparam int unsigned N     = N_STATE_DEF;
  localparam int unsigned NM    = N_MON_DEF;
  localparam int unsigned CW    = CNT_W_DEF;
  localparam int unsigned F     = 1600;       // flags, in unmonitored bits
  localparam int unsigned FL    = NM;         // flag[0] position
  localparam int unsigned I_LO  = 0;          // i, monitored
  localparam int unsigned J_LO  = 16;         // j, monitored
  localparam int unsigned D_BIT = 32;         // done, monitored
  localparam int unsigned CRASH = 3_000;
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

  function automatic logic [N-1:0] reset_state();
    logic [N-1:0] s;
    s = '0;
    s[FL +: F]     = '1;
    s[I_LO +: 16]  = 16'd2;
    s[J_LO +: 16]  = 16'd4;
    return s;
  endfunction

  // one step of the sieve
  function automatic logic [N-1:0] step(input logic [N-1:0] s);
    logic [N-1:0] n;
    logic [15:0]  i, j, i1;
    n = s;
    i = s[I_LO +: 16];
    j = s[J_LO +: 16];
    if (s[D_BIT]) return s;
    if (j < 16'(F)) begin
      n[FL + int'(j)] = 1'b0;
      n[J_LO +: 16]   = j + i;
    end else begin
      i1 = i + 16'd1;
      n[I_LO +: 16] = i1;
      if (i1 >= 16'(F / 2)) begin
        n[D_BIT]      = 1'b1;
        n[J_LO +: 16] = 16'(F);
      end else begin
        n[J_LO +: 16] = s[FL + int'(i1)] ? 16'(2 * i1) : 16'(F);
      end
    end
    return n;
  endfunction

  assign cud_next_state = cud_rst ? reset_state() : step(cud_state);

  logic [N-1:0] gold [CRASH + 1];

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
    for (int i = N - 1; i >= 0; i--) begin
      csr_valid = 1; csr_bit = 1'b0;
      @(negedge clk);
    end
    for (int i = N - 1; i >= 0; i--) begin
      csr_valid = 1; csr_bit = tgt[i];
      @(negedge clk);
    end
    csr_valid = 0;
  endtask

  logic [N-1:0] dump_sr;
  always_ff @(posedge clk) if (dump_valid) dump_sr <= {dump_sr[N-2:0], dump_bit};

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] cur, base;
    logic [N-1:0] cand [2];
    logic [15:0]  pi, pj;
    int           ncand, size_hist [3], retries, runs, c, found, n_mark, n_adv;
    rst_n = 0; cmd_valid = 0; cmd_op = CMD_NOP; cmd_arg = '0;
    csr_valid = 0; csr_bit = 0; sig_rd_addr = '0;
    size_hist = '{0, 0, 0}; retries = 0; runs = 0; n_mark = 0; n_adv = 0;
    gold[0] = reset_state();
    for (int k = 1; k <= CRASH; k++) gold[k] = step(gold[k-1]);
    check(!gold[CRASH][D_BIT], "crash state lies before the end of the sieve");
    repeat (2) @(negedge clk);
    rst_n = 1;

    command(CMD_RESET, '0);
    command(CMD_RUN, CW'(CRASH));
    runs++;
    check(stop_reason == STOP_LIMIT && cycle_count == CRASH, "crash run stopped at its target");
    command(CMD_DUMP, '0);
    cur = dump_sr;
    check(cur == gold[CRASH], "crash state");
    c = CRASH;

    for (int s = 0; s < BACK; s++) begin
      // predecessor's monitored bits come from the signature
      base = cur;
      base[NM-1:0] = sig_rd_data;
      pi = base[I_LO +: 16];
      pj = base[J_LO +: 16];
      ncand = 0;
      for (int v = 0; v < 2; v++) begin
        logic [N-1:0] x;
        x = base;
        if (pj < 16'(F)) x[FL + int'(pj)] = 1'(v);
        else if (v == 1) continue;
        if (step(x) == cur && x[NM-1:0] == sig_rd_data) begin
          cand[ncand] = x; ncand++;
        end
      end
      if (pj < 16'(F)) n_mark++; else n_adv++;
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
      command(CMD_DUMP, '0);
      c = c - 1;
      check(dump_sr == gold[c], "reconstructed state matches the forward run");
      cur = dump_sr;
    end

    $display("backed up %0d cycles from cycle %0d: chip runs %0d, retries %0d, marking steps %0d, advance steps %0d, pre-image sizes 1 x%0d, 2 x%0d",
             BACK, CRASH, runs, retries, n_mark, n_adv, size_hist[1], size_hist[2]);
    check(retries > 0, "mechanism: candidate not reached");
    check(n_adv > 0 && n_mark > 0, "mechanism: both kinds of sieve step traced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
