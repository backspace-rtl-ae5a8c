// tb_bs_gcd_nondet: BackSpace of a GCD computation on a core that is not
// deterministic, at full size.
//
// The stand-in core computes a GCD by repeated subtraction, as in tb_bs_gcd,
// but like a processor waiting on memory of varying latency it may spend a
// clock in a wait state before a step: from a state with w = 0 it either
// steps or, at random, enters (a, b, w = 1); from w = 1 it always steps. So
// each re-run reaches a given state at a different cycle, or never.
// a[0] and w are the only monitored bits of the three registers.
//
// The host side computes each pre-image from the transition relation and the
// signature (a wait state has one predecessor; a stepped state has up to two
// register predecessors, each with w = 0 or 1), then tries the candidates as
// breakpoints, re-running each up to RETRY times in turn. Because the hit
// cycle varies, the reconstructed trace is checked for what it must be: each
// found state is a legal predecessor of the one before it and agrees with its
// signature, and its registers lie on the GCD sequence one step (or one wait)
// before.
module tb_bs_gcd_nondet;
  import bs_pkg::*;
  localparam int unsigned N     = N_STATE_DEF;
  localparam int unsigned NM    = N_MON_DEF;
  localparam int unsigned CW    = CNT_W_DEF;
  localparam int unsigned W_BIT = NM - 2;       // wait flag, monitored
  localparam int unsigned A_LO  = NM - 1;       // a[0] monitored, rest not
  localparam int unsigned B_LO  = A_LO + 32;
  localparam logic [31:0] A0    = 32'd30_002;
  localparam logic [31:0] B0    = 32'd10;
  localparam int unsigned CRASH = 1_500;
  localparam int unsigned BACK  = 200;
  localparam int unsigned RETRY = 80;

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

  function automatic logic [N-1:0] pack(input logic [31:0] a, input logic [31:0] b, input logic w);
    logic [N-1:0] s;
    s = '0;
    s[A_LO +: 32] = a;
    s[B_LO +: 32] = b;
    s[W_BIT]      = w;
    return s;
  endfunction

  function automatic logic [N-1:0] gcd_step(input logic [N-1:0] s);
    logic [31:0] a, b;
    a = s[A_LO +: 32];
    b = s[B_LO +: 32];
    if (a > b)      return pack(a - b, b, 1'b0);
    else if (b > a) return pack(a, b - a, 1'b0);
    else            return pack(a, b, 1'b0);
  endfunction

  // legal transitions of the stand-in
  function automatic logic legal(input logic [N-1:0] from, input logic [N-1:0] to);
    if (to == gcd_step(from)) return 1'b1;
    if (!from[W_BIT] && to == pack(from[A_LO +: 32], from[B_LO +: 32], 1'b1)) return 1'b1;
    return 1'b0;
  endfunction

  // random wait decision, fresh every clock
  logic stall;
  always_ff @(posedge clk) stall <= ($urandom_range(7) == 0);
  always_comb begin
    if (cud_rst)                       cud_next_state = pack(A0, B0, 1'b0);
    else if (!cud_state[W_BIT] && stall) cud_next_state = pack(cud_state[A_LO +: 32], cud_state[B_LO +: 32], 1'b1);
    else                               cud_next_state = gcd_step(cud_state);
  end

  // register sequence of the algorithm, without waits
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

  // position of (a, b) in the register sequence, -1 if absent
  function automatic int seq_pos(input logic [N-1:0] s);
    for (int k = 0; k <= CRASH; k++)
      if (ga[k] == s[A_LO +: 32] && gb[k] == s[B_LO +: 32]) return k;
    return -1;
  endfunction

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] cur, nxt, sig;
    logic [N-1:0] cand [4];
    logic [31:0]  a, b;
    int           ncand, runs, misses, found, back, p0, p1, max_size;
    rst_n = 0; cmd_valid = 0; cmd_op = CMD_NOP; cmd_arg = '0;
    csr_valid = 0; csr_bit = 0; sig_rd_addr = '0;
    runs = 0; misses = 0; back = 0; max_size = 0;
    ga[0] = A0; gb[0] = B0;
    for (int k = 1; k <= CRASH; k++) begin
      ga[k] = (ga[k-1] > gb[k-1]) ? ga[k-1] - gb[k-1] : ga[k-1];
      gb[k] = (gb[k-1] > ga[k-1]) ? gb[k-1] - ga[k-1] : gb[k-1];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    command(CMD_RESET, '0);
    command(CMD_RUN, CW'(CRASH));
    runs++;
    command(CMD_DUMP, '0);
    cur = dump_sr;
    check(seq_pos(cur) > 0, "crash state lies on the GCD sequence");

    for (int s = 0; s < BACK; s++) begin
      sig = '0;
      sig[NM-1:0] = sig_rd_data;
      a = cur[A_LO +: 32];
      b = cur[B_LO +: 32];
      // candidates from the transition relation
      ncand = 0;
      begin
        logic [N-1:0] pre [5];
        pre[0] = pack(a, b, 1'b0);
        pre[1] = pack(a + b, b, 1'b0);
        pre[2] = pack(a + b, b, 1'b1);
        pre[3] = pack(a, a + b, 1'b0);
        pre[4] = pack(a, a + b, 1'b1);
        for (int q = 0; q < 5; q++)
          if (legal(pre[q], cur) && pre[q][NM-1:0] == sig_rd_data && ncand < 4) begin
            cand[ncand] = pre[q]; ncand++;
          end
      end
      if (ncand > max_size) max_size = ncand;
      check(ncand > 0, "pre-image not empty");
      found = 0;
      for (int t = 0; t < RETRY * ncand && !found; t++) begin
        command(CMD_RESET, '0);
        load_exact(cand[t % ncand]);
        command(CMD_RUN_BP, CW'(2 * CRASH));
        runs++;
        if (stop_reason == STOP_BREAK) begin
          found = 1;
          command(CMD_DUMP, '0);
          nxt = dump_sr;
          check(nxt == cand[t % ncand], "stopped in the breakpoint state");
          check(legal(nxt, cur), "found state is a legal predecessor");
          check(nxt[NM-1:0] == sig[NM-1:0], "found state agrees with the signature");
          p0 = seq_pos(cur); p1 = seq_pos(nxt);
          check(p1 == p0 || p1 == p0 - 1, "registers one step back on the GCD sequence");
        end else begin
          misses++;
        end
      end
      if (!found) break;
      cur = nxt;
      back++;
    end

    $display("backed up %0d cycles: chip runs %0d, runs without a hit %0d (%0d.%0d per cycle), largest pre-image %0d",
             back, runs, misses, misses / (back > 0 ? back : 1), (10 * misses / (back > 0 ? back : 1)) % 10, max_size);
    check(back == BACK, "backed up the planned number of cycles");
    check(misses > 0, "mechanism: re-runs caused by the random waits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
