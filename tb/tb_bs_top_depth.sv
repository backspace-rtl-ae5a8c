// tb_bs_top_depth: the debug hardware with a 4-entry trace buffer.
//
// With more than one signature kept, one run yields the signatures of several
// cycles before the stop. A stand-in core (cycle counter in the low bits plus
// a feedback shift register) runs to a breakpoint and to a cycle target; the
// testbench checks that entries 0..3 hold the monitored bits of the 1st..4th
// predecessor, that the count saturates at 4, that fewer entries are valid
// when the core stopped after fewer clocks, and that the buffer is frozen
// after the breakpoint.
module tb_bs_top_depth;
  import bs_pkg::*;
  localparam int unsigned N = 200, NM = 64, D = 4, CW = 16;

  logic            clk = 1'b0;
  logic            rst_n, cmd_valid, cmd_ready, done, busy;
  bs_cmd_e         cmd_op;
  logic [CW-1:0]   cmd_arg, cycle_count;
  bs_stop_e        stop_reason;
  logic            csr_valid, csr_bit, csr_ready, dump_valid, dump_bit;
  logic [1:0]      sig_rd_addr;
  logic [NM-1:0]   sig_rd_data;
  logic [2:0]      sig_count;
  logic            sig_stopped;
  logic [N-1:0]    cud_state, cud_next_state;
  logic            cud_rst, cud_en;
  int unsigned     checks = 0, failures = 0;

  bs_top #(.N_STATE(N), .N_MON(NM), .TB_DEPTH(D), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  localparam logic [N-1:0] RESET_STATE = {{(N - 17){1'b0}}, 1'b1, 16'h0000};
  function automatic logic [N-1:0] cud_step(input logic [N-1:0] s);
    logic [N-17:0] up;
    up = s[N-1:16];
    up = {up[N-18:0], up[N-17] ^ s[0] ^ s[3]};
    return {up, s[15:0] + 16'd1};
  endfunction
  assign cud_next_state = cud_rst ? RESET_STATE : cud_step(cud_state);

  logic [N-1:0] hist [64];

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

  task automatic load_bp(input logic [N-1:0] tgt);
    logic [2*N-1:0] bits;
    bits = {{N{1'b0}}, tgt};
    command(CMD_LOAD, '0);
    for (int i = 2 * N - 1; i >= 0; i--) begin
      csr_valid = 1; csr_bit = bits[i];
      @(negedge clk);
    end
    csr_valid = 0;
  endtask

  task automatic check_history(input int k);
    int n;
    n = (k < D) ? k : D;
    check(sig_count == 3'(n), "valid signature count");
    for (int a = 0; a < n; a++) begin
      sig_rd_addr = 2'(a); #1;
      check(sig_rd_data == hist[k-1-a][NM-1:0], "signature of an earlier cycle");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; cmd_valid = 0; cmd_op = CMD_NOP; cmd_arg = '0;
    csr_valid = 0; csr_bit = 0; sig_rd_addr = '0;
    hist[0] = RESET_STATE;
    for (int k = 1; k < 64; k++) hist[k] = cud_step(hist[k-1]);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // targets before and after the buffer fills
    for (int k = 0; k < 12; k++) begin
      command(CMD_RESET, '0);
      command(CMD_RUN, CW'(k));
      check(stop_reason == STOP_LIMIT && cycle_count == k, "run length");
      check_history(k);
    end
    // breakpoint stop: four predecessors of the matched state, then frozen
    for (int k = 5; k < 40; k += 7) begin
      load_bp(hist[k]);
      command(CMD_RESET, '0);
      command(CMD_RUN_BP, CW'(60));
      check(stop_reason == STOP_BREAK && cycle_count == k, "breakpoint stop");
      check(sig_stopped, "collection stopped");
      check_history(k);
      command(CMD_RUN, CW'(k + 5));
      check(cycle_count == k + 5, "core runs on after the breakpoint");
      check_history(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
