// tb_bs_breakpoint: self-checking test of the maskable breakpoint.
// Loads random targets and masks through the serial CSR chain and compares
// the breakpoint signal with a reference for exact matches, masked partial
// matches, single-bit mismatches and the disarmed case.
module tb_bs_breakpoint;
  localparam int unsigned N = 45;

  logic         clk = 1'b0;
  logic         rst_n, csr_shift, csr_in, csr_out, arm, hit;
  logic [N-1:0] state, tgt, msk;
  int unsigned  checks = 0, failures = 0;

  bs_breakpoint #(.N_STATE(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  // Shift {mask, target}: mask MSB first, target LSB last.
  task automatic load(input logic [N-1:0] t, input logic [N-1:0] m);
    logic [2*N-1:0] bits;
    bits = {m, t};
    csr_shift = 1;
    for (int i = 2 * N - 1; i >= 0; i--) begin
      csr_in = bits[i];
      @(negedge clk);
    end
    csr_shift = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; csr_shift = 0; csr_in = 0; arm = 0; state = '0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    arm = 1;
    #1 check(hit == 1'b1, "reset target 0 mask 0 matches the zero state");
    for (int t = 0; t < 40; t++) begin
      tgt = rnd();
      msk = (t % 2 == 0) ? '0 : rnd() & rnd();
      load(tgt, msk);
      // exact state
      state = tgt; arm = 1; #1;
      check(hit == 1'b1, "exact match");
      arm = 0; #1;
      check(hit == 1'b0, "no hit while disarmed");
      arm = 1;
      // masked bits differ: still a match
      state = tgt ^ msk; #1;
      check(hit == 1'b1, "masked-off bits ignored");
      // one unmasked bit differs: no match
      for (int k = 0; k < 4; k++) begin
        int b;
        b = $urandom_range(N - 1);
        state = tgt;
        state[b] = ~state[b];
        #1 check(hit == msk[b], "single-bit difference");
      end
      // random state against reference
      state = rnd(); #1;
      check(hit == (((state ^ tgt) & ~msk) == '0), "random state");
      @(negedge clk);
    end
    // chain read-back: after another N*2 shifts the old mask MSB appears first
    tgt = rnd(); msk = rnd();
    load(tgt, msk);
    csr_shift = 1; csr_in = 0;
    for (int i = 2 * N - 1; i >= 0; i--) begin
      check(csr_out == (i >= N ? msk[i - N] : tgt[i]), "csr_out order");
      @(negedge clk);
    end
    csr_shift = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
