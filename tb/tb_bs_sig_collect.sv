// tb_bs_sig_collect: self-checking test of the signature trace buffer.
// A 4-entry instance is checked against a reference history for newest-first
// read-out, wrap-around, saturation of count, stop on the breakpoint signal
// and clear; a 1-entry instance (the default) for single-signature capture.
module tb_bs_sig_collect;
  localparam int unsigned W = 16, D = 4;

  logic         clk = 1'b0;
  logic         rst_n, clear, wr_en, stop;
  logic [W-1:0] sig_in, rd_data, rd1;
  logic [1:0]   rd_addr;
  logic [2:0]   count;
  logic [0:0]   count1, addr1;
  logic         stopped, stopped1;
  logic [W-1:0] hist[$];
  int unsigned  checks = 0, failures = 0;

  bs_sig_collect #(.S_WIDTH(W), .TB_DEPTH(D)) dut (.*);
  bs_sig_collect #(.S_WIDTH(W)) dut1 (
    .clk, .rst_n, .clear, .wr_en, .stop, .sig_in,
    .rd_addr(addr1), .rd_data(rd1), .count(count1), .stopped(stopped1)
  );

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_all();
    int n;
    n = (hist.size() < D) ? hist.size() : D;
    check(count == 3'(n), "count");
    for (int a = 0; a < n; a++) begin
      rd_addr = 2'(a); #1;
      check(rd_data == hist[hist.size() - 1 - a], "newest-first read");
    end
    if (hist.size() > 0) check(rd1 == hist[hist.size() - 1], "single-entry buffer");
    check(count1 == 1'(hist.size() > 0), "single-entry count");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; wr_en = 0; stop = 0; sig_in = '0; rd_addr = '0; addr1 = '0;
    @(negedge clk); rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      for (int t = 0; t < 13; t++) begin
        sig_in = W'($urandom);
        wr_en  = 1'($urandom);
        if (wr_en) hist.push_back(sig_in);
        @(negedge clk);
        wr_en = 0;
        check_all();
      end
      // breakpoint: the write in the same cycle is dropped, collection stops
      stop = 1; wr_en = 1; sig_in = W'($urandom);
      @(negedge clk);
      stop = 0;
      check(stopped && stopped1, "stopped after breakpoint");
      for (int t = 0; t < 5; t++) begin
        sig_in = W'($urandom);
        @(negedge clk);
      end
      wr_en = 0;
      check_all();
      // clear empties the buffer and restarts collection
      clear = 1;
      @(negedge clk);
      clear = 0;
      hist.delete();
      check(!stopped && count == 0 && count1 == 0, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
