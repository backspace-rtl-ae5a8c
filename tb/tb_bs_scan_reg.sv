// tb_bs_scan_reg: self-checking test of the scan-able state register.
// Checks functional loading, holding while stopped, MSB-first shifting,
// restoration after a full recirculating shift, and scan priority.
module tb_bs_scan_reg;
  localparam int unsigned N = 37;

  logic         clk = 1'b0;
  logic         func_en, scan_en, scan_in, scan_out;
  logic [N-1:0] d, q, expq;
  int unsigned  checks = 0, failures = 0;

  bs_scan_reg #(.N_STATE(N)) dut (.*);

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

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    func_en = 0; scan_en = 0; scan_in = 0; d = '0;
    // functional loads
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      d = rnd(); func_en = 1; expq = d;
      @(negedge clk);
      func_en = 0;
      check(q == expq, "functional load");
      d = rnd();
      @(negedge clk);
      check(q == expq, "hold while func_en low");
    end
    // recirculating dump: bits come out MSB first, state restored
    for (int t = 0; t < 5; t++) begin
      @(negedge clk);
      d = rnd(); func_en = 1; expq = d;
      @(negedge clk);
      func_en = 0; scan_en = 1;
      for (int i = N - 1; i >= 0; i--) begin
        scan_in = scan_out;
        check(scan_out == expq[i], "scan-out bit order");
        @(negedge clk);
        scan_in = scan_out;
      end
      scan_en = 0;
      check(q == expq, "state restored after full recirculation");
    end
    // scan-in of a new state; scan overrides func_en
    expq = rnd();
    scan_en = 1; func_en = 1; d = '0;
    for (int i = N - 1; i >= 0; i--) begin
      scan_in = expq[i];
      @(negedge clk);
    end
    scan_en = 0; func_en = 0;
    check(q == expq, "scan-in with scan priority over func_en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
