// tb_bs_sig_create: self-checking test of the signature creation circuit.
// Checks the default-size instance (lowest 1276 of 3007 bits) and a small
// instance with a sparse hand-written mask against reference selections.
module tb_bs_sig_create;
  localparam int unsigned NS = 3007, NM = 1276;
  localparam int unsigned SN = 24, SM = 7;
  localparam logic [SN-1:0] SMASK = 24'b1000_0100_0010_0001_0011_0001;
  // selected positions of SMASK in ascending order
  localparam int SIDX [SM] = '{0, 4, 5, 8, 13, 18, 23};

  logic [NS-1:0] st;
  logic [NM-1:0] sg;
  logic [SN-1:0] st2;
  logic [SM-1:0] sg2;
  int unsigned   checks = 0, failures = 0;

  bs_sig_create dut (.state(st), .sig(sg));
  bs_sig_create #(.N_STATE(SN), .N_MON(SM), .MON_MASK(SMASK)) dut2 (.state(st2), .sig(sg2));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < NS; i++) st[i] = 1'($urandom);
      for (int i = 0; i < SN; i++) st2[i] = 1'($urandom);
      #1;
      check(sg == st[NM-1:0], "default signature is the low monitored bits");
      for (int k = 0; k < SM; k++)
        check(sg2[k] == st2[SIDX[k]], "sparse mask selection");
      // flipping an unmonitored bit leaves the signature alone
      st[NM + t] = ~st[NM + t];
      #1 check(sg == st[NM-1:0], "unmonitored bit ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
