// tb_bist_smc: start, K issue cycles, stop, one drain cycle, done K+3
// cycles after start; restart from done; start ignored while running.
module tb_bist_smc;
  logic clk = 0, rst_n = 0, start, stop, init, issue, busy, done;
  int checks = 0, failures = 0;
  int n_issue, cyc;

  bist_smc dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stop follows the instruction stream: K operations then stop
  task automatic run(int k);
    @(negedge clk); start = 1; #1 check(init, "init on start");
    @(negedge clk); start = 0; stop = 0;
    n_issue = 0; cyc = 1;
    while (!done && cyc < 1000) begin
      check(!init, "no init while running");
      if (issue) n_issue++;
      if (n_issue == k) stop = 1;
      // a start while busy must be ignored
      if (cyc == 2) begin start = 1; #1 check(!init, "start ignored while busy"); end
      @(negedge clk); start = 0; cyc++;
    end
    check(n_issue == k, $sformatf("issued %0d of %0d", n_issue, k));
    check(cyc == k + 3, $sformatf("done after %0d cycles, expected %0d", cyc, k + 3));
    check(!busy, "not busy when done");
    @(negedge clk); check(done, "done holds");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; stop = 1;
    #12 rst_n = 1;
    @(negedge clk); check(!done && !busy && !issue, "idle after reset");
    run(10);
    run(37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
