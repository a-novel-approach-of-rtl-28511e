// tb_fault_diag: random reads against a memory answer that is sometimes
// wrong; checks the pulse, the address and data reported, and the counters.
module tb_fault_diag;
  logic clk = 0, rst_n = 0, clr, re, fault_pulse, fail;
  logic [7:0] addr, fault_addr;
  logic [7:0] exp, mem_rdata, correct_data;
  logic [15:0] fault_cnt;
  int checks = 0, failures = 0;
  logic p_re; logic [7:0] p_addr, p_exp; bit bad; int nf;

  fault_diag #(.ADDR_W(8), .DATA_W(8), .CNT_W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clr = 0; re = 0; addr = 0; exp = 0; mem_rdata = 0; p_re = 0; nf = 0;
    #12 rst_n = 1;
    repeat (400) begin
      @(negedge clk);
      // answer to last cycle's read
      bad = ($urandom % 4 == 0);
      mem_rdata = bad ? p_exp ^ 8'(1 << ($urandom % 8)) : p_exp;
      #1;
      check(fault_pulse == (p_re && bad), "fault pulse");
      if (p_re && bad) begin
        nf++;
        check(fault_addr == p_addr && correct_data == p_exp, "fault address and correct data");
      end
      re = 1'($urandom); addr = 8'($urandom); exp = ($urandom % 2 != 0) ? 8'hFF : 8'h00;
      p_re = re; p_addr = addr; p_exp = exp;
      @(posedge clk); #1;
      check(fault_cnt == 16'(nf) && fail == (nf > 0), $sformatf("count %0d exp %0d", fault_cnt, nf));
    end
    check(nf > 10, "faults exercised");
    @(negedge clk); re = 0; clr = 1; @(negedge clk); clr = 0;
    check(!fail && fault_cnt == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
