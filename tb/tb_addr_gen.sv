// tb_addr_gen: upward and downward walks with random pauses, addr_last at
// the ends, and the registered address driver.
module tb_addr_gen;
  logic clk = 0, rst_n = 0;
  logic load, load_down, step, down, en, addr_last;
  logic [3:0] addr, addr_drv;
  int checks = 0, failures = 0;
  int m, drv_m;

  addr_gen #(.ADDR_W(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic walk(bit dn);
    @(negedge clk); load = 1; load_down = dn; step = 0; down = dn; en = 0;
    @(negedge clk); load = 0;
    m = dn ? 15 : 0;
    for (int n = 0; n < 16; ) begin
      check(addr == 4'(m), $sformatf("addr=%0d exp=%0d", addr, m));
      check(addr_last == (dn ? (m == 0) : (m == 15)), "addr_last");
      step = (n == 15) ? 0 : 1'($urandom); en = 1'($urandom);
      @(posedge clk); if (en) drv_m = m;
      #1 check(addr_drv == 4'(drv_m), "addr_drv");
      @(negedge clk);
      if (step) begin m = dn ? m - 1 : m + 1; n++; end
      else if (n == 15) n++;
      step = 0; en = 0;
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; load_down = 0; step = 0; down = 0; en = 0; drv_m = 0;
    #12 rst_n = 1;
    walk(0); walk(1); walk(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
