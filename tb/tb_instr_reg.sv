// tb_instr_reg: reset value (stop), load and hold.
module tb_instr_reg;
  import bisr_pkg::*;
  logic clk = 0, rst_n = 0, load;
  march_instr_t d, q, model;
  int checks = 0, failures = 0;

  instr_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; d = '0;
    #7 check(q.stop == 1'b1, "reset gives stop");
    #5 rst_n = 1;
    model = q;
    repeat (200) begin
      @(negedge clk);
      load = 1'($urandom); d = 5'($urandom);
      @(posedge clk); if (load) model = d;
      #1 check(q == model, $sformatf("q=%b exp=%b", q, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
