// tb_rw_control: one-cycle registered write/read strobes.
module tb_rw_control;
  logic clk = 0, rst_n = 0, en, wr, we_drv, re_drv;
  logic ew, er;
  int checks = 0, failures = 0;

  rw_control dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; wr = 0;
    #12 rst_n = 1;
    repeat (200) begin
      @(negedge clk); en = 1'($urandom); wr = 1'($urandom);
      ew = en && wr; er = en && !wr;
      @(posedge clk); #1 checks++;
      if (we_drv !== ew || re_drv !== er) begin
        failures++; $display("FAIL we=%b re=%b exp %b %b", we_drv, re_drv, ew, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
