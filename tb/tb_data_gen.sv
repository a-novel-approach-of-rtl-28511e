// tb_data_gen: the registered word is all zeros or all ones as the data
// value says, and holds while en is low.
module tb_data_gen;
  logic clk = 0, rst_n = 0, en, val;
  logic [7:0] data_drv, model;
  int checks = 0, failures = 0;

  data_gen #(.DATA_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; val = 0; model = 8'h00;
    #12 rst_n = 1;
    repeat (200) begin
      @(negedge clk); en = 1'($urandom); val = 1'($urandom);
      @(posedge clk); if (en) model = val ? 8'hFF : 8'h00;
      #1 checks++;
      if (data_drv !== model) begin failures++; $display("FAIL data_drv=%h exp=%h", data_drv, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
