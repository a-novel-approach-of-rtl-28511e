// tb_input_mux: random inputs; the memory side follows the BIST in test
// mode and the user in normal mode.
module tb_input_mux;
  import bisr_pkg::*;
  mode_e mode;
  logic [7:0] bist_addr, usr_addr, mem_addr;
  logic [7:0] bist_wdata, usr_wdata, mem_wdata;
  logic bist_we, bist_re, usr_we, usr_re, mem_we, mem_re;
  int checks = 0, failures = 0;
  logic [17:0] e;

  input_mux #(.ADDR_W(8), .DATA_W(8)) dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (300) begin
      mode = mode_e'($urandom % 2);
      {bist_addr, bist_wdata, bist_we, bist_re} = 18'($urandom);
      {usr_addr, usr_wdata, usr_we, usr_re} = 18'($urandom);
      #1;
      e = (mode == MODE_TEST) ? {bist_addr, bist_wdata, bist_we, bist_re}
                              : {usr_addr, usr_wdata, usr_we, usr_re};
      checks++;
      if ({mem_addr, mem_wdata, mem_we, mem_re} !== e) begin
        failures++; $display("FAIL mode=%0d", mode);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
