// tb_output_mux: redundant data wins on a hit, memory data otherwise.
module tb_output_mux;
  logic red_hit;
  logic [7:0] red_data, mem_rdata, data_out;
  int checks = 0, failures = 0;

  output_mux #(.DATA_W(8)) dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (300) begin
      red_hit = 1'($urandom); red_data = 8'($urandom); mem_rdata = 8'($urandom);
      #1 checks++;
      if (data_out !== (red_hit ? red_data : mem_rdata)) begin
        failures++; $display("FAIL hit=%b out=%h", red_hit, data_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
