// tb_rl_array: fault pulses fill the words in order, a repeated address is
// stored once, a fault with no word left sets overflow, pulses are ignored
// outside test mode, a same-cycle write to the faulty address is taken as
// its data, stored addresses read out, and reads of stored addresses hit.
module tb_rl_array;
  logic clk = 0, rst_n = 0, prog_en, fault_pulse, we, re, rd_hit, overflow, fa_valid;
  logic [5:0] fault_addr, addr, fa_addr;
  logic [7:0] correct_data, wdata, rd_data;
  logic [2:0] used;
  logic [1:0] fa_idx;
  int checks = 0, failures = 0;

  rl_array #(.ADDR_W(6), .DATA_W(8), .NUM_RED(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic fault(logic [5:0] a, logic [7:0] d);
    @(negedge clk); fault_pulse = 1; fault_addr = a; correct_data = d;
    @(negedge clk); fault_pulse = 0;
  endtask

  task automatic rd(logic [5:0] a, bit e_hit, logic [7:0] e_data);
    @(negedge clk); re = 1; we = 0; addr = a;
    @(posedge clk); #1 check(rd_hit == e_hit && (!e_hit || rd_data == e_data),
                             $sformatf("read %0d hit=%b data=%h", a, rd_hit, rd_data));
    @(negedge clk); re = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    prog_en = 0; fault_pulse = 0; fault_addr = 0; correct_data = 0;
    we = 0; re = 0; addr = 0; wdata = 0; fa_idx = 0;
    #12 rst_n = 1;
    fault(6'd9, 8'h11);
    check(used == 0, "ignored outside test mode");
    prog_en = 1;
    fault(6'd9, 8'h11);
    check(used == 1, "first fault stored");
    fault(6'd9, 8'h22);
    check(used == 1, "same address stored once");
    fault(6'd20, 8'h33);
    // fault on 30 while a write of 0x5A to 30 happens in the same cycle
    @(negedge clk); fault_pulse = 1; fault_addr = 6'd30; correct_data = 8'h00;
    we = 1; addr = 6'd30; wdata = 8'h5A;
    @(negedge clk); fault_pulse = 0; we = 0;
    check(used == 3, "three stored");
    fault(6'd41, 8'h44);
    check(used == 4 && !overflow, "full, no overflow yet");
    fault(6'd20, 8'h55);
    check(!overflow, "known address at full array is not an overflow");
    fault(6'd50, 8'h66);
    check(overflow && used == 4, "overflow");
    for (int i = 0; i < 4; i++) begin
      fa_idx = 2'(i); #1;
      check(fa_valid && fa_addr == (i == 0 ? 6'd9 : i == 1 ? 6'd20 : i == 2 ? 6'd30 : 6'd41),
            $sformatf("stored address %0d = %0d", i, fa_addr));
    end
    rd(6'd9, 1, 8'h11);
    rd(6'd20, 1, 8'h33);
    rd(6'd30, 1, 8'h5A);
    rd(6'd41, 1, 8'h44);
    rd(6'd50, 0, 8'h00);
    rd(6'd1, 0, 8'h00);
    // normal-mode write to a stored address updates it
    prog_en = 0;
    @(negedge clk); we = 1; addr = 6'd20; wdata = 8'hC3; @(negedge clk); we = 0;
    rd(6'd20, 1, 8'hC3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
