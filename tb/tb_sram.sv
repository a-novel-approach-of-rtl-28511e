// tb_sram: random writes and reads against a reference array, one-cycle
// read latency, rdata holding between reads, and stuck-at defects.
module tb_sram;
  logic clk = 0, rst_n = 0, we, re;
  logic [5:0] addr;
  logic [7:0] wdata, rdata;
  logic [1:0] def_en, def_val;
  logic [1:0][5:0] def_addr;
  logic [1:0][2:0] def_bit;
  logic [7:0] ref_mem [64];
  logic [7:0] expd, held;
  int checks = 0, failures = 0;

  sram #(.ADDR_W(6), .DATA_W(8), .NUM_DEF(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] faulty(logic [5:0] a);
    logic [7:0] w = ref_mem[a];
    for (int k = 0; k < 2; k++) if (def_en[k] && def_addr[k] == a) w[def_bit[k]] = def_val[k];
    return w;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; re = 0; addr = 0; wdata = 0;
    def_en = 0; def_addr = '0; def_bit = '0; def_val = '0;
    #12 rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); we = 1; addr = 6'(a); wdata = 8'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    def_addr[0] = 6'd5;  def_bit[0] = 3'd2; def_val[0] = 1'b1;
    def_addr[1] = 6'd40; def_bit[1] = 3'd7; def_val[1] = 1'b0;
    held = 0;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      if (it == 300) def_en = 2'b11;
      we = ($urandom % 3 == 0); re = !we && ($urandom % 2 != 0); addr = 6'($urandom % 8 == 0 ? 5 : $urandom);
      if ($urandom % 8 == 0) addr = 6'd40;
      wdata = 8'($urandom);
      expd = faulty(addr);
      @(posedge clk); if (we) ref_mem[addr] = wdata;
      #1;
      if (re) held = expd;
      check(rdata == held, $sformatf("read a=%0d got %h exp %h", addr, rdata, held));
    end
    check(def_en == 2'b11, "defects enabled during the run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
