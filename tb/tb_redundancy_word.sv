// tb_redundancy_word: an unprogrammed word never hits; programming sets FA,
// address and correct data; afterwards matching writes update the data
// field (IE) and matching reads return it one cycle later (OE), while other
// addresses are left alone.
module tb_redundancy_word;
  logic clk = 0, rst_n = 0, prog, we, re, fa, hit, rd_hit;
  logic [7:0] prog_addr, addr, addr_field;
  logic [7:0] prog_data, wdata, rd_data;
  int checks = 0, failures = 0;
  logic m_fa; logic [7:0] m_addr, m_data, e_data; logic e_hit;

  redundancy_word #(.ADDR_W(8), .DATA_W(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access();
    @(negedge clk);
    we = 1'($urandom); re = !we && 1'($urandom);
    addr = ($urandom % 3 == 0) ? m_addr : 8'($urandom); wdata = 8'($urandom);
    #1 check(hit == (m_fa && addr == m_addr), "hit");
    e_hit = m_fa && addr == m_addr && re;
    e_data = e_hit ? m_data : 8'h00;
    @(posedge clk);
    if (m_fa && addr == m_addr && we) m_data = wdata;
    #1;
    if (re) check(rd_hit == e_hit && rd_data == e_data,
                  $sformatf("read hit=%b data=%h exp %b %h", rd_hit, rd_data, e_hit, e_data));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    prog = 0; we = 0; re = 0; addr = 0; wdata = 0; prog_addr = 0; prog_data = 0;
    m_fa = 0; m_addr = 8'h3C; m_data = 0;
    #12 rst_n = 1;
    repeat (100) access();
    check(!fa, "not programmed");
    @(negedge clk); we = 0; re = 0; prog = 1; prog_addr = 8'h3C; prog_data = 8'hA5;
    @(negedge clk); prog = 0;
    m_fa = 1; m_data = 8'hA5;
    check(fa && addr_field == 8'h3C, "programmed fields");
    @(negedge clk); re = 1; addr = 8'h3C; @(posedge clk); #1;
    check(rd_hit && rd_data == 8'hA5, "reads correct data");
    repeat (300) access();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
