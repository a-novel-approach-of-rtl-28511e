// tb_instr_ptr: runs the pointer over elements of 1, 3 and 2 operations on
// a 3-word memory and compares every pointer value with the expected walk
// (each element's operations repeated once per address), then checks start
// and holding when advance is low.
module tb_instr_ptr;
  logic clk = 0, rst_n = 0;
  logic start, advance, last_op, addr_last;
  logic [4:0] ip, ip_next, elem_start;
  int checks = 0, failures = 0;
  int exp_seq[$];
  int lens[3] = '{1, 3, 2};
  int base, a, k, e;

  instr_ptr #(.IDX_W(5)) dut (.*);
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
    start = 0; advance = 0; last_op = 0; addr_last = 0;
    base = 0;
    foreach (lens[i]) begin
      for (int ad = 0; ad < 3; ad++)
        for (int j = 0; j < lens[i]; j++) exp_seq.push_back(base + j);
      base += lens[i];
    end
    exp_seq.push_back(base);
    #12 rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(ip == 0, "start clears pointer");
    e = 0; a = 0; k = 0;
    for (int n = 0; n < exp_seq.size() - 1; n++) begin
      check(ip == 5'(exp_seq[n]), $sformatf("step %0d ip=%0d exp=%0d", n, ip, exp_seq[n]));
      advance = 1; last_op = (k == lens[e]-1); addr_last = (a == 2);
      // hold one cycle every 7 steps
      if (n % 7 == 3) begin
        advance = 0; @(negedge clk);
        check(ip == 5'(exp_seq[n]), "hold without advance");
        advance = 1;
      end
      @(negedge clk);
      if (k == lens[e]-1) begin k = 0; if (a == 2) begin a = 0; e++; end else a++; end
      else k++;
    end
    advance = 0;
    check(ip == 5'(exp_seq[$]), $sformatf("final ip=%0d", ip));
    check(elem_start == 5'(exp_seq[$]), "element start follows");
    @(negedge clk); start = 1; advance = 1; @(negedge clk); start = 0; advance = 0;
    check(ip == 0 && elem_start == 0, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
