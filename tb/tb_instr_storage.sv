// tb_instr_storage: checks the reset contents (March SS, written out here
// element by element, independently of the package function), the write
// port and that a write leaves the other entries alone.
module tb_instr_storage;
  import bisr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] rd_idx, prog_idx;
  march_instr_t rd_instr, prog_instr;
  logic prog_we;
  int checks = 0, failures = 0;
  march_instr_t exp_tab [32];

  instr_storage #(.DEPTH(32)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Elements of March SS: order, then ops as "r0"/"w1" strings.
  task automatic build();
    string ops [6][$];
    bit    dn  [6];
    int    n = 0;
    ops[0] = '{"w0"};                               dn[0] = 0;
    ops[1] = '{"r0","r0","w0","r0","w1"};           dn[1] = 0;
    ops[2] = '{"r1","r1","w1","r1","w0"};           dn[2] = 0;
    ops[3] = '{"r0","r0","w0","r0","w1"};           dn[3] = 1;
    ops[4] = '{"r1","r1","w1","r1","w0"};           dn[4] = 1;
    ops[5] = '{"r0"};                               dn[5] = 0;
    for (int e = 0; e < 6; e++)
      for (int k = 0; k < ops[e].size(); k++) begin
        exp_tab[n] = '{stop: 1'b0, down: dn[e], last: (k == ops[e].size()-1),
                       wr: (ops[e][k][0] == "w"), val: (ops[e][k][1] == "1")};
        n++;
      end
    for (int i = n; i < 32; i++) exp_tab[i] = '{stop: 1'b1, default: 1'b0};
    check(n == 22, "March SS has 22 operations");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    prog_we = 0; prog_idx = 0; prog_instr = '0; rd_idx = 0;
    build();
    #12 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      rd_idx = 5'(i); #1;
      check(rd_instr.stop == exp_tab[i].stop && (exp_tab[i].stop || rd_instr == exp_tab[i]),
            $sformatf("reset entry %0d = %b", i, rd_instr));
    end
    // overwrite entry 7 and 30
    @(negedge clk); prog_we = 1; prog_idx = 7; prog_instr = 5'b01011;
    @(negedge clk); prog_idx = 30; prog_instr = 5'b00110;
    @(negedge clk); prog_we = 0;
    rd_idx = 7;  #1 check(rd_instr == 5'b01011, "written entry 7");
    rd_idx = 30; #1 check(rd_instr == 5'b00110, "written entry 30");
    for (int i = 0; i < 32; i++) if (i != 7 && i != 30) begin
      rd_idx = 5'(i); #1;
      check(rd_instr.stop == exp_tab[i].stop && (exp_tab[i].stop || rd_instr == exp_tab[i]),
            $sformatf("entry %0d kept", i));
    end
    // reset restores March SS
    rst_n = 0; #3 rst_n = 1;
    rd_idx = 7; #1 check(rd_instr == exp_tab[7], "reset restores entry 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
