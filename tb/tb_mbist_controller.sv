// tb_mbist_controller: runs the controller on a 16-word memory model with
// two stuck-at cells. Every operation on the test collar is compared with
// March SS written out here; the run must take 22*16 + 3 cycles, and the
// fault pulses (address and correct data) must match the reads a reference
// memory gets wrong. Then the storage is rewritten with March C-
// ({any(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); any(r0)})
// and the run must take 10*16 + 3 cycles and issue that algorithm instead.
module tb_mbist_controller;
  import bisr_pkg::*;
  localparam int AW = 4, N = 16;
  logic clk = 0, rst_n = 0, start, busy, done, fail;
  logic [15:0] fault_cnt;
  logic [AW-1:0] mem_addr, fault_addr;
  logic [7:0] mem_wdata, mem_rdata, correct_data;
  logic mem_we, mem_re, fault_pulse, prog_we;
  logic [4:0] prog_idx;
  march_instr_t prog_instr;
  int checks = 0, failures = 0;

  mbist_controller #(.ADDR_W(AW), .DATA_W(8), .IMEM_DEPTH(32)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory model with two stuck-at cells: word 3 bit 0 stuck at 1,
  // word 12 bit 6 stuck at 0
  logic [7:0] mem [N];
  function automatic logic [7:0] rd_word(int a);
    logic [7:0] w = mem[a];
    if (a == 3)  w[0] = 1'b1;
    if (a == 12) w[6] = 1'b0;
    return w;
  endfunction
  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_re) mem_rdata <= rd_word(int'(mem_addr));
  end

  // expected operation stream: {we, re, addr, data}
  typedef struct { bit we; int addr; logic [7:0] data; } op_t;
  op_t exp_ops[$];
  string el_ops[$][$];
  bit    el_dn[$];

  task automatic expand();
    exp_ops.delete();
    foreach (el_ops[e])
      for (int i = 0; i < N; i++) begin
        int a = el_dn[e] ? N - 1 - i : i;
        foreach (el_ops[e][k])
          exp_ops.push_back('{we: el_ops[e][k][0] == "w", addr: a,
                              data: el_ops[e][k][1] == "1" ? 8'hFF : 8'h00});
      end
  endtask

  // reference fault list from the expected stream and a faulty memory
  int exp_faults[$];
  logic [7:0] exp_fdata[$];
  task automatic ref_faults();
    logic [7:0] m [N];
    logic [7:0] w;
    exp_faults.delete(); exp_fdata.delete();
    foreach (exp_ops[i]) begin
      if (exp_ops[i].we) m[exp_ops[i].addr] = exp_ops[i].data;
      else begin
        w = m[exp_ops[i].addr];
        if (exp_ops[i].addr == 3)  w[0] = 1'b1;
        if (exp_ops[i].addr == 12) w[6] = 1'b0;
        if (w != exp_ops[i].data) begin
          exp_faults.push_back(exp_ops[i].addr); exp_fdata.push_back(exp_ops[i].data);
        end
      end
    end
  endtask

  int seen_ops, seen_faults, cyc;
  bit running;
  always @(posedge clk) if (running) begin
    if (mem_we || mem_re) begin
      if (seen_ops < exp_ops.size()) begin
        check(mem_we == exp_ops[seen_ops].we && int'(mem_addr) == exp_ops[seen_ops].addr &&
              mem_wdata == exp_ops[seen_ops].data,
              $sformatf("op %0d: we=%b a=%0d d=%h", seen_ops, mem_we, mem_addr, mem_wdata));
      end else check(0, "extra operation");
      seen_ops++;
    end
    if (fault_pulse) begin
      if (seen_faults < exp_faults.size())
        check(int'(fault_addr) == exp_faults[seen_faults] && correct_data == exp_fdata[seen_faults],
              $sformatf("fault %0d at %0d data %h", seen_faults, fault_addr, correct_data));
      else check(0, "extra fault");
      seen_faults++;
    end
  end

  task automatic run_and_check(int k);
    expand(); ref_faults();
    check(exp_ops.size() == k * N, "reference length");
    seen_ops = 0; seen_faults = 0;
    @(negedge clk); start = 1; running = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    running = 0;
    check(cyc == k * N + 3, $sformatf("done after %0d cycles, expected %0d", cyc, k * N + 3));
    check(seen_ops == k * N, $sformatf("%0d operations issued", seen_ops));
    check(seen_faults == exp_faults.size() && seen_faults > 0,
          $sformatf("%0d fault pulses, expected %0d", seen_faults, exp_faults.size()));
    check(fail && fault_cnt == 16'(exp_faults.size()), "fail flag and count");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; prog_we = 0; prog_idx = 0; prog_instr = '0; running = 0;
    #12 rst_n = 1;
    check(!busy && !done, "idle");
    el_ops = '{'{"w0"}, '{"r0","r0","w0","r0","w1"}, '{"r1","r1","w1","r1","w0"},
               '{"r0","r0","w0","r0","w1"}, '{"r1","r1","w1","r1","w0"}, '{"r0"}};
    el_dn  = '{0, 0, 0, 1, 1, 0};
    run_and_check(22);
    // March C- into the storage
    el_ops = '{'{"w0"}, '{"r0","w1"}, '{"r1","w0"}, '{"r0","w1"}, '{"r1","w0"}, '{"r0"}};
    el_dn  = '{0, 0, 0, 1, 1, 0};
    begin
      automatic int n = 0;
      foreach (el_ops[e]) foreach (el_ops[e][k]) begin
        @(negedge clk); prog_we = 1; prog_idx = 5'(n);
        prog_instr = '{stop: 1'b0, down: el_dn[e], last: k == el_ops[e].size() - 1,
                       wr: el_ops[e][k][0] == "w", val: el_ops[e][k][1] == "1"};
        n++;
      end
      @(negedge clk); prog_idx = 5'(n); prog_instr = '{stop: 1'b1, default: 1'b0};
      @(negedge clk); prog_we = 0;
    end
    run_and_check(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
