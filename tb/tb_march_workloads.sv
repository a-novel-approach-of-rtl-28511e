// tb_march_workloads: runs the march algorithms the design is meant to hold
// on the full-size BISR (256 x 8 memory, 4 redundancy words), each on the
// same memory with three faulty words:
//   March SS             22 operations per address
//   March SS, M5 extended to (r0,r0,w0,r0,w1)   26 per address
//   March C-             10 per address
// Each algorithm is written into the instruction storage (March SS is also
// the reset contents), run to completion, and must take K*256 + 3 cycles,
// issue exactly K*256 memory operations, find the faults, program exactly
// three redundancy words and leave a memory that reads back correctly.
module tb_march_workloads;
  import bisr_pkg::*;
  localparam int AW = 8, DW = 8, N = 1 << AW, ND = 8;

  logic clk = 0, rst_n = 0;
  mode_e mode;
  logic bist_start, bist_busy, bist_done, bist_fail, overflow;
  logic [15:0] fault_cnt;
  logic [2:0] red_used;
  logic [AW-1:0] addr, fa_addr;
  logic [DW-1:0] data_in, data_out;
  logic we, re, fa_valid, prog_we;
  logic [1:0] fa_idx;
  logic [4:0] prog_idx;
  march_instr_t prog_instr;
  logic [ND-1:0] def_en, def_val;
  logic [ND-1:0][AW-1:0] def_addr;
  logic [ND-1:0][2:0] def_bit;

  bisr_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_ops;
  always @(posedge clk) if (bist_busy && (dut.b_we || dut.b_re)) n_ops++;

  // elements as strings "u:r0,w1" (u = up, d = down)
  // reset (fresh repair state, March SS in the storage), then write the
  // algorithm over it
  task automatic load_alg(string els[$], output int k);
    int n = 0;
    k = 0;
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    foreach (els[e]) begin
      bit dn = (els[e][0] == "d");
      int nops = (els[e].len() - 1) / 3;
      for (int j = 0; j < nops; j++) begin
        @(negedge clk); prog_we = 1; prog_idx = 5'(n);
        prog_instr = '{stop: 1'b0, down: dn, last: j == nops - 1,
                       wr: els[e][2 + 3*j] == "w", val: els[e][3 + 3*j] == "1"};
        n++;
      end
    end
    k = n;
    @(negedge clk); prog_idx = 5'(n); prog_instr = '{stop: 1'b1, default: 1'b0};
    @(negedge clk); prog_we = 0;
  endtask

  task automatic run(string name, int k);
    int cyc;
    logic [DW-1:0] ref_mem [N];
    int bad;
    mode = MODE_TEST; n_ops = 0;
    @(negedge clk); bist_start = 1;
    @(negedge clk); bist_start = 0; cyc = 1;
    while (!bist_done && cyc < 40 * N) begin @(negedge clk); cyc++; end
    check(cyc == k * N + 3, $sformatf("%s: %0d cycles, expected %0d", name, cyc, k * N + 3));
    check(n_ops == k * N, $sformatf("%s: %0d operations, expected %0d", name, n_ops, k * N));
    check(bist_fail && red_used == 3 && !overflow, $sformatf("%s: repair used %0d", name, red_used));
    mode = MODE_NORMAL; bad = 0;
    for (int a = 0; a < N; a++) begin
      @(negedge clk); we = 1; addr = AW'(a); data_in = DW'($urandom); ref_mem[a] = data_in;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < N; a++) begin
      @(negedge clk); re = 1; addr = AW'(a);
      @(negedge clk); re = 0; if (data_out != ref_mem[a]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d words read back wrong", name, bad));
    $display("%s: %0d operations per address, %0d cycles, %0d fault pulses", name, k, cyc, fault_cnt);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int k;
    mode = MODE_NORMAL; bist_start = 0; addr = 0; data_in = 0; we = 0; re = 0; fa_idx = 0;
    prog_we = 0; prog_idx = 0; prog_instr = '0;
    def_addr = '0; def_bit = '0; def_val = '0;
    def_addr[0] = 8'd0;   def_bit[0] = 3'd0; def_val[0] = 1'b1;
    def_addr[1] = 8'd77;  def_bit[1] = 3'd6; def_val[1] = 1'b0;
    def_addr[2] = 8'd255; def_bit[2] = 3'd3; def_val[2] = 1'b1;
    def_en = 8'b0000_0111;
    #12 rst_n = 1;
    run("March SS (reset contents)", 22);
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    run("March SS (after reset)", 22);
    load_alg('{"u:w0", "u:r0,r0,w0,r0,w1", "u:r1,r1,w1,r1,w0", "d:r0,r0,w0,r0,w1",
               "d:r1,r1,w1,r1,w0", "u:r0"}, k);
    check(k == 22, "March SS length");
    run("March SS", k);
    load_alg('{"u:w0", "u:r0,r0,w0,r0,w1", "u:r1,r1,w1,r1,w0", "d:r0,r0,w0,r0,w1",
               "d:r1,r1,w1,r1,w0", "u:r0,r0,w0,r0,w1"}, k);
    check(k == 26, "extended March SS length");
    run("March SS, M5 extended", k);
    load_alg('{"u:w0", "u:r0,w1", "u:r1,w0", "d:r0,w1", "d:r1,w0", "u:r0"}, k);
    check(k == 10, "March C- length");
    run("March C-", k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
