// tb_bisr_top: end-to-end test of the BISR at its default sizes (256 x 8
// memory, 4 redundancy words, 8 defect slots).
//   1. defect-free memory: March SS passes in 22*256 + 3 cycles, nothing is
//      programmed, normal-mode traffic reads back what was written;
//   2. three faulty words (one with two bad bits, so its address is found
//      many times but stored once): the test fails, three words are
//      programmed with exactly those addresses, and normal-mode traffic over
//      the whole memory then reads back correctly, the redundant words
//      answering for the faulty ones;
//   3. six faulty words: overflow, four repaired, only the two left over
//      may read back wrong;
//   4. the instruction storage rewritten with March C-: the run takes
//      10*256 + 3 cycles and still finds the faults;
//   5. mode switching: bist_start is ignored in normal mode, the user port
//      is ignored in test mode.
// Each mechanism is counted and must occur at least once.
module tb_bisr_top;
  import bisr_pkg::*;
  localparam int AW = 8, DW = 8, N = 1 << AW, NR = 4, ND = 8;

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

  // mechanism counters
  int n_fault_pulse, n_dup_fault, n_program, n_red_read, n_red_write, n_overflow;
  int n_mode_switch, n_reprogram, n_clean_pass;
  mode_e last_mode;
  always @(posedge clk) if (rst_n) begin
    if (dut.f_pulse) n_fault_pulse++;
    if (dut.f_pulse && dut.u_rla.known != '0) n_dup_fault++;
    if (dut.u_rla.new_fault && red_used < 3'(NR)) n_program++;
    if (mode == MODE_NORMAL && re && dut.u_rla.hit != '0) n_red_read++;
    if (mode == MODE_NORMAL && we && dut.u_rla.hit != '0) n_red_write++;
    if (mode != last_mode) n_mode_switch++;
    last_mode = mode;
  end

  task automatic run_bist(int k, output int cyc);
    mode = MODE_TEST;
    @(negedge clk); bist_start = 1;
    @(negedge clk); bist_start = 0; cyc = 1;
    while (!bist_done && cyc < 30 * N) begin
      // user port activity must not reach the memory in test mode
      we = 1'($urandom); re = 1'($urandom); addr = AW'($urandom); data_in = DW'($urandom);
      @(negedge clk); cyc++;
    end
    we = 0; re = 0;
    check(cyc == k * N + 3, $sformatf("test took %0d cycles, expected %0d", cyc, k * N + 3));
  endtask

  // normal-mode traffic: write every word, then random reads and writes;
  // returns the number of wrong reads per address
  int bad_reads [N];
  logic [DW-1:0] ref_mem [N];
  task automatic traffic(int n_ops);
    logic [DW-1:0] e;
    mode = MODE_NORMAL;
    foreach (bad_reads[i]) bad_reads[i] = 0;
    for (int a = 0; a < N; a++) begin
      @(negedge clk); we = 1; re = 0; addr = AW'(a); data_in = DW'($urandom); ref_mem[a] = data_in;
    end
    for (int i = 0; i < n_ops; i++) begin
      @(negedge clk);
      we = ($urandom % 3 == 0); re = !we; addr = AW'($urandom); data_in = DW'($urandom);
      // a start in normal mode must be ignored
      bist_start = (i % 97 == 5);
      e = ref_mem[addr];
      @(posedge clk); if (we) ref_mem[addr] = data_in;
      @(negedge clk); bist_start = 0;
      check(!bist_busy, "no BIST in normal mode");
      if (re && data_out != e) bad_reads[addr]++;
      we = 0; re = 0;
    end
    @(negedge clk);
  endtask

  function automatic bit is_def(int a, int upto);
    for (int k = 0; k < upto; k++) if (def_en[k] && def_addr[k] == AW'(a)) return 1;
    return 0;
  endfunction

  int cyc, bad_total;
  bit found;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mode = MODE_NORMAL; last_mode = MODE_NORMAL;
    bist_start = 0; addr = 0; data_in = 0; we = 0; re = 0; fa_idx = 0;
    prog_we = 0; prog_idx = 0; prog_instr = '0;
    def_en = '0; def_addr = '0; def_bit = '0; def_val = '0;
    #12 rst_n = 1;

    // 1. defect-free memory
    run_bist(22, cyc);
    check(!bist_fail && red_used == 0 && !overflow, "clean memory passes");
    if (!bist_fail) n_clean_pass++;
    traffic(2000);
    bad_total = 0; foreach (bad_reads[i]) bad_total += bad_reads[i];
    check(bad_total == 0, "clean memory reads back");

    // 2. three faulty words, one with two bad bits
    def_addr[0] = 8'd17;  def_bit[0] = 3'd3; def_val[0] = 1'b1;
    def_addr[1] = 8'd17;  def_bit[1] = 3'd5; def_val[1] = 1'b0;
    def_addr[2] = 8'd128; def_bit[2] = 3'd0; def_val[2] = 1'b0;
    def_addr[3] = 8'd250; def_bit[3] = 3'd7; def_val[3] = 1'b1;
    def_en = 8'b0000_1111;
    run_bist(22, cyc);
    check(bist_fail && red_used == 3 && !overflow, $sformatf("repair: used=%0d", red_used));
    for (int i = 0; i < NR; i++) begin
      fa_idx = 2'(i); #1;
      if (i < 3) check(fa_valid && is_def(int'(fa_addr), 4), $sformatf("stored address %0d", fa_addr));
      else       check(!fa_valid, "fourth word unused");
    end
    traffic(3000);
    bad_total = 0; foreach (bad_reads[i]) bad_total += bad_reads[i];
    check(bad_total == 0, $sformatf("repaired memory reads back (%0d wrong)", bad_total));

    // 3. six faulty words: overflow
    def_addr[4] = 8'd3;   def_bit[4] = 3'd1; def_val[4] = 1'b1;
    def_addr[5] = 8'd90;  def_bit[5] = 3'd2; def_val[5] = 1'b0;
    def_addr[6] = 8'd91;  def_bit[6] = 3'd4; def_val[6] = 1'b1;
    def_en = 8'b0111_1111;
    rst_n = 0; #3 rst_n = 1;
    run_bist(22, cyc);
    check(overflow && red_used == 4, "overflow with six faulty words");
    if (overflow) n_overflow++;
    traffic(4000);
    bad_total = 0;
    foreach (bad_reads[i]) begin
      if (bad_reads[i] != 0) begin
        found = 0;
        for (int j = 0; j < NR; j++) begin fa_idx = 2'(j); #1 if (fa_addr == AW'(i)) found = 1; end
        check(is_def(i, 7) && !found, $sformatf("wrong reads only at unrepaired faulty word %0d", i));
        bad_total++;
      end
    end
    check(bad_total <= 2, "at most two words unrepaired");

    // 4. March C- in the instruction storage
    rst_n = 0; #3 rst_n = 1;
    def_en = 8'b0000_1111;
    begin
      automatic string ops[$] = '{"w0", "r0", "w1", "r1", "w0", "r0", "w1", "r1", "w0", "r0"};
      automatic bit    lst[$] = '{1, 0, 1, 0, 1, 0, 1, 0, 1, 1};
      automatic bit    dn [$] = '{0, 0, 0, 0, 0, 1, 1, 1, 1, 0};
      for (int i = 0; i <= ops.size(); i++) begin
        @(negedge clk); prog_we = 1; prog_idx = 5'(i);
        prog_instr = (i == ops.size()) ? '{stop: 1'b1, default: 1'b0} :
          '{stop: 1'b0, down: dn[i], last: lst[i], wr: ops[i][0] == "w", val: ops[i][1] == "1"};
      end
      @(negedge clk); prog_we = 0; n_reprogram++;
    end
    run_bist(10, cyc);
    check(bist_fail && red_used == 3 && !overflow, "March C- finds and repairs the faults");
    traffic(1000);
    bad_total = 0; foreach (bad_reads[i]) bad_total += bad_reads[i];
    check(bad_total == 0, "repaired after March C-");

    // mechanisms
    check(n_fault_pulse > 0, "fault pulses");
    check(n_dup_fault > 0, "repeated fault addresses");
    check(n_program > 0, "redundancy words programmed");
    check(n_red_read > 0, "reads served by redundancy words");
    check(n_red_write > 0, "writes into redundancy words");
    check(n_overflow > 0, "overflow");
    check(n_mode_switch > 0, "mode switches");
    check(n_reprogram > 0, "algorithm change");
    check(n_clean_pass > 0, "clean pass");
    $display("mechanisms: fault_pulse=%0d dup=%0d program=%0d red_read=%0d red_write=%0d overflow=%0d mode_switch=%0d reprogram=%0d clean_pass=%0d",
             n_fault_pulse, n_dup_fault, n_program, n_red_read, n_red_write, n_overflow,
             n_mode_switch, n_reprogram, n_clean_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
