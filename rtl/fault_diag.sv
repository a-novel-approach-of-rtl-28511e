// fault_diag: fault diagnosis of the MBIST.
//
// Compares what the memory returns for a BIST read with the expected word.
// A read issued in cycle t (re, addr, exp) is answered by the memory in cycle
// t+1; fault_diag keeps addr and exp for that cycle and, on a mismatch, raises
// fault_pulse for that one cycle together with fault_addr and correct_data
// (the expected word). These are the three signals the published scheme takes from
// the MBIST to program the redundancy array. fail is a sticky flag and
// fault_cnt counts pulses; both clear on clr (a new test start).
module fault_diag #(
  parameter int ADDR_W = 8,
  parameter int DATA_W = 8,
  parameter int CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              re,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] exp,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic              fault_pulse,
  output logic [ADDR_W-1:0] fault_addr,
  output logic [DATA_W-1:0] correct_data,
  output logic              fail,
  output logic [CNT_W-1:0]  fault_cnt
);

  logic re_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      re_q         <= 1'b0;
      fault_addr   <= '0;
      correct_data <= '0;
    end else begin
      re_q <= re;
      if (re) begin
        fault_addr   <= addr;
        correct_data <= exp;
      end
    end
  end

  assign fault_pulse = re_q && (mem_rdata != correct_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail      <= 1'b0;
      fault_cnt <= '0;
    end else if (clr) begin
      fail      <= 1'b0;
      fault_cnt <= '0;
    end else if (fault_pulse) begin
      fail      <= 1'b1;
      if (fault_cnt != '1) fault_cnt <= fault_cnt + 1'b1;
    end
  end

endmodule
