// input_mux: multiplexer in front of the memory.
//
// In test & repair mode the memory (and the redundancy array beside it) is
// driven by the BIST test collar; in normal mode by the user's address, data
// and read/write signals, as in the published scheme. Purely combinational.
module input_mux
  import bisr_pkg::*;
#(
  parameter int ADDR_W = 8,
  parameter int DATA_W = 8
) (
  input  mode_e             mode,
  input  logic [ADDR_W-1:0] bist_addr,
  input  logic [DATA_W-1:0] bist_wdata,
  input  logic              bist_we,
  input  logic              bist_re,
  input  logic [ADDR_W-1:0] usr_addr,
  input  logic [DATA_W-1:0] usr_wdata,
  input  logic              usr_we,
  input  logic              usr_re,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  output logic              mem_we,
  output logic              mem_re
);

  always_comb begin
    if (mode == MODE_TEST) begin
      mem_addr  = bist_addr;
      mem_wdata = bist_wdata;
      mem_we    = bist_we;
      mem_re    = bist_re;
    end else begin
      mem_addr  = usr_addr;
      mem_wdata = usr_wdata;
      mem_we    = usr_we;
      mem_re    = usr_re;
    end
  end

endmodule
