// instr_storage: the order storage unit of the microcoded MBIST.
//
// A small register file holding the march algorithm, one instruction
// (bisr_pkg::march_instr_t) per march operation. Reset loads March SS
// (22 operations followed by stop instructions), so the BIST runs March SS
// without any set-up. Another march algorithm is run by rewriting the
// entries through the write port, which is how the published scheme lets the same
// hardware serve other algorithms; the register-file form and the write
// port are this design's choices.
//
// Interface: rd_idx -> rd_instr is combinational. prog_we writes prog_instr
// into entry prog_idx at the rising clock edge. Asynchronous active-low reset.
module instr_storage
  import bisr_pkg::*;
#(
  parameter int DEPTH = 32,
  localparam int IDX_W = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [IDX_W-1:0]   rd_idx,
  output march_instr_t       rd_instr,
  input  logic               prog_we,
  input  logic [IDX_W-1:0]   prog_idx,
  input  march_instr_t       prog_instr
);

  march_instr_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= march_ss(i);
    end else if (prog_we) begin
      mem[prog_idx] <= prog_instr;
    end
  end

  assign rd_instr = mem[rd_idx];

endmodule
