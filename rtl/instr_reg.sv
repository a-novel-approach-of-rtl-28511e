// instr_reg: instruction register of the microcoded MBIST.
//
// Holds the instruction the pointer selects, loaded from the instruction
// storage at ip_next so it always matches the registered pointer. It holds a
// stop instruction after reset and keeps its value while load is low, so no
// operation issues before the BIST is started. The reset value is this
// design's choice.
module instr_reg
  import bisr_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  march_instr_t d,
  output march_instr_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= STOP_INSTR;
    else if (load) q <= d;
  end

endmodule
