// output_mux: output multiplexer of the redundancy logic array.
//
// When a read hits a programmed redundancy word, the word's data field is
// returned instead of what the faulty memory location reads out; otherwise
// the memory output passes, as in the published scheme. Purely combinational; both inputs arrive one
// cycle after the read, so data_out does too.
module output_mux #(
  parameter int DATA_W = 8
) (
  input  logic              red_hit,
  input  logic [DATA_W-1:0] red_data,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic [DATA_W-1:0] data_out
);

  assign data_out = red_hit ? red_data : mem_rdata;

endmodule
