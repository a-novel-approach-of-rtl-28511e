// data_gen: data generator of the microcoded MBIST.
//
// Expands the 1-bit data value of the current instruction into a full word,
// all zeros or all ones (a solid data background), and registers it when an
// operation is issued. The same word is the write data of a write and the
// expected data of a read. The published architecture names the block only; the solid
// background is this design's choice.
module data_gen #(
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              val,
  output logic [DATA_W-1:0] data_drv
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  data_drv <= '0;
    else if (en) data_drv <= {DATA_W{val}};
  end

endmodule
