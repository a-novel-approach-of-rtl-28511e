// redundancy_word: one redundant word of the repair array.
//
// Three fields: FA (fault asserted), the faulty address and a data field.
// prog (the fault pulse routed to this word) sets FA, stores prog_addr and
// loads prog_data (the correct data) into the data field. Once FA is set, a
// comparator matches every memory-side address against the address field:
// on a match a write (IE) also stores wdata in the data field, and a read
// (OE) returns the data field, so the word stands in for the faulty memory
// location. The field layout, the comparator and the IE/OE controls follow
// the published drawing of a redundancy word; registering the read output
// (rd_hit, rd_data one cycle after re, zero when not hit) to line up with
// the synchronous memory is this design's choice. Fields clear only on
// reset.
module redundancy_word #(
  parameter int ADDR_W = 8,
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prog,
  input  logic [ADDR_W-1:0] prog_addr,
  input  logic [DATA_W-1:0] prog_data,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic              re,
  input  logic [DATA_W-1:0] wdata,
  output logic              fa,
  output logic [ADDR_W-1:0] addr_field,
  output logic              hit,
  output logic              rd_hit,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] data_field;
  logic              ie, oe;

  assign hit = fa && (addr == addr_field);
  assign ie  = hit && we;
  assign oe  = hit && re;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fa         <= 1'b0;
      addr_field <= '0;
      data_field <= '0;
    end else if (prog) begin
      fa         <= 1'b1;
      addr_field <= prog_addr;
      data_field <= prog_data;
    end else if (ie) begin
      data_field <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_hit  <= 1'b0;
      rd_data <= '0;
    end else if (re) begin
      rd_hit  <= oe;
      rd_data <= oe ? data_field : '0;
    end
  end

endmodule
