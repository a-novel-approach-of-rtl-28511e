// rw_control: read/write control of the microcoded MBIST.
//
// Turns the current instruction into one-cycle memory strobes: when an
// operation is issued (en) it registers we_drv for a write or re_drv for a
// read; with en low both strobes are low in the next cycle. Registered so
// that the strobes line up with addr_gen's and data_gen's drivers. The
// published architecture names this block only; the strobe timing is this
// design's own.
module rw_control (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic wr,
  output logic we_drv,
  output logic re_drv
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we_drv <= 1'b0;
      re_drv <= 1'b0;
    end else begin
      we_drv <= en &  wr;
      re_drv <= en & ~wr;
    end
  end

endmodule
