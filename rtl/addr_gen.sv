// addr_gen: address generator of the microcoded MBIST.
//
// An up/down counter that walks the memory in the address order of the
// current march element: load starts an element at address 0 (up) or at the
// top address (down); step moves one address in the direction given by
// down. addr_last flags the element's final address. Every operation of an
// element is applied to one address before the counter moves, as the march
// notation requires. addr_drv is the counter value registered when an
// operation is issued (en), the address driver toward the input multiplexer,
// aligned with data_gen and rw_control. The two address orders come from
// march notation; the counter and driver register are this design's own.
module addr_gen #(
  parameter int ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              load_down,
  input  logic              step,
  input  logic              down,
  input  logic              en,
  output logic [ADDR_W-1:0] addr,
  output logic              addr_last,
  output logic [ADDR_W-1:0] addr_drv
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       addr <= '0;
    else if (load)    addr <= load_down ? '1 : '0;
    else if (step)    addr <= down ? addr - 1'b1 : addr + 1'b1;
  end

  assign addr_last = down ? (addr == '0) : (addr == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  addr_drv <= '0;
    else if (en) addr_drv <= addr;
  end

endmodule
