// instr_ptr: instruction pointer of the microcoded MBIST.
//
// Points at the march operation being executed. Each cycle an operation is
// issued (advance) the pointer moves to the next operation of the element;
// after the last operation of an element it jumps back to the element's
// first operation for the next address, or, when the address generator is at
// the element's final address, moves on to the next element, whose index it
// remembers as the new loop target. start clears both to 0. The published architecture only
// names this block; the looping scheme is this design's own.
//
// ip_next is the combinational next value, used to read the instruction
// storage one cycle ahead so that an operation issues every cycle.
module instr_ptr #(
  parameter int IDX_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             advance,
  input  logic             last_op,
  input  logic             addr_last,
  output logic [IDX_W-1:0] ip,
  output logic [IDX_W-1:0] ip_next,
  output logic [IDX_W-1:0] elem_start
);

  logic [IDX_W-1:0] elem_next;

  always_comb begin
    ip_next   = ip;
    elem_next = elem_start;
    if (start) begin
      ip_next   = '0;
      elem_next = '0;
    end else if (advance) begin
      if (!last_op) begin
        ip_next = ip + 1'b1;
      end else if (!addr_last) begin
        ip_next = elem_start;
      end else begin
        ip_next   = ip + 1'b1;
        elem_next = ip + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip         <= '0;
      elem_start <= '0;
    end else begin
      ip         <= ip_next;
      elem_start <= elem_next;
    end
  end

endmodule
