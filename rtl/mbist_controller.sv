// mbist_controller: microcoded memory BIST controller with fault diagnosis.
//
// The march algorithm sits in the instruction storage, one instruction per
// march operation. The instruction pointer, read one cycle ahead (ip_next),
// feeds the instruction register; the state machine controller issues the
// registered instruction each cycle, and the address generator, data
// generator and R/W control turn it into registered address, data and
// read/write drivers: the test collar toward the input multiplexer. After
// the last operation of an element the pointer loops back to the element's
// first operation for the next address, so elements of any length (March SS
// has five operations in four of its elements) run without extra hardware.
// Fault diagnosis compares each read answer with the expected word and
// emits the fault pulse, fault address and correct data.
//
// Timing: one operation per cycle. A test of K operations per address on
// 2**ADDR_W words raises done K*2**ADDR_W + 3 cycles after start is
// sampled (March SS: 22n + 3). The block structure follows the published
// architecture figure; encodings and timing are this design's own.
//
// The pointer's registered value, the element start and the address
// counter itself are left unconnected on purpose: only the next pointer and
// the registered drivers are needed here.
module mbist_controller
  import bisr_pkg::*;
#(
  parameter int ADDR_W     = 8,
  parameter int DATA_W     = 8,
  parameter int IMEM_DEPTH = 32,
  localparam int IDX_W     = $clog2(IMEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              fail,
  output logic [15:0]       fault_cnt,
  // test collar
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  output logic              mem_we,
  output logic              mem_re,
  input  logic [DATA_W-1:0] mem_rdata,
  // to the redundancy array
  output logic              fault_pulse,
  output logic [ADDR_W-1:0] fault_addr,
  output logic [DATA_W-1:0] correct_data,
  // instruction storage write port
  input  logic              prog_we,
  input  logic [IDX_W-1:0]  prog_idx,
  input  march_instr_t      prog_instr
);

  logic              init, issue;
  logic [IDX_W-1:0]  ip_next;
  march_instr_t      next_instr, ir;
  logic              addr_last, elem_end;

  assign elem_end = issue && ir.last && addr_last;

  bist_smc u_smc (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .stop  (ir.stop),
    .init  (init),
    .issue (issue),
    .busy  (busy),
    .done  (done)
  );

  instr_ptr #(.IDX_W(IDX_W)) u_ptr (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (init),
    .advance    (issue),
    .last_op    (ir.last),
    .addr_last  (addr_last),
    .ip         (),
    .ip_next    (ip_next),
    .elem_start ()
  );

  instr_storage #(.DEPTH(IMEM_DEPTH)) u_store (
    .clk        (clk),
    .rst_n      (rst_n),
    .rd_idx     (ip_next),
    .rd_instr   (next_instr),
    .prog_we    (prog_we),
    .prog_idx   (prog_idx),
    .prog_instr (prog_instr)
  );

  instr_reg u_ir (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (init || issue),
    .d     (next_instr),
    .q     (ir)
  );

  addr_gen #(.ADDR_W(ADDR_W)) u_addr (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (init || elem_end),
    .load_down (next_instr.down),
    .step      (issue && ir.last && !addr_last),
    .down      (ir.down),
    .en        (issue),
    .addr      (),
    .addr_last (addr_last),
    .addr_drv  (mem_addr)
  );

  data_gen #(.DATA_W(DATA_W)) u_data (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (issue),
    .val      (ir.val),
    .data_drv (mem_wdata)
  );

  rw_control u_rw (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (issue),
    .wr     (ir.wr),
    .we_drv (mem_we),
    .re_drv (mem_re)
  );

  fault_diag #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .CNT_W(16)) u_diag (
    .clk          (clk),
    .rst_n        (rst_n),
    .clr          (init),
    .re           (mem_re),
    .addr         (mem_addr),
    .exp          (mem_wdata),
    .mem_rdata    (mem_rdata),
    .fault_pulse  (fault_pulse),
    .fault_addr   (fault_addr),
    .correct_data (correct_data),
    .fail         (fail),
    .fault_cnt    (fault_cnt)
  );

endmodule
