// bisr_top: word-redundancy built-in self-repair (BISR) for an embedded SRAM.
//
// The memory is wrapped by a microcoded MBIST controller running March SS,
// an input multiplexer, a redundancy logic array of NUM_RED words placed in
// parallel with the memory, and an output multiplexer.
//
// Test & repair mode (mode = MODE_TEST): the input multiplexer gives the
// memory to the BIST. bist_start runs the stored algorithm; every read that
// returns a wrong word makes a fault pulse, which programs the next free
// redundancy word with the faulty address and the correct data (once per
// address). overflow reports a fault found after all words were used: the
// memory is then not repairable. bist_done rises 22*2**ADDR_W + 3 cycles
// after start for March SS.
//
// Normal mode (mode = MODE_NORMAL): the user's addr/data_in/we/re drive the
// memory. Each access is compared with the stored faulty addresses; on a
// match a write also goes into the redundancy word and a read returns the
// word's data field instead of the memory's. data_out is valid the cycle
// after re. fa_idx/fa_valid/fa_addr read out the stored faulty addresses.
//
// prog_* rewrite the instruction storage to run another march algorithm.
// def_* are the stuck-at defect inputs of the memory model (tie def_en to 0
// for a defect-free memory). Block structure and the two modes follow the
// published architecture; widths, timing and encodings are this design's.
module bisr_top
  import bisr_pkg::*;
#(
  parameter int ADDR_W     = 8,
  parameter int DATA_W     = 8,
  parameter int NUM_RED    = 4,
  parameter int NUM_DEF    = 8,
  parameter int IMEM_DEPTH = 32,
  localparam int IDX_W     = $clog2(IMEM_DEPTH),
  localparam int CNT_W     = $clog2(NUM_RED + 1),
  localparam int RIDX_W    = (NUM_RED > 1) ? $clog2(NUM_RED) : 1,
  localparam int BIT_W     = (DATA_W > 1) ? $clog2(DATA_W) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  mode_e                          mode,
  // BIST
  input  logic                           bist_start,
  output logic                           bist_busy,
  output logic                           bist_done,
  output logic                           bist_fail,
  output logic [15:0]                    fault_cnt,
  output logic                           overflow,
  output logic [CNT_W-1:0]               red_used,
  // user port
  input  logic [ADDR_W-1:0]              addr,
  input  logic [DATA_W-1:0]              data_in,
  input  logic                           we,
  input  logic                           re,
  output logic [DATA_W-1:0]              data_out,
  // stored fault addresses
  input  logic [RIDX_W-1:0]              fa_idx,
  output logic                           fa_valid,
  output logic [ADDR_W-1:0]              fa_addr,
  // instruction storage write port
  input  logic                           prog_we,
  input  logic [IDX_W-1:0]               prog_idx,
  input  march_instr_t                   prog_instr,
  // memory defect model
  input  logic [NUM_DEF-1:0]             def_en,
  input  logic [NUM_DEF-1:0][ADDR_W-1:0] def_addr,
  input  logic [NUM_DEF-1:0][BIT_W-1:0]  def_bit,
  input  logic [NUM_DEF-1:0]             def_val
);

  logic [ADDR_W-1:0] b_addr, m_addr, f_addr;
  logic [DATA_W-1:0] b_wdata, m_wdata, m_rdata, c_data, r_data;
  logic              b_we, b_re, m_we, m_re, f_pulse, r_hit;

  mbist_controller #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .IMEM_DEPTH(IMEM_DEPTH)
  ) u_mbist (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (bist_start && mode == MODE_TEST),
    .busy         (bist_busy),
    .done         (bist_done),
    .fail         (bist_fail),
    .fault_cnt    (fault_cnt),
    .mem_addr     (b_addr),
    .mem_wdata    (b_wdata),
    .mem_we       (b_we),
    .mem_re       (b_re),
    .mem_rdata    (m_rdata),
    .fault_pulse  (f_pulse),
    .fault_addr   (f_addr),
    .correct_data (c_data),
    .prog_we      (prog_we),
    .prog_idx     (prog_idx),
    .prog_instr   (prog_instr)
  );

  input_mux #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_imux (
    .mode       (mode),
    .bist_addr  (b_addr),
    .bist_wdata (b_wdata),
    .bist_we    (b_we),
    .bist_re    (b_re),
    .usr_addr   (addr),
    .usr_wdata  (data_in),
    .usr_we     (we),
    .usr_re     (re),
    .mem_addr   (m_addr),
    .mem_wdata  (m_wdata),
    .mem_we     (m_we),
    .mem_re     (m_re)
  );

  sram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .NUM_DEF(NUM_DEF)) u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .addr     (m_addr),
    .wdata    (m_wdata),
    .we       (m_we),
    .re       (m_re),
    .rdata    (m_rdata),
    .def_en   (def_en),
    .def_addr (def_addr),
    .def_bit  (def_bit),
    .def_val  (def_val)
  );

  rl_array #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .NUM_RED(NUM_RED)) u_rla (
    .clk          (clk),
    .rst_n        (rst_n),
    .prog_en      (mode == MODE_TEST),
    .fault_pulse  (f_pulse),
    .fault_addr   (f_addr),
    .correct_data (c_data),
    .addr         (m_addr),
    .we           (m_we),
    .re           (m_re),
    .wdata        (m_wdata),
    .rd_hit       (r_hit),
    .rd_data      (r_data),
    .used         (red_used),
    .overflow     (overflow),
    .fa_idx       (fa_idx),
    .fa_valid     (fa_valid),
    .fa_addr      (fa_addr)
  );

  output_mux #(.DATA_W(DATA_W)) u_omux (
    .red_hit   (r_hit),
    .red_data  (r_data),
    .mem_rdata (m_rdata),
    .data_out  (data_out)
  );

endmodule
