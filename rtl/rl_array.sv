// rl_array: redundancy logic array, the repair module of the BISR.
//
// NUM_RED redundancy words sit beside the memory. In test & repair mode
// (prog_en) each fault pulse from the MBIST programs the next free word with
// the faulty address and the correct data, and the fill count advances; a
// fault whose address a word already holds is ignored, so each faulty
// address is stored only once. A fault that finds every word used sets the
// sticky overflow flag: the memory cannot be repaired. If the memory-side
// operation in the same cycle writes the faulty address, the word takes that
// write data instead, so it is not left stale.
//
// In both modes every memory-side access is also presented to the words: a
// write to a stored address updates its data field, and a read of one gives
// rd_hit and rd_data one cycle later, which the output multiplexer selects
// over the memory. fa_idx selects a word whose FA bit and address are shown
// on fa_valid/fa_addr, so the fault addresses can be read out after test.
// The words, the fault pulse, the fill order and the overflow flag follow
// the published scheme; storing each address once comes from its stated
// aim, and the same-cycle write forwarding and the read-out port are this
// design's own.
module rl_array #(
  parameter int ADDR_W  = 8,
  parameter int DATA_W  = 8,
  parameter int NUM_RED = 4,
  localparam int CNT_W  = $clog2(NUM_RED + 1),
  localparam int IDX_W  = (NUM_RED > 1) ? $clog2(NUM_RED) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prog_en,
  input  logic              fault_pulse,
  input  logic [ADDR_W-1:0] fault_addr,
  input  logic [DATA_W-1:0] correct_data,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic              re,
  input  logic [DATA_W-1:0] wdata,
  output logic              rd_hit,
  output logic [DATA_W-1:0] rd_data,
  output logic [CNT_W-1:0]  used,
  output logic              overflow,
  input  logic [IDX_W-1:0]  fa_idx,
  output logic              fa_valid,
  output logic [ADDR_W-1:0] fa_addr
);

  logic [NUM_RED-1:0]             fa, hit, w_rd_hit, prog, known;
  logic [NUM_RED-1:0][ADDR_W-1:0] addr_field;
  logic [NUM_RED-1:0][DATA_W-1:0] w_rd_data;
  logic [DATA_W-1:0]              prog_data;
  logic                           new_fault;

  for (genvar i = 0; i < NUM_RED; i++) begin : g_word
    assign known[i] = fa[i] && (addr_field[i] == fault_addr);
    assign prog[i]  = new_fault && (used == CNT_W'(i));

    redundancy_word #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_word (
      .clk        (clk),
      .rst_n      (rst_n),
      .prog       (prog[i]),
      .prog_addr  (fault_addr),
      .prog_data  (prog_data),
      .addr       (addr),
      .we         (we),
      .re         (re),
      .wdata      (wdata),
      .fa         (fa[i]),
      .addr_field (addr_field[i]),
      .hit        (hit[i]),
      .rd_hit     (w_rd_hit[i]),
      .rd_data    (w_rd_data[i])
    );
  end

  assign new_fault = prog_en && fault_pulse && (known == '0);
  assign prog_data = (we && addr == fault_addr) ? wdata : correct_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used     <= '0;
      overflow <= 1'b0;
    end else if (new_fault) begin
      if (used == CNT_W'(NUM_RED)) overflow <= 1'b1;
      else                         used     <= used + 1'b1;
    end
  end

  always_comb begin
    rd_data = '0;
    for (int i = 0; i < NUM_RED; i++) rd_data |= w_rd_data[i];
  end
  assign rd_hit = |w_rd_hit;

  assign fa_valid = fa[fa_idx];
  assign fa_addr  = addr_field[fa_idx];

  // A memory-side address may match at most one programmed word.
  a_one_hit : assert property (@(posedge clk) $onehot0(hit));

endmodule
