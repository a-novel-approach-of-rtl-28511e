// sram: the embedded memory the BISR tests and repairs.
//
// A single-port synchronous word memory of 2**ADDR_W words of DATA_W bits:
// a write stores wdata at addr on the clock edge; a read returns the word at
// addr in rdata one cycle later, and rdata holds until the next read. The
// contents are not reset. The published scheme does not size the memory; the sizes
// here are this design's defaults.
//
// To let the repair be exercised, the model carries NUM_DEF stuck-at cell
// defects: while def_en[k] is set, bit def_bit[k] of word def_addr[k] reads
// as def_val[k] whatever was written. Tie def_en to 0 for a defect-free
// memory.
module sram #(
  parameter int ADDR_W  = 8,
  parameter int DATA_W  = 8,
  parameter int NUM_DEF = 8,
  localparam int BIT_W  = (DATA_W > 1) ? $clog2(DATA_W) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [ADDR_W-1:0]               addr,
  input  logic [DATA_W-1:0]               wdata,
  input  logic                            we,
  input  logic                            re,
  output logic [DATA_W-1:0]               rdata,
  input  logic [NUM_DEF-1:0]              def_en,
  input  logic [NUM_DEF-1:0][ADDR_W-1:0]  def_addr,
  input  logic [NUM_DEF-1:0][BIT_W-1:0]   def_bit,
  input  logic [NUM_DEF-1:0]              def_val
);

  localparam int DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] word;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  // Word as read out, with the defects of this address applied.
  always_comb begin
    word = mem[addr];
    for (int k = 0; k < NUM_DEF; k++) begin
      if (def_en[k] && def_addr[k] == addr) word[def_bit[k]] = def_val[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= word;
  end

endmodule
