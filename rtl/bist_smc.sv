// bist_smc: state machine controller of the microcoded MBIST.
//
// Four states. IDLE waits for start; start (also accepted in DONE, to rerun
// the test) raises init for one cycle, which clears the instruction pointer,
// loads the first instruction and the first element's start address. RUN
// issues one march operation per cycle (issue) until the instruction
// register holds a stop instruction. DRAIN waits one cycle so the last read
// issued is compared and, if faulty, recorded in the redundancy array. DONE
// holds done high until the next start. The published architecture only names the SMC;
// the states are this design's own.
//
// Timing: for an algorithm of K operations per address on N words, done
// rises K*N + 3 cycles after the cycle in which start is sampled.
module bist_smc (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic stop,
  output logic init,
  output logic issue,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;

  state_e state, state_d;

  assign init  = start && (state == S_IDLE || state == S_DONE);
  assign issue = (state == S_RUN) && !stop;
  assign busy  = (state == S_RUN) || (state == S_DRAIN);
  assign done  = (state == S_DONE);

  always_comb begin
    state_d = state;
    unique case (state)
      S_IDLE:  if (init) state_d = S_RUN;
      S_RUN:   if (stop) state_d = S_DRAIN;
      S_DRAIN: state_d = S_DONE;
      S_DONE:  if (init) state_d = S_RUN;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_d;
  end

endmodule
