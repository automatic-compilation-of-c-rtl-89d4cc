// ctrl_store: the per-state control words of the schedule, one word per
// FSM state, read asynchronously at the current state by the decoding logic.
// A framework that generates the controller for one application turns this
// table into fixed decoding logic; here it is a small RAM that the host
// loads before a run (one word per write cycle), so the same co-processor
// runs any schedule that fits in NSTATES states. The table is not reset:
// the idle state's word is never used.
module ctrl_store
  import coproc_pkg::*;
#(
  parameter int unsigned NWORDS = NSTATES,
  localparam int unsigned AW    = $clog2(NWORDS)
) (
  input  logic       clk,
  input  logic       we,
  input  logic [AW-1:0] waddr,
  input  ctrl_word_t wdata,
  input  logic [AW-1:0] raddr,
  output ctrl_word_t rdata
);
  ctrl_word_t mem [NWORDS];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  always_comb rdata = mem[raddr];
endmodule
