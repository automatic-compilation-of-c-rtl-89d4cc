// controller: the co-processor's finite-state machine, built from its three
// parts: state register (ctrl_state_reg), next-state decoding
// (ctrl_next_state) and control signal decoding (ctrl_signal_decode), plus
// the table of per-state control words (ctrl_store) that the decoding reads.
//
// Host handshake: with the machine idle (busy low), a one-cycle 'start'
// moves it to state 1. It then executes one scheduled state per clock until
// a state marked 'last'; after that state's edge it is idle again and 'done'
// is high for one cycle. A schedule of N executed states thus takes N+1
// cycles from the start edge to done. Control words are written through the
// cfg port, which must not be used while busy. 'state' shows the current
// FSM state (0 when idle) for observation.
module controller
  import coproc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic [STATE_W-1:0] state,
  input  logic               cond,
  output dp_ctl_t            ctl,
  input  logic               cfg_we,
  input  logic [STATE_W-1:0] cfg_addr,
  input  ctrl_word_t         cfg_wdata
);
  logic [STATE_W-1:0] next_state;
  ctrl_word_t         cw;
  logic               done_now, wr_conflict;

  ctrl_store #(.NWORDS(NSTATES)) u_store (
    .clk, .we(cfg_we), .waddr(cfg_addr), .wdata(cfg_wdata), .raddr(state), .rdata(cw));

  ctrl_next_state u_next (.state, .start, .cond, .cw, .next_state, .done(done_now));

  ctrl_state_reg #(.STATE_W(STATE_W)) u_state (.clk, .rst_n, .d(next_state), .q(state));

  ctrl_signal_decode u_dec (.cw, .active(state != '0), .ctl, .wr_conflict);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= done_now;
  end
  always_comb busy = (state != '0);

  assert property (@(posedge clk) disable iff (!rst_n) !wr_conflict)
    else $error("controller: two FUs write one register in state %0d", state);
  assert property (@(posedge clk) disable iff (!rst_n) !(cfg_we && busy))
    else $error("controller: control store written while busy");
endmodule
