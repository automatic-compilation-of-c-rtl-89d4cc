// ctrl_state_reg: the state register of the co-processor's FSM controller.
// Loads the next state on every clock edge; asynchronous active-low reset
// to state 0, the idle state.
module ctrl_state_reg #(
  parameter int unsigned STATE_W = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [STATE_W-1:0] d,
  output logic [STATE_W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
