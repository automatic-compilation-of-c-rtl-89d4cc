// dp_regfile: the data-path registers that carry C variables and
// intermediate values from state to state. Each register has its own enable
// (we) and its own write multiplexer (wsel) choosing one of NSRC sources,
// the FU results, so several FUs can write different registers in the same
// state. A host port writes one register while the co-processor is idle
// (arguments); the host port has priority. All registers reset to zero and
// q shows every register for the operand multiplexers.
module dp_regfile #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREGS = 16,
  parameter int unsigned NSRC  = 8,
  localparam int unsigned RW   = $clog2(NREGS),
  localparam int unsigned SW   = $clog2(NSRC)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NREGS-1:0]            we,
  input  logic [NREGS-1:0][SW-1:0]    wsel,
  input  logic [NSRC-1:0][WIDTH-1:0]  src,
  input  logic                        host_we,
  input  logic [RW-1:0]               host_idx,
  input  logic [WIDTH-1:0]            host_wdata,
  output logic [NREGS-1:0][WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      for (int r = 0; r < NREGS; r++) begin
        if (host_we && host_idx == RW'(r)) q[r] <= host_wdata;
        else if (we[r])                     q[r] <= src[wsel[r]];
      end
    end
  end
endmodule
