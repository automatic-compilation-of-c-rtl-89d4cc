// data_mem: local data memory of the co-processor, a true dual-port
// synchronous RAM (one FPGA block RAM at the default size). Port A belongs to
// the memory-access FU, port B to the host, which fills the arrays before a
// run and reads results after it. Both ports read synchronously: rdata holds
// the word addressed in the previous cycle (read-before-write on the same
// port). Writing the same word from both ports in one cycle is not allowed.
// Depth and width are this design's choices.
module data_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

  assert property (@(posedge clk) !(a_we && b_we && a_addr == b_addr))
    else $error("data_mem: both ports write word %0d", a_addr);
endmodule
