// fu_addsub: adder/subtractor functional unit of the co-processor data-path.
// y = a + b when sub = 0, y = a - b when sub = 1, both modulo 2**WIDTH as in C
// integer arithmetic. Purely combinational: the operands come from data-path
// registers and the result is captured by a register at the end of the state
// (non-pipelined data-path). WIDTH is reduced per instance when bit-width
// analysis shows the upper bits unused; 32 is this design's default.
module fu_addsub #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sub,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = sub ? (a - b) : (a + b);
endmodule
