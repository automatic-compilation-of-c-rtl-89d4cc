// fu_mux: 2-to-1 multiplexer functional unit, the hardware form of the C
// conditional operator: y = (c != 0) ? a : b. Used by if-converted code in
// place of a branch. Combinational.
module fu_mux #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);
  always_comb y = (c != '0) ? a : b;
endmodule
