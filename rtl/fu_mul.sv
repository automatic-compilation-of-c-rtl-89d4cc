// fu_mul: multiplier functional unit. y is the low WIDTH bits of a * b, which
// is the same for signed and unsigned operands and matches C integer
// multiplication. Combinational; the synthesis tool maps it onto the FPGA's
// embedded multipliers.
module fu_mul #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a * b;
endmodule
