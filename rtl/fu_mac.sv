// fu_mac: multiply-accumulate functional unit, y = a * b + c modulo
// 2**WIDTH. The running sum lives in an ordinary data-path register that the
// schedule feeds back as operand c and writes again with y, so a dot-product
// step costs one state. Combinational.
module fu_mac #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);
  always_comb y = a * b + c;
endmodule
