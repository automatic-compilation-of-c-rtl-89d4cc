// fu_logic: bitwise logic functional unit. op 0: a & b, 1: a | b, 2: a ^ b,
// 3: ~a. Combinational.
module fu_logic #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [1:0]       op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    unique case (op)
      2'd0: y = a & b;
      2'd1: y = a | b;
      2'd2: y = a ^ b;
      2'd3: y = ~a;
    endcase
  end
endmodule
