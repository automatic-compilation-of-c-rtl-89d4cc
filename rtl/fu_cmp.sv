// fu_cmp: comparison functional unit. Returns the C truth value (0 or 1,
// zero-extended to WIDTH) of a <op> b: 0 ==, 1 !=, 2 < , 3 <=, 4 >, 5 >=
// (signed), 6 < and 7 >= (unsigned). The result is written to a data-path
// register, from which the controller also takes its branch conditions.
// Combinational.
module fu_cmp #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [2:0]       op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  logic r;
  always_comb begin
    unique case (op)
      3'd0: r = (a == b);
      3'd1: r = (a != b);
      3'd2: r = ($signed(a) <  $signed(b));
      3'd3: r = ($signed(a) <= $signed(b));
      3'd4: r = ($signed(a) >  $signed(b));
      3'd5: r = ($signed(a) >= $signed(b));
      3'd6: r = (a <  b);
      3'd7: r = (a >= b);
    endcase
    y = WIDTH'(r);
  end
endmodule
