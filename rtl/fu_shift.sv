// fu_shift: shifter functional unit. op 0: logical left, op 1: logical right,
// op 2: arithmetic right (C '>>' on a signed value); op 3 is treated as
// logical left. The shift amount is the low $clog2(WIDTH) bits of 'sh', as a
// C shift by less than the word width. Combinational, one state per use.
module fu_shift #(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned SH_W = $clog2(WIDTH)
) (
  input  logic [1:0]       op,
  input  logic [WIDTH-1:0] a,
  input  logic [SH_W-1:0]  sh,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    unique case (op)
      2'd1:    y = a >> sh;
      2'd2:    y = WIDTH'($signed(a) >>> sh);
      default: y = a << sh;
    endcase
  end
endmodule
