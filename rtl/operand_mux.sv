// operand_mux: one FU input of the data-path interconnect. Selects the
// register numbered 'sel' or, when use_imm is set, the constant 'imm' taken
// from the controller (constants propagated into the schedule). The template
// generated per application keeps only the register inputs an FU is bound
// to; this design keeps the full register-to-FU crossbar so one data-path
// runs any schedule. Combinational.
module operand_mux #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREGS = 16,
  localparam int unsigned SW   = $clog2(NREGS)
) (
  input  logic [NREGS-1:0][WIDTH-1:0] regs,
  input  logic [SW-1:0]               sel,
  input  logic                        use_imm,
  input  logic [WIDTH-1:0]            imm,
  output logic [WIDTH-1:0]            y
);
  always_comb y = use_imm ? imm : regs[sel];
endmodule
