// tb_operand_mux: every register select and the immediate path of
// operand_mux, with random register contents.
module tb_operand_mux;
  localparam int unsigned W = 32, N = 16;
  int checks = 0, failures = 0;
  logic [N-1:0][W-1:0] regs;
  logic [3:0] sel;
  logic use_imm;
  logic [W-1:0] imm, y;
  operand_mux dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      for (int r = 0; r < N; r++) regs[r] = $urandom;
      sel = 4'(i); use_imm = $urandom_range(0, 3) == 0; imm = $urandom;
      #1;
      checks++;
      if (y !== (use_imm ? imm : regs[i % N])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
