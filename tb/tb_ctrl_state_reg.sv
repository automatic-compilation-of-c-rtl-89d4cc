// tb_ctrl_state_reg: reset to state 0, then the register follows d one cycle
// later, and an asynchronous reset mid-run returns it to 0.
module tb_ctrl_state_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] d, q;
  ctrl_state_reg dut (.*);
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    d = 6'd33;
    repeat (2) @(posedge clk);
    #1; checks++; if (q !== 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); d = 6'($urandom);
      @(posedge clk); #1;
      checks++; if (q !== d) failures++;
    end
    @(negedge clk); rst_n = 0; #1;
    checks++; if (q !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
