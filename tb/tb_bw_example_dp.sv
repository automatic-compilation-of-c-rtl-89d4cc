// tb_bw_example_dp: two instances of bw_example_dp, one with the default
// constants (both source LSBs 0, so Reg3's LSB is inferred constant) and one
// whose constants make the LSB unknown. Random loads and selects are checked
// against a full-width model of Reg1, Reg2, M1, multiplier, shifter, M2 and
// Reg3; in particular the bits inferred constant must always read as that
// constant, and instance B's unknown Reg3 LSB must take both values.
module tb_bw_example_dp;
  localparam int unsigned W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic r1_we, r2_we, r3_we, m1_sel, m2_sel;
  logic [W-1:0] r1_d, r2_d;
  logic [W-1:0] a_r1, a_r2, a_r3, b_r1, b_r2, b_r3;

  bw_example_dp #(.WIDTH(W)) dut_a (.clk, .rst_n, .r1_we, .r1_d, .r2_we, .r2_d, .m1_sel, .m2_sel,
    .r3_we, .r1_q(a_r1), .r2_q(a_r2), .r3_q(a_r3));
  bw_example_dp #(.WIDTH(W), .R1_LOW(2'b01), .R2_LOW(2'b11)) dut_b (.clk, .rst_n, .r1_we, .r1_d,
    .r2_we, .r2_d, .m1_sel, .m2_sel, .r3_we, .r1_q(b_r1), .r2_q(b_r2), .r3_q(b_r3));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // full-width reference of one instance
  task automatic step_model(input logic [1:0] l1, input logic [1:0] l2,
                            inout logic [W-1:0] r1, inout logic [W-1:0] r2, inout logic [W-1:0] r3);
    logic [W-1:0] m1, prod, sh, m2;
    m1   = m1_sel ? r2 : r1;
    prod = W'(int'(m1) * int'(r1));
    sh   = W'(int'(r2) * 4);
    m2   = m2_sel ? sh : prod;
    if (r3_we) r3 = m2;
    if (r1_we) r1 = {r1_d[W-1:2], l1};
    if (r2_we) r2 = {r2_d[W-1:2], l2};
  endtask

  initial begin
    logic [W-1:0] ma1, ma2, ma3, mb1, mb2, mb3;
    int n_lsb_set = 0;
    r1_we = 0; r2_we = 0; r3_we = 0; m1_sel = 0; m2_sel = 0; r1_d = 0; r2_d = 0;
    ma1 = {{(W-2){1'b0}}, 2'b10}; ma2 = '0; ma3 = '0;
    mb1 = {{(W-2){1'b0}}, 2'b01}; mb2 = {{(W-2){1'b0}}, 2'b11}; mb3 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      r1_we = $urandom; r2_we = $urandom; r3_we = $urandom;
      m1_sel = $urandom; m2_sel = $urandom;
      r1_d = W'($urandom); r2_d = W'($urandom);
      step_model(2'b10, 2'b00, ma1, ma2, ma3);
      step_model(2'b01, 2'b11, mb1, mb2, mb3);
      @(posedge clk); #1;
      checks += 2;
      if ({a_r1, a_r2, a_r3} !== {ma1, ma2, ma3}) begin
        failures++; if (failures < 10) $display("A: %h %h %h exp %h %h %h", a_r1, a_r2, a_r3, ma1, ma2, ma3);
      end
      if ({b_r1, b_r2, b_r3} !== {mb1, mb2, mb3}) begin
        failures++; if (failures < 10) $display("B: %h %h %h exp %h %h %h", b_r1, b_r2, b_r3, mb1, mb2, mb3);
      end
      if (b_r3[0]) n_lsb_set++;
    end
    checks++;
    if (n_lsb_set == 0) failures++;   // the unknown LSB really varies in instance B
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
