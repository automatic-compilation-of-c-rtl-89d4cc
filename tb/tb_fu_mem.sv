// tb_fu_mem: drives fu_mem connected to a data_mem. Random stores and loads
// with base+offset addresses; checks the address and data of stores, and that
// each load returns the right word and destination exactly one cycle after
// issue, with ld_valid low otherwise.
module tb_fu_mem;
  localparam int unsigned W = 32, AW = 8, RW = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, store;
  logic [W-1:0] a, b, c;
  logic [RW-1:0] dst, ld_dst;
  logic mem_we, ld_valid;
  logic [AW-1:0] mem_addr;
  logic [W-1:0] mem_wdata, mem_rdata, ld_data, hr;
  logic [W-1:0] shadow [256];

  fu_mem dut (.*);
  data_mem #(.DEPTH(256), .WIDTH(W)) u_mem (.clk, .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata),
    .a_rdata(mem_rdata), .b_we(1'b0), .b_addr('0), .b_wdata('0), .b_rdata(hr));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       exp_v;
    logic [RW-1:0] exp_d;
    logic [W-1:0]  exp_w;
    int nload = 0;
    en = 0; store = 0; a = 0; b = 0; c = 0; dst = 0;
    exp_v = 0; exp_d = 0; exp_w = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // initialise memory through the FU
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); en = 1; store = 1; a = W'(i) - 7; b = 7; c = $urandom; shadow[i] = c;
      #1;
      checks++;
      if (!(mem_we && mem_addr == AW'(i) && mem_wdata == c)) failures++;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (ld_valid !== exp_v || (exp_v && (ld_dst !== exp_d || ld_data !== exp_w))) begin
        failures++;
        $display("load return: v=%b d=%0d w=%h exp v=%b d=%0d w=%h", ld_valid, ld_dst, ld_data, exp_v, exp_d, exp_w);
      end
      en = $urandom_range(0, 3) != 0; store = $urandom_range(0, 2) == 0;
      a = $urandom; b = $urandom; c = $urandom; dst = RW'($urandom);
      #1;
      exp_v = en && !store;
      exp_d = dst;
      exp_w = shadow[AW'(a + b)];
      if (en && store) shadow[AW'(a + b)] = c;
      if (exp_v) nload++;
    end
    checks++;
    if (nload < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
