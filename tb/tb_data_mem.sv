// tb_data_mem: random reads and writes on both ports of data_mem, compared
// with a shadow array; checks the one-cycle synchronous read latency and
// read-before-write behaviour on each port.
module tb_data_mem;
  localparam int unsigned DEPTH = 256, W = 32, AW = 8;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [W-1:0] shadow [DEPTH];
  data_mem dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ea, eb;
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); b_we = 1; b_addr = AW'(i); b_wdata = $urandom; shadow[i] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a_addr = AW'($urandom); b_addr = AW'($urandom);
      a_we = $urandom_range(0, 2) == 0; b_we = $urandom_range(0, 2) == 0 && b_addr != a_addr;
      a_wdata = $urandom; b_wdata = $urandom;
      ea = shadow[a_addr]; eb = shadow[b_addr];
      @(posedge clk);
      if (a_we) shadow[a_addr] = a_wdata;
      if (b_we) shadow[b_addr] = b_wdata;
      #1;
      checks += 2;
      if (a_rdata !== ea) begin failures++; $display("A read %0d: %h exp %h", a_addr, a_rdata, ea); end
      if (b_rdata !== eb) begin failures++; $display("B read %0d: %h exp %h", b_addr, b_rdata, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
