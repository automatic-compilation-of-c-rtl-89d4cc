// tb_ctrl_store: writes random control words to every entry of ctrl_store,
// then reads them back in random order (asynchronous read) and checks
// overwrites.
module tb_ctrl_store;
  import coproc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [STATE_W-1:0] waddr, raddr;
  ctrl_word_t wdata, rdata;
  ctrl_word_t shadow [NSTATES];
  ctrl_store dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int i = 0; i < NSTATES; i++) begin
      @(negedge clk); we = 1; waddr = STATE_W'(i);
      for (int k = 0; k < $bits(wdata); k += 32) wdata[k +: 32] = $urandom;
      shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 3) == 0; waddr = STATE_W'($urandom); raddr = STATE_W'($urandom);
      for (int k = 0; k < $bits(wdata); k += 32) wdata[k +: 32] = $urandom;
      #1;
      checks++;
      if (rdata !== shadow[raddr]) failures++;
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
