// tb_dp_regfile: random register enables, write selects and host writes on
// dp_regfile, compared with a shadow copy; checks reset to zero, that
// unenabled registers hold, and that the host write has priority.
module tb_dp_regfile;
  localparam int unsigned W = 32, N = 16, NS = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] we;
  logic [N-1:0][2:0] wsel;
  logic [NS-1:0][W-1:0] src;
  logic host_we;
  logic [3:0] host_idx;
  logic [W-1:0] host_wdata;
  logic [N-1:0][W-1:0] q, shadow;
  dp_regfile dut (.*);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; wsel = 0; src = 0; host_we = 0; host_idx = 0; host_wdata = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) failures++;
    rst_n = 1;
    shadow = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = N'($urandom) & N'($urandom);
      for (int r = 0; r < N; r++) wsel[r] = 3'($urandom);
      for (int s = 0; s < NS; s++) src[s] = $urandom;
      host_we = $urandom_range(0, 4) == 0; host_idx = 4'($urandom); host_wdata = $urandom;
      for (int r = 0; r < N; r++)
        if (host_we && host_idx == 4'(r)) shadow[r] = host_wdata;
        else if (we[r]) shadow[r] = src[wsel[r]];
      @(posedge clk); #1;
      checks++;
      if (q !== shadow) begin failures++; $display("regfile mismatch at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
