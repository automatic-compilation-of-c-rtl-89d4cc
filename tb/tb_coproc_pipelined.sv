// tb_coproc_pipelined: the co-processor built with the interconnect
// register stage (PIPELINED), run end to end on a dot product whose
// schedule respects the longer latencies: a result is usable two states
// after its operation issues and load data three states after the load.
// r1 n, r8 base of the second vector, r2 i, r3 sum, r4 a[i], r5 b[i],
// r6 loop condition, r7 n-1, r9 address of b[i]. The increment of i is
// issued early enough that the next iteration's loads see it, and the
// multiply-accumulate of one iteration is written in the first state of the
// next. Checks the sum read through the host port and the cycle count,
// 3 + 6n.
module tb_coproc_pipelined;
  import coproc_pkg::*;
  import coproc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, cfg_we, host_reg_we, host_mem_we;
  logic [STATE_W-1:0] cfg_addr, state;
  logic [NFU-1:0] fu_active;
  ctrl_word_t cfg_wdata;
  logic [REG_IDX_W-1:0] host_reg_idx;
  logic [MEM_ADDR_W-1:0] host_mem_addr;
  logic [DATA_W-1:0] host_reg_wdata, host_reg_rdata, host_mem_wdata, host_mem_rdata;
  logic [7:0] ex_q1, ex_q2, ex_q3;
  coproc_top #(.PIPELINED(1'b1)) dut (.*, .ex_r1_we(1'b0), .ex_r1_d('0), .ex_r2_we(1'b0), .ex_r2_d('0),
    .ex_m1_sel(1'b0), .ex_m2_sel(1'b0), .ex_r3_we(1'b0), .ex_r1_q(ex_q1), .ex_r2_q(ex_q2), .ex_r3_q(ex_q3));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic load_prog(input ctrl_word_t p []);
    for (int s = 1; s < p.size(); s++) begin
      @(negedge clk); cfg_we = 1; cfg_addr = STATE_W'(s); cfg_wdata = p[s];
    end
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic set_reg(input int r, input logic [DATA_W-1:0] v);
    @(negedge clk); host_reg_we = 1; host_reg_idx = REG_IDX_W'(r); host_reg_wdata = v;
    @(negedge clk); host_reg_we = 0;
  endtask
  task automatic set_mem(input int a, input logic [DATA_W-1:0] v);
    @(negedge clk); host_mem_we = 1; host_mem_addr = MEM_ADDR_W'(a); host_mem_wdata = v;
    @(negedge clk); host_mem_we = 0;
  endtask
  task automatic get_mem(input int a, output logic [DATA_W-1:0] v);
    @(negedge clk); host_mem_addr = MEM_ADDR_W'(a);
    @(posedge clk); #1; v = host_mem_rdata;
  endtask
  // clock edges from the one sampling start to the one opening the done cycle
  task automatic run(output int cycles);
    @(negedge clk); start = 1;
    @(posedge clk); #1; start = 0;
    cycles = 0;
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
      if (cycles > 100000) break;
    end
  endtask

  function automatic void dot_prog(ref ctrl_word_t p []);
    p = new [10];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_MUL]    = ri(0, 2, 2, 0);
    p[1].fu[FU_ADDSUB] = ri(OP_ADD, 7, 1, -1);
    p[1].fu[FU_LOGIC]  = ri(OP_AND, 3, 3, 0);
    p[3].fu[FU_MEM]    = ri(OP_LOAD, 4, 2, 0);
    p[3].fu[FU_ADDSUB] = rr(OP_ADD, 9, 2, 8);
    p[3].fu[FU_CMP]    = rr(OP_LT, 6, 2, 7);
    p[4].fu[FU_ADDSUB] = ri(OP_ADD, 2, 2, 1);
    p[5].fu[FU_MEM]    = ri(OP_LOAD, 5, 9, 0);
    p[8].fu[FU_MAC]    = rr(0, 3, 4, 5, 3);
    p[8] = branch(p[8], 6, 3);
    p[9].last = 1;
  endfunction

  task automatic test_dot(input int n, input int bbase);
    ctrl_word_t p [];
    int cycles;
    logic [DATA_W-1:0] a [], b [], sum;
    dot_prog(p);
    load_prog(p);
    a = new [n]; b = new [n];
    sum = 0;
    for (int i = 0; i < n; i++) begin
      a[i] = $urandom; b[i] = ($urandom_range(0, 1) == 1) ? $urandom : DATA_W'($urandom_range(0, 9));
      sum += a[i] * b[i];
      set_mem(i, a[i]); set_mem(bbase + i, b[i]);
    end
    set_reg(1, n); set_reg(8, bbase);
    run(cycles);
    checks++;
    if (cycles != 3 + 6 * n) begin failures++; $display("dot: %0d cycles, expected %0d", cycles, 3 + 6 * n); end
    @(negedge clk); host_reg_idx = 3;
    #1;
    checks++;
    if (host_reg_rdata !== sum) begin failures++; $display("dot: %h, expected %h", host_reg_rdata, sum); end
  endtask

  initial begin
    start = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    host_reg_we = 0; host_reg_idx = 0; host_reg_wdata = 0;
    host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    test_dot(1, 128);
    test_dot(5, 128);
    test_dot(100, 128);
    test_dot(128, 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
