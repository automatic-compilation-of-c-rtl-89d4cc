// tb_workloads_viterbi: branch-metric kernel of a soft-decision Viterbi
// decoder for a rate-1/2 code, hand-scheduled for the co-processor with its
// full FU set. Each received symbol pair (r0, r1) holds two 3-bit soft values
// (0 = confident 0, 7 = confident 1). For the four code words 00, 01, 10 and
// 11 the kernel writes the distances to the ideal levels:
//   bm00 = r0 + r1,      bm01 = r0 + (7 - r1),
//   bm10 = (7 - r0) + r1, bm11 = 14 - r0 - r1.
// bm01 comes from one multiply-accumulate (r0 - r1) plus 7; the two
// complements are formed by negating on the multiplier and adding 14. Pairs
// are stored r0, r1 from address 0, metrics four per pair from a base
// address. Results and the exact cycle count (2 + 8 per pair) are compared
// with a C-level model.
module tb_workloads_viterbi;
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
  coproc_top dut (.*, .ex_r1_we(1'b0), .ex_r1_d('0), .ex_r2_we(1'b0), .ex_r2_d('0),
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

  // r1 n, r13 output base, r2 i, r3 input address, r4 r0, r5 r1,
  // r7/r9 metrics, r10 loop condition, r11 output address, r12 n-1
  function automatic void bm_prog(ref ctrl_word_t p []);
    p = new [11];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_MUL]    = ri(0, 2, 2, 0);
    p[1].fu[FU_ADDSUB] = ri(OP_ADD, 12, 1, -1);
    p[1].fu[FU_LOGIC]  = ri(OP_AND, 3, 3, 0);
    p[2].fu[FU_MEM]    = ri(OP_LOAD, 4, 3, 0);
    p[2].fu[FU_CMP]    = rr(OP_LT, 10, 2, 12);
    p[2].fu[FU_SHIFT]  = ri(OP_SHL, 11, 2, 2);       // 4i
    p[3].fu[FU_MEM]    = ri(OP_LOAD, 5, 3, 1);
    p[3].fu[FU_ADDSUB] = rr(OP_ADD, 11, 11, 13);     // &bm[4i]
    p[4].fu[FU_ADDSUB] = ri(OP_ADD, 3, 3, 2);
    p[5].fu[FU_ADDSUB] = rr(OP_ADD, 7, 4, 5);        // bm00
    p[5].fu[FU_MAC]    = ri(0, 9, 5, -1, 4);         // r0 - r1
    p[6].fu[FU_MEM]    = ri(OP_STORE, 0, 11, 0, 7);
    p[6].fu[FU_ADDSUB] = ri(OP_ADD, 9, 9, 7);        // bm01
    p[6].fu[FU_MUL]    = ri(0, 7, 7, -1);
    p[7].fu[FU_MEM]    = ri(OP_STORE, 0, 11, 1, 9);
    p[7].fu[FU_ADDSUB] = ri(OP_ADD, 7, 7, 14);       // bm11
    p[7].fu[FU_MUL]    = ri(0, 9, 9, -1);
    p[8].fu[FU_MEM]    = ri(OP_STORE, 0, 11, 3, 7);
    p[8].fu[FU_ADDSUB] = ri(OP_ADD, 9, 9, 14);       // bm10
    p[9].fu[FU_MEM]    = ri(OP_STORE, 0, 11, 2, 9);
    p[9].fu[FU_ADDSUB] = ri(OP_ADD, 2, 2, 1);
    p[9] = branch(p[9], 10, 2);
    p[10].last = 1;
  endfunction

  task automatic test_bm(input int n, input int obase, input bit extremes);
    ctrl_word_t p [];
    int sym [], cycles;
    logic [DATA_W-1:0] got;
    bm_prog(p);
    load_prog(p);
    sym = new [2 * n];
    foreach (sym[i]) begin
      sym[i] = extremes ? 7 * int'($urandom_range(0, 1)) : int'($urandom_range(0, 7));
      set_mem(i, sym[i]);
    end
    set_reg(1, n); set_reg(13, obase);
    run(cycles);
    checks++;
    if (cycles != 2 + 8 * n) begin failures++; $display("bm: %0d cycles, expected %0d", cycles, 2 + 8 * n); end
    for (int i = 0; i < n; i++) begin
      int r0, r1, exp [4];
      r0 = sym[2*i]; r1 = sym[2*i+1];
      exp[0] = r0 + r1;
      exp[1] = r0 + (7 - r1);
      exp[2] = (7 - r0) + r1;
      exp[3] = (7 - r0) + (7 - r1);
      for (int k = 0; k < 4; k++) begin
        get_mem(obase + 4 * i + k, got);
        checks++;
        if (got !== DATA_W'(exp[k])) begin failures++; $display("bm[%0d][%0d] %0d exp %0d", i, k, got, exp[k]); end
      end
    end
  endtask

  initial begin
    start = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    host_reg_we = 0; host_reg_idx = 0; host_reg_wdata = 0;
    host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    test_bm(1, 40, 0);
    test_bm(40, 80, 0);
    test_bm(42, 84, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
