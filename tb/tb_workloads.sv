// tb_workloads: two more embedded kernels, hand-scheduled for the
// co-processor, on an instance built without the multiply-accumulate unit
// (FU_MASK bit FU_MAC cleared), since neither kernel uses it:
//   - convolutional encoding, rate 1/2, constraint length 7: for each input
//     bit, shift it into a 7-bit register and emit the parities of the
//     register ANDed with two generator polynomials;
//   - Viterbi add-compare-select over S trellis states: for each butterfly
//     s < S/2 with path metrics p0 = old[2s], p1 = old[2s+1] and branch
//     metric bm[s], new[s] = min(p0+bm, p1-bm), new[s+S/2] =
//     min(p0-bm, p1+bm), and a decision word with one bit per choice.
// Results and cycle counts are compared with C-level reference models.
module tb_workloads;
  import coproc_pkg::*;
  import coproc_ref_pkg::*;
  localparam logic [NFU-1:0] MASK = ~(NFU'(1) << FU_MAC);
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
  coproc_top #(.FU_MASK(MASK)) dut (.*, .ex_r1_we(1'b0), .ex_r1_d('0), .ex_r2_we(1'b0), .ex_r2_d('0),
    .ex_m1_sel(1'b0), .ex_m2_sel(1'b0), .ex_r3_we(1'b0), .ex_r1_q(ex_q1), .ex_r2_q(ex_q2), .ex_r3_q(ex_q3));

  int n_fu [NFU];
  always @(posedge clk) if (rst_n && busy)
    for (int f = 0; f < NFU; f++) if (fu_active[f]) n_fu[f]++;

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

  // ---- convolutional encoder ------------------------------------------------------
  localparam int G0 = 'h6D, G1 = 'h4F;
  // r1 n, r11 output base, r2 i, r3 shift register, r4 input bit, r5/r6
  // parity accumulators, r7/r10 shifted copies, r8 output address, r9
  // loop condition, r12 n-1
  function automatic void conv_prog(ref ctrl_word_t p []);
    p = new [18];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_LOGIC]  = ri(OP_AND, 3, 3, 0);
    p[1].fu[FU_MUL]    = ri(0, 2, 2, 0);
    p[1].fu[FU_ADDSUB] = ri(OP_ADD, 12, 1, -1);
    p[2].fu[FU_MEM]    = ri(OP_LOAD, 4, 2, 0);
    p[2].fu[FU_SHIFT]  = ri(OP_SHL, 7, 3, 1);
    p[2].fu[FU_CMP]    = rr(OP_LT, 9, 2, 12);
    p[2].fu[FU_ADDSUB] = rr(OP_ADD, 8, 2, 2);
    p[3].fu[FU_ADDSUB] = rr(OP_ADD, 8, 8, 11);
    p[4].fu[FU_LOGIC]  = rr(OP_OR, 3, 7, 4);
    p[5].fu[FU_LOGIC]  = ri(OP_AND, 3, 3, 'h7F);
    p[6].fu[FU_LOGIC]  = ri(OP_AND, 5, 3, G0);
    p[7].fu[FU_LOGIC]  = ri(OP_AND, 6, 3, G1);
    p[7].fu[FU_SHIFT]  = ri(OP_SRL, 7, 5, 4);
    p[8].fu[FU_LOGIC]  = rr(OP_XOR, 5, 5, 7);
    p[8].fu[FU_SHIFT]  = ri(OP_SRL, 10, 6, 4);
    p[9].fu[FU_LOGIC]  = rr(OP_XOR, 6, 6, 10);
    p[9].fu[FU_SHIFT]  = ri(OP_SRL, 7, 5, 2);
    p[10].fu[FU_LOGIC] = rr(OP_XOR, 5, 5, 7);
    p[10].fu[FU_SHIFT] = ri(OP_SRL, 10, 6, 2);
    p[11].fu[FU_LOGIC] = rr(OP_XOR, 6, 6, 10);
    p[11].fu[FU_SHIFT] = ri(OP_SRL, 7, 5, 1);
    p[12].fu[FU_LOGIC] = rr(OP_XOR, 5, 5, 7);
    p[12].fu[FU_SHIFT] = ri(OP_SRL, 10, 6, 1);
    p[13].fu[FU_LOGIC] = rr(OP_XOR, 6, 6, 10);
    p[14].fu[FU_LOGIC] = ri(OP_AND, 5, 5, 1);
    p[15].fu[FU_LOGIC] = ri(OP_AND, 6, 6, 1);
    p[15].fu[FU_MEM]   = ri(OP_STORE, 0, 8, 0, 5);
    p[16].fu[FU_MEM]   = ri(OP_STORE, 0, 8, 1, 6);
    p[16].fu[FU_ADDSUB]= ri(OP_ADD, 2, 2, 1);
    p[16] = branch(p[16], 9, 2);
    p[17].last = 1;
  endfunction

  task automatic test_conv(input int n, input int obase);
    ctrl_word_t p [];
    int bits [], sr, cycles;
    logic [DATA_W-1:0] got;
    conv_prog(p);
    load_prog(p);
    bits = new [n];
    foreach (bits[i]) begin bits[i] = $urandom_range(0, 1); set_mem(i, bits[i]); end
    set_reg(1, n); set_reg(11, obase);
    run(cycles);
    checks++;
    if (cycles != 2 + 15 * n) begin failures++; $display("conv: %0d cycles, expected %0d", cycles, 2 + 15 * n); end
    sr = 0;
    for (int i = 0; i < n; i++) begin
      sr = ((sr << 1) | bits[i]) & 'h7F;
      get_mem(obase + 2 * i, got);
      checks++; if (got !== DATA_W'($countones(sr & G0) % 2)) failures++;
      get_mem(obase + 2 * i + 1, got);
      checks++; if (got !== DATA_W'($countones(sr & G1) % 2)) failures++;
    end
  endtask

  // ---- Viterbi add-compare-select ------------------------------------------------
  // memory: old metrics at 0, branch metrics at S, new metrics at 2S,
  // decisions at 3S. r1 S/2, r2 s, r3 p0, r4 p1, r5 bm, r6..r7 and r10, r15
  // candidates, r8/r14 decisions, r9 chosen metric, r11 2s, r12 S/2-1,
  // r13 loop condition, r0 decision word
  function automatic void acs_prog(ref ctrl_word_t p [], input int s_states);
    int half;
    half = s_states / 2;
    p = new [14];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_MUL]    = ri(0, 2, 2, 0);
    p[1].fu[FU_ADDSUB] = ri(OP_ADD, 12, 1, -1);
    p[2].fu[FU_ADDSUB] = rr(OP_ADD, 11, 2, 2);
    p[2].fu[FU_MEM]    = ri(OP_LOAD, 5, 2, s_states);
    p[2].fu[FU_CMP]    = rr(OP_LT, 13, 2, 12);
    p[3].fu[FU_MEM]    = ri(OP_LOAD, 3, 11, 0);
    p[4].fu[FU_MEM]    = ri(OP_LOAD, 4, 11, 1);
    p[5].fu[FU_ADDSUB] = rr(OP_ADD, 6, 3, 5);
    p[6].fu[FU_ADDSUB] = rr(OP_SUB, 7, 4, 5);
    p[7].fu[FU_CMP]    = rr(OP_LT, 8, 7, 6);
    p[7].fu[FU_ADDSUB] = rr(OP_SUB, 10, 3, 5);
    p[8].fu[FU_MUX]    = rr(0, 9, 7, 6, 8);
    p[8].fu[FU_ADDSUB] = rr(OP_ADD, 15, 4, 5);
    p[9].fu[FU_MEM]    = ri(OP_STORE, 0, 2, 2 * s_states, 9);
    p[9].fu[FU_CMP]    = rr(OP_LT, 14, 15, 10);
    p[10].fu[FU_MUX]   = rr(0, 9, 15, 10, 14);
    p[10].fu[FU_SHIFT] = ri(OP_SHL, 14, 14, 1);
    p[11].fu[FU_MEM]   = ri(OP_STORE, 0, 2, 2 * s_states + half, 9);
    p[11].fu[FU_LOGIC] = rr(OP_OR, 0, 8, 14);
    p[12].fu[FU_MEM]   = ri(OP_STORE, 0, 2, 3 * s_states, 0);
    p[12].fu[FU_ADDSUB]= ri(OP_ADD, 2, 2, 1);
    p[12] = branch(p[12], 13, 2);
    p[13].last = 1;
  endfunction

  task automatic test_acs(input int s_states);
    ctrl_word_t p [];
    int old [], bm [], half, cycles;
    logic [DATA_W-1:0] got;
    half = s_states / 2;
    acs_prog(p, s_states);
    load_prog(p);
    old = new [s_states]; bm = new [half];
    foreach (old[i]) begin old[i] = $urandom_range(0, 3000) - 1000; set_mem(i, old[i]); end
    foreach (bm[i])  begin bm[i]  = $urandom_range(0, 200) - 100;   set_mem(s_states + i, bm[i]); end
    set_reg(1, half);
    run(cycles);
    checks++;
    if (cycles != 2 + 11 * half) begin failures++; $display("acs: %0d cycles, expected %0d", cycles, 2 + 11 * half); end
    for (int s = 0; s < half; s++) begin
      int c0, c1, c2, c3, m0, m1, d;
      c0 = old[2*s] + bm[s]; c1 = old[2*s+1] - bm[s];
      c2 = old[2*s] - bm[s]; c3 = old[2*s+1] + bm[s];
      m0 = (c1 < c0) ? c1 : c0; m1 = (c3 < c2) ? c3 : c2;
      d  = int'(c1 < c0) | (int'(c3 < c2) << 1);
      get_mem(2 * s_states + s, got);        checks++; if (got !== DATA_W'(m0)) failures++;
      get_mem(2 * s_states + half + s, got); checks++; if (got !== DATA_W'(m1)) failures++;
      get_mem(3 * s_states + s, got);        checks++; if (got !== DATA_W'(d)) begin failures++; $display("dec %0d: %0d exp %0d", s, got, d); end
    end
  endtask

  initial begin
    foreach (n_fu[f]) n_fu[f] = 0;
    start = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    host_reg_we = 0; host_reg_idx = 0; host_reg_wdata = 0;
    host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    test_conv(20, 40);
    test_acs(64);
    test_conv(100, 100);
    test_acs(16);
    // every FU kept by the mask was used, the removed MAC never
    for (int f = 0; f < NFU; f++) begin
      checks++;
      if (MASK[f] && n_fu[f] == 0) begin failures++; $display("FU %0d unused", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
