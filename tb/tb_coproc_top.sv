// tb_coproc_top: end-to-end test of the co-processor at its default size.
// The host side of this testbench loads a schedule, arguments and data,
// starts the co-processor, waits for done and checks the results and the
// cycle count against C-level reference models. Two hand-scheduled kernels
// are run, each several times with new random data:
//   - autocorrelation: out[lag] = (sum_i x[i]*x[i+lag]) >> scale for
//     lag < L, using loads, multiply-accumulate, shift, compare and
//     loop-closing branches;
//   - comb sort of n words in place, if-converted with the comparator and
//     the 2-to-1 multiplexer FU, with loads and stores to the same array.
// The bit-width-trimmed example data-path beside the co-processor is driven
// at random and compared with a full-width model.
// Mechanisms counted at the status outputs (each must occur): branch taken,
// branch not taken, each FU issued, several FUs in one state, load, store,
// done, host register and memory access.
module tb_coproc_top;
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
  logic ex_r1_we, ex_r2_we, ex_m1_sel, ex_m2_sel, ex_r3_we;
  logic [7:0] ex_r1_d, ex_r2_d, ex_r1_q, ex_r2_q, ex_r3_q;
  coproc_top dut (.*);

  // ---- mechanism counters (observed at the status outputs) -----------------
  // 'cur' is the schedule currently loaded, used to classify state transitions
  ctrl_word_t cur [];
  int n_fu [NFU];
  int n_par = 0, n_taken = 0, n_not_taken = 0, n_load = 0, n_store = 0, n_done = 0;
  int n_host_reg = 0, n_host_mem = 0;
  logic [STATE_W-1:0] prev_state = '0;
  always @(posedge clk) if (rst_n) begin
    if (busy) begin
      int k;
      k = 0;
      for (int f = 0; f < NFU; f++) if (fu_active[f]) begin n_fu[f]++; k++; end
      if (k > 1) n_par++;
      if (fu_active[FU_MEM]) begin
        if (cur[state].fu[FU_MEM].op == OP_STORE) n_store++; else n_load++;
      end
    end
    if (done) n_done++;
    if (host_reg_we) n_host_reg++;
    if (host_mem_we) n_host_mem++;
  end
  // branch outcome of the state just left, seen from the state entered
  always @(posedge clk) if (rst_n) begin
    #1;
    if (prev_state != 0 && cur[prev_state].br_en && !cur[prev_state].last) begin
      if (state == cur[prev_state].br_target && state != cur[prev_state].next) n_taken++;
      else if (state == cur[prev_state].next) n_not_taken++;
    end
    prev_state = state;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ---- host-side tasks --------------------------------------------------------
  task automatic load_prog(input ctrl_word_t p [], input int n);
    cur = p;
    for (int s = 1; s < n; s++) begin
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
  // start, wait for done; returns the clock edges from the one that samples
  // start to the one that opens the done cycle: one per executed state
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

  // ---- autocorrelation --------------------------------------------------------
  // r1 N, r2 L, r11 output base, r12 scale; r3 lag, r4 i, r5 sum, r6 x[i],
  // r7 x[i+lag], r8 N-1-lag, r9 condition, r10 i+lag, r13 N-1, r14 L-1,
  // r15 output address, r0 scaled sum
  function automatic void autocor_prog(ref ctrl_word_t p []);
    p = new [11];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_LOGIC]  = ri(OP_AND, 3, 3, 0);        // lag = 0
    p[1].fu[FU_ADDSUB] = ri(OP_ADD, 13, 1, -1);      // N-1
    p[2].fu[FU_ADDSUB] = ri(OP_ADD, 14, 2, -1);      // L-1
    p[3].fu[FU_LOGIC]  = ri(OP_AND, 5, 5, 0);        // sum = 0
    p[3].fu[FU_MUL]    = ri(0, 4, 4, 0);             // i = 0
    p[3].fu[FU_ADDSUB] = rr(OP_SUB, 8, 13, 3);       // limit = N-1-lag
    p[4].fu[FU_ADDSUB] = rr(OP_ADD, 10, 4, 3);       // i+lag
    p[4].fu[FU_MEM]    = ri(OP_LOAD, 6, 4, 0);       // x[i]
    p[4].fu[FU_CMP]    = rr(OP_LT, 9, 4, 8);         // another iteration after this one?
    p[5].fu[FU_MEM]    = ri(OP_LOAD, 7, 10, 0);      // x[i+lag]
    p[5].fu[FU_ADDSUB] = ri(OP_ADD, 4, 4, 1);        // i++
    // state 6 waits for the second load
    p[7].fu[FU_MAC]    = rr(0, 5, 6, 7, 5);          // sum += x[i]*x[i+lag]
    p[7] = branch(p[7], 9, 4);
    p[8].fu[FU_SHIFT]  = rr(OP_SRA, 0, 5, 12);       // sum >> scale
    p[8].fu[FU_ADDSUB] = rr(OP_ADD, 15, 11, 3);      // &out[lag]
    p[8].fu[FU_CMP]    = rr(OP_LT, 9, 3, 14);        // another lag after this one?
    p[9].fu[FU_MEM]    = ri(OP_STORE, 0, 15, 0, 0);  // out[lag] = r0
    p[9].fu[FU_ADDSUB] = ri(OP_ADD, 3, 3, 1);        // lag++
    p[9] = branch(p[9], 9, 3);
    p[10].last = 1;
  endfunction

  task automatic test_autocor(input int n, input int l, input int scale, input int obase);
    ctrl_word_t p [];
    logic [DATA_W-1:0] x [], got;
    int cycles, exp_states;
    autocor_prog(p);
    load_prog(p, p.size());
    x = new [n];
    foreach (x[i]) begin
      x[i] = DATA_W'($urandom_range(0, 4000)) - 2000;
      set_mem(i, x[i]);
    end
    set_reg(1, n); set_reg(2, l); set_reg(11, obase); set_reg(12, scale);
    run(cycles);
    exp_states = 2 + 1;
    for (int lag = 0; lag < l; lag++) exp_states += 1 + 4 * (n - lag) + 2;
    checks++;
    if (cycles != exp_states) begin
      failures++; $display("autocor N=%0d L=%0d: %0d cycles, expected %0d", n, l, cycles, exp_states);
    end
    for (int lag = 0; lag < l; lag++) begin
      logic [DATA_W-1:0] sum;
      sum = 0;
      for (int i = 0; i < n - lag; i++) sum += x[i] * x[i + lag];
      sum = DATA_W'($signed(sum) >>> scale);
      get_mem(obase + lag, got);
      checks++;
      if (got !== sum) begin
        failures++; $display("autocor lag %0d: %h expected %h", lag, got, sum);
      end
    end
  endtask

  // ---- comb sort ----------------------------------------------------------------
  // r1 n, r2 gap, r3 swapped, r4 i, r5 i+gap, r6 a, r7 b, r8 a>b, r9 n-gap,
  // r10 condition, r11 i (store address), r12/r13 values written back, r14 1
  function automatic void comb_prog(ref ctrl_word_t p []);
    p = new [18];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_ADDSUB] = ri(OP_ADD, 2, 1, 0);         // gap = n
    p[1].fu[FU_CMP]    = rr(OP_EQ, 14, 1, 1);         // r14 = 1
    p[2].fu[FU_MUL]    = ri(0, 2, 2, 197);            // gap * 197
    p[2].fu[FU_LOGIC]  = ri(OP_AND, 3, 3, 0);         // swapped = 0
    p[3].fu[FU_SHIFT]  = ri(OP_SRL, 2, 2, 8);         // ... / 256, shrink 1.3
    p[4].fu[FU_CMP]    = ri(OP_LT, 10, 2, 1);
    p[5].fu[FU_MUX]    = rr(0, 2, 14, 2, 10);         // gap = gap < 1 ? 1 : gap
    p[6].fu[FU_ADDSUB] = rr(OP_SUB, 9, 1, 2);         // n - gap
    p[6].fu[FU_MUL]    = ri(0, 4, 4, 0);              // i = 0
    p[7].fu[FU_ADDSUB] = rr(OP_ADD, 5, 4, 2);         // j = i + gap
    p[7].fu[FU_MEM]    = ri(OP_LOAD, 6, 4, 0);        // a = x[i]
    p[8].fu[FU_MEM]    = ri(OP_LOAD, 7, 5, 0);        // b = x[j]
    p[8].fu[FU_ADDSUB] = ri(OP_ADD, 4, 4, 1);         // i++
    p[9].fu[FU_CMP]    = rr(OP_LT, 10, 4, 9);         // i < n - gap
    p[10].fu[FU_CMP]   = rr(OP_GT, 8, 6, 7);          // a > b
    p[11].fu[FU_MUX]   = rr(0, 12, 7, 6, 8);          // min
    p[11].fu[FU_LOGIC] = rr(OP_OR, 3, 3, 8);          // swapped |= a > b
    p[11].fu[FU_ADDSUB]= ri(OP_ADD, 11, 4, -1);       // old i
    p[12].fu[FU_MUX]   = rr(0, 13, 6, 7, 8);          // max
    p[12].fu[FU_MEM]   = ri(OP_STORE, 0, 11, 0, 12);  // x[i] = min
    p[13].fu[FU_MEM]   = ri(OP_STORE, 0, 5, 0, 13);   // x[j] = max
    p[13] = branch(p[13], 10, 7);
    p[14].fu[FU_CMP]   = ri(OP_GT, 10, 2, 1);         // gap > 1
    p[15].fu[FU_LOGIC] = rr(OP_OR, 10, 10, 3);        // ... || swapped
    p[16] = branch(p[16], 10, 2);
    p[17].last = 1;
  endfunction

  task automatic test_comb(input int n);
    localparam int base = 0;   // the schedule sorts x[0..n-1]
    ctrl_word_t p [];
    int x [], cycles, exp_states, gap, swapped;
    logic [DATA_W-1:0] got;
    comb_prog(p);
    load_prog(p, p.size());
    x = new [n];
    foreach (x[i]) begin
      x[i] = int'($urandom_range(0, 2000)) - 1000;
      set_mem(base + i, x[i]);
    end
    set_reg(1, n);
    run(cycles);
    // reference: same algorithm, counting executed states
    exp_states = 1 + 1;
    gap = n;
    do begin
      gap = (gap * 197) >> 8;
      if (gap < 1) gap = 1;
      swapped = 0;
      exp_states += 5;
      for (int i = 0; i + gap < n; i++) begin
        if (x[i] > x[i + gap]) begin
          int t;
          t = x[i]; x[i] = x[i + gap]; x[i + gap] = t; swapped = 1;
        end
        exp_states += 7;
      end
      exp_states += 3;
    end while (gap > 1 || swapped != 0);
    checks++;
    if (cycles != exp_states) begin
      failures++; $display("comb sort n=%0d: %0d cycles, expected %0d", n, cycles, exp_states);
    end
    for (int i = 0; i < n; i++) begin
      get_mem(base + i, got);
      checks++;
      if (got !== DATA_W'(x[i])) begin failures++; $display("sorted[%0d] = %0d expected %0d", i, $signed(got), x[i]); end
    end
  endtask

  // the trimmed example data-path beside the co-processor, against a
  // full-width model (default constants: Reg1 low bits 10, Reg2 low bits 00)
  task automatic test_bw_example(input int n);
    logic [7:0] r1, r2, r3, m1, prod;
    int n_r3_odd;
    r1 = 8'b10; r2 = 8'b00; r3 = 8'b0; n_r3_odd = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      ex_r1_we = $urandom; ex_r2_we = $urandom; ex_r3_we = $urandom;
      ex_m1_sel = $urandom; ex_m2_sel = $urandom;
      ex_r1_d = 8'($urandom); ex_r2_d = 8'($urandom);
      m1 = ex_m1_sel ? r2 : r1;
      prod = 8'(int'(m1) * int'(r1));
      if (ex_r3_we) r3 = ex_m2_sel ? 8'(int'(r2) * 4) : prod;
      if (ex_r1_we) r1 = {ex_r1_d[7:2], 2'b10};
      if (ex_r2_we) r2 = {ex_r2_d[7:2], 2'b00};
      @(posedge clk); #1;
      checks++;
      if ({ex_r1_q, ex_r2_q, ex_r3_q} !== {r1, r2, r3}) begin
        failures++; $display("example data-path: %h %h %h exp %h %h %h", ex_r1_q, ex_r2_q, ex_r3_q, r1, r2, r3);
      end
      if (ex_r3_q[0]) n_r3_odd++;
    end
    checks++;
    if (n_r3_odd != 0) failures++;   // the inferred constant LSB of Reg3
    @(negedge clk); ex_r1_we = 0; ex_r2_we = 0; ex_r3_we = 0;
  endtask

  initial begin
    foreach (n_fu[f]) n_fu[f] = 0;
    ex_r1_we = 0; ex_r2_we = 0; ex_r3_we = 0; ex_m1_sel = 0; ex_m2_sel = 0; ex_r1_d = 0; ex_r2_d = 0;
    start = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    host_reg_we = 0; host_reg_idx = 0; host_reg_wdata = 0;
    host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    test_autocor(16, 8, 4, 128);
    test_autocor(32, 16, 7, 200);
    test_autocor(5, 5, 0, 64);
    test_comb(2);
    test_comb(24);
    test_comb(64);
    test_autocor(64, 32, 2, 100);
    test_bw_example(500);
    // mechanisms
    for (int f = 0; f < NFU; f++) begin
      checks++;
      if (n_fu[f] == 0) begin failures++; $display("FU %0d never issued", f); end
    end
    checks++; if (n_par == 0)       begin failures++; $display("no parallel FU issue"); end
    checks++; if (n_taken == 0)     begin failures++; $display("no branch taken"); end
    checks++; if (n_not_taken == 0) begin failures++; $display("no branch fall-through"); end
    checks++; if (n_load == 0)      begin failures++; $display("no load"); end
    checks++; if (n_store == 0)     begin failures++; $display("no store"); end
    checks++; if (n_done != 7)      begin failures++; $display("done pulses %0d", n_done); end
    checks++; if (n_host_reg == 0 || n_host_mem == 0) failures++;
    $display("mechanisms: parallel=%0d taken=%0d not_taken=%0d loads=%0d stores=%0d done=%0d",
             n_par, n_taken, n_not_taken, n_load, n_store, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
