// tb_workloads_media: three media kernels, hand-scheduled for the
// co-processor with its full FU set:
//   - RGB to YCbCr colour conversion with 8-bit fixed-point coefficients,
//     Y = (77R + 150G + 29B) >> 8, Cb = ((-43R - 85G + 128B) >> 8) + 128,
//     Cr = ((128R - 107G - 21B) >> 8) + 128, pixels stored as R,G,B
//     triples, planes written Y, Cb, Cr; the products go through the
//     multiplier and multiply-accumulate units in parallel;
//   - IMA ADPCM decoding: each 4-bit code updates the predicted sample and
//     the step index through table look-ups in the local memory, with all
//     conditionals if-converted onto the comparator and the 2-to-1
//     multiplexer unit;
//   - IMA ADPCM coding, the inverse: the sample's difference from the
//     prediction is quantised to 4 bits by three compare-and-subtract steps.
// Results and exact cycle counts are compared with C-level reference models.
module tb_workloads_media;
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

  // ---- RGB to YCbCr ------------------------------------------------------------
  // r1 n, r13 output base, r2 i, r3 3i, r4 R, r5 G, r6 B, r7 Y, r8 Cb,
  // r9 Cr, r10 loop condition, r11 output address, r12 n-1
  function automatic void rgb_prog(ref ctrl_word_t p []);
    p = new [15];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_MUL]    = ri(0, 2, 2, 0);
    p[1].fu[FU_ADDSUB] = ri(OP_ADD, 12, 1, -1);
    p[1].fu[FU_LOGIC]  = ri(OP_AND, 3, 3, 0);
    p[2].fu[FU_MEM]    = ri(OP_LOAD, 4, 3, 0);
    p[2].fu[FU_CMP]    = rr(OP_LT, 10, 2, 12);
    p[2].fu[FU_SHIFT]  = ri(OP_SHL, 11, 13, 0);    // r11 = output base (shift by 0 as a move)
    p[3].fu[FU_MEM]    = ri(OP_LOAD, 5, 3, 1);
    p[3].fu[FU_ADDSUB] = ri(OP_ADD, 3, 3, 3);
    p[4].fu[FU_MEM]    = ri(OP_LOAD, 6, 3, -1);
    p[4].fu[FU_MUL]    = ri(0, 7, 4, 77);
    p[4].fu[FU_ADDSUB] = rr(OP_ADD, 11, 11, 2);     // &Y[i]
    p[5].fu[FU_MAC]    = ri(0, 7, 5, 150, 7);
    p[5].fu[FU_MUL]    = ri(0, 8, 4, -43);
    p[6].fu[FU_MAC]    = ri(0, 7, 6, 29, 7);
    p[6].fu[FU_MUL]    = ri(0, 9, 4, 128);
    p[7].fu[FU_MAC]    = ri(0, 8, 5, -85, 8);
    p[7].fu[FU_SHIFT]  = ri(OP_SRA, 7, 7, 8);
    p[8].fu[FU_MAC]    = ri(0, 8, 6, 128, 8);
    p[8].fu[FU_MEM]    = ri(OP_STORE, 0, 11, 0, 7);
    p[9].fu[FU_MAC]    = ri(0, 9, 5, -107, 9);
    p[9].fu[FU_SHIFT]  = ri(OP_SRA, 8, 8, 8);
    p[9].fu[FU_ADDSUB] = rr(OP_ADD, 11, 11, 1);     // &Cb[i]
    p[10].fu[FU_MAC]   = ri(0, 9, 6, -21, 9);
    p[10].fu[FU_ADDSUB]= ri(OP_ADD, 8, 8, 128);
    p[11].fu[FU_MEM]   = ri(OP_STORE, 0, 11, 0, 8);
    p[11].fu[FU_SHIFT] = ri(OP_SRA, 9, 9, 8);
    p[11].fu[FU_ADDSUB]= rr(OP_ADD, 11, 11, 1);     // &Cr[i]
    p[12].fu[FU_ADDSUB]= ri(OP_ADD, 9, 9, 128);
    p[13].fu[FU_MEM]   = ri(OP_STORE, 0, 11, 0, 9);
    p[13].fu[FU_ADDSUB]= ri(OP_ADD, 2, 2, 1);
    p[13] = branch(p[13], 10, 2);
    p[14].last = 1;
  endfunction

  task automatic test_rgb(input int n, input int obase);
    ctrl_word_t p [];
    int px [], cycles;
    logic [DATA_W-1:0] got;
    rgb_prog(p);
    load_prog(p);
    px = new [3 * n];
    foreach (px[i]) begin px[i] = $urandom_range(0, 255); set_mem(i, px[i]); end
    set_reg(1, n); set_reg(13, obase);
    run(cycles);
    checks++;
    if (cycles != 2 + 12 * n) begin failures++; $display("rgb: %0d cycles, expected %0d", cycles, 2 + 12 * n); end
    for (int i = 0; i < n; i++) begin
      int r, g, b, y, cb, cr;
      r = px[3*i]; g = px[3*i+1]; b = px[3*i+2];
      y  = (77 * r + 150 * g + 29 * b) >>> 8;
      cb = ((-43 * r - 85 * g + 128 * b) >>> 8) + 128;
      cr = ((128 * r - 107 * g - 21 * b) >>> 8) + 128;
      get_mem(obase + i, got);         checks++; if (got !== DATA_W'(y))  begin failures++; $display("Y[%0d] %0d exp %0d", i, got, y); end
      get_mem(obase + n + i, got);     checks++; if (got !== DATA_W'(cb)) begin failures++; $display("Cb[%0d] %0d exp %0d", i, got, cb); end
      get_mem(obase + 2 * n + i, got); checks++; if (got !== DATA_W'(cr)) begin failures++; $display("Cr[%0d] %0d exp %0d", i, got, cr); end
    end
  endtask

  // ---- IMA ADPCM decoder -----------------------------------------------------------
  // memory: step-size table at 0..88, index-change table at 89..104, codes at
  // r13, samples out at r14. r1 n, r2 i, r3 step index, r4 predicted value,
  // r5 code, r6 step, r7 index change, r8 difference, r9/r15 temporaries,
  // r10 code bit under test, r11 loop condition, r12 n-1, r0 address or
  // clamp flag. Clamps are computed as x - (x - limit) * (x beyond limit).
  localparam int IDX_TAB = 89;
  int step_tab [89], idx_tab [16];

  // step sizes grow by about 10 % per index from 7 to 32767, as in the IMA
  // table; the test builds them from that rule
  task automatic adpcm_tables();
    foreach (step_tab[i]) begin
      step_tab[i] = int'(7.0 * (1.1 ** real'(i)));
      if (step_tab[i] > 32767 || i == 88) step_tab[i] = 32767;
      set_mem(i, step_tab[i]);
    end
    foreach (idx_tab[i]) begin
      idx_tab[i] = ((i & 7) < 4) ? -1 : 2 * ((i & 7) - 3);
      set_mem(IDX_TAB + i, idx_tab[i]);
    end
  endtask

  function automatic void adpcm_prog(ref ctrl_word_t p []);
    p = new [24];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_MUL]    = ri(0, 2, 2, 0);
    p[1].fu[FU_ADDSUB] = ri(OP_ADD, 12, 1, -1);
    p[1].fu[FU_LOGIC]  = ri(OP_AND, 3, 3, 0);
    p[1].fu[FU_CMP]    = ri(OP_LTU, 4, 4, 0);          // valpred = 0
    p[2].fu[FU_ADDSUB] = rr(OP_ADD, 0, 13, 2);
    p[2].fu[FU_MEM]    = ri(OP_LOAD, 6, 3, 0);         // step = table[index]
    p[2].fu[FU_CMP]    = rr(OP_LT, 11, 2, 12);
    p[3].fu[FU_MEM]    = ri(OP_LOAD, 5, 0, 0);         // code
    p[4].fu[FU_SHIFT]  = ri(OP_SRL, 8, 6, 3);          // diff = step >> 3
    p[5].fu[FU_MEM]    = ri(OP_LOAD, 7, 5, IDX_TAB);   // index change
    p[5].fu[FU_LOGIC]  = ri(OP_AND, 10, 5, 4);
    p[6].fu[FU_ADDSUB] = rr(OP_ADD, 9, 8, 6);
    p[6].fu[FU_SHIFT]  = ri(OP_SRL, 15, 6, 1);
    p[7].fu[FU_MUX]    = rr(0, 8, 9, 8, 10);           // if (code & 4) diff += step
    p[7].fu[FU_LOGIC]  = ri(OP_AND, 10, 5, 2);
    p[7].fu[FU_ADDSUB] = rr(OP_ADD, 3, 3, 7);          // index += change
    p[8].fu[FU_ADDSUB] = rr(OP_ADD, 9, 8, 15);
    p[8].fu[FU_SHIFT]  = ri(OP_SRL, 15, 6, 2);
    p[8].fu[FU_CMP]    = ri(OP_GE, 0, 3, 0);
    p[9].fu[FU_MUX]    = rr(0, 8, 9, 8, 10);           // if (code & 2) diff += step >> 1
    p[9].fu[FU_LOGIC]  = ri(OP_AND, 10, 5, 1);
    p[9].fu[FU_MUL]    = rr(0, 3, 3, 0);               // index < 0 -> 0
    p[10].fu[FU_ADDSUB]= rr(OP_ADD, 9, 8, 15);
    p[10].fu[FU_CMP]   = ri(OP_GT, 0, 3, 88);
    p[11].fu[FU_MUX]   = rr(0, 8, 9, 8, 10);           // if (code & 1) diff += step >> 2
    p[11].fu[FU_LOGIC] = ri(OP_AND, 10, 5, 8);
    p[11].fu[FU_ADDSUB]= ri(OP_ADD, 7, 3, -88);
    p[12].fu[FU_MUL]   = rr(0, 7, 7, 0);
    p[12].fu[FU_ADDSUB]= rr(OP_SUB, 9, 4, 8);
    p[13].fu[FU_ADDSUB]= rr(OP_ADD, 15, 4, 8);
    p[14].fu[FU_MUX]   = rr(0, 4, 9, 15, 10);          // sign ? valpred - diff : valpred + diff
    p[14].fu[FU_ADDSUB]= rr(OP_SUB, 3, 3, 7);          // index > 88 -> 88
    p[15].fu[FU_ADDSUB]= ri(OP_ADD, 9, 4, -32767);
    p[15].fu[FU_CMP]   = ri(OP_GT, 0, 4, 32767);
    p[16].fu[FU_MUL]   = rr(0, 9, 9, 0);
    p[17].fu[FU_ADDSUB]= rr(OP_SUB, 4, 4, 9);          // valpred > 32767 -> 32767
    p[18].fu[FU_ADDSUB]= ri(OP_SUB, 9, 4, -32768);
    p[18].fu[FU_CMP]   = ri(OP_LT, 0, 4, -32768);
    p[19].fu[FU_MUL]   = rr(0, 9, 9, 0);
    p[20].fu[FU_ADDSUB]= rr(OP_SUB, 4, 4, 9);          // valpred < -32768 -> -32768
    p[21].fu[FU_ADDSUB]= rr(OP_ADD, 0, 14, 2);
    p[22].fu[FU_MEM]   = ri(OP_STORE, 0, 0, 0, 4);
    p[22].fu[FU_ADDSUB]= ri(OP_ADD, 2, 2, 1);
    p[22] = branch(p[22], 11, 2);
    p[23].last = 1;
  endfunction

  task automatic test_adpcm(input int n, input int cbase, input int obase, input bit loud);
    ctrl_word_t p [];
    int codes [], cycles, index, valpred, n_clamp;
    logic [DATA_W-1:0] got;
    adpcm_prog(p);
    load_prog(p);
    adpcm_tables();
    codes = new [n];
    foreach (codes[i]) begin
      // 'loud' input drives the predictor into both clamps
      codes[i] = loud ? ((i % 40 < 20) ? 7 : 15) : $urandom_range(0, 15);
      set_mem(cbase + i, codes[i]);
    end
    set_reg(1, n); set_reg(13, cbase); set_reg(14, obase);
    run(cycles);
    checks++;
    if (cycles != 2 + 21 * n) begin failures++; $display("adpcm: %0d cycles, expected %0d", cycles, 2 + 21 * n); end
    index = 0; valpred = 0; n_clamp = 0;
    for (int i = 0; i < n; i++) begin
      int step, delta, vpdiff;
      step = step_tab[index];
      delta = codes[i];
      index += idx_tab[delta];
      if (index < 0) index = 0;
      if (index > 88) index = 88;
      vpdiff = step >> 3;
      if ((delta & 4) != 0) vpdiff += step;
      if ((delta & 2) != 0) vpdiff += step >> 1;
      if ((delta & 1) != 0) vpdiff += step >> 2;
      if ((delta & 8) != 0) valpred -= vpdiff; else valpred += vpdiff;
      if (valpred > 32767)  begin valpred = 32767;  n_clamp++; end
      if (valpred < -32768) begin valpred = -32768; n_clamp++; end
      get_mem(obase + i, got);
      checks++;
      if (got !== DATA_W'(valpred)) begin failures++; $display("adpcm[%0d] %0d exp %0d", i, $signed(got), valpred); end
    end
    if (loud) begin checks++; if (n_clamp == 0) failures++; end
  endtask

  // ---- IMA ADPCM coder -------------------------------------------------------------
  // same tables as the decoder; samples at r13, codes out at r14. r1 n, r2 i,
  // r3 step index, r4 predicted value, r5 difference, r6 step, r7 code,
  // r8 reconstructed difference, r10 comparison flag, r15 sign flag,
  // r0/r9 temporaries, r11 loop condition, r12 n-1. Each of the three
  // magnitude bits is one compare-and-subtract: the flag selects the reduced
  // difference on the multiplexer, adds flag*step to the reconstructed
  // difference on the multiply-accumulate unit and flag*weight into the code.
  function automatic void coder_prog(ref ctrl_word_t p []);
    p = new [27];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_MUL]    = ri(0, 2, 2, 0);
    p[1].fu[FU_ADDSUB] = ri(OP_ADD, 12, 1, -1);
    p[1].fu[FU_LOGIC]  = ri(OP_AND, 3, 3, 0);
    p[1].fu[FU_CMP]    = ri(OP_LTU, 4, 4, 0);
    p[2].fu[FU_ADDSUB] = rr(OP_ADD, 0, 13, 2);
    p[2].fu[FU_MEM]    = ri(OP_LOAD, 6, 3, 0);         // step = table[index]
    p[2].fu[FU_CMP]    = rr(OP_LT, 11, 2, 12);
    p[3].fu[FU_MEM]    = ri(OP_LOAD, 5, 0, 0);         // sample
    p[3].fu[FU_LOGIC]  = ri(OP_AND, 7, 7, 0);
    p[4].fu[FU_SHIFT]  = ri(OP_SRL, 8, 6, 3);
    p[5].fu[FU_ADDSUB] = rr(OP_SUB, 5, 5, 4);          // diff = sample - valpred
    p[6].fu[FU_CMP]    = ri(OP_LT, 15, 5, 0);
    p[6].fu[FU_MUL]    = ri(0, 9, 5, -1);
    p[7].fu[FU_MUX]    = rr(0, 5, 9, 5, 15);           // diff = |diff|
    for (int b = 0; b < 3; b++) begin
      int s = 8 + 2 * b;
      p[s].fu[FU_ADDSUB]   = rr(OP_SUB, 0, 5, 6);
      p[s].fu[FU_CMP]      = rr(OP_GE, 10, 5, 6);
      p[s+1].fu[FU_MAC]    = rr(0, 8, 6, 10, 8);
      if (b < 2) begin
        p[s+1].fu[FU_MUX]   = rr(0, 5, 0, 5, 10);
        p[s+1].fu[FU_SHIFT] = ri(OP_SRL, 6, 6, 1);
        p[s+1].fu[FU_MUL]   = ri(0, 9, 10, 4 >> b);
        p[s+2].fu[FU_LOGIC] = rr(OP_OR, 7, 7, 9);
      end
    end
    p[13].fu[FU_LOGIC] = rr(OP_OR, 7, 7, 10);
    p[13].fu[FU_MUL]   = ri(0, 9, 15, 8);
    p[14].fu[FU_ADDSUB]= rr(OP_SUB, 0, 4, 8);
    p[14].fu[FU_LOGIC] = rr(OP_OR, 7, 7, 9);           // sign bit
    p[15].fu[FU_ADDSUB]= rr(OP_ADD, 9, 4, 8);
    p[15].fu[FU_MEM]   = ri(OP_LOAD, 10, 7, IDX_TAB);
    p[16].fu[FU_MUX]   = rr(0, 4, 0, 9, 15);
    p[17].fu[FU_ADDSUB]= ri(OP_ADD, 9, 4, -32767);
    p[17].fu[FU_CMP]   = ri(OP_GT, 0, 4, 32767);
    p[18].fu[FU_MUL]   = rr(0, 9, 9, 0);
    p[18].fu[FU_ADDSUB]= rr(OP_ADD, 3, 3, 10);
    p[19].fu[FU_ADDSUB]= rr(OP_SUB, 4, 4, 9);
    p[19].fu[FU_CMP]   = ri(OP_GE, 0, 3, 0);
    p[20].fu[FU_ADDSUB]= ri(OP_SUB, 9, 4, -32768);
    p[20].fu[FU_CMP]   = ri(OP_LT, 10, 4, -32768);
    p[20].fu[FU_MUL]   = rr(0, 3, 3, 0);
    p[21].fu[FU_MUL]   = rr(0, 9, 9, 10);
    p[21].fu[FU_CMP]   = ri(OP_GT, 0, 3, 88);
    p[21].fu[FU_ADDSUB]= ri(OP_ADD, 15, 3, -88);
    p[22].fu[FU_ADDSUB]= rr(OP_SUB, 4, 4, 9);
    p[22].fu[FU_MUL]   = rr(0, 15, 15, 0);
    p[23].fu[FU_ADDSUB]= rr(OP_SUB, 3, 3, 15);
    p[24].fu[FU_ADDSUB]= rr(OP_ADD, 0, 14, 2);
    p[25].fu[FU_MEM]   = ri(OP_STORE, 0, 0, 0, 7);
    p[25].fu[FU_ADDSUB]= ri(OP_ADD, 2, 2, 1);
    p[25] = branch(p[25], 11, 2);
    p[26].last = 1;
  endfunction

  task automatic test_coder(input int n, input int sbase, input int obase, input bit full_scale);
    ctrl_word_t p [];
    int smp [], cycles, index, valpred, n_clamp;
    logic [DATA_W-1:0] got;
    coder_prog(p);
    load_prog(p);
    adpcm_tables();
    smp = new [n];
    foreach (smp[i]) begin
      // a sine with noise, or full-scale jumps that overshoot the predictor
      smp[i] = full_scale ? ((i % 16 < 8) ? 32767 : -32768) + $urandom_range(0, 50) - 25
                          : int'(12000.0 * $sin(real'(i) * 0.3)) + $urandom_range(0, 400) - 200;
      if (smp[i] > 32767) smp[i] = 32767;
      if (smp[i] < -32768) smp[i] = -32768;
      set_mem(sbase + i, smp[i]);
    end
    set_reg(1, n); set_reg(13, sbase); set_reg(14, obase);
    run(cycles);
    checks++;
    if (cycles != 2 + 24 * n) begin failures++; $display("coder: %0d cycles, expected %0d", cycles, 2 + 24 * n); end
    index = 0; valpred = 0; n_clamp = 0;
    for (int i = 0; i < n; i++) begin
      int step, diff, delta, vpdiff;
      step = step_tab[index];
      diff = smp[i] - valpred;
      delta = (diff < 0) ? 8 : 0;
      if (diff < 0) diff = -diff;
      vpdiff = step >> 3;
      if (diff >= step) begin delta |= 4; diff -= step; vpdiff += step; end
      step >>= 1;
      if (diff >= step) begin delta |= 2; diff -= step; vpdiff += step; end
      step >>= 1;
      if (diff >= step) begin delta |= 1; vpdiff += step; end
      if ((delta & 8) != 0) valpred -= vpdiff; else valpred += vpdiff;
      if (valpred > 32767)  begin valpred = 32767;  n_clamp++; end
      if (valpred < -32768) begin valpred = -32768; n_clamp++; end
      index += idx_tab[delta];
      if (index < 0) index = 0;
      if (index > 88) index = 88;
      get_mem(obase + i, got);
      checks++;
      if (got !== DATA_W'(delta)) begin failures++; $display("coder[%0d] %0d exp %0d", i, got, delta); end
    end
    if (full_scale) begin checks++; if (n_clamp == 0) failures++; end
  endtask


  initial begin
    start = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    host_reg_we = 0; host_reg_idx = 0; host_reg_wdata = 0;
    host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    test_rgb(8, 100);
    test_rgb(42, 126);
    test_adpcm(60, 105, 170, 0);
    test_adpcm(75, 105, 180, 1);
    test_coder(70, 105, 180, 0);
    test_coder(75, 105, 181, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
