// tb_workloads_idct: row and column passes of an 8x8 integer inverse DCT,
// hand-scheduled for the co-processor with its full FU set.
// Both passes use the Chen-Wang factorisation with 11-bit fixed-point
// constants (W_k = 2048*sqrt(2)*cos(k*pi/16)): eleven multiplications and
// the butterfly additions per row or column. The 64 coefficients sit at
// memory 0..63, row by row, and each pass works in place.
//   - Row pass: one loop iteration per row, 28 states; the memory unit
//     (8 loads and 8 stores) and the shifter set the length. Results are
//     shifted right by 8.
//   - Column pass: one iteration per column, 39 states. It adds rounding
//     constants, shifts by 3 after each multiply step and by 14 at the end,
//     and clips the outputs to [-256, 255] with a compare and a select per
//     side; the selects set the length.
// Additions are shared between the adder and the multiply-accumulate unit,
// which adds as a*1 + c and subtracts as a*(-1) + c; the multiply-then-add
// steps of the first stages run on the multiply-accumulate unit alone.
// Each pass is tested alone and both in sequence as a full 2-D transform;
// results and exact cycle counts are compared with a C-level model.
module tb_workloads_idct;
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

  localparam int W1 = 2841, W2 = 2676, W3 = 2408, W5 = 1609, W6 = 1108, W7 = 565;

  // r0 row base, r1..r8 x1..x8, r9 x0, r10 constant 128, r11 loop
  // condition, r12 base of the last row, r13..r15 temporaries
  function automatic void idct_prog(ref ctrl_word_t p []);
    int l;
    p = new [32];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_LOGIC]  = ri(OP_AND, 0, 0, 0);
    p[2].fu[FU_ADDSUB] = ri(OP_ADD, 10, 0, 128);
    p[2].fu[FU_LOGIC]  = ri(OP_OR, 12, 0, 56);
    l = 2;                                              // p[l+k] is loop state k
    // loads, first stage
    p[l+1].fu[FU_MEM]    = ri(OP_LOAD, 4, 0, 1);
    p[l+1].fu[FU_CMP]    = rr(OP_LT, 11, 0, 12);
    p[l+2].fu[FU_MEM]    = ri(OP_LOAD, 5, 0, 7);
    p[l+3].fu[FU_MEM]    = ri(OP_LOAD, 6, 0, 5);
    p[l+4].fu[FU_MEM]    = ri(OP_LOAD, 7, 0, 3);
    p[l+4].fu[FU_ADDSUB] = rr(OP_ADD, 13, 4, 5);
    p[l+5].fu[FU_MEM]    = ri(OP_LOAD, 3, 0, 2);
    p[l+5].fu[FU_MUL]    = ri(0, 8, 13, W7);
    p[l+6].fu[FU_MEM]    = ri(OP_LOAD, 2, 0, 6);
    p[l+6].fu[FU_ADDSUB] = rr(OP_ADD, 14, 6, 7);
    p[l+6].fu[FU_MAC]    = ri(0, 4, 4, W1 - W7, 8);
    p[l+7].fu[FU_MEM]    = ri(OP_LOAD, 1, 0, 4);
    p[l+7].fu[FU_MUL]    = ri(0, 15, 14, W3);
    p[l+7].fu[FU_MAC]    = ri(0, 5, 5, -(W1 + W7), 8);
    p[l+8].fu[FU_MEM]    = ri(OP_LOAD, 9, 0, 0);
    p[l+8].fu[FU_MAC]    = ri(0, 6, 6, -(W3 - W5), 15);
    p[l+8].fu[FU_ADDSUB] = rr(OP_ADD, 13, 3, 2);
    p[l+9].fu[FU_MAC]    = ri(0, 7, 7, -(W3 + W5), 15);
    p[l+9].fu[FU_MUL]    = ri(0, 14, 13, W6);
    p[l+9].fu[FU_SHIFT]  = ri(OP_SHL, 1, 1, 11);
    // second stage
    p[l+10].fu[FU_MAC]    = ri(0, 9, 9, 2048, 10);      // x0 = (blk0 << 11) + 128
    p[l+10].fu[FU_ADDSUB] = rr(OP_ADD, 13, 4, 6);       // new x1, kept in r13
    p[l+11].fu[FU_MAC]    = ri(0, 2, 2, -(W2 + W6), 14);
    p[l+11].fu[FU_ADDSUB] = rr(OP_SUB, 4, 4, 6);
    p[l+12].fu[FU_MAC]    = ri(0, 3, 3, W2 - W6, 14);
    p[l+12].fu[FU_ADDSUB] = rr(OP_ADD, 6, 5, 7);
    p[l+13].fu[FU_ADDSUB] = rr(OP_SUB, 5, 5, 7);
    p[l+13].fu[FU_MAC]    = ri(0, 8, 1, 1, 9);          // x8 = x0 + x1
    // third stage
    p[l+14].fu[FU_ADDSUB] = rr(OP_SUB, 9, 9, 1);
    p[l+14].fu[FU_MAC]    = ri(0, 7, 3, 1, 8);          // x7 = x8 + x3
    p[l+15].fu[FU_ADDSUB] = rr(OP_SUB, 8, 8, 3);
    p[l+15].fu[FU_MAC]    = ri(0, 15, 4, 1, 5);         // x4 + x5
    p[l+16].fu[FU_ADDSUB] = rr(OP_SUB, 14, 4, 5);
    p[l+16].fu[FU_MAC]    = ri(0, 3, 9, 1, 2);          // x3 = x0 + x2
    p[l+17].fu[FU_ADDSUB] = rr(OP_SUB, 9, 9, 2);
    p[l+17].fu[FU_MAC]    = ri(0, 15, 15, 181, 10);
    // fourth stage: outputs in r1, r7, r13, r4, r8, r9, r3, r15 for 0..7
    p[l+18].fu[FU_SHIFT]  = ri(OP_SRA, 2, 15, 8);
    p[l+18].fu[FU_ADDSUB] = rr(OP_ADD, 1, 7, 13);
    p[l+18].fu[FU_MAC]    = ri(0, 14, 14, 181, 10);
    p[l+19].fu[FU_SHIFT]  = ri(OP_SRA, 4, 14, 8);
    p[l+19].fu[FU_ADDSUB] = rr(OP_SUB, 15, 7, 13);
    p[l+19].fu[FU_MAC]    = ri(0, 7, 3, 1, 2);
    p[l+20].fu[FU_SHIFT]  = ri(OP_SRA, 1, 1, 8);
    p[l+20].fu[FU_ADDSUB] = rr(OP_SUB, 3, 3, 2);
    p[l+20].fu[FU_MAC]    = ri(0, 13, 4, 1, 9);
    p[l+21].fu[FU_SHIFT]  = ri(OP_SRA, 15, 15, 8);
    p[l+21].fu[FU_MEM]    = ri(OP_STORE, 0, 0, 0, 1);
    p[l+21].fu[FU_ADDSUB] = rr(OP_SUB, 9, 9, 4);
    p[l+21].fu[FU_MAC]    = ri(0, 4, 6, 1, 8);
    p[l+22].fu[FU_SHIFT]  = ri(OP_SRA, 7, 7, 8);
    p[l+22].fu[FU_MEM]    = ri(OP_STORE, 0, 0, 7, 15);
    p[l+22].fu[FU_ADDSUB] = rr(OP_SUB, 8, 8, 6);
    p[l+23].fu[FU_SHIFT]  = ri(OP_SRA, 3, 3, 8);
    p[l+23].fu[FU_MEM]    = ri(OP_STORE, 0, 0, 1, 7);
    p[l+24].fu[FU_SHIFT]  = ri(OP_SRA, 13, 13, 8);
    p[l+24].fu[FU_MEM]    = ri(OP_STORE, 0, 0, 6, 3);
    p[l+25].fu[FU_SHIFT]  = ri(OP_SRA, 9, 9, 8);
    p[l+25].fu[FU_MEM]    = ri(OP_STORE, 0, 0, 2, 13);
    p[l+26].fu[FU_SHIFT]  = ri(OP_SRA, 4, 4, 8);
    p[l+26].fu[FU_MEM]    = ri(OP_STORE, 0, 0, 5, 9);
    p[l+27].fu[FU_SHIFT]  = ri(OP_SRA, 8, 8, 8);
    p[l+27].fu[FU_MEM]    = ri(OP_STORE, 0, 0, 3, 4);
    p[l+28].fu[FU_MEM]    = ri(OP_STORE, 0, 0, 4, 8);
    p[l+28].fu[FU_ADDSUB] = ri(OP_ADD, 0, 0, 8);
    p[l+28] = branch(p[l+28], 11, l + 1);
    p[31].last = 1;
  endfunction

  function automatic void idct_row_ref(ref int b [8]);
    int x0, x1, x2, x3, x4, x5, x6, x7, x8;
    x1 = b[4] <<< 11; x2 = b[6]; x3 = b[2]; x4 = b[1]; x5 = b[7]; x6 = b[5]; x7 = b[3];
    x0 = (b[0] <<< 11) + 128;
    x8 = W7 * (x4 + x5); x4 = x8 + (W1 - W7) * x4; x5 = x8 - (W1 + W7) * x5;
    x8 = W3 * (x6 + x7); x6 = x8 - (W3 - W5) * x6; x7 = x8 - (W3 + W5) * x7;
    x8 = x0 + x1; x0 -= x1;
    x1 = W6 * (x3 + x2); x2 = x1 - (W2 + W6) * x2; x3 = x1 + (W2 - W6) * x3;
    x1 = x4 + x6; x4 -= x6; x6 = x5 + x7; x5 -= x7;
    x7 = x8 + x3; x8 -= x3; x3 = x0 + x2; x0 -= x2;
    x2 = (181 * (x4 + x5) + 128) >>> 8; x4 = (181 * (x4 - x5) + 128) >>> 8;
    b[0] = (x7 + x1) >>> 8; b[1] = (x3 + x2) >>> 8; b[2] = (x0 + x4) >>> 8; b[3] = (x8 + x6) >>> 8;
    b[4] = (x8 - x6) >>> 8; b[5] = (x0 - x4) >>> 8; b[6] = (x3 - x2) >>> 8; b[7] = (x7 - x1) >>> 8;
  endfunction

  // column pass: r0 column, r1..r8 x1..x8, r9 x0, r11 loop condition,
  // r13..r15 temporaries, r14 also the clip flag. r10 and r12 hold 128 and 4
  // during the butterflies and -256 and 255 during clipping; each iteration
  // switches them at its start (+384, & 4) and before the clips (* -2, | 251)
  function automatic void col_prog(ref ctrl_word_t p []);
    int l, st;
    int outr [8] = '{1, 7, 13, 4, 8, 9, 3, 15};          // register of output k
    int order [8] = '{0, 7, 1, 2, 6, 3, 5, 4};         // clip order
    p = new [43];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_LOGIC]  = ri(OP_AND, 0, 0, 0);
    p[2].fu[FU_ADDSUB] = ri(OP_ADD, 10, 0, -256);
    p[2].fu[FU_LOGIC]  = ri(OP_OR, 12, 0, 255);
    l = 2;
    p[l+1].fu[FU_MEM]    = ri(OP_LOAD, 4, 0, 8);
    p[l+1].fu[FU_CMP]    = ri(OP_LT, 11, 0, 7);
    p[l+1].fu[FU_LOGIC]  = ri(OP_AND, 12, 12, 4);
    p[l+1].fu[FU_ADDSUB] = ri(OP_ADD, 10, 10, 384);
    p[l+2].fu[FU_MEM]    = ri(OP_LOAD, 5, 0, 56);
    p[l+3].fu[FU_MEM]    = ri(OP_LOAD, 6, 0, 40);
    p[l+4].fu[FU_MEM]    = ri(OP_LOAD, 7, 0, 24);
    p[l+4].fu[FU_ADDSUB] = rr(OP_ADD, 13, 4, 5);
    p[l+5].fu[FU_MEM]    = ri(OP_LOAD, 3, 0, 16);
    p[l+5].fu[FU_MAC]    = ri(0, 8, 13, W7, 12);
    p[l+6].fu[FU_MEM]    = ri(OP_LOAD, 2, 0, 48);
    p[l+6].fu[FU_ADDSUB] = rr(OP_ADD, 14, 6, 7);
    p[l+6].fu[FU_MAC]    = ri(0, 4, 4, W1 - W7, 8);
    p[l+7].fu[FU_MEM]    = ri(OP_LOAD, 1, 0, 32);
    p[l+7].fu[FU_MAC]    = ri(0, 5, 5, -(W1 + W7), 8);
    p[l+7].fu[FU_SHIFT]  = ri(OP_SRA, 4, 4, 3);
    p[l+8].fu[FU_MEM]    = ri(OP_LOAD, 9, 0, 0);
    p[l+8].fu[FU_MAC]    = ri(0, 15, 14, W3, 12);
    p[l+8].fu[FU_ADDSUB] = rr(OP_ADD, 13, 3, 2);
    p[l+8].fu[FU_SHIFT]  = ri(OP_SRA, 5, 5, 3);
    p[l+9].fu[FU_MAC]    = ri(0, 6, 6, -(W3 - W5), 15);
    p[l+9].fu[FU_SHIFT]  = ri(OP_SHL, 1, 1, 8);
    p[l+10].fu[FU_MAC]   = ri(0, 7, 7, -(W3 + W5), 15);
    p[l+10].fu[FU_SHIFT] = ri(OP_SRA, 6, 6, 3);
    p[l+10].fu[FU_ADDSUB]= ri(OP_ADD, 9, 9, 32);
    p[l+11].fu[FU_MAC]   = ri(0, 14, 13, W6, 12);
    p[l+11].fu[FU_SHIFT] = ri(OP_SRA, 7, 7, 3);
    p[l+12].fu[FU_SHIFT] = ri(OP_SHL, 9, 9, 8);         // x0 = (blk0 << 8) + 8192
    p[l+12].fu[FU_MAC]   = ri(0, 2, 2, -(W2 + W6), 14);
    p[l+12].fu[FU_ADDSUB]= rr(OP_ADD, 13, 4, 6);        // new x1, kept in r13
    p[l+13].fu[FU_MAC]   = ri(0, 3, 3, W2 - W6, 14);
    p[l+13].fu[FU_SHIFT] = ri(OP_SRA, 2, 2, 3);
    p[l+13].fu[FU_ADDSUB]= rr(OP_SUB, 4, 4, 6);
    p[l+14].fu[FU_SHIFT] = ri(OP_SRA, 3, 3, 3);
    p[l+14].fu[FU_ADDSUB]= rr(OP_ADD, 6, 5, 7);
    p[l+14].fu[FU_MAC]   = ri(0, 8, 1, 1, 9);           // x8 = x0 + x1
    p[l+15].fu[FU_ADDSUB]= rr(OP_SUB, 5, 5, 7);
    p[l+15].fu[FU_MAC]   = ri(0, 9, 1, -1, 9);          // x0 -= x1
    p[l+16].fu[FU_ADDSUB]= rr(OP_ADD, 7, 8, 3);
    p[l+16].fu[FU_MAC]   = ri(0, 15, 4, 1, 5);
    p[l+17].fu[FU_ADDSUB]= rr(OP_SUB, 8, 8, 3);
    p[l+17].fu[FU_MAC]   = ri(0, 14, 5, -1, 4);
    p[l+18].fu[FU_ADDSUB]= rr(OP_ADD, 3, 9, 2);
    p[l+18].fu[FU_MAC]   = ri(0, 15, 15, 181, 10);
    p[l+19].fu[FU_ADDSUB]= rr(OP_SUB, 9, 9, 2);
    p[l+19].fu[FU_MAC]   = ri(0, 14, 14, 181, 10);
    p[l+19].fu[FU_SHIFT] = ri(OP_SRA, 2, 15, 8);
    p[l+20].fu[FU_SHIFT] = ri(OP_SRA, 4, 14, 8);
    p[l+20].fu[FU_ADDSUB]= rr(OP_ADD, 1, 7, 13);
    p[l+20].fu[FU_MUL]   = ri(0, 10, 10, -2);
    p[l+20].fu[FU_LOGIC] = ri(OP_OR, 12, 12, 251);
    p[l+21].fu[FU_ADDSUB]= rr(OP_SUB, 15, 7, 13);
    p[l+21].fu[FU_MAC]   = ri(0, 7, 3, 1, 2);
    p[l+21].fu[FU_SHIFT] = ri(OP_SRA, 1, 1, 14);
    p[l+22].fu[FU_ADDSUB]= rr(OP_SUB, 3, 3, 2);
    p[l+22].fu[FU_MAC]   = ri(0, 13, 4, 1, 9);
    p[l+22].fu[FU_SHIFT] = ri(OP_SRA, 15, 15, 14);
    p[l+23].fu[FU_ADDSUB]= rr(OP_SUB, 9, 9, 4);
    p[l+23].fu[FU_MAC]   = ri(0, 4, 6, 1, 8);
    p[l+23].fu[FU_SHIFT] = ri(OP_SRA, 7, 7, 14);
    p[l+24].fu[FU_ADDSUB]= rr(OP_SUB, 8, 8, 6);
    p[l+24].fu[FU_SHIFT] = ri(OP_SRA, 13, 13, 14);
    p[l+25].fu[FU_SHIFT] = ri(OP_SRA, 3, 3, 14);
    p[l+26].fu[FU_SHIFT] = ri(OP_SRA, 4, 4, 14);
    p[l+27].fu[FU_SHIFT] = ri(OP_SRA, 9, 9, 14);
    p[l+28].fu[FU_SHIFT] = ri(OP_SRA, 8, 8, 14);
    // clips, two outputs at a time: compare in one state, select in the
    // next; the high clip of both, then the low clip of both, then the store
    for (int q = 0; q < 4; q++) begin
      int ra, rb, c0;
      ra = outr[order[2*q]]; rb = outr[order[2*q+1]];
      c0 = l + 22 + 4 * q;
      p[c0].fu[FU_CMP]    = ri(OP_GT, 14, ra, 255);
      p[c0+1].fu[FU_CMP]  = ri(OP_GT, 14, rb, 255);
      p[c0+1].fu[FU_MUX]  = rr(0, ra, 12, ra, 14);
      p[c0+2].fu[FU_CMP]  = ri(OP_LT, 14, ra, -256);
      p[c0+2].fu[FU_MUX]  = rr(0, rb, 12, rb, 14);
      p[c0+3].fu[FU_CMP]  = ri(OP_LT, 14, rb, -256);
      p[c0+3].fu[FU_MUX]  = rr(0, ra, 10, ra, 14);
      p[c0+4].fu[FU_MUX]  = rr(0, rb, 10, rb, 14);
      p[c0+4].fu[FU_MEM]  = ri(OP_STORE, 0, 0, 8 * order[2*q], ra);
      p[c0+5].fu[FU_MEM]  = ri(OP_STORE, 0, 0, 8 * order[2*q+1], rb);
    end
    st = l + 39;
    p[st].fu[FU_ADDSUB] = ri(OP_ADD, 0, 0, 1);
    p[st] = branch(p[st], 11, l + 1);
    p[42].last = 1;
  endfunction

  function automatic int iclip(int v);
    return (v < -256) ? -256 : (v > 255) ? 255 : v;
  endfunction

  // one column, c[k] = blk[8k + col]
  function automatic void idct_col_ref(ref int c [8]);
    int x0, x1, x2, x3, x4, x5, x6, x7, x8;
    x1 = c[4] <<< 8; x2 = c[6]; x3 = c[2]; x4 = c[1]; x5 = c[7]; x6 = c[5]; x7 = c[3];
    x0 = (c[0] <<< 8) + 8192;
    x8 = W7 * (x4 + x5) + 4; x4 = (x8 + (W1 - W7) * x4) >>> 3; x5 = (x8 - (W1 + W7) * x5) >>> 3;
    x8 = W3 * (x6 + x7) + 4; x6 = (x8 - (W3 - W5) * x6) >>> 3; x7 = (x8 - (W3 + W5) * x7) >>> 3;
    x8 = x0 + x1; x0 -= x1;
    x1 = W6 * (x3 + x2) + 4; x2 = (x1 - (W2 + W6) * x2) >>> 3; x3 = (x1 + (W2 - W6) * x3) >>> 3;
    x1 = x4 + x6; x4 -= x6; x6 = x5 + x7; x5 -= x7;
    x7 = x8 + x3; x8 -= x3; x3 = x0 + x2; x0 -= x2;
    x2 = (181 * (x4 + x5) + 128) >>> 8; x4 = (181 * (x4 - x5) + 128) >>> 8;
    c[0] = iclip((x7 + x1) >>> 14); c[1] = iclip((x3 + x2) >>> 14);
    c[2] = iclip((x0 + x4) >>> 14); c[3] = iclip((x8 + x6) >>> 14);
    c[4] = iclip((x8 - x6) >>> 14); c[5] = iclip((x0 - x4) >>> 14);
    c[6] = iclip((x3 - x2) >>> 14); c[7] = iclip((x7 - x1) >>> 14);
  endfunction

  // rows: run the row pass; cols: run the column pass after it. The
  // coefficients are drawn from [-range, range-1]; n_clip counts clipped
  // outputs of the column pass
  task automatic test_idct2d(input int range, input bit rows, input bit cols, inout int n_clip);
    ctrl_word_t p [];
    int blk [64], v [8], cycles;
    logic [DATA_W-1:0] got;
    foreach (blk[i]) begin
      // a dense first row, then mostly small and zero coefficients
      blk[i] = (i < 8 || $urandom_range(0, 3) == 0) ? int'($urandom_range(0, 2 * range - 1)) - range : 0;
      set_mem(i, blk[i]);
    end
    if (rows) begin
      idct_prog(p);
      load_prog(p);
      run(cycles);
      checks++;
      if (cycles != 3 + 28 * 8) begin failures++; $display("idct row: %0d cycles, expected %0d", cycles, 3 + 28 * 8); end
      for (int r = 0; r < 8; r++) begin
        for (int k = 0; k < 8; k++) v[k] = blk[8 * r + k];
        idct_row_ref(v);
        for (int k = 0; k < 8; k++) blk[8 * r + k] = v[k];
      end
    end
    if (cols) begin
      col_prog(p);
      load_prog(p);
      run(cycles);
      checks++;
      if (cycles != 3 + 39 * 8) begin failures++; $display("idct col: %0d cycles, expected %0d", cycles, 3 + 39 * 8); end
      for (int c = 0; c < 8; c++) begin
        for (int k = 0; k < 8; k++) v[k] = blk[8 * k + c];
        idct_col_ref(v);
        for (int k = 0; k < 8; k++) begin
          if (v[k] == 255 || v[k] == -256) n_clip++;
          blk[8 * k + c] = v[k];
        end
      end
    end
    for (int i = 0; i < 64; i++) begin
      get_mem(i, got);
      checks++;
      if (got !== DATA_W'(blk[i])) begin failures++; $display("idct[%0d] %0d exp %0d", i, $signed(got), blk[i]); end
    end
  endtask

  initial begin
    automatic int n_clip = 0;
    start = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    host_reg_we = 0; host_reg_idx = 0; host_reg_wdata = 0;
    host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    test_idct2d(2048, 1, 0, n_clip);
    test_idct2d(64, 1, 0, n_clip);
    test_idct2d(4096, 0, 1, n_clip);
    test_idct2d(60000, 0, 1, n_clip);
    test_idct2d(1024, 1, 1, n_clip);
    test_idct2d(256, 1, 1, n_clip);
    checks++;
    if (n_clip == 0) begin failures++; $display("idct: no output was clipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
