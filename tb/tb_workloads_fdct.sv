// tb_workloads_fdct: row pass of an 8x8 fixed-point forward DCT in the
// well-known integer form with 13-bit constants (outputs scaled up by 4,
// odd and 2/6 terms rounded and shifted right by 11), hand-scheduled for the
// co-processor with its full FU set. The eight samples of a row are loaded,
// reduced by three butterfly stages on the add/subtract unit, and the
// rotations are formed on the multiplier and the multiply-accumulate unit
// side by side; the eight coefficients are written back in place. The loop
// runs over the eight rows of a block at addresses 0..63.
// Coefficients and the exact cycle count (3 + 41 per row) are compared with
// a C-level model of the same arithmetic.
module tb_workloads_fdct;
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

  // r0 row address, r12 address of the last row, r11 loop condition,
  // r1..r10 and r13..r15 samples and intermediate terms
  function automatic void fdct_prog(ref ctrl_word_t p []);
    int l;
    p = new [45];
    foreach (p[s]) p[s] = word(s);
    p[1].fu[FU_LOGIC] = ri(OP_AND, 0, 0, 0);
    p[2].fu[FU_LOGIC] = ri(OP_OR, 12, 0, 56);
    l = 3;                                              // p[l+k] is loop state k
    p[l+0].fu[FU_MEM] = ri(OP_LOAD, 1, 0, 0);
    p[l+1].fu[FU_MEM] = ri(OP_LOAD, 2, 0, 1);
    p[l+2].fu[FU_MEM] = ri(OP_LOAD, 3, 0, 2);
    p[l+3].fu[FU_MEM] = ri(OP_LOAD, 4, 0, 3);
    p[l+4].fu[FU_MEM] = ri(OP_LOAD, 5, 0, 4);
    p[l+5].fu[FU_MEM] = ri(OP_LOAD, 6, 0, 5);
    p[l+6].fu[FU_MEM] = ri(OP_LOAD, 7, 0, 6);
    p[l+7].fu[FU_MEM] = ri(OP_LOAD, 8, 0, 7);
    p[l+9].fu[FU_ADDSUB] = rr(OP_ADD, 9, 1, 8);
    p[l+10].fu[FU_ADDSUB] = rr(OP_SUB, 8, 1, 8);
    p[l+11].fu[FU_ADDSUB] = rr(OP_ADD, 1, 2, 7);
    p[l+12].fu[FU_ADDSUB] = rr(OP_SUB, 7, 2, 7);
    p[l+13].fu[FU_ADDSUB] = rr(OP_ADD, 2, 3, 6);
    p[l+14].fu[FU_ADDSUB] = rr(OP_SUB, 6, 3, 6);
    p[l+15].fu[FU_ADDSUB] = rr(OP_ADD, 3, 4, 5);
    p[l+16].fu[FU_ADDSUB] = rr(OP_SUB, 5, 4, 5);
    p[l+17].fu[FU_ADDSUB] = rr(OP_ADD, 4, 9, 3);
    p[l+18].fu[FU_ADDSUB] = rr(OP_SUB, 9, 9, 3);
    p[l+19].fu[FU_ADDSUB] = rr(OP_ADD, 3, 1, 2);
    p[l+20].fu[FU_ADDSUB] = rr(OP_SUB, 1, 1, 2);
    p[l+21].fu[FU_ADDSUB] = rr(OP_ADD, 2, 4, 3);
    p[l+22].fu[FU_ADDSUB] = rr(OP_SUB, 4, 4, 3);
    p[l+22].fu[FU_SHIFT] = ri(OP_SHL, 2, 2, 2);
    p[l+23].fu[FU_ADDSUB] = rr(OP_ADD, 3, 1, 9);
    p[l+23].fu[FU_MEM] = ri(OP_STORE, 0, 0, 0, 2);
    p[l+23].fu[FU_SHIFT] = ri(OP_SHL, 4, 4, 2);
    p[l+24].fu[FU_ADDSUB] = rr(OP_ADD, 4, 6, 8);
    p[l+24].fu[FU_MEM] = ri(OP_STORE, 0, 0, 4, 4);
    p[l+24].fu[FU_MUL] = ri(0, 3, 3, 4433);
    p[l+25].fu[FU_ADDSUB] = ri(OP_ADD, 3, 3, 1024);
    p[l+26].fu[FU_MAC] = ri(0, 2, 9, 6270, 3);
    p[l+27].fu[FU_ADDSUB] = rr(OP_ADD, 1, 5, 8);
    p[l+27].fu[FU_MAC] = ri(0, 10, 1, -15137, 3);
    p[l+27].fu[FU_SHIFT] = ri(OP_SRA, 2, 2, 11);
    p[l+28].fu[FU_ADDSUB] = rr(OP_ADD, 2, 6, 7);
    p[l+28].fu[FU_MEM] = ri(OP_STORE, 0, 0, 2, 2);
    p[l+28].fu[FU_MUL] = ri(0, 1, 1, -7373);
    p[l+28].fu[FU_SHIFT] = ri(OP_SRA, 10, 10, 11);
    p[l+29].fu[FU_ADDSUB] = rr(OP_ADD, 3, 5, 7);
    p[l+29].fu[FU_MEM] = ri(OP_STORE, 0, 0, 6, 10);
    p[l+29].fu[FU_MUL] = ri(0, 2, 2, -20995);
    p[l+30].fu[FU_ADDSUB] = rr(OP_ADD, 9, 3, 4);
    p[l+31].fu[FU_MUL] = ri(0, 9, 9, 9633);
    p[l+32].fu[FU_ADDSUB] = ri(OP_ADD, 9, 9, 1024);
    p[l+33].fu[FU_MAC] = ri(0, 3, 3, -16069, 9);
    p[l+34].fu[FU_ADDSUB] = rr(OP_ADD, 13, 1, 3);
    p[l+34].fu[FU_MAC] = ri(0, 4, 4, -3196, 9);
    p[l+35].fu[FU_ADDSUB] = rr(OP_ADD, 14, 2, 4);
    p[l+35].fu[FU_MAC] = ri(0, 13, 5, 2446, 13);
    p[l+36].fu[FU_ADDSUB] = rr(OP_ADD, 15, 2, 3);
    p[l+36].fu[FU_MAC] = ri(0, 14, 6, 16819, 14);
    p[l+36].fu[FU_SHIFT] = ri(OP_SRA, 13, 13, 11);
    p[l+37].fu[FU_ADDSUB] = rr(OP_ADD, 1, 1, 4);
    p[l+37].fu[FU_MAC] = ri(0, 15, 7, 25172, 15);
    p[l+37].fu[FU_MEM] = ri(OP_STORE, 0, 0, 7, 13);
    p[l+37].fu[FU_SHIFT] = ri(OP_SRA, 14, 14, 11);
    p[l+38].fu[FU_MAC] = ri(0, 1, 8, 12299, 1);
    p[l+38].fu[FU_MEM] = ri(OP_STORE, 0, 0, 5, 14);
    p[l+38].fu[FU_SHIFT] = ri(OP_SRA, 15, 15, 11);
    p[l+39].fu[FU_MEM] = ri(OP_STORE, 0, 0, 3, 15);
    p[l+39].fu[FU_SHIFT] = ri(OP_SRA, 1, 1, 11);
    p[l+40].fu[FU_MEM] = ri(OP_STORE, 0, 0, 1, 1);
    p[l+0].fu[FU_CMP] = rr(OP_LT, 11, 0, 12);
    p[l+40].fu[FU_ADDSUB] = ri(OP_ADD, 0, 0, 8);
    p[l+40] = branch(p[l+40], 11, l);
    p[44].last = 1;
  endfunction

  function automatic int descale(longint x);
    return int'((x + 1024) >>> 11);
  endfunction
  function automatic void fdct_row_ref(ref int v [8]);
    longint t0, t1, t2, t3, t4, t5, t6, t7, t10, t11, t12, t13, z1, z2, z3, z4, z5;
    longint x [8];
    foreach (x[k]) x[k] = longint'(v[k]);
    t0 = x[0] + x[7]; t7 = x[0] - x[7];
    t1 = x[1] + x[6]; t6 = x[1] - x[6];
    t2 = x[2] + x[5]; t5 = x[2] - x[5];
    t3 = x[3] + x[4]; t4 = x[3] - x[4];
    t10 = t0 + t3; t13 = t0 - t3; t11 = t1 + t2; t12 = t1 - t2;
    v[0] = int'((t10 + t11) * 4);
    v[4] = int'((t10 - t11) * 4);
    z1 = (t12 + t13) * 4433;
    v[2] = descale(z1 + t13 * 6270);
    v[6] = descale(z1 - t12 * 15137);
    z1 = t4 + t7; z2 = t5 + t6; z3 = t4 + t6; z4 = t5 + t7;
    z5 = (z3 + z4) * 9633;
    t4 = t4 * 2446; t5 = t5 * 16819; t6 = t6 * 25172; t7 = t7 * 12299;
    z1 = z1 * -7373; z2 = z2 * -20995; z3 = z3 * -16069 + z5; z4 = z4 * -3196 + z5;
    v[7] = descale(t4 + z1 + z3);
    v[5] = descale(t5 + z2 + z4);
    v[3] = descale(t6 + z2 + z3);
    v[1] = descale(t7 + z1 + z4);
  endfunction

  task automatic test_fdct(input int lo, input int hi);
    ctrl_word_t p [];
    int blk [64], v [8], cycles;
    logic [DATA_W-1:0] got;
    fdct_prog(p);
    load_prog(p);
    foreach (blk[i]) begin
      blk[i] = lo + int'($urandom_range(0, 32'(hi - lo)));
      set_mem(i, DATA_W'(blk[i]));
    end
    run(cycles);
    checks++;
    if (cycles != 3 + 41 * 8) begin failures++; $display("fdct: %0d cycles, expected %0d", cycles, 3 + 41 * 8); end
    for (int r = 0; r < 8; r++) begin
      for (int k = 0; k < 8; k++) v[k] = blk[8 * r + k];
      fdct_row_ref(v);
      for (int k = 0; k < 8; k++) begin
        get_mem(8 * r + k, got);
        checks++;
        if (got !== DATA_W'(v[k])) begin failures++; $display("row %0d coef %0d: %0d exp %0d", r, k, $signed(got), v[k]); end
      end
    end
  endtask

  initial begin
    start = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    host_reg_we = 0; host_reg_idx = 0; host_reg_wdata = 0;
    host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    test_fdct(-128, 127);
    test_fdct(-128, -100);
    test_fdct(0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
