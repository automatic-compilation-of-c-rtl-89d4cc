// tb_workloads_sha: SHA-1 compression of one 512-bit block, hand-scheduled
// for the co-processor with its full FU set.
// Memory holds the message schedule W[0..79] at 0..79 (the host writes
// W[0..15]), the chaining value H0..H4 at 80..84 (updated in place) and the
// round constants at 100, 120, 140 and 160, so that each group of twenty
// rounds finds its constant at t + 100. The schedule has four parts:
//   - expansion, W[t] = rotl1(W[t-3] ^ W[t-8] ^ W[t-14] ^ W[t-16]), 9 states
//     per word with the four loads overlapped with the XOR chain;
//   - a, b, c, d, e loaded from H;
//   - four round loops, one per round function, 5 states per round (6 for
//     the majority function, which needs one more logic step). Rotations
//     are a shift and a multiply by a power of two whose results share no
//     bit, so the two halves are joined by the adder or the
//     multiply-accumulate unit; the register renaming e=d, d=c, b=a at the
//     end of a round is done by otherwise idle FUs (x*1, x|0, x<<0);
//   - H += a..e, stored back.
// The result is compared with the published digest of "abc" and with a
// C-level model on random blocks, and the cycle count with the schedule's.
module tb_workloads_sha;
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

  // ---- schedule -----------------------------------------------------------------
  localparam int K_BASE = 100;
  localparam int H_BASE = 80;
  int n_states;

  // one round loop at state b for round function f (0 choose, 1/3 parity,
  // 2 majority): r1..r5 a..e, r6 t, r7 W[t], r8 f, r9 rotl5(a), r10/r15
  // halves of rotl30(b), r11 K, r12 loop condition, r13 e+K+W, r14 last t
  // of the group, r0 temporary
  function automatic int round_loop(ref ctrl_word_t p [], input int b, input int f);
    int last;
    last = b + ((f == 2) ? 5 : 4);
    p[b].fu[FU_MEM]      = ri(OP_LOAD, 7, 6, 0);
    p[b].fu[FU_SHIFT]    = ri(OP_SRL, 9, 1, 27);
    p[b].fu[FU_ADDSUB]   = rr(OP_ADD, 13, 5, 11);
    p[b].fu[FU_CMP]      = rr(OP_LT, 12, 6, 14);
    p[b+1].fu[FU_MAC]    = ri(0, 9, 1, 32, 9);
    p[b+1].fu[FU_ADDSUB] = ri(OP_ADD, 6, 6, 1);
    p[b+2].fu[FU_ADDSUB] = rr(OP_ADD, 13, 13, 7);
    p[b+2].fu[FU_SHIFT]  = ri(OP_SRL, 10, 2, 2);
    p[b+3].fu[FU_SHIFT]  = ri(OP_SHL, 15, 2, 30);
    case (f)
      0: begin                                          // d ^ (b & (c ^ d))
        p[b].fu[FU_LOGIC]   = rr(OP_XOR, 8, 3, 4);
        p[b+1].fu[FU_LOGIC] = rr(OP_AND, 8, 8, 2);
        p[b+2].fu[FU_LOGIC] = rr(OP_XOR, 8, 8, 4);
      end
      1, 3: begin                                       // b ^ c ^ d
        p[b].fu[FU_LOGIC]   = rr(OP_XOR, 8, 2, 3);
        p[b+1].fu[FU_LOGIC] = rr(OP_XOR, 8, 8, 4);
      end
      default: begin                                    // (b & c) | ((b | c) & d)
        p[b].fu[FU_LOGIC]   = rr(OP_AND, 8, 2, 3);
        p[b+1].fu[FU_LOGIC] = rr(OP_OR, 0, 2, 3);
        p[b+2].fu[FU_LOGIC] = rr(OP_AND, 0, 0, 4);
        p[b+3].fu[FU_LOGIC] = rr(OP_OR, 8, 8, 0);
      end
    endcase
    p[last-1].fu[FU_ADDSUB] = rr(OP_ADD, 0, 13, 8);
    p[last].fu[FU_ADDSUB] = rr(OP_ADD, 1, 0, 9);        // a = temp
    p[last].fu[FU_MAC]    = ri(0, 3, 15, 1, 10);        // c = rotl30(b)
    p[last].fu[FU_MUL]    = ri(0, 4, 3, 1);             // d = c
    p[last].fu[FU_LOGIC]  = ri(OP_OR, 5, 4, 0);         // e = d
    p[last].fu[FU_SHIFT]  = ri(OP_SHL, 2, 1, 0);        // b = a
    p[last] = branch(p[last], 12, b);
    return last + 1;
  endfunction

  function automatic void sha_prog(ref ctrl_word_t p []);
    int s;
    p = new [NSTATES];
    foreach (p[i]) p[i] = word(i);
    // t = 16
    p[1].fu[FU_LOGIC]  = ri(OP_AND, 6, 6, 0);
    p[2].fu[FU_ADDSUB] = ri(OP_ADD, 6, 6, 16);
    // expansion, states 3..11
    p[3].fu[FU_MEM]    = ri(OP_LOAD, 7, 6, -3);
    p[3].fu[FU_CMP]    = ri(OP_LT, 12, 6, 79);
    p[4].fu[FU_MEM]    = ri(OP_LOAD, 8, 6, -8);
    p[5].fu[FU_MEM]    = ri(OP_LOAD, 9, 6, -14);
    p[6].fu[FU_MEM]    = ri(OP_LOAD, 10, 6, -16);
    p[6].fu[FU_LOGIC]  = rr(OP_XOR, 7, 7, 8);
    p[7].fu[FU_LOGIC]  = rr(OP_XOR, 7, 7, 9);
    p[8].fu[FU_LOGIC]  = rr(OP_XOR, 7, 7, 10);
    p[9].fu[FU_SHIFT]  = ri(OP_SRL, 9, 7, 31);
    p[9].fu[FU_MUL]    = ri(0, 10, 7, 2);
    p[10].fu[FU_ADDSUB]= rr(OP_ADD, 7, 9, 10);
    p[11].fu[FU_MEM]   = ri(OP_STORE, 0, 6, 0, 7);
    p[11].fu[FU_ADDSUB]= ri(OP_ADD, 6, 6, 1);
    p[11] = branch(p[11], 12, 3);
    // a..e from H (t is 80 here), then t = 0; states 12..16
    for (int i = 0; i < 5; i++) p[12+i].fu[FU_MEM] = ri(OP_LOAD, 1 + i, 6, i);
    p[16].fu[FU_MUL]   = ri(0, 6, 6, 0);
    // per group: K and the group's last t, then the round loop
    s = 17;
    for (int g = 0; g < 4; g++) begin
      p[s].fu[FU_MEM]    = ri(OP_LOAD, 11, 6, K_BASE);
      p[s].fu[FU_ADDSUB] = ri(OP_ADD, 14, 6, 19);
      s = round_loop(p, s + 2, g);
    end
    // H += a..e (t is 80 again)
    for (int i = 0; i < 5; i++) p[s+i].fu[FU_MEM] = ri(OP_LOAD, 7 + i, 6, i);
    for (int i = 0; i < 5; i++) p[s+2+i].fu[FU_ADDSUB] = rr(OP_ADD, 1 + i, 1 + i, 7 + i);
    for (int i = 0; i < 5; i++) p[s+5+i].fu[FU_MEM] = ri(OP_STORE, 0, 6, i, 1 + i);
    p[s+10].last = 1;
    n_states = s + 10;
    p = new [s + 11] (p);
  endfunction

  // ---- C-level model ----------------------------------------------------------
  function automatic logic [31:0] rotl(logic [31:0] x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic void sha1_block(ref logic [31:0] h [5], input logic [31:0] m [16]);
    logic [31:0] w [80], a, b, c, d, e, f, k, tmp;
    for (int t = 0; t < 80; t++)
      w[t] = (t < 16) ? m[t] : rotl(w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16], 1);
    a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4];
    for (int t = 0; t < 80; t++) begin
      if (t < 20)      begin f = (b & c) | (~b & d);          k = 32'h5A827999; end
      else if (t < 40) begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
      else if (t < 60) begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
      else             begin f = b ^ c ^ d;                   k = 32'hCA62C1D6; end
      tmp = rotl(a, 5) + f + e + k + w[t];
      e = d; d = c; c = rotl(b, 30); b = a; a = tmp;
    end
    h[0] += a; h[1] += b; h[2] += c; h[3] += d; h[4] += e;
  endfunction

  localparam logic [31:0] H_INIT [5] = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};
  localparam logic [31:0] K_VAL [4] = '{32'h5A827999, 32'h6ED9EBA1, 32'h8F1BBCDC, 32'hCA62C1D6};

  // compresses m into h on the co-processor; checks against the model and,
  // when 'expect_digest' is set, against 'digest'
  task automatic test_sha(input logic [31:0] h_in [5], input logic [31:0] m [16],
                          input bit expect_digest, input logic [31:0] digest [5]);
    ctrl_word_t p [];
    logic [31:0] h_ref [5], got;
    int cycles;
    sha_prog(p);
    load_prog(p);
    foreach (m[i]) set_mem(i, m[i]);
    foreach (h_in[i]) set_mem(H_BASE + i, h_in[i]);
    foreach (K_VAL[g]) set_mem(K_BASE + 20 * g, K_VAL[g]);
    run(cycles);
    checks++;
    // 2 + 64*9 + 5 + 4*2 + 20*(5+5+6+5) + 10 executed states, plus the last
    if (cycles != 1022) begin failures++; $display("sha: %0d cycles, expected 1022", cycles); end
    h_ref = h_in;
    sha1_block(h_ref, m);
    for (int i = 0; i < 5; i++) begin
      get_mem(H_BASE + i, got);
      checks++;
      if (got !== h_ref[i]) begin failures++; $display("sha H%0d %h exp %h", i, got, h_ref[i]); end
      if (expect_digest) begin
        checks++;
        if (h_ref[i] !== digest[i]) begin failures++; $display("sha model H%0d %h, published %h", i, h_ref[i], digest[i]); end
      end
    end
  endtask

  initial begin
    logic [31:0] m [16], h [5];
    start = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    host_reg_we = 0; host_reg_idx = 0; host_reg_wdata = 0;
    host_mem_we = 0; host_mem_addr = 0; host_mem_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // "abc", padded: one block
    m = '{default: 32'h0};
    m[0] = 32'h61626380; m[15] = 32'h00000018;
    test_sha(H_INIT, m, 1, '{32'hA9993E36, 32'h4706816A, 32'hBA3E2571, 32'h7850C26C, 32'h9CD0D89D});
    checks++;
    if (n_states > NSTATES - 1) failures++;
    for (int r = 0; r < 3; r++) begin
      foreach (m[i]) m[i] = $urandom;
      foreach (h[i]) h[i] = $urandom;
      test_sha(h, m, 0, H_INIT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
