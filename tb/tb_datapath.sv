// tb_datapath: drives the decoded controls of the data-path directly with
// random FU operations (several FUs per cycle, random operands and
// immediates, loads and stores) and checks every register after every cycle
// against a model built from the reference FU functions and a shadow
// memory. Also checks the branch condition output, the host register and
// memory ports, and the one-state load latency.
module tb_datapath;
  import coproc_pkg::*;
  import coproc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  dp_ctl_t ctl;
  logic cond;
  logic host_reg_we, host_mem_we;
  logic [REG_IDX_W-1:0] host_reg_idx;
  logic [MEM_ADDR_W-1:0] host_mem_addr;
  logic [DATA_W-1:0] host_reg_wdata, host_reg_rdata, host_mem_wdata, host_mem_rdata;
  datapath dut (.*);

  logic [NREGS-1:0][DATA_W-1:0] m;      // register model
  logic [DATA_W-1:0] mem [MEM_DEPTH];   // memory model
  int n_fu [NFU];
  int n_load_ret = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] rnd();
    case ($urandom_range(0, 3))
      0: return DATA_W'($urandom_range(0, 40));
      1: return -DATA_W'($urandom_range(0, 40));
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic              pend_v, nxt_pend_v;
    logic [REG_IDX_W-1:0] pend_d, nxt_pend_d;
    logic [DATA_W-1:0] pend_w, nxt_pend_w;
    logic [NREGS-1:0][DATA_W-1:0] nm;
    ctl = '0; host_reg_we = 0; host_mem_we = 0; host_reg_idx = 0; host_mem_addr = 0;
    host_reg_wdata = 0; host_mem_wdata = 0;
    pend_v = 0; pend_d = 0; pend_w = 0;
    foreach (n_fu[f]) n_fu[f] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // host fills registers and memory
    for (int r = 0; r < NREGS; r++) begin
      @(negedge clk); host_reg_we = 1; host_reg_idx = REG_IDX_W'(r); host_reg_wdata = rnd(); m[r] = host_reg_wdata;
    end
    @(negedge clk); host_reg_we = 0;
    for (int i = 0; i < MEM_DEPTH; i++) begin
      @(negedge clk); host_mem_we = 1; host_mem_addr = MEM_ADDR_W'(i); host_mem_wdata = rnd(); mem[i] = host_mem_wdata;
    end
    @(negedge clk); host_mem_we = 0;
    // host reads back a few registers and words
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); host_reg_idx = REG_IDX_W'(i); host_mem_addr = MEM_ADDR_W'(i * 7);
      #1; checks++; if (host_reg_rdata !== m[i % NREGS]) failures++;
      @(posedge clk); #1; checks++; if (host_mem_rdata !== mem[(i * 7) % MEM_DEPTH]) failures++;
    end
    // random operation
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      ctl = '0;
      for (int f = 0; f < NFU; f++) begin
        ctl.fu_en[f]    = $urandom_range(0, 2) == 0;
        ctl.fu[f].op    = 3'($urandom);
        ctl.fu[f].a_sel = REG_IDX_W'($urandom);
        ctl.fu[f].b_sel = REG_IDX_W'($urandom);
        ctl.fu[f].c_sel = REG_IDX_W'($urandom);
        ctl.fu[f].b_imm = $urandom_range(0, 2) == 0;
        ctl.fu[f].imm   = rnd();
      end
      ctl.fu[FU_MEM].op = 3'($urandom_range(0, 1));
      ctl.ld_dst   = REG_IDX_W'($urandom);
      ctl.cond_sel = REG_IDX_W'($urandom);
      // register writes: each register takes at most one enabled FU (not the memory FU)
      for (int r = 0; r < NREGS; r++) begin
        int f;
        f = $urandom_range(0, NFU - 2);
        if (ctl.fu_en[f] && $urandom_range(0, 1) == 1 && !(pend_v && pend_d == REG_IDX_W'(r))) begin
          ctl.reg_we[r] = 1'b1; ctl.reg_wsel[r] = FU_SEL_W'(f);
        end
      end
      // model
      #1;
      checks++;
      if (cond !== (m[ctl.cond_sel] != 0)) failures++;
      nm = m;
      for (int r = 0; r < NREGS; r++)
        if (ctl.reg_we[r]) begin
          int f;
          logic [DATA_W-1:0] a, b, c;
          f = int'(ctl.reg_wsel[r]);
          a = m[ctl.fu[f].a_sel];
          b = ctl.fu[f].b_imm ? ctl.fu[f].imm : m[ctl.fu[f].b_sel];
          c = m[ctl.fu[f].c_sel];
          nm[r] = fu_ref(f, ctl.fu[f].op, a, b, c);
          n_fu[f]++;
        end
      if (pend_v) begin nm[pend_d] = pend_w; n_load_ret++; end
      nxt_pend_v = 0; nxt_pend_d = 0; nxt_pend_w = 0;
      if (ctl.fu_en[FU_MEM]) begin
        logic [DATA_W-1:0] addr;
        addr = m[ctl.fu[FU_MEM].a_sel] + (ctl.fu[FU_MEM].b_imm ? ctl.fu[FU_MEM].imm : m[ctl.fu[FU_MEM].b_sel]);
        n_fu[FU_MEM]++;
        if (ctl.fu[FU_MEM].op == OP_STORE) mem[addr[MEM_ADDR_W-1:0]] = m[ctl.fu[FU_MEM].c_sel];
        else begin
          nxt_pend_v = 1; nxt_pend_d = ctl.ld_dst; nxt_pend_w = mem[addr[MEM_ADDR_W-1:0]];
        end
      end
      // a store may hit the word a later load reads: the model above reads before
      // writing, as the RAM does for its own port
      @(posedge clk); #1;
      m = nm;
      pend_v = nxt_pend_v; pend_d = nxt_pend_d; pend_w = nxt_pend_w;
      for (int r = 0; r < NREGS; r++) begin
        host_reg_idx = REG_IDX_W'(r); #0.1;
        checks++;
        if (host_reg_rdata !== m[r]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: r%0d = %h, expected %h", cyc, r, host_reg_rdata, m[r]);
        end
      end
    end
    for (int f = 0; f < NFU; f++) begin
      checks++;
      if (n_fu[f] == 0) begin failures++; $display("FU %0d never exercised", f); end
    end
    checks++;
    if (n_load_ret == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
