// tb_controller: loads a short schedule with a loop (conditional backward
// branch), an inverted-condition forward branch and a final state into the
// controller, starts it several times with a random branch condition, and
// checks cycle by cycle that the FU enables and register enables belong to
// the state a reference walk of the schedule predicts, that busy is high
// exactly while running, and that done comes N+1 cycles after start for N
// executed states.
module tb_controller;
  import coproc_pkg::*;
  import coproc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, cond, cfg_we;
  logic [STATE_W-1:0] cfg_addr, state;
  ctrl_word_t cfg_wdata;
  dp_ctl_t ctl;
  controller dut (.*);

  localparam int NPROG = 6;
  ctrl_word_t prog [NPROG];
  int n_taken = 0, n_inv_taken = 0, n_fall = 0, n_runs = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NFU-1:0] en_mask(ctrl_word_t w);
    logic [NFU-1:0] m;
    for (int f = 0; f < NFU; f++) m[f] = w.fu[f].en;
    return m;
  endfunction

  initial begin
    // schedule: state 1..5
    prog[0] = '0;
    prog[1] = word(1); prog[1].fu[FU_ADDSUB] = ri(OP_ADD, 1, 1, 1);
    prog[2] = word(2); prog[2].fu[FU_MUL] = rr(0, 2, 1, 1); prog[2].fu[FU_SHIFT] = ri(OP_SHL, 3, 2, 1);
    prog[3] = branch(word(3), 5, 2);                       // loop back to 2 while r5 != 0
    prog[3].fu[FU_CMP] = rr(OP_LT, 5, 1, 4);
    prog[4] = branch(word(4), 6, 1, 1);                    // back to 1 when r6 == 0
    prog[4].fu[FU_LOGIC] = rr(OP_XOR, 7, 7, 7);
    prog[5] = word(5); prog[5].last = 1; prog[5].fu[FU_MAC] = rr(0, 8, 1, 2, 8);
    start = 0; cond = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 1; s < NPROG; s++) begin
      @(negedge clk); cfg_we = 1; cfg_addr = STATE_W'(s); cfg_wdata = prog[s];
    end
    @(negedge clk); cfg_we = 0;
    checks++; if (busy || ctl.fu_en != 0 || ctl.reg_we != 0) failures++;
    for (int run = 0; run < 40; run++) begin
      int s, executed, cyc;
      @(negedge clk); start = 1;
      @(posedge clk); #1; start = 0;
      s = 1; executed = 0; cyc = 1;
      while (s != 0) begin
        @(negedge clk);
        cond = $urandom_range(0, 2) != 0;
        #1;
        checks++;
        if (!busy || state !== STATE_W'(s) || ctl.fu_en !== en_mask(prog[s]) || ctl.cond_sel !== prog[s].br_src) begin
          failures++;
          $display("run %0d state %0d: fu_en %b exp %b busy %b", run, s, ctl.fu_en, en_mask(prog[s]), busy);
        end
        for (int f = 0; f < NFU - 1; f++)
          if (prog[s].fu[f].en) begin
            checks++;
            if (!ctl.reg_we[prog[s].fu[f].dst] || ctl.reg_wsel[prog[s].fu[f].dst] != FU_SEL_W'(f)) failures++;
          end
        executed++;
        if (prog[s].last) s = 0;
        else if (prog[s].br_en && (cond != prog[s].br_inv)) begin
          if (prog[s].br_inv) n_inv_taken++; else n_taken++;
          s = int'(prog[s].br_target);
        end else begin
          if (prog[s].br_en) n_fall++;
          s = int'(prog[s].next);
        end
        @(posedge clk); #1;
        cyc++;
        checks++;
        if (done !== (s == 0)) begin failures++; $display("run %0d: done=%b at cycle %0d", run, done, cyc); end
      end
      checks++;
      if (cyc != executed + 1 || busy) failures++;
      n_runs++;
      @(posedge clk); #1;
      checks++; if (done || busy) failures++;
    end
    checks++;
    if (n_taken == 0 || n_inv_taken == 0 || n_fall == 0) begin failures++; $display("branch outcomes not all seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
