// tb_ctrl_next_state: random control words, states and inputs against a
// reference of the next-state rules: idle waits for start and goes to 1,
// a last state returns to idle with done, a branch is taken when the
// (optionally inverted) condition holds, otherwise the fall-through state.
module tb_ctrl_next_state;
  import coproc_pkg::*;
  int checks = 0, failures = 0;
  logic [STATE_W-1:0] state, next_state, exp_n;
  logic start, cond, done, exp_d;
  ctrl_word_t cw;
  int n_branch = 0, n_last = 0, n_start = 0;
  ctrl_next_state dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 4000; i++) begin
      for (int k = 0; k < $bits(cw); k += 32) cw[k +: 32] = $urandom;
      state = ($urandom_range(0, 4) == 0) ? '0 : STATE_W'($urandom);
      start = $urandom; cond = $urandom;
      cw.last = $urandom_range(0, 5) == 0;
      #1;
      exp_d = 0;
      if (state == 0) exp_n = start ? 1 : 0;
      else if (cw.last) begin exp_n = 0; exp_d = 1; n_last++; end
      else if (cw.br_en && (cond != cw.br_inv)) begin exp_n = cw.br_target; n_branch++; end
      else exp_n = cw.next;
      if (state == 0 && start) n_start++;
      checks++;
      if (next_state !== exp_n || done !== exp_d) begin
        failures++;
        $display("state %0d: next %0d done %b, exp %0d %b", state, next_state, done, exp_n, exp_d);
      end
    end
    checks++;
    if (n_branch == 0 || n_last == 0 || n_start == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
