// tb_ctrl_signal_decode: random control words through ctrl_signal_decode.
// A reference decoder built independently (per register, search the FUs in
// ascending order for the first enabled writer) gives the register enables
// and write selects; FU enables, operand selects, the sign-extended
// immediate, the load destination and the conflict flag are checked too,
// as is that nothing is enabled when the machine is idle.
module tb_ctrl_signal_decode;
  import coproc_pkg::*;
  int checks = 0, failures = 0;
  ctrl_word_t cw;
  logic active, wr_conflict;
  dp_ctl_t ctl;
  int n_conf = 0;
  ctrl_signal_decode dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 4000; i++) begin
      for (int k = 0; k < $bits(cw); k += 32) cw[k +: 32] = $urandom;
      active = $urandom_range(0, 7) != 0;
      #1;
      begin
        logic ok;
        int writers;
        logic exp_conf;
        ok = 1; exp_conf = 0;
        for (int f = 0; f < NFU; f++) begin
          if (ctl.fu_en[f] !== (active & cw.fu[f].en)) ok = 0;
          if (ctl.fu[f].a_sel !== cw.fu[f].src_a || ctl.fu[f].b_sel !== cw.fu[f].src_b ||
              ctl.fu[f].c_sel !== cw.fu[f].src_c || ctl.fu[f].b_imm !== cw.fu[f].b_imm ||
              ctl.fu[f].op !== cw.fu[f].op) ok = 0;
          if ($signed(ctl.fu[f].imm) != int'($signed(cw.fu[f].imm))) ok = 0;
        end
        for (int r = 0; r < NREGS; r++) begin
          int first;
          first = -1; writers = 0;
          for (int f = 0; f < NFU - 1; f++)   // the memory FU writes later
            if (active && cw.fu[f].en && int'(cw.fu[f].dst) == r) begin
              writers++;
              if (first < 0) first = f;
            end
          if (writers > 1) exp_conf = 1;
          if (ctl.reg_we[r] !== (first >= 0)) ok = 0;
          if (first >= 0 && int'(ctl.reg_wsel[r]) != first) ok = 0;
        end
        if (ctl.ld_dst !== cw.fu[FU_MEM].dst || ctl.cond_sel !== cw.br_src) ok = 0;
        if (wr_conflict !== exp_conf) ok = 0;
        if (exp_conf) n_conf++;
        checks++;
        if (!ok) begin failures++; if (failures < 5) $display("decode mismatch at %0d", i); end
      end
    end
    checks++;
    if (n_conf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
