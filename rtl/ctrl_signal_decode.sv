// ctrl_signal_decode: control signal decoding logic of the FSM controller.
// Turns the current state's control word into the data-path's controls:
// FU enables, the selects of every operand multiplexer (with the immediate
// sign-extended to the data width), a register enable and a write-multiplexer
// select per register, the destination of a load and the register holding
// the branch condition. Every enabled FU except the memory unit writes its
// destination register in this state; the memory unit's load data is written
// one state later by the data-path. In the idle state ('active' low) all
// enables are off. If two FUs name the same destination, the lower-numbered
// FU wins and wr_conflict is raised (a schedule error). Combinational.
module ctrl_signal_decode
  import coproc_pkg::*;
(
  input  ctrl_word_t cw,
  input  logic       active,
  output dp_ctl_t    ctl,
  output logic       wr_conflict
);
  always_comb begin
    ctl         = '0;
    wr_conflict = 1'b0;
    for (int f = 0; f < NFU; f++) begin
      ctl.fu_en[f]    = active && cw.fu[f].en;
      ctl.fu[f].a_sel = cw.fu[f].src_a;
      ctl.fu[f].b_sel = cw.fu[f].src_b;
      ctl.fu[f].c_sel = cw.fu[f].src_c;
      ctl.fu[f].b_imm = cw.fu[f].b_imm;
      ctl.fu[f].imm   = DATA_W'(cw.fu[f].imm);   // sign extension
      ctl.fu[f].op    = cw.fu[f].op;
    end
    // highest index first so that the lowest-numbered writer is kept
    for (int f = NFU - 1; f >= 0; f--) begin
      if (f != int'(FU_MEM) && ctl.fu_en[f]) begin
        if (ctl.reg_we[cw.fu[f].dst]) wr_conflict = 1'b1;
        ctl.reg_we[cw.fu[f].dst]   = 1'b1;
        ctl.reg_wsel[cw.fu[f].dst] = FU_SEL_W'(f);
      end
    end
    ctl.ld_dst   = cw.fu[FU_MEM].dst;
    ctl.cond_sel = cw.br_src;
  end
endmodule
