// coproc_ref_pkg: testbench-side reference model of the co-processor's
// functional units (C semantics on 32-bit ints, computed with 64-bit
// arithmetic) and helpers that assemble control words for schedules.
package coproc_ref_pkg;
  import coproc_pkg::*;

  // result of FU f for the given operation and operands
  function automatic logic [31:0] fu_ref(int f, logic [2:0] op, logic [31:0] a, logic [31:0] b, logic [31:0] c);
    longint sa, sb, ua, ub;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    ua = longint'({32'd0, a}); ub = longint'({32'd0, b});
    case (f)
      0: return 32'(op[0] ? sa - sb : sa + sb);
      1: begin
        int k;
        k = int'(b[4:0]);
        case (op[1:0])
          2'd1:    return 32'(ua / (longint'(1) << k));
          2'd2:    return 32'((sa - ((sa % (longint'(1) << k) + (longint'(1) << k)) % (longint'(1) << k))) / (longint'(1) << k));
          default: return 32'(ua * (longint'(1) << k));
        endcase
      end
      2: return 32'(sa * sb);
      3: return 32'(sa * sb + longint'($signed(c)));
      4: case (op[1:0])
           2'd0: return a & b;
           2'd1: return a | b;
           2'd2: return a ^ b;
           default: return 32'(~ua);
         endcase
      5: case (op)
           3'd0: return 32'(ua == ub);
           3'd1: return 32'(ua != ub);
           3'd2: return 32'(sa < sb);
           3'd3: return 32'(sa <= sb);
           3'd4: return 32'(sa > sb);
           3'd5: return 32'(sa >= sb);
           3'd6: return 32'(ua < ub);
           default: return 32'(ua >= ub);
         endcase
      6: return (c != 0) ? a : b;
      default: return 32'(sa + sb);   // memory FU: the address
    endcase
  endfunction

  // --- schedule assembly -----------------------------------------------------
  // register-register operation of FU f: dst = a op b (c for MAC/mux/store)
  function automatic fu_ctrl_t rr(logic [2:0] op, int dst, int a, int b, int c = 0);
    fu_ctrl_t x;
    x = '0;
    x.en = 1'b1; x.op = op;
    x.dst = REG_IDX_W'(dst); x.src_a = REG_IDX_W'(a); x.src_b = REG_IDX_W'(b); x.src_c = REG_IDX_W'(c);
    return x;
  endfunction
  // register-immediate operation: dst = a op imm
  function automatic fu_ctrl_t ri(logic [2:0] op, int dst, int a, int imm, int c = 0);
    fu_ctrl_t x;
    x = rr(op, dst, a, 0, c);
    x.b_imm = 1'b1; x.imm = IMM_W'(imm);
    return x;
  endfunction
  // empty word falling through to state s+1
  function automatic ctrl_word_t word(int s);
    ctrl_word_t w;
    w = '0;
    w.next = STATE_W'(s + 1);
    return w;
  endfunction
  function automatic ctrl_word_t branch(ctrl_word_t w, int cond_reg, int target, bit inv = 0);
    w.br_en = 1'b1; w.br_inv = inv; w.br_src = REG_IDX_W'(cond_reg); w.br_target = STATE_W'(target);
    return w;
  endfunction
endpackage
