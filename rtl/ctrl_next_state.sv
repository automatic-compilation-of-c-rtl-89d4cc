// ctrl_next_state: next-state decoding logic of the FSM controller.
// State 0 is idle: it moves to state 1, the first scheduled state, when
// 'start' is high. In a scheduled state the control word decides: a 'last'
// state returns to idle and raises 'done' for that cycle; a state with a
// conditional branch goes to br_target when the condition (the named
// register non-zero, inverted by br_inv) holds; otherwise the state's
// fall-through successor 'next' follows. Loops of the C code are thus
// backward branches of the schedule. Combinational.
module ctrl_next_state
  import coproc_pkg::*;
(
  input  logic [STATE_W-1:0] state,
  input  logic               start,
  input  logic               cond,
  input  ctrl_word_t         cw,
  output logic [STATE_W-1:0] next_state,
  output logic               done
);
  always_comb begin
    done = 1'b0;
    if (state == '0) begin
      next_state = start ? STATE_W'(1) : '0;
    end else if (cw.last) begin
      next_state = '0;
      done       = 1'b1;
    end else if (cw.br_en && (cond ^ cw.br_inv)) begin
      next_state = cw.br_target;
    end else begin
      next_state = cw.next;
    end
  end
endmodule
