// coproc_pkg: shared sizes, opcodes and control-word types of the
// application-specific co-processor.
//
// The co-processor is a template: a finite-state-machine controller steps
// through a static schedule, one state per clock, and in every state drives
// a data-path made of registers, operand multiplexers and a set of
// single-operation functional units (FUs). The schedule is the list of
// per-state control words defined here (ctrl_word_t). The controller decodes
// the current word into register enables, multiplexer selects and FU enables
// (dp_ctl_t). The FU set, the use of a controller with next-state and
// control-signal decoding, and the register/multiplexer/enable control
// signals follow the template; the word width, register count, state count,
// the control-word encoding and the opcode values are this design's own.
package coproc_pkg;

  // ---- sizes ---------------------------------------------------------------
  parameter int unsigned DATA_W     = 32;   // C int on a 32-bit host
  parameter int unsigned NREGS      = 16;   // data-path registers
  parameter int unsigned REG_IDX_W  = $clog2(NREGS);
  parameter int unsigned NSTATES    = 64;   // schedule length, incl. idle state 0
  parameter int unsigned STATE_W    = $clog2(NSTATES);
  parameter int unsigned IMM_W      = 16;   // signed immediate per FU operand B
  parameter int unsigned MEM_DEPTH  = 256;  // local data memory, words
  parameter int unsigned MEM_ADDR_W = $clog2(MEM_DEPTH);
  parameter int unsigned SH_W       = $clog2(DATA_W);

  // ---- functional units -----------------------------------------------------
  // One FU of each kind; the index is also the register write-source select.
  parameter int unsigned NFU = 8;
  typedef enum logic [2:0] {
    FU_ADDSUB = 3'd0,
    FU_SHIFT  = 3'd1,
    FU_MUL    = 3'd2,
    FU_MAC    = 3'd3,
    FU_LOGIC  = 3'd4,
    FU_CMP    = 3'd5,
    FU_MUX    = 3'd6,
    FU_MEM    = 3'd7   // as a write source: load data returning from memory
  } fu_id_e;
  parameter int unsigned FU_SEL_W = 3;

  // Per-FU operation codes (field 'op' of fu_ctrl_t).
  parameter logic [2:0] OP_ADD = 3'd0, OP_SUB = 3'd1;
  parameter logic [2:0] OP_SHL = 3'd0, OP_SRL = 3'd1, OP_SRA = 3'd2;
  parameter logic [2:0] OP_AND = 3'd0, OP_OR = 3'd1, OP_XOR = 3'd2, OP_NOT = 3'd3;
  parameter logic [2:0] OP_EQ = 3'd0, OP_NE = 3'd1, OP_LT = 3'd2, OP_LE = 3'd3,
                        OP_GT = 3'd4, OP_GE = 3'd5, OP_LTU = 3'd6, OP_GEU = 3'd7;
  parameter logic [2:0] OP_LOAD = 3'd0, OP_STORE = 3'd1;

  // ---- encoded schedule: one control word per state -------------------------
  typedef struct packed {
    logic                        en;     // FU issues in this state
    logic [2:0]                  op;     // FU-specific operation
    logic [REG_IDX_W-1:0]        src_a;  // operand A register
    logic [REG_IDX_W-1:0]        src_b;  // operand B register
    logic [REG_IDX_W-1:0]        src_c;  // operand C register (MAC addend, mux select, store data)
    logic                        b_imm;  // operand B is the immediate
    logic signed [IMM_W-1:0]     imm;    // sign-extended immediate
    logic [REG_IDX_W-1:0]        dst;    // destination register (none for store)
  } fu_ctrl_t;

  typedef struct packed {
    fu_ctrl_t [NFU-1:0]          fu;        // per-FU slot, index = fu_id_e
    logic                        br_en;     // conditional branch in this state
    logic                        br_inv;    // branch when condition register is zero
    logic [REG_IDX_W-1:0]        br_src;    // condition register
    logic [STATE_W-1:0]          br_target; // state taken on branch
    logic [STATE_W-1:0]          next;      // fall-through successor
    logic                        last;      // final state: return to idle, raise done
  } ctrl_word_t;

  // ---- decoded data-path controls --------------------------------------------
  typedef struct packed {
    logic [REG_IDX_W-1:0]        a_sel;
    logic [REG_IDX_W-1:0]        b_sel;
    logic [REG_IDX_W-1:0]        c_sel;
    logic                        b_imm;
    logic [DATA_W-1:0]           imm;
    logic [2:0]                  op;
  } fu_dp_t;

  typedef struct packed {
    logic [NFU-1:0]                     fu_en;    // FU enables
    fu_dp_t [NFU-1:0]                   fu;       // operand multiplexer selects and opcodes
    logic [NREGS-1:0]                   reg_we;   // register enables
    logic [NREGS-1:0][FU_SEL_W-1:0]     reg_wsel; // register write multiplexer selects
    logic [REG_IDX_W-1:0]               ld_dst;   // destination of a load issued now
    logic [REG_IDX_W-1:0]               cond_sel; // register the branch condition comes from
  } dp_ctl_t;

endpackage
