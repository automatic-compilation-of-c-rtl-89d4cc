// coproc_top: an application-specific co-processor for a C function, in the
// form of the co-processor template: an FSM controller that steps through
// the function's static schedule and a data-path of registers, operand
// multiplexers and functional units (add/sub, shift, multiply,
// multiply-accumulate, logic, compare, select, memory access) with a local
// data memory.
//
// Use from the host processor, all synchronous to clk:
//   1. while idle, load the schedule (one control word per state, state 1
//      first) through cfg_*, the arguments into registers through
//      host_reg_*, and arrays into the local memory through host_mem_*;
//   2. pulse start for one cycle; busy goes high;
//   3. wait for the one-cycle done pulse, then read results from registers
//      (host_reg_rdata, combinational) or memory (host_mem_rdata, one cycle
//      after the address).
// Timing: a run that executes N scheduled states gives done N+1 cycles
// after the cycle in which start was sampled. 'state' (current FSM state,
// 0 when idle) and 'fu_active' (FUs issuing this cycle) are status outputs
// for profiling and debug.
//
// The ex_* ports belong to an independent circuit placed beside the
// co-processor: bw_example_dp, a small data-path whose registers were
// trimmed by bit-width inference (EX_WIDTH bits wide). It shares only the
// clock and reset.
//
// FU_MASK leaves out FUs an application does not use. PIPELINED puts a
// register stage between the operand multiplexers and the FUs (see
// datapath): every result then arrives one state later, and schedules must
// be written for that; the default is the non-pipelined data-path. FU_W
// narrows individual FUs to the widths an application needs (see
// datapath); the default is full width. The host
// interface and the loadable schedule are this design's choices; the
// controller/data-path split follows the template.
module coproc_top
  import coproc_pkg::*;
#(
  parameter logic [NFU-1:0] FU_MASK  = '1,
  parameter bit             PIPELINED = 1'b0,
  parameter int unsigned    FU_W [NFU] = '{default: DATA_W},
  parameter int unsigned    EX_WIDTH = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [STATE_W-1:0]    state,
  output logic [NFU-1:0]        fu_active,
  input  logic                  cfg_we,
  input  logic [STATE_W-1:0]    cfg_addr,
  input  ctrl_word_t            cfg_wdata,
  input  logic                  host_reg_we,
  input  logic [REG_IDX_W-1:0]  host_reg_idx,
  input  logic [DATA_W-1:0]     host_reg_wdata,
  output logic [DATA_W-1:0]     host_reg_rdata,
  input  logic                  host_mem_we,
  input  logic [MEM_ADDR_W-1:0] host_mem_addr,
  input  logic [DATA_W-1:0]     host_mem_wdata,
  output logic [DATA_W-1:0]     host_mem_rdata,
  // bit-width-trimmed example data-path, side by side with the co-processor
  input  logic                  ex_r1_we,
  input  logic [EX_WIDTH-1:0]   ex_r1_d,
  input  logic                  ex_r2_we,
  input  logic [EX_WIDTH-1:0]   ex_r2_d,
  input  logic                  ex_m1_sel,
  input  logic                  ex_m2_sel,
  input  logic                  ex_r3_we,
  output logic [EX_WIDTH-1:0]   ex_r1_q,
  output logic [EX_WIDTH-1:0]   ex_r2_q,
  output logic [EX_WIDTH-1:0]   ex_r3_q
);
  dp_ctl_t ctl;
  logic    cond;

  controller u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .state, .cond, .ctl,
    .cfg_we, .cfg_addr, .cfg_wdata);

  datapath #(.FU_MASK(FU_MASK), .PIPELINED(PIPELINED), .FU_W(FU_W)) u_dp (
    .clk, .rst_n, .ctl, .cond,
    .host_reg_we, .host_reg_idx, .host_reg_wdata, .host_reg_rdata,
    .host_mem_we, .host_mem_addr, .host_mem_wdata, .host_mem_rdata);

  always_comb fu_active = ctl.fu_en;

  bw_example_dp #(.WIDTH(EX_WIDTH)) u_bw_example (
    .clk, .rst_n, .r1_we(ex_r1_we), .r1_d(ex_r1_d), .r2_we(ex_r2_we), .r2_d(ex_r2_d),
    .m1_sel(ex_m1_sel), .m2_sel(ex_m2_sel), .r3_we(ex_r3_we),
    .r1_q(ex_r1_q), .r2_q(ex_r2_q), .r3_q(ex_r3_q));

  assert property (@(posedge clk) disable iff (!rst_n) !((host_reg_we || host_mem_we) && busy))
    else $error("coproc_top: host access while busy");
endmodule
