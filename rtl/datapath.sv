// datapath: the co-processor data-path of the template. Registers
// (dp_regfile) feed, through per-operand multiplexers (operand_mux), one FU
// of each kind: adder/subtractor, shifter, multiplier, multiply-accumulate,
// logic, comparator, 2-to-1 multiplexer and memory access (fu_mem with its
// local data_mem). Each register's write multiplexer picks the FU result the
// controller selects. In one state every enabled FU reads registers, computes
// combinationally and its result is written at the clock edge, so the FUs
// of a state work in parallel as in a VLIW instruction. Loads return one
// state later and are written to the destination remembered by fu_mem.
//
// FU_MASK bit i keeps FU i (numbering of coproc_pkg::fu_id_e); an
// application that needs no multiplier, say, clears bit FU_MUL and the
// unit, its operand multiplexers and its write-back input are not built.
// 'cond' is the value of the register the controller names for its branch
// condition, reduced to one bit (non-zero is true). The host port reads and
// writes registers and memory; it is meant for use while the controller is
// idle.
//
// PIPELINED adds a register stage in the interconnect, between the operand
// multiplexers and the FUs, as the template allows: operands and the FU-side
// controls (opcodes, enables, register enables and write selects, load
// destination) of a state are captured at its closing edge and the FUs
// compute in the following state, so results are written one state later
// (usable two states after issue, loads three). The branch condition still
// reads the registers directly. The default is the non-pipelined data-path.
//
// FU_W gives each arithmetic FU (add/sub, multiply, multiply-accumulate,
// logic, compare, select) its own width, the outcome of bit-width analysis
// for one application. An FU of width w computes on the low w bits of its
// operands and its result is sign-extended to DATA_W (the comparator's 0/1
// is zero-extended); this is exact whenever every operand and result of
// that FU fits in w-bit two's complement. Registers, the shifter and the
// memory keep DATA_W. The default is DATA_W for every FU.
module datapath
  import coproc_pkg::*;
#(
  parameter logic [NFU-1:0] FU_MASK = '1,
  parameter bit             PIPELINED = 1'b0,
  parameter int unsigned    FU_W [NFU] = '{default: DATA_W}
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  dp_ctl_t               ctl,
  output logic                  cond,
  // host access
  input  logic                  host_reg_we,
  input  logic [REG_IDX_W-1:0]  host_reg_idx,
  input  logic [DATA_W-1:0]     host_reg_wdata,
  output logic [DATA_W-1:0]     host_reg_rdata,
  input  logic                  host_mem_we,
  input  logic [MEM_ADDR_W-1:0] host_mem_addr,
  input  logic [DATA_W-1:0]     host_mem_wdata,
  output logic [DATA_W-1:0]     host_mem_rdata
);
  logic [NREGS-1:0][DATA_W-1:0] q;
  logic [NFU-1:0][DATA_W-1:0]   opa, opb, opc, res;
  logic [NFU-1:0][DATA_W-1:0]   xa, xb, xc;     // operands as the FUs see them
  dp_ctl_t                      xctl;           // controls as the FUs see them

  // operand multiplexers: A and C from registers, B from a register or an immediate
  for (genvar f = 0; f < NFU; f++) begin : g_ops
    if (FU_MASK[f]) begin : g_on
      operand_mux #(.WIDTH(DATA_W), .NREGS(NREGS)) u_a (
        .regs(q), .sel(ctl.fu[f].a_sel), .use_imm(1'b0), .imm('0), .y(opa[f]));
      operand_mux #(.WIDTH(DATA_W), .NREGS(NREGS)) u_b (
        .regs(q), .sel(ctl.fu[f].b_sel), .use_imm(ctl.fu[f].b_imm), .imm(ctl.fu[f].imm), .y(opb[f]));
      operand_mux #(.WIDTH(DATA_W), .NREGS(NREGS)) u_c (
        .regs(q), .sel(ctl.fu[f].c_sel), .use_imm(1'b0), .imm('0), .y(opc[f]));
    end else begin : g_off
      assign opa[f] = '0;
      assign opb[f] = '0;
      assign opc[f] = '0;
    end
  end

  // optional interconnect register stage
  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xa   <= '0;
        xb   <= '0;
        xc   <= '0;
        xctl <= '0;
      end else begin
        xa   <= opa;
        xb   <= opb;
        xc   <= opc;
        xctl <= ctl;
      end
    end
  end else begin : g_direct
    assign xa   = opa;
    assign xb   = opb;
    assign xc   = opc;
    assign xctl = ctl;
  end

  // functional units
  // Arithmetic FUs, each FU_W[f] bits wide: the low bits of the operands go
  // in and the result is sign-extended to the register width.
  if (FU_MASK[FU_ADDSUB]) begin : g_addsub
    localparam int unsigned W = FU_W[FU_ADDSUB];
    logic [W-1:0] y;
    fu_addsub #(.WIDTH(W)) u_fu (.sub(xctl.fu[FU_ADDSUB].op[0]),
      .a(xa[FU_ADDSUB][W-1:0]), .b(xb[FU_ADDSUB][W-1:0]), .y);
    assign res[FU_ADDSUB] = DATA_W'(signed'(y));
  end else begin : g_no_addsub
    assign res[FU_ADDSUB] = '0;
  end
  // the shifter stays DATA_W wide: its result bits depend on all operand bits
  if (FU_MASK[FU_SHIFT]) begin : g_shift
    fu_shift #(.WIDTH(DATA_W)) u_fu (.op(xctl.fu[FU_SHIFT].op[1:0]),
      .a(xa[FU_SHIFT]), .sh(xb[FU_SHIFT][SH_W-1:0]), .y(res[FU_SHIFT]));
  end else begin : g_no_shift
    assign res[FU_SHIFT] = '0;
  end
  if (FU_MASK[FU_MUL]) begin : g_mul
    localparam int unsigned W = FU_W[FU_MUL];
    logic [W-1:0] y;
    fu_mul #(.WIDTH(W)) u_fu (.a(xa[FU_MUL][W-1:0]), .b(xb[FU_MUL][W-1:0]), .y);
    assign res[FU_MUL] = DATA_W'(signed'(y));
  end else begin : g_no_mul
    assign res[FU_MUL] = '0;
  end
  if (FU_MASK[FU_MAC]) begin : g_mac
    localparam int unsigned W = FU_W[FU_MAC];
    logic [W-1:0] y;
    fu_mac #(.WIDTH(W)) u_fu (.a(xa[FU_MAC][W-1:0]), .b(xb[FU_MAC][W-1:0]), .c(xc[FU_MAC][W-1:0]), .y);
    assign res[FU_MAC] = DATA_W'(signed'(y));
  end else begin : g_no_mac
    assign res[FU_MAC] = '0;
  end
  if (FU_MASK[FU_LOGIC]) begin : g_logic
    localparam int unsigned W = FU_W[FU_LOGIC];
    logic [W-1:0] y;
    fu_logic #(.WIDTH(W)) u_fu (.op(xctl.fu[FU_LOGIC].op[1:0]),
      .a(xa[FU_LOGIC][W-1:0]), .b(xb[FU_LOGIC][W-1:0]), .y);
    assign res[FU_LOGIC] = DATA_W'(signed'(y));
  end else begin : g_no_logic
    assign res[FU_LOGIC] = '0;
  end
  if (FU_MASK[FU_CMP]) begin : g_cmp
    localparam int unsigned W = FU_W[FU_CMP];
    logic [W-1:0] y;
    fu_cmp #(.WIDTH(W)) u_fu (.op(xctl.fu[FU_CMP].op),
      .a(xa[FU_CMP][W-1:0]), .b(xb[FU_CMP][W-1:0]), .y);
    assign res[FU_CMP] = DATA_W'(y);                    // 0 or 1
  end else begin : g_no_cmp
    assign res[FU_CMP] = '0;
  end
  if (FU_MASK[FU_MUX]) begin : g_mux
    localparam int unsigned W = FU_W[FU_MUX];
    logic [W-1:0] y;
    fu_mux #(.WIDTH(W)) u_fu (.a(xa[FU_MUX][W-1:0]), .b(xb[FU_MUX][W-1:0]), .c(xc[FU_MUX][W-1:0]), .y);
    assign res[FU_MUX] = DATA_W'(signed'(y));
  end else begin : g_no_mux
    assign res[FU_MUX] = '0;
  end

  for (genvar f = 0; f < NFU; f++) begin : g_w_check
    if (FU_W[f] < 2 || FU_W[f] > DATA_W) begin : g_bad
      $error("datapath: FU_W[%0d] = %0d is outside 2..%0d", f, FU_W[f], DATA_W);
    end
  end

  // memory access FU and local memory
  logic                  ld_valid;
  logic [REG_IDX_W-1:0]  ld_dst;
  if (FU_MASK[FU_MEM]) begin : g_mem
    logic                  mem_we;
    logic [MEM_ADDR_W-1:0] mem_addr;
    logic [DATA_W-1:0]     mem_wdata, mem_rdata;
    fu_mem #(.WIDTH(DATA_W), .ADDR_W(MEM_ADDR_W), .REG_IDX_W(REG_IDX_W)) u_fu (
      .clk, .rst_n, .en(xctl.fu_en[FU_MEM]), .store(xctl.fu[FU_MEM].op == OP_STORE),
      .a(xa[FU_MEM]), .b(xb[FU_MEM]), .c(xc[FU_MEM]), .dst(xctl.ld_dst),
      .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
      .ld_valid, .ld_dst, .ld_data(res[FU_MEM]));
    data_mem #(.DEPTH(MEM_DEPTH), .WIDTH(DATA_W)) u_mem (
      .clk, .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
      .b_we(host_mem_we), .b_addr(host_mem_addr), .b_wdata(host_mem_wdata), .b_rdata(host_mem_rdata));
  end else begin : g_no_mem
    assign ld_valid       = 1'b0;
    assign ld_dst         = '0;
    assign res[FU_MEM]    = '0;
    assign host_mem_rdata = '0;
  end

  // register write enables and write multiplexers; a returning load is merged in
  logic [NREGS-1:0]                we;
  logic [NREGS-1:0][FU_SEL_W-1:0]  wsel;
  always_comb begin
    for (int r = 0; r < NREGS; r++) begin
      if (ld_valid && ld_dst == REG_IDX_W'(r)) begin
        we[r]   = 1'b1;
        wsel[r] = FU_MEM;
      end else begin
        we[r]   = xctl.reg_we[r];
        wsel[r] = xctl.reg_wsel[r];
      end
    end
  end

  dp_regfile #(.WIDTH(DATA_W), .NREGS(NREGS), .NSRC(NFU)) u_regs (
    .clk, .rst_n, .we, .wsel, .src(res),
    .host_we(host_reg_we), .host_idx(host_reg_idx), .host_wdata(host_reg_wdata), .q);

  always_comb begin
    cond           = (q[ctl.cond_sel] != '0);
    host_reg_rdata = q[host_reg_idx];
  end

  // a returning load and an FU must not write the same register in one state
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(ld_valid && xctl.reg_we[ld_dst]))
    else $error("datapath: load and FU both write r%0d", ld_dst);
endmodule
