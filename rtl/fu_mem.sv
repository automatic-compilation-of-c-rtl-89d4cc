// fu_mem: memory-access functional unit. When enabled it forms the word
// address a + b (b may be an immediate, giving base+offset addressing) and
// either stores c there (store = 1) or issues a load (store = 0). The memory
// is synchronous, so a load completes one state later: the FU then raises
// ld_valid for one cycle with the word and the destination register it
// remembered, and the data-path writes it. A schedule therefore places the
// first use of loaded data two states after the load. The RAM itself is
// data_mem, outside this unit; addresses wrap modulo the memory depth.
module fu_mem #(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned ADDR_W    = 8,
  parameter int unsigned REG_IDX_W = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 store,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  input  logic [WIDTH-1:0]     c,
  input  logic [REG_IDX_W-1:0] dst,
  // to data_mem port A
  output logic                 mem_we,
  output logic [ADDR_W-1:0]    mem_addr,
  output logic [WIDTH-1:0]     mem_wdata,
  input  logic [WIDTH-1:0]     mem_rdata,
  // load return to the register bank
  output logic                 ld_valid,
  output logic [REG_IDX_W-1:0] ld_dst,
  output logic [WIDTH-1:0]     ld_data
);
  logic [WIDTH-1:0] addr_full;
  always_comb begin
    addr_full = a + b;
    mem_addr  = addr_full[ADDR_W-1:0];
    mem_we    = en && store;
    mem_wdata = c;
    ld_data   = mem_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_valid <= 1'b0;
      ld_dst   <= '0;
    end else begin
      ld_valid <= en && !store;
      if (en && !store) ld_dst <= dst;
    end
  end
endmodule
