// bw_example_dp: a small data-path whose registers are trimmed by bit-width
// inference. Reg1 and Reg2 hold WIDTH-bit values whose two low bits are the
// constants R1_LOW and R2_LOW. M1 chooses Reg1 or Reg2; the multiplier forms
// M1 * Reg1; a shifter forms Reg2 << 2; M2 chooses the product or the shifted
// value and Reg3 stores it. All arithmetic is modulo 2**WIDTH.
//
// At elaboration, the three-valued rules of bw_pkg are applied from the
// source registers to Reg3. Every bit found constant is wired to its
// constant instead of being stored: with the default constants (both LSBs
// 0) the LSB of M1 is 0, so the product's LSB is 0, the shifter's two LSBs
// are 0, and Reg3's LSB is the constant 0, leaving WIDTH-1 flip-flops in
// Reg3 and WIDTH-2 in each source register. The function seen at the ports
// is unchanged by the trimming.
//
// Interface: r1_we/r2_we load Reg1/Reg2 from r1_d/r2_d (their two low bits
// are ignored: they are the constants); r3_we loads Reg3 with the M2 output
// in the same cycle's data. All registers reset to their constant bits and
// zero elsewhere. The connections from M1 to the multiplier and from Reg2
// to the shifter, the width and the constants are this design's choices.
module bw_example_dp
  import bw_pkg::*;
#(
  parameter int unsigned WIDTH  = 8,
  parameter logic [1:0]  R1_LOW = 2'b10,
  parameter logic [1:0]  R2_LOW = 2'b00
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             r1_we,
  input  logic [WIDTH-1:0] r1_d,
  input  logic             r2_we,
  input  logic [WIDTH-1:0] r2_d,
  input  logic             m1_sel,   // 1: Reg2, 0: Reg1
  input  logic             m2_sel,   // 1: shifter, 0: multiplier
  input  logic             r3_we,
  output logic [WIDTH-1:0] r1_q,
  output logic [WIDTH-1:0] r2_q,
  output logic [WIDTH-1:0] r3_q
);
  // ---- elaboration-time bit-width inference --------------------------------
  localparam tvec_t T_R1  = t_const_low(2, 64'(R1_LOW));
  localparam tvec_t T_R2  = t_const_low(2, 64'(R2_LOW));
  localparam tvec_t T_M1  = tv_mux(T_R1, T_R2);
  localparam tvec_t T_MUL = tv_mul(T_M1, T_R1);
  localparam tvec_t T_SHL = tv_shl(T_R2, 2);
  localparam tvec_t T_R3  = tv_mux(T_MUL, T_SHL);

  // flip-flops kept per register
  localparam int unsigned R1_FLOPS = tv_unknown(T_R1, WIDTH);
  localparam int unsigned R2_FLOPS = tv_unknown(T_R2, WIDTH);
  localparam int unsigned R3_FLOPS = tv_unknown(T_R3, WIDTH);

  // ---- datapath ----------------------------------------------------------------
  logic [WIDTH-1:0] m1, mul, shl, m2;
  always_comb begin
    m1  = m1_sel ? r2_q : r1_q;
    mul = m1 * r1_q;
    shl = r2_q << 2;
    m2  = m2_sel ? shl : mul;
  end

  // one generate per register bit: a flip-flop if the bit is unknown,
  // otherwise the inferred constant
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (T_R1[i] == TU) begin : g_r1_ff
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n)     r1_q[i] <= 1'b0;
        else if (r1_we) r1_q[i] <= r1_d[i];
    end else begin : g_r1_c
      assign r1_q[i] = (T_R1[i] == T1);
    end
    if (T_R2[i] == TU) begin : g_r2_ff
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n)     r2_q[i] <= 1'b0;
        else if (r2_we) r2_q[i] <= r2_d[i];
    end else begin : g_r2_c
      assign r2_q[i] = (T_R2[i] == T1);
    end
    if (T_R3[i] == TU) begin : g_r3_ff
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n)     r3_q[i] <= 1'b0;
        else if (r3_we) r3_q[i] <= m2[i];
    end else begin : g_r3_c
      assign r3_q[i] = (T_R3[i] == T1);
    end
  end

  // the inference must be sound: a bit declared constant always has that value
  for (genvar i = 0; i < WIDTH; i++) begin : g_chk
    if (T_R3[i] != TU) begin : g_c
      assert property (@(posedge clk) disable iff (!rst_n) m2[i] == (T_R3[i] == T1))
        else $error("bw_example_dp: M2 bit %0d is not the inferred constant", i);
    end
  end
endmodule
