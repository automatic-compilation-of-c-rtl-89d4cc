// bw_pkg: three-valued bit arithmetic for bit-width inference.
//
// Every bit of a data-path signal is known-0, known-1 or unknown until run
// time (U). Propagating these values from the registers through the FUs
// shows which bits are constant; a register bit that is constant needs no
// flip-flop and an FU bit that is constant needs no logic. The rules per
// result bit i, for operand bits m_i and n_i, are:
//   AND:  0 if either is 0; 1 if both are 1; else U
//   OR:   1 if either is 1; 0 if both are 0; else U
//   2-1 multiplexer: the common value if both inputs agree; else U
//   adder: m_i xor n_i when both are known and no carry can reach bit i,
//          i.e. no lower position x has m_x and n_x possibly both 1; else U
//   multiplier: 0 when one operand is 0 in bit i and in every bit below it;
//          else U (a product bit is never claimed to be 1)
//   left shift by n: the n low bits are 0, the rest are the operand's bits
// These functions are evaluated at elaboration time on vectors of up to
// TMAX bits (bit 0 is the LSB); callers use the low WIDTH entries.
package bw_pkg;
  typedef enum logic [1:0] { T0 = 2'd0, T1 = 2'd1, TU = 2'd2 } tbit_e;
  parameter int unsigned TMAX = 64;
  typedef tbit_e tvec_t [TMAX];

  function automatic tbit_e t_and(tbit_e m, tbit_e n);
    if (m == T0 || n == T0) return T0;
    if (m == T1 && n == T1) return T1;
    return TU;
  endfunction

  function automatic tbit_e t_or(tbit_e m, tbit_e n);
    if (m == T1 || n == T1) return T1;
    if (m == T0 && n == T0) return T0;
    return TU;
  endfunction

  function automatic tbit_e t_mux(tbit_e m, tbit_e n);
    return (m == n) ? m : TU;
  endfunction

  // all bits of v unknown, then the low bits set from an integer constant
  function automatic tvec_t t_const_low(int unsigned nlow, longint unsigned val);
    tvec_t v;
    for (int i = 0; i < TMAX; i++) v[i] = TU;
    for (int i = 0; i < int'(nlow); i++) v[i] = val[i] ? T1 : T0;
    return v;
  endfunction

  function automatic tvec_t tv_mux(tvec_t m, tvec_t n);
    tvec_t r;
    for (int i = 0; i < TMAX; i++) r[i] = t_mux(m[i], n[i]);
    return r;
  endfunction

  function automatic tvec_t tv_add(tvec_t m, tvec_t n);
    tvec_t r;
    logic  carry_free;
    carry_free = 1'b1;
    for (int i = 0; i < TMAX; i++) begin
      if (carry_free && m[i] != TU && n[i] != TU)
        r[i] = (m[i] == n[i]) ? T0 : T1;
      else
        r[i] = TU;
      if (t_and(m[i], n[i]) != T0) carry_free = 1'b0;
    end
    return r;
  endfunction

  function automatic tvec_t tv_mul(tvec_t m, tvec_t n);
    tvec_t r;
    logic  m_zero, n_zero;   // operand is 0 in this bit and all below
    m_zero = 1'b1; n_zero = 1'b1;
    for (int i = 0; i < TMAX; i++) begin
      m_zero = m_zero && (m[i] == T0);
      n_zero = n_zero && (n[i] == T0);
      r[i] = (m_zero || n_zero) ? T0 : TU;
    end
    return r;
  endfunction

  function automatic tvec_t tv_shl(tvec_t m, int unsigned sh);
    tvec_t r;
    for (int i = 0; i < TMAX; i++) r[i] = (i < int'(sh)) ? T0 : m[i - int'(sh)];
    return r;
  endfunction

  // number of unknown bits among the low w: the flip-flops a register needs
  function automatic int unsigned tv_unknown(tvec_t v, int unsigned w);
    int unsigned k;
    k = 0;
    for (int i = 0; i < int'(w); i++) if (v[i] == TU) k++;
    return k;
  endfunction
endpackage
