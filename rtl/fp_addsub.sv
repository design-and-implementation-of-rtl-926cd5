// fp_addsub: single precision floating-point adder / subtractor.
//
// result = a + b (sub_i = 0) or a - b (sub_i = 1), IEEE-754 binary32.
//   1. Both operands are decomposed (fp_unpack); for subtraction the sign
//      of b is inverted.
//   2. The operand of larger magnitude is found by comparing exponent and
//      significand together, so the difference below is never negative.
//   3. The smaller significand is right-shifted by the exponent difference.
//      Three extra low bits (guard, round, sticky) keep what is shifted out;
//      all bits beyond them are ORed into the sticky bit.
//   4. The aligned significands are added when the signs agree, else
//      subtracted; the result takes the sign of the larger operand.
//   5. fp_round_pack normalises (right shift after a carry, left shift after
//      cancellation), rounds to nearest even and packs.
// Special operands: a NaN gives a quiet NaN, Inf - Inf gives a quiet NaN,
// otherwise an Inf operand gives that Inf; exception is raised for any Inf or
// NaN operand. An exact zero sum is +0 unless both addends are negative.
// Purely combinational. Steps 2-5 follow the document (exponent comparison,
// alignment, add/subtract by operation and signs, normalisation); the
// guard/round/sticky bits and the special-case rules are this design's own.
module fp_addsub
  import fp_pkg::*;
(
  input  fp32_t     a_i,
  input  fp32_t     b_i,
  input  logic      sub_i,
  output fp32_t     res_o,
  output fp_flags_t flags_o
);

  localparam int unsigned XW = SIG_W + 3;   // significand + guard, round, sticky
  localparam int unsigned SW = XW + 1;      // plus carry

  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [SIG_W-1:0] ma, mb;
  logic             ia, ib, na, nb;

  fp_unpack u_ua (.op_i(a_i), .sign_o(sa), .exp_o(ea), .sig_o(ma), .zero_o(), .inf_o(ia), .nan_o(na));
  fp_unpack u_ub (.op_i(b_i), .sign_o(sb), .exp_o(eb), .sig_o(mb), .zero_o(), .inf_o(ib), .nan_o(nb));

  logic             sb_eff, a_big, s_big, s_small, eff_sub;
  logic [EXP_W-1:0] e_big, e_small, d;
  logic [SIG_W-1:0] m_big, m_small;
  logic [XW-1:0]    x_big, x_small, x_shift;
  logic [SW-1:0]    sum;
  logic             sum_sign;

  fp32_t rp_res;
  logic  rp_ovf, rp_unf;

  always_comb begin
    sb_eff = sb ^ sub_i;
    a_big  = {ea, ma} >= {eb, mb};

    s_big   = a_big ? sa     : sb_eff;
    s_small = a_big ? sb_eff : sa;
    e_big   = a_big ? ea : eb;
    e_small = a_big ? eb : ea;
    m_big   = a_big ? ma : mb;
    m_small = a_big ? mb : ma;
    d       = e_big - e_small;

    x_big   = {m_big, 3'b000};
    x_shift = {m_small, 3'b000};
    if (d >= EXP_W'(XW)) begin
      x_small = {{(XW-1){1'b0}}, |m_small};
    end else begin
      x_small    = x_shift >> d;
      x_small[0] = x_small[0] | (|(x_shift & ~({XW{1'b1}} << d)));
    end

    eff_sub = s_big ^ s_small;
    sum     = eff_sub ? (SW'(x_big) - SW'(x_small)) : (SW'(x_big) + SW'(x_small));

    // exact zero: -0 only when both addends are negative
    sum_sign = (sum == '0) ? (sa & sb_eff) : s_big;
  end

  fp_round_pack #(.W(SW), .EW(12)) u_rp (
    .sign_i      (sum_sign),
    .exp_i       (12'(e_big)),
    .sig_i       (sum),
    .res_o       (rp_res),
    .overflow_o  (rp_ovf),
    .underflow_o (rp_unf)
  );

  always_comb begin
    flags_o.exception = ia | ib | na | nb;
    flags_o.overflow  = 1'b0;
    flags_o.underflow = 1'b0;
    if (na | nb | (ia & ib & (sa ^ sb_eff))) begin
      res_o = QNAN;
    end else if (ia) begin
      res_o = '{sign: sa, exp: EXP_MAX, man: '0};
    end else if (ib) begin
      res_o = '{sign: sb_eff, exp: EXP_MAX, man: '0};
    end else begin
      res_o             = rp_res;
      flags_o.overflow  = rp_ovf;
      flags_o.underflow = rp_unf;
    end
  end

endmodule
