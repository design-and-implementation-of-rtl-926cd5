// fp_mul: single precision floating-point multiplier.
//
// result = a * b, IEEE-754 binary32.
//   sign      : sign(a) XOR sign(b)
//   exponent  : exp(a) + exp(b) - 127 (bias corrected)
//   mantissa  : 24 x 24 significand product from the radix-4 Booth
//               multiplier (booth_radix4_mult), 48 bits with two integer bits
// The three parts are combined and normalised and rounded to a 32-bit word by
// fp_round_pack (one-bit right shift when the product is >= 2, left shift for
// subnormal operands, round to nearest even).
// Flags: exception when an operand is Inf or NaN, overflow when a product of
// finite operands rounds to Inf, underflow when a non-zero product ends
// subnormal or zero. NaN operands and Inf * 0 give a quiet NaN, other Inf
// operands an Inf of the product's sign. Purely combinational.
// The sign, exponent and Booth mantissa paths and the three flag outputs
// follow the document; subnormal handling and rounding mode are this
// design's own.
module fp_mul
  import fp_pkg::*;
(
  input  fp32_t     a_i,
  input  fp32_t     b_i,
  output fp32_t     res_o,
  output fp_flags_t flags_o
);

  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [SIG_W-1:0] ma, mb;
  logic             za, zb, ia, ib, na, nb;

  fp_unpack u_ua (.op_i(a_i), .sign_o(sa), .exp_o(ea), .sig_o(ma), .zero_o(za), .inf_o(ia), .nan_o(na));
  fp_unpack u_ub (.op_i(b_i), .sign_o(sb), .exp_o(eb), .sig_o(mb), .zero_o(zb), .inf_o(ib), .nan_o(nb));

  logic                   sign;
  logic signed [11:0]     exp_sum;
  logic [2*SIG_W-1:0]     product;

  assign sign    = sa ^ sb;
  assign exp_sum = $signed({4'b0, ea}) + $signed({4'b0, eb}) - 12'(BIAS);

  booth_radix4_mult #(.WIDTH(SIG_W)) u_booth (
    .a_i (ma),
    .b_i (mb),
    .p_o (product)
  );

  fp32_t rp_res;
  logic  rp_ovf, rp_unf;

  fp_round_pack #(.W(2*SIG_W), .EW(12)) u_rp (
    .sign_i      (sign),
    .exp_i       (exp_sum),
    .sig_i       (product),
    .res_o       (rp_res),
    .overflow_o  (rp_ovf),
    .underflow_o (rp_unf)
  );

  always_comb begin
    flags_o.exception = ia | ib | na | nb;
    flags_o.overflow  = 1'b0;
    flags_o.underflow = 1'b0;
    if (na | nb | (ia & zb) | (ib & za)) begin
      res_o = QNAN;
    end else if (ia | ib) begin
      res_o = '{sign: sign, exp: EXP_MAX, man: '0};
    end else begin
      res_o             = rp_res;
      flags_o.overflow  = rp_ovf;
      flags_o.underflow = rp_unf;
    end
  end

endmodule
