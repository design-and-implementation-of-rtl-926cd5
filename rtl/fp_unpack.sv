// fp_unpack: operand decomposition.
//
// Splits a 32-bit IEEE-754 single precision word into sign, biased exponent
// and 24-bit significand. For a normal number the implicit leading '1' is put
// back in front of the 23 stored bits; for a zero or subnormal number the
// leading bit is '0' and the effective exponent is 1, so that later stages can
// align every finite operand the same way. Inf and NaN are flagged.
// Purely combinational. Restoring the hidden one follows the document;
// the subnormal handling and the class outputs are this design's own.
module fp_unpack
  import fp_pkg::*;
(
  input  fp32_t             op_i,
  output logic              sign_o,
  output logic [EXP_W-1:0]  exp_o,     // effective biased exponent (1 for 0/subnormal)
  output logic [SIG_W-1:0]  sig_o,     // {hidden bit, mantissa}
  output logic              zero_o,
  output logic              inf_o,
  output logic              nan_o
);

  logic exp_zero, exp_ones, man_zero;

  always_comb begin
    exp_zero = (op_i.exp == '0);
    exp_ones = (op_i.exp == EXP_MAX);
    man_zero = (op_i.man == '0);

    sign_o = op_i.sign;
    exp_o  = exp_zero ? EXP_W'(1) : op_i.exp;
    sig_o  = {~exp_zero, op_i.man};
    zero_o = exp_zero & man_zero;
    inf_o  = exp_ones & man_zero;
    nan_o  = exp_ones & ~man_zero;
  end

endmodule
