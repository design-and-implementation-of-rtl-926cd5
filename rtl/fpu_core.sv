// fpu_core: single precision arithmetic unit (add, subtract, multiply).
//
// Both datapaths work in parallel on the same two IEEE-754 binary32 operands:
// fp_addsub for addition and subtraction, fp_mul (radix-4 Booth significand
// multiplier) for multiplication. op_i selects which result and flags reach
// the output: 00 add, 01 subtract, 10 multiply (11 is treated as multiply).
// Purely combinational: the result is valid in the same cycle as the
// operands. The set of operations follows the document; the operation
// encoding and the parallel-datapath structure are this design's own.
module fpu_core
  import fp_pkg::*;
(
  input  fp32_t       a_i,
  input  fp32_t       b_i,
  input  logic [1:0]  op_i,
  output fp32_t       res_o,
  output fp_flags_t   flags_o
);

  fp32_t     as_res, mul_res;
  fp_flags_t as_flags, mul_flags;

  fp_addsub u_addsub (
    .a_i     (a_i),
    .b_i     (b_i),
    .sub_i   (op_i == OP_SUB),
    .res_o   (as_res),
    .flags_o (as_flags)
  );

  fp_mul u_mul (
    .a_i     (a_i),
    .b_i     (b_i),
    .res_o   (mul_res),
    .flags_o (mul_flags)
  );

  always_comb begin
    if (op_i[1]) begin
      res_o   = mul_res;
      flags_o = mul_flags;
    end else begin
      res_o   = as_res;
      flags_o = as_flags;
    end
  end

endmodule
