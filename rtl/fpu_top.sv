// fpu_top: single precision floating-point arithmetic unit on a small board.
//
// The board interface (basys3_io) collects operands A and B from 16 switches
// in four 16-bit steps and holds them in registers; the arithmetic unit
// (fpu_core) computes A+B, A-B or A*B from them combinationally, and the
// 32-bit result is shown on the 16 LEDs in two halves. The three status
// flags drive their own outputs, and the full result word is also brought
// out for observation. op selects the operation (00 add, 01 subtract,
// 10 multiply); the document does not say how the operation is chosen on the
// board, so it is a separate input here. Timing: an operand half is written
// on the clock edge after its control combination is applied; the result and
// the LEDs follow combinationally in the same cycle.
module fpu_top
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] sw,
  input  logic        btn_a,
  input  logic        btn_b,
  input  logic        btn_out,
  input  logic        btn_mode,
  input  logic        sel,
  input  logic [1:0]  op,
  output logic [15:0] led,
  output logic [31:0] result,
  output logic        exception_flag,
  output logic        overflow_flag,
  output logic        underflow_flag
);

  fp32_t     operand_a, operand_b, res;
  fp_flags_t flags;

  basys3_io u_io (
    .clk         (clk),
    .rst         (rst),
    .sw          (sw),
    .btn_a       (btn_a),
    .btn_b       (btn_b),
    .btn_out     (btn_out),
    .btn_mode    (btn_mode),
    .sel         (sel),
    .result_i    (res),
    .operand_a_o (operand_a),
    .operand_b_o (operand_b),
    .led         (led)
  );

  fpu_core u_fpu (
    .a_i     (operand_a),
    .b_i     (operand_b),
    .op_i    (op),
    .res_o   (res),
    .flags_o (flags)
  );

  assign result         = res;
  assign exception_flag = flags.exception;
  assign overflow_flag  = flags.overflow;
  assign underflow_flag = flags.underflow;

endmodule
