// tb_fp_mul: compares the multiplier with the reference model on directed
// cases and random operands (normal, subnormal, huge, tiny, Inf, NaN).
// Counts products needing the one-bit right normalisation, overflows,
// underflows and exceptions, and fails if one never occurs.
module tb_fp_mul;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] a, b;
  fp32_t       res;
  fp_flags_t   flags;
  int checks = 0, failures = 0;
  int n_norm = 0, n_ovf = 0, n_unf = 0, n_exc = 0;

  fp_mul dut (.a_i(a), .b_i(b), .res_o(res), .flags_o(flags));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    ref_res_t r;
    a = x; b = y;
    #1;
    r = ref_mul(x, y);
    checks++;
    if (res !== r.bits || flags !== {r.exception, r.overflow, r.underflow}) begin
      failures++;
      $display("FAIL %h * %h = %h (%b) expected %h (%b)", x, y,
               res, flags, r.bits, {r.exception, r.overflow, r.underflow});
    end
    if (x[30:23] != 0 && y[30:23] != 0 && (49'({1'b1, x[22:0]}) * 49'({1'b1, y[22:0]})) >= 49'(1) << 47)
      n_norm++;
    if (r.overflow) n_ovf++;
    if (r.underflow) n_unf++;
    if (r.exception) n_exc++;
  endtask

  initial begin
    check(32'h4020_0000, 32'h3FC0_0000);   // 2.5 * 1.5 = 3.75
    check(32'h40E0_0000, 32'h4100_0000);   // 7 * 8 = 56
    check(32'hC000_0000, 32'h4040_0000);   // -2 * 3 = -6
    check(32'h3F80_0000, 32'h0000_0000);   // 1 * 0
    check(32'h7F80_0000, 32'h0000_0000);   // Inf * 0 = NaN
    check(32'h7F80_0000, 32'hBF80_0000);   // Inf * -1 = -Inf
    check(32'h7F00_0000, 32'h7F00_0000);   // overflow
    check(32'h0080_0000, 32'h3F00_0000);   // min normal / 2 -> subnormal
    check(32'h0000_0001, 32'h0000_0001);   // underflow to zero
    check(32'h0040_0000, 32'h4B00_0000);   // subnormal operand
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, y;
      x = rand_fp($urandom);
      y = rand_fp({1'b0, 8'(9'd254 - 9'(x[30:23])), 23'h0});
      check(x, y);
    end
    if (n_norm == 0 || n_ovf == 0 || n_unf == 0 || n_exc == 0) begin
      failures++;
      $display("FAIL coverage norm=%0d ovf=%0d unf=%0d exc=%0d", n_norm, n_ovf, n_unf, n_exc);
    end
    $display("coverage norm=%0d ovf=%0d unf=%0d exc=%0d", n_norm, n_ovf, n_unf, n_exc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
