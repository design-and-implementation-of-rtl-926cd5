// tb_fp_addsub: compares the adder/subtractor with the reference model on
// directed cases and on random operands biased towards close exponents,
// cancellation, subnormals, huge values and Inf/NaN. It counts how often
// the carry (right normalisation), deep cancellation (left normalisation),
// overflow, underflow and exception cases occur and fails if one never does.
module tb_fp_addsub;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] a, b;
  logic        sub;
  fp32_t       res;
  fp_flags_t   flags;
  int checks = 0, failures = 0;
  int n_carry = 0, n_cancel = 0, n_ovf = 0, n_unf = 0, n_exc = 0;

  fp_addsub dut (.a_i(a), .b_i(b), .sub_i(sub), .res_o(res), .flags_o(flags));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic op_sub);
    ref_res_t r;
    int emax;
    a = x; b = y; sub = op_sub;
    #1;
    r = ref_add(x, y, op_sub);
    checks++;
    if (res !== r.bits || flags !== {r.exception, r.overflow, r.underflow}) begin
      failures++;
      $display("FAIL %h %s %h = %h (%b) expected %h (%b)", x, op_sub ? "-" : "+", y,
               res, flags, r.bits, {r.exception, r.overflow, r.underflow});
    end
    emax = (x[30:23] > y[30:23]) ? int'(x[30:23]) : int'(y[30:23]);
    if (!r.exception && !is_zero(r.bits)) begin
      if (int'(r.bits[30:23]) > emax) n_carry++;
      if (int'(r.bits[30:23]) + 2 < emax) n_cancel++;
    end
    if (r.overflow) n_ovf++;
    if (r.underflow) n_unf++;
    if (r.exception) n_exc++;
  endtask

  initial begin
    check(32'h3F80_0000, 32'h3F80_0000, 0);   // 1 + 1 = 2
    check(32'h4020_0000, 32'h3FC0_0000, 0);   // 2.5 + 1.5 = 4
    check(32'h4020_0000, 32'h3FC0_0000, 1);   // 2.5 - 1.5 = 1
    check(32'h3F80_0000, 32'h3F80_0000, 1);   // x - x = +0
    check(32'h8000_0000, 32'h0000_0000, 1);   // -0 - +0 = -0
    check(32'h3F80_0000, 32'h3380_0000, 0);   // 1 + 2^-24: tie to even
    check(32'h3F80_0001, 32'h3380_0000, 0);   // tie, odd -> up
    check(32'h3F80_0000, 32'h3F7F_FFFF, 1);   // deep cancellation
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0);   // overflow
    check(32'h0080_0000, 32'h0000_0001, 1);   // underflow
    check(32'h7F80_0000, 32'h7F80_0000, 1);   // Inf - Inf
    check(32'h7F80_0000, 32'h3F80_0000, 0);   // Inf + 1
    check(32'h4B80_0000, 32'hBF80_0000, 0);   // 2^24 - 1
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x;
      x = rand_fp($urandom);
      check(x, rand_fp(x), 1'($urandom));
    end
    if (n_carry == 0 || n_cancel == 0 || n_ovf == 0 || n_unf == 0 || n_exc == 0) begin
      failures++;
      $display("FAIL coverage carry=%0d cancel=%0d ovf=%0d unf=%0d exc=%0d",
               n_carry, n_cancel, n_ovf, n_unf, n_exc);
    end
    $display("coverage carry=%0d cancel=%0d ovf=%0d unf=%0d exc=%0d",
             n_carry, n_cancel, n_ovf, n_unf, n_exc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
