// tb_fpu_core: checks that each operation code selects the right datapath
// and that results and flags match the reference model for add, subtract
// and multiply on the same random operands.
module tb_fpu_core;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] a, b;
  logic [1:0]  op;
  fp32_t       res;
  fp_flags_t   flags;
  int checks = 0, failures = 0;
  int n_op [4] = '{0, 0, 0, 0};

  fpu_core dut (.a_i(a), .b_i(b), .op_i(op), .res_o(res), .flags_o(flags));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic [1:0] o);
    ref_res_t r;
    a = x; b = y; op = o;
    #1;
    r = o[1] ? ref_mul(x, y) : ref_add(x, y, o[0]);
    checks++;
    n_op[o]++;
    if (res !== r.bits || flags !== {r.exception, r.overflow, r.underflow}) begin
      failures++;
      $display("FAIL op=%0d %h, %h = %h (%b) expected %h (%b)", o, x, y,
               res, flags, r.bits, {r.exception, r.overflow, r.underflow});
    end
  endtask

  initial begin
    check(32'h4020_0000, 32'h3FC0_0000, 2'b00);   // 4.0
    check(32'h4020_0000, 32'h3FC0_0000, 2'b01);   // 1.0
    check(32'h4020_0000, 32'h3FC0_0000, 2'b10);   // 3.75
    check(32'h4020_0000, 32'h3FC0_0000, 2'b11);   // 3.75
    for (int i = 0; i < 6000; i++) begin
      logic [31:0] x, y;
      x = rand_fp($urandom);
      y = rand_fp(x);
      for (int o = 0; o < 3; o++) check(x, y, 2'(o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
