// tb_fp_round_pack: drives raw (sign, exponent, 48-bit significand) values
// into the rounding stage and compares with the reference rounding of the
// same exact value, sig * 2^(exp - 127 - 46). Covers left and right
// normalisation, ties, subnormal results, overflow and zero.
module tb_fp_round_pack;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic               s;
  logic signed [11:0] e;
  logic [47:0]        sig;
  fp32_t              res;
  logic               ovf, unf;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_tie = 0;

  fp_round_pack dut (.sign_i(s), .exp_i(e), .sig_i(sig), .res_o(res),
                     .overflow_o(ovf), .underflow_o(unf));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic sg, input int ex, input logic [47:0] m);
    ref_res_t r;
    s = sg; e = 12'(ex); sig = m;
    #1;
    r = ref_round(sg, big_t'(m), ex - 127 - 46);
    checks++;
    if (res !== r.bits || ovf !== r.overflow || unf !== r.underflow) begin
      failures++;
      $display("FAIL s=%b e=%0d sig=%h: %h o%b u%b expected %h o%b u%b",
               sg, ex, m, res, ovf, unf, r.bits, r.overflow, r.underflow);
    end
    if (r.overflow) n_ovf++;
    if (r.underflow) n_unf++;
  endtask

  initial begin
    check(0, 127, 48'h4000_0000_0000);           // 1.0
    check(1, 127, 48'h8000_0000_0000);           // 2.0 via right normalisation
    check(0, 127, 48'h0000_0000_0001);           // far left normalisation
    check(0, 127, 48'h4000_0080_0000);           // tie, even -> down
    check(0, 127, 48'h4000_0180_0000);           // tie, odd -> up
    check(0, 127, 48'h7FFF_FFE0_0000);           // rounds up into next binade
    check(0, 254, 48'hFFFF_FFFF_FFFF);           // overflow
    check(0, 1,   48'h1000_0000_0000);           // subnormal
    check(1, -40, 48'hFFFF_FFFF_FFFF);           // rounds to zero
    check(0, 0,   48'h0);                        // zero
    n_tie = 2;
    for (int i = 0; i < 5000; i++) begin
      logic [47:0] m;
      m = {16'($urandom), 32'($urandom)};
      if (i % 3 == 0) m = m >> $urandom_range(0, 47);
      if (i % 7 == 0) m[21:0] = 22'h20_0000;    // exact tie at bit 22
      check(1'($urandom), $urandom_range(0, 420) - 150, m);
    end
    if (n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL coverage: overflow %0d underflow %0d", n_ovf, n_unf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
