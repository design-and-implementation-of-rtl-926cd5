// tb_fp_unpack: checks operand decomposition on directed and random words.
// Expected fields are computed here from the IEEE-754 bit layout
// (bit 31 sign, bits 30:23 exponent, bits 22:0 fraction).
module tb_fp_unpack;
  import fp_pkg::*;

  fp32_t       op;
  logic        sign, zero, inf, nan;
  logic [7:0]  exp;
  logic [23:0] sig;
  int checks = 0, failures = 0;

  fp_unpack dut (.op_i(op), .sign_o(sign), .exp_o(exp), .sig_o(sig),
                 .zero_o(zero), .inf_o(inf), .nan_o(nan));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] w);
    logic [7:0]  e_exp;
    logic [23:0] e_sig;
    op = w;
    #1;
    e_exp = (w[30:23] == 0) ? 8'd1 : w[30:23];
    e_sig = {(w[30:23] != 0), w[22:0]};
    checks++;
    if (sign !== w[31] || exp !== e_exp || sig !== e_sig ||
        zero !== (w[30:0] == 0) ||
        inf  !== (w[30:23] == 8'hFF && w[22:0] == 0) ||
        nan  !== (w[30:23] == 8'hFF && w[22:0] != 0)) begin
      failures++;
      $display("FAIL %h: sign=%b exp=%h sig=%h z=%b i=%b n=%b", w, sign, exp, sig, zero, inf, nan);
    end
  endtask

  initial begin
    check(32'h3F80_0000);  // 1.0
    check(32'hC020_0000);  // -2.5
    check(32'h0000_0000);
    check(32'h8000_0000);
    check(32'h0000_0001);  // smallest subnormal
    check(32'h007F_FFFF);
    check(32'h7F80_0000);  // +Inf
    check(32'hFFC0_0000);  // NaN
    check(32'h7F7F_FFFF);
    for (int i = 0; i < 2000; i++) check(fp_ref_pkg::rand_fp($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
