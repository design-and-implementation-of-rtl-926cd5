// tb_booth_encoder: checks all eight 3-bit groups. The expected digit is the
// radix-4 Booth value -2*y[2i+1] + y[2i] + y[2i-1].
module tb_booth_encoder;
  logic [2:0] grp;
  logic       zero, two, neg;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp_i(grp), .zero_o(zero), .two_o(two), .neg_o(neg));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int expd, got;
      grp  = 3'(g);
      #1;
      expd = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      got  = zero ? 0 : (two ? 2 : 1);
      if (neg) got = -got;
      checks++;
      if (got != expd || (zero && (two || neg))) begin
        failures++;
        $display("FAIL group %b: digit %0d expected %0d", grp, got, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
