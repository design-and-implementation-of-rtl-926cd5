// tb_booth_radix4_mult: compares the 24x24 Booth product with the
// multiplication operator on corner and random operands.
module tb_booth_radix4_mult;
  logic [23:0] a, b;
  logic [47:0] p;
  int checks = 0, failures = 0;

  booth_radix4_mult dut (.a_i(a), .b_i(b), .p_o(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [23:0] x, input logic [23:0] y);
    logic [47:0] e;
    a = x; b = y;
    #1;
    e = 48'(x) * 48'(y);
    checks++;
    if (p !== e) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h", x, y, p, e);
    end
  endtask

  initial begin
    check(24'h0, 24'h0);
    check(24'hFFFFFF, 24'hFFFFFF);
    check(24'h800000, 24'h800000);
    check(24'hFFFFFF, 24'h800000);
    check(24'hAAAAAA, 24'h555555);
    check(24'h555555, 24'hAAAAAA);
    check(24'hC00000, 24'hE00000);
    check(24'h000001, 24'hFFFFFF);
    for (int i = 0; i < 3000; i++) check(24'($urandom), 24'($urandom));
    for (int i = 0; i < 500; i++) check({1'b1, 23'($urandom)}, {1'b1, 23'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
