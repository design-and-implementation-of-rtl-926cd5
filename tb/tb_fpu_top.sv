// tb_fpu_top: end-to-end test of the whole design at its default
// parameters. For each operation it enters A and B through the switches in
// four 16-bit steps, selects add, subtract or multiply, reads the result
// back from the LEDs in two halves and compares with the reference model,
// flags included. It counts how often each mechanism is exercised (clear
// state, reset, each load step, each display half, switch echo, each
// operation, overflow, underflow, exception, carry and cancellation
// normalisation) and fails if any never occurred.
module tb_fpu_top;
  import fp_ref_pkg::*;

  logic        clk = 0, rst;
  logic [15:0] sw, led;
  logic        btn_a, btn_b, btn_out, btn_mode, sel;
  logic [1:0]  op;
  logic [31:0] result;
  logic        exception_flag, overflow_flag, underflow_flag;
  int checks = 0, failures = 0, cycles = 0;

  typedef enum int {M_CLEAR, M_RESET, M_LOAD_AL, M_LOAD_AU, M_LOAD_BL, M_LOAD_BU,
                    M_SHOW_LO, M_SHOW_HI, M_ECHO, M_ADD, M_SUB, M_MUL,
                    M_OVF, M_UNF, M_EXC, M_CARRY, M_CANCEL, M_NUM} mech_e;
  int count [M_NUM];

  fpu_top dut (.clk, .rst, .sw, .btn_a, .btn_b, .btn_out, .btn_mode, .sel, .op,
               .led, .result, .exception_flag, .overflow_flag, .underflow_flag);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ctl(input logic [4:0] c, input logic [15:0] s);
    {btn_a, btn_b, btn_out, btn_mode, sel} = c;
    sw = s;
    @(posedge clk); #1;
  endtask

  task automatic run(input logic [31:0] x, input logic [31:0] y, input logic [1:0] o);
    ref_res_t r;
    logic [15:0] lo, hi;
    int emax;
    ctl(5'b10000, x[15:0]);  count[M_LOAD_AL]++;
    ctl(5'b10010, x[31:16]); count[M_LOAD_AU]++;
    ctl(5'b01000, y[15:0]);  count[M_LOAD_BL]++;
    ctl(5'b01010, y[31:16]); count[M_LOAD_BU]++;
    op = o;
    ctl(5'b00100, 16'h0); lo = led; count[M_SHOW_LO]++;
    ctl(5'b00101, 16'h0); hi = led; count[M_SHOW_HI]++;
    r = o[1] ? ref_mul(x, y) : ref_add(x, y, o[0]);
    checks++;
    if ({hi, lo} !== r.bits || result !== r.bits ||
        {exception_flag, overflow_flag, underflow_flag} !== {r.exception, r.overflow, r.underflow}) begin
      failures++;
      $display("FAIL op=%0d %h, %h: led %h result %h flags %b expected %h %b", o, x, y,
               {hi, lo}, result, {exception_flag, overflow_flag, underflow_flag},
               r.bits, {r.exception, r.overflow, r.underflow});
    end
    count[o[1] ? M_MUL : (o[0] ? M_SUB : M_ADD)]++;
    if (r.overflow)  count[M_OVF]++;
    if (r.underflow) count[M_UNF]++;
    if (r.exception) count[M_EXC]++;
    emax = (x[30:23] > y[30:23]) ? int'(x[30:23]) : int'(y[30:23]);
    if (!o[1] && !r.exception && r.bits[30:0] != 0) begin
      if (int'(r.bits[30:23]) > emax) count[M_CARRY]++;
      if (int'(r.bits[30:23]) + 2 < emax) count[M_CANCEL]++;
    end
  endtask

  initial begin
    foreach (count[i]) count[i] = 0;
    rst = 1; op = 2'b00;
    ctl(5'b00000, 16'h0);
    rst = 0;
    count[M_RESET]++;

    // switch echo while nothing is selected for display
    ctl(5'b11000, 16'hA5C3);
    checks++;
    if (led !== 16'hA5C3) begin failures++; $display("FAIL echo %h", led); end
    count[M_ECHO]++;

    // operands in the style of the board demonstration: 2.5 and 1.5
    run(32'h4020_0000, 32'h3FC0_0000, 2'b10);   // 3.75
    run(32'h4020_0000, 32'h3FC0_0000, 2'b00);   // 4.0
    run(32'h4020_0000, 32'h3FC0_0000, 2'b01);   // 1.0
    run(32'h40E0_0000, 32'h4100_0000, 2'b10);   // 7 * 8 = 56
    run(32'h7F7F_FFFF, 32'h7F7F_FFFF, 2'b00);   // overflow
    run(32'h0080_0000, 32'h3F00_0000, 2'b10);   // underflow
    run(32'h7F80_0000, 32'h3F80_0000, 2'b10);   // exception
    run(32'h3F80_0000, 32'h3F7F_FFFF, 2'b01);   // cancellation

    // clear state: all controls low zeroes both operands, so 0 + 0 = +0
    ctl(5'b00000, 16'hFFFF);
    count[M_CLEAR]++;
    op = 2'b00;
    ctl(5'b00100, 16'h0);
    checks++;
    if (result !== 32'h0 || led !== 16'h0) begin failures++; $display("FAIL clear %h", result); end

    for (int i = 0; i < 1500; i++) begin
      logic [31:0] x;
      x = rand_fp($urandom);
      run(x, rand_fp(x), 2'($urandom_range(0, 2)));
    end

    foreach (count[i]) begin
      $display("mechanism %s: %0d", mech_e'(i), count[i]);
      if (count[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
