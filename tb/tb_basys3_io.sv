// tb_basys3_io: walks the control table of the board interface. A model of
// the four operand half registers is kept here and compared with the
// operand outputs after every clock; the LED output is checked against the
// result halves in display mode and against the switches otherwise.
module tb_basys3_io;
  import fp_pkg::*;

  logic        clk = 0, rst;
  logic [15:0] sw, led;
  logic        btn_a, btn_b, btn_out, btn_mode, sel;
  fp32_t       result, opa, opb;
  logic [15:0] m_al, m_au, m_bl, m_bu;
  int checks = 0, failures = 0, cycles = 0;

  basys3_io dut (.clk, .rst, .sw, .btn_a, .btn_b, .btn_out, .btn_mode, .sel,
                 .result_i(result), .operand_a_o(opa), .operand_b_o(opb), .led);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [4:0] ctl, input logic [15:0] s, input logic r = 1'b0);
    logic [15:0] e_led;
    {btn_a, btn_b, btn_out, btn_mode, sel} = ctl;
    sw = s; rst = r;
    result = $urandom;
    #1;
    e_led = (ctl[4:2] == 3'b001) ? (ctl[0] ? result[31:16] : result[15:0]) : s;
    checks++;
    if (led !== e_led) begin
      failures++;
      $display("FAIL led ctl=%b: %h expected %h", ctl, led, e_led);
    end
    // model update at the clock edge
    if (r || ctl == 5'b00000) begin
      m_al = 0; m_au = 0; m_bl = 0; m_bu = 0;
    end else if (ctl[4:2] == 3'b100) begin
      if (ctl[1]) m_au = s; else m_al = s;
    end else if (ctl[4:2] == 3'b010) begin
      if (ctl[1]) m_bu = s; else m_bl = s;
    end
    @(posedge clk); #1;
    checks++;
    if (opa !== {m_au, m_al} || opb !== {m_bu, m_bl}) begin
      failures++;
      $display("FAIL ctl=%b: A=%h B=%h expected %h %h", ctl, opa, opb, {m_au, m_al}, {m_bu, m_bl});
    end
  endtask

  initial begin
    @(negedge clk);
    step(5'b00000, 16'h1234, 1'b1);   // reset
    step(5'b10000, 16'h0000);         // A lower
    step(5'b10010, 16'h4020);         // A upper
    step(5'b01000, 16'h0000);         // B lower
    step(5'b01010, 16'h3FC0);         // B upper
    step(5'b00100, 16'hFFFF);         // show lower
    step(5'b00101, 16'hFFFF);         // show upper
    step(5'b11000, 16'hDEAD);         // both selectors: hold
    step(5'b00000, 16'hBEEF);         // clear state
    for (int i = 0; i < 2000; i++) step(5'($urandom), 16'($urandom), ($urandom_range(0, 50) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
