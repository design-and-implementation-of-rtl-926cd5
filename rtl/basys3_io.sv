// basys3_io: operand entry and result display over 16 switches and 16 LEDs.
//
// The board has too few inputs for two 32-bit operands and too few LEDs for a
// 32-bit result, so both are moved 16 bits at a time. Five control inputs
// (board pins in brackets) choose the action:
//   sel_a sel_b out mode half   action
//   (V16) (V17) (W16)(W15)(V15)
//     0     0    0    0    0    clear all four operand halves
//     1     0    0    0    x    A[15:0]  <= sw
//     1     0    0    1    x    A[31:16] <= sw
//     0     1    0    0    x    B[15:0]  <= sw
//     0     1    0    1    x    B[31:16] <= sw
//     0     0    1    x    0    led = result[15:0]
//     0     0    1    x    1    led = result[31:16]
// Loads are level sensitive: the selected half register takes sw on every
// rising clock edge while the combination is held. In any other state the
// operand registers hold and the LEDs echo the switches so the value being
// entered can be checked. rst (synchronous, active high) also clears the
// operands. The control table follows the document; level-sensitive loading,
// the switch echo and the synchronous reset are this design's own choices.
module basys3_io
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] sw,
  input  logic        btn_a,      // V16: input A selector
  input  logic        btn_b,      // V17: input B selector
  input  logic        btn_out,    // W16: show the result
  input  logic        btn_mode,   // W15: load lower (0) or upper (1) half
  input  logic        sel,        // V15: show lower (0) or upper (1) result half
  input  fp32_t       result_i,
  output fp32_t       operand_a_o,
  output fp32_t       operand_b_o,
  output logic [15:0] led
);

  logic [15:0] a_lower, a_upper, b_lower, b_upper;
  logic        clear_st, load_a, load_b, show;

  always_comb begin
    clear_st = ~btn_a & ~btn_b & ~btn_out & ~btn_mode & ~sel;
    load_a   =  btn_a & ~btn_b & ~btn_out;
    load_b   = ~btn_a &  btn_b & ~btn_out;
    show     = ~btn_a & ~btn_b &  btn_out;
  end

  always_ff @(posedge clk) begin
    if (rst || clear_st) begin
      a_lower <= '0;
      a_upper <= '0;
      b_lower <= '0;
      b_upper <= '0;
    end else if (load_a) begin
      if (btn_mode) a_upper <= sw;
      else          a_lower <= sw;
    end else if (load_b) begin
      if (btn_mode) b_upper <= sw;
      else          b_lower <= sw;
    end
  end

  assign operand_a_o = {a_upper, a_lower};
  assign operand_b_o = {b_upper, b_lower};

  always_comb begin
    if (show) led = sel ? result_i[31:16] : result_i[15:0];
    else      led = sw;
  end

endmodule
