// booth_radix4_mult: unsigned significand multiplier, radix-4 Booth.
//
// Multiplies two unsigned WIDTH-bit significands (24 bits for single
// precision, hidden bit included) into a 2*WIDTH-bit product. The multiplier
// b is zero-extended to an even width and scanned in overlapping 3-bit groups
// {b[2i+1], b[2i], b[2i-1]} with b[-1] = 0; each group is recoded by a
// booth_encoder into one of 0, +-a, +-2a. This halves the number of partial
// products (13 instead of 24 for WIDTH = 24). Each partial product is formed
// in two's complement, shifted by 2i and the NPP of them are summed modulo
// 2^(2*WIDTH); because the true product is below 2^(2*WIDTH) the sum is exact.
// The recoding follows the document. The accumulation as one adder chain
// (no Wallace tree, no registers) is this design's own choice; the block is
// purely combinational.
module booth_radix4_mult #(
  parameter int unsigned WIDTH = 24
) (
  input  logic [WIDTH-1:0]   a_i,   // multiplicand
  input  logic [WIDTH-1:0]   b_i,   // multiplier (recoded)
  output logic [2*WIDTH-1:0] p_o
);

  localparam int unsigned NPP = WIDTH / 2 + 1;       // groups over the zero-extended multiplier
  localparam int unsigned PW  = 2 * WIDTH;

  // Multiplier with b[-1] = 0 below and zeros above, 2*NPP+1 bits.
  logic [2*NPP:0] b_ext;
  assign b_ext = {{(2*NPP - WIDTH){1'b0}}, b_i, 1'b0};

  logic [NPP-1:0] pp_zero, pp_two, pp_neg;
  logic [PW-1:0]  pp [NPP];

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_encoder u_enc (
      .grp_i  (b_ext[2*i +: 3]),
      .zero_o (pp_zero[i]),
      .two_o  (pp_two[i]),
      .neg_o  (pp_neg[i])
    );

    logic [PW-1:0] mag;
    always_comb begin
      mag = pp_two[i] ? (PW'(a_i) << 1) : PW'(a_i);
      if (pp_zero[i]) mag = '0;
      pp[i] = (pp_neg[i] ? (~mag + PW'(1)) : mag) << (2 * i);
    end
  end

  always_comb begin
    p_o = '0;
    for (int i = 0; i < NPP; i++) p_o = p_o + pp[i];
  end

endmodule
