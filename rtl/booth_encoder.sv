// booth_encoder: radix-4 Booth recoding of one multiplier group.
//
// Input is an overlapping 3-bit group {y[2i+1], y[2i], y[2i-1]} of the
// multiplier. Output is the digit it stands for, as the selection of a
// partial product: 000/111 -> 0, 001/010 -> +M, 011 -> +2M, 100 -> -2M,
// 101/110 -> -M (the recoding table of the document). The digit is given as
// three control bits (zero, double, negate) that a partial product generator
// applies to the multiplicand M. Purely combinational.
module booth_encoder (
  input  logic [2:0] grp_i,
  output logic       zero_o,   // digit is 0
  output logic       two_o,    // magnitude is 2 (else 1)
  output logic       neg_o     // digit is negative
);

  always_comb begin
    unique case (grp_i)
      3'b000, 3'b111: begin zero_o = 1'b1; two_o = 1'b0; neg_o = 1'b0; end
      3'b001, 3'b010: begin zero_o = 1'b0; two_o = 1'b0; neg_o = 1'b0; end
      3'b011:         begin zero_o = 1'b0; two_o = 1'b1; neg_o = 1'b0; end
      3'b100:         begin zero_o = 1'b0; two_o = 1'b1; neg_o = 1'b1; end
      default:        begin zero_o = 1'b0; two_o = 1'b0; neg_o = 1'b1; end // 101, 110
    endcase
  end

endmodule
