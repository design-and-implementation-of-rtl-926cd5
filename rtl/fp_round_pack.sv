// fp_round_pack: result normalisation, rounding and packing.
//
// Takes the raw result of an adder or multiplier as sign, biased exponent and
// a W-bit significand with two integer bits:
//     value = (-1)^sign * sig / 2^(W-2) * 2^(exp - 127)
// and returns the IEEE-754 single precision word nearest to it.
//   1. Normalise: a leading-zero count shifts sig left until its top bit is
//      set and the exponent becomes exp + 1 - lz. This covers both the right
//      shift of a sum >= 2 (lz = 0, exponent + 1) and the left shift after
//      cancellation.
//   2. If the exponent is below 1 the value is subnormal: the significand is
//      shifted right until the exponent is 1, collecting shifted-out bits in
//      a sticky bit.
//   3. Round to nearest, ties to even, on the guard bit and sticky bit.
//   4. Pack as (exponent-1) << 23 plus the 24-bit rounded significand, so a
//      rounding carry moves into the exponent by itself; an exponent of 255 or
//      more becomes Inf (overflow).
// underflow is set when a non-zero value ends with exponent field 0
// (subnormal or rounded to zero). Purely combinational. The document asks
// for normalisation by right or left shift, rounding to 23 bits and packing;
// ties-to-even, subnormal results and the flag rules are this design's own.
module fp_round_pack
  import fp_pkg::*;
#(
  parameter int unsigned W  = 48,   // significand width, >= 26
  parameter int unsigned EW = 12    // signed exponent width
) (
  input  logic                 sign_i,
  input  logic signed [EW-1:0] exp_i,
  input  logic [W-1:0]         sig_i,
  output fp32_t                res_o,
  output logic                 overflow_o,
  output logic                 underflow_o
);

  localparam int unsigned LZW = $clog2(W + 1);
  localparam int unsigned TW  = EW + MAN_W;          // packed exponent|mantissa sum width

  logic [LZW-1:0]         lz;
  logic signed [EW-1:0]   e_norm;
  logic [W-1:0]           n, m;
  logic [EW-1:0]          sh;
  logic                   sticky_sh, guard, sticky, lsb, inc;
  logic [SIG_W-1:0]       keep;
  logic [TW-1:0]          total, base;

  always_comb begin
    // leading zero count
    lz = LZW'(W);
    for (int i = 0; i < int'(W); i++)
      if (sig_i[i]) lz = LZW'(W - 1 - i);

    n      = sig_i << lz;
    e_norm = exp_i + EW'(1) - EW'(lz);

    // subnormal range: shift right to exponent 1
    m         = n;
    sticky_sh = 1'b0;
    sh        = '0;
    if (e_norm < EW'(1)) begin
      sh = EW'(1) - e_norm;
      if (sh >= EW'(W)) begin
        m         = '0;
        sticky_sh = |n;
      end else begin
        m         = n >> sh;
        sticky_sh = |(n & ~({W{1'b1}} << sh));
      end
    end

    keep   = m[W-1 -: SIG_W];
    guard  = m[W-1-SIG_W];
    sticky = (|m[W-2-SIG_W:0]) | sticky_sh;
    lsb    = keep[0];
    inc    = guard & (sticky | lsb);

    base  = (e_norm >= EW'(1)) ? TW'(e_norm - EW'(1)) << MAN_W : '0;
    total = base + TW'(keep) + TW'(inc);

    res_o.sign  = sign_i;
    overflow_o  = 1'b0;
    underflow_o = 1'b0;
    if (sig_i == '0) begin
      res_o.exp = '0;
      res_o.man = '0;
    end else if (total[TW-1:MAN_W] >= EW'(EXP_MAX)) begin
      res_o.exp  = EXP_MAX;
      res_o.man  = '0;
      overflow_o = 1'b1;
    end else begin
      res_o.exp   = total[MAN_W +: EXP_W];
      res_o.man   = total[MAN_W-1:0];
      underflow_o = (total[TW-1:MAN_W] == '0);
    end
  end

endmodule
