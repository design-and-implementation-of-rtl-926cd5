// fp_ref_pkg: bit-exact reference model of binary32 add, subtract and
// multiply for the testbenches.
//
// It works differently from the hardware: a finite operand is turned into an
// exact wide integer scaled by a power of two (LSB = 2^-149 for sums, the
// exact 48-bit significand product for products), the exact result is formed
// with ordinary integer arithmetic, and ref_round() rounds it to nearest,
// ties to even, by comparing the discarded remainder with one half ULP.
// Flags follow the conventions of the design: exception for any Inf/NaN
// operand, overflow when finite operands give Inf, underflow when a non-zero
// exact result ends with exponent field 0.
package fp_ref_pkg;

  localparam int BW = 300;
  typedef logic [BW-1:0] big_t;

  typedef struct packed {
    logic [31:0] bits;
    logic        exception;
    logic        overflow;
    logic        underflow;
  } ref_res_t;

  localparam logic [31:0] REF_QNAN = 32'h7FC0_0000;

  function automatic bit is_nan(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 0);
  endfunction

  function automatic bit is_inf(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == 0);
  endfunction

  function automatic bit is_zero(logic [31:0] x);
    return x[30:0] == 0;
  endfunction

  // significand and exponent such that |x| = sig * 2^(pow)
  function automatic void split(input logic [31:0] x, output logic [23:0] sig, output int pow);
    if (x[30:23] == 0) begin
      sig = {1'b0, x[22:0]};
      pow = -149;
    end else begin
      sig = {1'b1, x[22:0]};
      pow = int'(x[30:23]) - 150;
    end
  endfunction

  // round (-1)^s * m * 2^e to binary32
  function automatic ref_res_t ref_round(input bit s, input big_t m, input int e);
    ref_res_t r;
    int   p, biased, shift;
    big_t kept, rem, half;
    longint total;
    r = '0;
    r.bits[31] = s;
    if (m == 0) return r;
    p = 0;
    for (int i = 0; i < BW; i++) if (m[i]) p = i;
    biased = p + e + 127;
    shift  = (biased >= 1) ? p - 23 : -149 - e;
    if (shift > 0) begin
      if (shift >= BW) begin
        kept = 0; rem = m; half = (shift == BW) ? (big_t'(1) << (BW - 1)) : 0;
        // value far below half an ULP of the smallest subnormal
        if (shift > BW) rem = 0;
      end else begin
        kept = m >> shift;
        rem  = m & ((big_t'(1) << shift) - 1);
        half = big_t'(1) << (shift - 1);
      end
      if (rem > half || (rem == half && rem != 0 && kept[0])) kept = kept + 1;
    end else begin
      kept = m << (-shift);
    end
    if (biased >= 1) total = (longint'(biased - 1) << 23) + longint'(kept[25:0]);
    else             total = longint'(kept[25:0]);
    if (total >= (longint'(255) << 23)) begin
      r.bits[30:0] = {8'hFF, 23'h0};
      r.overflow = 1'b1;
    end else begin
      r.bits[30:0] = total[30:0];
      r.underflow = (total[30:23] == 0);
    end
    return r;
  endfunction

  function automatic ref_res_t ref_add(input logic [31:0] a, input logic [31:0] b, input bit sub);
    ref_res_t r;
    logic [23:0] sa, sb;
    int pa, pb;
    big_t ma, mb, m;
    bit   sgn_a, sgn_b, s;
    r = '0;
    sgn_a = a[31];
    sgn_b = b[31] ^ sub;
    r.exception = is_nan(a) | is_nan(b) | is_inf(a) | is_inf(b);
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b) && sgn_a != sgn_b)) begin
      r.bits = REF_QNAN; return r;
    end
    if (is_inf(a)) begin r.bits = {sgn_a, 8'hFF, 23'h0}; return r; end
    if (is_inf(b)) begin r.bits = {sgn_b, 8'hFF, 23'h0}; return r; end
    split(a, sa, pa);
    split(b, sb, pb);
    ma = big_t'(sa) << (pa + 149);
    mb = big_t'(sb) << (pb + 149);
    if (sgn_a == sgn_b) begin
      m = ma + mb; s = sgn_a;
    end else if (ma >= mb) begin
      m = ma - mb; s = sgn_a;
    end else begin
      m = mb - ma; s = sgn_b;
    end
    if (m == 0) s = sgn_a & sgn_b;
    r = ref_round(s, m, -149);
    return r;
  endfunction

  function automatic ref_res_t ref_mul(input logic [31:0] a, input logic [31:0] b);
    ref_res_t r;
    logic [23:0] sa, sb;
    int pa, pb;
    bit s;
    s = a[31] ^ b[31];
    r = '0;
    r.exception = is_nan(a) | is_nan(b) | is_inf(a) | is_inf(b);
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_inf(b) && is_zero(a))) begin
      r.bits = REF_QNAN; return r;
    end
    if (is_inf(a) || is_inf(b)) begin r.bits = {s, 8'hFF, 23'h0}; return r; end
    split(a, sa, pa);
    split(b, sb, pb);
    r = ref_round(s, big_t'(48'(sa) * 48'(sb)), pa + pb);
    return r;
  endfunction

  // random operand with a bias towards interesting classes
  function automatic logic [31:0] rand_fp(input logic [31:0] near);
    logic [31:0] x;
    int unsigned k;
    x = $urandom;
    k = $urandom_range(0, 15);
    case (k)
      0:       x[30:23] = 8'h00;                          // zero / subnormal
      1:       x[30:23] = 8'hFF;                          // Inf / NaN
      2:       x[30:0]  = 31'h0;                          // zero
      3:       x[30:23] = 8'($urandom_range(1, 8));       // tiny
      4:       x[30:23] = 8'($urandom_range(240, 254));   // huge
      5, 6, 7: x[30:23] = near[30:23] + 8'($urandom_range(0, 2)) - 8'd1; // close exponent
      8:       x[30:0]  = near[30:0] ^ 31'($urandom_range(0, 7));        // near cancellation
      default: x[30:23] = 8'($urandom_range(100, 154));   // ordinary
    endcase
    return x;
  endfunction

endpackage
