// fp_ref_pkg: reference arithmetic for the testbenches.
//
// ref_mul and ref_add compute, with plain integer arithmetic and without any
// of the design's modules, the exact bit pattern the network's multiplier
// and adder are specified to produce:
//   multiply: exact 48-bit significand product, keep 24 bits, add the next
//             bit (round half up), denormals/underflow flushed to zero,
//             overflow to infinity, IEEE classes for NaN/Inf/zero.
//   add:      order by magnitude, align the smaller significand by truncation,
//             add or subtract, renormalize, no rounding; sign of the larger
//             operand; zero, underflow -> +0.
// to_real converts a word to a real for tolerance checks against exact
// arithmetic. The ev_* counters record how often each arithmetic case was
// taken, so a testbench can show its data reached every case.
package fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  int ev_mul_norm_shift;   // significand product >= 2
  int ev_mul_round_up;     // rounding added one
  int ev_mul_round_carry;  // rounding carried into a new leading bit
  int ev_add_eff_sub;      // operand signs differ
  int ev_add_carry;        // mantissa sum carried out (exponent + 1)
  int ev_add_left_norm;    // leading one below the hidden position
  int ev_add_trunc;        // alignment dropped non-zero bits
  int ev_add_cancel;       // exact cancellation to zero

  function automatic bit is_nan(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction
  function automatic bit is_inf(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] == 0;
  endfunction
  function automatic bit is_zero(logic [31:0] x);
    return x[30:23] == 8'h00;
  endfunction

  function automatic real to_real(logic [31:0] x);
    logic [10:0] e64;
    if (is_zero(x)) return 0.0;
    // same value as an IEEE-754 double: rebias the exponent, widen the fraction
    e64 = 11'(int'(x[30:23]) - 127 + 1023);
    return $bitstoreal({x[31], e64, x[22:0], 29'h0});
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    longint unsigned prod, keep;
    int e;
    bit s;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b)))
      return QNAN;
    if (is_inf(a) || is_inf(b)) return {s, 8'hFF, 23'h0};
    if (is_zero(a) || is_zero(b)) return {s, 31'h0};
    prod = longint'({1'b1, a[22:0]}) * longint'({1'b1, b[22:0]});
    e    = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (prod[47]) begin
      ev_mul_norm_shift++;
      e++;
      keep = prod >> 23;        // 25 bits: 24 kept + 1 rounding bit
    end else begin
      keep = prod >> 22;
    end
    if (keep[0]) ev_mul_round_up++;
    keep = (keep >> 1) + longint'(keep[0]);
    if (keep[24]) begin
      ev_mul_round_carry++;
      keep = keep >> 1;
      e++;
    end
    if (e >= 255) return {s, 8'hFF, 23'h0};
    if (e <= 0)   return {s, 31'h0};
    return {s, 8'(e), keep[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    logic [31:0] big, sml;
    longint mb, ms, mal, sum;
    int d, e, msb;
    if (is_nan(a) || is_nan(b)) return QNAN;
    if (is_inf(a) && is_inf(b)) return (a[31] != b[31]) ? QNAN : a;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (a[30:0] >= b[30:0]) begin big = a; sml = b; end
    else begin big = b; sml = a; end
    mb = is_zero(big) ? 0 : longint'({1'b1, big[22:0]});
    ms = is_zero(sml) ? 0 : longint'({1'b1, sml[22:0]});
    d  = int'(big[30:23]) - int'(sml[30:23]);
    mal = (d > 40) ? 0 : (ms >>> d);
    if ((mal <<< d) != ms) ev_add_trunc++;
    if (a[31] != b[31]) begin
      ev_add_eff_sub++;
      sum = mb - mal;
    end else begin
      sum = mb + mal;
    end
    if (sum == 0) begin
      if (mb != 0) ev_add_cancel++;
      return 32'h0;
    end
    msb = 0;
    for (int k = 0; k < 26; k++) if (sum[k]) msb = k;
    e = int'(big[30:23]) + (msb - 23);
    if (msb == 24) begin ev_add_carry++; sum = sum >>> 1; end
    else if (msb < 23) begin ev_add_left_norm++; sum = sum <<< (23 - msb); end
    if (e <= 0)   return 32'h0;
    if (e >= 255) return {big[31], 8'hFF, 23'h0};
    return {big[31], 8'(e), sum[22:0]};
  endfunction

  typedef logic [31:0] wvec_t [15];

  // Network output for one sample: stage 1 products and pairwise sums, stage
  // 2 products, then the sum formed in order 0, 1, ..., 14.
  function automatic logic [31:0] ref_net(logic [31:0] in1, logic [31:0] in2,
                                          wvec_t w11, wvec_t w22, wvec_t w33);
    logic [31:0] acc, h;
    for (int i = 0; i < 15; i++) begin
      h = ref_add(ref_mul(in1, w11[i]), ref_mul(in2, w22[i]));
      h = ref_mul(h, w33[i]);
      acc = (i == 0) ? h : ref_add(acc, h);
    end
    return acc;
  endfunction

  // Random word with a moderate exponent, so that products and sums stay
  // normal; sign and fraction random.
  function automatic logic [31:0] rand_fp(int emin, int emax);
    logic [31:0] w;
    w = $urandom;
    w[30:23] = 8'(emin + int'($urandom % 32'(emax - emin + 1)));
    return w;
  endfunction

endpackage
