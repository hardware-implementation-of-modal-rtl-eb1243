// tb_fp_ref_pkg: reference model used by the testbenches.
//
// The floating-point reference works on exact integers instead of the
// alignment/normalisation datapath of the RTL: an operand is an integer
// significand N times 2^X, a sum is formed exactly on a 2240-bit integer
// (wide enough for any pair of binary64 exponents), a product exactly on
// 106 bits, and ref_round() rounds the exact value to binary64 by
// truncating at the target quantum and comparing the remainder with half a
// quantum. The interval references apply the document's bound formulas
// (sign-case table for multiplication, with min/max for cases 6 and 11)
// directly to these reference products. gen_fp() draws operands from the
// number classes of the document's test plan (normal, near overflow,
// subnormal, zero, infinity).
package tb_fp_ref_pkg;
  import mi_pkg::*;

  typedef logic [2239:0] big_t;

  function automatic fp64_t ref_ovf(bit sign, rmode_e rm);
    fp64_t inf_v, max_v;
    inf_v = {sign, 11'h7FF, 52'h0};
    max_v = {sign, 11'h7FE, {52{1'b1}}};
    case (rm)
      RM_NEAREST: return inf_v;
      RM_ZERO:    return max_v;
      RM_UP:      return sign ? max_v : inf_v;
      default:    return sign ? inf_v : max_v;
    endcase
  endfunction

  // Round sign * n * 2^x (n != 0) to binary64.
  function automatic fp64_t ref_round(bit sign, big_t n, int x, rmode_e rm);
    int   p, q, sh;
    big_t kept, rem, half;
    bit   inexact, up;
    p = -1;
    for (int i = 0; i < 2240; i++) if (n[i]) p = i;
    if (p + x > 1023) return ref_ovf(sign, rm);
    q = p + x - 52;
    if (q < -1074) q = -1074;
    sh = q - x;
    if (sh <= 0) begin
      kept = n << (-sh);
      rem = '0; half = '0; inexact = 1'b0;
    end else begin
      kept = n >> sh;
      rem  = n - (kept << sh);
      half = big_t'(1) << (sh - 1);
      inexact = rem != '0;
    end
    case (rm)
      RM_NEAREST: up = inexact && ((rem > half) || (rem == half && kept[0]));
      RM_ZERO:    up = 1'b0;
      RM_UP:      up = !sign && inexact;
      default:    up = sign && inexact;
    endcase
    kept = kept + big_t'(up);
    if (kept == (big_t'(1) << 53)) begin
      kept = kept >> 1;
      q++;
    end
    if (q + 52 > 1023) return ref_ovf(sign, rm);
    if (kept[52]) return {sign, 11'(q + 1075), kept[51:0]};
    return {sign, 11'h000, kept[51:0]};
  endfunction

  function automatic bit is_nan(fp64_t v);  return v[62:52] == 11'h7FF && v[51:0] != 0; endfunction
  function automatic bit is_inf(fp64_t v);  return v[62:52] == 11'h7FF && v[51:0] == 0; endfunction
  function automatic bit is_zero(fp64_t v); return v[62:0] == 0; endfunction
  function automatic bit is_neg(fp64_t v);  return v[63] && v[62:0] != 0; endfunction

  function automatic void unpack(fp64_t v, output big_t n, output int x);
    n = (v[62:52] == 0) ? big_t'(v[51:0]) : big_t'({1'b1, v[51:0]});
    x = ((v[62:52] == 0) ? 1 : int'(v[62:52])) - 1075;
  endfunction

  function automatic fp64_t ref_add(fp64_t a, fp64_t b, bit sub, rmode_e rm);
    bit   bs, sg;
    big_t na, nb, s;
    int   xa, xb, xm;
    bs = b[63] ^ sub;
    if (is_nan(a) || is_nan(b)) return QNAN;
    if (is_inf(a) && is_inf(b)) return (a[63] == bs) ? {a[63], 11'h7FF, 52'h0} : QNAN;
    if (is_inf(a)) return a;
    if (is_inf(b)) return {bs, 11'h7FF, 52'h0};
    unpack(a, na, xa);
    unpack(b, nb, xb);
    xm = (xa < xb) ? xa : xb;
    na = na << (xa - xm);
    nb = nb << (xb - xm);
    if (a[63] == bs) begin
      s = na + nb; sg = a[63];
      if (s == 0) return {sg, 63'h0};
    end else if (na > nb) begin
      s = na - nb; sg = a[63];
    end else if (nb > na) begin
      s = nb - na; sg = bs;
    end else begin
      return {(rm == RM_DOWN), 63'h0};
    end
    return ref_round(sg, s, xm, rm);
  endfunction

  function automatic fp64_t ref_mul(fp64_t a, fp64_t b, rmode_e rm, bit ieee);
    bit   s;
    big_t na, nb;
    int   xa, xb;
    s = a[63] ^ b[63];
    if (is_nan(a) || is_nan(b)) return QNAN;
    if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) return ieee ? QNAN : {s, 63'h0};
    if (is_inf(a) || is_inf(b)) return {s, 11'h7FF, 52'h0};
    if (is_zero(a) || is_zero(b)) return {s, 63'h0};
    unpack(a, na, xa);
    unpack(b, nb, xb);
    return ref_round(s, na * nb, xa + xb, rm);
  endfunction

  function automatic fp64_t fmax(fp64_t x, fp64_t y);
    return ($bitstoreal(y) > $bitstoreal(x)) ? y : x;
  endfunction
  function automatic fp64_t fmin(fp64_t x, fp64_t y);
    return ($bitstoreal(y) < $bitstoreal(x)) ? y : x;
  endfunction

  // Bounds compare equal if identical, or if both are zeros (the sign of a
  // zero picked by min/max of +0 and -0 is not specified).
  function automatic bit bound_eq(fp64_t x, fp64_t y);
    return (x == y) || (is_zero(x) && is_zero(y));
  endfunction

  function automatic interval_t ref_iaddsub(interval_t a, interval_t b, bit sub);
    interval_t r;
    r.fb = ref_add(a.fb, sub ? b.sb : b.fb, sub, RM_DOWN);
    r.sb = ref_add(a.sb, sub ? b.fb : b.sb, sub, RM_UP);
    return r;
  endfunction

  function automatic logic [3:0] sign_case(interval_t a, interval_t b);
    return {is_neg(a.fb), is_neg(a.sb), is_neg(b.fb), is_neg(b.sb)};
  endfunction

  // Modal interval product with outward rounding, straight from the sign
  // case table; 0 * inf = 0.
  function automatic interval_t ref_imul(interval_t a, interval_t b);
    fp64_t a1, a2, b1, b2;
    interval_t r;
    a1 = a.fb; a2 = a.sb; b1 = b.fb; b2 = b.sb;
    case (sign_case(a, b))
      4'b0000: r = '{ref_mul(a1,b1,RM_DOWN,0), ref_mul(a2,b2,RM_UP,0)};
      4'b0001: r = '{ref_mul(a1,b1,RM_DOWN,0), ref_mul(a1,b2,RM_UP,0)};
      4'b0010: r = '{ref_mul(a2,b1,RM_DOWN,0), ref_mul(a2,b2,RM_UP,0)};
      4'b0011: r = '{ref_mul(a2,b1,RM_DOWN,0), ref_mul(a1,b2,RM_UP,0)};
      4'b0100: r = '{ref_mul(a1,b1,RM_DOWN,0), ref_mul(a2,b1,RM_UP,0)};
      4'b0101: r = '{fmax(ref_mul(a1,b1,RM_DOWN,0), ref_mul(a2,b2,RM_DOWN,0)),
                     fmin(ref_mul(a1,b2,RM_UP,0),   ref_mul(a2,b1,RM_UP,0))};
      4'b0111: r = '{ref_mul(a2,b2,RM_DOWN,0), ref_mul(a1,b2,RM_UP,0)};
      4'b1000: r = '{ref_mul(a1,b2,RM_DOWN,0), ref_mul(a2,b2,RM_UP,0)};
      4'b1010: r = '{fmin(ref_mul(a1,b2,RM_DOWN,0), ref_mul(a2,b1,RM_DOWN,0)),
                     fmax(ref_mul(a1,b1,RM_UP,0),   ref_mul(a2,b2,RM_UP,0))};
      4'b1011: r = '{ref_mul(a2,b1,RM_DOWN,0), ref_mul(a1,b1,RM_UP,0)};
      4'b1100: r = '{ref_mul(a1,b2,RM_DOWN,0), ref_mul(a2,b1,RM_UP,0)};
      4'b1101: r = '{ref_mul(a2,b2,RM_DOWN,0), ref_mul(a2,b1,RM_UP,0)};
      4'b1110: r = '{ref_mul(a1,b2,RM_DOWN,0), ref_mul(a1,b1,RM_UP,0)};
      4'b1111: r = '{ref_mul(a2,b2,RM_DOWN,0), ref_mul(a1,b1,RM_UP,0)};
      default: begin  // 0110, 1001
        if (is_inf(a1) || is_inf(a2) || is_inf(b1) || is_inf(b2)) r = '{QNAN, QNAN};
        else r = '{64'h0, 64'h0};
      end
    endcase
    return r;
  endfunction

  // Number classes: 0 normal near 1, 1 near overflow, 2 subnormal, 3 zero,
  // 4 infinity, 5 any finite, 6 smallest normals.
  function automatic fp64_t gen_fp(int kind);
    logic [51:0] f;
    logic [10:0] e;
    f = 52'({$urandom, $urandom});
    if ($urandom_range(0, 3) == 0) f = f & ~((52'h1 << $urandom_range(0, 51)) - 52'h1);
    case (kind)
      0: e = 11'(1023 + $urandom_range(0, 60) - 30);
      1: e = 11'(2046 - $urandom_range(0, 5));
      2: begin e = 0; if (f == 0) f = 52'h1; end
      3: begin e = 0; f = 0; end
      4: begin e = 11'h7FF; f = 0; end
      5: e = 11'($urandom_range(0, 2046));
      default: e = 11'($urandom_range(1, 6));
    endcase
    return {1'($urandom), e, f};
  endfunction

  // Weighted choice of class for interval bounds.
  function automatic int pick_kind();
    int u;
    u = $urandom_range(0, 99);
    if (u < 55) return 0;
    if (u < 63) return 1;
    if (u < 70) return 2;
    if (u < 77) return 3;
    if (u < 84) return 4;
    if (u < 94) return 5;
    return 6;
  endfunction

  function automatic interval_t gen_interval();
    interval_t v;
    v.fb = gen_fp(pick_kind());
    v.sb = gen_fp(pick_kind());
    return v;
  endfunction
endpackage
