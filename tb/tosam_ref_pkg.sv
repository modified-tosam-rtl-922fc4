// tosam_ref_pkg: reference model of TOSAM(h,t) for the testbenches.
//
// Works on plain integers, independently of the RTL structure: the
// magnitude is split as 2^k * (1 + y) with y = frac(mag / 2^k), y is
// truncated to t bits, the h-bit rounded approximations are
// (floor(y * 2^h) + 1/2) / 2^h, and the product is
//     floor(2^(ka+kb) * (1 + ya + yb + apx_a * apx_b)).
// Values are held in 128-bit vectors so that 32-bit operands fit.
package tosam_ref_pkg;

  typedef logic [127:0] u128_t;

  // Position of the leading one (0 for a zero input).
  function automatic int lead_one(u128_t x);
    int k = 0;
    for (int i = 0; i < 128; i++) if (x[i]) k = i;
    return k;
  endfunction

  // Approximate magnitude: one's complement for negative signed operands.
  function automatic u128_t approx_mag(u128_t x, int n, bit sgn);
    u128_t mask = (u128_t'(1) << (sgn ? n - 1 : n)) - 1;
    if (sgn && x[n-1]) return (~x) & mask;
    return x & mask;
  endfunction

  // t fraction bits below the leading one.
  function automatic u128_t frac_t(u128_t mag, int t);
    int k;
    u128_t rest;
    if (mag == 0) return 0;
    k    = lead_one(mag);
    rest = mag - (u128_t'(1) << k);          // y * 2^k
    if (k >= t) return rest >> (k - t);      // floor(y * 2^t)
    return rest << (t - k);
  endfunction

  // Approximate product of two n-bit operands, as a 2n-bit value.
  function automatic u128_t tosam(u128_t a, u128_t b, int n, int h, int t, bit sgn);
    u128_t ma, mb, ya, yb, pa, pb, num, res, mask2n;
    int ka, kb, f, kd;
    mask2n = (u128_t'(1) << (2*n)) - 1;
    a &= (u128_t'(1) << n) - 1;
    b &= (u128_t'(1) << n) - 1;
    if (a == 0 || b == 0) return 0;
    ma = approx_mag(a, n, sgn);
    mb = approx_mag(b, n, sgn);
    ka = lead_one(ma);
    kb = lead_one(mb);
    ya = frac_t(ma, t);
    yb = frac_t(mb, t);
    pa = ((ya >> (t - h)) << 1) | 1;          // h+1 bits
    pb = ((yb >> (t - h)) << 1) | 1;
    // common denominator 2^f, f = t + 2h + 2
    f   = t + 2*h + 2;
    num = (u128_t'(1) << f) + ((ya + yb) << (2*h + 2)) + ((pa * pb) << t);
    kd  = ka + kb;
    res = (num << kd) >> f;
    if (sgn && (a[n-1] ^ b[n-1])) res = (~res + 1);
    return res & mask2n;
  endfunction

  // Exact signed/unsigned product as a 2n-bit value.
  function automatic u128_t exact(u128_t a, u128_t b, int n, bit sgn);
    u128_t ma, mb, r;
    bit neg = 0;
    a &= (u128_t'(1) << n) - 1;
    b &= (u128_t'(1) << n) - 1;
    ma = a; mb = b;
    if (sgn && a[n-1]) begin ma = ((~a) + 1) & ((u128_t'(1) << n) - 1); neg = ~neg; end
    if (sgn && b[n-1]) begin mb = ((~b) + 1) & ((u128_t'(1) << n) - 1); neg = ~neg; end
    r = ma * mb;
    if (neg) r = ~r + 1;
    return r & ((u128_t'(1) << (2*n)) - 1);
  endfunction

endpackage
