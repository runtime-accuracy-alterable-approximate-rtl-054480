// fpmul_ref_pkg: reference model for the testbenches of the approximate
// floating-point multipliers.
//
// Written with plain integer arithmetic, independently of the RTL structure:
// the approximated mantissa of b is formed by shifting to k fraction bits,
// deciding the rounding from the first dropped bit and testing the carry
// against the window with a mask; the product is a full 24 x 24 multiply,
// normalised and truncated. Also provides conversions between reals and
// single-precision bit patterns for error measurements.
package fpmul_ref_pkg;

  // Truncate a 24-bit mantissa (hidden bit at 23) to k fraction bits and apply
  // window rounding of size w (0 = none). k in 1..23.
  function automatic logic [23:0] ref_round(logic [23:0] m, int k, int w);
    longint unsigned kept, mask, nb;
    int half;
    bit dec;
    if (k < 1) k = 1;
    if (k > 23) k = 23;
    kept = longint'(m) >> (23 - k);           // k+1 bits, value kept / 2^k
    dec  = (k < 23) ? m[22-k] : 1'b0;
    half = (w == 0) ? 0 : (w - 1) / 2;
    nb   = half + 1;                          // kept bits inside the window
    if (nb > k + 1) nb = k + 1;               // not above the hidden bit
    mask = (64'd1 << nb) - 1;
    if (w != 0 && dec && ((kept & mask) != mask)) kept = kept + 1;
    return 24'(kept << (23 - k));
  endfunction

  // Assemble sign/exponent with an exact mantissa product (46 fraction bits).
  function automatic logic [31:0] ref_assemble(logic [31:0] a, logic [31:0] b, logic [47:0] p);
    int e;
    bit s, az, bz, ai, bi, an, bn;
    logic [22:0] f;
    s  = a[31] ^ b[31];
    az = (a[30:23] == 0);  bz = (b[30:23] == 0);
    ai = (a[30:23] == 255) && (a[22:0] == 0);
    bi = (b[30:23] == 255) && (b[22:0] == 0);
    an = (a[30:23] == 255) && (a[22:0] != 0);
    bn = (b[30:23] == 255) && (b[22:0] != 0);
    if (an || bn || (ai && bz) || (bi && az)) return 32'h7FC0_0000;
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin e = e + 1; f = p[46:24]; end
    else       f = p[45:23];
    if (ai || bi || e >= 255) return {s, 8'hFF, 23'd0};
    if (az || bz || e <= 0)   return {s, 31'd0};
    return {s, 8'(e), f};
  endfunction

  function automatic logic [23:0] mant(logic [31:0] x);
    return (x[30:23] == 0) ? 24'd0 : {1'b1, x[22:0]};
  endfunction

  // Approximate product with k fraction bits of b and window w.
  function automatic logic [31:0] ref_fpmul(logic [31:0] a, logic [31:0] b, int k, int w);
    logic [47:0] p;
    p = 48'(mant(a)) * 48'(ref_round(mant(b), k, w));
    return ref_assemble(a, b, p);
  endfunction

  // Real <-> single conversions (normal numbers and zero only).
  function automatic real sp2real(logic [31:0] x);
    real v;
    int e;
    if (x[30:23] == 0) return 0.0;
    e = int'(x[30:23]) - 127;
    v = (1.0 + real'(x[22:0]) / 8388608.0) * (2.0 ** e);
    return x[31] ? -v : v;
  endfunction

  function automatic logic [31:0] real2sp(real r);
    logic [63:0] d;
    int e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (d[62:52] == 0 || e <= 0) return {d[63], 31'd0};
    return {d[63], e[7:0], d[51:29]};
  endfunction

  // Uniform random single in (0, hi).
  function automatic logic [31:0] rand_sp(real hi);
    real r;
    r = (real'($urandom) + 1.0) / 4294967297.0 * hi;
    return real2sp(r);
  endfunction

endpackage
