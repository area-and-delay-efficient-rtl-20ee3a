// mm_ref_pkg: reference arithmetic for the Montgomery multiplier
// testbenches, for operand widths up to 30 bits. It works from the
// definitions, not from the hardware's algorithm: the expected result is
// (X*Y mod M) * R^-1 mod M, with R^-1 mod M = ((M+1)/2)^N mod M, since
// (M+1)/2 is the inverse of 2 modulo an odd M.
package mm_ref_pkg;

  // M1 = -M^-1 mod 2^n for odd m, by Newton iteration x <- x*(2 - m*x).
  function automatic longint unsigned calc_m1(longint unsigned m, int n);
    longint unsigned inv, mask;
    mask = (64'd1 << n) - 1;
    inv  = m;                              // correct to 3 bits
    for (int i = 0; i < 5; i++) inv = (inv * (2 - m * inv)) & mask;
    return (0 - inv) & mask;
  endfunction

  // X*Y*2^-n mod m.
  function automatic longint unsigned mont_ref(longint unsigned x, longint unsigned y,
                                               longint unsigned m, int n);
    longint unsigned half, rinv, v;
    half = (m + 1) / 2;
    rinv = 1;
    for (int i = 0; i < n; i++) rinv = (rinv * half) % m;
    v = (x * y) % m;
    return (v * rinv) % m;
  endfunction

  // Value before the final subtraction, (X*Y + E*M)/2^n, used to tell
  // whether the subtraction is needed.
  function automatic longint unsigned mont_t(longint unsigned x, longint unsigned y,
                                             longint unsigned m, int n);
    longint unsigned mask, d, e;
    mask = (64'd1 << n) - 1;
    d = x * y;
    e = ((d & mask) * calc_m1(m, n)) & mask;
    return (d + e * m) >> n;
  endfunction

endpackage
