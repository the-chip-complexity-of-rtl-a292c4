// ntt_pkg: elaboration-time number theory for the transform multiplier.
//
// The multiplier works in the finite field F_p, where p is the smallest
// prime of the form n*q + 1 (q >= 1), so that F_p holds an element u of
// multiplicative order exactly n (an n-th root of unity).  These constants
// depend only on n and are fixed into the circuit; the functions below find
// them while the design is elaborated, so nothing is computed at run time.
// All values are small (p < 2^31), products are formed in 64 bits.
package ntt_pkg;

  function automatic bit is_prime(longint unsigned x);
    if (x < 2) return 1'b0;
    for (longint unsigned d = 2; d * d <= x; d++)
      if (x % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  // smallest prime p = n*q + 1 with q >= 1
  function automatic int unsigned ntt_prime(int unsigned n);
    for (longint unsigned q = 1; q < 100000; q++)
      if (is_prime(64'(n) * q + 1)) return 32'(64'(n) * q + 1);
    return 0;
  endfunction

  function automatic int unsigned pow_mod(int unsigned b, int unsigned e, int unsigned m);
    longint unsigned mm = 64'(m);
    longint unsigned r = 64'(1) % mm;
    longint unsigned x = 64'(b) % mm;
    int unsigned ee = e;
    while (ee > 0) begin
      if (ee[0]) r = (r * x) % mm;
      x = (x * x) % mm;
      ee = ee >> 1;
    end
    return 32'(r);
  endfunction

  // inverse in F_p (p prime), by Fermat's little theorem
  function automatic int unsigned inv_mod(int unsigned x, int unsigned p);
    return pow_mod(x, p - 2, p);
  endfunction

  // smallest element of F_p whose multiplicative order is exactly n
  function automatic int unsigned ntt_root(int unsigned n, int unsigned p);
    for (int unsigned g = 2; g < p; g++) begin
      bit ok = (pow_mod(g, n, p) == 1);
      for (int unsigned d = 1; ok && d < n; d++)
        if (n % d == 0 && pow_mod(g, d, p) == 1) ok = 1'b0;
      if (ok) return g;
    end
    return 0;
  endfunction

  // integer square root (n = k*k)
  function automatic int unsigned isqrt(int unsigned n);
    int unsigned k = 0;
    while ((k + 1) * (k + 1) <= n) k++;
    return k;
  endfunction

endpackage
