// crt_pkg: shared types and elaboration-time arithmetic for the CRT
// residue-to-binary converter.
//
// The converter computes X = sum(X_j) - r*M with X_j = M_j*|M_j^-1 * x_j|_mj
// (orthogonal projections), but replaces the excess factor r by
// r_B = floor(sum/M_B), where M_B = 2^p is a power of two close to M. The
// functions here derive, from the list of moduli, every constant the
// hardware needs: M, the projection table entries, p, delta = |M_B - M| and
// the case (M < M_B or M > M_B). Nothing here is evaluated at run time.
//
// The choice of p follows the design rule of the converter: first try
// p = ceil(log2 M) (case 1, M < M_B), usable when (n-1)*M > (n-2)*M_B;
// otherwise try p = ceil(log2 M)-1 (case 2, M_B < M), usable when
// n*M_B > (n-1)*M. Either condition bounds the correction rho to 0 or 1.
// MAX_N (the most moduli a base may hold) is this design's choice.
package crt_pkg;

  localparam int unsigned MAX_N = 16;

  // List of moduli; entries at index >= N are ignored.
  typedef int unsigned moduli_t [MAX_N];

  typedef longint unsigned u64_t;

  // Product of the first n moduli (the dynamic range M).
  function automatic u64_t base_product(moduli_t m, int unsigned n);
    u64_t prod = 1;
    for (int unsigned j = 0; j < n; j++) prod = prod * u64_t'(m[j]);
    return prod;
  endfunction

  // Number of bits needed to hold values 0 .. v-1.
  function automatic int unsigned clog2_u64(u64_t v);
    int unsigned b = 0;
    while (b < 64 && (u64_t'(1) << b) < v) b++;
    return b;
  endfunction

  // Largest modulus of the base (sets the residue port width).
  function automatic int unsigned max_modulus(moduli_t m, int unsigned n);
    int unsigned mx = 2;
    for (int unsigned j = 0; j < n; j++) if (m[j] > mx) mx = m[j];
    return mx;
  endfunction

  // Multiplicative inverse of a modulo m (brute force; m is at most a few
  // dozen). Returns 0 if none exists.
  function automatic u64_t mod_inverse(u64_t a, u64_t m);
    u64_t am = a % m;
    if (m == 1) return 0;
    for (u64_t k = 1; k < m; k++) if ((am * k) % m == 1) return k;
    return 0;
  endfunction

  // Orthogonal projection of residue x of modulus mj within range prod:
  // X_j = M_j * |M_j^-1 * x|_mj with M_j = prod / mj.
  function automatic u64_t projection(u64_t prod, u64_t mj, u64_t x);
    u64_t big_mj = prod / mj;
    u64_t inv    = mod_inverse(big_mj, mj);
    return big_mj * ((inv * (x % mj)) % mj);
  endfunction

  // True when M < M_B = 2^ceil(log2 M) satisfies (n-1)*M > (n-2)*M_B.
  function automatic bit use_case1(u64_t prod, int unsigned n);
    int unsigned p = clog2_u64(prod);
    u64_t mb = u64_t'(1) << p;
    return (mb > prod) && (u64_t'(n) * prod - prod > u64_t'(n) * mb - 2 * mb);
  endfunction

  // True when M_B = 2^(ceil(log2 M)-1) < M satisfies n*M_B > (n-1)*M.
  function automatic bit use_case2(u64_t prod, int unsigned n);
    int unsigned p = clog2_u64(prod) - 32'd1;
    u64_t mb = u64_t'(1) << p;
    return u64_t'(n) * mb > u64_t'(n) * prod - prod;
  endfunction

  // Exponent p of M_B = 2^p.
  function automatic int unsigned select_p(u64_t prod, int unsigned n);
    return use_case1(prod, n) ? clog2_u64(prod) : clog2_u64(prod) - 1;
  endfunction

  // delta = |M_B - M|.
  function automatic u64_t select_delta(u64_t prod, int unsigned n);
    u64_t mb = u64_t'(1) << select_p(prod, n);
    return use_case1(prod, n) ? mb - prod : prod - mb;
  endfunction

endpackage
