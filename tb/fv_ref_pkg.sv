// fv_ref_pkg: software reference arithmetic for the testbenches.
//
// Plain textbook formulas, written independently of the RTL datapath:
// modular arithmetic with 64-bit integers, negacyclic (mod x^n + 1)
// schoolbook polynomial multiplication, the negative-wrapped NTT evaluated
// directly as A[i] = a(psi^(2i+1)) by Horner's rule, CRT recombination and
// FV decoding for t = 2.
package fv_ref_pkg;

  typedef longint unsigned u64;
  typedef int unsigned     poly_t [];

  function automatic u64 mulm(u64 a, u64 b, u64 q);
    return (a * b) % q;
  endfunction

  function automatic u64 powm(u64 b, u64 e, u64 q);
    u64 r = 1;
    b = b % q;
    while (e != 0) begin
      if (e[0]) r = (r * b) % q;
      b = (b * b) % q;
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic poly_t pmul(poly_t a, poly_t b, int n, u64 q);
    poly_t c = new[n];
    u64 acc [] = new[n];
    for (int i = 0; i < n; i++) acc[i] = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        u64 p = (u64'(a[i]) * u64'(b[j])) % q;
        int k = i + j;
        if (k < n) acc[k] = (acc[k] + p) % q;
        else       acc[k - n] = (acc[k - n] + q - p) % q;
      end
    for (int i = 0; i < n; i++) c[i] = int'(acc[i]);
    return c;
  endfunction

  function automatic poly_t padd(poly_t a, poly_t b, int n, u64 q);
    poly_t c = new[n];
    for (int i = 0; i < n; i++) c[i] = int'((u64'(a[i]) + u64'(b[i])) % q);
    return c;
  endfunction

  // A[i] = sum_j a[j] psi^(j(2i+1)), psi a primitive 2n-th root of unity
  function automatic poly_t ntt(poly_t a, int n, u64 q, u64 psi);
    poly_t r = new[n];
    for (int i = 0; i < n; i++) begin
      u64 x = powm(psi, u64'(2 * i + 1), q);
      u64 acc = 0;
      for (int j = n - 1; j >= 0; j--) acc = (acc * x + u64'(a[j])) % q;
      r[i] = int'(acc);
    end
    return r;
  endfunction

  // signed small value -> residue
  function automatic int unsigned res_of(longint v, u64 q);
    longint m = v % longint'(q);
    if (m < 0) m += longint'(q);
    return int'(m);
  endfunction

  // CRT: residues -> value mod q0*q1
  function automatic u64 crt(u64 a0, u64 a1, u64 q0, u64 q1);
    u64 q   = q0 * q1;
    u64 i0  = powm(q1 % q0, q0 - 2, q0);   // q1^-1 mod q0
    u64 i1  = powm(q0 % q1, q1 - 2, q1);
    u64 t0  = ((a0 * i0) % q0) * q1;
    u64 t1  = ((a1 * i1) % q1) * q0;
    return (t0 + t1) % q;
  endfunction

  // centred representative in (-q/2, q/2]
  function automatic longint centred(u64 a, u64 q);
    return (a > q / 2) ? longint'(a) - longint'(q) : longint'(a);
  endfunction

  function automatic bit decode(u64 a, u64 q);
    return (4 * a > q) && (4 * a < 3 * q);
  endfunction

endpackage
