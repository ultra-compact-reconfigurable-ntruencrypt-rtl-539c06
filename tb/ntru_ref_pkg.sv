// ntru_ref_pkg: reference model for the NTRUEncrypt testbenches.
//
// Plain, cycle-free arithmetic in Z[x]/(x^N - 1): cyclic convolution of two
// integer polynomials, centre lift, packing of ternary coefficients four to a
// byte (first coefficient in bits [1:0], +1 = 2'b01, -1 = 2'b11), full NTRU
// decryption, and key generation (inverses mod 3 and mod q) for round-trip
// tests. Written independently of the RTL.
package ntru_ref_pkg;

  typedef int poly_t[];

  function automatic int modp(input int v, input int m);
    int r = v % m;
    return (r < 0) ? r + m : r;
  endfunction

  // out_k = sum_i c_i * d_((k-i) mod n), reduced into 0..m-1
  function automatic poly_t conv(input poly_t c, input poly_t d, input int n, input int m);
    poly_t o = new[n];
    for (int k = 0; k < n; k++) begin
      int s = 0;
      for (int i = 0; i < n; i++) s += c[i] * d[modp(k - i, n)];
      o[k] = modp(s, m);
    end
    return o;
  endfunction

  function automatic int nwords(input int n);
    return (2 * n + 7) / 8;
  endfunction

  function automatic byte unsigned pack_byte(input poly_t c, input int w);
    byte unsigned b = 0;
    for (int j = 0; j < 4; j++) begin
      int i = 4 * w + j;
      int v = (i < c.size()) ? c[i] : 0;
      if (v == 1)       b |= byte'(8'h01 << (2 * j));
      else if (v == -1) b |= byte'(8'h03 << (2 * j));
    end
    return b;
  endfunction

  // random ternary polynomial with exactly np (+1)s and nm (-1)s
  function automatic poly_t rand_ternary(input int n, input int np, input int nm);
    poly_t c = new[n];
    foreach (c[i]) c[i] = 0;
    for (int k = 0; k < np + nm; k++) begin
      int i;
      do i = $urandom_range(n - 1); while (c[i] != 0);
      c[i] = (k < np) ? 1 : -1;
    end
    return c;
  endfunction

  function automatic int nonzeros(input poly_t c);
    int z = 0;
    foreach (c[i]) if (c[i] != 0) z++;
    return z;
  endfunction

  // full NTRU decryption of e with private key (f, fp), modulus q
  function automatic poly_t ref_decrypt(input poly_t f, input poly_t fp, input poly_t e,
                                    input int n, input int q);
    poly_t a = conv(f, e, n, q);
    poly_t b = new[n];
    poly_t c;
    foreach (a[i]) b[i] = modp((a[i] > q / 2) ? a[i] - q : a[i], 3);
    c = conv(fp, b, n, 3);
    foreach (c[i]) if (c[i] == 2) c[i] = -1;
    return c;
  endfunction

  // Inverse of f in Z_p[x]/(x^n - 1) for a prime p, by Gauss-Jordan elimination
  // on the circulant matrix of f (column j of the matrix is f shifted by j).
  // Returns 0 when f is not invertible.
  function automatic bit invert_mod_prime(input poly_t f, input int n, input int p, output poly_t inv);
    int a[][];
    a = new[n];
    foreach (a[i]) begin
      a[i] = new[n + 1];
      for (int j = 0; j < n; j++) a[i][j] = modp(f[modp(i - j, n)], p);
      a[i][n] = (i == 0) ? 1 : 0;
    end
    for (int col = 0; col < n; col++) begin
      int piv, pinv;
      int tmp[];
      piv = -1;
      for (int r = col; r < n && piv < 0; r++) if (a[r][col] != 0) piv = r;
      if (piv < 0) return 0;
      tmp = a[piv]; a[piv] = a[col]; a[col] = tmp;
      pinv = 1;
      while (modp(pinv * a[col][col], p) != 1) pinv++;
      for (int k = col; k <= n; k++) a[col][k] = modp(a[col][k] * pinv, p);
      for (int r = 0; r < n; r++) begin
        if (r != col && a[r][col] != 0) begin
          int fac = a[r][col];
          for (int k = col; k <= n; k++) a[r][k] = modp(a[r][k] - fac * a[col][k], p);
        end
      end
    end
    inv = new[n];
    foreach (inv[i]) inv[i] = a[i][n];
    return 1;
  endfunction

  // Inverse of f in Z_(2^k)[x]/(x^n - 1): inverse mod 2, then Newton steps
  // b <- b * (2 - f*b), each doubling the number of correct bits.
  function automatic bit invert_mod_pow2(input poly_t f, input int n, input int q, output poly_t inv);
    poly_t b, t;
    if (!invert_mod_prime(f, n, 2, b)) return 0;
    for (int m = 2; m < q; m = m * m) begin
      t = conv(f, b, n, q);
      foreach (t[i]) t[i] = modp(((i == 0) ? 2 : 0) - t[i], q);
      b = conv(b, t, n, q);
    end
    inv = b;
    return 1;
  endfunction

endpackage
