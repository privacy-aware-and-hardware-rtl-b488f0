// Testbench-side key generation for the kNN authentication scheme.
//
// The registration authority's key generation is host software, not part of
// the hardware; this package reproduces it in the simulator's double
// arithmetic so testbenches can load consistent keys.  Matrices are flat
// arrays of N*N reals, element (r, c) at r*N + c.
//   RA key:    K1 = m1*n1, K2 = m1*n2, K3 = m2*n3, K4 = m2*n4
//   drone key: D1 = n1^-1*m', D2 = n2^-1*m'', D3 = n3^-1*m''', D4 = n4^-1*m''''
// with m1, m2, n1..n4 random in 0.01..1, m' random and m'' = m1^-1 - m',
// m''' random and m'''' = m2^-1 - m'''.  Inverses by Gauss-Jordan elimination
// with partial pivoting.
package knn_keygen_pkg;

  typedef real rmat_t [];

  function automatic real rnd01();
    return 0.01 + 0.99 * (($urandom % 1000000) / 1000000.0);
  endfunction

  function automatic rmat_t rand_mat(int n);
    rmat_t m = new[n * n];
    for (int i = 0; i < n * n; i++) m[i] = rnd01();
    return m;
  endfunction

  function automatic rmat_t mat_mul(rmat_t a, rmat_t b, int n);
    rmat_t c = new[n * n];
    for (int r = 0; r < n; r++)
      for (int k = 0; k < n; k++) begin
        real acc = 0.0;
        for (int j = 0; j < n; j++) acc += a[r * n + j] * b[j * n + k];
        c[r * n + k] = acc;
      end
    return c;
  endfunction

  function automatic rmat_t mat_sub(rmat_t a, rmat_t b, int n);
    rmat_t c = new[n * n];
    for (int i = 0; i < n * n; i++) c[i] = a[i] - b[i];
    return c;
  endfunction

  function automatic rmat_t mat_inv(rmat_t a_in, int n);
    rmat_t a = new[n * n];
    rmat_t x = new[n * n];
    for (int i = 0; i < n * n; i++) begin
      a[i] = a_in[i];
      x[i] = (i / n == i % n) ? 1.0 : 0.0;
    end
    for (int c = 0; c < n; c++) begin
      int  p = c;
      real best = (a[c * n + c] < 0) ? -a[c * n + c] : a[c * n + c];
      for (int r = c + 1; r < n; r++) begin
        real v = (a[r * n + c] < 0) ? -a[r * n + c] : a[r * n + c];
        if (v > best) begin best = v; p = r; end
      end
      if (p != c)
        for (int k = 0; k < n; k++) begin
          real t;
          t = a[c * n + k]; a[c * n + k] = a[p * n + k]; a[p * n + k] = t;
          t = x[c * n + k]; x[c * n + k] = x[p * n + k]; x[p * n + k] = t;
        end
      begin
        real piv = a[c * n + c];
        for (int k = 0; k < n; k++) begin
          a[c * n + k] = a[c * n + k] / piv;
          x[c * n + k] = x[c * n + k] / piv;
        end
      end
      for (int r = 0; r < n; r++)
        if (r != c) begin
          real f = a[r * n + c];
          if (f != 0.0)
            for (int k = 0; k < n; k++) begin
              a[r * n + k] = a[r * n + k] - f * a[c * n + k];
              x[r * n + k] = x[r * n + k] - f * x[c * n + k];
            end
        end
    end
    return x;
  endfunction

  // System secret: the RA's six matrices and the inverses of m1, m2.
  class knn_secret;
    int    n;
    rmat_t m1, m2, n1, n2, n3, n4;
    rmat_t m1i, m2i, n1i, n2i, n3i, n4i;
    rmat_t ra [4];

    function new(int n_id);
      n  = n_id;
      m1 = rand_mat(n); m2 = rand_mat(n);
      n1 = rand_mat(n); n2 = rand_mat(n); n3 = rand_mat(n); n4 = rand_mat(n);
      m1i = mat_inv(m1, n); m2i = mat_inv(m2, n);
      n1i = mat_inv(n1, n); n2i = mat_inv(n2, n);
      n3i = mat_inv(n3, n); n4i = mat_inv(n4, n);
      ra[0] = mat_mul(m1, n1, n); ra[1] = mat_mul(m1, n2, n);
      ra[2] = mat_mul(m2, n3, n); ra[3] = mat_mul(m2, n4, n);
    endfunction

    // A fresh, drone-specific key (new random splits of m1^-1 and m2^-1).
    function void drone_key(output rmat_t d [4]);
      rmat_t ma, mb, mc, md;
      ma = rand_mat(n); mb = mat_sub(m1i, ma, n);
      mc = rand_mat(n); md = mat_sub(m2i, mc, n);
      d[0] = mat_mul(n1i, ma, n); d[1] = mat_mul(n2i, mb, n);
      d[2] = mat_mul(n3i, mc, n); d[3] = mat_mul(n4i, md, n);
    endfunction
  endclass

endpackage
