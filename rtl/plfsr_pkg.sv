// plfsr_pkg: GF(2) matrix arithmetic used at elaboration time to build a
// transformed p-parallel LFSR.
//
// A serial LFSR that divides u(x)*x^N by g(x) = x^N + g[N-1]x^(N-1) + ... + g[0]
// updates its state as r(t+1) = A r(t) + b u(t). Unrolled p times this becomes
// r(t+p) = A^p r(t) + Bp up(t). With a change of basis r = T rT the parallel
// update is rT(t+p) = ApT rT(t) + BpT up(t), where ApT = T^-1 A^p T and
// BpT = T^-1 Bp; the remainder is recovered once, at the end, as r = T rT.
//
// Conventions (all functions):
//   * A state vector is an N-bit packed value v with v[i] = r_i, the register
//     that holds the coefficient of x^i.  The register nearest the input
//     (r_{N-1}) is the MSB.
//   * A matrix is a mat_t; m[i][j] is row i, column j, and y = M x means
//     y[i] = XOR over j of (m[i][j] & x[j]).
//   * An input block of p bits is a packed up[p-1:0] whose MSB up[p-1] is the
//     bit that enters first.  Column k of Bp multiplies up[k], so column k is
//     A^k b.
//
// The transformation T^-1 follows the low-power construction: by default it
// is lower anti-triangular (written with r_{N-1} first) with all
// anti-diagonal entries set to 1, which makes it invertible, and each row is
// chosen on its own, by exhaustive search over its free entries, to give the
// row of BpT with the fewest ones. In this file's index order (r_0 first) the
// free entries of row i are then columns j < N-1-i. Lower triangular, upper
// triangular and upper anti-triangular formats are also offered (fmt).
// Ties keep the candidate with the smallest value. The search of one row is
// capped at TINV_SEARCH_BITS free entries (the ones nearest the
// anti-diagonal) so that elaboration stays fast for long polynomials; for
// N <= TINV_SEARCH_BITS+1 the search is exhaustive.
package plfsr_pkg;

  localparam int MAXD = 64;              // largest N or p supported
  localparam int TINV_SEARCH_BITS = 10;  // free entries searched per row of T^-1

  typedef logic [MAXD-1:0] row_t;
  typedef row_t [MAXD-1:0] mat_t;

  // The three-output sharing example: y0 = x0^x1^x2^x3^x5,
  // y1 = x0^x1^x2^x3^x4, y2 = x2^x3^x4^x5.
  function automatic mat_t ss_example();
    mat_t m;
    m = '0;
    m[0] = row_t'(6'b101111);
    m[1] = row_t'(6'b011111);
    m[2] = row_t'(6'b111100);
    return m;
  endfunction

  // Companion matrix A of g (n x n).
  function automatic mat_t companion(input row_t g, input int n);
    mat_t a;
    a = '0;
    for (int i = 0; i < n; i++) begin
      a[i][n-1] = g[i];
      if (i > 0) a[i][i-1] = 1'b1;
    end
    return a;
  endfunction

  // C = A (n x m) * B (m x k)
  function automatic mat_t mat_mul(input mat_t a, input mat_t b, input int n,
                                   input int m, input int k);
    mat_t c;
    c = '0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < k; j++) begin
        logic acc;
        acc = 1'b0;
        for (int l = 0; l < m; l++) acc ^= a[i][l] & b[l][j];
        c[i][j] = acc;
      end
    return c;
  endfunction

  // y = M (n x m) * x
  function automatic row_t mat_vec(input mat_t a, input row_t x, input int n, input int m);
    row_t y;
    y = '0;
    for (int i = 0; i < n; i++) begin
      logic acc;
      acc = 1'b0;
      for (int l = 0; l < m; l++) acc ^= a[i][l] & x[l];
      y[i] = acc;
    end
    return y;
  endfunction

  function automatic mat_t identity(input int n);
    mat_t e;
    e = '0;
    for (int i = 0; i < n; i++) e[i][i] = 1'b1;
    return e;
  endfunction

  // A^p for the companion matrix of g.
  function automatic mat_t ap_matrix(input row_t g, input int n, input int p);
    mat_t a, r;
    a = companion(g, n);
    r = identity(n);
    for (int s = 0; s < p; s++) r = mat_mul(a, r, n, n, n);
    return r;
  endfunction

  // Bp (n x p): column k is A^k b, with b = g.
  function automatic mat_t bp_matrix(input row_t g, input int n, input int p);
    mat_t a, bp;
    row_t col;
    a = companion(g, n);
    bp = '0;
    col = '0;
    for (int i = 0; i < n; i++) col[i] = g[i];
    for (int k = 0; k < p; k++) begin
      for (int i = 0; i < n; i++) bp[i][k] = col[i];
      col = mat_vec(a, col, n, n);
    end
    return bp;
  endfunction

  function automatic int popcount(input row_t v);
    int c;
    c = 0;
    for (int i = 0; i < MAXD; i++) c += int'(v[i]);
    return c;
  endfunction

  // Number of ones in the row vector (row * Bp), Bp being n x p.
  function automatic int row_weight(input row_t row, input mat_t bp, input int n, input int p);
    int w;
    w = 0;
    for (int k = 0; k < p; k++) begin
      logic acc;
      acc = 1'b0;
      for (int l = 0; l < n; l++) acc ^= row[l] & bp[l][k];
      w += int'(acc);
    end
    return w;
  endfunction

  // Formats of T^-1, named with r_{N-1} first as the matrices are usually
  // written. Every format puts 1s on one diagonal, which keeps T^-1
  // invertible, and searches the entries on one side of it.
  localparam int TINV_LOWER_ANTI = 0;   // default
  localparam int TINV_UPPER_ANTI = 1;
  localparam int TINV_LOWER      = 2;
  localparam int TINV_UPPER      = 3;

  // T^-1 chosen row by row to minimise the weight of each row of BpT.
  // In this file's index order (r_0 first) row i of each format has
  //   lower anti-triangular: 1 in column N-1-i, free columns below it
  //   upper anti-triangular: 1 in column N-1-i, free columns above it
  //   lower triangular:      1 in column i,     free columns above it
  //   upper triangular:      1 in column i,     free columns below it
  function automatic mat_t tinv_matrix(input row_t g, input int n, input int p, input int fmt);
    mat_t bp, ti;
    bp = bp_matrix(g, n, p);
    ti = '0;
    for (int i = 0; i < n; i++) begin
      int piv, lo, nfree, nsearch, shift, best_w;
      row_t best, cand;
      piv = (fmt == TINV_LOWER || fmt == TINV_UPPER) ? i : n - 1 - i;
      if (fmt == TINV_UPPER_ANTI || fmt == TINV_LOWER) begin
        lo = piv + 1;              // free columns piv+1 .. n-1
        nfree = n - 1 - piv;
      end else begin
        lo = 0;                    // free columns 0 .. piv-1
        nfree = piv;
      end
      nsearch = (nfree > TINV_SEARCH_BITS) ? TINV_SEARCH_BITS : nfree;
      // When the search is capped, search the columns nearest the diagonal.
      shift = (lo == 0) ? (nfree - nsearch) : lo;
      best = '0;
      best[piv] = 1'b1;
      best_w = row_weight(best, bp, n, p);
      for (int c = 1; c < (1 << nsearch); c++) begin
        int w;
        cand = row_t'(c) << shift;
        cand[piv] = 1'b1;
        w = row_weight(cand, bp, n, p);
        if (w < best_w) begin
          best_w = w;
          best = cand;
        end
      end
      ti[i] = best;
    end
    return ti;
  endfunction

  // Inverse over GF(2) by Gauss-Jordan elimination (m must be invertible).
  function automatic mat_t mat_inv(input mat_t m, input int n);
    mat_t a, e;
    row_t tmp;
    a = m;
    e = identity(n);
    for (int c = 0; c < n; c++) begin
      int piv;
      piv = -1;
      for (int r = n - 1; r >= c; r--) if (a[r][c]) piv = r;
      if (piv >= 0) begin
        tmp = a[c]; a[c] = a[piv]; a[piv] = tmp;
        tmp = e[c]; e[c] = e[piv]; e[piv] = tmp;
        for (int r = 0; r < n; r++)
          if (r != c && a[r][c]) begin
            a[r] = a[r] ^ a[c];
            e[r] = e[r] ^ e[c];
          end
      end
    end
    return e;
  endfunction

  // Feedback matrix ApT = T^-1 A^p T.
  function automatic mat_t apt_matrix(input row_t g, input int n, input int p, input int fmt);
    mat_t ti, t;
    ti = tinv_matrix(g, n, p, fmt);
    t = mat_inv(ti, n);
    return mat_mul(mat_mul(ti, ap_matrix(g, n, p), n, n, n), t, n, n, n);
  endfunction

  // Pre-processing matrix BpT = T^-1 Bp.
  function automatic mat_t bpt_matrix(input row_t g, input int n, input int p, input int fmt);
    return mat_mul(tinv_matrix(g, n, p, fmt), bp_matrix(g, n, p), n, n, p);
  endfunction

  // Output matrix T.
  function automatic mat_t t_matrix(input row_t g, input int n, input int p, input int fmt);
    return mat_inv(tinv_matrix(g, n, p, fmt), n);
  endfunction

endpackage
