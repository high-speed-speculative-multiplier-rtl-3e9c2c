// spec_mult_pkg: shape of the partial-product matrix (PPM) of an N x N
// unsigned multiplier after partial-product recoding.
//
// Column k of the PPM holds the products a_i*b_j with i+j = k. In a recoded
// column (RC_LO <= k <= RC_HI) every pair a_i*b_j, a_j*b_i with i < j is
// replaced by A_ij = a_i*b_j AND a_j*b_i and O_ij = a_i*b_j OR a_j*b_i; the
// diagonal product a_{k/2}*b_{k/2} (k even) stays as it is. The O terms and
// the un-recoded products stay in the carry-save matrix ("kept" bits); the
// A terms of a column all go to one (m:2) speculative counter, m being the
// number of pairs of that column. These constant functions give the sizes so
// that every module lays out the same matrix the same way.
package spec_mult_pkg;

  // lowest multiplicand index i present in column k
  function automatic int col_lo(int k, int n);
    return (k > n - 1) ? k - (n - 1) : 0;
  endfunction

  // highest multiplicand index i present in column k
  function automatic int col_hi(int k, int n);
    return (k < n - 1) ? k : n - 1;
  endfunction

  // number of partial products a_i*b_j in column k
  function automatic int pp_count(int k, int n);
    if (k < 0 || k > 2 * n - 2) return 0;
    return col_hi(k, n) - col_lo(k, n) + 1;
  endfunction

  function automatic bit is_recoded(int k, int rc_lo, int rc_hi);
    return (k >= rc_lo) && (k <= rc_hi);
  endfunction

  // number of (i<j) pairs in column k
  function automatic int pair_count(int k, int n);
    return pp_count(k, n) / 2;
  endfunction

  // number of A terms, i.e. the size m of the column's speculative counter
  function automatic int a_count(int k, int n, int rc_lo, int rc_hi);
    return is_recoded(k, rc_lo, rc_hi) ? pair_count(k, n) : 0;
  endfunction

  // bits of column k that stay in the matrix: O terms plus diagonal, or all
  // products of a column that is not recoded
  function automatic int kept_count(int k, int n, int rc_lo, int rc_hi);
    return pp_count(k, n) - a_count(k, n, rc_lo, rc_hi);
  endfunction

  // largest kept height over all columns
  function automatic int max_kept(int n, int rc_lo, int rc_hi);
    int m = 0;
    for (int k = 0; k < 2 * n - 1; k++)
      if (kept_count(k, n, rc_lo, rc_hi) > m) m = kept_count(k, n, rc_lo, rc_hi);
    return m;
  endfunction

  // largest counter size over all columns
  function automatic int max_a(int n, int rc_lo, int rc_hi);
    int m = 0;
    for (int k = 0; k < 2 * n - 1; k++)
      if (a_count(k, n, rc_lo, rc_hi) > m) m = a_count(k, n, rc_lo, rc_hi);
    return m;
  endfunction

  // width of the correction word of an (m:2) counter, counted in units of
  // two: the largest correction is 2*((m>>1)-1), so the word holds (m>>1)-1
  function automatic int ew_width(int m);
    int v = (m >> 1) - 1;
    int w = 1;
    while ((1 << w) <= v) w++;
    return w;
  endfunction

endpackage
