// Reference model of the fixed-width Booth multiplier, for the testbenches.
//
// It is written arithmetically, not bit by bit like the RTL. For each row i
// the Booth digit d_i comes from the multiplier triplet. The row's bit
// pattern is d_i*A - neg_i, the one's complement of |d_i|*A when the row is
// negated. The exact product P = A*B is split into the cut-off part L
// (columns below n-w: row bits and negation bits) and the rest. The index
// theta counts the row bits in column n-w-1. The fixed-width result is
// floor((P - L + (theta + K) * 2^(n-w)) / 2^n), where K = K1 if theta = 0,
// else K2. For comparison it also gives direct truncation, which drops every
// partial-product bit below column n and adds no bias.
package fwbooth_ref_pkg;

  typedef struct {
    longint exact;      // A*B
    longint result;     // fixed-width product (signed, n bits wide)
    longint trunc;      // direct truncation: columns below n dropped, no bias
    int     theta;      // index value
    int     n_neg;      // rows with negative digit
    int     n_two;      // rows with |digit| = 2
    int     n_negzero;  // rows with the triplet 111 (-0)
  } ref_t;

  function automatic ref_t ref_fw(longint sa, longint sb, int n, int w, int k1, int k2);
    ref_t   r;
    longint low, low_n, ub, s, pat;
    int     lo_col, tcol;
    longint kc;
    lo_col = n - w;
    tcol   = n - w - 1;
    ub     = sb & ((longint'(1) << n) - 1);
    low    = 0;
    low_n  = 0;
    r.theta = 0; r.n_neg = 0; r.n_two = 0; r.n_negzero = 0;
    r.exact = sa * sb;
    for (int i = 0; i < n / 2; i++) begin
      int     bl, bm, bh, d, neg;
      longint placed;
      bl  = (i == 0) ? 0 : int'((ub >> (2*i - 1)) & 1);
      bm  = int'((ub >> (2*i)) & 1);
      bh  = int'((ub >> (2*i + 1)) & 1);
      d   = bl + bm - 2 * bh;
      neg = (bh == 1 && !(bm == 1 && bl == 1)) ? 1 : 0;
      if (d < 0) r.n_neg++;
      if (d == 2 || d == -2) r.n_two++;
      if (bh == 1 && bm == 1 && bl == 1) r.n_negzero++;
      pat    = longint'(d) * sa - longint'(neg);
      placed = pat << (2*i);
      low   += placed & ((longint'(1) << lo_col) - 1);
      if (2*i < lo_col) low += longint'(neg) << (2*i);
      low_n += (placed & ((longint'(1) << n) - 1)) + (longint'(neg) << (2*i));
      if (2*i <= tcol) r.theta += int'((placed >> tcol) & 1);
    end
    kc = (r.theta == 0) ? longint'(k1) : longint'(k2);
    kc += longint'(r.theta);
    s  = r.exact - low + (kc << lo_col);
    r.result = s >>> n;
    r.trunc  = (r.exact - low_n) >>> n;
    return r;
  endfunction

endpackage
