// modsq_pkg -- shared constants and elaboration-time functions for the
// modulo 2^n-1 squarers.
//
// The functions below count, column by column, the partial-product bits that
// the two squarer architectures place in their n-bit wide matrices. The
// matrix generators (nonenc_ppm, booth_ppm) walk their bits in exactly the
// same order, so the height returned here is the number of rows they fill.
// The counts reproduce the bit totals and maximum column heights that the
// architectures are known to give for n = 4 ... 128.
//
// Column arithmetic: a bit of weight 2^w in the squaring matrix lands in
// column w mod n, because 2^n = 1 modulo 2^n-1.
package modsq_pkg;

  // Largest operand width the counting functions handle.
  localparam int unsigned MAX_N = 256;

  // Non-encoded squarer: is triplet i formed?
  // A triplet merges a_i*~a_{i-1} (weight 2i) with a_{i-1}a_{i-2} and
  // a_i a_{i-2} (weight 2i-1). For n = 4 the products a_i a_{i-2} coincide
  // in pairs (distance 2 = n-2), so only two triplets (i = 2, 3) are formed.
  function automatic bit nonenc_has_triplet(int n, int i);
    return (n != 4) || (i >= 2);
  endfunction

  // Non-encoded squarer: is the folded product a_i a_j (i < j) left as a
  // plain partial-product bit? Distances 1 and n-1 are absorbed by the
  // a_i + a_i a_{i-1} recoding, distances 2 and n-2 by the triplets.
  function automatic bit nonenc_keep_product(int n, int i, int j);
    int d;
    d = j - i;
    return !(d == 1 || d == 2 || d == n - 2 || d == n - 1);
  endfunction

  // Column heights of the non-encoded matrix; returns the maximum
  // (what = 0) or the total number of bits (what = 1).
  function automatic int nonenc_stat(int n, int what);
    int cnt[MAX_N];
    int h, tot;
    for (int c = 0; c < MAX_N; c++) cnt[c] = 0;
    for (int i = 0; i < n; i++) begin
      if (nonenc_has_triplet(n, i)) begin
        cnt[(2 * i) % n]++;               // c_{i,i-1,i-2}
        cnt[(2 * i - 1 + n) % n]++;       // s_{i,i-1,i-2}
      end
    end
    for (int i = 0; i < n; i++) begin
      if (!nonenc_has_triplet(n, i)) cnt[(2 * i) % n]++;            // a_i ~a_{i-1}
      if (!nonenc_has_triplet(n, (i + 1) % n)) cnt[(2 * i + 1) % n]++; // a_i a_{i-1}
    end
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++)
        if (nonenc_keep_product(n, i, j)) cnt[(i + j + 1) % n]++;
    h = 0;
    tot = 0;
    for (int c = 0; c < n; c++) begin
      tot += cnt[c];
      if (cnt[c] > h) h = cnt[c];
    end
    return (what == 0) ? h : tot;
  endfunction

  function automatic int nonenc_height(int n);
    return nonenc_stat(n, 0);
  endfunction

  function automatic int nonenc_bits(int n);
    return nonenc_stat(n, 1);
  endfunction

  // Column heights of the Booth-folded matrix (n even): C_i bits at
  // weights 4i and 4i+2, the non-sign bits of P_i from weight 4i+3 up,
  // and one merged correction word that fills every column once.
  function automatic int booth_stat(int n, int what);
    int cnt[MAX_N];
    int h, tot, m;
    m = n / 2;
    for (int c = 0; c < MAX_N; c++) cnt[c] = 0;
    for (int i = 0; i < m; i++) begin
      cnt[(4 * i) % n]++;
      cnt[(4 * i + 2) % n]++;
    end
    for (int i = 0; i < m - 1; i++)
      for (int j = 0; j < n - 2 * i - 2; j++)
        cnt[(4 * i + 3 + j) % n]++;
    for (int c = 0; c < n; c++) cnt[c]++;
    h = 0;
    tot = 0;
    for (int c = 0; c < n; c++) begin
      tot += cnt[c];
      if (cnt[c] > h) h = cnt[c];
    end
    return (what == 0) ? h : tot;
  endfunction

  function automatic int booth_height(int n);
    return booth_stat(n, 0);
  endfunction

  function automatic int booth_bits(int n);
    return booth_stat(n, 1);
  endfunction

  // Carry-save reduction: rows left after one level of 3:2 compressors.
  function automatic int csa_next(int r);
    return 2 * (r / 3) + (r % 3);
  endfunction

  // Rows present at level l of a reduction that starts with r rows.
  function automatic int csa_rows_at(int r, int l);
    int x;
    x = r;
    for (int k = 0; k < l; k++) x = csa_next(x);
    return x;
  endfunction

  // Number of 3:2 levels needed to bring r rows down to two.
  function automatic int csa_levels(int r);
    int x, l;
    x = r;
    l = 0;
    while (x > 2) begin
      x = csa_next(x);
      l++;
    end
    return l;
  endfunction

endpackage
