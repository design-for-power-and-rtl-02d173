// Package mult_pkg: the shared sizes and the elaboration-time bookkeeping of the
// speculative multiplier.
//
// The multiplier's structure is fixed by three numbers: the operand width N and the
// first and last recoded column of the partial-product matrix (RLO..RHI). Everything
// else (how many bits each column of each carry-save tree holds, how many full-adder
// levels a tree needs, which row a given bit lands in) follows from them and is
// computed here by constant functions, so that the RTL modules can build their
// structure with generate loops. Nothing in this package is hardware by itself.
//
// Column heights are carried as a packed vector hvec_t of 8-bit counts, one per
// column, which limits a tree to MAXW columns of at most 255 bits each.
package mult_pkg;

  localparam int unsigned MAXW = 64;
  typedef logic [MAXW-1:0][7:0] hvec_t;

  // ---------------------------------------------------------------- PPM shape
  // Lowest and highest row index i of partial products a_i,j with i+j == c.
  function automatic int pp_ilo(int c, int n);
    return (c - n + 1 > 0) ? c - n + 1 : 0;
  endfunction

  function automatic int pp_ihi(int c, int n);
    return (c < n - 1) ? c : n - 1;
  endfunction

  // Number of partial products in column c of an n x n matrix.
  function automatic int pp_total(int c, int n);
    return (c > 2 * n - 2 || c < 0) ? 0 : pp_ihi(c, n) - pp_ilo(c, n) + 1;
  endfunction

  // Number of pairs (a_i,j , a_j,i) with i < j in column c.
  function automatic int pp_pairs(int c, int n);
    int k = 0;
    for (int i = pp_ilo(c, n); i <= pp_ihi(c, n); i++)
      if (i < c - i) k++;
    return k;
  endfunction

  function automatic bit is_recoded(int c, int rlo, int rhi);
    return (c >= rlo) && (c <= rhi);
  endfunction

  // Bits column c sends straight to the speculative tree (a_i,j, O_i,j, a_i,i).
  function automatic int pp_height(int c, int n, int rlo, int rhi);
    return is_recoded(c, rlo, rhi) ? pp_total(c, n) - pp_pairs(c, n) : pp_total(c, n);
  endfunction

  // Number of A_i,j terms of column c, i.e. the m of its (m:2) counter (0: none).
  function automatic int and_count(int c, int n, int rlo, int rhi);
    return (c >= 0 && is_recoded(c, rlo, rhi)) ? pp_pairs(c, n) : 0;
  endfunction

  // Width of a correction block's EW output; 0 when an m-input counter cannot be
  // wrong (m <= 3).
  function automatic int ew_width(int m);
    return (m >= 4) ? $clog2(m / 2) : 0;
  endfunction

  // ---------------------------------------------------------------- tree 1
  // Column c holds its direct bits, the S of its own counter and the C of the
  // counter one column below.
  function automatic hvec_t tree1_heights(int n, int rlo, int rhi);
    hvec_t h = '0;
    for (int c = 0; c < 2 * n; c++)
      h[c] = 8'(pp_height(c, n, rlo, rhi)
                + ((and_count(c, n, rlo, rhi) >= 1) ? 1 : 0)
                + ((and_count(c - 1, n, rlo, rhi) >= 2) ? 1 : 0));
    return h;
  endfunction

  // ---------------------------------------------------------------- tree 2
  // Row of column cc+1+k in the correction tree that takes bit k of the EW word of
  // column cc. Rows 0 and 1 hold the two rows of the speculative tree.
  function automatic int ew_row(int cc, int k, int n, int rlo, int rhi);
    int r = 2;
    for (int d = 0; d < cc; d++)
      for (int q = 0; q < ew_width(and_count(d, n, rlo, rhi)); q++)
        if (d + 1 + q == cc + 1 + k) r++;
    return r;
  endfunction

  function automatic hvec_t tree2_heights(int n, int rlo, int rhi);
    hvec_t h = '0;
    for (int c = 0; c < 2 * n; c++) h[c] = 8'd2;
    for (int d = 0; d < 2 * n; d++)
      for (int q = 0; q < ew_width(and_count(d, n, rlo, rhi)); q++)
        if (d + 1 + q < 2 * n) h[d + 1 + q] = h[d + 1 + q] + 8'd1;
    return h;
  endfunction

  // Number of correction blocks (counters that can mispredict).
  function automatic int num_corr(int n, int rlo, int rhi);
    int k = 0;
    for (int c = 0; c < 2 * n; c++)
      if (and_count(c, n, rlo, rhi) >= 4) k++;
    return k;
  endfunction

  // Plain n x n partial-product matrix heights (no recoding).
  function automatic hvec_t ppm_heights(int n);
    hvec_t h = '0;
    for (int c = 0; c < 2 * n; c++) h[c] = 8'(pp_total(c, n));
    return h;
  endfunction

  // ---------------------------------------------------------------- reduction
  // Full adders a column of height h gets in one reduction level.
  function automatic int fa_count(int h);
    return (h > 2) ? h / 3 : 0;
  endfunction

  // Heights after one level: each full adder turns three bits of column c into a
  // sum in column c and a carry in column c+1. Carries out of column w-1 are dropped
  // (the result is taken modulo 2**w).
  function automatic hvec_t next_heights(hvec_t h, int w);
    hvec_t nh = '0;
    for (int c = 0; c < w; c++) begin
      int f = fa_count(int'(h[c]));
      nh[c] = nh[c] + 8'(int'(h[c]) - 2 * f);
      if (c + 1 < w) nh[c + 1] = nh[c + 1] + 8'(f);
    end
    return nh;
  endfunction

  function automatic int col_max(hvec_t h, int w);
    int m = 0;
    for (int c = 0; c < w; c++)
      if (int'(h[c]) > m) m = int'(h[c]);
    return m;
  endfunction

  // Reduction levels needed to bring every column down to two bits.
  function automatic int num_levels(hvec_t h, int w);
    int s = 0;
    hvec_t x = h;
    while (col_max(x, w) > 2 && s < 64) begin
      x = next_heights(x, w);
      s++;
    end
    return s;
  endfunction

  function automatic hvec_t level_heights(hvec_t h, int w, int s);
    hvec_t x = h;
    for (int k = 0; k < s; k++) x = next_heights(x, w);
    return x;
  endfunction

  // Tallest column over all levels (at least 2), the row count of a tree's wiring.
  function automatic int tree_rows(hvec_t h, int w);
    int m = 2;
    hvec_t x = h;
    for (int s = 0; s <= num_levels(h, w); s++) begin
      if (col_max(x, w) > m) m = col_max(x, w);
      x = next_heights(x, w);
    end
    return m;
  endfunction

endpackage
