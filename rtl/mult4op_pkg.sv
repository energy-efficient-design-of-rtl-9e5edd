// mult4op_pkg: elaboration-time helpers shared by the four-operand multiplier.
//
// Nothing here is hardware. The functions compute, from the operand width
// and row counts, the shape of the reduction trees:
//   * csa_next_rows / csa_levels / csa_rows_at describe the level schedule
//     of the carry-save tree (groups of four rows go through 4:2
//     compressors, a remainder of three through full adders, one or two
//     leftover rows pass through), repeated until two rows remain.
//   * col_height / col_max_height / pp4_index_at describe how the n^4
//     four-operand partial products a_i&b_j&c_k&d_l fall into columns of
//     weight i+j+k+l. For n = 4 the tallest column (weight 6) holds
//     (2n^3+n)/3 = 44 bits.
// The schedule is this design's own choice; the column heights follow
// directly from the arithmetic of the four-operand product.
package mult4op_pkg;

  // Rows left after one reduction level that starts with r rows.
  function automatic int csa_next_rows(input int r);
    int rem;
    rem = r % 4;
    return (r / 4) * 2 + ((rem == 3) ? 2 : rem);
  endfunction

  // Number of reduction levels needed to bring r rows down to two or fewer.
  function automatic int csa_levels(input int r);
    int n;
    int cur;
    n = 0;
    cur = r;
    while (cur > 2) begin
      cur = csa_next_rows(cur);
      n++;
    end
    return n;
  endfunction

  // Rows present at the input of level lvl when the tree starts with r rows.
  function automatic int csa_rows_at(input int r, input int lvl);
    int cur;
    cur = r;
    for (int i = 0; i < lvl; i++) cur = csa_next_rows(cur);
    return cur;
  endfunction

  // Number of partial products a_i&b_j&c_k&d_l (indices 0..n-1) whose
  // weight i+j+k+l equals w.
  function automatic int col_height(input int n, input int w);
    int h;
    h = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        for (int k = 0; k < n; k++)
          for (int l = 0; l < n; l++)
            if (i + j + k + l == w) h++;
    return h;
  endfunction

  // Height of the tallest column of the four-operand partial product array.
  function automatic int col_max_height(input int n);
    int m;
    m = 0;
    for (int w = 0; w <= 4 * (n - 1); w++)
      if (col_height(n, w) > m) m = col_height(n, w);
    return m;
  endfunction

  // Flat index ((i*n+j)*n+k)*n+l of the r-th partial product (in
  // enumeration order, l fastest) that falls into column w; -1 if the
  // column holds r or fewer bits.
  function automatic int pp4_index_at(input int n, input int w, input int r);
    int cnt;
    cnt = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        for (int k = 0; k < n; k++)
          for (int l = 0; l < n; l++)
            if (i + j + k + l == w) begin
              if (cnt == r) return ((i * n + j) * n + k) * n + l;
              cnt++;
            end
    return -1;
  endfunction

endpackage
