// tb_arb_ref_pkg -- reference models for the testbenches of the symmetric
// crossbar arbiters.
//
// The models do not use the cell array. They walk the arbitration wave as a
// sequential program: keep a free flag per row and per column, visit the
// crosspoints wave by wave in order of distance from the priority start, and
// grant each requested crosspoint of an unblocked column whose row and
// column are still free. Crosspoints in one wave lie in distinct rows and
// columns, so the order inside a wave does not matter.
//
// Matrices are passed flattened: bit i*n + j is crosspoint (row i, col j),
// which is the bit layout of a packed [n-1:0][n-1:0] array. n <= 8.
package tb_arb_ref_pkg;

  typedef logic [63:0] mat_t;

  // Wave front arbitration with the top priority at (top_row, top_col).
  function automatic mat_t ref_wfa(mat_t req, logic [7:0] opb, int n,
                                   int top_row, int top_col);
    bit row_free[8], col_free[8];
    mat_t gnt = '0;
    for (int k = 0; k < n; k++) begin row_free[k] = 1; col_free[k] = 1; end
    for (int w = 0; w <= 2 * n - 2; w++) begin
      for (int a = 0; a < n; a++) begin
        int b = w - a;
        if (b >= 0 && b < n) begin
          int i = (top_row + a) % n;
          int j = (top_col + b) % n;
          if (req[i*n+j] && !opb[j] && row_free[i] && col_free[j]) begin
            gnt[i*n+j] = 1'b1;
            row_free[i] = 0;
            col_free[j] = 0;
          end
        end
      end
    end
    return gnt;
  endfunction

  // Wrapped wave front arbitration with priority diagonal k, the cells with
  // (i + j) mod n == k.
  function automatic mat_t ref_wwfa(mat_t req, logic [7:0] opb, int n, int k);
    bit row_free[8], col_free[8];
    mat_t gnt = '0;
    for (int m = 0; m < n; m++) begin row_free[m] = 1; col_free[m] = 1; end
    for (int w = 0; w < n; w++) begin
      for (int i = 0; i < n; i++) begin
        int j = (k + w - i + 2 * n) % n;
        if (req[i*n+j] && !opb[j] && row_free[i] && col_free[j]) begin
          gnt[i*n+j] = 1'b1;
          row_free[i] = 0;
          col_free[j] = 0;
        end
      end
    end
    return gnt;
  endfunction

  // 1 if no row and no column holds two grants.
  function automatic bit is_legal(mat_t gnt, int n);
    for (int k = 0; k < n; k++) begin
      int rc = 0, cc = 0;
      for (int m = 0; m < n; m++) begin
        rc += gnt[k*n+m];
        cc += gnt[m*n+k];
      end
      if (rc > 1 || cc > 1) return 0;
    end
    return 1;
  endfunction

  // 1 if no requested crosspoint of an unblocked column is left with both
  // its row and its column free.
  function automatic bit is_maximal(mat_t req, mat_t gnt, logic [7:0] opb, int n);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (req[i*n+j] && !opb[j] && !gnt[i*n+j]) begin
          bit rf = 1, cf = 1;
          for (int m = 0; m < n; m++) begin
            if (gnt[i*n+m]) rf = 0;
            if (gnt[m*n+j]) cf = 0;
          end
          if (rf && cf) return 0;
        end
    return 1;
  endfunction

  function automatic int popcount(mat_t v);
    int c = 0;
    for (int b = 0; b < 64; b++) c += v[b];
    return c;
  endfunction

endpackage
