// Reference models used by the testbenches: the tile filter and the
// projections written out directly on a full ring of tiles, plus a check
// that no cluster is lost by the filter.
package cc_ref_pkg;

  typedef int grid_t [16][48];

  // Filter a ring of rows x cols tile levels (phi wraps, theta does not).
  function automatic void ring_filter(input int rows, input int cols,
                                      input grid_t g, output grid_t out);
    grid_t s1;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        bit higher = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            int rr, cc;
            rr = r + dr;
            cc = (c + dc + cols) % cols;
            if ((dr != 0 || dc != 0) && rr >= 0 && rr < rows && g[rr][cc] > g[r][c])
              higher = 1;
          end
        s1[r][c] = higher ? 0 : g[r][c];
      end
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        int v;
        bit tie = 0;
        v = s1[r][c];
        if (v != 0) begin
          if (c != cols - 1 && s1[r][c+1] == v) tie = 1;
          if (r + 1 < rows) begin
            if (s1[r+1][(c + cols - 1) % cols] == v) tie = 1;
            if (s1[r+1][c] == v) tie = 1;
            if (s1[r+1][(c + 1) % cols] == v) tie = 1;
          end
        end
        out[r][c] = tie ? 0 : v;
      end
  endfunction

  // Number of clusters (8-connected groups of non-zero tiles) whose
  // highest level does not survive in f. Zero means nothing was lost.
  function automatic int lost_clusters(int rows, int cols, grid_t g, grid_t f);
    grid_t lab;
    int nlab = 0, lost = 0;
    int qr[$], qc[$];
    for (int r = 0; r < rows; r++) for (int c = 0; c < cols; c++) lab[r][c] = 0;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++)
        if (g[r][c] != 0 && lab[r][c] == 0) begin
          int mx = 0;
          bit kept = 0;
          int mr[$], mc[$];
          nlab++;
          lab[r][c] = nlab;
          qr.push_back(r); qc.push_back(c);
          while (qr.size() > 0) begin
            int cr, ccol;
            cr = qr.pop_front(); ccol = qc.pop_front();
            mr.push_back(cr); mc.push_back(ccol);
            if (g[cr][ccol] > mx) mx = g[cr][ccol];
            for (int dr = -1; dr <= 1; dr++)
              for (int dc = -1; dc <= 1; dc++) begin
                int rr, cc;
                rr = cr + dr;
                cc = (ccol + dc + cols) % cols;
                if (rr >= 0 && rr < rows && g[rr][cc] != 0 && lab[rr][cc] == 0) begin
                  lab[rr][cc] = nlab;
                  qr.push_back(rr); qc.push_back(cc);
                end
              end
          end
          foreach (mr[i]) if (f[mr[i]][mc[i]] == mx) kept = 1;
          if (!kept) lost++;
        end
    return lost;
  endfunction

  function automatic logic [1:0] to_gray(int lvl);
    case (lvl)
      1: return 2'b01;
      2: return 2'b11;
      3: return 2'b10;
      default: return 2'b00;
    endcase
  endfunction

  // count of level l (1..3) in rows r0..r1, cols c0..c1 of f
  function automatic int count_lvl(grid_t f, int l, int r0, int r1, int c0, int c1);
    int n = 0;
    for (int r = r0; r <= r1; r++)
      for (int c = c0; c <= c1; c++)
        if (f[r][c] == l) n++;
    return n;
  endfunction

  // random tile map with a few clusters of mixed levels
  function automatic void random_map(input int rows, input int cols, input int nclust,
                                     output grid_t g);
    for (int r = 0; r < rows; r++) for (int c = 0; c < cols; c++) g[r][c] = 0;
    for (int k = 0; k < nclust; k++) begin
      int r0, c0, h, w, base;
      r0 = $urandom_range(0, rows - 1);
      c0 = $urandom_range(0, cols - 1);
      h = $urandom_range(1, 3);
      w = $urandom_range(1, 3);
      base = $urandom_range(1, 3);
      for (int r = r0; r < r0 + h && r < rows; r++)
        for (int dc = 0; dc < w; dc++) begin
          int lv;
          lv = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : base;
          g[r][(c0 + dc) % cols] = lv;
        end
    end
  endfunction

endpackage
