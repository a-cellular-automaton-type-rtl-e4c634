// Reference model for the region extractor testbenches.
//
// Works on a boundary image held in dynamic arrays, independently of the RTL:
// it repeats "take the first unfired pixel in row-major order, flood-fill its
// 4-connected region by breadth-first search, mark it fired" until no unfired
// pixel is left. For each region it records the seed, the pixel set and the
// eccentricity of the seed (largest BFS distance), from which the expected
// processing time of the hardware follows:
//   total = 1 (INIT) + sum over regions (1 DETECT + ecc + 2 EXPAND
//           + rows spanned READ + 1 CLEAR) + 1 (final DETECT).
// Also holds the image generators used by the testbenches.
package ca_ref_pkg;

  class ca_region;
    int seed_r, seed_c, ecc, npix;
    bit pix[][];
    function new(int rows, int cols);
      pix = new[rows];
      foreach (pix[r]) pix[r] = new[cols];
    endfunction
    function bit has_row(int r);
      foreach (pix[r][c]) if (pix[r][c]) return 1'b1;
      return 1'b0;
    endfunction
    function int rows_spanned();
      int n = 0;
      foreach (pix[r]) if (has_row(r)) n++;
      return n;
    endfunction
    function bit at(int r, int c);
      if (r < 0 || c < 0 || r >= pix.size() || c >= pix[0].size()) return 1'b0;
      return pix[r][c];
    endfunction
    // Firing pixel with a 4-neighbour that is not in the region.
    function bit is_edge(int r, int c);
      return at(r, c) && !(at(r-1, c) && at(r+1, c) && at(r, c-1) && at(r, c+1));
    endfunction
  endclass

  class ca_ref;
    int rows, cols;
    bit bnd[][];
    ca_region regs[$];

    function new(int rows_i, int cols_i);
      rows = rows_i;
      cols = cols_i;
      bnd  = new[rows];
      foreach (bnd[r]) bnd[r] = new[cols];
    endfunction

    function void clear_img();
      foreach (bnd[r, c]) bnd[r][c] = 1'b0;
    endfunction

    function void label_image();
      bit fired[][];
      int dst[][];
      int qr[$], qc[$];
      regs.delete();
      fired = new[rows];
      dst  = new[rows];
      foreach (fired[r]) begin
        fired[r] = new[cols];
        dst[r]  = new[cols];
        foreach (fired[r][c]) fired[r][c] = bnd[r][c];
      end
      forever begin
        int sr = -1, sc = -1;
        ca_region g;
        for (int r = 0; r < rows && sr < 0; r++)
          for (int c = 0; c < cols; c++)
            if (!fired[r][c]) begin sr = r; sc = c; break; end
        if (sr < 0) break;
        g = new(rows, cols);
        g.seed_r = sr; g.seed_c = sc; g.ecc = 0; g.npix = 0;
        fired[sr][sc] = 1'b1; g.pix[sr][sc] = 1'b1; dst[sr][sc] = 0;
        qr.push_back(sr); qc.push_back(sc);
        while (qr.size() > 0) begin
          int r = qr.pop_front();
          int c = qc.pop_front();
          int nr[4] = '{r-1, r+1, r, r};
          int nc[4] = '{c, c, c-1, c+1};
          g.npix++;
          if (dst[r][c] > g.ecc) g.ecc = dst[r][c];
          for (int k = 0; k < 4; k++) begin
            if (nr[k] >= 0 && nr[k] < rows && nc[k] >= 0 && nc[k] < cols &&
                !fired[nr[k]][nc[k]]) begin
              fired[nr[k]][nc[k]] = 1'b1;
              g.pix[nr[k]][nc[k]] = 1'b1;
              dst[nr[k]][nc[k]]  = dst[r][c] + 1;
              qr.push_back(nr[k]); qc.push_back(nc[k]);
            end
          end
        end
        regs.push_back(g);
      end
    endfunction

    function int exp_cycles();
      int t = 2;
      foreach (regs[i]) t += 4 + regs[i].ecc + regs[i].rows_spanned();
      return t;
    endfunction

    // Random image: a few straight boundary lines, rectangle outlines and
    // isolated boundary pixels.
    function void gen_random(int n_lines, int n_rects, int noise_pct);
      clear_img();
      repeat (n_lines) begin
        if ($urandom_range(1) != 0) begin
          int r = $urandom_range(rows - 1);
          for (int c = 0; c < cols; c++) bnd[r][c] = 1'b1;
        end else begin
          int c = $urandom_range(cols - 1);
          for (int r = 0; r < rows; r++) bnd[r][c] = 1'b1;
        end
      end
      repeat (n_rects) begin
        int r0 = $urandom_range(rows - 1), r1 = $urandom_range(rows - 1);
        int c0 = $urandom_range(cols - 1), c1 = $urandom_range(cols - 1);
        if (r0 > r1) begin int t = r0; r0 = r1; r1 = t; end
        if (c0 > c1) begin int t = c0; c0 = c1; c1 = t; end
        for (int r = r0; r <= r1; r++) begin bnd[r][c0] = 1'b1; bnd[r][c1] = 1'b1; end
        for (int c = c0; c <= c1; c++) begin bnd[r0][c] = 1'b1; bnd[r1][c] = 1'b1; end
      end
      foreach (bnd[r, c]) if ($urandom_range(99) < noise_pct) bnd[r][c] = 1'b1;
    endfunction

    // Scene of the kind used in the FPGA experiment: the image split into
    // quadrants by a horizontal and a vertical line, plus one closed rectangle
    // in the upper right quadrant: five regions (sizes scale with the image).
    function void gen_scene();
      int hr = rows / 2, vc = cols / 3;
      int r0 = rows / 6, r1 = rows / 6 + rows / 4;
      int c0 = cols / 2, c1 = cols / 2 + cols / 4;
      clear_img();
      for (int c = 0; c < cols; c++) bnd[hr][c] = 1'b1;
      for (int r = 0; r < rows; r++) bnd[r][vc] = 1'b1;
      for (int r = r0; r <= r1; r++) begin bnd[r][c0] = 1'b1; bnd[r][c1] = 1'b1; end
      for (int c = c0; c <= c1; c++) begin bnd[r0][c] = 1'b1; bnd[r1][c] = 1'b1; end
    endfunction
  endclass

endpackage
