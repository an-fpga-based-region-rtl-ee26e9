// regrow_ref_pkg: software reference for the region-growing testbenches.
//
// Images are flat byte arrays, index r*cols + c (hardware address index+1).
//   init_aux   - auxiliary image: 0 on the outer border, 255 inside
//   grow_pass  - one in-place raster pass of the growing rule, visiting
//                pixels in the same order as the hardware; returns the
//                number of pixels it cleared
//   fill_ref   - the expected end result, found independently by a
//                breadth-first search: an inner background pixel is cleared
//                iff it is 4-connected, through inner background pixels, to
//                a pixel next to the border; border pixels are 0
//   gen_*      - test image generators
package regrow_ref_pkg;

  typedef byte unsigned img_t [];

  function automatic img_t init_aux(int cols, int rows);
    img_t a = new[cols * rows];
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++)
        a[r*cols + c] = (r == 0 || c == 0 || r == rows-1 || c == cols-1) ? 8'd0 : 8'd255;
    return a;
  endfunction

  function automatic int grow_pass(const ref img_t bin, ref img_t aux, input int cols, rows);
    int n = 0;
    for (int r = 1; r < rows - 1; r++)
      for (int c = 1; c < cols - 1; c++) begin
        int p = r*cols + c;
        if (aux[p] != 0 && bin[p] == 0 &&
            (aux[p-cols] == 0 || aux[p+1] == 0 || aux[p+cols] == 0 || aux[p-1] == 0)) begin
          aux[p] = 0;
          n++;
        end
      end
    return n;
  endfunction

  function automatic img_t fill_ref(const ref img_t bin, input int cols, rows);
    img_t res = new[cols * rows];
    int q [$];
    for (int p = 0; p < cols * rows; p++) res[p] = 8'd255;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++)
        if (r == 0 || c == 0 || r == rows-1 || c == cols-1) res[r*cols + c] = 8'd0;
    // seeds: inner background pixels touching the border ring
    for (int r = 1; r < rows - 1; r++)
      for (int c = 1; c < cols - 1; c++)
        if ((r == 1 || c == 1 || r == rows-2 || c == cols-2) && bin[r*cols + c] == 0) begin
          res[r*cols + c] = 8'd0;
          q.push_back(r*cols + c);
        end
    while (q.size() > 0) begin
      int p = q.pop_front();
      int r = p / cols, c = p % cols;
      int nb [4] = '{p - cols, p + 1, p + cols, p - 1};
      int nr [4] = '{r - 1, r, r + 1, r};
      int nc [4] = '{c, c + 1, c, c - 1};
      for (int k = 0; k < 4; k++)
        if (nr[k] > 0 && nr[k] < rows-1 && nc[k] > 0 && nc[k] < cols-1 &&
            bin[nb[k]] == 0 && res[nb[k]] != 0) begin
          res[nb[k]] = 8'd0;
          q.push_back(nb[k]);
        end
    end
    return res;
  endfunction

  // Random rings (objects with a hole, like particles imaged from above)
  // and random specks on an empty background.
  function automatic img_t gen_rings(int cols, rows, nrings, int unsigned seed);
    img_t b = new[cols * rows];
    int unsigned s = seed;
    for (int p = 0; p < cols * rows; p++) b[p] = 8'd0;
    for (int k = 0; k < nrings; k++) begin
      int cx, cy, ro, ri;
      s = s * 1103515245 + 12345; cx = 2 + int'((s >> 8) % (cols - 4));
      s = s * 1103515245 + 12345; cy = 2 + int'((s >> 8) % (rows - 4));
      s = s * 1103515245 + 12345; ro = 2 + int'((s >> 8) % 9);
      s = s * 1103515245 + 12345; ri = int'((s >> 8) % ro);
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < cols; c++) begin
          int d2 = (r - cy)*(r - cy) + (c - cx)*(c - cx);
          if (d2 <= ro*ro && d2 > ri*ri) b[r*cols + c] = 8'd255;
        end
    end
    for (int k = 0; k < cols * rows / 40; k++) begin
      int idx;
      s = s * 1103515245 + 12345;
      idx = int'((s >> 8) % (cols * rows));
      b[idx] = 8'd255;
    end
    return b;
  endfunction

  // A square spiral wall: the background inside it is reached only along
  // a long path that runs mostly up and left, so many passes are needed.
  function automatic img_t gen_spiral(int cols, rows);
    img_t b = new[cols * rows];
    for (int p = 0; p < cols * rows; p++) b[p] = 8'd0;
    for (int k = 0; 4*k + 3 < cols && 4*k + 3 < rows; k++) begin
      int lo_r = 2*k + 1, hi_r = rows - 2 - 2*k;
      int lo_c = 2*k + 1, hi_c = cols - 2 - 2*k;
      if (lo_r + 1 >= hi_r || lo_c + 1 >= hi_c) break;
      // wall ring at distance 2k+1, open at the top-left by one pixel
      for (int c = lo_c; c <= hi_c; c++) begin
        b[lo_r*cols + c] = 8'd255;
        b[hi_r*cols + c] = 8'd255;
      end
      for (int r = lo_r; r <= hi_r; r++) begin
        b[r*cols + lo_c] = 8'd255;
        b[r*cols + hi_c] = 8'd255;
      end
      if (k % 2 == 0) b[hi_r*cols + hi_c - 1] = 8'd0;  // gap bottom-right
      else            b[lo_r*cols + lo_c + 1] = 8'd0;  // gap top-left
    end
    return b;
  endfunction

endpackage
