// canny_ref_pkg: software reference model of the block-based Canny edge
// detector, used by the testbenches to work out expected results.
//
// The model is written from the algorithm, not from the RTL: it uses
// clamped array indexing instead of a window scanner, real arithmetic for
// the equalization mapping, the variance and the interpolated
// non-maximum suppression, the recursive form of the reconstruction
// levels, and the published P1 fractions as real numbers. All arrays are
// static and sized for blocks up to MAXB x MAXB; every function takes the
// side length n of the block actually used.
package canny_ref_pkg;

  localparam int MAXB = 64;

  int img  [MAXB][MAXB];   // input pixels
  int eqp  [MAXB][MAXB];   // equalized pixels
  int gx   [MAXB][MAXB];
  int gy   [MAXB][MAXB];
  int mag  [MAXB][MAXB];
  int nms  [MAXB][MAXB];
  int edge_map [MAXB][MAXB];
  int n_uniform, n_edge, blk_cls;   // 0 smooth .. 4 strong
  int th, tl, mmin, mmax;

  function automatic int clampi(int v, int n);
    return (v < 0) ? 0 : (v >= n) ? n - 1 : v;
  endfunction

  function automatic void equalize(int n);
    int hist [256];
    int cdf [256];
    int cmin, total;
    real h;
    total = n * n;
    for (int i = 0; i < 256; i++) hist[i] = 0;
    for (int r = 0; r < n; r++) for (int c = 0; c < n; c++) hist[img[r][c]]++;
    cdf[0] = hist[0];
    for (int i = 1; i < 256; i++) cdf[i] = cdf[i-1] + hist[i];
    cmin = 0;
    for (int i = 255; i >= 0; i--) if (cdf[i] != 0) cmin = cdf[i];
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        if (total == cmin) eqp[r][c] = img[r][c];
        else begin
          h = real'(cdf[img[r][c]] - cmin) / real'(total - cmin) * 255.0;
          eqp[r][c] = $floor(h + 1e-9);
        end
      end
  endfunction

  function automatic int pe(int r, int c, int n);
    return eqp[clampi(r, n)][clampi(c, n)];
  endfunction

  function automatic void gradient(int n);
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        gx[r][c] = (pe(r-1,c+1,n) + 2*pe(r,c+1,n) + pe(r+1,c+1,n))
                 - (pe(r-1,c-1,n) + 2*pe(r,c-1,n) + pe(r+1,c-1,n));
        gy[r][c] = (pe(r+1,c-1,n) + 2*pe(r+1,c,n) + pe(r+1,c+1,n))
                 - (pe(r-1,c-1,n) + 2*pe(r-1,c,n) + pe(r-1,c+1,n));
        mag[r][c] = ((gx[r][c] < 0) ? -gx[r][c] : gx[r][c])
                  + ((gy[r][c] < 0) ? -gy[r][c] : gy[r][c]);
      end
  endfunction

  // pixel class of one equalized pixel: 0 uniform, 1 texture, 2 edge
  function automatic int pixel_class(int r, int c, int n, int tu, int te);
    int s, acc, d;
    s = 0;
    for (int i = -1; i <= 1; i++) for (int j = -1; j <= 1; j++) s += pe(r+i, c+j, n);
    // sum (9 x - S)^2 = 81 * sum (x - mean)^2 ; variance = that / (81*8)
    acc = 0;
    for (int i = -1; i <= 1; i++)
      for (int j = -1; j <= 1; j++) begin
        d = 9 * pe(r+i, c+j, n) - s;
        acc += d * d;
      end
    if (acc <= 648 * tu) return 0;
    if (acc <= 648 * te) return 1;
    return 2;
  endfunction

  function automatic void classify(int n, int tu, int te);
    real tot;
    int k;
    n_uniform = 0;
    n_edge = 0;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        k = pixel_class(r, c, n, tu, te);
        if (k == 0) n_uniform++;
        if (k == 2) n_edge++;
      end
    tot = real'(n * n);
    if (n_edge == 0) blk_cls = (real'(n_uniform) >= 307.0 * tot / 1024.0) ? 0 : 1;
    else if (real'(n_edge) < 307.0 * tot / 1024.0)
      blk_cls = (real'(n_uniform) >= 665.0 * (tot - real'(n_edge)) / 1024.0) ? 3 : 2;
    else blk_cls = 4;
  endfunction

  function automatic real p1_value(int n, int cls);
    real t [4];
    case (n)
      8:   t = '{0.0312, 0.1022, 0.2183, 0.482};
      16:  t = '{0.0307, 0.1016, 0.2616, 0.483};
      32:  t = '{0.0305, 0.1117, 0.2079, 0.485};
      128: t = '{0.0302, 0.0933, 0.2375, 0.484};
      256: t = '{0.0299, 0.0911, 0.2304, 0.489};
      default: t = '{0.0318, 0.1060, 0.2218, 0.467};
    endcase
    return (cls == 0) ? 0.0 : t[cls - 1];
  endfunction

  // thresholds from mag[] and blk_cls
  function automatic void thresholds(int n, int nl);
    int lv, cnt, target, above, diff, best_diff, best_lv;
    mmin = 1 << 30;
    mmax = 0;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        if (mag[r][c] < mmin) mmin = mag[r][c];
        if (mag[r][c] > mmax) mmax = mag[r][c];
      end
    target = $rtoi(p1_value(n, blk_cls) * real'(n * n) + 0.5);
    lv = (mmin + mmax) / 2;
    best_diff = 1 << 30;
    best_lv = lv;
    for (int i = 1; i <= nl; i++) begin
      cnt = 0;
      for (int r = 0; r < n; r++) for (int c = 0; c < n; c++) if (mag[r][c] <= lv) cnt++;
      above = n * n - cnt;
      diff = (above > target) ? above - target : target - above;
      if (diff < best_diff) begin
        best_diff = diff;
        best_lv = lv;
      end
      lv = (mmin + lv) / 2;
    end
    th = (blk_cls == 0) ? mmax : best_lv;
    tl = $rtoi($floor(real'(th) * 0.4 + 1e-9));
  endfunction

  function automatic int pm(int r, int c, int n);
    return mag[clampi(r, n)][clampi(c, n)];
  endfunction

  // interpolated magnitude at (r + t*uy, c + t*ux) for t = +-1 step
  function automatic void suppress(int n);
    real ax, ay, w, fwd, bwd, m;
    int sx, sy;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        m  = real'(mag[r][c]);
        ax = (gx[r][c] < 0) ? -real'(gx[r][c]) : real'(gx[r][c]);
        ay = (gy[r][c] < 0) ? -real'(gy[r][c]) : real'(gy[r][c]);
        sx = (gx[r][c] < 0) ? -1 : 1;
        sy = (gy[r][c] < 0) ? -1 : 1;
        if (mag[r][c] == 0) begin
          nms[r][c] = 0;
          continue;
        end
        if (ax >= ay) begin
          w   = ay / ax;
          fwd = (1.0 - w) * pm(r, c+sx, n) + w * pm(r+sy, c+sx, n);
          bwd = (1.0 - w) * pm(r, c-sx, n) + w * pm(r-sy, c-sx, n);
        end else begin
          w   = ax / ay;
          fwd = (1.0 - w) * pm(r+sy, c, n) + w * pm(r+sy, c+sx, n);
          bwd = (1.0 - w) * pm(r-sy, c, n) + w * pm(r-sy, c-sx, n);
        end
        nms[r][c] = (m >= fwd - 1e-7 && m >= bwd - 1e-7) ? mag[r][c] : 0;
      end
  endfunction

  function automatic int pn(int r, int c, int n);
    return nms[clampi(r, n)][clampi(c, n)];
  endfunction

  function automatic void hysteresis_map(int n);
    bit s;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        s = 0;
        for (int i = -1; i <= 1; i++)
          for (int j = -1; j <= 1; j++)
            if ((i != 0 || j != 0) && pn(r+i, c+j, n) > th) s = 1;
        if (nms[r][c] > th) edge_map[r][c] = 1;
        else if (nms[r][c] > tl && s) edge_map[r][c] = 1;
        else edge_map[r][c] = 0;
      end
  endfunction

  function automatic void run_all(int n, int nl, int tu, int te);
    equalize(n);
    gradient(n);
    classify(n, tu, te);
    thresholds(n, nl);
    suppress(n);
    hysteresis_map(n);
  endfunction

  // test images: kind 0 random, 1 smooth gradient ramp, 2 disc on
  // background with noise, 3 vertical stripes, 4 constant, 5 one step
  // near the left border, 6 ramp with a step at the right border, 7 two
  // gentle vertical ramps with a step between them, 8 triangle wave along
  // the rows, 9 triangle wave with a step near the lower border
  function automatic int pattern(int kind, int r, int c, int n, int seed);
    int v, d2;
    case (kind)
      0: v = $urandom % 256;
      1: v = (r * 3 + c * 2 + seed) % 256 / 4 + 100;
      2: begin
        d2 = (r - n/2) * (r - n/2) + (c - n/3) * (c - n/3);
        v = ((d2 < n * n / 9) ? 170 : 60) + ($urandom % 9);
      end
      3: v = (((c + seed) / 3) % 2 == 1) ? 200 : 40;
      5: v = (c < n / 8) ? 50 : 150;
      6: v = (r * 3 + c * 2) % 256 / 4 + 100 + ((c >= n - 2) ? 40 : 0);
      7: v = (c < n / 2) ? r : 40 + r;
      8: v = (((c % 32) < 16) ? (c % 32) : 31 - (c % 32)) * 16;
      9: v = (((c % 32) < 16) ? (c % 32) : 31 - (c % 32)) * 8 + ((r >= n - 4) ? 128 : 0);
      default: v = 90 + seed;
    endcase
    return clampi(v, 256);
  endfunction

  function automatic void make_image(int n, int kind, int seed);
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) img[r][c] = pattern(kind, r, c, n, seed);
  endfunction

endpackage
