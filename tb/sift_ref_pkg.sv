// sift_ref_pkg: software reference model of the SIFT detector, for testbenches.
//
// Written independently of the RTL: the kernels are recomputed from the
// Gaussian formula with real arithmetic, the 2-D filter is evaluated as a
// plain double loop, and the edge test uses real-valued curvature ratios.
// Images are int arrays in raster order (index y*W + x).
package sift_ref_pkg;

  // 1-D kernel of scale j: kern[d+7] for offsets d = -7..7, summing to 1024.
  function automatic void kernel(input int j, output int kern[15]);
    real s, g[15], t;
    int  sum;
    s = 1.6 * (2.0 ** (real'(j) / 3.0));
    t = 0.0;
    for (int d = -7; d <= 7; d++) begin
      g[d+7] = $exp(-real'(d*d) / (2.0*s*s));
      t += g[d+7];
    end
    sum = 0;
    for (int d = 0; d < 15; d++) begin
      kern[d] = int'($floor(1024.0 * g[d] / t + 0.5));
      sum += kern[d];
    end
    kern[7] += 1024 - sum;
  endfunction

  // Gaussian image (8.10) of scale j; defined for centres 7..W-8, 7..H-8,
  // zero elsewhere.
  function automatic void gauss(input int img[], input int W, input int H,
                                input int j, output int g[]);
    int kern[15];
    int col[];
    kernel(j, kern);
    col = new[W*H];
    g   = new[W*H];
    foreach (col[i]) col[i] = 0;
    foreach (g[i]) g[i] = 0;
    for (int y = 7; y <= H-8; y++)
      for (int x = 0; x < W; x++) begin
        int a = 0;
        for (int d = -7; d <= 7; d++) a += kern[d+7] * img[(y+d)*W + x];
        col[y*W + x] = a;
      end
    for (int y = 7; y <= H-8; y++)
      for (int x = 7; x <= W-8; x++) begin
        longint a = 0;
        for (int d = -7; d <= 7; d++) a += longint'(kern[d+7]) * col[y*W + x + d];
        g[y*W + x] = int'(a >> 10);
      end
  endfunction

  // DoG images 0..4 of one octave: floor((G_{i+1} - G_i) / 1024).
  function automatic void dogs(input int img[], input int W, input int H,
                               output int dg[5][], output int g3[]);
    int g[6][];
    for (int j = 0; j < 6; j++) gauss(img, W, H, j, g[j]);
    for (int i = 0; i < 5; i++) begin
      dg[i] = new[W*H];
      foreach (dg[i][p]) dg[i][p] = (g[i+1][p] - g[i][p]) >>> 10;
    end
    g3 = g[3];
  endfunction

  function automatic bit ref_edge(input int w[9], input int r);
    real dxx, dyy, dxy, tr, det;
    dxx = real'(w[3] + w[5] - 2*w[4]);
    dyy = real'(w[1] + w[7] - 2*w[4]);
    dxy = real'(w[8] - w[6] - w[2] + w[0]) / 4.0;
    tr  = dxx + dyy;
    det = dxx*dyy - dxy*dxy;
    if (det <= 0.0) return 1'b1;
    return (tr*tr/det) >= (real'((r+1)*(r+1)) / real'(r));
  endfunction

  function automatic bit ref_ext(input int p[9], input int c[9], input int n[9]);
    int v = c[4];
    bit mx = 1, mn = 1;
    for (int i = 0; i < 9; i++) begin
      if (p[i] >= v || n[i] >= v || (i != 4 && c[i] >= v)) mx = 0;
      if (p[i] <= v || n[i] <= v || (i != 4 && c[i] <= v)) mn = 0;
    end
    return mx || mn;
  endfunction

  function automatic bit ref_low(input int v, input int th);
    return (v < 0 ? -v : v) <= th;
  endfunction

  // Keypoint records of one octave, raster order: each entry is
  // {x, y, hit} packed as x<<20 | y<<4 | hit. Also counts how often each
  // rejection fired on an extremum.
  function automatic void detect(input int dg[5][], input int W, input int H,
                                 input int er, input int th,
                                 output int recs[$], output int n_ext,
                                 output int n_edge_rej, output int n_low_rej);
    recs = {};
    n_ext = 0; n_edge_rej = 0; n_low_rej = 0;
    for (int y = 8; y <= H-9; y++)
      for (int x = 8; x <= W-9; x++) begin
        int hit = 0;
        for (int u = 0; u < 3; u++) begin
          int wp[9], wc[9], wn[9];
          bit e, ed, lo;
          for (int k = 0; k < 9; k++) begin
            int q = (y + k/3 - 1)*W + (x + k%3 - 1);
            wp[k] = dg[u][q]; wc[k] = dg[u+1][q]; wn[k] = dg[u+2][q];
          end
          e  = ref_ext(wp, wc, wn);
          ed = ref_edge(wc, er);
          lo = ref_low(wc[4], th);
          if (e) n_ext++;
          if (e && ed) n_edge_rej++;
          if (e && lo) n_low_rej++;
          if (e && !ed && !lo) hit |= (1 << u);
        end
        if (hit != 0) recs.push_back((x << 20) | (y << 4) | hit);
      end
  endfunction

  // Octave-1 source: Gaussian image 3 at centres 7, 9, ... floored to 8 bits.
  function automatic void downsample(input int g3[], input int W, input int H,
                                     output int img1[], output int W1, output int H1);
    W1 = (W - 13) / 2;
    H1 = (H - 13) / 2;
    img1 = new[W1*H1];
    for (int y = 0; y < H1; y++)
      for (int x = 0; x < W1; x++)
        img1[y*W1 + x] = g3[(7 + 2*y)*W + 7 + 2*x] >> 10;
  endfunction

endpackage
