// canny_ref_pkg: software reference of the edge detector, used by the
// testbenches to work out expected values independently of the RTL.
//
// Images are int arrays in raster order (index = row * w + col). The models
// follow the arithmetic the hardware is specified with:
//   gray   : (77 R + 150 G + 29 B) / 256, truncated
//   gauss  : (1/16)[1 2 1;2 4 2;1 2 1], truncated; border pixels copied
//   thresh : sum(A^2) / (8N), truncated
//   grad   : (|4Gx| + |4Gy|) / 4 with Gx = [-1/4 0 1/4;-1 0 1;-1/4 0 1/4],
//            Gy = [1/4 1 1/4;0 0 0;-1/4 -1 -1/4]; border pixels 0
//   edge   : grad if grad >= thresh, else 0
package canny_ref_pkg;
  typedef int img_t[];

  function automatic int gray(int r, int g, int b);
    return (77 * r + 150 * g + 29 * b) / 256;
  endfunction

  function automatic bit border(int r, int c, int w, int h);
    return r == 0 || c == 0 || r == h - 1 || c == w - 1;
  endfunction

  function automatic img_t gauss(img_t img, int w, int h);
    img_t o = new[w * h];
    int k[9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        if (border(r, c, w, h)) o[r * w + c] = img[r * w + c];
        else begin
          int s = 0;
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++)
              s += k[3 * i + j] * img[(r - 1 + i) * w + (c - 1 + j)];
          o[r * w + c] = s / 16;
        end
      end
    return o;
  endfunction

  function automatic int thresh(img_t a, int n);
    longint s = 0;
    foreach (a[i]) s += longint'(a[i]) * a[i];
    return int'(s / (8 * longint'(n)));
  endfunction

  function automatic int abs_i(int v);
    return v < 0 ? -v : v;
  endfunction

  // 4x the kernels of the specification, so all weights are integers
  function automatic int gx4(img_t a, int w, int r, int c);
    int k[9] = '{-1, 0, 1, -4, 0, 4, -1, 0, 1};
    int s = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) s += k[3 * i + j] * a[(r - 1 + i) * w + (c - 1 + j)];
    return s;
  endfunction

  function automatic int gy4(img_t a, int w, int r, int c);
    int k[9] = '{1, 4, 1, 0, 0, 0, -1, -4, -1};
    int s = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) s += k[3 * i + j] * a[(r - 1 + i) * w + (c - 1 + j)];
    return s;
  endfunction

  function automatic img_t grad(img_t a, int w, int h);
    img_t o = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        o[r * w + c] = border(r, c, w, h) ? 0
                     : (abs_i(gx4(a, w, r, c)) + abs_i(gy4(a, w, r, c))) / 4;
    return o;
  endfunction

  // Synthetic scene: dark, slightly noisy background with a few thin bright
  // lines and dots, so that the per-frame threshold stays low enough for
  // some gradients to pass it. Returns {R,G,B} words packed 8/8/8.
  function automatic img_t scene(int w, int h, int seed);
    img_t o = new[w * h];
    int vline = (seed * 5 + 3) % w;
    int hline = (seed * 3 + 2) % h;
    int bright = 120 + (seed * 37) % 136;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int v = $urandom_range(0, 12);
        int rr, gg, bb;
        if (c == vline || r == hline) v = bright;
        if ($urandom_range(0, 40) == 0) v = $urandom_range(30, 255);
        rr = v; gg = v; bb = v;
        if (v > 20) begin
          rr = (v + $urandom_range(0, 30) > 255) ? 255 : v + $urandom_range(0, 30);
          bb = (v < 30) ? 0 : v - $urandom_range(0, 30);
        end
        o[r * w + c] = (rr << 16) | (gg << 8) | bb;
      end
    return o;
  endfunction
endpackage
