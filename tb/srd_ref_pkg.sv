// srd_ref_pkg: reference models used by the testbenches, written as plain
// integer arithmetic over whole images. Images are flat arrays, index
// y*width + x; full-colour words are {R,G,B} with R in bits 23:16.
//   ref_demosaic: Bayer sampling (B G / G R) and reconstruction from the
//     mirrored neighbourhood, as documented for the demosaicking machine.
//   ref_upscale2: separable 2x cubic up-scaling of one 8-bit channel, rows
//     first, with weights (0,1,0,0) for even and (-1/8,5/8,5/8,-1/8) for odd
//     output positions, rounding and saturation after each pass.
package srd_ref_pkg;

  function automatic int mir(int v, int n);
    if (v < 0) return -v;
    if (v > n - 1) return 2 * (n - 1) - v;
    return v;
  endfunction

  function automatic int clamp8(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // Bayer sample at (y, x), coordinates mirrored into the image
  function automatic int cfa_at(const ref int img[], input int w, int h, int y, int x);
    int my, mx, px;
    my = mir(y, h);
    mx = mir(x, w);
    px = img[my * w + mx];
    if (my % 2 == 0 && mx % 2 == 0) return px & 255;          // blue
    if (my % 2 == 1 && mx % 2 == 1) return (px >> 16) & 255;  // red
    return (px >> 8) & 255;                                   // green
  endfunction

  function automatic void ref_demosaic(input int w, int h, const ref int img[], ref int res[]);
    res = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int c, n, s, wv, e, dg, s2, e2, r, g, b;
        c  = cfa_at(img, w, h, y, x);
        n  = cfa_at(img, w, h, y - 1, x);
        s  = cfa_at(img, w, h, y + 1, x);
        wv = cfa_at(img, w, h, y, x - 1);
        e  = cfa_at(img, w, h, y, x + 1);
        s2 = cfa_at(img, w, h, y + 2, x);
        e2 = cfa_at(img, w, h, y, x + 2);
        dg = (cfa_at(img, w, h, y - 1, x - 1) + cfa_at(img, w, h, y - 1, x + 1) +
              cfa_at(img, w, h, y + 1, x - 1) + cfa_at(img, w, h, y + 1, x + 1)) / 4;
        if (y % 2 == x % 2) begin
          g = clamp8((n + s + wv + e) / 4 + ((2 * c - s2 - e2) >>> 3));
          if (y % 2 == 0) begin b = c; r = dg; end
          else            begin r = c; b = dg; end
        end else begin
          g = c;
          if (y % 2 == 0) begin r = (n + s) / 2;  b = (wv + e) / 2; end
          else            begin r = (wv + e) / 2; b = (n + s) / 2;  end
        end
        res[y * w + x] = (r << 16) | (g << 8) | b;
      end
  endfunction

  function automatic int cubic4(int p0, int p1, int p2, int p3, bit half);
    int acc;
    if (half) acc = -32 * p0 + 160 * p1 + 160 * p2 - 32 * p3;
    else      acc = 256 * p1;
    return clamp8((acc + 128) >>> 8);
  endfunction

  function automatic void ref_upscale2(input int w, int h, const ref int ch[], ref int res[]);
    int tmp[];
    tmp = new[h * 2 * w];
    res = new[4 * w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < 2 * w; x++) begin
        int l;
        l = x / 2;
        tmp[y * 2 * w + x] = cubic4(ch[y * w + mir(l - 1, w)], ch[y * w + mir(l, w)],
                                    ch[y * w + mir(l + 1, w)], ch[y * w + mir(l + 2, w)], x % 2 == 1);
      end
    for (int x = 0; x < 2 * w; x++)
      for (int y = 0; y < 2 * h; y++) begin
        int k;
        k = y / 2;
        res[y * 2 * w + x] = cubic4(tmp[mir(k - 1, h) * 2 * w + x], tmp[mir(k, h) * 2 * w + x],
                                    tmp[mir(k + 1, h) * 2 * w + x], tmp[mir(k + 2, h) * 2 * w + x],
                                    y % 2 == 1);
      end
  endfunction

endpackage
