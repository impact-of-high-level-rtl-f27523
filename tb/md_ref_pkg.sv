// Reference models used by the testbenches, written independently of the
// RTL with plain integers: one Sigma-Delta pixel step and a direct 3x3
// min/max filter that treats pixels outside the image as the neutral
// element of the operator.
package md_ref_pkg;
  typedef int img_t[];

  // One Sigma-Delta step. Returns M, V and the label through outputs.
  function automatic void sd_ref(input int n, input int vinit, input bit init,
                                 input int i, input int m, input int v,
                                 output int mn, output int vn, output int e);
    int o, tgt;
    if (init) begin
      mn = i; vn = vinit; e = 0;
      return;
    end
    mn = m;
    if (m < i) mn = m + 1;
    else if (m > i) mn = m - 1;
    o = (mn > i) ? mn - i : i - mn;
    tgt = n * o;
    if (tgt > 255) tgt = 255;
    vn = v;
    if (v < tgt) vn = v + 1;
    else if (v > tgt) vn = v - 1;
    e = (o < vn) ? 0 : 1;
  endfunction

  // 3x3 erosion (dilate = 0) or dilation (dilate = 1); maxval is the
  // largest pixel value (the neutral element of the erosion).
  function automatic img_t morph_ref(input img_t src, input int w, input int h,
                                     input bit dilate, input int maxval);
    img_t dst = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int acc = dilate ? 0 : maxval;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            int xx = x + dx, yy = y + dy, p;
            if (xx < 0 || yy < 0 || xx >= w || yy >= h) p = dilate ? 0 : maxval;
            else p = src[yy * w + xx];
            if (dilate) acc = (p > acc) ? p : acc;
            else        acc = (p < acc) ? p : acc;
          end
        dst[y * w + x] = acc;
      end
    return dst;
  endfunction
endpackage
