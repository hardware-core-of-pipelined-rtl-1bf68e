// thin_ref_pkg: reference model of two-sub-iteration parallel thinning for
// the testbenches. Written directly from the textbook rule with plain loops
// and a copy of the image per sub-iteration, independent of the pipelined
// RTL. Images are flat arrays in raster order; pixels outside are 0.
package thin_ref_pkg;

  function automatic bit px(const ref bit img[], input int w, input int h,
                            input int r, input int c);
    if (r < 0 || r >= h || c < 0 || c >= w) return 1'b0;
    return img[r * w + c];
  endfunction

  // Does pixel (r,c) get deleted in sub-iteration 1 (sub2 = 0) or 2?
  function automatic bit zs_del(const ref bit img[], input int w, input int h,
                                input int r, input int c, input bit sub2);
    bit p[10];
    int b, a;
    if (!px(img, w, h, r, c)) return 1'b0;
    p[2] = px(img, w, h, r - 1, c);
    p[3] = px(img, w, h, r - 1, c + 1);
    p[4] = px(img, w, h, r, c + 1);
    p[5] = px(img, w, h, r + 1, c + 1);
    p[6] = px(img, w, h, r + 1, c);
    p[7] = px(img, w, h, r + 1, c - 1);
    p[8] = px(img, w, h, r, c - 1);
    p[9] = px(img, w, h, r - 1, c - 1);
    b = 0;
    a = 0;
    for (int k = 2; k <= 9; k++) begin
      b += int'(p[k]);
      if (p[k] == 1'b0 && p[(k == 9) ? 2 : k + 1] == 1'b1) a++;
    end
    if (b < 2 || b > 6 || a != 1) return 1'b0;
    if (!sub2) return !(p[2] && p[4] && p[6]) && !(p[4] && p[6] && p[8]);
    return !(p[2] && p[4] && p[8]) && !(p[2] && p[6] && p[8]);
  endfunction

  // One sub-iteration over the whole image; returns the number deleted.
  function automatic int zs_pass(ref bit img[], input int w, input int h,
                                 input bit sub2);
    bit nxt[];
    int n;
    nxt = new[w * h];
    n = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        nxt[r * w + c] = img[r * w + c];
        if (zs_del(img, w, h, r, c, sub2)) begin
          nxt[r * w + c] = 1'b0;
          n++;
        end
      end
    img = nxt;
    return n;
  endfunction

  // Thin until an iteration deletes nothing; returns iterations run
  // (the last, unchanged one included).
  function automatic int zs_thin(ref bit img[], input int w, input int h);
    int it, d;
    it = 0;
    do begin
      d = zs_pass(img, w, h, 1'b0);
      d += zs_pass(img, w, h, 1'b1);
      it++;
    end while (d != 0);
    return it;
  endfunction

  // Synthetic vein-like test frame: a few thick, roughly horizontal random
  // walks plus some filled rectangles, some of them touching the border.
  function automatic void gen_veins(ref bit img[], input int w, input int h,
                                    input int n_veins, input int n_blobs);
    img = new[w * h];
    foreach (img[i]) img[i] = 1'b0;
    for (int v = 0; v < n_veins; v++) begin
      int r = $urandom_range(0, h - 1);
      int t = $urandom_range(1, 3);
      for (int c = 0; c < w; c++) begin
        if ($urandom_range(0, 3) == 0) r += ($urandom_range(0, 1) ? 1 : -1);
        if (r < 0) r = 0;
        if (r > h - 1) r = h - 1;
        for (int k = -t; k <= t; k++)
          if (r + k >= 0 && r + k < h) img[(r + k) * w + c] = 1'b1;
      end
    end
    for (int b = 0; b < n_blobs; b++) begin
      int r0 = $urandom_range(0, h - 1), c0 = $urandom_range(0, w - 1);
      int rh = $urandom_range(2, h / 3 + 2), cw = $urandom_range(2, w / 3 + 2);
      for (int r = r0; r < r0 + rh && r < h; r++)
        for (int c = c0; c < c0 + cw && c < w; c++) img[r * w + c] = 1'b1;
    end
  endfunction

endpackage
