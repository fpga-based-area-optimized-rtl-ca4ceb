// canny_ref_pkg: reference model of the Canny pipeline for the testbenches.
//
// Whole-image functions written from the arithmetic rules of each stage, with
// images held as dynamic arrays of int in raster order. They share nothing
// with the RTL: borders are handled by clamping or bounds checks, the square
// root uses real arithmetic, the octant choice uses explicit offsets.
package canny_ref_pkg;
  typedef int img_t[];

  // test images: 0 = uniform noise, 1 = shapes of strong and faint contrast
  // with +-1 noise, 2 = flat, 3 = the same shapes without noise
  function automatic void gen_image(input int w, input int h, input int kind, output img_t img);
    img = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int v;
        case (kind)
          0: v = $urandom % 256;
          1, 3: begin
            int dr, dc;
            dr = r - h / 2;
            dc = c - w / 3;
            v = 60;
            if (r > h / 10 && r < h / 3 && c > w / 12 && c < w / 4) v = 75;
            if (dr * dr + dc * dc < (h * h) / 9) v = 200;
            if (r > h / 5 && r < (3 * h) / 5 && c > (2 * w) / 3 && c < w - 2) v = 140;
            if (r == (4 * h) / 5) v = 110;
            if (kind == 1) v = v + int'($urandom % 3) - 1;
            if (v < 0) v = 0;
            if (v > 255) v = 255;
          end
          default: v = 77;
        endcase
        img[r * w + c] = v;
      end
  endfunction

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int px_clamp(const ref img_t img, input int w, input int h, input int r, input int c);
    return img[clampi(r, 0, h - 1) * w + clampi(c, 0, w - 1)];
  endfunction

  function automatic int px_zero(const ref img_t img, input int w, input int h, input int r, input int c);
    if (r < 0 || r >= h || c < 0 || c >= w) return 0;
    return img[r * w + c];
  endfunction

  function automatic void gauss_ref(const ref img_t img, input int w, input int h, output img_t o);
    int k[3] = '{1, 2, 1};
    o = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int s = 0;
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++)
            s += k[i] * k[j] * px_clamp(img, w, h, r + i - 1, c + j - 1);
        o[r * w + c] = (s + 8) / 16;
      end
  endfunction

  function automatic int mag_ref(input int gx, input int gy);
    int s, root, m;
    s = gx * gx + gy * gy;
    root = int'($floor($sqrt(real'(s))));
    while ((root + 1) * (root + 1) <= s) root++;
    while (root * root > s) root--;
    m = (root + 2) / 4;
    return (m > 255) ? 255 : m;
  endfunction

  function automatic void sobel_ref(const ref img_t img, input int w, input int h,
                                    output img_t gx, output img_t gy, output img_t mg);
    int k[3] = '{1, 2, 1};
    gx = new[w * h];
    gy = new[w * h];
    mg = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int sx = 0, sy = 0;
        for (int i = 0; i < 3; i++) begin
          sx += k[i] * (px_clamp(img, w, h, r + i - 1, c + 1) - px_clamp(img, w, h, r + i - 1, c - 1));
          sy += k[i] * (px_clamp(img, w, h, r + 1, c + i - 1) - px_clamp(img, w, h, r - 1, c + i - 1));
        end
        gx[r * w + c] = sx;
        gy[r * w + c] = sy;
        mg[r * w + c] = mag_ref(sx, sy);
      end
  endfunction

  // Gradients with a KxK kernel: the smoothing row is [1] convolved K-1 times
  // with [1 1], the derivative row is [-1 0 1] convolved K-3 times with [1 1]. The sums are scaled by the smallest power of two that
  // keeps the largest possible gradient at or below 1020, rounding half up.
  function automatic void sobel_k_ref(const ref img_t img, input int w, input int h, input int k,
                                      output img_t gx, output img_t gy, output img_t mg);
    int s[$], d[$], t[$], pos, gmax, sh, rr;
    s = '{1};
    for (int n = 0; n < k - 1; n++) begin
      t = '{};
      for (int j = 0; j <= s.size(); j++)
        t.push_back((j < s.size() ? s[j] : 0) + (j > 0 ? s[j-1] : 0));
      s = t;
    end
    d = '{-1, 0, 1};
    for (int n = 0; n < k - 3; n++) begin
      t = '{};
      for (int j = 0; j <= d.size(); j++)
        t.push_back((j < d.size() ? d[j] : 0) + (j > 0 ? d[j-1] : 0));
      d = t;
    end
    pos = 0;
    foreach (d[j]) if (d[j] > 0) pos += d[j];
    gmax = 0;
    foreach (s[j]) gmax += s[j];
    gmax = gmax * pos * 255;
    sh = 0;
    while (gmax / (1 << sh) > 1020) sh++;
    rr = k / 2;
    gx = new[w * h];
    gy = new[w * h];
    mg = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int sx = 0, sy = 0;
        for (int i = 0; i < k; i++)
          for (int j = 0; j < k; j++) begin
            int p;
            p = px_clamp(img, w, h, r + i - rr, c + j - rr);
            sx += s[i] * d[j] * p;
            sy += d[i] * s[j] * p;
          end
        if (sh > 0) begin
          sx = int'($floor((real'(sx) + real'(1 << (sh - 1))) / real'(1 << sh)));
          sy = int'($floor((real'(sy) + real'(1 << (sh - 1))) / real'(1 << sh)));
        end
        gx[r * w + c] = sx;
        gy[r * w + c] = sy;
        mg[r * w + c] = mag_ref(sx, sy);
      end
  endfunction

  function automatic int interp_ref(input int a, input int b, input int num, input int den);
    int wt;
    wt = (den == 0) ? 0 : (num * 256) / den;
    return a * (256 - wt) + b * wt;
  endfunction

  function automatic void nms_ref(const ref img_t mg, const ref img_t gx, const ref img_t gy,
                                  input int w, input int h, output img_t o);
    o = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int p, ax, ay, sx, sy, i1, i2;
        p  = r * w + c;
        ax = (gx[p] < 0) ? -gx[p] : gx[p];
        ay = (gy[p] < 0) ? -gy[p] : gy[p];
        sx = (gx[p] < 0) ? -1 : 1;
        sy = (gy[p] < 0) ? -1 : 1;
        if (ax >= ay) begin
          i1 = interp_ref(px_zero(mg, w, h, r, c + sx), px_zero(mg, w, h, r + sy, c + sx), ay, ax);
          i2 = interp_ref(px_zero(mg, w, h, r, c - sx), px_zero(mg, w, h, r - sy, c - sx), ay, ax);
        end else begin
          i1 = interp_ref(px_zero(mg, w, h, r + sy, c), px_zero(mg, w, h, r + sy, c + sx), ax, ay);
          i2 = interp_ref(px_zero(mg, w, h, r - sy, c), px_zero(mg, w, h, r - sy, c - sx), ax, ay);
        end
        o[p] = (mg[p] * 256 >= i1 && mg[p] * 256 >= i2) ? mg[p] : 0;
      end
  endfunction

  function automatic void thr_ref(const ref img_t v, input int p1_q8, output int thh, output int thl);
    int hist[8], total, cum;
    hist  = '{default: 0};
    total = 0;
    foreach (v[i])
      if (v[i] > 0) begin
        int b = 0;
        while ((2 << b) <= v[i]) b++;
        hist[b]++;
        total++;
      end
    cum = 0;
    thh = 128;
    for (int b = 0; b < 8; b++) begin
      cum += hist[b];
      if (cum * 256 >= total * p1_q8) begin
        thh = 1 << b;
        break;
      end
    end
    thl = (thh * 102 + 128) / 256;
    if (thl < 1) thl = 1;
  endfunction

  function automatic void hyst_ref(const ref img_t v, input int w, input int h, input int thh, input int thl,
                                   output img_t e, output int n_promoted);
    e = new[w * h];
    n_promoted = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int x = v[r * w + c];
        bit is_s, is_w, nb;
        is_s = x > 0 && x >= thh;
        is_w   = x > 0 && x >= thl;
        nb = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if ((dr != 0 || dc != 0)) begin
              int y = px_zero(v, w, h, r + dr, c + dc);
              if (y > 0 && y >= thh) nb = 1;
            end
        e[r * w + c] = (is_s || (is_w && nb)) ? 1 : 0;
        if (!is_s && is_w && nb) n_promoted++;
      end
  endfunction
endpackage
