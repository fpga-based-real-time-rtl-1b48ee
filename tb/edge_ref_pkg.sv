// edge_ref_pkg: reference model of the edge-detection pipeline for the
// testbenches.
//
// Whole frames are held as flat queues of int, row-major, with their width and
// height passed alongside. Every function works on a complete frame in plain
// arithmetic (loops over the image, a sort for the median, signed integers
// for the gradients), independently of the streaming hardware, and returns
// the frame the corresponding stage should emit: the valid (trimmed) region
// for neighbourhood operations.
package edge_ref_pkg;

  typedef int img_t[$];

  function automatic int px(const ref img_t a, input int w, input int x, input int y);
    return a[y * w + x];
  endfunction

  function automatic int gray(input int r, input int g, input int b);
    return (77 * r + 150 * g + 29 * b) / 256;
  endfunction

  function automatic void median(const ref img_t a, input int w, input int h, ref img_t o);
    int v[9];
    o = {};
    for (int y = 1; y < h - 1; y++)
      for (int x = 1; x < w - 1; x++) begin
        int k = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) v[k++] = px(a, w, x + dx, y + dy);
        v.sort();
        o.push_back(v[4]);
      end
  endfunction

  // dir: 0 = 0 deg, 1 = 45 deg, 2 = 90 deg, 3 = 135 deg.
  function automatic void sobel(const ref img_t a, input int w, input int h, input int t_sobel,
                                ref img_t mag, ref img_t dir, ref img_t sedge);
    mag = {}; dir = {}; sedge = {};
    for (int y = 1; y < h - 1; y++)
      for (int x = 1; x < w - 1; x++) begin
        int gx, gy, ax, ay, m, d;
        gx = -px(a,w,x-1,y-1) + px(a,w,x+1,y-1) - 2*px(a,w,x-1,y) + 2*px(a,w,x+1,y)
             - px(a,w,x-1,y+1) + px(a,w,x+1,y+1);
        gy = -px(a,w,x-1,y-1) - 2*px(a,w,x,y-1) - px(a,w,x+1,y-1)
             + px(a,w,x-1,y+1) + 2*px(a,w,x,y+1) + px(a,w,x+1,y+1);
        ax = gx < 0 ? -gx : gx;
        ay = gy < 0 ? -gy : gy;
        m = ax + ay;
        if (128 * ay < 53 * ax) d = 0;
        else if (128 * ay > 309 * ax) d = 2;
        else if ((gx < 0) == (gy < 0)) d = 1;
        else d = 3;
        mag.push_back(m);
        dir.push_back(d);
        sedge.push_back((m / 8) >= t_sobel ? 1 : 0);
      end
  endfunction

  function automatic void gauss(const ref img_t mag, const ref img_t dir, input int w, input int h,
                                ref img_t om, ref img_t od);
    int k[5] = '{1, 4, 6, 4, 1};
    om = {}; od = {};
    for (int y = 2; y < h - 2; y++)
      for (int x = 2; x < w - 2; x++) begin
        int s = 0;
        for (int dy = -2; dy <= 2; dy++)
          for (int dx = -2; dx <= 2; dx++) s += k[dy+2] * k[dx+2] * px(mag, w, x + dx, y + dy);
        om.push_back(s / 256);
        od.push_back(px(dir, w, x, y));
      end
  endfunction

  function automatic void nms(const ref img_t mag, const ref img_t dir, input int w, input int h,
                              ref img_t o);
    o = {};
    for (int y = 1; y < h - 1; y++)
      for (int x = 1; x < w - 1; x++) begin
        int c, n1, n2;
        c = px(mag, w, x, y);
        case (px(dir, w, x, y))
          0: begin n1 = px(mag,w,x-1,y);   n2 = px(mag,w,x+1,y);   end
          1: begin n1 = px(mag,w,x-1,y-1); n2 = px(mag,w,x+1,y+1); end
          2: begin n1 = px(mag,w,x,y-1);   n2 = px(mag,w,x,y+1);   end
          default: begin n1 = px(mag,w,x+1,y-1); n2 = px(mag,w,x-1,y+1); end
        endcase
        o.push_back((c >= n1 && c >= n2) ? c : 0);
      end
  endfunction

  // 0 none, 1 weak, 2 strong
  function automatic int classify(input int m, input int tl, input int th);
    if (m / 8 >= th) return 2;
    if (m / 8 >= tl) return 1;
    return 0;
  endfunction

  function automatic void hyst(const ref img_t c, input int w, input int h, ref img_t o,
                               ref int n_promoted, ref int n_dropped);
    o = {};
    for (int y = 1; y < h - 1; y++)
      for (int x = 1; x < w - 1; x++) begin
        int ctr = px(c, w, x, y);
        bit has_strong = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if ((dx != 0 || dy != 0) && px(c, w, x + dx, y + dy) == 2) has_strong = 1;
        if (ctr == 2) o.push_back(1);
        else if (ctr == 1 && has_strong) begin o.push_back(1); n_promoted++; end
        else begin o.push_back(0); if (ctr == 1) n_dropped++; end
      end
  endfunction

  function automatic void morph(const ref img_t e, input int w, input int h, input bit improved,
                                ref img_t o, ref int n_removed);
    o = {};
    for (int y = 1; y < h - 1; y++)
      for (int x = 1; x < w - 1; x++) begin
        int n = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (dx != 0 || dy != 0) n += px(e, w, x + dx, y + dy);
        if (px(e, w, x, y) == 1 && improved && n == 0) begin
          o.push_back(0); n_removed++;
        end else o.push_back(px(e, w, x, y));
      end
  endfunction

  // Adaptive thresholds from a frame of smoothed magnitudes (KH = 3,
  // KL = 15/32). The mean is taken as the hardware specifies it: the sum times
  // ceil(2^32 / N), shifted right by 32 + 3.
  function automatic void adapt(const ref img_t m, output int tl, output int th, output int mean8);
    longint unsigned s = 0, recip, n;
    foreach (m[i]) s += longint'(m[i]);
    n = longint'(m.size());
    recip = ((64'd1 << 32) + n - 1) / n;
    mean8 = int'((s * recip) >> 35);
    if (mean8 > 255) mean8 = 255;
    th = 3 * mean8; if (th > 255) th = 255;
    tl = th * 15 / 32;
  endfunction

endpackage
