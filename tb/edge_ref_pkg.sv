// edge_ref_pkg: behavioural reference models for the edge detection
// testbenches, written from the algorithm definitions rather than from the
// RTL structure.
//
// Streams are dynamic arrays indexed by pixel enable: s[k] is what a block
// sees on enable k, y[k] what it holds after enable k. A block's input is the
// previous block's output shifted by one enable (shift1). Each value carries a
// valid bit that is clear while it still depends on data from before the
// first enable.
package edge_ref_pkg;

  typedef int  stream_t[];
  typedef bit  valid_t[];

  function automatic void shift1(input stream_t a, input valid_t av,
                                 output stream_t s, output valid_t sv);
    s  = new[a.size()];
    sv = new[a.size()];
    s[0] = 0; sv[0] = 0;
    for (int k = 1; k < a.size(); k++) begin
      s[k] = a[k-1]; sv[k] = av[k-1];
    end
  endfunction

  // 1D Gaussian (1,3,4,3,1)/12 with taps S enables apart.
  function automatic void conv1d(input stream_t s, input valid_t sv, input int S,
                                 output stream_t y, output valid_t yv);
    y  = new[s.size()];
    yv = new[s.size()];
    for (int k = 0; k < s.size(); k++) begin
      y[k] = 0; yv[k] = 0;
      if (k - 4*S >= 0 && sv[k-4*S]) begin
        y[k]  = (s[k] + 3*s[k-S] + 4*s[k-2*S] + 3*s[k-3*S] + s[k-4*S]) / 12;
        yv[k] = 1;
      end
    end
  endfunction

  function automatic void gauss2d(input stream_t s, input valid_t sv, input int W,
                                  output stream_t y, output valid_t yv);
    stream_t h, hs; valid_t hv, hsv;
    conv1d(s, sv, 1, h, hv);
    shift1(h, hv, hs, hsv);
    conv1d(hs, hsv, W, y, yv);
  endfunction

  function automatic void grad(input stream_t s, input valid_t sv, input int W,
                               output stream_t sx, output stream_t sy,
                               output stream_t m, output valid_t v);
    int q;
    sx = new[s.size()]; sy = new[s.size()]; m = new[s.size()]; v = new[s.size()];
    for (int k = 0; k < s.size(); k++) begin
      sx[k] = 0; sy[k] = 0; m[k] = 0; v[k] = 0;
      if (k - W >= 0 && sv[k-W]) begin
        sx[k] = s[k] - s[k-1];
        sy[k] = s[k] - s[k-W];
        q     = sx[k]*sx[k] + sy[k]*sy[k];
        m[k]  = (q > 255) ? 255 : q;
        v[k]  = 1;
      end
    end
  endfunction

  // Direction code as (dx,dy): 0 (1,0), 1 (0,1), 2 (1,-1), 3 (1,1).
  function automatic int dir_of(int sx, int sy);
    int ax = (sx < 0) ? -sx : sx;
    int ay = (sy < 0) ? -sy : sy;
    if (real'(ay) < 0.5 * real'(ax)) return 0;
    if (real'(ax) < 0.5 * real'(ay)) return 1;
    if (sx * sy < 0)                 return 2;
    return 3;
  endfunction

  function automatic void nms(input stream_t sx, input stream_t sy, input stream_t m,
                              input valid_t sv, input int W,
                              output stream_t y, output valid_t yv);
    int c, d, dx, dy, mp, mm;
    y = new[m.size()]; yv = new[m.size()];
    for (int k = 0; k < m.size(); k++) begin
      y[k] = 0; yv[k] = 0;
      c = k - W - 2;
      if (c - W - 1 >= 0 && sv[c-W-1]) begin
        d  = dir_of(sx[c], sy[c]);
        dx = (d == 1) ? 0 : 1;
        dy = (d == 0) ? 0 : (d == 1) ? 1 : (d == 2) ? -1 : 1;
        mp = m[c + dx + dy*W];
        mm = m[c - dx - dy*W];
        y[k]  = ((m[c] > mp && m[c] >= mm) || (m[c] > mm && m[c] >= mp)) ? m[c] : 0;
        yv[k] = 1;
      end
    end
  endfunction

  // Hysteresis threshold by flood fill over a W x H image (8-connected).
  function automatic void hyst(input stream_t img, input int W, input int H,
                               input int lo, input int hi, output stream_t e);
    int stack[$];
    int p, px, py, q;
    e = new[W*H];
    foreach (e[i]) e[i] = 0;
    for (int i = 0; i < W*H; i++)
      if (img[i] > hi && img[i] > lo && e[i] == 0) begin
        e[i] = 1;
        stack.push_back(i);
        while (stack.size() > 0) begin
          p = stack.pop_back();
          px = p % W; py = p / W;
          for (int ddy = -1; ddy <= 1; ddy++)
            for (int ddx = -1; ddx <= 1; ddx++)
              if (px+ddx >= 0 && px+ddx < W && py+ddy >= 0 && py+ddy < H) begin
                q = p + ddx + ddy*W;
                if (e[q] == 0 && img[q] > lo) begin
                  e[q] = 1;
                  stack.push_back(q);
                end
              end
        end
      end
  endfunction

  // Nonlinear Laplace NL and edge strength E over the 3x3 window centred on
  // s[k-W-1-regs], regs being the register ranks inside the max/min tree.
  function automatic void nlap(input stream_t s, input valid_t sv, input int W,
                               output stream_t nl, output stream_t e, output valid_t v,
                               input int regs = 2);
    int c, mx, mn, gmax, gmin;
    nl = new[s.size()]; e = new[s.size()]; v = new[s.size()];
    for (int k = 0; k < s.size(); k++) begin
      nl[k] = 0; e[k] = 0; v[k] = 0;
      c = k - W - 1 - regs;
      if (c - W - 1 >= 0 && sv[c-W-1]) begin
        mx = 0; mn = 255;
        for (int ddy = -1; ddy <= 1; ddy++)
          for (int ddx = -1; ddx <= 1; ddx++) begin
            if (s[c+ddx+ddy*W] > mx) mx = s[c+ddx+ddy*W];
            if (s[c+ddx+ddy*W] < mn) mn = s[c+ddx+ddy*W];
          end
        gmax  = mx - s[c];
        gmin  = mn - s[c];
        nl[k] = gmax + gmin;
        e[k]  = (gmax < -gmin) ? gmax : -gmin;
        v[k]  = 1;
      end
    end
  endfunction

  // Zero crossing of the NL sign image times E, for the centre s[k-W-1].
  function automatic void zc(input stream_t nl, input stream_t e, input valid_t sv,
                             input int W, input int thr,
                             output stream_t prod, output stream_t edge_o, output valid_t v);
    int c;
    bit b, er;
    prod = new[nl.size()]; edge_o = new[nl.size()]; v = new[nl.size()];
    for (int k = 0; k < nl.size(); k++) begin
      prod[k] = 0; edge_o[k] = 0; v[k] = 0;
      c = k - W - 1;
      if (c - W >= 0 && sv[c-W]) begin
        b  = nl[c] < 0;
        er = b && (nl[c-1] < 0) && (nl[c+1] < 0) && (nl[c-W] < 0) && (nl[c+W] < 0);
        prod[k]   = (b != er) ? e[c] : 0;
        edge_o[k] = prod[k] > thr;
        v[k]      = 1;
      end
    end
  endfunction

  // Whole Canny stream up to nonmaximum suppression: x is the pixel input on
  // each enable, y the suppressed magnitude latched on each enable.
  function automatic void canny_chain(input stream_t x, input int W,
                                      output stream_t y, output valid_t yv);
    stream_t g, gs, sx, sy, m, sxs, sys, ms; valid_t xv, gv, gsv, v, vs;
    xv = new[x.size()];
    foreach (xv[k]) xv[k] = 1'b1;
    gauss2d(x, xv, W, g, gv);
    shift1(g, gv, gs, gsv);
    grad(gs, gsv, W, sx, sy, m, v);
    shift1(sx, v, sxs, vs);
    shift1(sy, v, sys, vs);
    shift1(m, v, ms, vs);
    nms(sxs, sys, ms, vs, W, y, yv);
  endfunction

  // Whole nonlinear Laplace stream: product E*zc and edge bit per enable.
  function automatic void laplace_chain(input stream_t x, input int W, input int thr,
                                        output stream_t prod, output stream_t edge_o,
                                        output valid_t v);
    stream_t g, gs, nl, e, nls, es; valid_t xv, gv, gsv, nv, nvs;
    xv = new[x.size()];
    foreach (xv[k]) xv[k] = 1'b1;
    gauss2d(x, xv, W, g, gv);
    shift1(g, gv, gs, gsv);
    nlap(gs, gsv, W, nl, e, nv);
    shift1(nl, nv, nls, nvs);
    shift1(e, nv, es, nvs);
    zc(nls, es, nvs, W, thr, prod, edge_o, v);
  endfunction

  // Test image: dark background, a bright disc, a mid-grey rectangle and a
  // diagonal bar, plus uniform noise of +-noise. kind 1 is a grid of
  // bright dots 4 pixels apart (many small separate edge rings).
  function automatic void test_image(input int W, input int H, input int kind,
                                     input int noise, output stream_t img);
    int v, cx, cy, r, dx, dy;
    img = new[W*H];
    cx = $urandom_range(W/4, 3*W/4);
    cy = $urandom_range(H/4, 3*H/4);
    r  = (W < H ? W : H) / 4 + 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (kind == 1) v = (x % 4 == 1 && y % 4 == 1) ? 255 : 0;
        else begin
          v  = 40;
          dx = x - cx; dy = y - cy;
          if (x > W/8 && x < W/2 && y > H/2 && y < H - H/8) v = 120;
          if (dx*dx + dy*dy <= r*r) v = 220;
          if ((x - y) * 8 / W == 2) v = 170;
          v += $urandom_range(0, 2*noise) - noise;
          v = (v < 0) ? 0 : (v > 255) ? 255 : v;
        end
        img[y*W + x] = v;
      end
  endfunction

endpackage
