// edge_ref_pkg: reference model of the hexagonal CLAP edge map, used by the
// engine testbenches. It works from pixel coordinates, not from the
// engine's register names:
//   - odd image rows are taken to sit half a pixel right of even rows, so
//     the upper and lower neighbours of (r, x) are columns x and x+1 when r
//     is odd and x-1 and x when r is even; on the rectangular lattice they
//     are always x and x+1;
//   - pixels outside the image read as 0;
//   - the five basis structures are (TL,R,BL), (TR,BR,L), (TR,R,BL,L),
//     (TL,R,BR,L) and (TL,TR,BR,BL), with TL/TR the upper, L/R the side and
//     BL/BR the lower neighbours;
//   - a pixel is 1 when every structure's max - min exceeds the threshold;
//   - row 0, row H-1 and column W-1 are 0.
package edge_ref_pkg;

  function automatic int px(const ref int img[], input int w, input int h, input int r, input int c);
    if (r < 0 || r >= h || c < 0 || c >= w) return 0;
    return img[r * w + c];
  endfunction

  function automatic bit edge_ref(const ref int img[], input int w, input int h,
                                  input bit rect, input int thr, input int r, input int x);
    int tl, tr, l, rr, bl, br, lo;
    int polys [5][$];
    bit all_edge;
    if (r == 0 || r == h - 1 || x == w - 1) return 1'b0;
    lo = (rect || (r % 2 == 1)) ? x : x - 1;
    tl = px(img, w, h, r - 1, lo);
    tr = px(img, w, h, r - 1, lo + 1);
    bl = px(img, w, h, r + 1, lo);
    br = px(img, w, h, r + 1, lo + 1);
    l  = px(img, w, h, r, x - 1);
    rr = px(img, w, h, r, x + 1);
    polys[0] = '{tl, rr, bl};
    polys[1] = '{tr, br, l};
    polys[2] = '{tr, rr, bl, l};
    polys[3] = '{tl, rr, br, l};
    polys[4] = '{tl, tr, br, bl};
    all_edge = 1'b1;
    foreach (polys[p]) begin
      int mx, mn;
      mx = -1; mn = 1 << 30;
      foreach (polys[p][q]) begin
        if (polys[p][q] > mx) mx = polys[p][q];
        if (polys[p][q] < mn) mn = polys[p][q];
      end
      if (mx - mn <= thr) all_edge = 1'b0;
    end
    return all_edge;
  endfunction

  // Test image: background ramp, a bright disc, a dark rectangle, a
  // diagonal band and a sprinkle of noise (deterministic from `seed`).
  function automatic void make_image(ref int img[], input int w, input int h, input int seed, input int maxv);
    int state;
    state = seed;
    img = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int v, dx, dy;
        v  = 40 + (c * 20) / w;
        dx = c - w / 3; dy = r - h / 3;
        if (dx * dx + dy * dy < (w / 5) * (w / 5)) v = 210;
        if (r > h / 2 && r < h - 3 && c > w / 2 && c < w - 4) v = 10;
        if ((r + c) % w >= w - 3 && r < h / 2 + 4) v = 150;
        state = (state * 1103515245 + 12345) & 32'h7fffffff;
        if ((state >> 16) % 23 == 0) v = (state >> 8) % (maxv + 1);
        if (v > maxv) v = maxv;
        img[r * w + c] = v;
      end
  endfunction

endpackage
