// mcadsw_ref_pkg -- behavioural reference of the MCADSW algorithm for the
// testbenches, written straight from the algorithm's definitions (no block
// structure, no buffers): clamped-border pixel access, 6-pixel mini-census,
// Hamming cost, colour weight = 64*exp(-d/7.2) truncated to its leading one
// (computed with $exp), two-pass aggregation over a 31x31 window and
// winner-takes-all with the smallest disparity winning ties.
// It also packs the images into the 32-bit word memory layout.
//
// The formulas follow the algorithm as the document defines it.  Clamping at
// the border, ties to the smaller disparity and gamma = 7.2 are this design's
// choices, shared with the RTL.  The synthetic test images are this
// repository's own.
package mcadsw_ref_pkg;

  int W, H, DM;
  byte unsigned yl[], yr[], ul[], vl[];

  function automatic int clampi(int v, int hi);
    return (v < 0) ? 0 : ((v > hi) ? hi : v);
  endfunction

  function automatic int px(ref byte unsigned p[], input int x, input int y);
    return int'(p[clampi(y, H - 1) * W + clampi(x, W - 1)]);
  endfunction

  function automatic int census(bit right, int x, int y);
    int c, n[6], code;
    if (right) begin
      c = px(yr, x, y);
      n = '{px(yr, x, y-2), px(yr, x, y-1), px(yr, x-2, y), px(yr, x+2, y), px(yr, x, y+1), px(yr, x, y+2)};
    end else begin
      c = px(yl, x, y);
      n = '{px(yl, x, y-2), px(yl, x, y-1), px(yl, x-2, y), px(yl, x+2, y), px(yl, x, y+1), px(yl, x, y+2)};
    end
    code = 0;
    for (int i = 0; i < 6; i++) code = (code << 1) | ((n[i] <= c) ? 1 : 0);
    return code;
  endfunction

  function automatic int popc(int v);
    int s = 0;
    for (int i = 0; i < 6; i++) s += (v >> i) & 1;
    return s;
  endfunction

  // weight value (not code) for a Manhattan distance
  function automatic int weight_of(int d);
    real v;
    int  w;
    v = 64.0 * $exp(-real'(d) / 7.2);
    if (v < 1.0) return 0;
    w = 1;
    while (real'(w * 2) <= v) w = w * 2;
    return w;
  endfunction

  function automatic int cdist(int x0, int y0, int x1, int y1);
    int a, b, c;
    a = px(yl, x0, y0) - px(yl, x1, y1);
    b = px(ul, x0, y0) - px(ul, x1, y1);
    c = px(vl, x0, y0) - px(vl, x1, y1);
    return (a < 0 ? -a : a) + (b < 0 ? -b : b) + (c < 0 ? -c : c);
  endfunction

  // disparity of left pixel (x, y)
  function automatic int disparity(int x, int y);
    int wv[31][31], wh[31], cl[31][31];
    longint best, cost, vs;
    int bd;
    for (int j = 0; j < 31; j++) begin
      int cx = x - 15 + j;
      wh[j] = weight_of(cdist(cx, y, x, y));
      for (int i = 0; i < 31; i++) begin
        wv[j][i] = weight_of(cdist(cx, y - 15 + i, cx, y));
        cl[j][i] = census(1'b0, cx, y - 15 + i);
      end
    end
    best = -1; bd = 0;
    for (int d = 0; d < DM; d++) begin
      cost = 0;
      for (int j = 0; j < 31; j++) begin
        int cx = x - 15 + j;
        vs = 0;
        for (int i = 0; i < 31; i++)
          vs += longint'(popc(cl[j][i] ^ census(1'b1, cx - d, y - 15 + i)) * wv[j][i]);
        cost += vs * wh[j];
      end
      if (best < 0 || cost < best) begin best = cost; bd = d; end
    end
    return bd;
  endfunction

  // word memory image: Y left, Y right, U left, V left
  function automatic void pack(ref logic [31:0] mem[], input int pw);
    for (int p = 0; p < 4; p++)
      for (int i = 0; i < W * H; i++) begin
        byte unsigned b;
        case (p)
          0: b = yl[i];
          1: b = yr[i];
          2: b = ul[i];
          default: b = vl[i];
        endcase
        mem[p * pw + i / 4][8 * (i % 4) +: 8] = b;
      end
  endfunction

  // test images: textured left image, right image = left shifted by a
  // disparity that changes by region, plus a little noise
  function automatic void make_images(int w, int h, int dm, int seed);
    int s;
    W = w; H = h; DM = dm;
    yl = new[w * h]; yr = new[w * h]; ul = new[w * h]; vl = new[w * h];
    s = seed;
    for (int i = 0; i < w * h; i++) begin
      int x = i % w, y = i / w;
      s = s * 1103515245 + 12345;
      yl[i] = byte'(((x * 7 + y * 13) % 50) * 3 + ((s >>> 16) & 63) + ((x / 6 + y / 5) % 2) * 40);
      ul[i] = byte'(128 + ((x / 9) % 3) * 20 + ((s >>> 20) & 3));
      vl[i] = byte'(100 + ((y / 7) % 3) * 25);
    end
    for (int i = 0; i < w * h; i++) begin
      int x = i % w, y = i / w, sh;
      sh = ((x / 12 + y / 12) % 3) * (dm / 4) + 1;
      s = s * 1103515245 + 12345;
      yr[i] = byte'(int'(yl[y * w + clampi(x + sh, w - 1)]) + ((s >>> 16) & 3));
    end
  endfunction

endpackage
