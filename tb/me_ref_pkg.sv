// Reference model of the mixed-mode coarse motion estimation, for testbenches.
//
// Synthetic video: frame t is a pseudo-random texture moved by (VX*t, VY*t)
// full-resolution pixels plus a small per-frame noise, defined for every
// integer coordinate (pictures are unbounded, as with unrestricted motion
// vectors). The model computes, for a macroblock, the 2:1 down-sampled 8x8
// current block and 24x24 search window, the median prediction from the
// neighbours, the skip rule SADmcp < max(SADa, SADb, SADc) and the exhaustive
// -8..+7 search with first-minimum-in-raster-order tie breaking, all directly
// from pixel values and independently of the RTL.
package me_ref_pkg;

  typedef struct {
    int mvx, mvy, sad;
  } res_t;

  function automatic int hash(int a, int b, int c);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ b * 32'h85EBCA77 ^ c * 32'hC2B2AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return int'(h & 32'hFF);
  endfunction

  // pixel (x, y) of frame t with global motion (vx, vy) per frame
  function automatic int pix(int t, int x, int y, int vx, int vy, int noise);
    int v;
    v = (hash(x - vx * t, y - vy * t, 7) * (255 - noise)) / 255;
    if (noise > 0) v += hash(x, y, t + 100) % (noise + 1);
    return v;
  endfunction

  function automatic int ds(int t, int x0, int y0, int r, int c, int vx, int vy, int noise);
    int s;
    s = pix(t, x0 + 2*c, y0 + 2*r, vx, vy, noise) + pix(t, x0 + 2*c + 1, y0 + 2*r, vx, vy, noise)
      + pix(t, x0 + 2*c, y0 + 2*r + 1, vx, vy, noise) + pix(t, x0 + 2*c + 1, y0 + 2*r + 1, vx, vy, noise);
    return (s + 2) >> 2;
  endfunction

  function automatic int med3(int a, int b, int c);
    int lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    if (c < lo) return lo;
    if (c > hi) return hi;
    return c;
  endfunction

  function automatic int max3(int a, int b, int c);
    int m;
    m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction

  // SAD of displacement (dx, dy) for current frame t (reference frame t-1)
  function automatic int sad_at(int t, int mbx, int mby, int dx, int dy, int vx, int vy, int noise);
    int s;
    s = 0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        int a, b;
        a = ds(t, 16*mbx, 16*mby, r, c, vx, vy, noise);
        b = ds(t - 1, 16*mbx - 16, 16*mby - 16, r + dy + 8, c + dx + 8, vx, vy, noise);
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  // one macroblock: returns result and skip decision
  function automatic void estimate(int t, int mbx, int mby, int vx, int vy, int noise,
                                   res_t na, res_t nb, res_t nc,
                                   output res_t res, output bit skip);
    int px, py, smcp;
    px   = med3(na.mvx, nb.mvx, nc.mvx);
    py   = med3(na.mvy, nb.mvy, nc.mvy);
    smcp = sad_at(t, mbx, mby, px, py, vx, vy, noise);
    skip = (smcp < max3(na.sad, nb.sad, nc.sad));
    if (skip) begin
      res = '{px, py, smcp};
      return;
    end
    res = '{0, 0, 1 << 30};
    for (int dy = -8; dy <= 7; dy++)
      for (int dx = -8; dx <= 7; dx++) begin
        int s;
        s = sad_at(t, mbx, mby, dx, dy, vx, vy, noise);
        if (s < res.sad) res = '{dx, dy, s};
      end
  endfunction

  // 32-bit load word w (0-based, row-major, four pixels) of a W-pixel-wide area
  function automatic logic [31:0] word(int t, int x0, int y0, int w, int width, int vx, int vy, int noise);
    int row, col;
    logic [31:0] d;
    row = w / (width / 4);
    col = (w % (width / 4)) * 4;
    for (int k = 0; k < 4; k++) d[8*k +: 8] = 8'(pix(t, x0 + col + k, y0 + row, vx, vy, noise));
    return d;
  endfunction

endpackage
