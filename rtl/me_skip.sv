// ME skip: motion vector prediction and the SAD of the predicted vector.
//
// The predictor is the component-wise median of the vectors of the left (A),
// top (B) and top-right (C) macroblocks, computed combinationally as
// max(min(a,b), min(max(a,b),c)). The address generator then fetches the
// reference block at the predictor and a single SAD PE accumulates the
// motion-compensated difference over the 64 pixels (64 cycles); the sum is
// valid the cycle after the last pixel. Median prediction, the three
// neighbours and the single PE are the document's.
module me_skip
  import me_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  mv_t  mv_a,
  input  mv_t  mv_b,
  input  mv_t  mv_c,
  output mv_t  mvp,
  input  logic en,
  input  logic clear,
  input  pix_t cur,
  input  pix_t ref_px,
  output sad_t sad_mcp
);
  function automatic mvc_t med3(mvc_t a, mvc_t b, mvc_t c);
    mvc_t lo, hi, m;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    m  = (hi < c) ? hi : c;
    return (lo > m) ? lo : m;
  endfunction

  assign mvp.x = med3(mv_a.x, mv_b.x, mv_c.x);
  assign mvp.y = med3(mv_a.y, mv_b.y, mv_c.y);

  sad_pe u_pe (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en),
    .clear  (clear),
    .cur    (cur),
    .ref_px (ref_px),
    .sad    (sad_mcp)
  );

endmodule
