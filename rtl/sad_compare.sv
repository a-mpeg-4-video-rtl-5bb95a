// SAD multiplexer and minimum comparator.
//
// The multiplexer passes either the single SAD of the predicted vector from the
// skip unit (skip_sel = 1) or the eight SADs of one coarse group, whose
// vectors are (dx0+k, dy) for PE k (skip_sel = 0). On each `in_valid` the
// comparator folds the passed candidates into the running minimum; `clear`
// starts a new macroblock. Ties keep the earlier candidate, and within a group
// the smaller dx, so the result is the first minimum in raster order of
// (dy, dx). Result is registered, valid the cycle after `in_valid`.
// The mux and comparator are the document's; tie-breaking is this design's.
module sad_compare
  import me_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               in_valid,
  input  logic               skip_sel,
  input  sad_t               skip_sad,
  input  mv_t                skip_mv,
  input  sad_t [NUM_PE-1:0]  grp_sad,
  input  mv_t                grp_mv,     // vector of PE 0
  output sad_t               min_sad,
  output mv_t                min_mv
);
  sad_t best_sad;
  mv_t  best_mv;

  always_comb begin
    best_sad = min_sad;
    best_mv  = min_mv;
    if (skip_sel) begin
      if (skip_sad < best_sad) begin
        best_sad = skip_sad;
        best_mv  = skip_mv;
      end
    end else begin
      for (int k = 0; k < NUM_PE; k++) begin
        if (grp_sad[k] < best_sad) begin
          best_sad  = grp_sad[k];
          best_mv.y = grp_mv.y;
          best_mv.x = grp_mv.x + mvc_t'(k);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_sad <= SAD_INF;
      min_mv  <= '0;
    end else if (clear) begin
      min_sad <= SAD_INF;
      min_mv  <= '0;
    end else if (in_valid) begin
      min_sad <= best_sad;
      min_mv  <= best_mv;
    end
  end

endmodule
