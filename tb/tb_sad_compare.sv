// Testbench of the SAD multiplexer and comparator: random sequences of coarse
// groups (eight SADs, vector of PE 0) and skip candidates, including equal
// SADs, checked against a testbench minimum that keeps the first of equal
// values; `clear` must restart the search.
module tb_sad_compare;
  import me_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, skip_sel = 0;
  sad_t skip_sad = '0;
  mv_t  skip_mv = '0, grp_mv = '0, min_mv;
  sad_t [NUM_PE-1:0] grp_sad = '0;
  sad_t min_sad;
  int checks = 0, failures = 0;

  sad_compare dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 60; blk++) begin
      int best, bx, by;
      best = 1 << 20; bx = 0; by = 0;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int g = 0; g < 32; g++) begin
        int dx0, dy;
        in_valid = 1;
        skip_sel = (blk % 3 == 0) && (g == 0);
        dy = -8 + g / 2; dx0 = (g % 2) ? 0 : -8;
        if (skip_sel) begin
          skip_sad = sad_t'($urandom_range(0, 3000));
          skip_mv  = '{y: mvc_t'($urandom_range(0, 15) - 8), x: mvc_t'($urandom_range(0, 15) - 8)};
          if (int'(skip_sad) < best) begin best = skip_sad; bx = skip_mv.x; by = skip_mv.y; end
        end else begin
          grp_mv = '{y: mvc_t'(dy), x: mvc_t'(dx0)};
          for (int k = 0; k < NUM_PE; k++) begin
            grp_sad[k] = sad_t'($urandom_range(0, 40) * 50);   // many ties
            if (int'(grp_sad[k]) < best) begin best = grp_sad[k]; bx = dx0 + k; by = dy; end
          end
        end
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(0, 3) == 0) begin
          grp_sad = '0; skip_sad = '0;   // ignored while in_valid is low
          @(negedge clk);
        end
        if (blk % 3 == 0) break;
      end
      checks++;
      if (int'(min_sad) != best || int'(min_mv.x) != bx || int'(min_mv.y) != by) begin
        failures++;
        $display("FAIL: block %0d min %0d (%0d,%0d) exp %0d (%0d,%0d)", blk, min_sad, min_mv.x, min_mv.y, best, bx, by);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
