// Testbench of ME skip: checks the median predictor for random neighbour
// vectors over the full -8..+7 range (component-wise median of three), and
// the single-PE SAD of a 64-pixel motion-compensated block.
module tb_me_skip;
  import me_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  mv_t  mv_a = '0, mv_b = '0, mv_c = '0, mvp;
  pix_t cur = '0, ref_px = '0;
  sad_t sad_mcp;
  int checks = 0, failures = 0;

  me_skip dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int median(int a, int b, int c);
    if ((a <= b && b <= c) || (c <= b && b <= a)) return b;
    if ((b <= a && a <= c) || (c <= a && a <= b)) return a;
    return c;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int v [6];
      foreach (v[j]) v[j] = $urandom_range(0, 15) - 8;
      mv_a = '{y: mvc_t'(v[0]), x: mvc_t'(v[1])};
      mv_b = '{y: mvc_t'(v[2]), x: mvc_t'(v[3])};
      mv_c = '{y: mvc_t'(v[4]), x: mvc_t'(v[5])};
      #1;
      checks++;
      if (int'(mvp.y) != median(v[0], v[2], v[4]) || int'(mvp.x) != median(v[1], v[3], v[5])) begin
        failures++;
        $display("FAIL: median of %p is (%0d,%0d)", v, mvp.x, mvp.y);
      end
    end
    for (int t = 0; t < 4; t++) begin
      int e;
      e = 0;
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        en = 1; clear = (i == 0); cur = 8'($urandom); ref_px = 8'($urandom);
        e += (cur > ref_px) ? int'(cur - ref_px) : int'(ref_px - cur);
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (int'(sad_mcp) != e) begin
        failures++;
        $display("FAIL: SADmcp %0d exp %0d", sad_mcp, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
