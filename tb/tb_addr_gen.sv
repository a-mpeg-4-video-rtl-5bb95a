// Testbench of the address generator: a skip pass at random predicted vectors
// and a full coarse pass. Every issued address pair is checked against
// cur = (p / 8, p % 8), ref = cur + (dy + 8, dx0 + 8); group vectors must
// come in the order dy = -8..7, dx0 = -8, 0; the pass lengths must be 64
// and 2048 address cycles, and grp_done/done must follow one cycle after
// the last address.
module tb_addr_gen;
  import me_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, skip_mode = 0;
  mv_t  mvp = '0;
  logic valid, first, last, grp_done, done;
  logic [2:0] cur_row, cur_col;
  logic [4:0] ref_row, ref_col;
  mv_t  grp_mv;
  int checks = 0, failures = 0;

  addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_pass(bit sm, int px, int py);
    int n, g, dx0, dy, bad;
    @(negedge clk);
    start = 1; skip_mode = sm; mvp.x = mvc_t'(px); mvp.y = mvc_t'(py);
    @(negedge clk);
    start = 0; mvp = '0;  // must have been latched
    n = 0; g = 0; bad = 0;
    while (valid) begin
      int p;
      p = n % 64;
      if (sm) begin dx0 = px; dy = py; end
      else begin dy = -8 + g / 2; dx0 = (g % 2) ? 0 : -8; end
      if (int'(cur_row) != p / 8 || int'(cur_col) != p % 8 ||
          int'(ref_row) != p / 8 + dy + 8 || int'(ref_col) != p % 8 + dx0 + 8 ||
          first != (p == 0) || last != (p == 63)) bad++;
      @(negedge clk);
      n++;
      if (p == 63) begin
        check(grp_done && int'(grp_mv.x) == dx0 && int'(grp_mv.y) == dy,
              $sformatf("group %0d vector (%0d,%0d)", g, grp_mv.x, grp_mv.y));
        g++;
      end else if (grp_done) bad++;
    end
    check(bad == 0, $sformatf("%0d wrong address cycles", bad));
    check(n == (sm ? 64 : 2048), $sformatf("pass length %0d", n));
    check(done, "done not raised after the last group");
    @(negedge clk);
    check(!done && !valid, "done longer than one cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) run_pass(1, $urandom_range(0, 15) - 8, $urandom_range(0, 15) - 8);
    run_pass(1, -8, 7);
    run_pass(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
