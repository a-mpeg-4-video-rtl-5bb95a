// Testbench of the skip decision: random and boundary cases (SADmcp equal to,
// one below and one above the largest neighbour SAD) checked against
// skip = SADmcp < max(SADa, SADb, SADc); outputs must hold without `eval`.
module tb_skip_decision;
  import me_pkg::*;

  logic clk = 0, rst_n = 0, eval = 0;
  sad_t sad_a = '0, sad_b = '0, sad_c = '0, sad_mcp = '0, sad_max;
  logic skip_flag;
  int checks = 0, failures = 0;

  skip_decision dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_skip;
    n_skip = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int a, b, c, m, p;
      a = $urandom_range(0, 16320); b = $urandom_range(0, 16320); c = $urandom_range(0, 16320);
      m = a > b ? a : b; m = m > c ? m : c;
      case (i % 4)
        0: p = m;
        1: p = (m > 0) ? m - 1 : 0;
        2: p = m + 1;
        default: p = $urandom_range(0, 16320);
      endcase
      eval = 1; sad_a = sad_t'(a); sad_b = sad_t'(b); sad_c = sad_t'(c); sad_mcp = sad_t'(p);
      @(negedge clk);
      eval = 0; sad_mcp = sad_t'(0); sad_a = '1;  // must not change the outputs
      @(negedge clk);
      checks++;
      if (skip_flag != (p < m) || int'(sad_max) != m) begin
        failures++;
        $display("FAIL: a %0d b %0d c %0d mcp %0d: skip %0d max %0d", a, b, c, p, skip_flag, sad_max);
      end
      n_skip += skip_flag;
    end
    checks++;
    if (n_skip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
