// Testbench of the clock gate: counts gated-clock edges while the enable is
// toggled at random on the falling clock edge and checks that exactly the
// enabled cycles produce an edge, that the gated clock never rises or falls
// outside a root-clock edge (no glitch from an enable changing while the
// clock is high), and that test_en forces the clock on.
module tb_clk_gate;
  logic clk = 0, en = 0, test_en = 0, gclk;
  int checks = 0, failures = 0;
  int edges = 0, expected = 0, glitches = 0, prev;
  logic want;

  clk_gate dut (.*);

  always #5 clk = ~clk;
  always @(posedge gclk) edges++;
  // gclk may only change together with clk
  always @(gclk) if ($time % 5 != 0) glitches++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      en = $urandom_range(0, 1);
      test_en = (i > 400) && $urandom_range(0, 1);
      if (en || test_en) expected++;
      prev = edges;
      @(posedge clk);
      #1;
      checks++;
      if ((edges - prev) != int'(en || test_en) || gclk != (en || test_en)) begin
        failures++;
        $display("FAIL cycle %0d: en=%b test_en=%b edges=%0d gclk=%b", i, en, test_en,
                 edges - prev, gclk);
      end
      want = en || test_en;
      #1 en = $urandom_range(0, 1);   // changes while clk is high: must not matter
      #2;
      checks++;
      if (gclk != want) begin
        failures++;
        $display("FAIL cycle %0d: gated clock followed an enable change while clk high", i);
      end
      @(negedge clk);
    end
    en = 0; test_en = 0;
    @(negedge clk);
    checks++;
    if (edges != expected) begin
      failures++;
      $display("FAIL: %0d gated edges, expected %0d", edges, expected);
    end
    checks++;
    if (glitches != 0) begin
      failures++;
      $display("FAIL: %0d glitches", glitches);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
