// Testbench of the SAD processing element: accumulates 64 random pixel pairs
// several times (with gaps where `en` is low) and checks the running sum after
// every pixel and every stall against an independently computed one,
// including the all-255-versus-0 maximum.
module tb_sad_pe;
  import me_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  pix_t cur = '0, ref_px = '0;
  sad_t sad;
  int checks = 0, failures = 0;

  sad_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      int exp_sad;
      exp_sad = 0;
      for (int i = 0; i < 64; i++) begin
        int a, b;
        a = (t == 9) ? 255 : $urandom_range(0, 255);
        b = (t == 9) ? 0 : $urandom_range(0, 255);
        en = 1; clear = (i == 0); cur = 8'(a); ref_px = 8'(b);
        exp_sad += (a > b) ? a - b : b - a;
        @(negedge clk);
        checks++;                   // running sum after every pixel
        if (int'(sad) != exp_sad) begin
          failures++;
          $display("FAIL: block %0d pixel %0d sum %0d exp %0d", t, i, sad, exp_sad);
        end
        if (t[0] && i == 20) begin  // a stall
          en = 0; cur = 8'($urandom); ref_px = 8'($urandom);
          repeat (3) @(negedge clk);
          checks++;
          if (int'(sad) != exp_sad) begin
            failures++;
            $display("FAIL: block %0d sum changed during a stall", t);
          end
        end
      end
      en = 0;
      checks++;
      if (int'(sad) != exp_sad) begin
        failures++;
        $display("FAIL: block %0d sad %0d exp %0d", t, sad, exp_sad);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
