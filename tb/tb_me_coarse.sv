// Testbench of the 8-PE coarse array: for random 8x8 blocks and random
// 8-pixel reference rows per cycle, checks each PE's 64-pixel SAD against the
// sum computed in the testbench, over several back-to-back groups.
module tb_me_coarse;
  import me_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  pix_t cur = '0;
  pix_t [NUM_PE-1:0] ref_px = '0;
  sad_t [NUM_PE-1:0] sad;
  int checks = 0, failures = 0;

  me_coarse dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sad [NUM_PE];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 6; g++) begin
      exp_sad = '{default: 0};
      for (int i = 0; i < 64; i++) begin
        en = 1; clear = (i == 0);
        cur = 8'($urandom);
        for (int k = 0; k < NUM_PE; k++) begin
          ref_px[k] = 8'($urandom);
          exp_sad[k] += (cur > ref_px[k]) ? int'(cur - ref_px[k]) : int'(ref_px[k] - cur);
        end
        @(negedge clk);
      end
      en = (g % 2 == 0);  // next group starts at once, or after a gap
      clear = 1;
      for (int k = 0; k < NUM_PE; k++) begin
        checks++;
        if (int'(sad[k]) != exp_sad[k]) begin
          failures++;
          $display("FAIL: group %0d PE %0d sad %0d exp %0d", g, k, sad[k], exp_sad[k]);
        end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
