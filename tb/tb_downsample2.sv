// Testbench of the 2:1 down sampler: streams a 48x48 block of random pixels
// (the reference-window size) twice, and checks every output pixel against
// the rounded 2x2 mean, the output coordinates, one output pair per word on
// odd rows only (288 pairs per block), and the one-cycle latency.
module tb_downsample2;
  import me_pkg::*;

  localparam int W = 48, H = 48;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0;
  logic [31:0] in_word = '0;
  logic out_valid;
  logic [4:0] out_row, out_col;
  pix_t [1:0] out_px;
  int checks = 0, failures = 0;
  int img [H][W];
  int n_out = 0;

  downsample2 #(.IN_W(W), .IN_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom_range(0, 255);
      @(negedge clk); restart = 1; @(negedge clk); restart = 0;
      for (int y = 0; y < H; y++)
        for (int w = 0; w < W / 4; w++) begin
          in_valid = 1;
          for (int k = 0; k < 4; k++) in_word[8*k +: 8] = 8'(img[y][4*w + k]);
          @(negedge clk);
          // output of the word just accepted
          check(out_valid == y[0], $sformatf("out_valid row %0d", y));
          if (out_valid) begin
            n_out++;
            check(int'(out_row) == y / 2 && int'(out_col) == 2 * w, "coordinates");
            for (int k = 0; k < 2; k++) begin
              int x, e;
              x = 4 * w + 2 * k;
              e = (img[y-1][x] + img[y-1][x+1] + img[y][x] + img[y][x+1] + 2) >> 2;
              check(int'(out_px[k]) == e, $sformatf("pixel (%0d,%0d) %0d exp %0d", y/2, x/2, out_px[k], e));
            end
          end
        end
      in_valid = 0;
      @(negedge clk);
      check(!out_valid, "spurious output");
    end
    check(n_out == 2 * 288, $sformatf("output count %0d", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
