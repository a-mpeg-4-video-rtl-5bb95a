// Testbench of the 8x8 DCT/IDCT: random residual blocks (-255..255) through
// the forward transform, random sparse coefficient blocks through the
// inverse, and flat/extreme blocks. Each output is compared with the
// orthonormal 2-D DCT or IDCT computed in floating point from the cosine
// definition and rounded; a difference of at most 1 is allowed. Also checks
// the block timing (432 cycles per block, first output a fixed number of
// cycles after the last input) and that both directions are exercised.
module tb_dct2d;
  logic clk = 0, rst_n = 0, inv = 0, in_valid = 0;
  logic [11:0] in_data = '0;
  logic in_ready, out_valid, busy;
  logic [11:0] out_data;
  int checks = 0, failures = 0, worst = 0;

  dct2d dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real cf(int k, int n);
    real c;
    c = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return c / 2.0 * $cos((2 * n + 1) * k * 3.14159265358979 / 16.0);
  endfunction

  int lat_first = -1;

  task automatic run_block(bit dir, int b [8][8]);
    real e;
    int got [64];
    int t_last, t_first, n, t;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      in_valid = 1; inv = dir; in_data = 12'(b[i / 8][i % 8]);
      check_ready: assert (in_ready);
      @(negedge clk);
    end
    in_valid = 0;
    t = 0; n = 0; t_first = 0;
    while (n < 64) begin
      if (out_valid) begin
        if (n == 0) t_first = t;
        got[n] = int'(signed'(out_data));
        n++;
      end
      @(negedge clk);
      t++;
    end
    if (lat_first < 0) lat_first = t_first;
    checks++;
    if (t_first != 305) begin
      failures++;
      $display("FAIL: first output after %0d cycles", t_first);
    end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        int ex, d;
        e = 0.0;
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++)
            if (!dir) e += cf(u, i) * cf(v, j) * b[i][j];   // Y[u][v]
            else      e += cf(i, u) * cf(j, v) * b[i][j];   // x[u][v]
        ex = $rtoi(e + (e >= 0 ? 0.5 : -0.5));
        if (ex > 2047) ex = 2047;
        if (ex < -2048) ex = -2048;
        d = got[u * 8 + v] - ex;
        if (d < 0) d = -d;
        if (d > worst) worst = d;
        checks++;
        if (d > 1) begin
          failures++;
          $display("FAIL: %s (%0d,%0d) got %0d exp %0d", dir ? "IDCT" : "DCT", u, v, got[u*8+v], ex);
        end
      end
  endtask

  initial begin
    int b [8][8];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          case (t)
            0: b[i][j] = 255;
            1: b[i][j] = ((i + j) % 2) ? 255 : -255;
            default: b[i][j] = $urandom_range(0, 510) - 255;
          endcase
        end
      run_block(0, b);
    end
    for (int t = 0; t < 12; t++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          b[i][j] = 0;
          if (t == 0 && i == 0 && j == 0) b[i][j] = 2040;
          else if (i + j < 4 || $urandom_range(0, 7) == 0) b[i][j] = $urandom_range(0, 600) - 300;
        end
      run_block(1, b);
    end
    $display("worst error %0d, first output %0d cycles after the last input", worst, lat_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
