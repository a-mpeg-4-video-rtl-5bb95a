// Testbench of the quantiser / inverse quantiser: streams random
// coefficients of intra and inter blocks, luminance and chrominance, at every
// QP, through both directions back to back. Expected values come from the
// rules written here in real arithmetic and a table of dc_scaler, not from
// the module. Checks the one-cycle latency, saturation at full scale, that a
// dequantised level lies within one quantiser step of the original, and that
// every path (intra DC, intra AC, inter, zero level) is taken.
module tb_quant;
  logic clk = 0, rst_n = 0, in_valid = 0, inv = 0, intra = 0, is_dc = 0, luma = 1;
  logic [4:0] qp = 1;
  logic signed [11:0] in_coef = '0;
  logic out_valid;
  logic signed [11:0] out_coef;
  logic [5:0] dc_scaler;
  int checks = 0, failures = 0, n_dc = 0, n_intra = 0, n_inter = 0, n_zero = 0, n_sat = 0;

  quant dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // dc_scaler table of the standard
  function automatic int scaler(int q, bit y);
    if (q <= 4) return 8;
    if (y) begin
      if (q <= 8) return 2 * q;
      if (q <= 24) return q + 8;
      return 2 * q - 16;
    end
    if (q <= 24) return (q + 13) / 2;
    return q - 6;
  endfunction

  function automatic int fwd(int f, int q, bit in, bit dc, bit y);
    real a;
    int l;
    if (in && dc) return (f < 0) ? 0 : int'($floor(real'(f) / scaler(q, y) + 0.5));
    a = (f < 0) ? -real'(f) : real'(f);
    if (!in) a = a - real'(q / 2);
    l = (a <= 0.0) ? 0 : int'($floor(a / (2.0 * q)));
    if (l > 2047) l = 2047;
    return (f < 0) ? -l : l;
  endfunction

  function automatic int bwd(int l, int q, bit in, bit dc, bit y);
    int f;
    if (in && dc) f = l * scaler(q, y);
    else if (l == 0) f = 0;
    else begin
      f = q * (2 * ((l < 0) ? -l : l) + 1);
      if (q % 2 == 0) f--;
      if (l < 0) f = -f;
    end
    return (f > 2047) ? 2047 : (f < -2048) ? -2048 : f;
  endfunction

  task automatic one(int f, int q, bit in, bit dc, bit y);
    int e, l, r;
    qp = 5'(q); intra = in; is_dc = dc; luma = y;
    inv = 0; in_valid = 1; in_coef = 12'(f);
    @(negedge clk);
    e = fwd(f, q, in, dc, y);
    check(out_valid && int'(out_coef) == e, $sformatf("Q f=%0d qp=%0d intra=%b dc=%b: %0d exp %0d",
          f, q, in, dc, out_coef, e));
    check(int'(dc_scaler) == scaler(q, y), $sformatf("dc_scaler qp=%0d luma=%b: %0d", q, y, dc_scaler));
    l = int'(out_coef);
    inv = 1; in_coef = out_coef;
    @(negedge clk);
    r = bwd(l, q, in, dc, y);
    check(out_valid && int'(out_coef) == r, $sformatf("IQ l=%0d qp=%0d intra=%b dc=%b: %0d exp %0d",
          l, q, in, dc, out_coef, r));
    // reconstruction stays within one step of the input unless saturated
    if (r > -2048 && r < 2047 && !(in && dc && f < 0)) begin
      int d;
      d = r - f;
      if (d < 0) d = -d;
      check(d <= ((in && dc) ? scaler(q, y) : 2 * q + q), $sformatf("IQ(Q(%0d)) = %0d too far, qp=%0d", f, r, q));
    end else n_sat++;
    if (in && dc) n_dc++; else if (in) n_intra++; else n_inter++;
    if (l == 0) n_zero++;
    in_valid = 0;
    @(negedge clk);
    check(!out_valid, "out_valid without in_valid");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int q = 1; q <= 31; q++)
      for (int k = 0; k < 60; k++) begin
        bit in, dc, y;
        int f;
        in = k % 3 != 0; dc = in && (k % 4 == 1); y = k % 5 != 0;
        if (dc) f = $urandom_range(0, 2040);
        else if (k % 7 == 0) f = $urandom_range(0, 2 * q) - q;   // small: zero levels
        else f = $urandom_range(0, 4095) - 2048;
        one(f, q, in, dc, y);
      end
    one(2047, 1, 1, 0, 1);
    one(-2048, 1, 0, 0, 1);
    one(-2048, 2, 1, 0, 0);
    check(n_dc > 0 && n_intra > 0 && n_inter > 0 && n_zero > 0, "a path was never taken");
    $display("intra DC %0d intra AC %0d inter %0d zero %0d saturated %0d", n_dc, n_intra, n_inter, n_zero, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
