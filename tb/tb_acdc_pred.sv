// Testbench of the AC/DC prediction: random quantised blocks and neighbours,
// including flat neighbour DCs that make the gradients tie, missing
// neighbours (DC 1024, AC 0) and ac_pred off. The expected direction and
// predictors are worked out here in real arithmetic (round half away from
// zero), and every encoder result is fed back through the decoder direction,
// which must return the original coefficients. Checks the one-cycle latency.
module tb_acdc_pred;
  logic clk = 0, rst_n = 0, start = 0, inv = 0, ac_pred = 0;
  logic [5:0] dc_scaler = 8;
  logic [4:0] qp_x = 1, qp_a = 1, qp_c = 1;
  logic [11:0] f_a = '0, f_b = '0, f_c = '0;
  logic signed [11:0] qf_a_col [7], qf_c_row [7];
  logic signed [12:0] in_dc = '0, in_row [7], in_col [7];
  logic valid, vertical;
  logic signed [12:0] out_dc, out_row [7], out_col [7];
  int checks = 0, failures = 0, n_vert = 0, n_horiz = 0, n_ac = 0;

  acdc_pred dut (.*);

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

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  initial begin
    for (int i = 0; i < 7; i++) begin
      qf_a_col[i] = '0; qf_c_row[i] = '0; in_row[i] = '0; in_col[i] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int qps, ev, dcp, pa, pc;
      logic signed [12:0] x_dc, x_row [7], x_col [7], e_dc, e_row [7], e_col [7];
      bit v;
      qps = $urandom_range(1, 31);
      qp_x = 5'(qps); qp_a = 5'($urandom_range(1, 31)); qp_c = 5'($urandom_range(1, 31));
      dc_scaler = 6'($urandom_range(8, 46));
      ac_pred = (t % 5) != 0;
      case (t % 4)
        0: begin f_a = 1024; f_b = 1024; f_c = 1024; end   // no neighbours
        1: begin f_a = 12'($urandom_range(0, 2040)); f_b = f_a; f_c = f_a; end
        default: begin
          f_a = 12'($urandom_range(0, 2040)); f_b = 12'($urandom_range(0, 2040));
          f_c = 12'($urandom_range(0, 2040));
        end
      endcase
      x_dc = 13'($urandom_range(1, 254));
      for (int i = 0; i < 7; i++) begin
        qf_a_col[i] = (t % 4 == 0) ? 12'sd0 : 12'($urandom_range(0, 400) - 200);
        qf_c_row[i] = (t % 4 == 0) ? 12'sd0 : 12'($urandom_range(0, 400) - 200);
        x_row[i] = 13'($urandom_range(0, 400) - 200);
        x_col[i] = 13'($urandom_range(0, 400) - 200);
      end
      // expected
      v = ((int'(f_a) - int'(f_b)) < 0 ? int'(f_b) - int'(f_a) : int'(f_a) - int'(f_b))
        < ((int'(f_b) - int'(f_c)) < 0 ? int'(f_c) - int'(f_b) : int'(f_b) - int'(f_c));
      dcp = rnd(real'(v ? f_c : f_a) / real'(dc_scaler));
      e_dc = 13'(int'(x_dc) - dcp);
      for (int i = 0; i < 7; i++) begin
        pc = rnd(real'(int'(qf_c_row[i]) * int'(qp_c)) / real'(qps));
        pa = rnd(real'(int'(qf_a_col[i]) * int'(qp_a)) / real'(qps));
        e_row[i] = (ac_pred && v)  ? 13'(int'(x_row[i]) - pc) : x_row[i];
        e_col[i] = (ac_pred && !v) ? 13'(int'(x_col[i]) - pa) : x_col[i];
      end
      // encoder direction
      inv = 0; start = 1; in_dc = x_dc; in_row = x_row; in_col = x_col;
      @(negedge clk);
      start = 0;
      check(valid && vertical == v, $sformatf("t%0d direction %b exp %b", t, vertical, v));
      check(out_dc == e_dc, $sformatf("t%0d dc %0d exp %0d", t, out_dc, e_dc));
      for (int i = 0; i < 7; i++) begin
        check(out_row[i] == e_row[i], $sformatf("t%0d row %0d: %0d exp %0d", t, i, out_row[i], e_row[i]));
        check(out_col[i] == e_col[i], $sformatf("t%0d col %0d: %0d exp %0d", t, i, out_col[i], e_col[i]));
      end
      if (v) n_vert++; else n_horiz++;
      if (ac_pred) n_ac++;
      // decoder direction restores the block
      inv = 1; start = 1; in_dc = out_dc; in_row = out_row; in_col = out_col;
      @(negedge clk);
      start = 0;
      check(out_dc == x_dc && out_row == x_row && out_col == x_col, $sformatf("t%0d decoder round trip", t));
    end
    check(n_vert > 0 && n_horiz > 0 && n_ac > 0, "a prediction direction never occurred");
    $display("vertical %0d horizontal %0d with AC %0d", n_vert, n_horiz, n_ac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
