// Testbench of the mixed-mode coarse motion estimation unit.
//
// Streams two macroblock rows of a synthetic QCIF-width frame pair into the
// unit through its load ports, starts each macroblock through the register
// bus and compares vector, SAD and skip flag with the reference model, the
// start-to-done cycle count with 69 (skipped) or 2118 (searched) cycles,
// and the skip/search counters. Both the skip path and the full search must
// occur.
module tb_me_unit;
  import me_pkg::*;
  import me_ref_pkg::*;

  localparam int MBC = 11;
  localparam int VX = 2, VY = -2, NOISE = 6;

  logic clk = 0, rst_n = 0;
  logic load_restart = 0, cur_valid = 0, ref_valid = 0;
  logic [31:0] cur_word = '0, ref_word = '0;
  logic bus_sel = 0, bus_we = 0;
  logic [2:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic busy, done, skip_flag;
  mv_t  min_mv;
  sad_t min_sad;

  int checks = 0, failures = 0;
  int n_skip = 0, n_search = 0;

  me_unit #(.MB_COLS(MBC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus_write(logic [2:0] a, logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
  endtask

  task automatic bus_read(logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_addr = a;
    #1 d = bus_rdata;
  endtask

  task automatic load_mb(int t, int mbx, int mby);
    @(negedge clk);
    load_restart = 1;
    @(negedge clk);
    load_restart = 0;
    for (int w = 0; w < 576; w++) begin
      cur_valid = (w < 64);
      if (w < 64) cur_word = word(t, 16*mbx, 16*mby, w, 16, VX, VY, NOISE);
      ref_valid = 1;
      ref_word  = word(t - 1, 16*mbx - 16, 16*mby - 16, w, 48, VX, VY, NOISE);
      @(negedge clk);
    end
    cur_valid = 0;
    ref_valid = 0;
  endtask

  res_t row_store [MBC];

  initial begin
    logic [31:0] d;
    res_t na, nb, nc, exp_res;
    bit   exp_skip;
    int   cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    bus_write(REG_CTRL, 32'h2);  // new frame
    for (int mby = 0; mby < 2; mby++)
      for (int mbx = 0; mbx < MBC; mbx++) begin
        na = '{0, 0, 0}; nb = '{0, 0, 0}; nc = '{0, 0, 0};
        if (mbx > 0) na = row_store[mbx - 1];
        if (mby > 0) nb = row_store[mbx];
        if (mby > 0 && mbx < MBC - 1) nc = row_store[mbx + 1];
        estimate(1, mbx, mby, VX, VY, NOISE, na, nb, nc, exp_res, exp_skip);
        load_mb(1, mbx, mby);
        bus_write(REG_MBPOS, {16'd0, 8'(mby), 8'(mbx)});
        // start, then count cycles to the done pulse
        @(negedge clk);
        bus_sel = 1; bus_we = 1; bus_addr = REG_CTRL; bus_wdata = 32'h1;
        @(negedge clk);
        bus_sel = 0; bus_we = 0;
        cyc = 1;
        while (!done) begin
          @(negedge clk);
          cyc++;
        end
        check(cyc == (exp_skip ? 69 : 2118), $sformatf("MB(%0d,%0d) cycles %0d", mbx, mby, cyc));
        check(skip_flag == exp_skip, $sformatf("MB(%0d,%0d) skip %0d exp %0d", mbx, mby, skip_flag, exp_skip));
        check(int'(min_mv.x) == exp_res.mvx && int'(min_mv.y) == exp_res.mvy && int'(min_sad) == exp_res.sad,
              $sformatf("MB(%0d,%0d) mv (%0d,%0d) sad %0d exp (%0d,%0d) %0d", mbx, mby,
                        min_mv.x, min_mv.y, min_sad, exp_res.mvx, exp_res.mvy, exp_res.sad));
        bus_read(REG_RESULT, d);
        check(d[29:16] == 14'(exp_res.sad) && d[3:0] == 4'(exp_res.mvx) && d[11:8] == 4'(exp_res.mvy),
              $sformatf("MB(%0d,%0d) RESULT register %h", mbx, mby, d));
        bus_read(REG_STATUS, d);
        check(d[2:0] == {exp_skip, 2'b10}, $sformatf("STATUS %h", d));
        if (exp_skip) n_skip++; else n_search++;
        row_store[mbx] = exp_res;
      end
    bus_read(REG_COUNT, d);
    check(d == {16'(n_search), 16'(n_skip)}, $sformatf("COUNT %h", d));
    $display("skipped %0d searched %0d", n_skip, n_search);
    check(n_skip > 0, "skip path never taken");
    check(n_search > 0, "full search never taken");
    bus_write(REG_CTRL, 32'h2);
    bus_read(REG_COUNT, d);
    check(d == 0, "counters not cleared by new frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
