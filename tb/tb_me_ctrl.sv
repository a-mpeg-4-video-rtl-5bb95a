// Testbench of the ME control: a behavioural stand-in for the address
// generator answers each pass start with 64-cycle groups (one in skip mode,
// 32 in coarse mode). For a 3-row run over a 4-macroblock-wide picture with
// a random skip decision per macroblock, checks the pass sequence and modes,
// the evaluation and comparator strobes, the cycle count to `done`, the
// neighbour (A, B, C) outputs with picture-edge zeros, the stored results,
// and the bus registers.
module tb_me_ctrl;
  import me_pkg::*;

  localparam int MBC = 4;
  logic clk = 0, rst_n = 0;
  logic bus_sel = 0, bus_we = 0;
  logic [2:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic ag_start, ag_skip_mode, ag_grp_done = 0, ag_done = 0, dec_eval, skip_flag = 0;
  logic cmp_clear, cmp_valid;
  sad_t min_sad = '0;
  mv_t  min_mv = '0;
  mb_result_t nb_a, nb_b, nb_c;
  logic busy, done;
  int checks = 0, failures = 0;

  me_ctrl #(.MB_COLS(MBC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // address generator stand-in
  int n_start_skip = 0, n_start_coarse = 0, n_eval = 0, n_cmp = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (ag_start) begin
        int groups;
        if (ag_skip_mode) n_start_skip++; else n_start_coarse++;
        groups = ag_skip_mode ? 1 : 32;
        for (int c = 1; c <= groups * 64; c++) begin
          @(posedge clk);
          ag_grp_done <= (c % 64 == 0);
          ag_done     <= (c == groups * 64);
        end
        @(posedge clk);
        ag_grp_done <= 0;
        ag_done     <= 0;
      end
    end
  end
  always @(posedge clk) begin
    if (dec_eval) n_eval++;
    if (cmp_valid) n_cmp++;
  end

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

  mb_result_t store [MBC];

  initial begin
    logic [31:0] d;
    int n_sk, n_se;
    n_sk = 0; n_se = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    bus_write(REG_CTRL, 32'h2);
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < MBC; x++) begin
        mb_result_t ea, eb, ec, r;
        bit sk;
        int cyc, s0, c0, e0, m0;
        sk = $urandom_range(0, 1);
        r.sad = sad_t'($urandom_range(0, 16000));
        r.mv  = '{y: mvc_t'($urandom_range(0, 15) - 8), x: mvc_t'($urandom_range(0, 15) - 8)};
        ea = (x > 0) ? store[x-1] : '0;
        eb = (y > 0) ? store[x] : '0;
        ec = (y > 0 && x < MBC - 1) ? store[x+1] : '0;
        bus_write(REG_MBPOS, {16'd0, 8'(y), 8'(x)});
        bus_read(REG_MBPOS, d);
        check(d[15:0] == {8'(y), 8'(x)}, "MBPOS readback");
        check(nb_a == ea && nb_b == eb && nb_c == ec, $sformatf("neighbours of (%0d,%0d)", x, y));
        s0 = n_start_skip; c0 = n_start_coarse; e0 = n_eval; m0 = n_cmp;
        skip_flag = sk;       // what the decision will say
        min_sad = r.sad; min_mv = r.mv;
        @(negedge clk);
        bus_sel = 1; bus_we = 1; bus_addr = REG_CTRL; bus_wdata = 32'h1;
        @(negedge clk);
        bus_sel = 0; bus_we = 0;
        check(busy, "not busy after start");
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        check(cyc == (sk ? 69 : 2118), $sformatf("cycles %0d", cyc));
        check(n_start_skip == s0 + 1 && n_start_coarse == c0 + (sk ? 0 : 1), "pass sequence");
        check(n_eval == e0 + 1, "decision strobe");
        check(n_cmp == m0 + (sk ? 1 : 32), $sformatf("comparator strobes %0d", n_cmp - m0));
        bus_read(REG_RESULT, d);
        check(d == {2'd0, r.sad, 4'd0, r.mv.y, 4'd0, r.mv.x}, "RESULT register");
        bus_read(REG_STATUS, d);
        check(d[2:0] == {sk, 2'b10}, "STATUS register");
        store[x] = r;
        if (sk) n_sk++; else n_se++;
      end
    bus_read(REG_COUNT, d);
    check(d == {16'(n_se), 16'(n_sk)}, "COUNT register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
