// End-to-end testbench of the codec core at its default (QCIF) size.
//
// Runs the frame-level clock-gated sequence: image download, then for two
// frames an encoder phase and a decoder phase. In every encoder phase all 99
// macroblocks of a QCIF frame (11 x 9) are loaded and motion-estimated through
// the top-level ports, on the gated encoder clock, and compared with the
// reference model. Checked besides the results: the gated encoder clock gives
// no edge outside encoder phases, the download and decoder clocks none inside
// them, exactly one phase runs at a time, the frame counter, the per-macroblock
// cycle count (69 skipped / 2118 searched), and that one QCIF frame of motion
// estimation fits in the 900,000 cycles a frame has at 27 MHz and 30 frames/s.
// Each encoder phase also sends one block through the forward DCT and one
// through the IDCT while motion estimation runs, each decoder phase one
// through the IDCT, checked to +-1
// against a floating-point transform; the texture clock must be silent in
// the download phase.
// Mechanisms counted: ME skip taken, full search taken, picture-edge
// neighbours, clock gated off for the encoder domain, phase changes, DCT and
// IDCT blocks, cycles with motion estimation and transform busy together,
// AC/DC prediction runs (encoder direction in encoder phases, the decoder
// direction restoring the block in decoder phases), quantiser runs.
module tb_codec_top;
  import me_pkg::*;
  import me_ref_pkg::*;

  localparam int MBC = 11, MBR = 9;
  localparam int VX = 2, VY = -2, NOISE = 6;
  localparam int FRAMES = 2;

  logic clk = 0, rst_n = 0, test_en = 0;
  logic run = 0, enc_mode = 1, dec_mode = 1;
  logic dl_done = 0, enc_done = 0, dec_done = 0;
  logic start_dl, start_enc, start_dec;
  logic [15:0] frame_cnt;
  logic gclk_dl, gclk_enc, gclk_dec;
  logic me_load_restart = 0, me_cur_valid = 0, me_ref_valid = 0;
  logic [31:0] me_cur_word = '0, me_ref_word = '0;
  logic me_bus_sel = 0, me_bus_we = 0;
  logic [2:0] me_bus_addr = '0;
  logic [31:0] me_bus_wdata = '0, me_bus_rdata;
  logic me_busy, me_done, me_skip;
  mv_t  me_mv;
  sad_t me_sad;
  logic gclk_tex;
  logic dct_inv = 0, dct_in_valid = 0;
  logic [11:0] dct_in_data = '0;
  logic dct_in_ready, dct_out_valid, dct_busy;
  logic [11:0] dct_out_data;
  logic acdc_start = 0, acdc_inv = 0, acdc_ac_pred = 1;
  logic q_in_valid = 0, q_inv = 0, q_intra = 1, q_is_dc = 0, q_luma = 1;
  logic [4:0] q_qp = 3;   // dc_scaler 8 for the AC/DC prediction
  logic signed [11:0] q_in_coef = '0;
  logic q_out_valid;
  logic signed [11:0] q_out_coef;
  int n_quant = 0;
  logic [4:0] acdc_qp_x = 10, acdc_qp_a = 10, acdc_qp_c = 10;
  logic [11:0] acdc_f_a = 1000, acdc_f_b = 1000, acdc_f_c = 500;   // gradient picks C
  logic signed [11:0] acdc_qf_a_col [7], acdc_qf_c_row [7];
  logic signed [12:0] acdc_in_dc = 100, acdc_in_row [7], acdc_in_col [7];
  logic acdc_valid, acdc_vertical;
  logic signed [12:0] acdc_out_dc, acdc_out_row [7], acdc_out_col [7];
  logic signed [12:0] acdc_res_dc, acdc_res_row [7];   // encoder result kept for the decoder
  int n_acdc = 0;

  int checks = 0, failures = 0;
  int n_skip = 0, n_search = 0, n_edge = 0, n_gated = 0, n_phase = 0, n_fdct = 0, n_idct = 0;
  int n_overlap = 0;   // cycles with motion estimation and transform both busy

  codec_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && me_busy && dct_busy) n_overlap++;

  initial begin
    repeat (2000000) @(posedge clk);
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

  // clock edge counters per domain
  int edges_enc = 0, edges_dl = 0, edges_dec = 0, edges_tex = 0;
  always @(posedge gclk_tex) edges_tex++;
  always @(posedge gclk_enc) edges_enc++;
  always @(posedge gclk_dl)  edges_dl++;
  always @(posedge gclk_dec) edges_dec++;

  // phase start pulses, counted on the root clock
  int starts_dl = 0, starts_enc = 0, starts_dec = 0;
  always @(posedge clk) if (rst_n) begin
    if (start_dl)  starts_dl++;
    if (start_enc) starts_enc++;
    if (start_dec) starts_dec++;
  end

  // one phase at a time, as seen on the root clock
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.en_dl) + int'(dut.en_enc) + int'(dut.en_dec) > 1) begin
      failures++;
      $display("FAIL: two phases enabled");
    end
    if (!dut.en_enc) n_gated++;
  end

  task automatic bus_write(logic [2:0] a, logic [31:0] d);
    @(negedge clk);
    me_bus_sel = 1; me_bus_we = 1; me_bus_addr = a; me_bus_wdata = d;
    @(negedge clk);
    me_bus_sel = 0; me_bus_we = 0;
  endtask

  task automatic bus_read(logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    me_bus_addr = a;
    #1 d = me_bus_rdata;
  endtask

  task automatic load_mb(int t, int mbx, int mby);
    @(negedge clk);
    me_load_restart = 1;
    @(negedge clk);
    me_load_restart = 0;
    for (int w = 0; w < 576; w++) begin
      me_cur_valid = (w < 64);
      if (w < 64) me_cur_word = word(t, 16*mbx, 16*mby, w, 16, VX, VY, NOISE);
      me_ref_valid = 1;
      me_ref_word  = word(t - 1, 16*mbx - 16, 16*mby - 16, w, 48, VX, VY, NOISE);
      @(negedge clk);
    end
    me_cur_valid = 0;
    me_ref_valid = 0;
  endtask

  // wait for a phase start pulse, then let the domain run `n` cycles and end it
  task automatic idle_phase(ref logic done_sig, input int n);
    repeat (n) @(negedge clk);
    done_sig = 1;
    @(negedge clk);
    done_sig = 0;
  endtask

  res_t row_store [MBC];

  function automatic real cf(int k, int n);
    real c;
    c = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return c / 2.0 * $cos((2 * n + 1) * k * 3.14159265358979 / 16.0);
  endfunction

  // one 8x8 block through the DCT (dir 0) or IDCT (dir 1), checked to +-1
  // intra AC/DC prediction: encoder direction in encoder phases, the decoder
  // direction on the kept residual in decoder phases (must restore the block)
  task automatic acdc_run(bit dir);
    @(negedge clk);
    acdc_inv = dir;
    for (int i = 0; i < 7; i++) begin
      acdc_qf_c_row[i] = 12'(i * 7 - 20);
      acdc_qf_a_col[i] = 12'(30 - i);
      acdc_in_row[i] = dir ? acdc_res_row[i] : 13'(i * 11 - 30);
      acdc_in_col[i] = 13'(5 * i);
    end
    acdc_in_dc = dir ? acdc_res_dc : 13'sd100;
    acdc_start = 1;
    @(negedge clk);
    acdc_start = 0;
    check(acdc_valid && acdc_vertical, "AC/DC prediction did not choose block C");
    if (!dir) begin
      // 500 // 8 = 63; equal quantisers: the row predictor is C's row itself
      check(int'(acdc_out_dc) == 37, $sformatf("AC/DC residual DC %0d", acdc_out_dc));
      for (int i = 0; i < 7; i++)
        check(int'(acdc_out_row[i]) == (i * 11 - 30) - (i * 7 - 20) && int'(acdc_out_col[i]) == 5 * i,
              $sformatf("AC/DC residual %0d", i));
      acdc_res_dc = acdc_out_dc;
      acdc_res_row = acdc_out_row;
    end else begin
      check(int'(acdc_out_dc) == 100, $sformatf("AC/DC reconstructed DC %0d", acdc_out_dc));
      for (int i = 0; i < 7; i++)
        check(int'(acdc_out_row[i]) == i * 11 - 30, $sformatf("AC/DC reconstructed %0d", i));
    end
    n_acdc++;
  endtask

  // quantise then inverse-quantise a few intra coefficients at QP 3
  task automatic quant_run();
    int f [4] = '{800, -100, 37, 5};
    int e [4] = '{100, -16, 6, 0};     // DC 800/8; |F|/6 for AC
    int r [4] = '{800, -99, 39, 0};    // DC 100*8; 3*(2|L|+1)
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      q_in_valid = 1; q_inv = 0; q_intra = 1; q_is_dc = (i == 0); q_in_coef = 12'(f[i]);
      @(negedge clk);
      q_in_valid = 0;
      check(q_out_valid && int'(q_out_coef) == e[i], $sformatf("Q %0d -> %0d", f[i], q_out_coef));
      q_in_valid = 1; q_inv = 1; q_in_coef = q_out_coef;
      @(negedge clk);
      q_in_valid = 0;
      check(q_out_valid && int'(q_out_coef) == r[i], $sformatf("IQ -> %0d exp %0d", q_out_coef, r[i]));
    end
    n_quant++;
  endtask

  task automatic dct_block(bit dir);
    int b [8][8];
    int got [64];
    int n, bad;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        b[i][j] = dir ? ((i + j < 3) ? $urandom_range(0, 400) - 200 : 0) : $urandom_range(0, 510) - 255;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      dct_in_valid = 1; dct_inv = dir; dct_in_data = 12'(b[i / 8][i % 8]);
      @(negedge clk);
    end
    dct_in_valid = 0;
    n = 0;
    while (n < 64) begin
      if (dct_out_valid) begin
        got[n] = int'(signed'(dct_out_data));
        n++;
      end
      @(negedge clk);
    end
    bad = 0;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        real e;
        int ex;
        e = 0.0;
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++)
            e += dir ? cf(i, u) * cf(j, v) * b[i][j] : cf(u, i) * cf(v, j) * b[i][j];
        ex = $rtoi(e + (e >= 0 ? 0.5 : -0.5));
        if (got[u * 8 + v] > ex + 1 || got[u * 8 + v] < ex - 1) bad++;
      end
    check(bad == 0, $sformatf("%s block: %0d samples off", dir ? "IDCT" : "DCT", bad));
    if (dir) n_idct++; else n_fdct++;
  endtask

  task automatic encode_frame(int t);
    logic [31:0] d;
    res_t na, nb, nc, exp_res;
    bit   exp_skip;
    int   cyc, c0;
    c0 = edges_enc;
    bus_write(REG_CTRL, 32'h2);
    for (int mby = 0; mby < MBR; mby++)
      for (int mbx = 0; mbx < MBC; mbx++) begin
        na = '{0, 0, 0}; nb = '{0, 0, 0}; nc = '{0, 0, 0};
        if (mbx > 0) na = row_store[mbx - 1];
        if (mby > 0) nb = row_store[mbx];
        if (mby > 0 && mbx < MBC - 1) nc = row_store[mbx + 1];
        if (mbx == 0 || mby == 0 || mbx == MBC - 1) n_edge++;
        estimate(t, mbx, mby, VX, VY, NOISE, na, nb, nc, exp_res, exp_skip);
        load_mb(t, mbx, mby);
        bus_write(REG_MBPOS, {16'd0, 8'(mby), 8'(mbx)});
        @(negedge clk);
        me_bus_sel = 1; me_bus_we = 1; me_bus_addr = REG_CTRL; me_bus_wdata = 32'h1;
        @(negedge clk);
        me_bus_sel = 0; me_bus_we = 0;
        cyc = 1;
        while (!me_done) begin
          @(negedge clk);
          cyc++;
        end
        check(cyc == (exp_skip ? 69 : 2118), $sformatf("MB(%0d,%0d) cycles %0d", mbx, mby, cyc));
        check(me_skip == exp_skip && int'(me_mv.x) == exp_res.mvx && int'(me_mv.y) == exp_res.mvy
              && int'(me_sad) == exp_res.sad,
              $sformatf("F%0d MB(%0d,%0d) skip %0d mv (%0d,%0d) sad %0d exp %0d (%0d,%0d) %0d", t, mbx, mby,
                        me_skip, me_mv.x, me_mv.y, me_sad, exp_skip, exp_res.mvx, exp_res.mvy, exp_res.sad));
        if (exp_skip) n_skip++; else n_search++;
        row_store[mbx] = exp_res;
      end
    bus_read(REG_COUNT, d);
    check(int'(d[15:0]) + int'(d[31:16]) == MBC * MBR, $sformatf("COUNT %h", d));
    $display("frame %0d: %0d skipped, %0d searched, %0d encoder cycles", t, d[15:0], d[31:16], edges_enc - c0);
    check(edges_enc - c0 < 27_000_000 / 30, "QCIF frame does not fit 900000 cycles");
  endtask

  initial begin
    int e0, d0, l0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    edges_enc = 0; edges_dl = 0; edges_dec = 0; edges_tex = 0;
    repeat (3) @(negedge clk);
    check(edges_enc == 0 && edges_dl == 0 && edges_dec == 0 && edges_tex == 0, "clocks running while idle");
    run = 1;
    // download phase
    wait (starts_dl == 1);
    n_phase++;
    $display("download phase");
    e0 = edges_enc; d0 = edges_dec; l0 = edges_tex;
    idle_phase(dl_done, 50);
    check(edges_tex == l0, "texture clock ran during download");
    check(edges_enc == e0 && edges_dec == d0, "encoder/decoder clock ran during download");
    check(edges_dl >= 50, "download clock did not run");
    for (int f = 1; f <= FRAMES; f++) begin
      wait (starts_enc == f);
      if (f == FRAMES) run = 0;
      n_phase++;
      $display("encoder phase %0d", f);
      l0 = edges_dl; d0 = edges_dec;
      @(negedge clk);
      // the transform engine works alongside motion estimation
      fork
        encode_frame(f);
        begin
          dct_block(0);
          dct_block(1);
          acdc_run(0);
          quant_run();
        end
      join
      check(edges_dl == l0 && edges_dec == d0, "download/decoder clock ran during encoding");
      idle_phase(enc_done, 2);
      wait (starts_dec == f);
      n_phase++;
      e0 = edges_enc;
      dct_block(1);
      acdc_run(1);
      idle_phase(dec_done, 100);
      check(edges_enc == e0, "encoder clock ran during decoding");
      repeat (3) @(negedge clk);
      check(frame_cnt == 16'(f), $sformatf("frame count %0d", frame_cnt));
    end
    // run was dropped: back to idle with every clock stopped
    e0 = edges_enc; d0 = edges_dec; l0 = edges_dl;
    repeat (20) @(negedge clk);
    check(edges_enc == e0 && edges_dec == d0 && edges_dl == l0, "clocks running after stop");
    $display("skip %0d search %0d edge-MBs %0d enc-gated-cycles %0d phases %0d dct %0d idct %0d overlap %0d",
             n_skip, n_search, n_edge, n_gated, n_phase, n_fdct, n_idct, n_overlap);
    check(n_skip > 0, "ME skip never happened");
    check(n_search > 0, "full coarse search never happened");
    check(n_edge > 0, "no picture-edge macroblock");
    check(n_gated > 0, "encoder clock never gated");
    check(n_phase == 1 + 2 * FRAMES, "phase sequence incomplete");
    check(n_fdct > 0 && n_idct > 0, "DCT or IDCT never ran");
    check(n_quant == FRAMES, "quantiser runs missing");
    check(n_acdc == 2 * FRAMES, "AC/DC prediction runs missing");
    check(n_overlap > 0, "motion estimation and transform never ran together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
