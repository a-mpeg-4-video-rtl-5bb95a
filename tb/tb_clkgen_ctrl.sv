// Testbench of the clock generator controller: codec mode (download, then
// encode/decode per frame), encoder-only and decoder-only runs, and stop.
// Checks at every cycle that at most one enable is high, the phase order
// against an expected sequence, that each start pulse comes with its
// enable, that a done in a phase's first cycle is ignored,
// and the frame counter.
module tb_clkgen_ctrl;
  logic clk = 0, rst_n = 0, run = 0, enc_mode = 1, dec_mode = 1;
  logic dl_done = 0, enc_done = 0, dec_done = 0;
  logic en_dl, en_enc, en_dec, start_dl, start_enc, start_dec;
  logic [15:0] frame_cnt;
  int checks = 0, failures = 0;

  clkgen_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit seq_is(int q [$], int e [$]);
    if (q.size() != e.size()) return 0;
    foreach (q[i]) if (q[i] != e[i]) return 0;
    return 1;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // phase log from the start pulses: 1 download, 2 encode, 3 decode
  int log_q [$];
  always @(negedge clk) if (rst_n) begin
    check($countones({en_dec, en_enc, en_dl}) <= 1, "two enables");
    check($countones({start_dec, start_enc, start_dl}) <= 1, "two starts");
    if (start_dl)  log_q.push_back(1);
    if (start_enc) log_q.push_back(2);
    if (start_dec) log_q.push_back(3);
    // a start pulse comes with its own enable
    check(!((start_dl && !en_dl) || (start_enc && !en_enc) || (start_dec && !en_dec)),
          "start pulse without its enable");
  end

  // called in the first cycle of a phase: raises a stale done there, then
  // ends the phase after n cycles and returns in the first cycle of the next
  task automatic finish_phase(int n);
    // first cycle of the phase: a stale done must be ignored
    if (en_dl) dl_done = 1; else if (en_enc) enc_done = 1; else if (en_dec) dec_done = 1;
    @(negedge clk);
    dl_done = 0; enc_done = 0; dec_done = 0;
    check(en_dl || en_enc || en_dec, "stale done ended a phase");
    repeat (n) @(negedge clk);
    if (en_dl) dl_done = 1; else if (en_enc) enc_done = 1; else if (en_dec) dec_done = 1;
    @(negedge clk);
    dl_done = 0; enc_done = 0; dec_done = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!en_dl && !en_enc && !en_dec, "clocks on while idle");
    // codec mode, 3 frames
    run = 1;
    @(negedge clk);
    finish_phase(5);                    // download
    for (int f = 0; f < 3; f++) begin
      finish_phase(7);                  // encode
      if (f == 2) run = 0;
      finish_phase(4);                  // decode
    end
    repeat (3) @(negedge clk);
    check(!en_dl && !en_enc && !en_dec, "clocks on after stop");
    check(frame_cnt == 3, $sformatf("frame count %0d", frame_cnt));
    begin int e [$] = {1, 2, 3, 2, 3, 2, 3}; check(seq_is(log_q, e), $sformatf("codec sequence %p", log_q)); end
    // encoder only, 2 frames
    log_q.delete();
    enc_mode = 1; dec_mode = 0; run = 1;
    @(negedge clk);
    finish_phase(3);
    finish_phase(3);
    run = 0;
    finish_phase(3);
    repeat (3) @(negedge clk);
    begin int e [$] = {1, 2, 2}; check(seq_is(log_q, e), $sformatf("encoder-only sequence %p", log_q)); end
    check(frame_cnt == 5, $sformatf("frame count %0d", frame_cnt));
    // decoder only, 1 frame
    log_q.delete();
    enc_mode = 0; dec_mode = 1; run = 1;
    @(negedge clk);
    finish_phase(3);
    run = 0;
    finish_phase(3);
    repeat (3) @(negedge clk);
    begin int e [$] = {1, 3}; check(seq_is(log_q, e), $sformatf("decoder-only sequence %p", log_q)); end
    check(frame_cnt == 6, $sformatf("frame count %0d", frame_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
