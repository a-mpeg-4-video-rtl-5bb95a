// Testbench of the two-bank 24x24 reference memory: fills the whole window with
// random pixel pairs through the demultiplexed write port, then reads every
// row at every start column 0..16 and checks all eight pixels of the read
// port against the model.
module tb_ref_mem;
  import me_pkg::*;

  logic clk = 0, we = 0;
  logic [4:0] wr_row = '0, wr_col = '0, rd_row = '0, rd_col = '0;
  pix_t [1:0] wr_px = '0;
  pix_t [NUM_PE-1:0] rd_px;
  int checks = 0, failures = 0;
  int model [24][24];

  ref_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 24; r++)
      for (int c = 0; c < 24; c += 2) begin
        @(negedge clk);
        we = 1; wr_row = 5'(r); wr_col = 5'(c);
        wr_px[0] = 8'($urandom); wr_px[1] = 8'($urandom);
        model[r][c] = wr_px[0]; model[r][c+1] = wr_px[1];
      end
    @(negedge clk);
    we = 0;
    for (int r = 0; r < 24; r++)
      for (int c = 0; c <= 16; c++) begin
        rd_row = 5'(r); rd_col = 5'(c);
        #1;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(rd_px[k]) != model[r][c+k]) begin
            failures++;
            $display("FAIL: row %0d col %0d lane %0d: %0d exp %0d", r, c, k, rd_px[k], model[r][c+k]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
