// Testbench of the 8x8 current memory: writes random pixel pairs to all 32
// positions, then reads all 64 pixels back and checks them; a second round
// overwrites half of them and checks the rest are kept.
module tb_cur_mem;
  import me_pkg::*;

  logic clk = 0, we = 0;
  logic [2:0] wr_row = '0, wr_col = '0, rd_row = '0, rd_col = '0;
  pix_t [1:0] wr_px = '0;
  pix_t rd_px;
  int checks = 0, failures = 0;
  int model [8][8];

  cur_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 2; round++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c += 2) begin
          if (round == 1 && r[0]) continue;
          @(negedge clk);
          we = 1; wr_row = 3'(r); wr_col = 3'(c);
          wr_px[0] = 8'($urandom); wr_px[1] = 8'($urandom);
          model[r][c] = wr_px[0]; model[r][c+1] = wr_px[1];
        end
      @(negedge clk);
      we = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          rd_row = 3'(r); rd_col = 3'(c);
          #1;
          checks++;
          if (int'(rd_px) != model[r][c]) begin
            failures++;
            $display("FAIL: (%0d,%0d) %0d exp %0d", r, c, rd_px, model[r][c]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
