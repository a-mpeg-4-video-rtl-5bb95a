// Current memory: the 8x8 down-sampled current macroblock.
//
// Written two pixels at a time by the current-data down sampler (row, even
// column), read one pixel per cycle with a combinational read port by the
// address generator's (row, column). 64 bytes of flip-flops.
// The 8x8 size is the document's; the port widths are this design's.
module cur_mem
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [2:0] wr_row,
  input  logic [2:0] wr_col,     // even
  input  pix_t [1:0] wr_px,
  input  logic [2:0] rd_row,
  input  logic [2:0] rd_col,
  output pix_t       rd_px
);
  pix_t mem [BLK][BLK];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[wr_row][{wr_col[2:1], 1'b0}] <= wr_px[0];
      mem[wr_row][{wr_col[2:1], 1'b1}] <= wr_px[1];
    end
  end

  assign rd_px = mem[rd_row][rd_col];

endmodule
