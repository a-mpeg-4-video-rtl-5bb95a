// Reference memory: the 24x24 down-sampled search window as two 24x12 banks.
//
// The window's even rows live in bank 0 and its odd rows in bank 1; the write
// demultiplexer steers each pair of pixels from the reference down sampler to
// the bank chosen by bit 0 of its window row. The read port returns eight
// consecutive pixels of one window row, starting at rd_col (0..16), which is
// what the eight PEs of the coarse search consume in one cycle; the skip unit
// uses the first of them. Reads are combinational. 576 bytes in total.
// The 24x12x2 organisation, the demultiplexer and the 576-byte size are the
// document's; the row interleaving and the 8-pixel read port are this
// design's choices.
module ref_mem
  import me_pkg::*;
(
  input  logic              clk,
  input  logic              we,
  input  logic [4:0]        wr_row,   // window row 0..23
  input  logic [4:0]        wr_col,   // even window column 0..22
  input  pix_t [1:0]        wr_px,
  input  logic [4:0]        rd_row,   // window row 0..23
  input  logic [4:0]        rd_col,   // first window column 0..16
  output pix_t [NUM_PE-1:0] rd_px
);
  pix_t bank0 [BANK_ROWS][WIN];
  pix_t bank1 [BANK_ROWS][WIN];

  logic [3:0] wr_addr, rd_addr;
  assign wr_addr = wr_row[4:1];
  assign rd_addr = rd_row[4:1];

  // write demultiplexer
  always_ff @(posedge clk) begin
    if (we && !wr_row[0]) begin
      bank0[wr_addr][{wr_col[4:1], 1'b0}] <= wr_px[0];
      bank0[wr_addr][{wr_col[4:1], 1'b1}] <= wr_px[1];
    end
    if (we && wr_row[0]) begin
      bank1[wr_addr][{wr_col[4:1], 1'b0}] <= wr_px[0];
      bank1[wr_addr][{wr_col[4:1], 1'b1}] <= wr_px[1];
    end
  end

  always_comb begin
    for (int k = 0; k < NUM_PE; k++) begin
      logic [4:0] c;
      c = rd_col + 5'(k);
      if (c > 5'(WIN - 1)) c = 5'(WIN - 1);
      rd_px[k] = rd_row[0] ? bank1[rd_addr][c] : bank0[rd_addr][c];
    end
  end

endmodule
