// 2:1 down sampler (both directions) for the hierarchical coarse search.
//
// Full-resolution pixels arrive as 32-bit words of four horizontally adjacent
// pixels (leftmost pixel in bits 7:0), row by row, IN_W pixels per row. Each
// output pixel is the rounded mean of a 2x2 input square, (a+b+c+d+2)>>2.
// On even input rows the horizontal pair sums are parked in a half-width line
// buffer; on odd rows they are added to the parked sums and two down-sampled
// pixels leave per input word, one cycle after the word (registered output).
// `restart` returns the row/column counters to the top-left corner.
// out_col always names an even column (bit 0 is constant 0); it is kept as
// a full column index so the memories can use it without re-packing.
// The document names a current-data and a reference-data down-sampling
// block and the 2:1 ratio; the averaging filter, word format and line buffer
// are this design's choices.
module downsample2
  import me_pkg::*;
#(
  parameter int unsigned IN_W  = 16,  // full-resolution line width in pixels
  parameter int unsigned IN_H  = 16,  // full-resolution lines per block
  localparam int unsigned OUT_W = IN_W / 2,
  localparam int unsigned COL_W = (OUT_W > 1) ? $clog2(OUT_W) : 1,
  localparam int unsigned ROW_W = (IN_H > 2) ? $clog2(IN_H / 2) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  logic              in_valid,
  input  logic [31:0]       in_word,
  output logic              out_valid,
  output logic [ROW_W-1:0]  out_row,   // down-sampled row
  output logic [COL_W-1:0]  out_col,   // down-sampled column of out_px[0] (even)
  output pix_t [1:0]        out_px
);
  localparam int unsigned WORDS = IN_W / 4;
  localparam int unsigned WC_W  = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned IR_W  = $clog2(IN_H);

  logic [WC_W-1:0] wcol;
  logic [IR_W-1:0] irow;
  logic [PIX_W:0]  line_buf [OUT_W];   // pair sums of the last even row
  logic [PIX_W:0]  hsum [2];

  always_comb begin
    hsum[0] = {1'b0, in_word[7:0]}   + {1'b0, in_word[15:8]};
    hsum[1] = {1'b0, in_word[23:16]} + {1'b0, in_word[31:24]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcol      <= '0;
      irow      <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_px    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (restart) begin
        wcol <= '0;
        irow <= '0;
      end else if (in_valid) begin
        if (!irow[0]) begin
          line_buf[2*wcol]   <= hsum[0];
          line_buf[2*wcol+1] <= hsum[1];
        end else begin
          out_valid <= 1'b1;
          out_row   <= ROW_W'(irow >> 1);
          out_col   <= COL_W'(2 * wcol);
          for (int k = 0; k < 2; k++) begin
            logic [PIX_W+1:0] s;
            s = {1'b0, line_buf[2*wcol+k]} + {1'b0, hsum[k]} + 10'd2;
            out_px[k] <= s[PIX_W+1:2];
          end
        end
        if (wcol == WC_W'(WORDS - 1)) begin
          wcol <= '0;
          irow <= (irow == IR_W'(IN_H - 1)) ? '0 : irow + 1'b1;
        end else begin
          wcol <= wcol + 1'b1;
        end
      end
    end
  end

endmodule
