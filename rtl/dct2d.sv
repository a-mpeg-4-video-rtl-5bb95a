// 8x8 two-dimensional DCT / IDCT on one bit-serial distributed-arithmetic
// engine (dct8_da), by the row-column method.
//
// A block of 64 samples (12-bit two's complement, raster order) is accepted
// one per cycle while `in_ready` is high; `inv` is taken with the first
// sample (0 = forward DCT of residual pixels, 1 = inverse DCT of
// coefficients). The eight rows are then transformed in place in the 8x8
// block store, keeping two fractional bits, then the eight columns, rounded
// to integers. The result leaves in raster order, one sample per cycle with
// `out_valid`, saturated to 12 bits. Both passes use the orthonormal
// transform, so forward and inverse are exact inverses up to rounding.
// Timing: 64 load cycles, 16 transforms of 19 cycles, 64 output cycles:
// 432 cycles per block; the first output sample appears 305 cycles after
// the last input sample.
// The source design's DCT/IDCT uses 1-bit serial distributed arithmetic;
// the row-column organisation, the single shared engine, the block store
// and the widths are this design's choices. Quantisation and AC/DC
// prediction are not included.
module dct2d
  import dct_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        inv,
  input  logic        in_valid,
  input  logic [11:0] in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [11:0] out_data,
  output logic        busy
);
  typedef enum logic [2:0] {D_LOAD, D_ROW, D_ROW_WAIT, D_COL, D_COL_WAIT, D_OUT} dstate_t;
  dstate_t state;

  smp_t       blk [8][8];
  logic [5:0] cnt;
  logic [2:0] line;
  logic       inv_q;

  smp_t [7:0] eng_x, eng_y;
  logic       eng_start, eng_done;
  logic [4:0] eng_shift;

  assign in_ready  = (state == D_LOAD);
  assign busy      = (state != D_LOAD) || (cnt != 6'd0);
  assign eng_start = (state == D_ROW) || (state == D_COL);
  // rows keep 2 fractional bits (13 - 2), columns return to integers (13 + 2)
  assign eng_shift = (state == D_COL || state == D_COL_WAIT) ? 5'd15 : 5'd11;

  always_comb begin
    for (int k = 0; k < 8; k++)
      eng_x[k] = (state == D_COL) ? blk[k][line] : blk[line][k];
  end

  dct8_da u_engine (
    .clk, .rst_n, .start(eng_start), .inv(inv_q), .rshift(eng_shift),
    .x(eng_x), .y(eng_y), .done(eng_done));

  function automatic logic [11:0] sat12(smp_t v);
    if (v > smp_t'(2047))  return 12'h7FF;
    if (v < smp_t'(-2048)) return 12'h800;
    return v[11:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_LOAD;
      cnt       <= '0;
      line      <= '0;
      inv_q     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        D_LOAD: if (in_valid) begin
          if (cnt == 6'd0) inv_q <= inv;
          blk[cnt[5:3]][cnt[2:0]] <= smp_t'(signed'(in_data));
          cnt <= cnt + 1'b1;
          if (cnt == 6'd63) begin
            state <= D_ROW;
            line  <= '0;
          end
        end
        D_ROW: state <= D_ROW_WAIT;
        D_ROW_WAIT: if (eng_done) begin
          for (int k = 0; k < 8; k++) blk[line][k] <= eng_y[k];
          line  <= line + 1'b1;
          state <= (line == 3'd7) ? D_COL : D_ROW;
        end
        D_COL: state <= D_COL_WAIT;
        D_COL_WAIT: if (eng_done) begin
          for (int k = 0; k < 8; k++) blk[k][line] <= eng_y[k];
          line <= line + 1'b1;
          if (line == 3'd7) begin
            state <= D_OUT;
            cnt   <= '0;
          end else begin
            state <= D_COL;
          end
        end
        D_OUT: begin
          out_valid <= 1'b1;
          out_data  <= sat12(blk[cnt[5:3]][cnt[2:0]]);
          cnt <= cnt + 1'b1;
          if (cnt == 6'd63) state <= D_LOAD;
        end
        default: state <= D_LOAD;
      endcase
    end
  end

endmodule
