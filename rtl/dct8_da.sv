// 8-point DCT / IDCT engine with 1-bit serial distributed arithmetic.
//
// Forward (inv = 0): the inputs are folded into sums a_i = x_i + x_(7-i) and
// differences b_i = x_i - x_(7-i), i = 0..3. Output y_2m is the dot product
// of a with row 2m of the DCT matrix, y_(2m+1) that of b with row 2m+1.
// Inverse (inv = 1): the even coefficients y0, y2, y4, y6 feed four dot
// products E_n and the odd ones y1, y3, y5, y7 four dot products O_n;
// x_n = E_n + O_n and x_(7-n) = E_n - O_n.
// Each of the eight dot products is one distributed-arithmetic unit. Every
// cycle it takes one bit of each of its four inputs, most significant slice
// first, looks up the sum of the coefficients selected by those four bits in
// its 16-entry table, and accumulates acc = 2*acc + entry (the sign slice
// subtracts). After DA_BITS = 17 slices the products are exact in units of
// 2^-13; the results are rounded by `rshift` bits and saturated to 16 bits.
// Timing: `start` loads the eight inputs; `done` pulses 17 cycles after the start cycle with
// the results on `y`, which hold until the next `done`.
// The 1-bit serial DA method is the one the source design uses for its
// DCT/IDCT; the even/odd decomposition, widths and rounding are this
// design's choices.
module dct8_da
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       inv,
  input  logic [4:0] rshift,   // 1..24
  input  smp_t [7:0] x,
  output smp_t [7:0] y,
  output logic       done
);
  // bit-serial operands: even group and odd group, four inputs each
  logic signed [DA_BITS-1:0] sr_e [4];
  logic signed [DA_BITS-1:0] sr_o [4];
  acc_t       acc [8];
  logic       inv_q, busy;
  logic [4:0] slice;
  logic [4:0] shift_q;

  // 16-entry DA table of unit u (0..3 even group, 4..7 odd group)
  function automatic int da_entry(logic inv_m, int u, logic [3:0] s);
    int sum;
    sum = 0;
    for (int i = 0; i < 4; i++)
      if (s[i]) begin
        if (!inv_m) sum += (u < 4) ? coef(2 * u, i) : coef(2 * (u - 4) + 1, i);
        else        sum += (u < 4) ? coef(2 * i, u) : coef(2 * i + 1, u - 4);
      end
    return sum;
  endfunction

  logic [3:0] bits_e, bits_o;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      bits_e[i] = sr_e[i][DA_BITS-1];
      bits_o[i] = sr_o[i][DA_BITS-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      inv_q   <= 1'b0;
      slice   <= '0;
      shift_q <= '0;
      done    <= 1'b0;
      y       <= '0;
      for (int i = 0; i < 4; i++) begin
        sr_e[i] <= '0;
        sr_o[i] <= '0;
      end
      for (int u = 0; u < 8; u++) acc[u] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy    <= 1'b1;
        inv_q   <= inv;
        shift_q <= rshift;
        slice   <= '0;
        for (int i = 0; i < 4; i++) begin
          if (!inv) begin
            sr_e[i] <= DA_BITS'(x[i]) + DA_BITS'(x[7-i]);
            sr_o[i] <= DA_BITS'(x[i]) - DA_BITS'(x[7-i]);
          end else begin
            sr_e[i] <= DA_BITS'(x[2*i]);
            sr_o[i] <= DA_BITS'(x[2*i+1]);
          end
        end
      end else if (busy) begin
        for (int u = 0; u < 8; u++) begin
          acc_t entry;
          entry = (u < 4) ? acc_t'(da_entry(inv_q, u, bits_e)) : acc_t'(da_entry(inv_q, u, bits_o));
          if (slice == 5'd0) acc[u] <= -entry;              // sign slice
          else               acc[u] <= (acc[u] <<< 1) + entry;
        end
        for (int i = 0; i < 4; i++) begin
          sr_e[i] <= sr_e[i] <<< 1;
          sr_o[i] <= sr_o[i] <<< 1;
        end
        if (slice == 5'(DA_BITS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          for (int k = 0; k < 8; k++) y[k] <= round_sat(out_acc(k));
        end
        slice <= slice + 1'b1;
      end
    end
  end

  // final accumulator value of output k, including the current (last) slice
  function automatic acc_t out_acc(int k);
    acc_t fin [8];
    for (int u = 0; u < 8; u++)
      fin[u] = (acc[u] <<< 1) + ((u < 4) ? acc_t'(da_entry(inv_q, u, bits_e)) : acc_t'(da_entry(inv_q, u, bits_o)));
    if (!inv_q) return (k % 2 == 0) ? fin[k / 2] : fin[4 + k / 2];
    else        return (k < 4) ? fin[k] + fin[4 + k] : fin[7 - k] - fin[4 + 7 - k];
  endfunction

  function automatic smp_t round_sat(acc_t v);
    acc_t r;
    r = (v + (acc_t'(1) <<< (shift_q - 1))) >>> shift_q;
    if (r > acc_t'(2 ** (SMP_W - 1) - 1)) return smp_t'(2 ** (SMP_W - 1) - 1);
    if (r < -acc_t'(2 ** (SMP_W - 1)))    return smp_t'(-(2 ** (SMP_W - 1)));
    return smp_t'(r);
  endfunction

endmodule
