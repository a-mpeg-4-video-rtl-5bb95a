// Intra AC/DC prediction of MPEG-4 (the prediction step of the texture
// engine, applied to quantised 8x8 coefficients after the DCT and quantiser
// in the encoder, before the inverse quantiser in the decoder).
//
// Neighbour blocks: A left, B above-left, C above of the current block X.
// Their dequantised DC values F_A, F_B, F_C choose the direction by the
// gradient rule: if |F_A - F_B| < |F_B - F_C| the prediction comes from C
// (vertical: DC and first row), otherwise from A (horizontal: DC and first
// column). The caller gives 1024 as DC and 0 as AC for a neighbour that lies
// outside the picture or is not intra coded.
//   DC predictor:  F_pred // dc_scaler
//   AC predictor:  QF_nb[i] * QP_nb // QP_X          (only with ac_pred)
// where // divides and rounds to the nearest integer, halves away from zero.
// Encoder (inv = 0): out = in - pred. Decoder (inv = 1): out = in + pred.
// Only the DC and the seven coefficients of the chosen row or column change;
// the other seven edge inputs pass unchanged. Results are registered: `valid`
// follows `start` by one cycle and holds until the next `start`.
// The engine is named as part of the DCT/IDCT module; its rule is the one of
// the MPEG-4 visual standard. Widths and the port format are this design's.
module acdc_pred
  import dct_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               inv,
  input  logic               ac_pred,       // ac_pred_flag of the macroblock
  input  logic [5:0]         dc_scaler,     // 8..46, from QP
  input  logic [4:0]         qp_x,          // quantiser of the current block
  input  logic [4:0]         qp_a,          // quantiser of block A
  input  logic [4:0]         qp_c,          // quantiser of block C
  input  logic [11:0]        f_a,           // dequantised DC of A, B, C
  input  logic [11:0]        f_b,
  input  logic [11:0]        f_c,
  input  logic signed [11:0] qf_a_col [7],  // QF[1..7][0] of block A
  input  logic signed [11:0] qf_c_row [7],  // QF[0][1..7] of block C
  input  logic signed [12:0] in_dc,         // QF[0][0] (enc) or its residual (dec)
  input  logic signed [12:0] in_row [7],    // X[0][1..7]
  input  logic signed [12:0] in_col [7],    // X[1..7][0]
  output logic               valid,
  output logic               vertical,      // prediction came from C
  output logic signed [12:0] out_dc,
  output logic signed [12:0] out_row [7],
  output logic signed [12:0] out_col [7]
);
  // a // b for b > 0: nearest integer, halves away from zero
  function automatic int rdiv(int a, int b);
    return (a >= 0) ? (a + b / 2) / b : -((-a + b / 2) / b);
  endfunction

  function automatic logic signed [12:0] apply(logic signed [12:0] x, int p, logic dec);
    return dec ? 13'(int'(x) + p) : 13'(int'(x) - p);
  endfunction

  logic vert;
  int   grad_ab, grad_bc, dc_p, qx;

  always_comb begin
    grad_ab = int'(f_a) - int'(f_b);
    grad_bc = int'(f_b) - int'(f_c);
    if (grad_ab < 0) grad_ab = -grad_ab;
    if (grad_bc < 0) grad_bc = -grad_bc;
    vert = grad_ab < grad_bc;
    qx   = (qp_x == 0) ? 1 : int'(qp_x);
    dc_p = rdiv(vert ? int'(f_c) : int'(f_a), (dc_scaler == 0) ? 1 : int'(dc_scaler));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= 1'b0;
      vertical <= 1'b0;
      out_dc   <= '0;
      out_row  <= '{default: '0};
      out_col  <= '{default: '0};
    end else if (start) begin
      valid    <= 1'b1;
      vertical <= vert;
      out_dc   <= apply(in_dc, dc_p, inv);
      for (int i = 0; i < 7; i++) begin
        out_row[i] <= (ac_pred && vert)
                      ? apply(in_row[i], rdiv(int'(qf_c_row[i]) * int'(qp_c), qx), inv) : in_row[i];
        out_col[i] <= (ac_pred && !vert)
                      ? apply(in_col[i], rdiv(int'(qf_a_col[i]) * int'(qp_a), qx), inv) : in_col[i];
      end
    end
  end
endmodule
