// Quantiser / inverse quantiser of the texture engine (Q/IQ), one coefficient
// per cycle, in the stream order of the DCT.
//
// Method: the H.263-style ("second") quantisation method of MPEG-4, with the
// DC of intra blocks handled separately through dc_scaler.
//   dc_scaler (from QP):  luminance   1..4 -> 8, 5..8 -> 2QP, 9..24 -> QP+8,
//                                     25..31 -> 2QP-16
//                         chrominance 1..4 -> 8, 5..24 -> (QP+13)/2,
//                                     25..31 -> QP-6
//   Q  (inv = 0):  intra DC  QF = (F + dc_scaler/2) / dc_scaler   (F >= 0;
//                            a negative F is treated as 0)
//                  intra AC  |QF| = |F| / (2QP)
//                  inter     |QF| = max(|F| - QP/2, 0) / (2QP)
//                  sign of QF = sign of F, |QF| clipped to 2047
//   IQ (inv = 1):  intra DC  F = QF * dc_scaler
//                  others    F = 0 if QF = 0, else
//                            |F| = QP*(2|QF|+1) (QP odd), QP*(2|QF|+1)-1 (QP even)
//                  F saturated to -2048..2047
// The inverse rule is the decoder rule of the standard; the forward divisions
// are the usual encoder choice that inverts it. `is_dc` marks the DC sample
// of an intra block. One register stage: out_valid follows in_valid by one
// cycle. The chip names Q/IQ as part of its DCT engine without giving the
// rule; the rule above is taken from the MPEG-4 standard.
module quant (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               inv,        // 0 quantise, 1 inverse quantise
  input  logic               intra,
  input  logic               is_dc,      // DC coefficient of an intra block
  input  logic               luma,       // luminance block (dc_scaler choice)
  input  logic [4:0]         qp,         // 1..31
  input  logic signed [11:0] in_coef,
  output logic               out_valid,
  output logic signed [11:0] out_coef,
  output logic [5:0]         dc_scaler   // for the AC/DC prediction
);
  int q, mag, lvl, res;

  always_comb begin
    q = (qp == 0) ? 1 : int'(qp);
    if (luma)
      dc_scaler = (q <= 4) ? 6'd8 : (q <= 8) ? 6'(2 * q) : (q <= 24) ? 6'(q + 8) : 6'(2 * q - 16);
    else
      dc_scaler = (q <= 4) ? 6'd8 : (q <= 24) ? 6'((q + 13) / 2) : 6'(q - 6);

    mag = (in_coef < 0) ? -int'(in_coef) : int'(in_coef);
    res = 0;
    lvl = 0;
    if (!inv) begin
      if (intra && is_dc) begin
        res = (in_coef < 0) ? 0 : (int'(in_coef) + int'(dc_scaler) / 2) / int'(dc_scaler);
      end else begin
        lvl = intra ? mag / (2 * q) : ((mag > q / 2) ? (mag - q / 2) / (2 * q) : 0);
        if (lvl > 2047) lvl = 2047;
        res = (in_coef < 0) ? -lvl : lvl;
      end
    end else begin
      if (intra && is_dc) begin
        res = int'(in_coef) * int'(dc_scaler);
      end else if (mag != 0) begin
        lvl = q * (2 * mag + 1) - ((q % 2 == 0) ? 1 : 0);
        res = (in_coef < 0) ? -lvl : lvl;
      end
      if (res > 2047) res = 2047;
      if (res < -2048) res = -2048;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_coef  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_coef <= 12'(res);
    end
  end
endmodule
