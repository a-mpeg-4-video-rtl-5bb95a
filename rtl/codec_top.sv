// Low-power MPEG-4 codec core: frame-level clock gating around the
// mixed-mode coarse motion estimation engine.
//
// The clock generator controller runs the codec as a sequence of exclusive
// phases (image download once, then encoder and decoder phase per frame) and
// drives one clock gate per phase. The coarse motion estimation unit belongs
// to the encoder and is clocked by the gated encoder clock, so it receives no
// clock edges during download and decoder phases. The 8x8 DCT/IDCT serves
// the encoder (forward DCT, and the IDCT of its reconstruction loop) and the
// decoder (IDCT), so it has its own gate, enabled in encoder and decoder
// phases and off during download. The quantiser / inverse quantiser and the
// MPEG-4 intra AC/DC prediction of the same texture engine run on that clock
// too; the prediction takes its dc_scaler from the quantiser's QP. Their
// coefficient streams are ports, so that the texture buffers and VLC outside
// this RTL can order them.
// The gated download and
// decoder clocks, and the phase start/done handshakes, are brought out for the
// engines of those phases, which are outside this RTL (video input, decoding,
// reconstruction and so on), as are the pixel-load ports and the register bus
// of the motion estimation unit, which the DMA and the processor would drive.
// All ME ports are synchronous to gclk_enc, all DCT, Q/IQ and AC/DC ports to gclk_tex.
module codec_top
  import me_pkg::*;
#(
  parameter int unsigned MB_COLS = 11   // QCIF 176 / 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        test_en,
  // phase sequencing
  input  logic        run,
  input  logic        enc_mode,
  input  logic        dec_mode,
  input  logic        dl_done,
  input  logic        enc_done,
  input  logic        dec_done,
  output logic        start_dl,
  output logic        start_enc,
  output logic        start_dec,
  output logic [15:0] frame_cnt,
  output logic        gclk_dl,
  output logic        gclk_enc,
  output logic        gclk_dec,
  output logic        gclk_tex,
  // motion estimation pixel input
  input  logic        me_load_restart,
  input  logic        me_cur_valid,
  input  logic [31:0] me_cur_word,
  input  logic        me_ref_valid,
  input  logic [31:0] me_ref_word,
  // motion estimation register bus
  input  logic        me_bus_sel,
  input  logic        me_bus_we,
  input  logic [2:0]  me_bus_addr,
  input  logic [31:0] me_bus_wdata,
  output logic [31:0] me_bus_rdata,
  // motion estimation result
  output logic        me_busy,
  output logic        me_done,
  output logic        me_skip,
  output mv_t         me_mv,
  output sad_t        me_sad,
  // 8x8 DCT / IDCT
  input  logic        dct_inv,
  input  logic        dct_in_valid,
  input  logic [11:0] dct_in_data,
  output logic        dct_in_ready,
  output logic        dct_out_valid,
  output logic [11:0] dct_out_data,
  output logic        dct_busy,
  // quantiser / inverse quantiser (coefficient stream)
  input  logic               q_in_valid,
  input  logic               q_inv,
  input  logic               q_intra,
  input  logic               q_is_dc,
  input  logic               q_luma,
  input  logic [4:0]         q_qp,
  input  logic signed [11:0] q_in_coef,
  output logic               q_out_valid,
  output logic signed [11:0] q_out_coef,
  // intra AC/DC prediction (quantised coefficients from / to the quantiser)
  input  logic               acdc_start,
  input  logic               acdc_inv,
  input  logic               acdc_ac_pred,
  input  logic [4:0]         acdc_qp_x,
  input  logic [4:0]         acdc_qp_a,
  input  logic [4:0]         acdc_qp_c,
  input  logic [11:0]        acdc_f_a,
  input  logic [11:0]        acdc_f_b,
  input  logic [11:0]        acdc_f_c,
  input  logic signed [11:0] acdc_qf_a_col [7],
  input  logic signed [11:0] acdc_qf_c_row [7],
  input  logic signed [12:0] acdc_in_dc,
  input  logic signed [12:0] acdc_in_row [7],
  input  logic signed [12:0] acdc_in_col [7],
  output logic               acdc_valid,
  output logic               acdc_vertical,
  output logic signed [12:0] acdc_out_dc,
  output logic signed [12:0] acdc_out_row [7],
  output logic signed [12:0] acdc_out_col [7]
);
  logic en_dl, en_enc, en_dec;

  clkgen_ctrl u_clkgen_ctrl (
    .clk, .rst_n, .run, .enc_mode, .dec_mode, .dl_done, .enc_done, .dec_done,
    .en_dl, .en_enc, .en_dec, .start_dl, .start_enc, .start_dec, .frame_cnt);

  clk_gate u_cg_dl  (.clk, .en(en_dl),  .test_en, .gclk(gclk_dl));
  clk_gate u_cg_enc (.clk, .en(en_enc), .test_en, .gclk(gclk_enc));
  clk_gate u_cg_dec (.clk, .en(en_dec), .test_en, .gclk(gclk_dec));
  clk_gate u_cg_tex (.clk, .en(en_enc | en_dec), .test_en, .gclk(gclk_tex));

  me_unit #(.MB_COLS(MB_COLS)) u_me (
    .clk(gclk_enc), .rst_n,
    .load_restart(me_load_restart),
    .cur_valid(me_cur_valid), .cur_word(me_cur_word),
    .ref_valid(me_ref_valid), .ref_word(me_ref_word),
    .bus_sel(me_bus_sel), .bus_we(me_bus_we), .bus_addr(me_bus_addr),
    .bus_wdata(me_bus_wdata), .bus_rdata(me_bus_rdata),
    .busy(me_busy), .done(me_done), .skip_flag(me_skip),
    .min_mv(me_mv), .min_sad(me_sad));


  dct2d u_dct (
    .clk(gclk_tex), .rst_n, .inv(dct_inv), .in_valid(dct_in_valid), .in_data(dct_in_data),
    .in_ready(dct_in_ready), .out_valid(dct_out_valid), .out_data(dct_out_data), .busy(dct_busy));

  logic [5:0] dc_scaler;

  quant u_quant (
    .clk(gclk_tex), .rst_n, .in_valid(q_in_valid), .inv(q_inv), .intra(q_intra), .is_dc(q_is_dc),
    .luma(q_luma), .qp(q_qp), .in_coef(q_in_coef), .out_valid(q_out_valid), .out_coef(q_out_coef),
    .dc_scaler);

  acdc_pred u_acdc (
    .clk(gclk_tex), .rst_n, .start(acdc_start), .inv(acdc_inv), .ac_pred(acdc_ac_pred),
    .dc_scaler, .qp_x(acdc_qp_x), .qp_a(acdc_qp_a), .qp_c(acdc_qp_c),
    .f_a(acdc_f_a), .f_b(acdc_f_b), .f_c(acdc_f_c),
    .qf_a_col(acdc_qf_a_col), .qf_c_row(acdc_qf_c_row),
    .in_dc(acdc_in_dc), .in_row(acdc_in_row), .in_col(acdc_in_col),
    .valid(acdc_valid), .vertical(acdc_vertical),
    .out_dc(acdc_out_dc), .out_row(acdc_out_row), .out_col(acdc_out_col));

endmodule
