// Clock generator controller for frame-level clock gating.
//
// The codec works in strictly sequential phases: once after `run` is raised
// the image download, then for every frame an encoder phase followed by a
// decoder phase (codec mode), or only one of them when the other mode is off.
// Exactly one phase clock enable is high at a time, so the engines of idle
// phases receive no clock for a whole frame phase.
// Entering a phase raises its enable and pulses its start output in the same
// cycle; the gated clock of that phase gives its first edge one cycle later,
// where the start pulse is seen. A phase ends on its done input; a done seen in
// the first cycle of a phase is ignored, because the stopped domain may still
// hold its last done pulse until its clock has ticked once. When `run` is low
// at the end of a decoder (or last enabled) phase the controller returns to
// idle with all clocks off.
// The phase order (download, then encode and decode repeated) and the rule of
// no simultaneous operation are the document's; the handshake, the mode
// inputs and the frame counter are this design's.
module clkgen_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        enc_mode,   // encoder phase each frame
  input  logic        dec_mode,   // decoder phase each frame
  input  logic        dl_done,
  input  logic        enc_done,
  input  logic        dec_done,
  output logic        en_dl,
  output logic        en_enc,
  output logic        en_dec,
  output logic        start_dl,
  output logic        start_enc,
  output logic        start_dec,
  output logic [15:0] frame_cnt
);
  typedef enum logic [1:0] {P_IDLE, P_DL, P_ENC, P_DEC} phase_t;
  phase_t phase;
  logic   armed;

  assign en_dl  = (phase == P_DL);
  assign en_enc = (phase == P_ENC);
  assign en_dec = (phase == P_DEC);

  // next phase after a finished frame phase
  function automatic phase_t after_frame(logic r, logic e, logic d);
    if (!r)     return P_IDLE;
    else if (e) return P_ENC;
    else if (d) return P_DEC;
    else        return P_IDLE;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= P_IDLE;
      armed     <= 1'b0;
      start_dl  <= 1'b0;
      start_enc <= 1'b0;
      start_dec <= 1'b0;
      frame_cnt <= '0;
    end else begin
      start_dl  <= 1'b0;
      start_enc <= 1'b0;
      start_dec <= 1'b0;
      armed     <= (phase != P_IDLE);
      unique case (phase)
        P_IDLE: if (run) begin
          phase    <= P_DL;
          start_dl <= 1'b1;
          armed    <= 1'b0;
        end
        P_DL: if (armed && dl_done) begin
          phase <= after_frame(run, enc_mode, dec_mode);
          start_enc <= run && enc_mode;
          start_dec <= run && !enc_mode && dec_mode;
          armed <= 1'b0;
        end
        P_ENC: if (armed && enc_done) begin
          if (dec_mode) begin
            phase     <= P_DEC;
            start_dec <= 1'b1;
          end else begin
            frame_cnt <= frame_cnt + 1'b1;
            phase     <= after_frame(run, 1'b1, 1'b0);
            start_enc <= run;
          end
          armed <= 1'b0;
        end
        P_DEC: if (armed && dec_done) begin
          frame_cnt <= frame_cnt + 1'b1;
          phase     <= after_frame(run, enc_mode, 1'b1);
          start_enc <= run && enc_mode;
          start_dec <= run && !enc_mode;
          armed     <= 1'b0;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  // no two phases run at the same time
  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({en_dl, en_enc, en_dec}))
    else $error("clkgen_ctrl: more than one phase clock enabled");

endmodule
