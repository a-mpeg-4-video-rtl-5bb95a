// Address generator of the coarse motion estimation.
//
// After `start` it walks the 64 pixels of the 8x8 current block (row-major)
// once per candidate group, issuing one current-memory address and one
// reference-window address per cycle while `valid` is high:
//   ref_row = cur_row + dy + 8,  ref_col = cur_col + dx0 + 8
// where (dx0, dy) is the displacement handled by PE 0 of the group.
//  * skip mode  : one group at the predicted vector (mvp), 64 cycles.
//  * coarse mode: 32 groups, dy = -8..+7 (outer), dx0 = -8 then 0 (inner),
//    so the 8 PEs cover dx0..dx0+7 and all 256 displacements of the -8..+7
//    range are visited in 32 x 64 = 2048 cycles.
// `first` marks the first pixel of a group (PEs restart their sums) and
// `last` its final pixel. One cycle after `last`, `grp_done` pulses with the
// group's vector on grp_mv, when the PE sums are complete; together with the
// final group's pulse `done` is raised.
// The document names the block; the scan order and timing are this
// design's.
module addr_gen
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       skip_mode,
  input  mv_t        mvp,
  output logic       valid,
  output logic       first,
  output logic       last,
  output logic [2:0] cur_row,
  output logic [2:0] cur_col,
  output logic [4:0] ref_row,
  output logic [4:0] ref_col,
  output logic       grp_done,
  output mv_t        grp_mv,
  output logic       done
);
  logic       running, mode_skip;
  logic [5:0] pix;
  logic [4:0] grp;      // [4:1] dy + 8, [0] dx half
  mv_t        mvp_q;
  mv_t        cur_mv;

  always_comb begin
    if (mode_skip) begin
      cur_mv = mvp_q;
    end else begin
      cur_mv.y = {~grp[4], grp[3:1]};  // (dy + 8) - 8
      cur_mv.x = grp[0] ? mvc_t'(0) : mvc_t'(-8);
    end
  end

  assign valid   = running;
  assign first   = running && (pix == 6'd0);
  assign last    = running && (pix == 6'd63);
  assign cur_row = pix[5:3];
  assign cur_col = pix[2:0];
  // the +8 offsets cancel the sign of the -8..+7 displacements
  assign ref_row = 5'(cur_row) + 5'({~cur_mv.y[3], cur_mv.y[2:0]});
  assign ref_col = 5'(cur_col) + 5'({~cur_mv.x[3], cur_mv.x[2:0]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      mode_skip <= 1'b0;
      pix       <= '0;
      grp       <= '0;
      mvp_q     <= '0;
      grp_done  <= 1'b0;
      grp_mv    <= '0;
      done      <= 1'b0;
    end else begin
      grp_done <= 1'b0;
      done     <= 1'b0;
      if (start) begin
        running   <= 1'b1;
        mode_skip <= skip_mode;
        mvp_q     <= mvp;
        pix       <= '0;
        grp       <= '0;
      end else if (running) begin
        pix <= pix + 1'b1;
        if (pix == 6'd63) begin
          grp_done <= 1'b1;
          grp_mv   <= cur_mv;
          if (mode_skip || grp == 5'd31) begin
            running <= 1'b0;
            done    <= 1'b1;
          end else begin
            grp <= grp + 1'b1;
          end
        end
      end
    end
  end

endmodule
