// Mixed-mode coarse motion estimation unit (hierarchical 2:1 search with
// motion estimation skip).
//
// Data path: full-resolution current (16x16) and reference (48x48 search
// area, +/-16 pixels around the macroblock) pixels are streamed in as 32-bit
// words of four pixels and 2:1 down sampled into the 8x8 current memory
// (64 bytes) and the 24x24 reference memory (two 24x12 banks, 576 bytes).
// For each macroblock the control first runs ME skip: the median of the
// neighbours' vectors is predicted and its SAD (SADmcp) computed with one PE.
// If SADmcp < max(SADa, SADb, SADc) the skip flag is set and the predicted
// vector is the result; otherwise ME coarse searches all 256 displacements of
// -8..+7 with eight PEs and the comparator keeps the smallest SAD.
// Vectors are in down-sampled pixels (twice that at full resolution); the
// fine search that refines them is a separate engine.
// Loading: 64 words of current data and 576 words of reference data per
// macroblock, in row order; they may be loaded while the unit is idle.
// Timing: `done` pulses 69 cycles after the start write for a skipped
// macroblock and 2118 cycles after it for a searched one.
// Structure and sizes follow the document's ME block diagram; the word
// format, the register map and the timing are this design's.
module me_unit
  import me_pkg::*;
#(
  parameter int unsigned MB_COLS = 11   // QCIF: 176 / 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // pixel input
  input  logic        load_restart,   // next words start a new block/window
  input  logic        cur_valid,
  input  logic [31:0] cur_word,
  input  logic        ref_valid,
  input  logic [31:0] ref_word,
  // bus interface
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [2:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  // results
  output logic        busy,
  output logic        done,
  output logic        skip_flag,
  output mv_t         min_mv,
  output sad_t        min_sad
);
  // down samplers
  logic       cds_valid, rds_valid;
  logic [2:0] cds_row, cds_col;
  logic [4:0] rds_row, rds_col;
  pix_t [1:0] cds_px, rds_px;

  downsample2 #(.IN_W(16), .IN_H(16)) u_cur_ds (
    .clk, .rst_n, .restart(load_restart), .in_valid(cur_valid), .in_word(cur_word),
    .out_valid(cds_valid), .out_row(cds_row), .out_col(cds_col), .out_px(cds_px));

  downsample2 #(.IN_W(48), .IN_H(48)) u_ref_ds (
    .clk, .rst_n, .restart(load_restart), .in_valid(ref_valid), .in_word(ref_word),
    .out_valid(rds_valid), .out_row(rds_row), .out_col(rds_col), .out_px(rds_px));

  // address generator
  logic       ag_start, ag_skip_mode, ag_valid, ag_first, ag_last, ag_grp_done, ag_done;
  logic [2:0] cur_row, cur_col;
  logic [4:0] ref_row, ref_col;
  mv_t        ag_grp_mv, mvp;

  addr_gen u_ag (
    .clk, .rst_n, .start(ag_start), .skip_mode(ag_skip_mode), .mvp(mvp),
    .valid(ag_valid), .first(ag_first), .last(ag_last),
    .cur_row, .cur_col, .ref_row, .ref_col,
    .grp_done(ag_grp_done), .grp_mv(ag_grp_mv), .done(ag_done));

  // memories
  pix_t              cur_px;
  pix_t [NUM_PE-1:0] ref_px;

  cur_mem u_cur_mem (
    .clk, .we(cds_valid), .wr_row(cds_row), .wr_col(cds_col), .wr_px(cds_px),
    .rd_row(cur_row), .rd_col(cur_col), .rd_px(cur_px));

  ref_mem u_ref_mem (
    .clk, .we(rds_valid), .wr_row(rds_row), .wr_col(rds_col), .wr_px(rds_px),
    .rd_row(ref_row), .rd_col(ref_col), .rd_px(ref_px));

  // ME skip and ME coarse
  mb_result_t        nb_a, nb_b, nb_c;
  sad_t              sad_mcp;
  sad_t [NUM_PE-1:0] grp_sad;
  logic              in_skip;

  // the mode of the pass in flight is the one latched at its start
  logic pass_skip;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pass_skip <= 1'b0;
    else if (ag_start) pass_skip <= ag_skip_mode;
  end
  assign in_skip = pass_skip;

  me_skip u_skip (
    .clk, .rst_n, .mv_a(nb_a.mv), .mv_b(nb_b.mv), .mv_c(nb_c.mv), .mvp(mvp),
    .en(ag_valid && in_skip), .clear(ag_first), .cur(cur_px), .ref_px(ref_px[0]),
    .sad_mcp(sad_mcp));

  me_coarse u_coarse (
    .clk, .rst_n, .en(ag_valid && !in_skip), .clear(ag_first), .cur(cur_px),
    .ref_px(ref_px), .sad(grp_sad));

  // skip decision
  logic dec_eval;
  sad_t sad_max;
  skip_decision u_dec (
    .clk, .rst_n, .eval(dec_eval), .sad_a(nb_a.sad), .sad_b(nb_b.sad), .sad_c(nb_c.sad),
    .sad_mcp(sad_mcp), .sad_max(sad_max), .skip_flag(skip_flag));

  // mux and compare
  logic cmp_clear, cmp_valid;
  sad_compare u_cmp (
    .clk, .rst_n, .clear(cmp_clear), .in_valid(cmp_valid), .skip_sel(skip_flag),
    .skip_sad(sad_mcp), .skip_mv(ag_grp_mv), .grp_sad(grp_sad), .grp_mv(ag_grp_mv),
    .min_sad(min_sad), .min_mv(min_mv));

  // control
  me_ctrl #(.MB_COLS(MB_COLS)) u_ctrl (
    .clk, .rst_n, .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
    .ag_start, .ag_skip_mode, .ag_grp_done, .ag_done, .dec_eval, .skip_flag,
    .cmp_clear, .cmp_valid, .min_sad, .min_mv, .nb_a, .nb_b, .nb_c,
    .busy, .done);

endmodule
