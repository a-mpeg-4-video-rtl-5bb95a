// Control and bus interface of the mixed-mode coarse motion estimation.
//
// A small register interface (one access per cycle, combinational read data)
// lets the host set the macroblock position and start a macroblock:
//   0 CTRL   W  bit0 start, bit1 new frame (clears the skip/search counters)
//   1 MBPOS  RW [7:0] macroblock column, [15:8] macroblock row
//   2 STATUS R  bit0 busy, bit1 done (until the next start), bit2 skip flag
//   3 RESULT R  [3:0] mv x, [11:8] mv y, [29:16] SAD (down-sampled units)
//   4 COUNT  R  [15:0] skipped macroblocks, [31:16] fully searched ones
// Per macroblock the FSM runs
//   SKIP   : ME skip at the median-predicted vector (64 cycles)
//   DECIDE : skip decision registers SADmcp < max(SADa, SADb, SADc)
//   CHECK  : skip -> predicted vector goes through the mux to the comparator
//   COARSE : otherwise the full -8..+7 search on 8 PEs (2048 cycles)
//   FINISH : result stored for later neighbours, `done` pulses
// so a skipped macroblock takes 69 cycles from start to `done` and a
// searched one 2118 cycles.
// The neighbour store keeps one result (vector, SAD) per macroblock column:
// when macroblock (x, y) is processed in raster order, entry x-1 already holds
// the left neighbour A of this row and entries x and x+1 still hold the top
// (B) and top-right (C) neighbours of the row above. A neighbour outside the
// picture contributes a zero vector and a zero SAD.
// The sequence skip-then-search and the neighbours are the document's; the
// register map, the store and the edge rule are this design's.
module me_ctrl
  import me_pkg::*;
#(
  parameter int unsigned MB_COLS = 11   // QCIF: 176 / 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // bus interface
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [2:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  // datapath control
  output logic        ag_start,
  output logic        ag_skip_mode,
  input  logic        ag_grp_done,
  input  logic        ag_done,
  output logic        dec_eval,
  input  logic        skip_flag,
  output logic        cmp_clear,
  output logic        cmp_valid,
  input  sad_t        min_sad,
  input  mv_t         min_mv,
  // neighbours A (left), B (top), C (top right)
  output mb_result_t  nb_a,
  output mb_result_t  nb_b,
  output mb_result_t  nb_c,
  // status
  output logic        busy,
  output logic        done
);
  typedef enum logic [2:0] {S_IDLE, S_SKIP, S_DECIDE, S_CHECK, S_COARSE, S_FINISH} state_t;
  state_t state;

  localparam int unsigned XW = (MB_COLS > 1) ? $clog2(MB_COLS) : 1;

  mb_result_t nb_store [MB_COLS];
  logic [7:0] mb_x, mb_y;
  logic       done_flag, last_skip;
  logic [15:0] cnt_skip, cnt_search;
  sad_t       res_sad;
  mv_t        res_mv;

  logic wr_ctrl;
  assign wr_ctrl = bus_sel && bus_we && (bus_addr == REG_CTRL);

  // neighbour selection with picture-edge handling
  always_comb begin
    nb_a = '0;
    nb_b = '0;
    nb_c = '0;
    if (mb_x != 8'd0 && mb_x <= 8'(MB_COLS))
      nb_a = nb_store[XW'(mb_x - 8'd1)];
    if (mb_y != 8'd0 && mb_x < 8'(MB_COLS))
      nb_b = nb_store[XW'(mb_x)];
    if (mb_y != 8'd0 && mb_x + 8'd1 < 8'(MB_COLS))
      nb_c = nb_store[XW'(mb_x + 8'd1)];
  end

  assign busy         = (state != S_IDLE);
  assign ag_start     = (state == S_IDLE && wr_ctrl && bus_wdata[0]) || (state == S_CHECK && !skip_flag);
  assign ag_skip_mode = (state == S_IDLE);
  assign dec_eval     = (state == S_DECIDE);
  assign cmp_clear    = ag_start;
  assign cmp_valid    = (state == S_CHECK && skip_flag) || (state == S_COARSE && ag_grp_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      mb_x       <= '0;
      mb_y       <= '0;
      done_flag  <= 1'b0;
      done       <= 1'b0;
      last_skip  <= 1'b0;
      cnt_skip   <= '0;
      cnt_search <= '0;
      res_sad    <= '0;
      res_mv     <= '0;
    end else begin
      done <= 1'b0;
      if (bus_sel && bus_we && bus_addr == REG_MBPOS && state == S_IDLE) begin
        mb_x <= bus_wdata[7:0];
        mb_y <= bus_wdata[15:8];
      end
      if (wr_ctrl && bus_wdata[1]) begin
        cnt_skip   <= '0;
        cnt_search <= '0;
      end
      unique case (state)
        S_IDLE: if (wr_ctrl && bus_wdata[0]) begin
          state     <= S_SKIP;
          done_flag <= 1'b0;
        end
        S_SKIP:   if (ag_done) state <= S_DECIDE;
        S_DECIDE: state <= S_CHECK;
        S_CHECK:  state <= skip_flag ? S_FINISH : S_COARSE;
        S_COARSE: if (ag_done) state <= S_FINISH;
        S_FINISH: begin
          state     <= S_IDLE;
          done      <= 1'b1;
          done_flag <= 1'b1;
          last_skip <= skip_flag;
          res_sad   <= min_sad;
          res_mv    <= min_mv;
          if (skip_flag) cnt_skip   <= cnt_skip + 1'b1;
          else           cnt_search <= cnt_search + 1'b1;
          if (mb_x < 8'(MB_COLS)) nb_store[XW'(mb_x)] <= '{mv: min_mv, sad: min_sad};
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    bus_rdata = '0;
    unique case (bus_addr)
      REG_MBPOS:  bus_rdata = {16'd0, mb_y, mb_x};
      REG_STATUS: bus_rdata = {29'd0, last_skip, done_flag, busy};
      REG_RESULT: bus_rdata = {2'd0, res_sad, 4'd0, res_mv.y, 4'd0, res_mv.x};
      REG_COUNT:  bus_rdata = {cnt_search, cnt_skip};
      default:    bus_rdata = '0;
    endcase
  end

  // a start is only accepted when idle
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_ctrl && bus_wdata[0]) |-> state == S_IDLE)
    else $error("me_ctrl: start written while busy");

endmodule
