// ime_top: integer motion estimation processor for H.264/AVC variable block
// size motion estimation (the architecture of Fig. 7).
//
// For one 16x16 macroblock at a time it performs a full search over a
// +-4, +-8, +-16 or +-32 pixel window (`sr`), around a prediction formed from
// the macroblocks above, and returns for all 41 partitions (16 4x4, 8 8x4,
// 8 4x8, 4 8x8, 2 16x8, 2 8x16, 1 16x16) the local motion vector with the
// smallest cost J = SAD + 2*lambda(QP)*(|vx|+|vy|+1), plus the best way to
// partition the macroblock.
//
// Data path: external 4-pixel port -> RAM1 (search area, 4 dual-port banks)
// and RAM2 (current MB) -> REGS/REGC systolic registers -> 64 PEs (16 4x4
// SADs per clock) -> 41-cell minimum tree (me_unit) -> serial mode decision;
// the 16x16 vector goes to RAM3 for the prediction of later macroblocks.
//
// Interface: pulse `start` with the macroblock position (mbx, mby), the
// picture width in macroblocks `mb_w`, `sr` and `qp` held stable until
// `mb_done`. Macroblocks must be processed in raster order for the
// prediction to use the right neighbours. The processor reads the frames
// through `ext_req`/`ext_cur`/`ext_x`/`ext_y`; the word of pixels
// (x..x+3, y) must be on `ext_data` in the next clock. Results are valid from
// `mb_done` until the next `start`. `cost`/`best_v` are indexed as in ime_pkg.
// The reset also disables the overlap assertion below (`disable iff`), which
// lint tools report as a reset used both asynchronously and synchronously;
// the assertion generates no logic, so the warning is harmless.
module ime_top
  import ime_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [7:0]                    mbx,
  input  logic [7:0]                    mby,
  input  logic [7:0]                    mb_w,
  input  sr_e                           sr,
  input  logic [5:0]                    qp,
  output logic                          ext_req,
  output logic                          ext_cur,
  output logic signed [13:0]            ext_x,
  output logic signed [13:0]            ext_y,
  input  word_t                         ext_data,
  output logic                          busy,
  output logic                          mb_done,
  output amv_t                          pred,
  output mbmode_e                       mb_mode,
  output submode_e [3:0]                sub_mode,
  output logic [COST_W+1:0]             best_cost,
  output logic [NBLK-1:0][COST_W-1:0]   cost,
  output mv_t [NBLK-1:0]                best_v
);

  // sequencing
  logic        r3_en, r3_we; logic [7:0] r3_addr; logic [31:0] r3_wdata, r3_rdata;
  logic        pred_en; amv_t nb_tl, nb_t, nb_tr; logic [2:0] nb_avail;
  logic        ag_start, ag_done, ag_busy, pu_start, pu_done, pu_busy, me_clear;
  logic        md_start, md_done;

  ime_ctrl u_ctrl (
    .clk, .rst_n, .start, .mbx, .mby, .mb_w, .busy, .mb_done,
    .r3_en, .r3_we, .r3_addr, .r3_wdata, .r3_rdata,
    .pred_en, .nb_tl, .nb_t, .nb_tr, .nb_avail, .pred,
    .ag_start, .ag_done, .pu_start, .pu_done, .me_clear, .md_start, .md_done,
    .v16(best_v[40])
  );

  sp_ram #(.DEPTH(180), .WIDTH(32)) u_ram3 (
    .clk, .en(r3_en), .we(r3_we), .addr(r3_addr), .wdata(r3_wdata), .rdata(r3_rdata)
  );

  mv_pred u_pred (
    .clk, .rst_n, .en(pred_en), .nb_tl, .nb_t, .nb_tr, .avail(nb_avail), .pred
  );

  // fetch
  logic       r1_we; logic [6:0] r1_wrow; logic [4:0] r1_wcg;
  logic       r2_we; logic [5:0] r2_waddr;

  addr_gen u_ag (
    .clk, .rst_n, .start(ag_start), .sr, .mbx, .mby, .pred, .busy(ag_busy), .done(ag_done),
    .ext_req, .ext_cur, .ext_x, .ext_y,
    .r1_we, .r1_row(r1_wrow), .r1_cg(r1_wcg), .r2_we, .r2_addr(r2_waddr)
  );

  // scan
  logic             r1_en; logic [4:0][6:0] r1_row; logic [4:0][4:0] r1_cg;
  logic             r2_en; logic [5:0] r2_addr;
  regop_e           op; logic [3:0] sel; logic c_ld_en; logic [5:0] c_ld_idx;
  logic             pe_en, fwd; logic [1:0] ph;
  logic             tag_valid; logic [1:0] tag_k; mv_t tag_mv;
  word_t [4:0]      r1_data;
  word_t            r2_data;

  pu_ctrl u_puc (
    .clk, .rst_n, .start(pu_start), .sr, .busy(pu_busy), .done(pu_done),
    .r1_en, .r1_row, .r1_cg, .r2_en, .r2_addr,
    .op, .sel, .c_ld_en, .c_ld_idx, .pe_en, .fwd, .ph, .tag_valid, .tag_k, .tag_mv
  );

  ram1 u_ram1 (
    .clk, .wr_en(r1_we), .wr_row(r1_wrow), .wr_cg(r1_wcg), .wr_data(ext_data),
    .rd_en(r1_en), .rd_row(r1_row), .rd_cg(r1_cg), .rd_data(r1_data)
  );

  sp_ram #(.DEPTH(64), .WIDTH(32)) u_ram2 (
    .clk, .en(r2_en | r2_we), .we(r2_we), .addr(r2_we ? r2_waddr : r2_addr),
    .wdata(ext_data), .rdata(r2_data)
  );

  logic [15:0][SAD4_W-1:0] sad;
  mv_t                     sad_mv;
  logic                    sad_valid;

  processing_unit u_pu (
    .clk, .rst_n, .op, .sel, .col_in(r1_data[3:0]), .row_in(r1_data),
    .c_ld_en, .c_ld_idx, .c_ld_word(r2_data), .pe_en, .fwd, .ph,
    .tag_valid, .tag_k, .tag_mv, .sad, .sad_mv, .sad_valid
  );

  me_unit u_me (
    .clk, .rst_n, .clear(me_clear), .qp, .in_valid(sad_valid), .in_sad(sad), .in_v(sad_mv),
    .cost, .best_v
  );

  logic [5:0] md_idx;
  mode_decision u_md (
    .clk, .rst_n, .start(md_start), .rd_idx(md_idx), .j_in(cost[md_idx]),
    .busy(), .done(md_done), .mb_mode, .sub_mode, .best_cost
  );

  // The fetch and the scan never use the RAMs in the same clock.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(ag_busy && pu_busy))
    else $error("fetch and scan overlap");

endmodule
