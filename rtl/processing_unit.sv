// processing_unit: the 2-D systolic SAD array. It holds REGS (search area),
// REGC (current MB) and 64 PEs, four per 4x4 subblock of the current MB, and
// delivers the 16 SADs of the 4x4 blocks of one candidate position per clock.
//
// PE k (k = 0..3) of subblock (bi,bj) is wired to slot k of REGS subblock
// (bi,bj): it takes pixels k..3 of that slot and pixels 0..k-1 of the same
// slot of the right neighbour (bj+1), i.e. the reference row displaced k
// pixels to the right, and compares them with slot k of REGC subblock (bi,bj).
// Because the rows of every subblock move one slot per clock, PE k sees the
// four rows of one candidate in four consecutive clocks; the four PEs of a
// subblock are staggered by one clock, so one of them finishes a candidate
// every clock. The arrangement (one PE per row slot, k pixels borrowed from
// the right subblock, 1-clock stagger) follows the published design; the slot
// movement that realises it is this design's reconstruction.
//
// Control comes from pu_ctrl: `op`/`sel` and the RAM words in the same clock,
// `pe_en`, `fwd` and the 2-bit scan phase `ph` decide which PE starts a new
// candidate (forward: PE k starts when ph == k+1 mod 4; reverse: when
// ph == -k mod 4). The tag (`tag_valid`, `tag_k`, `tag_mv`) names the PE that
// finishes a candidate in this clock; it is delayed by the two PE pipeline
// clocks and appears on the outputs together with the 16 SADs.
// The tag assertion at the end is disabled during reset (`disable iff`); lint
// tools report that as a reset used both asynchronously and synchronously,
// which is harmless because the assertion generates no logic.
module processing_unit
  import ime_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  regop_e                   op,
  input  logic [3:0]               sel,
  input  word_t [3:0]              col_in,
  input  word_t [4:0]              row_in,
  input  logic                     c_ld_en,
  input  logic [5:0]               c_ld_idx,
  input  word_t                    c_ld_word,
  input  logic                     pe_en,
  input  logic                     fwd,
  input  logic [1:0]               ph,
  input  logic                     tag_valid,
  input  logic [1:0]               tag_k,
  input  mv_t                      tag_mv,
  output logic [15:0][SAD4_W-1:0]  sad,      // index 4*bi+bj, raster order
  output mv_t                      sad_mv,
  output logic                     sad_valid
);

  word_t [3:0][4:0][3:0] s_q;
  word_t [3:0][3:0][3:0] c_q;

  regs u_regs (
    .clk, .rst_n, .op, .sel, .col_in, .row_in, .q(s_q)
  );

  // REGC rotates whenever REGS moves rows inside its subblocks.
  logic c_rot_en, c_rot_dn;
  always_comb begin
    c_rot_en = 1'b0;
    c_rot_dn = 1'b1;
    unique case (op)
      OP_SHL, OP_ROTF, OP_DOWN: c_rot_en = 1'b1;
      OP_SHR, OP_ROTR: begin c_rot_en = 1'b1; c_rot_dn = 1'b0; end
      default: ;
    endcase
  end

  regc u_regc (
    .clk, .rst_n, .rot_en(c_rot_en), .rot_dn(c_rot_dn),
    .ld_en(c_ld_en), .ld_idx(c_ld_idx), .ld_word(c_ld_word), .q(c_q)
  );

  logic [SAD4_W-1:0] pe_sad  [16][4];
  logic              pe_done [16][4];

  for (genvar bi = 0; bi < 4; bi++) begin : g_bi
    for (genvar bj = 0; bj < 4; bj++) begin : g_bj
      for (genvar k = 0; k < 4; k++) begin : g_pe
        pix_t [3:0] yv, xv;
        logic       first;
        always_comb begin
          for (int j = 0; j < 4; j++) begin
            yv[j] = (k + j < 4) ? s_q[bi][bj][k][8*(k+j) +: 8]
                                : s_q[bi][bj+1][k][8*((k+j)%4) +: 8];
            xv[j] = c_q[bi][bj][k][8*j +: 8];
          end
          first = fwd ? (ph == 2'(k + 1)) : (ph == 2'(4 - k));
        end
        pe u_pe (
          .clk, .rst_n, .en(pe_en), .first, .y(yv), .x(xv),
          .sad(pe_sad[4*bi+bj][k]), .done(pe_done[4*bi+bj][k])
        );
      end
    end
  end

  // tag pipeline: two clocks, matching the PE latency
  logic       t1_v, t2_v;
  logic [1:0] t1_k, t2_k;
  mv_t        t1_mv, t2_mv;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_v <= 1'b0; t2_v <= 1'b0; t1_k <= '0; t2_k <= '0; t1_mv <= '0; t2_mv <= '0;
    end else begin
      t1_v <= tag_valid; t1_k <= tag_k; t1_mv <= tag_mv;
      t2_v <= t1_v;      t2_k <= t1_k;  t2_mv <= t1_mv;
    end
  end

  always_comb begin
    for (int b = 0; b < 16; b++) sad[b] = pe_sad[b][t2_k];
  end
  assign sad_mv    = t2_mv;
  assign sad_valid = t2_v;

  // A tagged candidate must come from a PE that has just completed four rows.
  a_tag_complete: assert property (@(posedge clk) disable iff (!rst_n) t2_v |-> pe_done[0][t2_k])
    else $error("PE %0d tagged without a complete SAD", t2_k);

endmodule
