// me_unit: motion estimation module (Fig. 12). Keeps, for each of the 41
// partitions of the macroblock, the minimum of J = SAD + lambda*R(|vx|+|vy|)
// over all candidates, and the local motion vector that gave it.
//
// Because every partition shares the same prediction (the macroblock's), the
// cost term lambda*R depends only on the candidate vector, so one lambda_r
// unit serves all 41 partitions, and the SADs of larger partitions are sums
// of smaller ones. The 16 SADs of a candidate enter together and flow through
// a five-level tree of me_cell's, one level per clock:
//   level 1: 16 x 4x4          level 2: 8 x 8x4 and 8 x 4x8 (pairs of 4x4)
//   level 3: 4 x 8x8 (pairs of 8x4)
//   level 4: 2 x 16x8 and 2 x 8x16 (pairs of 8x8)   level 5: 16x16
// A new candidate can enter every clock. Latency: the minima include a
// candidate 6 clocks after it was presented (one clock for lambda_r, one per
// level), as in the published design. Partition numbering: see ime_pkg.
// Ties keep the earlier candidate (strict comparison), a choice of this design.
module me_unit
  import ime_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,     // start of a macroblock
  input  logic [5:0]                    qp,
  input  logic                          in_valid,
  input  logic [15:0][SAD4_W-1:0]       in_sad,
  input  mv_t                           in_v,
  output logic [NBLK-1:0][COST_W-1:0]   cost,
  output mv_t [NBLK-1:0]                best_v
);

  // stage 0: align the SADs with the registered lambda*R
  logic [LR_W-1:0] lr [6];
  mv_t             vv [6];
  logic            vl [6];
  logic [15:0][SAD4_W-1:0] sad0;

  lambda_r u_lr (.clk, .rst_n, .v(in_v), .qp, .lr(lr[1]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad0 <= '0; vv[1] <= '0; vl[1] <= 1'b0;
      for (int i = 2; i < 6; i++) begin lr[i] <= '0; vv[i] <= '0; vl[i] <= 1'b0; end
    end else begin
      sad0  <= in_sad;
      vv[1] <= in_v;
      vl[1] <= in_valid & ~clear;
      for (int i = 2; i < 6; i++) begin
        lr[i] <= lr[i-1];
        vv[i] <= vv[i-1];
        vl[i] <= vl[i-1] & ~clear;
      end
    end
  end
  assign lr[0] = '0;
  assign vv[0] = '0;
  assign vl[0] = 1'b0;

  logic [12:0] s1 [16];
  logic [13:0] s2 [16];   // 0..7: 8x4, 8..15: 4x8
  logic [14:0] s3 [4];
  logic [15:0] s4 [4];    // 0..1: 16x8, 2..3: 8x16

  // level 1: 4x4
  for (genvar b = 0; b < 16; b++) begin : g_l1
    me_cell #(.IN_W(12), .NIN(1)) u_c (
      .clk, .rst_n, .clear, .valid(vl[1]), .sad_a(sad0[b]), .sad_b('0), .lr(lr[1]), .v(vv[1]),
      .sad_q(s1[b]), .min_cost(cost[b]), .best_v(best_v[b]));
  end

  // level 2: 8x4 (two side-by-side 4x4) and 4x8 (two stacked 4x4)
  for (genvar q = 0; q < 4; q++) begin : g_l2
    for (genvar t = 0; t < 2; t++) begin : g_t
      localparam int H0 = 4 * (2 * (q / 2) + t) + 2 * (q % 2);
      localparam int V0 = 4 * (2 * (q / 2)) + 2 * (q % 2) + t;
      me_cell #(.IN_W(13), .NIN(2)) u_h (
        .clk, .rst_n, .clear, .valid(vl[2]), .sad_a(s1[H0]), .sad_b(s1[H0+1]), .lr(lr[2]),
        .v(vv[2]), .sad_q(s2[2*q+t]), .min_cost(cost[16+2*q+t]), .best_v(best_v[16+2*q+t]));
      me_cell #(.IN_W(13), .NIN(2)) u_v (
        .clk, .rst_n, .clear, .valid(vl[2]), .sad_a(s1[V0]), .sad_b(s1[V0+4]), .lr(lr[2]),
        .v(vv[2]), .sad_q(s2[8+2*q+t]), .min_cost(cost[24+2*q+t]), .best_v(best_v[24+2*q+t]));
    end
  end

  // level 3: 8x8 from its two 8x4 halves
  for (genvar q = 0; q < 4; q++) begin : g_l3
    me_cell #(.IN_W(14), .NIN(2)) u_c (
      .clk, .rst_n, .clear, .valid(vl[3]), .sad_a(s2[2*q]), .sad_b(s2[2*q+1]), .lr(lr[3]),
      .v(vv[3]), .sad_q(s3[q]), .min_cost(cost[32+q]), .best_v(best_v[32+q]));
  end

  // level 4: 16x8 (top, bottom) and 8x16 (left, right)
  for (genvar t = 0; t < 2; t++) begin : g_l4
    me_cell #(.IN_W(15), .NIN(2)) u_h (
      .clk, .rst_n, .clear, .valid(vl[4]), .sad_a(s3[2*t]), .sad_b(s3[2*t+1]), .lr(lr[4]),
      .v(vv[4]), .sad_q(s4[t]), .min_cost(cost[36+t]), .best_v(best_v[36+t]));
    me_cell #(.IN_W(15), .NIN(2)) u_v (
      .clk, .rst_n, .clear, .valid(vl[4]), .sad_a(s3[t]), .sad_b(s3[t+2]), .lr(lr[4]),
      .v(vv[4]), .sad_q(s4[2+t]), .min_cost(cost[38+t]), .best_v(best_v[38+t]));
  end

  // level 5: 16x16
  me_cell #(.IN_W(16), .NIN(2)) u_l5 (
    .clk, .rst_n, .clear, .valid(vl[5]), .sad_a(s4[0]), .sad_b(s4[1]), .lr(lr[5]),
    .v(vv[5]), .sad_q(), .min_cost(cost[40]), .best_v(best_v[40]));

endmodule
