// lambda_r: computes the motion-vector cost term lambda_motion * R(|vx|+|vy|)
// of the simplified Lagrangian cost J = SAD + lambda * R (Eq. 3, Fig. 13).
//
// With R = mvbits[|vx|] + mvbits[|vy|] and mvbits[v] = 2|v| + 1 the term is
// 2 * lambda * (|vx| + |vy| + 1) (Eq. 8). The absolute values use the one's
// complement of negative components; the three "+1" terms (two sign
// corrections and the constant) are collected into one small number,
// sign(vx) + sign(vy) + 1, added by a second adder (Eq. 9). lambda comes from
// a table indexed by QP (Table 2). The sum and lambda are registered, then
// multiplied and shifted left by one.
// Timing: one clock latency from (v, qp) to `lr`. Bit 0 of `lr` is always
// zero because of the final doubling; it is kept so that `lr` is the full
// cost value the tree adds.
// The structure is the published one; the register position is this design's.
module lambda_r
  import ime_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  mv_t              v,
  input  logic [5:0]       qp,
  output logic [LR_W-1:0]  lr
);

  logic [MV_W-1:0] ax, ay;
  logic [1:0]      corr;
  logic [MV_W:0]   s1;
  logic [MV_W:0]   s2;

  always_comb begin
    ax   = v.x[MV_W-1] ? ~v.x : v.x;
    ay   = v.y[MV_W-1] ? ~v.y : v.y;
    corr = 2'(v.x[MV_W-1]) + 2'(v.y[MV_W-1]) + 2'd1;
    s1   = {1'b0, ax} + {1'b0, ay};
    s2   = s1 + (MV_W+1)'(corr);
  end

  logic [MV_W:0] sum_q;
  logic [6:0]    lam_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0;
      lam_q <= '0;
    end else begin
      sum_q <= s2;
      lam_q <= lambda_of_qp(qp);
    end
  end

  assign lr = (LR_W'(lam_q) * LR_W'(sum_q)) << 1;

endmodule
