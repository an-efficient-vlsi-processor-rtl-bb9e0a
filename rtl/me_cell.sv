// me_cell: one of the 41 partition cells of the motion estimation tree
// (Fig. 12b for the 4x4 level, Fig. 12c for the merged levels).
//
// The cell forms the SAD of its partition (the input SAD itself when NIN = 1,
// the sum of two smaller partitions' SADs when NIN = 2), adds the shared
// motion-vector cost `lr`, and compares the result with the minimum cost kept
// in RegA; when it is strictly smaller, RegA takes the cost and RegB the
// motion vector. RegC holds the partition SAD for the next level. `clear`
// sets RegA to the largest value at the start of a macroblock.
// Timing: one clock per level; `sad_q`, `v_q`, `valid_q` are the inputs of the
// next level. `sad_q` is one bit wider than an input so that the sum of two
// fits; with NIN = 1 (the 4x4 cells) its top bit is therefore always zero.
module me_cell
  import ime_pkg::*;
#(
  parameter int unsigned IN_W = 12,
  parameter int unsigned NIN  = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  valid,
  input  logic [IN_W-1:0]       sad_a,
  input  logic [IN_W-1:0]       sad_b,
  input  logic [LR_W-1:0]       lr,
  input  mv_t                   v,
  output logic [IN_W:0]         sad_q,     // RegC
  output logic [COST_W-1:0]     min_cost,  // RegA
  output mv_t                   best_v     // RegB
);

  logic [IN_W:0]     sad_sum;
  logic [COST_W-1:0] cost;

  assign sad_sum = (NIN == 2) ? ({1'b0, sad_a} + {1'b0, sad_b}) : {1'b0, sad_a};
  assign cost    = COST_W'(sad_sum) + COST_W'(lr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad_q <= '0; min_cost <= '1; best_v <= '0;
    end else begin
      sad_q <= sad_sum;
      if (clear) begin
        min_cost <= '1;
        best_v   <= '0;
      end else if (valid && cost < min_cost) begin
        min_cost <= cost;
        best_v   <= v;
      end
    end
  end

endmodule
