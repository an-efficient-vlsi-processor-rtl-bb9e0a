// pe: processing element computing the SAD of one 4x4 candidate block, one
// 4-pixel row per clock (Fig. 11 structure).
//
// Each absolute difference is formed as in Eq. 4: a 9-bit adder computes
// Y + ~X; its carry S is 1 exactly when Y > X, in which case the low byte plus
// one is |Y - X|, otherwise the inverted low byte is |Y - X|. The four "+1"
// corrections are not added separately: S0 and S1 enter the two first-level
// tree adders, S2 the second-level adder and S3 the accumulator, as carry
// inputs. A pipeline register sits between the first and second tree levels.
//
// Timing: the row presented with `first` = 1 starts a new SAD. Four rows later
// the accumulator holds the complete 12-bit SAD; `done` is high in the cycle it
// can be read, two clocks after the fourth row was presented. The row order
// within the four cycles does not matter. Structure follows the published design; the
// exact placement of the pipeline register is this design's choice.
module pe
  import ime_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,       // a row is presented this cycle
  input  logic               first,    // this row is the first of a new SAD
  input  pix_t [3:0]         y,        // reference pixels (REGS)
  input  pix_t [3:0]         x,        // current pixels (REGC)
  output logic [SAD4_W-1:0]  sad,
  output logic               done
);

  logic [8:0]  s    [4];
  logic [3:0]  cy;
  logic [7:0]  ad   [4];
  logic [9:0]  l1a, l1b;

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      s[j]  = {1'b0, y[j]} + {1'b0, ~x[j]};
      cy[j] = s[j][8];
      ad[j] = s[j][7:0] ^ {8{~cy[j]}};
    end
    l1a = 10'(ad[0]) + 10'(ad[1]) + 10'(cy[0]);
    l1b = 10'(ad[2]) + 10'(ad[3]) + 10'(cy[1]);
  end

  // pipeline stage between the tree levels
  logic [9:0] r_a, r_b;
  logic       r_s2, r_s3, r_first, r_en;
  logic [1:0] r_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_a <= '0; r_b <= '0; r_s2 <= 1'b0; r_s3 <= 1'b0;
      r_first <= 1'b0; r_en <= 1'b0;
    end else begin
      r_a <= l1a; r_b <= l1b; r_s2 <= cy[2]; r_s3 <= cy[3];
      r_first <= first & en; r_en <= en;
    end
  end

  logic [10:0] l2;
  assign l2 = 11'(r_a) + 11'(r_b) + 11'(r_s2);

  logic [SAD4_W-1:0] acc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; r_cnt <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (r_en) begin
        if (r_first) begin
          acc   <= SAD4_W'(l2) + SAD4_W'(r_s3);
          r_cnt <= 2'd1;
        end else begin
          acc   <= acc + SAD4_W'(l2) + SAD4_W'(r_s3);
          r_cnt <= r_cnt + 2'd1;
          done  <= (r_cnt == 2'd3);
        end
      end
    end
  end

  assign sad = acc;

endmodule
