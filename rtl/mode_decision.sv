// mode_decision: serial mode decision (Fig. 14). Once the 41 minimum costs of
// a macroblock are final, it reads them one per clock (`rd_idx` -> `j_in`,
// combinational) and chooses the partitioning with the smallest total cost.
//
// RegA is an adder-accumulator that sums the costs of the partitions of one
// mode; RegB3 holds the best (mode, cost) so far and RegB0..RegB2 keep the
// results of earlier 8x8 quadrants (RegB3 shifts into RegB2 and so on when a
// new quadrant starts). Schedule, 65 clocks in all as in the published design:
//   for each 8x8 quadrant i (13 clocks each, 52 in all)
//     4 clocks  sum of its four 4x4 costs         1 clock  RegB3 <- (4x4, sum)
//     2 clocks  sum of its two 4x8 costs          1 clock  compare with RegB3
//     2 clocks  sum of its two 8x4 costs          1 clock  compare
//     1 clock   the 8x8 cost                      1 clock  compare
//   then for the macroblock (13 clocks)
//     4 clocks  RegB0+RegB1+RegB2+RegB3           1 clock  RegB3 <- (8x8, sum)
//     2 clocks  the two 8x16 costs                1 clock  compare
//     2 clocks  the two 16x8 costs                1 clock  compare
//     1 clock   the 16x16 cost                    1 clock  compare, done
// A candidate replaces RegB3 only when strictly smaller, so on equal cost the
// smaller partitions (examined first) are kept; this tie rule is this
// design's choice. The sub-partition chosen for each quadrant is kept aside in
// `sub_mode` because RegB3 is reused for the totals.
module mode_decision
  import ime_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic [5:0]           rd_idx,
  input  logic [COST_W-1:0]    j_in,
  output logic                 busy,
  output logic                 done,
  output mbmode_e              mb_mode,
  output submode_e [3:0]       sub_mode,
  output logic [COST_W+1:0]    best_cost
);

  localparam int CW = COST_W + 2;   // room for the sum of sixteen costs

  typedef struct packed {
    logic [1:0]    mode;
    logic [CW-1:0] cost;
  } regb_t;

  logic [6:0]    t;        // clock within the 65-clock schedule
  logic          run;
  logic [CW-1:0] rega;
  regb_t         regb [4];

  logic [1:0] qd;          // quadrant during the first 52 clocks
  logic [3:0] c;           // clock within a 13-clock group
  logic       lvl1;

  always_comb begin
    lvl1 = (t >= 7'd52);
    qd   = lvl1 ? 2'd3 : 2'(int'(t) / 13);
    c    = 4'(lvl1 ? int'(t) - 52 : int'(t) % 13);
  end

  // which partition cost to read in this clock
  int qi, ci;
  always_comb begin
    qi = int'(qd);
    ci = int'(c);
    rd_idx = 6'd0;
    if (!lvl1) begin
      unique case (c)
        4'd0, 4'd1, 4'd2, 4'd3:
          rd_idx = 6'(4 * (2 * (qi / 2) + ci / 2) + 2 * (qi % 2) + ci % 2);
        4'd5, 4'd6: rd_idx = 6'(24 + 2 * qi + (ci - 5));
        4'd8, 4'd9: rd_idx = 6'(16 + 2 * qi + (ci - 8));
        4'd11:      rd_idx = 6'(32 + qi);
        default:    rd_idx = 6'd0;
      endcase
    end else begin
      unique case (c)
        4'd5, 4'd6: rd_idx = 6'(38 + (ci - 5));
        4'd8, 4'd9: rd_idx = 6'(36 + (ci - 8));
        4'd11:      rd_idx = 6'd40;
        default:    rd_idx = 6'd0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0; run <= 1'b0; rega <= '0; done <= 1'b0;
      for (int i = 0; i < 4; i++) regb[i] <= '{mode: 2'd0, cost: '1};
      sub_mode <= '0; mb_mode <= MB_16x16; best_cost <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run  <= 1'b1;
        t    <= '0;
        rega <= '0;
        for (int i = 0; i < 4; i++) regb[i] <= '{mode: 2'd0, cost: '1};
      end else if (run) begin
        t <= t + 7'd1;
        if (!lvl1) begin
          unique case (c)
            4'd0: begin
              rega <= CW'(j_in);
              if (qd != 2'd0) begin
                for (int i = 0; i < 3; i++) regb[i] <= regb[i+1];
              end
            end
            4'd1, 4'd2, 4'd3, 4'd6, 4'd9: rega <= rega + CW'(j_in);
            4'd4: begin
              regb[3] <= '{mode: SUB_4x4, cost: rega};
            end
            4'd5, 4'd8, 4'd11: rega <= CW'(j_in);
            4'd7: if (rega < regb[3].cost) regb[3] <= '{mode: SUB_4x8, cost: rega};
            4'd10: if (rega < regb[3].cost) regb[3] <= '{mode: SUB_8x4, cost: rega};
            4'd12: begin
              if (rega < regb[3].cost) begin
                regb[3]      <= '{mode: SUB_8x8, cost: rega};
                sub_mode[qd] <= SUB_8x8;
              end else begin
                sub_mode[qd] <= submode_e'(regb[3].mode);
              end
            end
            default: ;
          endcase
        end else begin
          unique case (c)
            4'd0: rega <= regb[0].cost;
            4'd1: rega <= rega + regb[1].cost;
            4'd2: rega <= rega + regb[2].cost;
            4'd3: rega <= rega + regb[3].cost;
            4'd4: regb[3] <= '{mode: MB_8x8, cost: rega};
            4'd5, 4'd8, 4'd11: rega <= CW'(j_in);
            4'd6, 4'd9: rega <= rega + CW'(j_in);
            4'd7: if (rega < regb[3].cost) regb[3] <= '{mode: MB_8x16, cost: rega};
            4'd10: if (rega < regb[3].cost) regb[3] <= '{mode: MB_16x8, cost: rega};
            4'd12: begin
              run  <= 1'b0;
              done <= 1'b1;
              if (rega < regb[3].cost) begin
                mb_mode   <= MB_16x16;
                best_cost <= rega;
              end else begin
                mb_mode   <= mbmode_e'(regb[3].mode);
                best_cost <= regb[3].cost;
              end
            end
            default: ;
          endcase
        end
      end
    end
  end

  assign busy = run;

endmodule
