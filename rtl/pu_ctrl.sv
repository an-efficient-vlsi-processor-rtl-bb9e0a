// pu_ctrl: data-flow controller of the processing unit (the flow of Fig. 9).
//
// For a search range of +-h pixels in both directions (h = 4, 8, 16 or 32;
// search area (2h+16) x (2h+16)) it runs:
//   INIT  64 clocks: the 64 words of the current MB go from RAM2 into REGC, and
//         during the first 16 clocks the 16 top rows of the search area
//         (20 pixels each) go from RAM1 into REGS.
//   ROW r = 0..2h, alternating direction (three-direction scan):
//     forward rows (r even, window moving right): 3 rotation clocks that prime
//       the PEs, 2h right-to-left shift clocks, 1 rotation clock;
//     reverse rows (r odd, window moving left): 2h left-to-right shift clocks,
//       4 rotation clocks;
//     every row yields 2h+1 candidates, one per clock, in scan order.
//   DOWN  1 clock between rows: one new image row enters REGS at the bottom.
// Total: 64 + (2h+1)(2h+4) + 2h clocks from `start` to the last candidate.
// The published schedule is (2h+2)(2h+1)+16; the three extra clocks per
// row here come from this design's reconstruction of the systolic movement.
//
// The controller tracks, for each of the four row slots of a REGS subblock,
// which image row (0..3 within the subblock) and which column group it holds,
// and from that derives the RAM1 words each shift or down step needs. It is a
// two-stage pipeline: stage A issues RAM reads, stage B (next clock) applies
// the register operation together with the RAM data.
module pu_ctrl
  import ime_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  sr_e              sr,
  output logic             busy,
  output logic             done,       // one clock, after the last SAD is out
  // RAM1 read requests (stage A)
  output logic             r1_en,
  output logic [4:0][6:0]  r1_row,
  output logic [4:0][4:0]  r1_cg,
  // RAM2 read (stage A)
  output logic             r2_en,
  output logic [5:0]       r2_addr,
  // processing unit controls (stage B)
  output regop_e           op,
  output logic [3:0]       sel,
  output logic             c_ld_en,
  output logic [5:0]       c_ld_idx,
  output logic             pe_en,
  output logic             fwd,
  output logic [1:0]       ph,
  output logic             tag_valid,
  output logic [1:0]       tag_k,
  output mv_t              tag_mv
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_ROW, S_DOWN, S_END} st_e;

  st_e               st;
  logic [6:0]        icnt;
  logic [6:0]        r;          // scan row 0..2h
  logic signed [7:0] n;          // clock within the row
  logic              dir_f;      // current row is forward
  logic [1:0]        idx [4];    // image row (within subblock) held by slot k
  logic signed [6:0] cgt [4];    // column group of slot k in subblock column 0
  logic [6:0]        hh;         // h
  logic [2:0]        fin;

  // stage A decisions
  regop_e            a_op;
  logic [3:0]        a_sel;
  logic              a_cld;
  logic              a_pe;
  logic              a_tv;
  logic [1:0]        a_tk;
  mv_t               a_mv;
  logic              a_last;
  logic [1:0]        p0;
  logic signed [7:0] off;

  function automatic logic [4:0] clamp_cg(logic signed [7:0] c, logic [6:0] h);
    logic signed [7:0] top;
    top = 8'(int'(h) / 2 + 3);          // last column group of the area
    if (c < 0)   return 5'd0;
    if (c > top) return 5'(top);
    return 5'(c);
  endfunction

  always_comb begin
    p0 = 2'd0;
    for (int k = 0; k < 4; k++) if (idx[k] == 2'd0) p0 = 2'(k);
  end

  always_comb begin
    a_op = OP_HOLD; a_sel = '0; a_cld = 1'b0; a_pe = 1'b0;
    a_tv = 1'b0; a_tk = '0; a_mv = '0; a_last = 1'b0; off = '0;
    r1_en = 1'b0; r1_row = '0; r1_cg = '0;
    r2_en = 1'b0; r2_addr = icnt[5:0];
    unique case (st)
      S_INIT: begin
        r2_en = 1'b1;
        a_cld = 1'b1;
        if (icnt < 7'd16) begin
          a_op  = OP_LOAD;
          a_sel = icnt[3:0];
          r1_en = 1'b1;
          for (int j = 0; j < 5; j++) begin
            r1_row[j] = icnt;
            r1_cg[j]  = 5'(j);
          end
        end
      end
      S_DOWN: begin
        a_op  = OP_DOWN;
        a_sel = {2'b00, p0};
        r1_en = 1'b1;
        for (int j = 0; j < 5; j++) begin
          r1_row[j] = r + 7'd15;
          r1_cg[j]  = clamp_cg(8'(cgt[p0]) + 8'(j), hh);
        end
      end
      S_ROW: begin
        a_pe = 1'b1;
        if (dir_f) begin
          if (n < 0 || n == 8'(2 * hh)) a_op = OP_ROTF;
          else begin
            a_op  = OP_SHL;
            r1_en = 1'b1;
            for (int j = 0; j < 4; j++) begin
              r1_row[j] = r + 7'(4 * j) + 7'(idx[3]);
              r1_cg[j]  = clamp_cg(8'(cgt[3]) + 8'sd5, hh);
            end
          end
          a_tv   = (n >= 0);
          a_tk   = n[1:0];
          off    = n;
          a_last = (n == 8'(2 * hh));
        end else begin
          if (n < 8'(2 * hh)) begin
            a_op  = OP_SHR;
            r1_en = 1'b1;
            for (int j = 0; j < 4; j++) begin
              r1_row[j] = r + 7'(4 * j) + 7'(idx[0]);
              r1_cg[j]  = clamp_cg(8'(cgt[0]) - 8'sd1, hh);
            end
          end else a_op = OP_ROTR;
          a_tv   = (n >= 3);
          a_tk   = 2'(3) - n[1:0];
          off    = 8'(2 * hh + 3) - n;
          a_last = (n == 8'(2 * hh + 3));
        end
        a_mv.x = MV_W'(off - 8'(hh));
        a_mv.y = MV_W'(8'(r) - 8'(hh));
      end
      default: ;
    endcase
  end

  // stage A state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; icnt <= '0; r <= '0; n <= '0; dir_f <= 1'b1; hh <= 7'd16;
      for (int k = 0; k < 4; k++) begin idx[k] <= 2'(k); cgt[k] <= '0; end
      fin <= '0;
    end else begin
      fin <= {fin[1:0], 1'b0};
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_INIT; icnt <= '0; hh <= 7'(sr_half(sr));
        end
        S_INIT: begin
          icnt <= icnt + 7'd1;
          if (icnt == 7'd63) begin
            st <= S_ROW; r <= '0; n <= -8'sd3; dir_f <= 1'b1;
            for (int k = 0; k < 4; k++) begin idx[k] <= 2'(k); cgt[k] <= '0; end
          end
        end
        S_DOWN: begin
          for (int k = 0; k < 4; k++) idx[k] <= idx[k] - 2'd1;
          st <= S_ROW;
          n  <= dir_f ? -8'sd3 : 8'sd0;
        end
        S_ROW: begin
          n <= n + 8'sd1;
          unique case (a_op)
            OP_SHL: begin
              for (int k = 1; k < 4; k++) begin idx[k] <= idx[k-1]; cgt[k] <= cgt[k-1]; end
              idx[0] <= idx[3]; cgt[0] <= cgt[3] + 7'sd1;
            end
            OP_ROTF: begin
              for (int k = 1; k < 4; k++) begin idx[k] <= idx[k-1]; cgt[k] <= cgt[k-1]; end
              idx[0] <= idx[3]; cgt[0] <= cgt[3];
            end
            OP_SHR: begin
              for (int k = 0; k < 3; k++) begin idx[k] <= idx[k+1]; cgt[k] <= cgt[k+1]; end
              idx[3] <= idx[0]; cgt[3] <= cgt[0] - 7'sd1;
            end
            OP_ROTR: begin
              for (int k = 0; k < 3; k++) begin idx[k] <= idx[k+1]; cgt[k] <= cgt[k+1]; end
              idx[3] <= idx[0]; cgt[3] <= cgt[0];
            end
            default: ;
          endcase
          if (a_last) begin
            if (r == 7'(2 * hh)) begin
              st <= S_END;
            end else begin
              st    <= S_DOWN;
              r     <= r + 7'd1;
              dir_f <= ~dir_f;
            end
          end
        end
        S_END: begin
          st  <= S_IDLE;
          fin <= {fin[1:0], 1'b1};
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // stage B: controls applied together with the RAM data
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op <= OP_HOLD; sel <= '0; c_ld_en <= 1'b0; c_ld_idx <= '0; pe_en <= 1'b0;
      fwd <= 1'b1; ph <= '0; tag_valid <= 1'b0; tag_k <= '0; tag_mv <= '0;
    end else begin
      op <= a_op; sel <= a_sel; c_ld_en <= a_cld; c_ld_idx <= icnt[5:0];
      pe_en <= a_pe; fwd <= dir_f; ph <= n[1:0];
      tag_valid <= a_tv; tag_k <= a_tk; tag_mv <= a_mv;
    end
  end

  assign busy = (st != S_IDLE) || (fin != '0);
  assign done = fin[2];

endmodule
