// ime_ctrl: macroblock-level sequencer of the IME processor.
//
// For each macroblock requested with `start` it runs, one after the other:
//   PRED   read the motion vectors of the top-left, top and top-right
//          macroblocks from RAM3 and form the prediction p16x16 (mv_pred);
//   FETCH  addr_gen fills RAM1 with the search area around the predicted
//          position and RAM2 with the current macroblock;
//   SEARCH pu_ctrl scans the search area; the processing unit feeds the
//          motion estimation tree, whose minima are cleared first;
//   DRAIN  six clocks for the tree latency;
//   DECIDE the serial mode decision (65 clocks);
//   STORE  the absolute vector of the 16x16 partition (local vector plus
//          prediction) is written to RAM3 for the prediction of later
//          macroblocks, and `mb_done` is raised for one clock.
// RAM3 is a circular buffer of 180 entries indexed by the macroblock number
// (mby * mb_w + mbx) modulo 180, enough for pictures up to 179 macroblocks
// wide. The published design overlaps fetching with searching; here the phases run
// one after the other (this design's choice). Which vector is stored per
// macroblock is also this design's choice.
module ime_ctrl
  import ime_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  mbx,
  input  logic [7:0]  mby,
  input  logic [7:0]  mb_w,
  output logic        busy,
  output logic        mb_done,
  // RAM3
  output logic        r3_en,
  output logic        r3_we,
  output logic [7:0]  r3_addr,
  output logic [31:0] r3_wdata,
  input  logic [31:0] r3_rdata,
  // prediction
  output logic        pred_en,
  output amv_t        nb_tl,
  output amv_t        nb_t,
  output amv_t        nb_tr,
  output logic [2:0]  nb_avail,
  input  amv_t        pred,
  // sub-units
  output logic        ag_start,
  input  logic        ag_done,
  output logic        pu_start,
  input  logic        pu_done,
  output logic        me_clear,
  output logic        md_start,
  input  logic        md_done,
  input  mv_t         v16
);

  typedef enum logic [3:0] {
    C_IDLE, C_RD0, C_RD1, C_RD2, C_RD3, C_PRED, C_FETCH, C_SEARCH, C_DRAIN,
    C_DECIDE, C_STORE
  } cst_e;

  cst_e        st;
  logic [7:0]  bx, by, bw;
  logic [2:0]  dcnt;
  logic [15:0] mbi;

  function automatic logic [7:0] wrap180(logic [15:0] i);
    return 8'(i % 16'd180);
  endfunction

  always_comb begin
    mbi = 16'(by) * 16'(bw) + 16'(bx);
  end

  always_comb begin
    r3_en = 1'b0; r3_we = 1'b0; r3_addr = '0; r3_wdata = '0;
    unique case (st)
      C_RD0: begin r3_en = 1'b1; r3_addr = wrap180(mbi + 16'd180 - 16'(bw) - 16'd1); end
      C_RD1: begin r3_en = 1'b1; r3_addr = wrap180(mbi + 16'd180 - 16'(bw)); end
      C_RD2: begin r3_en = 1'b1; r3_addr = wrap180(mbi + 16'd180 - 16'(bw) + 16'd1); end
      C_STORE: begin
        r3_en = 1'b1; r3_we = 1'b1; r3_addr = wrap180(mbi);
        r3_wdata = {16'(pred.x + AMV_W'($signed(v16.x))), 16'(pred.y + AMV_W'($signed(v16.y)))};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; bx <= '0; by <= '0; bw <= 8'd1; dcnt <= '0;
      nb_tl <= '0; nb_t <= '0; nb_tr <= '0; nb_avail <= '0;
      pred_en <= 1'b0; ag_start <= 1'b0; pu_start <= 1'b0; me_clear <= 1'b0;
      md_start <= 1'b0; mb_done <= 1'b0;
    end else begin
      pred_en <= 1'b0; ag_start <= 1'b0; pu_start <= 1'b0; me_clear <= 1'b0;
      md_start <= 1'b0; mb_done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          st <= C_RD0; bx <= mbx; by <= mby; bw <= mb_w;
          nb_avail <= {(mby != 0) && (mbx + 8'd1 < mb_w), mby != 0, (mby != 0) && (mbx != 0)};
        end
        C_RD0: st <= C_RD1;
        C_RD1: begin st <= C_RD2; nb_tl <= '{x: AMV_W'(signed'(r3_rdata[31:16])), y: AMV_W'(signed'(r3_rdata[15:0]))}; end
        C_RD2: begin st <= C_RD3; nb_t  <= '{x: AMV_W'(signed'(r3_rdata[31:16])), y: AMV_W'(signed'(r3_rdata[15:0]))}; end
        C_RD3: begin
          st <= C_PRED; pred_en <= 1'b1;
          nb_tr <= '{x: AMV_W'(signed'(r3_rdata[31:16])), y: AMV_W'(signed'(r3_rdata[15:0]))};
        end
        C_PRED:   begin st <= C_FETCH; ag_start <= 1'b1; end
        C_FETCH:  if (ag_done) begin st <= C_SEARCH; pu_start <= 1'b1; me_clear <= 1'b1; end
        C_SEARCH: if (pu_done) begin st <= C_DRAIN; dcnt <= '0; end
        C_DRAIN: begin
          dcnt <= dcnt + 3'd1;
          if (dcnt == 3'd5) begin st <= C_DECIDE; md_start <= 1'b1; end
        end
        C_DECIDE: if (md_done) st <= C_STORE;
        C_STORE: begin st <= C_IDLE; mb_done <= 1'b1; end
        default: st <= C_IDLE;
      endcase
    end
  end

  assign busy = (st != C_IDLE);

endmodule
