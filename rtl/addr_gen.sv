// addr_gen: addressing module. For the macroblock at (mbx, mby) with
// prediction `pred` it produces the external read requests that fill RAM1
// with the search area and RAM2 with the current macroblock, one 4-pixel word
// per clock through the single input port, and the matching RAM writes.
//
// Search area: (2h+16) x (2h+16) pixels whose top-left pixel is
// (16*mbx + pred.x - h, 16*mby + pred.y - h) in the reference frame, read row
// by row, four pixels per word. Current MB: 64 words of the current frame,
// row by row. Coordinates may fall outside the picture; the external memory
// is expected to return edge-padded pixels (this design's choice, as are the
// request order and the one-clock return latency of the external port).
// Timing: `ext_req` in clock t, `ext_data` accepted in clock t+1; `done` one
// clock after the last write; (2h+16)^2/4 + 64 words in all.
module addr_gen
  import ime_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  sr_e                 sr,
  input  logic [7:0]          mbx,
  input  logic [7:0]          mby,
  input  amv_t                pred,
  output logic                busy,
  output logic                done,
  output logic                ext_req,
  output logic                ext_cur,   // 1: current frame, 0: reference frame
  output logic signed [13:0]  ext_x,
  output logic signed [13:0]  ext_y,
  // writes of the returned word (one clock after the request)
  output logic                r1_we,
  output logic [6:0]          r1_row,
  output logic [4:0]          r1_cg,
  output logic                r2_we,
  output logic [5:0]          r2_addr
);

  typedef enum logic [1:0] {A_IDLE, A_AREA, A_CUR, A_LAST} ast_e;

  ast_e       st;
  logic [6:0] row, hh;
  logic [4:0] cg;
  logic [5:0] wi;
  logic signed [13:0] ox, oy;

  always_comb begin
    ext_req = (st == A_AREA) || (st == A_CUR);
    ext_cur = (st == A_CUR);
    if (st == A_CUR) begin
      ext_x = 14'(16 * 32'(mbx)) + 14'(4 * 32'(wi[1:0]));
      ext_y = 14'(16 * 32'(mby)) + 14'(32'(wi[5:2]));
    end else begin
      ext_x = ox + 14'(4 * 32'(cg));
      ext_y = oy + 14'(32'(row));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; row <= '0; cg <= '0; wi <= '0; hh <= 7'd16; ox <= '0; oy <= '0;
      r1_we <= 1'b0; r1_row <= '0; r1_cg <= '0; r2_we <= 1'b0; r2_addr <= '0; done <= 1'b0;
    end else begin
      done  <= 1'b0;
      r1_we <= (st == A_AREA);
      r1_row <= row;
      r1_cg  <= cg;
      r2_we  <= (st == A_CUR);
      r2_addr <= wi;
      unique case (st)
        A_IDLE: if (start) begin
          st  <= A_AREA;
          hh  <= 7'(sr_half(sr));
          ox  <= 14'(16 * 32'(mbx)) + 14'(pred.x) - 14'(sr_half(sr));
          oy  <= 14'(16 * 32'(mby)) + 14'(pred.y) - 14'(sr_half(sr));
          row <= '0; cg <= '0; wi <= '0;
        end
        A_AREA: begin
          if (cg == 5'(int'(hh) / 2 + 3)) begin
            cg <= '0;
            if (row == 7'(2 * hh + 15)) st <= A_CUR;
            else row <= row + 7'd1;
          end else cg <= cg + 5'd1;
        end
        A_CUR: begin
          wi <= wi + 6'd1;
          if (wi == 6'd63) st <= A_LAST;
        end
        A_LAST: begin
          st   <= A_IDLE;
          done <= 1'b1;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign busy = (st != A_IDLE);

endmodule
