// regs: REGS, the 16 x 20 pixel search-area register of the systolic array.
//
// The array is organised as 4 x 5 elementary 4x4 subblocks (subblock row bi,
// subblock column bj; column 4 is the extra 16x4 column). Each subblock holds
// four 4-pixel rows in physical slots k = 0..3. Multiplexers at each subblock
// input give the configurable modes of Fig. 8:
//   OP_SHL  right-to-left shift: inside a subblock rows move down one slot,
//           slot 3 leaves to slot 0 of the left neighbour, and the rightmost
//           column takes one new 4-pixel word per subblock row from RAM1.
//   OP_SHR  left-to-right shift: rows move up one slot, slot 0 leaves to slot
//           3 of the right neighbour, the leftmost column takes the new words.
//   OP_ROTF / OP_ROTR  rotation: the same row movement without leaving the
//           subblock (down / up respectively).
//   OP_DOWN the row in slot `sel[1:0]` of every subblock moves up into the
//           subblock above; the bottom subblocks take a new 20-pixel image row.
//   OP_LOAD initialisation: image row `sel` (0..15) is written directly.
// Four shift steps move a whole subblock one position sideways, so with the
// PE taps of the processing unit the window advances one pixel per clock.
// The four modes are the published design's; the exact slot movement, the two rotation
// directions and the load mode are this design's reconstruction.
// Timing: all updates happen on the rising clock edge; outputs are registers.
module regs
  import ime_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  regop_e                 op,
  input  logic [3:0]             sel,
  input  word_t [3:0]            col_in,  // one word per subblock row (shifts)
  input  word_t [4:0]            row_in,  // one word per subblock column (down/load)
  output word_t [3:0][4:0][3:0]  q        // [bi][bj][slot]
);

  word_t [3:0][4:0][3:0] d;

  always_comb begin
    d = q;
    for (int bi = 0; bi < 4; bi++) begin
      for (int bj = 0; bj < 5; bj++) begin
        unique case (op)
          OP_SHL: begin
            for (int k = 1; k < 4; k++) d[bi][bj][k] = q[bi][bj][k-1];
            d[bi][bj][0] = (bj == 4) ? col_in[bi] : q[bi][(bj+1)%5][3];
          end
          OP_SHR: begin
            for (int k = 0; k < 3; k++) d[bi][bj][k] = q[bi][bj][k+1];
            d[bi][bj][3] = (bj == 0) ? col_in[bi] : q[bi][(bj+4)%5][0];
          end
          OP_ROTF: begin
            for (int k = 1; k < 4; k++) d[bi][bj][k] = q[bi][bj][k-1];
            d[bi][bj][0] = q[bi][bj][3];
          end
          OP_ROTR: begin
            for (int k = 0; k < 3; k++) d[bi][bj][k] = q[bi][bj][k+1];
            d[bi][bj][3] = q[bi][bj][0];
          end
          OP_DOWN: begin
            d[bi][bj][sel[1:0]] = (bi == 3) ? row_in[bj] : q[(bi+1)%4][bj][sel[1:0]];
          end
          OP_LOAD: begin
            if (sel[3:2] == 2'(bi)) d[bi][bj][sel[1:0]] = row_in[bj];
          end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
