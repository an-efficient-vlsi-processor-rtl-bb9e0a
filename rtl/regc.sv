// regc: REGC, the 16 x 16 pixel register holding the current macroblock.
//
// Organised like REGS as 4 x 4 subblocks of four 4-pixel row slots. REGC never
// shifts sideways: it only rotates the rows inside each subblock, in step with
// REGS, so that slot k of a REGC subblock always holds the current-MB row that
// matches the reference row in slot k of the REGS subblock above it.
// `rot_en` plays the role of the gated clock of the published design: the register
// only changes when a rotation or load is requested (modelled as an enable).
// Loading: one 32-bit word per clock from RAM2; word index w (0..63) is image
// row w/4, pixel columns 4*(w%4)..+3. Rotation directions: `rot_dn` = 1 moves
// rows down one slot (slot 3 wraps to slot 0), 0 moves them up.
module regc
  import ime_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   rot_en,
  input  logic                   rot_dn,
  input  logic                   ld_en,
  input  logic [5:0]             ld_idx,
  input  word_t                  ld_word,
  output word_t [3:0][3:0][3:0]  q        // [bi][bj][slot]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (ld_en) begin
      q[ld_idx[5:4]][ld_idx[1:0]][ld_idx[3:2]] <= ld_word;
    end else if (rot_en) begin
      for (int bi = 0; bi < 4; bi++)
        for (int bj = 0; bj < 4; bj++)
          for (int k = 0; k < 4; k++)
            q[bi][bj][k] <= rot_dn ? q[bi][bj][(k+3)%4] : q[bi][bj][(k+1)%4];
    end
  end

endmodule
