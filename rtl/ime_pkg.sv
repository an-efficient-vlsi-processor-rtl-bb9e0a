// ime_pkg: types and constants shared by the integer motion estimation (IME)
// processor. Pixels are 8-bit; a memory word carries four horizontally adjacent
// pixels, pixel j of the word in bits [8j+7:8j]. Motion vectors are signed
// 8-bit local vectors (range -32..+32 for the largest 64x64 search range).
// The 41 partitions of a macroblock (MB) are numbered as follows (this order
// is this design's choice): 0..15 the 4x4 blocks in raster order, 16..23 the
// 8x4 blocks (two per 8x8 quadrant, top then bottom), 24..31 the 4x8 blocks
// (two per quadrant, left then right), 32..35 the 8x8 quadrants, 36..37 the
// 16x8 halves (top, bottom), 38..39 the 8x16 halves (left, right), 40 the
// 16x16 block. The lambda table follows Table 2 of the H.264 JM-derived
// relationship between QP and lambda_motion.
package ime_pkg;

  localparam int PIX_W   = 8;
  localparam int WORD_W  = 32;
  localparam int SAD4_W  = 12;   // 16 * 255 = 4080 fits in 12 bits
  localparam int SAD16_W = 16;   // 256 * 255 = 65280
  localparam int MV_W    = 8;    // signed local vector component
  localparam int LR_W    = 15;   // lambda*R: 2 * 91 * 65 = 11830
  localparam int COST_W  = 18;   // SAD16 + lambda*R
  localparam int NBLK    = 41;

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic signed [MV_W-1:0] mvc_t;

  typedef struct packed {
    mvc_t x;
    mvc_t y;
  } mv_t;

  // Absolute motion vector (local vector plus the macroblock prediction).
  localparam int AMV_W = 12;
  typedef logic signed [AMV_W-1:0] amvc_t;
  typedef struct packed {
    amvc_t x;
    amvc_t y;
  } amv_t;

  // Search range selection: p = q = 4, 8, 16, 32 (8x8 .. 64x64).
  typedef enum logic [1:0] {
    SR_8  = 2'd0,
    SR_16 = 2'd1,
    SR_32 = 2'd2,
    SR_64 = 2'd3
  } sr_e;

  function automatic int unsigned sr_half(sr_e s);
    case (s)
      SR_8:    return 4;
      SR_16:   return 8;
      SR_32:   return 16;
      default: return 32;
    endcase
  endfunction

  // Operations of the REGS/REGC register arrays.
  typedef enum logic [2:0] {
    OP_HOLD  = 3'd0,
    OP_SHL   = 3'd1,  // right-to-left shift: data enters from RAM1 at the right
    OP_SHR   = 3'd2,  // left-to-right shift: data enters from RAM1 at the left
    OP_ROTF  = 3'd3,  // rotation, rows move downward inside each 4x4 subblock
    OP_ROTR  = 3'd4,  // rotation, rows move upward inside each 4x4 subblock
    OP_DOWN  = 3'd5,  // one new image row: rows move up between subblocks
    OP_LOAD  = 3'd6   // direct row load during initialisation
  } regop_e;

  // Best partitioning of a macroblock.
  typedef enum logic [1:0] {
    MB_16x16 = 2'd0,
    MB_16x8  = 2'd1,
    MB_8x16  = 2'd2,
    MB_8x8   = 2'd3
  } mbmode_e;

  typedef enum logic [1:0] {
    SUB_8x8 = 2'd0,
    SUB_8x4 = 2'd1,
    SUB_4x8 = 2'd2,
    SUB_4x4 = 2'd3
  } submode_e;

  // lambda_motion as a function of QP (Table 2).
  function automatic logic [6:0] lambda_of_qp(logic [5:0] qp);
    case (qp)
      6'd0, 6'd1, 6'd2, 6'd3, 6'd4, 6'd5, 6'd6, 6'd7, 6'd8, 6'd9, 6'd10,
      6'd11, 6'd12, 6'd13, 6'd14, 6'd15:       return 7'd1;
      6'd16, 6'd17, 6'd18, 6'd19:              return 7'd2;
      6'd20, 6'd21, 6'd22:                     return 7'd3;
      6'd23, 6'd24, 6'd25:                     return 7'd4;
      6'd26:                                   return 7'd5;
      6'd27, 6'd28:                            return 7'd6;
      6'd29:  return 7'd7;
      6'd30:  return 7'd8;
      6'd31:  return 7'd9;
      6'd32:  return 7'd10;
      6'd33:  return 7'd11;
      6'd34:  return 7'd13;
      6'd35:  return 7'd14;
      6'd36:  return 7'd16;
      6'd37:  return 7'd18;
      6'd38:  return 7'd20;
      6'd39:  return 7'd23;
      6'd40:  return 7'd25;
      6'd41:  return 7'd29;
      6'd42:  return 7'd32;
      6'd43:  return 7'd36;
      6'd44:  return 7'd40;
      6'd45:  return 7'd45;
      6'd46:  return 7'd51;
      6'd47:  return 7'd57;
      6'd48:  return 7'd64;
      6'd49:  return 7'd72;
      6'd50:  return 7'd81;
      default: return 7'd91;
    endcase
  endfunction

endpackage
