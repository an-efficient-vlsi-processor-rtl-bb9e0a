// mv_pred: macroblock motion-vector prediction p16x16 (Fig. 4).
//
// The prediction common to all 41 partitions of a macroblock is the
// component-wise median of the motion vectors of the three macroblocks above
// it: top-left, top and top-right. Using only the row above (instead of the
// left neighbour of the standard predictor) lets the next macroblock's search
// area be fetched before the current one is finished. A neighbour outside the
// picture counts as the zero vector (this design's choice).
// Timing: result registered, one clock after the inputs.
module mv_pred
  import ime_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  amv_t        nb_tl,
  input  amv_t        nb_t,
  input  amv_t        nb_tr,
  input  logic [2:0]  avail,      // {top-right, top, top-left}
  output amv_t        pred
);

  function automatic amvc_t med3(amvc_t a, amvc_t b, amvc_t c);
    amvc_t lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    if (c < lo)      return lo;
    else if (c > hi) return hi;
    else             return c;
  endfunction

  amv_t a, b, c;
  always_comb begin
    a = avail[0] ? nb_tl : '0;
    b = avail[1] ? nb_t   : '0;
    c = avail[2] ? nb_tr : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pred <= '0;
    else if (en) begin
      pred.x <= med3(a.x, b.x, c.x);
      pred.y <= med3(a.y, b.y, c.y);
    end
  end

endmodule
