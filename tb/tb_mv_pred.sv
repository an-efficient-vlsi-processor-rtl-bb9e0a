// tb_mv_pred: random neighbour vectors (full range and narrow ranges that give
// ties) with every availability pattern; the registered prediction must be
// the component-wise median with missing neighbours taken as zero, and must
// hold its value while `en` is low.
module tb_mv_pred;
  import ime_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en; amv_t nb_tl, nb_t, nb_tr; logic [2:0] avail; amv_t pred;
  mv_pred dut (.*);

  function automatic int med(int a, int b, int c);
    if ((a <= b && b <= c) || (c <= b && b <= a)) return b;
    if ((b <= a && a <= c) || (c <= a && a <= b)) return a;
    return c;
  endfunction

  function automatic int rnd(bit narrow);
    if (narrow) return $urandom_range(0, 4) - 2;
    return $urandom_range(0, (1 << AMV_W) - 1) - (1 << (AMV_W - 1));
  endfunction

  int ax, ay, bx, by, cx, cy, ex, ey, gx, gy;
  bit narrow;

  initial begin
    ex = 0; ey = 0;
    en = 0; nb_tl = '0; nb_t = '0; nb_tr = '0; avail = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 5000; it++) begin
      narrow = (it % 4 == 0);
      ax = rnd(narrow); ay = rnd(narrow); bx = rnd(narrow);
      by = rnd(narrow); cx = rnd(narrow); cy = rnd(narrow);
      nb_tl = {AMV_W'(ax), AMV_W'(ay)};
      nb_t  = {AMV_W'(bx), AMV_W'(by)};
      nb_tr = {AMV_W'(cx), AMV_W'(cy)};
      avail = 3'(it % 8);
      en = (it % 7 != 3);
      if (en) begin
        ex = med(avail[0] ? ax : 0, avail[1] ? bx : 0, avail[2] ? cx : 0);
        ey = med(avail[0] ? ay : 0, avail[1] ? by : 0, avail[2] ? cy : 0);
      end
      @(negedge clk);
      gx = int'($signed(pred[2*AMV_W-1:AMV_W]));
      gy = int'($signed(pred[AMV_W-1:0]));
      checks++;
      if (gx != ex || gy != ey) begin
        failures++;
        if (failures < 10) $display("avail %b en %0d: pred (%0d,%0d) expected (%0d,%0d)", avail, en, gx, gy, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
