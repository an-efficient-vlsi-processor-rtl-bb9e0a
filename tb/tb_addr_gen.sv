// tb_addr_gen: for random macroblock positions, predictions and all four
// search ranges, records every external request and RAM write and checks:
// the request sequence (search area row by row from the predicted origin,
// then the 64 current-macroblock words), that each RAM write follows its
// request by one clock with the matching RAM1 row/column group or RAM2
// address, the total word count, and the `done` timing.
module tb_addr_gen;
  import ime_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start; sr_e sr; logic [7:0] mbx, mby; amv_t pred;
  logic busy, done, ext_req, ext_cur; logic signed [13:0] ext_x, ext_y;
  logic r1_we; logic [6:0] r1_row; logic [4:0] r1_cg; logic r2_we; logic [5:0] r2_addr;
  addr_gen dut (.*);

  task automatic err(string s);
    failures++;
    if (failures < 10) $display("%s", s);
  endtask

  task automatic one(int s, int bx, int by, int px, int py);
    int h = 4 << s, w = 2 * h + 16, n = 0, cyc = 0, ox, oy;
    int exp_n = w * w / 4 + 64;
    int pr_kind = -1, pr_a = 0, pr_b = 0;   // previous clock's request
    sr = sr_e'(s); mbx = 8'(bx); mby = 8'(by); pred.x = AMV_W'(px); pred.y = AMV_W'(py);
    ox = 16 * bx + px - h; oy = 16 * by + py - h;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done && cyc < 10000) begin
      // writes for the previous clock's request
      checks++;
      if (pr_kind == 0) begin
        if (!(r1_we && !r2_we && int'(r1_row) == pr_a && int'(r1_cg) == pr_b)) err($sformatf("RAM1 write mismatch row %0d cg %0d", pr_a, pr_b));
      end else if (pr_kind == 1) begin
        if (!(r2_we && !r1_we && int'(r2_addr) == pr_a)) err($sformatf("RAM2 write mismatch addr %0d", pr_a));
      end else if (r1_we || r2_we) err("unexpected RAM write");
      pr_kind = -1;
      if (ext_req) begin
        int ex, ey;
        checks++;
        if (n < w * w / 4) begin
          ex = ox + 4 * (n % (w / 4)); ey = oy + n / (w / 4);
          if (ext_cur || int'(ext_x) != ex || int'(ext_y) != ey) err($sformatf("area word %0d: (%0d,%0d,%0d) expected (%0d,%0d)", n, ext_cur, ext_x, ext_y, ex, ey));
          pr_kind = 0; pr_a = n / (w / 4); pr_b = n % (w / 4);
        end else begin
          int c = n - w * w / 4;
          ex = 16 * bx + 4 * (c % 4); ey = 16 * by + c / 4;
          if (!ext_cur || int'(ext_x) != ex || int'(ext_y) != ey) err($sformatf("current word %0d: (%0d,%0d,%0d) expected (%0d,%0d)", c, ext_cur, ext_x, ext_y, ex, ey));
          pr_kind = 1; pr_a = c;
        end
        n++;
      end
      checks++;
      if (!busy) err("busy low during fetch");
      @(negedge clk); cyc++;
    end
    checks += 2;
    if (n != exp_n) err($sformatf("h %0d: %0d words, expected %0d", h, n, exp_n));
    if (cyc != exp_n + 1) err($sformatf("h %0d: done after %0d clocks, expected %0d", h, cyc, exp_n + 1));
    @(negedge clk);
    checks++;
    if (busy) err("busy after done");
  endtask

  initial begin
    start = 0; sr = SR_8; mbx = 0; mby = 0; pred = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 24; it++)
      one(it % 4, $urandom_range(0, 119), $urandom_range(0, 67),
          $urandom_range(0, 128) - 64, $urandom_range(0, 128) - 64);
    one(3, 0, 0, -64, -64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
