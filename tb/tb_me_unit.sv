// tb_me_unit: streams random candidates (16 random 4x4 SADs and a random
// vector each clock, with gaps) into the 41-partition minimum tree and checks
// every minimum cost against a directly computed one, that each reported
// vector is one that produced that minimum, and the 6-clock latency: a
// candidate must be included 6 clocks after it was presented, not 5.
module tb_me_unit;
  import ime_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear; logic [5:0] qp; logic in_valid; logic [15:0][SAD4_W-1:0] in_sad; mv_t in_v;
  logic [NBLK-1:0][COST_W-1:0] cost; mv_t [NBLK-1:0] best_v;
  me_unit dut (.*);

  int lam_tab [52] = '{1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,
                       5,6,6,7,8,9,10,11,13,14,16,18,20,23,25,29,32,36,40,45,51,57,64,72,81,91};

  // members of each partition as a 16-bit mask of 4x4 blocks (raster order)
  function automatic logic [15:0] members(int b);
    logic [15:0] m = '0;
    int x0, y0, w, h;
    if (b < 16) return 16'(1) << b;
    if (b < 24) begin x0 = 2 * (((b-16)/2) % 2); y0 = 2 * (((b-16)/2) / 2) + (b-16) % 2; w = 2; h = 1; end
    else if (b < 32) begin x0 = 2 * (((b-24)/2) % 2) + (b-24) % 2; y0 = 2 * (((b-24)/2) / 2); w = 1; h = 2; end
    else if (b < 36) begin x0 = 2 * ((b-32) % 2); y0 = 2 * ((b-32) / 2); w = 2; h = 2; end
    else if (b < 38) begin x0 = 0; y0 = 2 * (b-36); w = 4; h = 2; end
    else if (b < 40) begin x0 = 2 * (b-38); y0 = 0; w = 2; h = 4; end
    else begin x0 = 0; y0 = 0; w = 4; h = 4; end
    for (int y = y0; y < y0 + h; y++) for (int x = x0; x < x0 + w; x++) m[4*y+x] = 1'b1;
    return m;
  endfunction

  typedef struct { int s [16]; int vx; int vy; } cand_t;
  cand_t hist [$];

  function automatic int cost_of(cand_t c, int b, int q);
    int s = 0;
    logic [15:0] m = members(b);
    for (int k = 0; k < 16; k++) if (m[k]) s += c.s[k];
    return s + 2 * lam_tab[q] * ((c.vx < 0 ? -c.vx : c.vx) + (c.vy < 0 ? -c.vy : c.vy) + 1);
  endfunction

  task automatic check_all(int q, int upto, string what);
    for (int b = 0; b < NBLK; b++) begin
      int mn = 1 << 30;
      bit found = 0;
      mv_t bv;
      bv = best_v[b];
      for (int i = 0; i < upto; i++) if (cost_of(hist[i], b, q) < mn) mn = cost_of(hist[i], b, q);
      for (int i = 0; i < upto; i++)
        if (cost_of(hist[i], b, q) == mn && hist[i].vx == int'(bv.x) && hist[i].vy == int'(bv.y)) found = 1;
      checks += 2;
      if (int'(cost[b]) != mn) begin failures++; if (failures < 10) $display("%s: part %0d cost %0d expected %0d", what, b, cost[b], mn); end
      if (!found) begin failures++; if (failures < 10) $display("%s: part %0d vector not a minimiser", what, b); end
    end
  endtask

  task automatic run(int q, int n);
    hist.delete();
    qp = 6'(q);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < n; i++) begin
      cand_t c;
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
      for (int k = 0; k < 16; k++) c.s[k] = (i == n - 1 && q == 51) ? 0 : $urandom_range(0, 4080);
      c.vx = $urandom_range(0, 64) - 32; c.vy = $urandom_range(0, 64) - 32;
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < 16; k++) in_sad[k] = 12'(c.s[k]);
      in_v.x = MV_W'(c.vx); in_v.y = MV_W'(c.vy);
      hist.push_back(c);
    end
    @(negedge clk); in_valid = 0;
    // the last candidate entered 1 clock ago; after 5 clocks it must not yet
    // be visible at level 5 if it changes the 16x16 minimum
    repeat (4) @(negedge clk);
    if (q == 51) begin
      checks++;
      if (int'(cost[40]) == cost_of(hist[n-1], 40, q)) begin failures++; $display("16x16 result too early"); end
    end
    @(negedge clk);
    check_all(q, n, $sformatf("qp %0d", q));
  endtask

  initial begin
    clear = 0; qp = 0; in_valid = 0; in_sad = '0; in_v = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(0, 50);
    run(28, 200);
    run(51, 100);
    run(40, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
