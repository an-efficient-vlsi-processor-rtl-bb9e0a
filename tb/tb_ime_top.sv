// tb_ime_top: end-to-end test of the IME processor. A 64x48-pixel picture
// pair (4 x 3 macroblocks) is generated: a random textured reference frame
// and a current frame made of displaced, slightly noisy copies of it. All 12
// macroblocks are processed in raster order, cycling through the four search
// ranges and several QP values. An independent model in this bench forms the
// prediction from the macroblocks above, searches every candidate for all 41
// partitions (edge-padded reference), and makes the mode decision; the bench
// compares every cost, checks that every reported vector achieves its cost,
// compares the modes and the clock count per macroblock, and counts how often
// each mechanism of the design was exercised.
module tb_ime_top;
  import ime_pkg::*;

  localparam int FW = 64, FH = 48, MBW = 4, MBH = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start; logic [7:0] mbx, mby, mb_w; sr_e sr; logic [5:0] qp;
  logic ext_req, ext_cur; logic signed [13:0] ext_x, ext_y; word_t ext_data;
  logic busy, mb_done; amv_t pred; mbmode_e mb_mode; submode_e [3:0] sub_mode;
  logic [COST_W+1:0] best_cost; logic [NBLK-1:0][COST_W-1:0] cost; mv_t [NBLK-1:0] best_v;

  ime_top dut (.*);

  byte unsigned refp [FH][FW];
  byte unsigned curp [FH][FW];

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int rpix(int x, int y);
    return int'(refp[clampi(y, 0, FH-1)][clampi(x, 0, FW-1)]);
  endfunction

  // external memory: one clock latency, edge padding
  always_ff @(posedge clk) begin
    if (ext_req) begin
      for (int j = 0; j < 4; j++)
        ext_data[8*j +: 8] <= ext_cur ? curp[clampi(int'(ext_y), 0, FH-1)][clampi(int'(ext_x) + j, 0, FW-1)]
                                      : 8'(rpix(int'(ext_x) + j, int'(ext_y)));
    end
  end

  // mechanism counters
  int n_shl = 0, n_shr = 0, n_rotf = 0, n_rotr = 0, n_down = 0, n_load = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  int n_sub  [4] = '{0, 0, 0, 0};
  int n_sr   [4] = '{0, 0, 0, 0};
  int n_pred_nz = 0, n_pad = 0;
  always_ff @(posedge clk) begin
    case (dut.op)
      OP_SHL:  n_shl++;
      OP_SHR:  n_shr++;
      OP_ROTF: n_rotf++;
      OP_ROTR: n_rotr++;
      OP_DOWN: n_down++;
      OP_LOAD: n_load++;
      default: ;
    endcase
    if (ext_req && !ext_cur && (ext_x < 0 || ext_y < 0 || ext_x + 3 >= FW || ext_y >= FH)) n_pad++;
  end

  // model state
  int stx [MBW*MBH], sty [MBW*MBH];

  function automatic int med3(int a, int b, int c);
    int lo = (a < b) ? a : b, hi = (a < b) ? b : a;
    return (c < lo) ? lo : (c > hi) ? hi : c;
  endfunction

  function automatic int blk_x(int b); // left pixel of partition b inside the MB
    if (b < 16) return 4 * (b % 4);
    if (b < 24) return 8 * (((b - 16) / 2) % 2);
    if (b < 32) return 8 * (((b - 24) / 2) % 2) + 4 * ((b - 24) % 2);
    if (b < 36) return 8 * ((b - 32) % 2);
    if (b < 38) return 0;
    if (b < 40) return 8 * (b - 38);
    return 0;
  endfunction
  function automatic int blk_y(int b);
    if (b < 16) return 4 * (b / 4);
    if (b < 24) return 8 * (((b - 16) / 2) / 2) + 4 * ((b - 16) % 2);
    if (b < 32) return 8 * (((b - 24) / 2) / 2);
    if (b < 36) return 8 * ((b - 32) / 2);
    if (b < 38) return 8 * (b - 36);
    return 0;
  endfunction
  function automatic int blk_w(int b);
    if (b < 16) return 4;
    if (b < 24) return 8;
    if (b < 32) return 4;
    if (b < 36) return 8;
    if (b < 38) return 16;
    if (b < 40) return 8;
    return 16;
  endfunction
  function automatic int blk_h(int b);
    if (b < 16) return 4;
    if (b < 24) return 4;
    if (b < 32) return 8;
    if (b < 36) return 8;
    if (b < 38) return 8;
    return 16;
  endfunction

  function automatic int lam(int q);
    return int'(lambda_of_qp(6'(q)));
  endfunction

  function automatic int part_cost(int b, int ox, int oy, int vx, int vy, int q, int cx, int cy);
    int s = 0;
    for (int y = blk_y(b); y < blk_y(b) + blk_h(b); y++)
      for (int x = blk_x(b); x < blk_x(b) + blk_w(b); x++) begin
        int d = rpix(ox + x + vx, oy + y + vy) - int'(curp[cy + y][cx + x]);
        s += (d < 0) ? -d : d;
      end
    return s + 2 * lam(q) * ((vx < 0 ? -vx : vx) + (vy < 0 ? -vy : vy) + 1);
  endfunction

  task automatic do_mb(int bx, int by, sr_e s, int q);
    int h, px, py, ox, oy, mbi, cyc, exp_cyc;
    int best [NBLK];
    int sadc [16];
    int jt [NBLK];
    int b3, mode_e, subs [4], tot;
    h = sr_half(s);
    mbi = by * MBW + bx;
    begin
      int ax [3], ay [3]; bit av [3];
      av[0] = (by > 0) && (bx > 0); av[1] = (by > 0); av[2] = (by > 0) && (bx + 1 < MBW);
      for (int i = 0; i < 3; i++) begin
        ax[i] = av[i] ? stx[mbi - MBW - 1 + i] : 0;
        ay[i] = av[i] ? sty[mbi - MBW - 1 + i] : 0;
      end
      px = med3(ax[0], ax[1], ax[2]);
      py = med3(ay[0], ay[1], ay[2]);
    end
    if (px != 0 || py != 0) n_pred_nz++;
    ox = 16 * bx + px; oy = 16 * by + py;
    // reference search
    for (int b = 0; b < NBLK; b++) best[b] = 1 << 30;
    for (int vy = -h; vy <= h; vy++)
      for (int vx = -h; vx <= h; vx++) begin
        int lr = 2 * lam(q) * ((vx < 0 ? -vx : vx) + (vy < 0 ? -vy : vy) + 1);
        int ps [NBLK];
        for (int b = 0; b < 16; b++) begin
          int sm = 0;
          for (int y = 0; y < 4; y++)
            for (int x = 0; x < 4; x++) begin
              int d = rpix(ox + blk_x(b) + x + vx, oy + blk_y(b) + y + vy)
                      - int'(curp[16*by + blk_y(b) + y][16*bx + blk_x(b) + x]);
              sm += (d < 0) ? -d : d;
            end
          sadc[b] = sm;
        end
        for (int b = 0; b < NBLK; b++) begin
          int sm = 0;
          for (int k = 0; k < 16; k++)
            if (blk_x(k) >= blk_x(b) && blk_x(k) < blk_x(b) + blk_w(b) &&
                blk_y(k) >= blk_y(b) && blk_y(k) < blk_y(b) + blk_h(b)) sm += sadc[k];
          if (sm + lr < best[b]) best[b] = sm + lr;
        end
      end
    // run the design
    @(negedge clk);
    mbx = 8'(bx); mby = 8'(by); sr = s; qp = 6'(q); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!mb_done) begin @(negedge clk); cyc++; end
    n_sr[s]++;
    checks++;
    if (int'(pred.x) != px || int'(pred.y) != py) begin
      failures++; $display("MB %0d prediction (%0d,%0d) expected (%0d,%0d)", mbi, pred.x, pred.y, px, py);
    end
    for (int b = 0; b < NBLK; b++) begin
      int c2;
      mv_t bv;
      bv = best_v[b];
      checks++;
      if (int'(cost[b]) != best[b]) begin
        failures++;
        if (failures < 20) $display("MB %0d h=%0d part %0d cost %0d expected %0d", mbi, h, b, cost[b], best[b]);
      end
      c2 = part_cost(b, ox, oy, int'(bv.x), int'(bv.y), q, 16*bx, 16*by);
      checks++;
      if (c2 != best[b]) begin
        failures++;
        if (failures < 20) $display("MB %0d part %0d vector (%0d,%0d) costs %0d, minimum %0d", mbi, b,
                                    bv.x, bv.y, c2, best[b]);
      end
    end
    // reference mode decision
    for (int b = 0; b < NBLK; b++) jt[b] = best[b];
    tot = 0;
    for (int qd = 0; qd < 4; qd++) begin
      int c4, c48, c84, c8, bm, bc;
      c4 = 0;
      for (int k = 0; k < 4; k++) c4 += jt[4 * (2 * (qd / 2) + k / 2) + 2 * (qd % 2) + k % 2];
      c48 = jt[24 + 2*qd] + jt[25 + 2*qd];
      c84 = jt[16 + 2*qd] + jt[17 + 2*qd];
      c8  = jt[32 + qd];
      bm = 3; bc = c4;
      if (c48 < bc) begin bm = 2; bc = c48; end
      if (c84 < bc) begin bm = 1; bc = c84; end
      if (c8  < bc) begin bm = 0; bc = c8;  end
      subs[qd] = bm; tot += bc;
    end
    mode_e = 3; b3 = tot;
    if (jt[38] + jt[39] < b3) begin mode_e = 2; b3 = jt[38] + jt[39]; end
    if (jt[36] + jt[37] < b3) begin mode_e = 1; b3 = jt[36] + jt[37]; end
    if (jt[40] < b3) begin mode_e = 0; b3 = jt[40]; end
    checks++;
    if (int'(mb_mode) != mode_e || int'(best_cost) != b3) begin
      failures++; $display("MB %0d mode %0d cost %0d expected %0d %0d", mbi, mb_mode, best_cost, mode_e, b3);
    end
    n_mode[mode_e]++;
    if (mode_e == 3)
      for (int qd = 0; qd < 4; qd++) begin
        checks++;
        if (int'(sub_mode[qd]) != subs[qd]) begin failures++; $display("MB %0d quadrant %0d sub mode %0d expected %0d", mbi, qd, sub_mode[qd], subs[qd]); end
        n_sub[subs[qd]]++;
      end
    // clocks: prediction 9, fetch (2h+16)^2/4 + 64 + 2, scan 64 + (2h+1)(2h+4) + 2h + 4,
    // drain 6, decision 65 + 1, store 1
    exp_cyc = 9 + ((2*h+16)*(2*h+16))/4 + 66 + 64 + (2*h+1)*(2*h+4) + 2*h + 4 + 6 + 66 + 1;
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("MB %0d clocks %0d expected %0d", mbi, cyc, exp_cyc); end
    begin
      mv_t v16;
      v16 = best_v[40];
      stx[mbi] = px + int'(v16.x);
      sty[mbi] = py + int'(v16.y);
    end
    $display("MB %0d (%0d,%0d) h=%0d qp=%0d pred (%0d,%0d) v16 (%0d,%0d) mode %0d clocks %0d",
             mbi, bx, by, h, q, px, py, stx[mbi] - px, sty[mbi] - py, mb_mode, cyc);
  endtask

  initial begin
    automatic sr_e srs [4] = '{SR_8, SR_16, SR_32, SR_8};
    automatic int qps [4] = '{0, 20, 28, 40};
    start = 0; mbx = 0; mby = 0; mb_w = 8'(MBW); sr = SR_8; qp = 0;
    // textured reference, current = displaced reference + noise, with a
    // different displacement per 8x8 region so that small partitions can win
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++)
        refp[y][x] = byte'(((x * 11 + y * 5) % 64) * 3 + $urandom_range(0, 60));
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        // macroblock column 0: one displacement per macroblock; column 1:
        // one per 8x8 region; column 2: one per 16x8 half (even macroblock
        // rows) or 8x16 half (odd rows); column 3: per quadrant, one per 4x4
        // block, per 8x4 half, per 4x8 half, or one for the whole quadrant
        automatic int dx, dy, v;
        automatic int q = 2 * ((y % 16) / 8) + (x % 16) / 8;
        case ((x / 16) % 4)
          0: begin dx = (y / 16) - 1; dy = (x / 32) + 1; end
          1: begin dx = ((x / 8 + y / 8) % 3) - 1 + ((y / 16) % 2) * 2; dy = ((x / 16) % 3) - 1; end
          2: if ((y / 16) % 2 == 0) begin dx = ((y / 8) % 2) * 2 - 1; dy = (y / 8) % 2; end
             else begin dx = (x / 8) % 2; dy = ((x / 8) % 2) * 2 - 1; end
          default: begin
            unique case (q)
              0: begin dx = ((x / 4 + y / 4) % 3) - 1; dy = ((x / 4) % 2) - ((y / 4) % 2); end
              1: begin dx = ((y / 4) % 2) * 2 - 1; dy = (y / 4) % 2; end
              2: begin dx = (x / 4) % 2; dy = ((x / 4) % 2) * 2 - 1; end
              default: begin dx = 1; dy = 1; end
            endcase
          end
        endcase
        v = rpix(x + dx, y + dy) + int'($urandom_range(0, 6)) - 3;
        curp[y][x] = byte'(clampi(v, 0, 255));
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int by = 0; by < MBH; by++)
      for (int bx = 0; bx < MBW; bx++)
        do_mb(bx, by, (by == 2 && bx == 3) ? SR_64 : srs[(by * MBW + bx) % 4], qps[(by + bx) % 4]);
    // every mechanism must have happened
    begin
      int m [string];
      m["right-to-left shift"] = n_shl; m["left-to-right shift"] = n_shr;
      m["forward rotation"] = n_rotf;   m["reverse rotation"] = n_rotr;
      m["down"] = n_down;               m["initial load"] = n_load;
      m["16x16 chosen"] = n_mode[0];    m["8x8 split chosen"] = n_mode[3];
      m["16x8 chosen"] = n_mode[1];     m["8x16 chosen"] = n_mode[2];
      m["8x4 sub-split chosen"] = n_sub[1]; m["4x8 sub-split chosen"] = n_sub[2];
      m["4x4 sub-split chosen"] = n_sub[3];
      m["non-zero prediction"] = n_pred_nz; m["edge padding"] = n_pad;
      m["search range 8x8"] = n_sr[0];  m["search range 16x16"] = n_sr[1];
      m["search range 32x32"] = n_sr[2]; m["search range 64x64"] = n_sr[3];
      foreach (m[k]) begin
        checks++;
        $display("mechanism %-22s %0d", k, m[k]);
        if (m[k] == 0) begin failures++; $display("mechanism never exercised: %s", k); end
      end
      $display("modes 16x16/16x8/8x16/8x8: %0d %0d %0d %0d, sub modes 8x8/8x4/4x8/4x4: %0d %0d %0d %0d",
               n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_sub[0], n_sub[1], n_sub[2], n_sub[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
