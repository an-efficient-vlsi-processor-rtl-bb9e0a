// tb_processing_unit: runs the scan controller, RAM1, RAM2 and the systolic
// processing unit together on random search areas and random macroblocks for
// the 8x8, 16x16 and 32x32 search ranges. Every candidate the array reports is
// checked against a directly computed SAD of all sixteen 4x4 blocks; each
// candidate position must appear exactly once, and the number of clocks from
// start to done must be 64 + (2h+1)(2h+4) + 2h + 4.
module tb_processing_unit;
  import ime_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start; sr_e sr;
  logic busy, done;
  logic r1_en; logic [4:0][6:0] r1_row; logic [4:0][4:0] r1_cg;
  logic r2_en; logic [5:0] r2_addr;
  regop_e op; logic [3:0] sel; logic c_ld_en; logic [5:0] c_ld_idx;
  logic pe_en, fwd; logic [1:0] ph; logic tag_valid; logic [1:0] tag_k; mv_t tag_mv;
  word_t [4:0] r1_data; word_t r2_data;
  logic wr_en; logic [6:0] wr_row; logic [4:0] wr_cg; word_t wr_data;
  logic r2_we; logic [5:0] r2_waddr; word_t r2_wdata;
  logic [15:0][SAD4_W-1:0] sad; mv_t sad_mv; logic sad_valid;

  pu_ctrl u_ctrl (.*);
  ram1 u_ram1 (.clk, .wr_en, .wr_row, .wr_cg, .wr_data, .rd_en(r1_en), .rd_row(r1_row),
               .rd_cg(r1_cg), .rd_data(r1_data));
  sp_ram #(.DEPTH(64), .WIDTH(32)) u_ram2 (.clk, .en(r2_en | r2_we), .we(r2_we),
               .addr(r2_we ? r2_waddr : r2_addr), .wdata(r2_wdata), .rdata(r2_data));
  processing_unit u_pu (.clk, .rst_n, .op, .sel, .col_in(r1_data[3:0]), .row_in(r1_data),
               .c_ld_en, .c_ld_idx, .c_ld_word(r2_data), .pe_en, .fwd, .ph,
               .tag_valid, .tag_k, .tag_mv, .sad, .sad_mv, .sad_valid);

  byte unsigned area [80][80];
  byte unsigned cur  [16][16];
  bit seen [65][65];

  function automatic int ref_sad(int b, int vx, int vy, int h);
    int s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int yy = 4*(b/4) + i, xx = 4*(b%4) + j;
        int d = int'(area[yy + vy + h][xx + vx + h]) - int'(cur[yy][xx]);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  task automatic run(sr_e s, int mode);
    int h, w, cnt, cyc, exp_cyc;
    h = sr_half(s);
    w = 2*h + 16;
    for (int y = 0; y < w; y++)
      for (int x = 0; x < w; x++)
        area[y][x] = (mode == 0) ? byte'($urandom_range(0, 255)) : byte'(((x * 7 + y * 13) & 8'hff));
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        cur[y][x] = (mode == 0) ? byte'($urandom_range(0, 255)) : area[y + h + 1][x + h - 2];
    // load RAM1 and RAM2
    for (int y = 0; y < w; y++)
      for (int c = 0; c < w/4; c++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_row = 7'(y); wr_cg = 5'(c);
        wr_data = {area[y][4*c+3], area[y][4*c+2], area[y][4*c+1], area[y][4*c]};
      end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      wr_en = 1'b0;
      r2_we = 1'b1; r2_waddr = 6'(i);
      r2_wdata = {cur[i/4][4*(i%4)+3], cur[i/4][4*(i%4)+2], cur[i/4][4*(i%4)+1], cur[i/4][4*(i%4)]};
    end
    @(negedge clk);
    r2_we = 1'b0; wr_en = 1'b0;
    foreach (seen[a, b]) seen[a][b] = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cnt = 0; cyc = 1;
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
      if (sad_valid) begin
        int vx = int'(sad_mv.x), vy = int'(sad_mv.y);
        cnt++;
        if (vx < -h || vx > h || vy < -h || vy > h || seen[vx + h][vy + h]) begin
          failures++; $display("bad or repeated candidate (%0d,%0d)", vx, vy);
        end else begin
          seen[vx + h][vy + h] = 1'b1;
          for (int b = 0; b < 16; b++) begin
            checks++;
            if (int'(sad[b]) != ref_sad(b, vx, vy, h)) begin
              failures++;
              if (failures < 10) $display("h=%0d mv=(%0d,%0d) blk %0d sad %0d exp %0d", h, vx, vy, b, sad[b], ref_sad(b, vx, vy, h));
            end
          end
        end
      end
    end
    checks++;
    if (cnt != (2*h+1)*(2*h+1)) begin failures++; $display("candidates %0d", cnt); end
    exp_cyc = 64 + (2*h+1)*(2*h+4) + 2*h + 4;
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("h=%0d clocks %0d expected %0d", h, cyc, exp_cyc); end
    $display("h=%0d: %0d candidates in %0d clocks", h, cnt, cyc);
  endtask

  initial begin
    start = 0; sr = SR_8; wr_en = 0; r2_we = 0; wr_row = 0; wr_cg = 0; wr_data = 0;
    r2_waddr = 0; r2_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sr = SR_8;  run(SR_8, 0);
    sr = SR_8;  run(SR_8, 1);
    sr = SR_16; run(SR_16, 0);
    sr = SR_32; run(SR_32, 0);
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
