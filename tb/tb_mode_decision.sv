// tb_mode_decision: presents random sets of 41 partition costs (with many
// ties from a narrow value range, and biased sets that favour each mode) and
// answers the block's read requests combinationally. The chosen macroblock
// mode, the four sub-modes and the total cost are compared with a direct
// evaluation, and the schedule must take 65 clocks after the start clock.
module tb_mode_decision;
  import ime_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start; logic [5:0] rd_idx; logic [COST_W-1:0] j_in; logic busy, done;
  mbmode_e mb_mode; submode_e [3:0] sub_mode; logic [COST_W+1:0] best_cost;
  mode_decision dut (.*);

  int costs [41];
  int mb_seen [4], sub_seen [4];
  assign j_in = COST_W'(costs[rd_idx]);

  task automatic one(int bias, int hi);
    int e_sub [4]; int e_q [4]; int tot8, c816, c168, c16, e_cost, e_mb, cyc;
    if (hi >= 0) for (int b = 0; b < 41; b++) costs[b] = $urandom_range(0, hi);
    // bias: make one partition size cheap
    case (bias)
      1: for (int b = 0; b < 16; b++) costs[b] = $urandom_range(0, hi / 16);
      2: for (int b = 16; b < 24; b++) costs[b] = $urandom_range(0, hi / 16);
      3: for (int b = 24; b < 32; b++) costs[b] = $urandom_range(0, hi / 16);
      4: for (int b = 32; b < 36; b++) costs[b] = $urandom_range(0, hi / 16);
      5: begin costs[36] = $urandom_range(0, hi / 16); costs[37] = $urandom_range(0, hi / 16); end
      6: begin costs[38] = $urandom_range(0, hi / 16); costs[39] = $urandom_range(0, hi / 16); end
      7: costs[40] = $urandom_range(0, hi / 16);
      default: ;
    endcase
    for (int q = 0; q < 4; q++) begin
      int r0 = 2 * (q / 2), c0 = 2 * (q % 2), s;
      s = costs[4*r0+c0] + costs[4*r0+c0+1] + costs[4*r0+c0+4] + costs[4*r0+c0+5];
      e_q[q] = s; e_sub[q] = SUB_4x4;
      s = costs[24+2*q] + costs[25+2*q];
      if (s < e_q[q]) begin e_q[q] = s; e_sub[q] = SUB_4x8; end
      s = costs[16+2*q] + costs[17+2*q];
      if (s < e_q[q]) begin e_q[q] = s; e_sub[q] = SUB_8x4; end
      s = costs[32+q];
      if (s < e_q[q]) begin e_q[q] = s; e_sub[q] = SUB_8x8; end
    end
    tot8 = e_q[0] + e_q[1] + e_q[2] + e_q[3];
    e_cost = tot8; e_mb = MB_8x8;
    c816 = costs[38] + costs[39]; c168 = costs[36] + costs[37]; c16 = costs[40];
    if (c816 < e_cost) begin e_cost = c816; e_mb = MB_8x16; end
    if (c168 < e_cost) begin e_cost = c168; e_mb = MB_16x8; end
    if (c16 < e_cost) begin e_cost = c16; e_mb = MB_16x16; end

    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 3;
    if (cyc != 66) begin failures++; $display("schedule took %0d clocks", cyc - 1); end
    if (int'(mb_mode) != e_mb) begin failures++; if (failures < 10) $display("mb_mode %0d expected %0d", mb_mode, e_mb); end
    if (int'(best_cost) != e_cost) begin failures++; if (failures < 10) $display("cost %0d expected %0d", best_cost, e_cost); end
    mb_seen[e_mb]++;
    if (e_mb == MB_8x8) for (int q = 0; q < 4; q++) begin
      checks++;
      sub_seen[e_sub[q]]++;
      if (int'(sub_mode[q]) != e_sub[q]) begin failures++; if (failures < 10) $display("sub_mode[%0d] %0d expected %0d", q, sub_mode[q], e_sub[q]); end
    end
  endtask

  initial begin
    start = 0;
    for (int b = 0; b < 41; b++) costs[b] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 400; it++) one(it % 8, (it % 3 == 0) ? 3 : 40000);
    // largest costs: sixteen 4x4 costs of all ones must not overflow
    for (int b = 0; b < 41; b++) costs[b] = (1 << COST_W) - 1;
    one(0, -1);
    for (int m = 0; m < 4; m++) begin
      checks += 2;
      if (mb_seen[m] == 0) begin failures++; $display("mb mode %0d never chosen", m); end
      if (sub_seen[m] == 0) begin failures++; $display("sub mode %0d never chosen", m); end
    end
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
