// tb_pe: checks the processing element on random 4x4 blocks presented
// back to back (a new SAD every four clocks), with the row order rotated, and
// on the extreme cases (all-equal, 0 against 255). The SAD must be readable,
// with `done`, exactly two clocks after the fourth row.
module tb_pe;
  import ime_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, first; pix_t [3:0] y, x; logic [SAD4_W-1:0] sad; logic done;
  pe dut (.*);

  int expq [$];
  int tq   [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  // checker: whenever done is high it must match the oldest expected SAD
  always @(negedge clk) if (rst_n) begin
    if (done) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected done"); end
      else begin
        automatic int e = expq.pop_front();
        automatic int t = tq.pop_front();
        if (int'(sad) != e) begin failures++; $display("sad %0d expected %0d", sad, e); end
        checks++;
        if (cyc != t + 2) begin failures++; $display("done at %0d, expected %0d", cyc, t + 2); end
      end
    end
  end

  task automatic block(int mode);
    byte unsigned a [4][4], b [4][4];
    int s = 0, start_row;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a[i][j] = (mode == 1) ? 8'd0 : (mode == 2) ? 8'd255 : byte'($urandom_range(0, 255));
        b[i][j] = (mode == 1) ? 8'd255 : (mode == 2) ? 8'd255 : byte'($urandom_range(0, 255));
        s += (a[i][j] > b[i][j]) ? a[i][j] - b[i][j] : b[i][j] - a[i][j];
      end
    start_row = $urandom_range(0, 3);
    for (int r = 0; r < 4; r++) begin
      int rr = (start_row + r) % 4;
      @(negedge clk);
      en = 1'b1; first = (r == 0);
      for (int j = 0; j < 4; j++) begin y[j] = a[rr][j]; x[j] = b[rr][j]; end
      if (r == 3) begin expq.push_back(s); tq.push_back(cyc); end
    end
  endtask

  initial begin
    en = 0; first = 0; y = '0; x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    block(1); block(2);
    repeat (200) block(0);
    @(negedge clk); en = 1'b0;
    repeat (2) @(negedge clk);
    block(0);
    @(negedge clk); en = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d SADs never completed", expq.size()); end
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
