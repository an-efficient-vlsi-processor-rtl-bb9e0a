// tb_ram1: fills the 80 x 80-pixel search-area memory through its write port
// and reads it back with the two access patterns of the scan: four words of
// one column group from rows r, r+4, r+8, r+12 (sideways shift) and five
// consecutive words of one row (down step and initial load), all in a single
// clock with one clock of latency.
module tb_ram1;
  import ime_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en; logic [6:0] wr_row; logic [4:0] wr_cg; word_t wr_data;
  logic rd_en; logic [4:0][6:0] rd_row; logic [4:0][4:0] rd_cg; word_t [4:0] rd_data;
  ram1 dut (.*);

  word_t m [80][20];

  initial begin
    wr_en = 0; rd_en = 0; wr_row = 0; wr_cg = 0; wr_data = 0; rd_row = '0; rd_cg = '0;
    for (int r = 0; r < 80; r++)
      for (int c = 0; c < 20; c++) begin
        @(negedge clk);
        wr_en = 1; wr_row = 7'(r); wr_cg = 5'(c); wr_data = $urandom; m[r][c] = wr_data;
      end
    @(negedge clk);
    wr_en = 0;
    for (int k = 0; k < 2000; k++) begin
      int rr [5], cc [5];
      if (k % 2 == 0) begin
        automatic int r0 = $urandom_range(0, 67);
        automatic int c0 = $urandom_range(0, 19);
        for (int j = 0; j < 4; j++) begin rr[j] = r0 + 4*j; cc[j] = c0; end
        rr[4] = $urandom_range(0, 79); cc[4] = $urandom_range(0, 19);
      end else begin
        automatic int r0 = $urandom_range(0, 79);
        automatic int c0 = $urandom_range(0, 15);
        for (int j = 0; j < 5; j++) begin rr[j] = r0; cc[j] = c0 + j; end
      end
      @(negedge clk);
      rd_en = 1;
      for (int j = 0; j < 5; j++) begin rd_row[j] = 7'(rr[j]); rd_cg[j] = 5'(cc[j]); end
      @(negedge clk);
      rd_en = 0;
      for (int j = 0; j < 5; j++) begin
        checks++;
        if (rd_data[j] !== m[rr[j]][cc[j]]) begin
          failures++;
          if (failures < 10) $display("request %0d (%0d,%0d): %h expected %h", j, rr[j], cc[j], rd_data[j], m[rr[j]][cc[j]]);
        end
      end
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
