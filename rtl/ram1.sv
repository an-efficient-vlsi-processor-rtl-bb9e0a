// ram1: search-area memory, four dual-port banks of 400 x 32 bits (RAM1).
//
// The search area (at most 80 x 80 pixels, the 64x64 search range) is stored
// as 4-pixel words: area row `row` (0..79), column group `cg` (0..19, pixels
// 4cg..4cg+3). The word lives in bank (row/4 + cg) mod 4 at address
// 5*row + cg/4. With this interleaving
//   * the four words of one column group in rows r, r+4, r+8, r+12 (what a
//     sideways shift of REGS consumes) are in four different banks, and
//   * five consecutive words of one row (what a down step or an initial row
//     load consumes) use each bank once, except one bank used twice.
// Read requests 0..3 use port A of their bank; request 4 uses port B, so all
// five are served in one clock. A write (from the external input port) uses
// port A and has priority. Reads have one clock of latency.
// Bank sizes and the dual-port banks follow the published design; the interleaving is
// this design's choice.
module ram1
  import ime_pkg::*;
#(
  parameter int unsigned DEPTH = 400
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [6:0]       wr_row,
  input  logic [4:0]       wr_cg,
  input  word_t            wr_data,
  input  logic             rd_en,
  input  logic [4:0][6:0]  rd_row,
  input  logic [4:0][4:0]  rd_cg,
  output word_t [4:0]      rd_data
);

  localparam int AW = $clog2(DEPTH);

  word_t mem [4][DEPTH];

  // (row/4 + cg) mod 4 depends only on the low two bits of row/4 and cg
  function automatic logic [1:0] bank_of(logic [1:0] row_q, logic [1:0] cg_lo);
    return row_q + cg_lo;
  endfunction

  function automatic logic [AW-1:0] addr_of(logic [6:0] row, logic [2:0] cg_hi);
    return AW'(5 * 32'(row) + 32'(cg_hi));
  endfunction

  logic [1:0] rbank [5];
  logic [AW-1:0] raddr [5];
  always_comb begin
    for (int j = 0; j < 5; j++) begin
      rbank[j] = bank_of(rd_row[j][3:2], rd_cg[j][1:0]);
      raddr[j] = addr_of(rd_row[j], rd_cg[j][4:2]);
    end
  end

  // port A of each bank: write, or the read request 0..3 that maps to it
  logic [1:0] wbank;
  logic [AW-1:0] waddr;
  assign wbank = bank_of(wr_row[3:2], wr_cg[1:0]);
  assign waddr = addr_of(wr_row, wr_cg[4:2]);

  logic [1:0] req_q [5];
  word_t      a_q   [4];
  word_t      b_q;

  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic          a_rd;
    logic [AW-1:0] a_addr;
    always_comb begin
      a_rd = 1'b0;
      a_addr = '0;
      for (int j = 0; j < 4; j++)
        if (rd_en && rbank[j] == 2'(b)) begin
          a_rd = 1'b1;
          a_addr = raddr[j];
        end
    end
    always_ff @(posedge clk) begin
      if (wr_en && wbank == 2'(b)) mem[b][waddr] <= wr_data;
      else if (a_rd)               a_q[b] <= mem[b][a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      b_q <= mem[rbank[4]][raddr[4]];
      for (int j = 0; j < 5; j++) req_q[j] <= rbank[j];
    end
  end

  always_comb begin
    for (int j = 0; j < 4; j++) rd_data[j] = a_q[req_q[j]];
    rd_data[4] = b_q;
  end

  // requests 0..3 must not collide on a port A
  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++)
          assert (rbank[i] != rbank[j] || raddr[i] == raddr[j])
            else $error("RAM1 bank conflict between requests %0d and %0d", i, j);
      assert (!wr_en) else $error("RAM1 read and write in the same clock");
    end
  end

endmodule
