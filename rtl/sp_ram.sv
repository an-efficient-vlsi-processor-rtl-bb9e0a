// sp_ram: single-port synchronous RAM, used for RAM2 (64 x 32, the current
// macroblock) and RAM3 (180 x 32, the motion vectors kept for prediction).
// One access per clock: a write when `we` is high, otherwise a read whose data
// appears on `rdata` one clock later. Sizes are the published design's; the port
// protocol is this design's choice. Contents are not reset.
module sp_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32
) (
  input  logic                      clk,
  input  logic                      en,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  addr,
  input  logic [WIDTH-1:0]          wdata,
  output logic [WIDTH-1:0]          rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

  always_ff @(posedge clk) begin
    if (en) assert (32'(addr) < DEPTH) else $error("sp_ram address %0d out of range", addr);
  end

endmodule
