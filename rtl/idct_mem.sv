// idct_mem: 8x8-block memory used as input memory (IMEM) and transpose
// memory (TMEM) of both IDCT architectures.
// DEPTH words of WIDTH bits, NW write ports and NR read ports. Writes take
// effect at the clock edge (a later port wins on equal addresses); reads are
// asynchronous, so a read address returns the data in the same cycle. The
// regular architecture uses two read ports (one even and one odd sample per
// cycle) and two write ports (both butterfly results per cycle); the
// Loeffler core uses one of each. Contents are not reset.
module idct_mem #(
  parameter int DEPTH = 64,
  parameter int WIDTH = 20,
  parameter int NW    = 2,
  parameter int NR    = 2,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [NW-1:0]    we,
  input  logic [AW-1:0]    waddr [NW],
  input  logic [WIDTH-1:0] wdata [NW],
  input  logic [AW-1:0]    raddr [NR],
  output logic [WIDTH-1:0] rdata [NR]
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    for (int p = 0; p < NW; p++)
      if (we[p]) mem[waddr[p]] <= wdata[p];

  always_comb
    for (int p = 0; p < NR; p++)
      rdata[p] = mem[raddr[p]];
endmodule
