// idct_top: the two 8x8 2D-IDCT architectures side by side.
//  - lf_*: irregular structure, the Loeffler algorithm in its
//    12-multiplication form on one multiplier and four add/sub units,
//    loop-pipelined with an initiation interval of 12 and a latency of 24
//    cycles per 1D transform; 234 to 246 cycles per block, one pixel per cycle
//    out.
//  - rg_*: regular structure, NMAC multiply/accumulate units on the even and
//    odd 4x4 matrices plus one butterfly; 32/NMAC cycles per 1D transform,
//    2*(256/NMAC + NMAC/2 + 2) + 1 cycles per block, two pixels per cycle out.
// Both take 12-bit coefficients written by address (row*8+col) while idle, a
// start pulse, and return 9-bit pixels with their addresses; done pulses at
// the end of a block. The two share only clock and reset.
module idct_top
  import idct_pkg::*;
#(
  parameter int NMAC = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // irregular (Loeffler-12) IDCT
  input  logic                         lf_load_we,
  input  logic [5:0]                   lf_load_addr,
  input  logic signed [IDCT_IN_W-1:0]  lf_load_data,
  input  logic                         lf_start,
  output logic                         lf_busy,
  output logic                         lf_done,
  output logic                         lf_out_valid,
  output logic [5:0]                   lf_out_addr,
  output logic signed [IDCT_OUT_W-1:0] lf_out_data,
  // regular (MAC-based) IDCT
  input  logic                         rg_load_we,
  input  logic [5:0]                   rg_load_addr,
  input  logic signed [IDCT_IN_W-1:0]  rg_load_data,
  input  logic                         rg_start,
  output logic                         rg_busy,
  output logic                         rg_done,
  output logic                         rg_out_valid,
  output logic [5:0]                   rg_out_addr [2],
  output logic signed [IDCT_OUT_W-1:0] rg_out_data [2]
);
  lf_idct2d u_lf (
    .clk, .rst_n,
    .load_we(lf_load_we), .load_addr(lf_load_addr), .load_data(lf_load_data),
    .start(lf_start), .busy(lf_busy), .done(lf_done),
    .out_valid(lf_out_valid), .out_addr(lf_out_addr), .out_data(lf_out_data)
  );

  rg_idct2d #(.NMAC(NMAC)) u_rg (
    .clk, .rst_n,
    .load_we(rg_load_we), .load_addr(rg_load_addr), .load_data(rg_load_data),
    .start(rg_start), .busy(rg_busy), .done(rg_done),
    .out_valid(rg_out_valid), .out_addr(rg_out_addr), .out_data(rg_out_data)
  );
endmodule
