// mac_unit: multiply/accumulate unit of the regular IDCT.
// When en is high the product a*b is added to the accumulator, or, with clr,
// replaces it (first of the four terms of a 4x4 matrix row). One product per
// cycle, result registered; the sum of four terms is in acc the cycle after
// the fourth step. Products are kept at full precision (no rounding inside).
module mac_unit #(
  parameter int AW   = 20,
  parameter int BW   = 16,
  parameter int ACCW = 40
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic                   clr,
  input  logic signed [AW-1:0]   a,
  input  logic signed [BW-1:0]   b,
  output logic signed [ACCW-1:0] acc
);
  logic signed [AW+BW-1:0] prod;
  assign prod = a * b;

  always_ff @(posedge clk)
    if (en) acc <= (clr ? '0 : acc) + ACCW'(prod);
endmodule
