// coef_rom: coefficient look-up table of the regular (MAC-based) IDCT.
// With the 8x8 IDCT matrix split by symmetry into an even 4x4 matrix C1
// (inputs X0,X2,X4,X6) and an odd 4x4 matrix C2 (inputs X1,X3,X5,X7),
//   C1[k][i] = w(2k)   * cos((2i+1)*(2k)  *pi/16) * 2^13
//   C2[k][i] = w(2k+1) * cos((2i+1)*(2k+1)*pi/16) * 2^13
// with w(0) = 1 and w(m) = sqrt(2) otherwise (the same sqrt(8) scaling as the
// Loeffler core), rounded to integers. Outputs i and 7-i then follow from
// even +/- odd sums. Purely combinational.
module coef_rom (
  input  logic              odd,
  input  logic [1:0]        k,
  input  logic [1:0]        i,
  output logic signed [15:0] coef
);
  // magnitudes: 8192 = 2^13, cN = round(sqrt2*cos(N*pi/16)*2^13)
  localparam logic signed [15:0] C0 = 16'sd8192;
  localparam logic signed [15:0] C1 = 16'sd11363;
  localparam logic signed [15:0] C2 = 16'sd10703;
  localparam logic signed [15:0] C3 = 16'sd9633;
  localparam logic signed [15:0] C5 = 16'sd6436;
  localparam logic signed [15:0] C6 = 16'sd4433;
  localparam logic signed [15:0] C7 = 16'sd2260;

  always_comb begin
    case ({odd, k, i})
      // C1: rows k = X0, X2, X4, X6; columns i = output 0..3
      5'b0_00_00, 5'b0_00_01, 5'b0_00_10, 5'b0_00_11: coef = C0;
      5'b0_01_00: coef = C2;   5'b0_01_01: coef = C6;
      5'b0_01_10: coef = -C6;  5'b0_01_11: coef = -C2;
      5'b0_10_00: coef = C0;   5'b0_10_01: coef = -C0;
      5'b0_10_10: coef = -C0;  5'b0_10_11: coef = C0;
      5'b0_11_00: coef = C6;   5'b0_11_01: coef = -C2;
      5'b0_11_10: coef = C2;   5'b0_11_11: coef = -C6;
      // C2: rows k = X1, X3, X5, X7
      5'b1_00_00: coef = C1;   5'b1_00_01: coef = C3;
      5'b1_00_10: coef = C5;   5'b1_00_11: coef = C7;
      5'b1_01_00: coef = C3;   5'b1_01_01: coef = -C7;
      5'b1_01_10: coef = -C1;  5'b1_01_11: coef = -C5;
      5'b1_10_00: coef = C5;   5'b1_10_01: coef = -C1;
      5'b1_10_10: coef = C7;   5'b1_10_11: coef = C3;
      5'b1_11_00: coef = C7;   5'b1_11_01: coef = -C5;
      5'b1_11_10: coef = C3;   5'b1_11_11: coef = -C1;
      default:    coef = '0;
    endcase
  end
endmodule
