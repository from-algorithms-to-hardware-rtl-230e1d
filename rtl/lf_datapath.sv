// lf_datapath: datapath of the Loeffler-12 1D-IDCT core.
//
// Resources, as in the architecture chosen in the original study: one constant
// multiplier and four add/sub units, fed by operand multiplexers from a file
// of LF_NREG = 18 registers. The registers are shared by the values of both
// overlapped loop iterations as the controller's table assigns them
// (lifetime-based sharing); the datapath just executes the control word.
//
// Arithmetic (all registers signed W bits with F fraction bits):
//  - input load: pass 0 takes an integer coefficient and shifts it by F;
//    pass 1 takes a transpose-memory word with PF fraction bits and shifts it
//    by F-PF;
//  - multiplication: product with a 2^CB-scaled constant, rounded to nearest
//    back to F fraction bits, so no path carries an unrounded product;
//  - output: the add/sub unit flagged 'to_out' rounds its sum, in pass 0 to PF
//    fraction bits (saturated to TW bits), in pass 1 to an integer divided by
//    8 and saturated to the 9-bit pixel range.
// Every operation takes one cycle; results are registered. out_en/out_data
// are registered and valid the cycle after the output operation.
module lf_datapath
  import idct_pkg::*;
#(
  parameter int W  = LF_W,
  parameter int F  = LF_F,
  parameter int PF = IDCT_PF,
  parameter int CB = IDCT_CB,
  parameter int TW = IDCT_TW
) (
  input  logic                 clk,
  input  lf_cw_t               cw,
  input  logic                 pass_a,
  input  logic                 pass_b,
  input  logic signed [TW-1:0] in_data,
  output logic                 out_en,
  output logic [2:0]           out_idx,
  output logic signed [TW-1:0] out_data
);
  logic signed [W-1:0] rf [LF_NREG];

  localparam int PMAX = (1 <<< (IDCT_OUT_W - 1)) - 1;
  localparam int TMAX = (1 <<< (TW - 1)) - 1;

  // Multiplier with rounding.
  logic signed [W-1:0]  mul_a;
  logic signed [W+15:0] mul_p;
  logic signed [W-1:0]  mul_r;
  assign mul_a    = rf[cw.mul.a];
  assign mul_p    = mul_a * lf_const(cw.mul.k);
  always_comb begin
    logic signed [W+15:0] t;
    t     = (mul_p + (W+16)'(1 <<< (CB - 1))) >>> CB;
    mul_r = t[W-1:0];
  end

  // Input load.
  logic signed [W-1:0] ld_v;
  always_comb begin
    logic signed [W-1:0] x;
    x    = W'(in_data);
    ld_v = pass_a ? (x <<< (F - PF)) : (x <<< F);
  end

  // Four add/sub units.
  logic signed [W-1:0]  alu_r    [4];
  always_comb begin
    for (int u = 0; u < 4; u++) begin
      logic signed [W-1:0] a, b;
      a = rf[cw.alu[u].a];
      b = rf[cw.alu[u].b];
      alu_r[u] = cw.alu[u].sub ? a - b : a + b;
    end
  end

  // Output rounding and scaling (unit 3 carries the output operations).
  logic signed [TW-1:0] out_v;
  always_comb begin
    logic signed [W-1:0] s;
    if (!pass_b) begin
      s = (alu_r[3] + W'(1 <<< (F - PF - 1))) >>> (F - PF);
      if (s > W'(TMAX))       out_v = TW'(TMAX);
      else if (s < -W'(TMAX)) out_v = TW'(-TMAX);
      else                    out_v = TW'(s);
    end else begin
      s = (alu_r[3] + W'(1 <<< (F + 2))) >>> (F + 3);
      if (s > W'(PMAX))            out_v = TW'(PMAX);
      else if (s < -W'(PMAX + 1))  out_v = TW'(-(PMAX + 1));
      else                         out_v = TW'(s);
    end
  end

  always_ff @(posedge clk) begin
    if (cw.ld.en)
      rf[cw.ld.dst] <= ld_v;
    if (cw.mul.en)
      rf[cw.mul.dst] <= mul_r;
    for (int u = 0; u < 4; u++)
      if (cw.alu[u].en && !cw.alu[u].to_out)
        rf[cw.alu[u].dst] <= alu_r[u];
    out_en <= cw.alu[3].en && cw.alu[3].to_out;
    if (cw.alu[3].en && cw.alu[3].to_out) begin
      out_idx  <= cw.alu[3].out_idx;
      out_data <= out_v;
    end
  end

  // Outputs belong to the iteration in its second half (its pass is pass_b),
  // loads to the one in its first half.
  a_out_stage: assert property (@(posedge clk) cw.alu[3].en && cw.alu[3].to_out |-> cw.alu[3].b_stage)
    else $error("output operation outside the second half of an iteration");
endmodule
