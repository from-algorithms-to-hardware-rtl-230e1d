// butterfly: final stage of the regular IDCT. From the even-part sum e and
// the odd-part sum o of output index i it forms f(i) = e + o and
// f(7-i) = e - o, rounds them to nearest and rescales: in the row pass
// (pass 0, samples are integers, sums carry CB fraction bits) to PF fraction
// bits, saturated to TW bits, for the transpose memory; in the column pass
// (pass 1, sums carry CB+PF fraction bits) to integers divided by 8 (the two
// sqrt(8)-scaled passes) and saturated to the 9-bit pixel range.
// One pair per cycle, one register stage (valid/y0/y1 the cycle after en).
module butterfly #(
  parameter int ACCW  = 40,
  parameter int TW    = 20,
  parameter int CB    = 13,
  parameter int PF    = 3,
  parameter int OUT_W = 9
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic                   pass,
  input  logic signed [ACCW-1:0] e,
  input  logic signed [ACCW-1:0] o,
  output logic                   valid,
  output logic signed [TW-1:0]   y0,
  output logic signed [TW-1:0]   y1
);
  localparam longint TMAX = (longint'(1) <<< (TW - 1)) - 1;
  localparam longint PMAX = (longint'(1) <<< (OUT_W - 1)) - 1;

  function automatic logic signed [TW-1:0] scale(logic signed [ACCW:0] s, logic p);
    logic signed [ACCW:0] r;
    if (!p) begin
      r = (s + (ACCW+1)'(longint'(1) <<< (CB - PF - 1))) >>> (CB - PF);
      if (r > (ACCW+1)'(TMAX))       return TW'(TMAX);
      else if (r < -(ACCW+1)'(TMAX)) return TW'(-TMAX);
      else                           return TW'(r);
    end else begin
      r = (s + (ACCW+1)'(longint'(1) <<< (CB + PF + 2))) >>> (CB + PF + 3);
      if (r > (ACCW+1)'(PMAX))             return TW'(PMAX);
      else if (r < -(ACCW+1)'(PMAX + 1))   return TW'(-(PMAX + 1));
      else                                 return TW'(r);
    end
  endfunction

  always_ff @(posedge clk) begin
    valid <= en;
    if (en) begin
      y0 <= scale((ACCW+1)'(e) + (ACCW+1)'(o), pass);
      y1 <= scale((ACCW+1)'(e) - (ACCW+1)'(o), pass);
    end
  end
endmodule
