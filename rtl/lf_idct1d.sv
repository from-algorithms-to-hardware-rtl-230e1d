// lf_idct1d: loop-pipelined 8-point 1D-IDCT after Loeffler et al. in the
// 12-multiplication form (3 multiplications in the even part, 9 in the odd
// part, 32 additions/subtractions), in which no data path holds more than one
// multiplication. This is the structure the original study selects for RTL: one
// multiplier, four add/sub units, initiation interval 12, latency 24, two
// overlapped loop iterations, one input and one output port.
//
// Interface:
//  - start_ready is high one cycle in twelve; start_valid in that cycle
//    claims the iteration that begins next cycle, with its pass (0: row pass,
//    integer input; 1: column pass, transpose-memory input) and a 3-bit tag.
//  - in the first 8 cycles of a claimed iteration in_req is high and in_idx
//    names the coefficient X(in_idx) that must be on in_data in the same cycle
//    (order 1,7,3,5,2,6,0,4).
//  - 16..23 cycles after the first input, out_valid is high with x(out_idx),
//    order 1,3,4,0,7,6,2,5, together with the tag and pass of the iteration.
// The input and output orders are this design's choice.
module lf_idct1d
  import idct_pkg::*;
#(
  parameter int W  = LF_W,
  parameter int F  = LF_F,
  parameter int PF = IDCT_PF,
  parameter int CB = IDCT_CB,
  parameter int TW = IDCT_TW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_valid,
  input  logic                 start_pass,
  input  logic [2:0]           start_tag,
  output logic                 start_ready,
  output logic                 in_req,
  output logic [2:0]           in_idx,
  input  logic signed [TW-1:0] in_data,
  output logic                 out_valid,
  output logic [2:0]           out_idx,
  output logic [2:0]           out_tag,
  output logic                 out_pass,
  output logic signed [TW-1:0] out_data
);
  lf_cw_t     cw;
  logic [3:0] slot;
  logic       valid_a, pass_a, valid_b, pass_b, out_en;
  logic [2:0] tag_b;

  lf_ctrl u_ctrl (
    .clk, .rst_n, .start_valid, .start_pass, .start_tag, .start_ready,
    .slot, .cw, .valid_a, .pass_a, .valid_b, .pass_b, .tag_b
  );

  lf_datapath #(.W(W), .F(F), .PF(PF), .CB(CB), .TW(TW)) u_dp (
    .clk, .cw, .pass_a, .pass_b, .in_data,
    .out_en, .out_idx, .out_data
  );

  assign in_req = valid_a && cw.ld.en;
  assign in_idx = cw.ld.idx;

  // Output valid/tag follow the stage-B iteration, delayed like the data.
  logic       vb_q, pb_q;
  logic [2:0] tb_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vb_q <= 1'b0;
      pb_q <= 1'b0;
      tb_q <= '0;
    end else begin
      vb_q <= valid_b;
      pb_q <= pass_b;
      tb_q <= tag_b;
    end
  end
  assign out_valid = out_en && vb_q;
  assign out_tag   = tb_q;
  assign out_pass  = pb_q;
endmodule
