// rg_idct2d: regular 8x8 2D-IDCT built from multiply/accumulate units.
//
// The 8-point IDCT matrix splits by symmetry into an even 4x4 product
// (C1 times X0,X2,X4,X6) and an odd one (C2 times X1,X3,X5,X7); a butterfly
// then gives f(i) = even(i) + odd(i) and f(7-i) = even(i) - odd(i). NMAC/2
// MAC units work on each part in parallel, each summing the four products of
// one output; every cycle one even and one odd sample are read (two read
// ports) and broadcast to the units of their part, each with its own
// coefficient from coef_rom. Rows are transformed first (input memory,
// IMEM) and written transposed to the transpose memory (TMEM, two write
// ports for the butterfly pair); the columns are then read from TMEM and the
// pixels leave as pairs, (i, 7-i) of one column per cycle, with addresses
// row*8+col. A block takes 2*(8*32/NMAC + NMAC/2 + 2) cycles plus one.
// Architecture after the regular structure of the original study; widths, rounding
// points, protocol and the MAC count default (4) are this design's choices.
module rg_idct2d
  import idct_pkg::*;
#(
  parameter int NMAC  = 4,
  parameter int IN_W  = IDCT_IN_W,
  parameter int OUT_W = IDCT_OUT_W,
  parameter int TW    = IDCT_TW,
  localparam int H    = NMAC / 2,
  localparam int ACCW = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load_we,
  input  logic [5:0]              load_addr,
  input  logic signed [IN_W-1:0]  load_data,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    out_valid,
  output logic [5:0]              out_addr [2],
  output logic signed [OUT_W-1:0] out_data [2]
);
  logic       mac_en, mac_clr, pass, hold_en, bf_valid, bf_pass;
  logic [2:0] vec, bf_vec;
  logic [1:0] k, rnd, bf_j, bf_i;

  rg_ctrl #(.NMAC(NMAC)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .mac_en, .mac_clr, .pass, .vec, .k, .rnd,
    .hold_en, .bf_valid, .bf_j, .bf_i, .bf_vec, .bf_pass
  );

  // IMEM and TMEM, read at (vec, 2k) and (vec, 2k+1).
  logic [5:0]      raddr [2];
  logic [5:0]      im_waddr [1];
  logic [IN_W-1:0] im_wdata [1], im_rdata [2];
  logic [5:0]      tm_waddr [2];
  logic [TW-1:0]   tm_wdata [2], tm_rdata [2];
  logic [1:0]      tm_we;

  assign raddr[0]    = {vec, k, 1'b0};
  assign raddr[1]    = {vec, k, 1'b1};
  assign im_waddr[0] = load_addr;
  assign im_wdata[0] = load_data;

  idct_mem #(.WIDTH(IN_W), .NW(1), .NR(2)) u_imem (
    .clk, .we(load_we && !busy), .waddr(im_waddr), .wdata(im_wdata),
    .raddr(raddr), .rdata(im_rdata)
  );
  idct_mem #(.WIDTH(TW), .NW(2), .NR(2)) u_tmem (
    .clk, .we(tm_we), .waddr(tm_waddr), .wdata(tm_wdata),
    .raddr(raddr), .rdata(tm_rdata)
  );

  logic signed [TW-1:0] x_even, x_odd;
  assign x_even = pass ? $signed(tm_rdata[0]) : TW'($signed(im_rdata[0]));
  assign x_odd  = pass ? $signed(tm_rdata[1]) : TW'($signed(im_rdata[1]));

  // MAC units and holding registers.
  logic signed [ACCW-1:0] acc_e [H], acc_o [H], hold_e [H], hold_o [H];
  for (genvar j = 0; j < H; j++) begin : g_mac
    logic signed [15:0] ce, co;
    logic [1:0] oi;
    assign oi = 2'(rnd * H + j);
    coef_rom u_ce (.odd(1'b0), .k, .i(oi), .coef(ce));
    coef_rom u_co (.odd(1'b1), .k, .i(oi), .coef(co));
    mac_unit #(.AW(TW), .BW(16), .ACCW(ACCW)) u_me (
      .clk, .en(mac_en), .clr(mac_clr), .a(x_even), .b(ce), .acc(acc_e[j]));
    mac_unit #(.AW(TW), .BW(16), .ACCW(ACCW)) u_mo (
      .clk, .en(mac_en), .clr(mac_clr), .a(x_odd), .b(co), .acc(acc_o[j]));
    always_ff @(posedge clk)
      if (hold_en) begin
        hold_e[j] <= acc_e[j];
        hold_o[j] <= acc_o[j];
      end
  end

  // The single butterfly, fed one pair per cycle.
  logic                 bf_out_valid;
  logic signed [TW-1:0] y0, y1;
  butterfly #(.ACCW(ACCW), .TW(TW), .CB(IDCT_CB), .PF(IDCT_PF), .OUT_W(OUT_W)) u_bf (
    .clk, .en(bf_valid), .pass(bf_pass), .e(hold_e[bf_j[$clog2(H > 1 ? H : 2)-1:0]]),
    .o(hold_o[bf_j[$clog2(H > 1 ? H : 2)-1:0]]), .valid(bf_out_valid), .y0, .y1
  );

  logic [1:0] q_i;
  logic [2:0] q_vec;
  logic       q_pass;
  always_ff @(posedge clk) begin
    q_i    <= bf_i;
    q_vec  <= bf_vec;
    q_pass <= bf_pass;
  end

  // f(i) and f(7-i) of vector v go to (i, v) and (7-i, v): transposed into
  // TMEM in the row pass, pixel (row i, column v) in the column pass.
  logic [5:0] a0, a1;
  assign a0 = {1'b0, q_i, q_vec};
  assign a1 = {~{1'b0, q_i}, q_vec};
  assign tm_we       = {2{bf_out_valid && !q_pass}};
  assign tm_waddr[0] = a0;
  assign tm_waddr[1] = a1;
  assign tm_wdata[0] = y0;
  assign tm_wdata[1] = y1;

  assign out_valid   = bf_out_valid && q_pass;
  assign out_addr[0] = a0;
  assign out_addr[1] = a1;
  assign out_data[0] = OUT_W'(y0);
  assign out_data[1] = OUT_W'(y1);
endmodule
