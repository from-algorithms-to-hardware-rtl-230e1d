// lf_idct2d: 8x8 2D-IDCT built on the Loeffler-12 1D core (lf_idct1d).
//
// The 2D transform is separated into 1D transforms: first the 8 rows, then
// the 8 columns. Coefficients are written into the input memory (IMEM) by
// address (row*8+col) while the unit is idle; a start pulse then runs one
// block. The row pass issues 8 iterations to the core, one every 12 cycles,
// reading IMEM, and writes the results transposed into the transpose memory
// (TMEM word (col*8+row), 3 fraction bits). When all 64 are written, the
// column pass issues 8 more iterations reading TMEM and streams the pixels
// out, one per cycle while active, with their address (row*8+col), in the
// core's output order. done pulses after the 64th pixel.
// A block takes 234 to 246 cycles from start to done. The row/column order follows the original study;
// the load/start/stream protocol and waiting for the full row pass before the
// column pass are this design's choices.
module lf_idct2d
  import idct_pkg::*;
#(
  parameter int IN_W  = IDCT_IN_W,
  parameter int OUT_W = IDCT_OUT_W,
  parameter int TW    = IDCT_TW
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
  output logic [5:0]              out_addr,
  output logic signed [OUT_W-1:0] out_data
);
  typedef enum logic [2:0] {S_IDLE, S_ROWS, S_WROWS, S_COLS, S_WCOLS} state_e;
  state_e state;

  logic [3:0] issued;
  logic [6:0] written;
  logic [2:0] rd_tag;
  logic       rd_pass;  // pass of the iteration now reading its inputs

  // core
  logic start_valid, start_ready, start_pass, in_req, c_valid, c_pass;
  logic [2:0] in_idx, c_idx, c_tag;
  logic signed [TW-1:0] in_data, c_data;

  assign start_valid = (state == S_ROWS || state == S_COLS) && !issued[3];
  assign start_pass  = (state == S_COLS);

  lf_idct1d #(.TW(TW)) u_core (
    .clk, .rst_n, .start_valid, .start_pass, .start_tag(issued[2:0]), .start_ready,
    .in_req, .in_idx, .in_data,
    .out_valid(c_valid), .out_idx(c_idx), .out_tag(c_tag), .out_pass(c_pass), .out_data(c_data)
  );

  // IMEM: written by the load port, read by the row pass.
  logic [5:0]      im_waddr [1], im_raddr [1], tm_waddr [1], tm_raddr [1];
  logic [IN_W-1:0] im_wdata [1], im_rdata [1];
  logic [TW-1:0]   tm_wdata [1], tm_rdata [1];

  assign im_waddr[0] = load_addr;
  assign im_wdata[0] = load_data;
  assign im_raddr[0] = {rd_tag, in_idx};
  idct_mem #(.WIDTH(IN_W), .NW(1), .NR(1)) u_imem (
    .clk, .we(load_we && !busy), .waddr(im_waddr), .wdata(im_wdata),
    .raddr(im_raddr), .rdata(im_rdata)
  );

  // TMEM: row results stored transposed, read by the column pass.
  assign tm_waddr[0] = {c_idx, c_tag};
  assign tm_wdata[0] = c_data;
  assign tm_raddr[0] = {rd_tag, in_idx};
  idct_mem #(.WIDTH(TW), .NW(1), .NR(1)) u_tmem (
    .clk, .we(c_valid && !c_pass), .waddr(tm_waddr), .wdata(tm_wdata),
    .raddr(tm_raddr), .rdata(tm_rdata)
  );

  assign in_data = rd_pass ? $signed(tm_rdata[0]) : TW'($signed(im_rdata[0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      issued  <= '0;
      written <= '0;
      rd_tag  <= '0;
      rd_pass <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start_valid && start_ready) begin
        issued <= issued + 4'd1;
        rd_tag <= issued[2:0];
        rd_pass <= start_pass;
      end
      if (c_valid) written <= written + 7'd1;
      case (state)
        S_IDLE:  if (start) begin
                   state <= S_ROWS; issued <= '0; written <= '0;
                 end
        S_ROWS:  if (issued[3]) state <= S_WROWS;
        S_WROWS: if (written == 7'd64) begin
                   state <= S_COLS; issued <= '0; written <= '0;
                 end
        S_COLS:  if (issued[3]) state <= S_WCOLS;
        S_WCOLS: if (written == 7'd64) begin
                   state <= S_IDLE; done <= 1'b1;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign out_valid = c_valid && c_pass;
  assign out_addr  = {c_idx, c_tag};
  assign out_data  = OUT_W'(c_data);

  // The core only reads while a claimed iteration runs, and only the
  // memory of the current pass.
  a_read_when_busy: assert property (@(posedge clk) in_req |-> busy)
    else $error("core read while idle");
endmodule
