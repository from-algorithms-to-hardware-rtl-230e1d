// rg_ctrl: controller of the regular (MAC-based) IDCT: counters and the
// derived multiplexer/enable signals for the datapath.
//
// With NMAC multiply/accumulate units, NMAC/2 serve the even 4x4 matrix and
// NMAC/2 the odd one. Each unit sums four products (steps k = 0..3); the
// four outputs of a part need R = 4/(NMAC/2) rounds, so one 8-point
// transform takes 4*R = 32/NMAC cycles (NMAC = 2, 4, 8: 16, 8, 4 cycles).
// Per pass 8 vectors (rows, then columns) run back to back. The cycle after
// the last step of a round the unit sums are copied to holding registers
// (hold_en), and over the next NMAC/2 cycles the single butterfly takes one
// even/odd pair per cycle (bf_valid, bf_j = unit, bf_i = output index).
// After each pass the controller idles NMAC/2+2 cycles so the last
// butterfly results reach memory before the next pass reads them; done
// pulses after the column pass.
module rg_ctrl #(
  parameter int NMAC = 4,
  localparam int H   = NMAC / 2,
  localparam int R   = 4 / H
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic       mac_en,
  output logic       mac_clr,
  output logic       pass,
  output logic [2:0] vec,
  output logic [1:0] k,
  output logic [1:0] rnd,
  output logic       hold_en,
  output logic       bf_valid,
  output logic [1:0] bf_j,
  output logic [1:0] bf_i,
  output logic [2:0] bf_vec,
  output logic       bf_pass
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e     state;
  logic [3:0] drain;
  logic       last_step;
  logic [2:0] h_vec;
  logic [1:0] h_rnd;
  logic       h_pass;

  assign mac_en    = (state == S_RUN);
  assign mac_clr   = (k == 2'd0);
  assign last_step = mac_en && k == 2'd3 && rnd == 2'(R - 1) && vec == 3'd7;
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pass  <= 1'b0;
      vec   <= '0;
      k     <= '0;
      rnd   <= '0;
      drain <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN; pass <= 1'b0; vec <= '0; k <= '0; rnd <= '0;
        end
        S_RUN: begin
          k <= k + 2'd1;
          if (k == 2'd3) begin
            if (rnd == 2'(R - 1)) begin
              rnd <= '0;
              vec <= vec + 3'd1;
            end else rnd <= rnd + 2'd1;
          end
          if (last_step) begin
            state <= S_DRAIN;
            drain <= 4'(H + 2);
          end
        end
        S_DRAIN: begin
          drain <= drain - 4'd1;
          if (drain == 4'd1) begin
            if (!pass) begin
              state <= S_RUN; pass <= 1'b1;
            end else begin
              state <= S_IDLE; done <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Holding-register load and butterfly sequencing.
  logic       bf_run;
  logic [1:0] bf_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_en <= 1'b0;
      h_vec   <= '0;
      h_rnd   <= '0;
      h_pass  <= 1'b0;
      bf_run  <= 1'b0;
      bf_cnt  <= '0;
    end else begin
      hold_en <= mac_en && k == 2'd3;
      if (mac_en && k == 2'd3) begin
        h_vec  <= vec;
        h_rnd  <= rnd;
        h_pass <= pass;
      end
      if (hold_en) begin
        bf_run <= 1'b1;
        bf_cnt <= '0;
      end else if (bf_run) begin
        bf_cnt <= bf_cnt + 2'd1;
        if (bf_cnt == 2'(H - 1)) bf_run <= 1'b0;
      end
    end
  end

  // hold registers are loaded at the end of the hold_en cycle; the
  // butterfly reads them from the next cycle on.
  logic [2:0] b_vec;
  logic [1:0] b_rnd;
  logic       b_pass;
  always_ff @(posedge clk)
    if (hold_en) begin
      b_vec  <= h_vec;
      b_rnd  <= h_rnd;
      b_pass <= h_pass;
    end

  assign bf_valid = bf_run;
  assign bf_j     = bf_cnt;
  assign bf_i     = 2'(b_rnd * H) + bf_cnt;
  assign bf_vec   = b_vec;
  assign bf_pass  = b_pass;

  initial assert (NMAC == 2 || NMAC == 4 || NMAC == 8)
    else $error("NMAC must be 2, 4 or 8");
endmodule
