// lf_ctrl: controller of the Loeffler-12 1D-IDCT core.
//
// The core is loop-pipelined: a new 8-point transform (loop iteration) may
// start every II = 12 cycles and each takes 24 cycles, so two iterations are
// in flight. A modulo-12 step counter ('slot') indexes a look-up table that
// holds, for each step, the operations of the iteration in its first 12
// cycles (stage A) and of the one in its second 12 cycles (stage B): one
// input load, one multiplication and up to four add/sub operations, with the
// physical registers they read and write. II = 12, latency = 24, one
// multiplier, four add/sub units and two overlapped iterations follow the
// architecture chosen in the original study; the schedule and the register
// assignment are this design's.
//
// Start protocol: start_ready is high in slot 11; start_valid & start_ready
// claims the iteration that begins in the next cycle (slot 0) and latches its
// pass and tag. Iterations not claimed still run but produce no valid output.
//
// Schedule (cycle of the iteration: operation); a product or sum written in
// cycle c can be read from cycle c+1:
//   inputs c0..c7: x1 x7 x3 x5 x2 x6 x0 x4
//   mult c2..c13 : x1*k7 x7*k4 s17*k8 s37*k10 x3*k6 z5i*k12 s51*k11 s53*k9
//                  x5*k5 s26*k1 x6*k2 x2*k3
//   outputs c16..c23 (written c15..c22): x1 x3 x4 x0 x7 x6 x2 x5
//
// Register assignment. Each value lives from the cycle after it is written
// to the cycle of its last read; values whose lifetimes, taken modulo 12,
// do not overlap share a register. 44 values fit in 18 registers, the
// maximum number live at once (value, live cycles, register):
//   x1      1.. 4  p0
//   x7      2.. 3  p1
//   m7      3.. 5  p2
//   s17     3.. 4  p3
//   x3      3.. 6  p4
//   m4      4.. 5  p1
//   s37     4.. 5  p5
//   x5      4..10  p6
//   m8      5.. 5  p0
//   s51     5.. 8  p3
//   s53     5.. 9  p7
//   x2      5..13  p8
//   m10     6.. 8  p0
//   t0a     6.. 9  p1
//   t3a     6..10  p2
//   x6      6..12  p5
//   z5i     6.. 7  p9
//   m6      7.. 9  p4
//   s26     7..11  p10
//   x0      7.. 8  p11
//   m12     8.. 9  p9
//   x4      8.. 8  p12
//   e0      9..15  p11
//   e1      9..14  p3
//   m11     9.. 9  p0
//   z3      9.. 9  p12
//   m9     10..10  p0
//   t0     10..17  p9
//   t2a    10..10  p1
//   z4     10..10  p4
//   m5     11..11  p0
//   t1a    11..11  p1
//   t2     11..20  p13
//   t3     11..19  p12
//   m1     12..14  p2
//   t1     12..22  p14
//   m2     13..13  p1
//   m3     14..14  p4
//   tmp2e  14..14  p5
//   tmp11  15..20  p15
//   tmp12  15..22  p16
//   tmp3e  15..15  p5
//   tmp10  16..19  p17
//   tmp13  16..17  p10
module lf_ctrl
  import idct_pkg::*;
#(
  parameter int II = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_valid,
  input  logic       start_pass,
  input  logic [2:0] start_tag,
  output logic       start_ready,
  output logic [3:0] slot,
  output lf_cw_t     cw,
  output logic       valid_a,
  output logic       pass_a,
  output logic       valid_b,
  output logic       pass_b,
  output logic [2:0] tag_b
);
  logic [2:0] tag_a;

  assign start_ready = (slot == 4'(II - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot    <= '0;
      valid_a <= 1'b0;
      pass_a  <= 1'b0;
      tag_a   <= '0;
      valid_b <= 1'b0;
      pass_b  <= 1'b0;
      tag_b   <= '0;
    end else if (start_ready) begin
      slot    <= '0;
      valid_b <= valid_a;
      pass_b  <= pass_a;
      tag_b   <= tag_a;
      valid_a <= start_valid;
      pass_a  <= start_pass;
      tag_a   <= start_tag;
    end else begin
      slot <= slot + 4'd1;
    end
  end

  function automatic lf_alu_op_t aop(logic stg, lf_reg_t a, lf_reg_t b, logic sub, lf_reg_t dst);
    aop = '{en: 1'b1, b_stage: stg, sub: sub, to_out: 1'b0, out_idx: 3'd0, a: a, b: b, dst: dst};
  endfunction

  function automatic lf_alu_op_t oop(lf_reg_t a, lf_reg_t b, logic sub, logic [2:0] idx);
    oop = '{en: 1'b1, b_stage: 1'b1, sub: sub, to_out: 1'b1, out_idx: idx, a: a, b: b, dst: '0};
  endfunction

  function automatic lf_mul_op_t mop(logic stg, lf_reg_t a, lf_const_e k, lf_reg_t dst);
    mop = '{en: 1'b1, b_stage: stg, a: a, k: k, dst: dst};
  endfunction

  function automatic lf_ld_op_t lop(logic [2:0] idx, lf_reg_t dst);
    lop = '{en: 1'b1, idx: idx, dst: dst};
  endfunction

  localparam logic A = 1'b0, B = 1'b1;

  // The schedule look-up table.
  always_comb begin
    cw = '0;
    case (slot)
      4'd0: begin
        cw.ld     = lop(3'd1, 5'd0); // x1 <- input
        cw.mul    = mop(B, 5'd5, K_2, 5'd1); // m2 = x6 * k2
      end
      4'd1: begin
        cw.ld     = lop(3'd7, 5'd1); // x7 <- input
        cw.mul    = mop(B, 5'd8, K_3, 5'd4); // m3 = x2 * k3
        cw.alu[0] = aop(B, 5'd2, 5'd1, 1'b0, 5'd5); // tmp2e = m1 + m2
      end
      4'd2: begin
        cw.ld     = lop(3'd3, 5'd4); // x3 <- input
        cw.mul    = mop(A, 5'd0, K_7, 5'd2); // m7 = x1 * k7
        cw.alu[0] = aop(A, 5'd1, 5'd0, 1'b0, 5'd3); // s17 = x7 + x1
        cw.alu[1] = aop(B, 5'd2, 5'd4, 1'b0, 5'd5); // tmp3e = m1 + m3
        cw.alu[2] = aop(B, 5'd3, 5'd5, 1'b0, 5'd15); // tmp11 = e1 + tmp2e
        cw.alu[3] = aop(B, 5'd3, 5'd5, 1'b1, 5'd16); // tmp12 = e1 - tmp2e
      end
      4'd3: begin
        cw.ld     = lop(3'd5, 5'd6); // x5 <- input
        cw.mul    = mop(A, 5'd1, K_4, 5'd1); // m4 = x7 * k4
        cw.alu[0] = aop(A, 5'd1, 5'd4, 1'b0, 5'd5); // s37 = x7 + x3
        cw.alu[1] = aop(B, 5'd11, 5'd5, 1'b0, 5'd17); // tmp10 = e0 + tmp3e
        cw.alu[2] = aop(B, 5'd11, 5'd5, 1'b1, 5'd10); // tmp13 = e0 - tmp3e
        cw.alu[3] = oop(5'd15, 5'd13, 1'b0, 3'd1); // x1 = tmp11 + t2
      end
      4'd4: begin
        cw.ld     = lop(3'd2, 5'd8); // x2 <- input
        cw.mul    = mop(A, 5'd3, K_8, 5'd0); // m8 = s17 * k8
        cw.alu[0] = aop(A, 5'd6, 5'd0, 1'b0, 5'd3); // s51 = x5 + x1
        cw.alu[1] = aop(A, 5'd6, 5'd4, 1'b0, 5'd7); // s53 = x5 + x3
        cw.alu[3] = oop(5'd10, 5'd9, 1'b0, 3'd3); // x3 = tmp13 + t0
      end
      4'd5: begin
        cw.ld     = lop(3'd6, 5'd5); // x6 <- input
        cw.mul    = mop(A, 5'd5, K_10, 5'd0); // m10 = s37 * k10
        cw.alu[0] = aop(A, 5'd5, 5'd3, 1'b0, 5'd9); // z5i = s37 + s51
        cw.alu[1] = aop(A, 5'd2, 5'd0, 1'b0, 5'd2); // t3a = m7 + m8
        cw.alu[2] = aop(A, 5'd1, 5'd0, 1'b0, 5'd1); // t0a = m4 + m8
        cw.alu[3] = oop(5'd10, 5'd9, 1'b1, 3'd4); // x4 = tmp13 - t0
      end
      4'd6: begin
        cw.ld     = lop(3'd0, 5'd11); // x0 <- input
        cw.mul    = mop(A, 5'd4, K_6, 5'd4); // m6 = x3 * k6
        cw.alu[0] = aop(A, 5'd8, 5'd5, 1'b0, 5'd10); // s26 = x2 + x6
        cw.alu[3] = oop(5'd17, 5'd12, 1'b0, 3'd0); // x0 = tmp10 + t3
      end
      4'd7: begin
        cw.ld     = lop(3'd4, 5'd12); // x4 <- input
        cw.mul    = mop(A, 5'd9, K_12, 5'd9); // m12 = z5i * k12
        cw.alu[3] = oop(5'd17, 5'd12, 1'b1, 3'd7); // x7 = tmp10 - t3
      end
      4'd8: begin
        cw.mul    = mop(A, 5'd3, K_11, 5'd0); // m11 = s51 * k11
        cw.alu[0] = aop(A, 5'd11, 5'd12, 1'b0, 5'd11); // e0 = x0 + x4
        cw.alu[1] = aop(A, 5'd11, 5'd12, 1'b1, 5'd3); // e1 = x0 - x4
        cw.alu[2] = aop(A, 5'd0, 5'd9, 1'b0, 5'd12); // z3 = m10 + m12
        cw.alu[3] = oop(5'd15, 5'd13, 1'b1, 3'd6); // x6 = tmp11 - t2
      end
      4'd9: begin
        cw.mul    = mop(A, 5'd7, K_9, 5'd0); // m9 = s53 * k9
        cw.alu[0] = aop(A, 5'd1, 5'd12, 1'b0, 5'd9); // t0 = t0a + z3
        cw.alu[1] = aop(A, 5'd4, 5'd12, 1'b0, 5'd1); // t2a = m6 + z3
        cw.alu[2] = aop(A, 5'd0, 5'd9, 1'b0, 5'd4); // z4 = m11 + m12
        cw.alu[3] = oop(5'd16, 5'd14, 1'b0, 3'd2); // x2 = tmp12 + t1
      end
      4'd10: begin
        cw.mul    = mop(A, 5'd6, K_5, 5'd0); // m5 = x5 * k5
        cw.alu[0] = aop(A, 5'd2, 5'd4, 1'b0, 5'd12); // t3 = t3a + z4
        cw.alu[1] = aop(A, 5'd4, 5'd0, 1'b0, 5'd1); // t1a = z4 + m9
        cw.alu[2] = aop(A, 5'd1, 5'd0, 1'b0, 5'd13); // t2 = t2a + m9
        cw.alu[3] = oop(5'd16, 5'd14, 1'b1, 3'd5); // x5 = tmp12 - t1
      end
      4'd11: begin
        cw.mul    = mop(A, 5'd10, K_1, 5'd2); // m1 = s26 * k1
        cw.alu[0] = aop(A, 5'd1, 5'd0, 1'b0, 5'd14); // t1 = t1a + m5
      end
      default: cw = '0;
    endcase
  end
endmodule
