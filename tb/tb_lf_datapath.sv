// tb_lf_datapath: drives the Loeffler-12 datapath with hand-made control
// words and checks the arithmetic bit-exactly against integer reference
// formulas: input scaling per pass, constant multiplication with
// round-to-nearest, addition and subtraction, output rounding per pass with
// saturation, and register addressing.
// Each trial picks four distinct registers ra, rb, rc, rm: load a into ra,
// b into rb and c into rc, multiply ra by a random constant into rm, then
// output rm +/- rb through add/sub unit 3.
module tb_lf_datapath;
  import idct_pkg::*;
  localparam int TW = IDCT_TW;
  logic clk = 0;
  always #5 clk = ~clk;
  lf_cw_t cw;
  logic pass_a, pass_b, out_en;
  logic [2:0] out_idx;
  logic signed [TW-1:0] in_data, out_data;
  lf_datapath dut (.*);

  int checks = 0, failures = 0;

  function automatic longint rshift_round(longint v, int s);
    return (v + (longint'(1) <<< (s - 1))) >>> s;
  endfunction

  task automatic trial(logic p, logic sub, int a, int b, int c, lf_const_e k);
    longint xa, xb, m, s, e;
    lf_reg_t ra, rb, rc, rm;
    int sh = p ? (LF_F - IDCT_PF) : LF_F;
    xa = longint'(a) <<< sh;
    xb = longint'(b) <<< sh;
    m  = rshift_round(xa * longint'(lf_const(k)), IDCT_CB);
    s  = sub ? m - xb : m + xb;
    if (!p) begin
      e = rshift_round(s, LF_F - IDCT_PF);
      if (e > 524287) e = 524287;
      if (e < -524287) e = -524287;
    end else begin
      e = rshift_round(s, LF_F + 3);
      if (e > 255) e = 255;
      if (e < -256) e = -256;
    end
    ra = lf_reg_t'($urandom_range(0, LF_NREG - 1));
    rb = lf_reg_t'((ra + 1 + $urandom_range(0, 3)) % LF_NREG);
    rc = lf_reg_t'((rb + 1 + $urandom_range(0, 3)) % LF_NREG);
    if (rc == ra) rc = lf_reg_t'((rc + 1) % LF_NREG);
    rm = rc;
    while (rm == ra || rm == rb || rm == rc) rm = lf_reg_t'((rm + 1) % LF_NREG);
    @(negedge clk);
    cw = '0; pass_a = p; pass_b = p;
    cw.ld = '{en: 1'b1, idx: 3'd3, dst: ra}; in_data = TW'(a);
    @(negedge clk);
    cw.ld = '{en: 1'b1, idx: 3'd5, dst: rb}; in_data = TW'(b);
    @(negedge clk);
    cw.ld = '{en: 1'b1, idx: 3'd1, dst: rc}; in_data = TW'(c);
    @(negedge clk);
    cw = '0;
    cw.mul = '{en: 1'b1, b_stage: 1'b1, a: ra, k: k, dst: rm};
    @(negedge clk);
    cw = '0;
    cw.alu[3] = '{en: 1'b1, b_stage: 1'b1, sub: sub, to_out: 1'b1, out_idx: 3'd5,
                  a: rm, b: rb, dst: '0};
    @(negedge clk);
    cw = '0;
    checks++;
    if (!out_en || out_idx != 3'd5 || longint'(out_data) != e) begin
      failures++;
      $display("FAIL p=%0d sub=%0d a=%0d b=%0d k=%s got %0d exp %0d en=%0d",
               p, sub, a, b, k.name(), out_data, e, out_en);
    end
  endtask

  initial begin
    cw = '0; pass_a = 0; pass_b = 0; in_data = '0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      automatic logic p = 1'($urandom_range(0, 1));
      automatic int lim = p ? 65535 : 4095;
      trial(p, 1'($urandom_range(0, 1)),
            $signed($urandom_range(0, lim)) - (lim + 1) / 2,
            $signed($urandom_range(0, lim)) - (lim + 1) / 2,
            $signed($urandom_range(0, lim)) - (lim + 1) / 2,
            lf_const_e'($urandom_range(0, 11)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
