// tb_rg_ctrl: checks the regular-IDCT controller for NMAC = 4.
// A scoreboard follows the MAC steps: per pass, every (vector, round) runs
// the four steps k = 0..3 with clear on k = 0, vectors in order; hold_en
// comes exactly one cycle after each k = 3 step; the butterfly then visits
// the two unit pairs on the next two cycles with output index
// round*2 + unit, so each vector's outputs 0..3 are produced once per pass.
// The whole block takes 2*(64 + 4) + 1 cycles from start to done, and busy
// drops with done.
module tb_rg_ctrl;
  localparam int NMAC = 4, H = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, mac_en, mac_clr, pass, hold_en, bf_valid, bf_pass;
  logic [2:0] vec, bf_vec;
  logic [1:0] k, rnd, bf_j, bf_i;
  rg_ctrl #(.NMAC(NMAC)) dut (.*);
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int exp_k = 0, exp_r = 0, exp_v = 0, exp_p = 0;
  int k3_cycle = -10, cyc = 0, hold_cycle = -10;
  int hr, hv, hp;
  int bf_seen [2][8][4];
  int nsteps = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (mac_en) begin
      chk(k == 2'(exp_k) && rnd == 2'(exp_r) && vec == 3'(exp_v) && pass == 1'(exp_p),
          $sformatf("step order p%0d v%0d r%0d k%0d", pass, vec, rnd, k));
      chk(mac_clr == (k == 0), "clear on first step");
      nsteps++;
      if (k == 2'd3) begin
        k3_cycle <= cyc; hr <= rnd; hv <= vec; hp <= pass;
      end
      exp_k = (exp_k + 1) % 4;
      if (exp_k == 0) begin
        exp_r = (exp_r + 1) % (4 / H);
        if (exp_r == 0) begin
          exp_v = (exp_v + 1) % 8;
          if (exp_v == 0) exp_p = exp_p + 1;
        end
      end
    end
    chk(hold_en == (cyc == k3_cycle + 1), "hold_en one cycle after k=3");
    if (hold_en) hold_cycle <= cyc;
    if (bf_valid) begin
      automatic int j = cyc - hold_cycle - 1;
      chk(j >= 0 && j < H && bf_j == 2'(j), $sformatf("butterfly unit sequence j=%0d bf_j=%0d cyc=%0d", j, bf_j, cyc));
      chk(bf_i == 2'(hr * H + j) && bf_vec == 3'(hv) && bf_pass == 1'(hp), "butterfly index");
      bf_seen[bf_pass][bf_vec][bf_i]++;
    end
  end

  initial begin
    int t0;
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = 1;
    while (!done) begin @(negedge clk); t0++; end
    chk(t0 == 2 * (8 * 32 / NMAC + H + 2) + 1, $sformatf("block cycles %0d", t0));
    @(negedge clk);
    chk(!busy, "idle after done");
    chk(nsteps == 2 * 8 * (32 / NMAC), "MAC steps");
    for (int p = 0; p < 2; p++) for (int v = 0; v < 8; v++) for (int i = 0; i < 4; i++)
      chk(bf_seen[p][v][i] == 1, $sformatf("output p%0d v%0d i%0d", p, v, i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
