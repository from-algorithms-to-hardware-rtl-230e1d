// tb_lf_ctrl: checks the controller of the Loeffler-12 core.
//  - start_ready comes every 12 cycles; a claimed iteration shows up as
//    valid_a for the next 12 cycles and as valid_b for the 12 after, with its
//    pass and tag.
//  - the schedule table is replayed in floating point on the shared register
//    file for four iterations started 12 cycles apart, so that two are always
//    in flight: each iteration must deliver the 8-point 1D-IDCT (sqrt(8)
//    times orthonormal) of its own random inputs to within 0.5. A register
//    shared wrongly between overlapping lifetimes corrupts a result.
//  - per iteration: 12 multiplications, 32 add/sub operations, 8 loads, each
//    output once, the last output computed in cycle 22; per step at most one
//    multiplication and four add/sub operations.
module tb_lf_ctrl;
  import idct_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start_valid, start_pass, start_ready, valid_a, pass_a, valid_b, pass_b;
  logic [2:0] start_tag, tag_b;
  logic [3:0] slot;
  lf_cw_t cw;
  lf_ctrl dut (.*);

  int checks = 0, failures = 0;
  lf_cw_t table_q [12];
  int cyc = 0, last_ready = -1, nclaim = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  assign start_pass  = nclaim[0];
  assign start_tag   = 3'(nclaim + 3);
  assign start_valid = (nclaim % 3) != 2;

  int claim_pass [$], claim_tag [$], claim_valid [$];

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    table_q[slot] <= cw;
    if (start_ready) begin
      if (last_ready >= 0) chk(cyc - last_ready == 12, "start_ready period");
      last_ready <= cyc;
      claim_valid.push_back(int'(start_valid));
      claim_pass.push_back(int'(start_pass));
      claim_tag.push_back(int'(start_tag));
      nclaim <= nclaim + 1;
    end
    if (slot == 4'd0 && claim_valid.size() >= 2) begin
      chk(valid_a == 1'(claim_valid[$]), "valid_a");
      if (claim_valid[$]) chk(pass_a == 1'(claim_pass[$]), "pass_a");
      chk(valid_b == 1'(claim_valid[$-1]), "valid_b");
      if (claim_valid[$-1]) begin
        chk(pass_b == 1'(claim_pass[$-1]), "pass_b");
        chk(tag_b == 3'(claim_tag[$-1]), "tag_b");
      end
    end
  end

  localparam int NIT = 4;

  task automatic replay();
    real rf [LF_NREG];
    real nrf [LF_NREG];
    real xin [NIT][8];
    real yout [NIT][8];
    int nmul [NIT], nalu [NIT], nld [NIT], nout [NIT][8];
    for (int r = 0; r < LF_NREG; r++) rf[r] = 0.0;
    for (int n = 0; n < NIT; n++) begin
      nmul[n] = 0; nalu[n] = 0; nld[n] = 0;
      for (int m = 0; m < 8; m++) begin
        xin[n][m] = $itor($urandom_range(0, 2000)) - 1000.0;
        nout[n][m] = 0;
      end
    end
    for (int s = 0; s < 12; s++) begin
      int units = 0;
      for (int u = 0; u < 4; u++) if (table_q[s].alu[u].en) units++;
      chk(units <= 4, "add/sub units per step");
    end
    // global cycle t: iteration t/12 in stage A, t/12-1 in stage B
    for (int t = 0; t < 12 * (NIT + 1); t++) begin
      lf_cw_t w = table_q[t % 12];
      int ia = t / 12, ib = t / 12 - 1;
      nrf = rf;
      if (w.ld.en && ia < NIT) begin
        nrf[w.ld.dst] = xin[ia][w.ld.idx];
        nld[ia]++;
      end
      if (w.mul.en) begin
        int it = w.mul.b_stage ? ib : ia;
        if (it >= 0 && it < NIT) begin
          nrf[w.mul.dst] = rf[w.mul.a] * lf_const(w.mul.k) / 8192.0;
          nmul[it]++;
        end
      end
      for (int u = 0; u < 4; u++) if (w.alu[u].en) begin
        int it = w.alu[u].b_stage ? ib : ia;
        real r = w.alu[u].sub ? rf[w.alu[u].a] - rf[w.alu[u].b] : rf[w.alu[u].a] + rf[w.alu[u].b];
        if (it >= 0 && it < NIT) begin
          nalu[it]++;
          if (w.alu[u].to_out) begin
            chk(u == 3, "outputs on unit 3");
            yout[it][w.alu[u].out_idx] = r;
            nout[it][w.alu[u].out_idx]++;
            if (w.alu[u].out_idx == 3'd5) chk(t - 12 * it == 22, "last output in cycle 22");
          end else nrf[w.alu[u].dst] = r;
        end
      end
      rf = nrf;
    end
    for (int n = 0; n < NIT; n++) begin
      chk(nmul[n] == 12, $sformatf("12 multiplications (%0d)", nmul[n]));
      chk(nalu[n] == 32, $sformatf("32 add/sub (%0d)", nalu[n]));
      chk(nld[n] == 8, "8 inputs");
      for (int k = 0; k < 8; k++) begin
        real e = 0.0;
        chk(nout[n][k] == 1, "every output once");
        for (int m = 0; m < 8; m++)
          e += xin[n][m] * ((m == 0) ? 1.0 : $sqrt(2.0)) * $cos((2 * k + 1) * m * 3.14159265358979 / 16.0);
        chk(yout[n][k] - e < 0.5 && e - yout[n][k] < 0.5,
            $sformatf("iteration %0d x%0d = %f, expected %f", n, k, yout[n][k], e));
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (120) @(posedge clk);
    replay();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
