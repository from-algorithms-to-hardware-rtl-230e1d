// tb_ieee1180: IEEE 1180-1990 style accuracy test of both IDCT units at
// their default sizes. Six sets of NBLK blocks each: pixel ranges
// [-256,255], [-5,5] and [-300,300], each with and without sign inversion;
// each block is made by a floating-point forward DCT, rounded and clipped to
// 12 bits, and both units' outputs are compared with the rounded, clipped
// floating-point IDCT. Per set and unit the limits of the standard are
// checked: peak error <= 1 per pixel, mean squared error <= 0.06 per pixel
// position and <= 0.02 overall, mean error <= 0.015 per pixel position and
// <= 0.0015 overall. An all-zero block must give all zeros.
// The random source is the simulator's, not the generator of the standard.
// NBLK = 10000 gives the standard's 60,000 blocks.
module tb_ieee1180;
  import idct_ref_pkg::*;
  localparam int NBLK = 10000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lf_load_we, lf_start, lf_busy, lf_done, lf_out_valid;
  logic [5:0] lf_load_addr, lf_out_addr;
  logic signed [11:0] lf_load_data;
  logic signed [8:0] lf_out_data;
  logic rg_load_we, rg_start, rg_busy, rg_done, rg_out_valid;
  logic [5:0] rg_load_addr;
  logic [5:0] rg_out_addr [2];
  logic signed [11:0] rg_load_data;
  logic signed [8:0] rg_out_data [2];

  idct_top dut (.*);

  int checks = 0, failures = 0;
  int got [2][64];

  always @(posedge clk) if (rst_n) begin
    if (lf_out_valid) got[0][lf_out_addr] = lf_out_data;
    if (rg_out_valid) for (int p = 0; p < 2; p++) got[1][rg_out_addr[p]] = rg_out_data[p];
  end

  task automatic run_block(blk_t c);
    bit ld = 0, rd = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      lf_load_we = 1; lf_load_addr = 6'(i); lf_load_data = 12'(c[i]);
      rg_load_we = 1; rg_load_addr = 6'(i); rg_load_data = 12'(c[i]);
    end
    @(negedge clk);
    lf_load_we = 0; rg_load_we = 0; lf_start = 1; rg_start = 1;
    @(negedge clk);
    lf_start = 0; rg_start = 0;
    while (!(ld && rd)) begin
      if (lf_done) ld = 1;
      if (rg_done) rd = 1;
      @(negedge clk);
    end
  endtask

  task automatic run_set(int lo, int hi, bit inv);
    longint esum [2][64], esq [2][64];
    int peak [2];
    string nm [2] = '{"Loeffler-12", "MAC"};
    for (int u = 0; u < 2; u++) begin
      peak[u] = 0;
      for (int i = 0; i < 64; i++) begin esum[u][i] = 0; esq[u][i] = 0; end
    end
    for (int b = 0; b < NBLK; b++) begin
      blk_t c = gen_block(lo, hi, inv);
      blk_t e = ref_idct(c);
      run_block(c);
      for (int u = 0; u < 2; u++)
        for (int i = 0; i < 64; i++) begin
          int d = got[u][i] - e[i];
          esum[u][i] += d;
          esq[u][i]  += d * d;
          if (d > peak[u]) peak[u] = d;
          if (-d > peak[u]) peak[u] = -d;
        end
    end
    for (int u = 0; u < 2; u++) begin
      real omse = 0.0, ome = 0.0, pmse_max = 0.0, pme_max = 0.0;
      for (int i = 0; i < 64; i++) begin
        real m = real'(esum[u][i]) / NBLK, q = real'(esq[u][i]) / NBLK;
        omse += q / 64.0;
        ome  += m / 64.0;
        if (q > pmse_max) pmse_max = q;
        if (m > pme_max) pme_max = m;
        if (-m > pme_max) pme_max = -m;
      end
      $display("[%0d,%0d]%s %-11s peak %0d  pmse %.4f  omse %.4f  pme %.4f  ome %.5f",
               -lo, hi, inv ? " inverted" : "", nm[u], peak[u], pmse_max, omse, pme_max, ome);
      checks += 5;
      if (peak[u] > 1)                     begin failures++; $display("FAIL peak"); end
      if (pmse_max > 0.06)                 begin failures++; $display("FAIL pmse"); end
      if (omse > 0.02)                     begin failures++; $display("FAIL omse"); end
      if (pme_max > 0.015)                 begin failures++; $display("FAIL pme"); end
      if (ome > 0.0015 || ome < -0.0015)   begin failures++; $display("FAIL ome"); end
    end
  endtask

  initial begin
    blk_t z;
    lf_load_we = 0; rg_load_we = 0; lf_start = 0; rg_start = 0;
    lf_load_addr = '0; rg_load_addr = '0; lf_load_data = '0; rg_load_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) z[i] = 0;
    run_block(z);
    for (int u = 0; u < 2; u++) for (int i = 0; i < 64; i++) begin
      checks++;
      if (got[u][i] != 0) begin failures++; $display("zero block: unit %0d pixel %0d = %0d", u, i, got[u][i]); end
    end
    run_set(256, 255, 0);
    run_set(256, 255, 1);
    run_set(5, 5, 0);
    run_set(5, 5, 1);
    run_set(300, 300, 0);
    run_set(300, 300, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat ((6 * NBLK + 2) * 400) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
