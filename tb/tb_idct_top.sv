// tb_idct_top: end-to-end test of both IDCT architectures at their default
// sizes. The same IEEE 1180 style blocks (three input ranges, plus extreme
// blocks that drive pixels into saturation) go through the Loeffler-12 unit
// and the MAC unit at once; every pixel of both is compared with the rounded
// floating-point 2D-IDCT (within 1) and the overall mean squared error of
// each must stay at or below 0.02. Block times are checked: the MAC unit
// exactly 2*(256/NMAC + NMAC/2 + 2) + 1 cycles, the Loeffler unit
// 234 to 246 cycles (the first iteration waits for the 12-cycle step counter).
// Mechanisms counted (each must occur): row pass and column pass of both
// units, two Loeffler iterations in flight at once, the Loeffler input read
// from IMEM and from TMEM, more than one MAC round per transform, the shared
// butterfly serving more than one MAC pair, and saturation at the pixel range.
module tb_idct_top;
  import idct_ref_pkg::*;
  localparam int NBLK = 60;
  localparam int NMAC = 4;
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
  int lf_got [64], rg_got [64], lf_seen [64], rg_seen [64];
  longint lf_sq = 0, rg_sq = 0;
  int npix = 0;
  int n_overlap = 0, n_rows = 0, n_cols = 0, n_rg_rows = 0, n_rg_cols = 0;
  int n_rounds = 0, n_bf_share = 0, n_sat = 0;

  always @(posedge clk) if (rst_n) begin
    if (lf_out_valid) begin lf_got[lf_out_addr] = lf_out_data; lf_seen[lf_out_addr]++; end
    if (rg_out_valid)
      for (int p = 0; p < 2; p++) begin
        rg_got[rg_out_addr[p]] = rg_out_data[p];
        rg_seen[rg_out_addr[p]]++;
      end
    if (dut.u_lf.u_core.u_ctrl.valid_a && dut.u_lf.u_core.u_ctrl.valid_b &&
        dut.u_lf.u_core.u_ctrl.slot == 4'd0) n_overlap++;
    if (dut.u_lf.u_core.in_req && !dut.u_lf.rd_pass) n_rows++;
    if (dut.u_lf.u_core.in_req && dut.u_lf.rd_pass) n_cols++;
    if (dut.u_rg.mac_en && !dut.u_rg.pass) n_rg_rows++;
    if (dut.u_rg.mac_en && dut.u_rg.pass) n_rg_cols++;
    if (dut.u_rg.mac_en && dut.u_rg.rnd != 0) n_rounds++;
    if (dut.u_rg.bf_valid && dut.u_rg.bf_j != 0) n_bf_share++;
  end

  task automatic run_block(blk_t c);
    blk_t e = ref_idct(c);
    int lc = 0, rc = 0;
    bit ld = 0, rd = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      lf_load_we = 1; lf_load_addr = 6'(i); lf_load_data = 12'(c[i]);
      rg_load_we = 1; rg_load_addr = 6'(i); rg_load_data = 12'(c[i]);
      lf_seen[i] = 0; rg_seen[i] = 0;
      if (e[i] == 255 || e[i] == -256) n_sat++;
    end
    @(negedge clk);
    lf_load_we = 0; rg_load_we = 0; lf_start = 1; rg_start = 1;
    @(negedge clk);
    lf_start = 0; rg_start = 0;
    lc = 1; rc = 1;
    while (!(ld && rd)) begin
      if (lf_done) ld = 1;
      if (rg_done) rd = 1;
      @(negedge clk);
      if (!ld) lc++;
      if (!rd) rc++;
    end
    checks += 2;
    if (rc != 2 * (256 / NMAC + NMAC / 2 + 2) + 1) begin failures++; $display("MAC block %0d cycles", rc); end
    if (lc < 234 || lc > 246) begin failures++; $display("Loeffler block %0d cycles", lc); end
    for (int i = 0; i < 64; i++) begin
      int dl = lf_got[i] - e[i], dr = rg_got[i] - e[i];
      checks += 2;
      if (lf_seen[i] != 1 || dl > 1 || dl < -1) begin
        failures++; $display("lf pixel %0d got %0d exp %0d", i, lf_got[i], e[i]);
      end
      if (rg_seen[i] != 1 || dr > 1 || dr < -1) begin
        failures++; $display("rg pixel %0d got %0d exp %0d", i, rg_got[i], e[i]);
      end
      lf_sq += dl * dl; rg_sq += dr * dr; npix++;
    end
  endtask

  task automatic need(int n, string what);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    blk_t c;
    lf_load_we = 0; rg_load_we = 0; lf_start = 0; rg_start = 0;
    lf_load_addr = '0; rg_load_addr = '0; lf_load_data = '0; rg_load_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      case (b % 3)
        0: c = gen_block(256, 255);
        1: c = gen_block(5, 5);
        default: c = gen_block(300, 300);
      endcase
      run_block(c);
    end
    for (int i = 0; i < 64; i++) c[i] = (i % 2) ? 2047 : -2048;
    run_block(c);
    for (int i = 0; i < 64; i++) c[i] = 0;
    c[0] = 2047;
    run_block(c);
    checks += 2;
    if (real'(lf_sq) / npix > 0.02) begin failures++; $display("lf mse too high"); end
    if (real'(rg_sq) / npix > 0.02) begin failures++; $display("rg mse too high"); end
    $display("mse: Loeffler-12 %f, MAC %f over %0d pixels", real'(lf_sq) / npix, real'(rg_sq) / npix, npix);
    need(n_rows, "Loeffler row-pass inputs");
    need(n_cols, "Loeffler column-pass inputs");
    need(n_overlap, "Loeffler iterations overlapped");
    need(n_rg_rows, "MAC row-pass steps");
    need(n_rg_cols, "MAC column-pass steps");
    need(n_rounds, "MAC steps in a later round");
    need(n_bf_share, "butterfly used by a second MAC pair");
    need(n_sat, "pixels at the saturation limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat ((NBLK + 2) * 400) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
