// tb_rg_mac_sweep: the regular 2D-IDCT at the MAC counts its controller
// supports. Three rg_idct2d instances with NMAC = 2, 4 and 8 get the same
// blocks at the same time. For each instance the testbench checks every pixel
// against the rounded floating-point 2D-IDCT (within 1, mean squared error at
// most 0.02, each pixel delivered once). It also checks the block time
// 2*(8*32/NMAC + NMAC/2 + 2) + 1 cycles from start to done, which holds
// 32/NMAC cycles per 8-point transform (16, 8 and 4 cycles), and prints the
// measured cycles per transform.
module tb_rg_mac_sweep;
  import idct_ref_pkg::*;
  localparam int NBLK = 12;
  localparam int NCFG = 3;
  localparam int MACS [NCFG] = '{2, 4, 8};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load_we, start;
  logic [5:0] load_addr;
  logic signed [11:0] load_data;
  logic [NCFG-1:0] done_v;

  int checks = 0, failures = 0;
  int got  [NCFG][64];
  int seen [NCFG][64];
  longint sqerr [NCFG];
  int npix = 0;

  for (genvar j = 0; j < NCFG; j++) begin : g_cfg
    logic busy, done, out_valid;
    logic [5:0] out_addr [2];
    logic signed [8:0] out_data [2];
    rg_idct2d #(.NMAC(MACS[j])) dut (
      .clk, .rst_n, .load_we, .load_addr, .load_data, .start,
      .busy, .done, .out_valid, .out_addr, .out_data
    );
    assign done_v[j] = done;
    always @(posedge clk) if (out_valid)
      for (int p = 0; p < 2; p++) begin
        got[j][out_addr[p]] = int'(out_data[p]);
        seen[j][out_addr[p]]++;
      end
  end

  task automatic run_block(blk_t c);
    blk_t expv;
    int cyc;
    int cyc_of [NCFG];
    expv = ref_idct(c);
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 6'(i); load_data = 12'(c[i]);
      for (int j = 0; j < NCFG; j++) seen[j][i] = 0;
    end
    @(negedge clk);
    load_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    for (int j = 0; j < NCFG; j++) cyc_of[j] = 0;
    while (1) begin
      for (int j = 0; j < NCFG; j++) if (done_v[j] && cyc_of[j] == 0) cyc_of[j] = cyc;
      if (cyc_of[0] != 0 && cyc_of[1] != 0 && cyc_of[2] != 0) break;
      @(negedge clk);
      cyc++;
    end
    for (int j = 0; j < NCFG; j++) begin
      int n = MACS[j];
      checks++;
      if (cyc_of[j] != 2 * (8 * 32 / n + n / 2 + 2) + 1) begin
        failures++; $display("NMAC %0d: block took %0d cycles", n, cyc_of[j]);
      end
      for (int i = 0; i < 64; i++) begin
        int e = got[j][i] - expv[i];
        checks++;
        if (seen[j][i] != 1 || e > 1 || e < -1) begin
          failures++;
          $display("NMAC %0d: pixel %0d got %0d exp %0d seen %0d", n, i, got[j][i], expv[i], seen[j][i]);
        end
        sqerr[j] += e * e;
      end
    end
    npix += 64;
  endtask

  initial begin
    blk_t c;
    load_we = 0; start = 0; load_addr = '0; load_data = '0;
    for (int j = 0; j < NCFG; j++) sqerr[j] = 0;
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
    for (int i = 0; i < 64; i++) c[i] = 2047;
    run_block(c);
    for (int i = 0; i < 64; i++) c[i] = -2048;
    run_block(c);
    for (int j = 0; j < NCFG; j++) begin
      automatic int n = MACS[j];
      checks++;
      if (real'(sqerr[j]) / npix > 0.02) begin
        failures++; $display("NMAC %0d: overall mse %f", n, real'(sqerr[j]) / npix);
      end
      $display("NMAC %0d: %0d cycles per 8-point transform, mse %f over %0d pixels",
               n, 32 / n, real'(sqerr[j]) / npix, npix);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat ((NBLK + 2) * 700) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
