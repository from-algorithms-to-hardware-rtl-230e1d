// tb_rg_idct2d: runs 8x8 blocks through the regular MAC-based 2D-IDCT and
// compares every pixel with the rounded floating-point 2D-IDCT (IEEE 1180
// style blocks in three ranges plus extreme blocks). Checks each pixel within
// 1, overall mean squared error at most 0.02, every pixel delivered once,
// and the block time 2*(8*32/NMAC + NMAC/2 + 2) + 1 cycles from start to done.
module tb_rg_idct2d;
  import idct_ref_pkg::*;
  localparam int NBLK = 30;
  localparam int NMAC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load_we, start, busy, done, out_valid;
  logic [5:0] load_addr;
  logic [5:0] out_addr [2];
  logic signed [11:0] load_data;
  logic signed [8:0] out_data [2];
  rg_idct2d #(.NMAC(NMAC)) dut (.*);

  int checks = 0, failures = 0;
  blk_t expv;
  int got [64];
  int seen [64];
  longint sqerr = 0;
  int npix = 0;

  always @(posedge clk) if (out_valid)
    for (int p = 0; p < 2; p++) begin
      got[out_addr[p]] = out_data[p];
      seen[out_addr[p]]++;
    end

  task automatic run_block(blk_t c);
    int cyc;
    expv = ref_idct(c);
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 6'(i); load_data = 12'(c[i]);
      seen[i] = 0;
    end
    @(negedge clk);
    load_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * (8 * 32 / NMAC + NMAC / 2 + 2) + 1) begin
      failures++; $display("block took %0d cycles", cyc);
    end
    for (int i = 0; i < 64; i++) begin
      int e = got[i] - expv[i];
      checks++;
      if (seen[i] != 1 || e > 1 || e < -1) begin
        failures++;
        $display("pixel %0d got %0d exp %0d seen %0d", i, got[i], expv[i], seen[i]);
      end
      sqerr += e * e;
      npix++;
    end
  endtask

  initial begin
    blk_t c;
    load_we = 0; start = 0; load_addr = '0; load_data = '0;
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
    for (int i = 0; i < 64; i++) c[i] = 0;
    c[9] = -2048;
    run_block(c);
    checks++;
    if (real'(sqerr) / npix > 0.02) begin
      failures++; $display("overall mse %f", real'(sqerr) / npix);
    end
    $display("overall mse %f over %0d pixels", real'(sqerr) / npix, npix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat ((NBLK + 3) * 400) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
