// tb_lf_idct2d: runs 8x8 blocks through the Loeffler-12 2D-IDCT and compares
// every pixel with the rounded floating-point 2D-IDCT. Blocks are made as in
// the IEEE 1180 test (three input ranges) plus a few extreme blocks. Checks:
// each pixel within 1 of the reference (IEEE 1180 peak error), the overall
// mean squared error at most 0.02 and every pixel delivered exactly once per
// block, and the block time from start to done: 234 to 246 cycles (8+8
// iterations at 12 cycles, two 24-cycle drains, step-counter alignment).
module tb_lf_idct2d;
  import idct_ref_pkg::*;
  localparam int NBLK = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load_we, start, busy, done, out_valid;
  logic [5:0] load_addr, out_addr;
  logic signed [11:0] load_data;
  logic signed [8:0] out_data;
  lf_idct2d dut (.*);

  int checks = 0, failures = 0;
  blk_t coef, expv;
  int got [64];
  int seen [64];
  longint sqerr = 0;
  int npix = 0;

  always @(posedge clk) if (out_valid) begin
    got[out_addr] = out_data;
    seen[out_addr]++;
  end

  task automatic run_block(blk_t c);
    int t0, cyc;
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
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < 234 || cyc > 246) begin
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
    // extreme blocks: all +2047, all -2048, single large AC coefficient
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
