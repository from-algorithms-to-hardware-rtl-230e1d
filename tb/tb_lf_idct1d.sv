// tb_lf_idct1d: self-checking test of the Loeffler-12 1D-IDCT core.
// Runs back-to-back iterations (one every 12 cycles) with random row-pass and
// column-pass vectors and compares every output with a floating-point
// 1D-IDCT (sqrt(8) times the orthonormal transform): within 1.0 in pass 0 (13-bit constants on inputs up to 2048)
// (3 fraction bits kept) and within 1 after the pass-1 division by 8 and
// saturation to 9 bits. Also checks the 12-cycle initiation interval, the
// 24-cycle latency from first input to last output, and that the
// coefficients are requested in the order 1,7,3,5,2,6,0,4.
module tb_lf_idct1d;
  import idct_pkg::*;
  localparam int TW = IDCT_TW;
  localparam int NIT = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_valid, start_pass, start_ready, in_req, out_valid, out_pass;
  logic [2:0] start_tag, in_idx, out_idx, out_tag;
  logic signed [TW-1:0] in_data, out_data;

  lf_idct1d dut (.*);

  int checks = 0, failures = 0;
  int X [8][8];        // per tag: input words
  logic        pass_of [8];
  int cur_tag = 0, issued = 0, cycle = 0;
  int first_in [8], last_out [8], nout [8];
  int prev_first = -1;
  int exp_order [8] = '{1, 7, 3, 5, 2, 6, 0, 4};
  int in_cnt [8];
  int outs_done = 0;

  function automatic real ref1d(int t, int k);
    real s = 0.0;
    for (int m = 0; m < 8; m++) begin
      automatic real w = (m == 0) ? 1.0 : $sqrt(2.0);
      automatic real xv = pass_of[t] ? X[t][m] / 8.0 : X[t][m];
      s += xv * w * $cos((2 * k + 1) * m * 3.14159265358979 / 16.0);
    end
    return s;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // Driver: claim an iteration whenever possible; fill the data for its tag.
  always_comb begin
    start_valid = rst_n && (issued < NIT);
    start_pass  = (issued % 3) == 2;
    start_tag   = 3'(issued);
  end
  assign in_data = TW'(X[cur_tag][in_idx]);

  always @(posedge clk) begin
    if (start_valid && start_ready) begin
      automatic int t = issued % 8;
      pass_of[t] <= start_pass;
      for (int m = 0; m < 8; m++)
        X[t][m] <= start_pass ? $signed($urandom_range(0, 65535)) - 32768
                              : $signed($urandom_range(0, 4095)) - 2048;
      first_in[t] <= -1;
      nout[t]     <= 0;
      in_cnt[t]   <= 0;
      issued <= issued + 1;
    end
    if (rst_n && in_req) begin
      if (in_cnt[cur_tag] == 0) begin
        first_in[cur_tag] <= cycle;
        if (prev_first >= 0) begin
          checks++;
          if (cycle - prev_first != 12) begin
            failures++; $display("II violated: %0d", cycle - prev_first);
          end
        end
        prev_first <= cycle;
      end
      checks++;
      if (in_idx != 3'(exp_order[in_cnt[cur_tag]])) begin
        failures++; $display("input order wrong");
      end
      in_cnt[cur_tag] <= in_cnt[cur_tag] + 1;
    end
    if (rst_n && out_valid) begin
      automatic real r = ref1d(out_tag, out_idx);
      automatic real got;
      checks++;
      if (!out_pass) begin
        got = out_data / 8.0;
        if (got - r > 1.0 || r - got > 1.0) begin
          failures++; $display("pass0 tag %0d x%0d got %f exp %f", out_tag, out_idx, got, r);
        end
      end else begin
        automatic real e = r / 8.0;
        if (e > 255.0) e = 255.0;
        if (e < -256.0) e = -256.0;
        got = out_data;
        if (got - e > 1.0 || e - got > 1.0) begin
          failures++; $display("pass1 tag %0d x%0d got %f exp %f", out_tag, out_idx, got, e);
        end
      end
      nout[out_tag] <= nout[out_tag] + 1;
      if (nout[out_tag] == 7) begin
        checks++;
        if (cycle - first_in[out_tag] != 23) begin
          failures++; $display("latency %0d", cycle - first_in[out_tag] + 1);
        end
        outs_done <= outs_done + 1;
      end
    end
  end

  // Track which tag is being read: the claimed iteration starts next cycle.
  always @(posedge clk) if (start_valid && start_ready) cur_tag <= issued % 8;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (outs_done == NIT);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NIT * 12 + 200) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
