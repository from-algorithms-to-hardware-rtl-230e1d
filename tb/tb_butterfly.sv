// tb_butterfly: random even/odd sums in both passes; y0 = e+o and y1 = e-o
// are compared with the floating-point value divided by 2^10 (row pass) or
// 2^19 (column pass), rounded half up and saturated to 20 bits / 9 bits.
// Also checks the one-cycle valid delay.
module tb_butterfly;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, pass, valid;
  logic signed [39:0] e, o;
  logic signed [19:0] y0, y1;
  butterfly dut (.*);
  int checks = 0, failures = 0;

  function automatic longint expect_v(longint s, logic p);
    real r = p ? s / 524288.0 : s / 1024.0;
    longint v = longint'($floor(r + 0.5));
    if (!p) begin
      if (v > 524287) v = 524287;
      if (v < -524287) v = -524287;
    end else begin
      if (v > 255) v = 255;
      if (v < -256) v = -256;
    end
    return v;
  endfunction

  initial begin
    en = 0; pass = 0; e = 0; o = 0;
    @(negedge clk);
    for (int n = 0; n < 1000; n++) begin
      automatic longint ee, oo;
      automatic int sh;
      pass = 1'($urandom_range(0, 1));
      sh = pass ? $urandom_range(20, 29) : $urandom_range(14, 30);
      ee = longint'($signed($urandom)) >>> (31 - sh);
      oo = longint'($signed($urandom)) >>> (31 - sh);
      e = 40'(ee); o = 40'(oo); en = 1;
      @(negedge clk);
      en = 0;
      checks++;
      if (!valid || longint'(y0) != expect_v(ee + oo, pass) || longint'(y1) != expect_v(ee - oo, pass)) begin
        failures++;
        $display("pass %0d e %0d o %0d got %0d %0d exp %0d %0d", pass, ee, oo, y0, y1,
                 expect_v(ee + oo, pass), expect_v(ee - oo, pass));
      end
      @(negedge clk);
      checks++;
      if (valid) begin failures++; $display("valid stuck"); end
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
