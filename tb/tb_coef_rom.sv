// tb_coef_rom: compares all 32 entries of the even/odd coefficient table
// with round(w(m) * cos((2i+1)*m*pi/16) * 2^13), m = 2k (even) or 2k+1 (odd),
// computed in floating point.
module tb_coef_rom;
  logic odd;
  logic [1:0] k, i;
  logic signed [15:0] coef;
  coef_rom dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int p = 0; p < 2; p++)
      for (int kk = 0; kk < 4; kk++)
        for (int ii = 0; ii < 4; ii++) begin
          automatic int m = 2 * kk + p;
          automatic real w = (m == 0) ? 1.0 : $sqrt(2.0);
          automatic real v = w * $cos((2 * ii + 1) * m * 3.14159265358979 / 16.0) * 8192.0;
          automatic int e = (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
          odd = 1'(p); k = 2'(kk); i = 2'(ii);
          #1;
          checks++;
          if (coef != 16'(e)) begin
            failures++; $display("C%0d[%0d][%0d] got %0d exp %0d", p + 1, kk, ii, coef, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
