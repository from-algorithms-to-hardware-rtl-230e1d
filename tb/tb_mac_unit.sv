// tb_mac_unit: random sequences of clear/accumulate/hold steps with
// full-range operands; the accumulator is compared every cycle with a
// 64-bit software sum.
module tb_mac_unit;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, clr;
  logic signed [19:0] a;
  logic signed [15:0] b;
  logic signed [39:0] acc;
  mac_unit dut (.*);
  int checks = 0, failures = 0;
  longint model = 0;
  initial begin
    en = 1; clr = 1; a = 0; b = 0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      en  = ($urandom_range(0, 7) != 0);
      clr = ($urandom_range(0, 3) == 0);
      a   = 20'($urandom);
      b   = 16'($urandom);
      if (en) model = (clr ? 0 : model) + longint'(a) * longint'(b);
      @(negedge clk);
      checks++;
      if (longint'(acc) != model) begin
        failures++; $display("acc %0d exp %0d", acc, model);
        model = acc;
      end
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
