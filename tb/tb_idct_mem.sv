// tb_idct_mem: random traffic on the two-write, two-read memory; both read
// ports are compared with a software array every cycle, including reads of
// addresses written in the previous cycle.
module tb_idct_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [1:0]  we;
  logic [5:0]  waddr [2], raddr [2];
  logic [19:0] wdata [2], rdata [2];
  idct_mem dut (.*);
  int checks = 0, failures = 0;
  logic [19:0] model [64];
  bit valid [64];
  initial begin
    we = '1;
    for (int i = 0; i < 64; i += 2) begin
      @(negedge clk);
      waddr[0] = 6'(i); waddr[1] = 6'(i + 1);
      wdata[0] = 20'($urandom); wdata[1] = 20'($urandom);
      model[i] = wdata[0]; model[i + 1] = wdata[1];
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rdata[p] != model[raddr[p]]) begin
          failures++; $display("port %0d addr %0d got %h exp %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      we = 2'($urandom);
      for (int p = 0; p < 2; p++) begin
        waddr[p] = 6'($urandom);
        wdata[p] = 20'($urandom);
        raddr[p] = (n % 2) ? waddr[p] : 6'($urandom);
      end
      if (waddr[0] == waddr[1]) waddr[1] = waddr[0] + 6'd1;
      for (int p = 0; p < 2; p++) if (we[p]) model[waddr[p]] = wdata[p];
      @(posedge clk);
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rdata[p] != model[raddr[p]]) begin
          failures++; $display("after write port %0d got %h exp %h", p, rdata[p], model[raddr[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
