// tb_multiplier: random signed 6-bit operands including the extremes;
// the registered 15-bit product must equal a*b and hold while en is low.
`timescale 1ns/1ps
module tb_multiplier;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  sample_t a, b;
  logic signed [14:0] p;
  int checks = 0, failures = 0;
  multiplier dut (.*);
  always #5 clk = ~clk;
  initial begin
    int e;
    e = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(p) != e) begin failures++; $display("FAIL %0d: %0d exp %0d", i, p, e); end
      en = ($urandom_range(0, 4) != 0);
      if (i < 4) begin a = (i[0]) ? -6'sd32 : 6'sd31; b = (i[1]) ? -6'sd32 : 6'sd31; end
      else begin a = sample_t'($urandom); b = sample_t'($urandom); end
      if (en) e = int'(a) * int'(b);
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
