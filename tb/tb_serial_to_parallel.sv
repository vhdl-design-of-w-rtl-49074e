// tb_serial_to_parallel: random soft words pushed at random times; the
// 128-word window must always equal the last 128 words pushed, newest in
// window[0], zeros where fewer than 128 have been pushed since reset.
`timescale 1ns/1ps
module tb_serial_to_parallel;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, valid_in = 0;
  soft_t din;
  soft_t window [WIN_LEN];
  logic win_valid;
  int checks = 0, failures = 0;
  serial_to_parallel dut (.*);
  always #5 clk = ~clk;
  initial begin
    int hist[$];
    logic ev;
    ev = 0; din = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (win_valid != ev) begin failures++; $display("FAIL valid %0d", i); end
      if (i % 7 == 0) begin
        for (int k = 0; k < WIN_LEN; k++) begin
          int e;
          e = (k < hist.size()) ? hist[hist.size() - 1 - k] : 0;
          checks++;
          if (int'(window[k]) != e) begin failures++; $display("FAIL %0d word %0d: %0d exp %0d", i, k, window[k], e); end
        end
      end
      valid_in = ($urandom_range(0, 2) == 0);
      din = soft_t'(int'($urandom_range(0, 14)) - 7);
      ev = valid_in;
      if (valid_in) hist.push_back(int'(din));
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
