// tb_accumulator: random 15-bit products with an irregular strobe and
// chip marks. At each chip mark the sum of the chip just ended must come
// out with one valid pulse (none for the partial chip before the first
// mark), and the new chip must start from the marked product.
`timescale 1ns/1ps
module tb_accumulator;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, en = 0, first = 0;
  logic signed [14:0] din;
  logic signed [19:0] sum;
  logic valid;
  int checks = 0, failures = 0, n_valid = 0;
  accumulator dut (.*);
  always #5 clk = ~clk;
  initial begin
    int acc, primed, exp_valid, exp_sum;
    acc = 0; primed = 0; exp_valid = 0; exp_sum = 0; din = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (valid != exp_valid[0]) begin failures++; $display("FAIL valid %0d", i); end
      if (valid) begin
        n_valid++;
        checks++;
        if (int'(sum) != exp_sum) begin failures++; $display("FAIL sum %0d: %0d exp %0d", i, sum, exp_sum); end
      end
      en = ($urandom_range(0, 3) != 0);
      first = ($urandom_range(0, 15) == 0) && (i > 5);
      din = 15'(int'($urandom_range(0, 1922)) - 961);
      exp_valid = 0;
      if (en) begin
        if (first) begin
          if (primed) begin exp_valid = 1; exp_sum = acc; end
          primed = 1; acc = int'(din);
        end else acc = acc + int'(din);
      end
    end
    checks++; if (n_valid < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
