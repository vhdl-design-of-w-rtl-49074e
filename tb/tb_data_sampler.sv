// tb_data_sampler: random bit_en / half_en / user_data; data_bit must take
// user_data only on bit_en and hold otherwise; data_clk must rise on bit_en
// and fall on half_en.
`timescale 1ns/1ps
module tb_data_sampler;
  logic clk = 0, rst = 1, bit_en = 0, half_en = 0, user_data = 0;
  logic data_bit, data_clk;
  logic exp_bit = 0, exp_clk = 0;
  int checks = 0, failures = 0, n_cap = 0;

  data_sampler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (data_bit !== exp_bit || data_clk !== exp_clk) begin
        failures++; $display("FAIL %0d: %b/%b exp %b/%b", i, data_bit, data_clk, exp_bit, exp_clk);
      end
      bit_en    = ($urandom_range(0, 9) == 0);
      half_en   = !bit_en && ($urandom_range(0, 9) == 0);
      user_data = 1'($urandom);
      if (bit_en) begin exp_bit = user_data; exp_clk = 1; n_cap++; end
      else if (half_en) exp_clk = 0;
    end
    checks++; if (n_cap < 50) failures++;
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
