// tb_scaling_device: random and boundary chip sums; the output must be
// sign(x) * min(7, |x| >> 10), one clock later, only on valid.
`timescale 1ns/1ps
module tb_scaling_device;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, valid_in = 0;
  logic signed [19:0] din;
  soft_t soft_out;
  logic valid_out;
  int checks = 0, failures = 0, n_sat = 0;
  scaling_device dut (.*);
  always #5 clk = ~clk;
  initial begin
    int e, ev, x, m;
    e = 0; ev = 0; din = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks += 2;
      if (valid_out != ev[0]) begin failures++; $display("FAIL valid %0d", i); end
      if (int'(soft_out) != e) begin failures++; $display("FAIL %0d: %0d exp %0d", i, soft_out, e); end
      valid_in = ($urandom_range(0, 2) != 0);
      case (i % 8)
        0: x = 7798;
        1: x = -7798;
        2: x = int'($urandom_range(0, 20000)) - 10000;
        3: x = int'($urandom_range(0, 40000)) - 20000;
        4: x = (i % 16 < 8) ? 1023 : -1024;
        default: x = int'($urandom_range(0, 16000)) - 8000;
      endcase
      din = 20'(x);
      ev = valid_in;
      if (valid_in) begin
        m = (x < 0 ? -x : x) >> 10;
        if (m > 7) begin m = 7; n_sat++; end
        e = (x < 0) ? -m : m;
      end
    end
    checks++; if (n_sat == 0) failures++;
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
