// tb_cos_lut: every one of the 64 addresses against
// round(31 * cos(2*pi*addr/64)) computed with real arithmetic.
`timescale 1ns/1ps
module tb_cos_lut;
  import cdma_pkg::*;
  logic [5:0] addr;
  sample_t amp;
  int checks = 0, failures = 0;
  cos_lut dut (.*);
  initial begin
    for (int a = 0; a < 64; a++) begin
      int e;
      addr = 6'(a);
      #1;
      e = $rtoi($floor(31.0 * $cos(2.0 * 3.14159265358979 * a / 64.0) + 0.5));
      checks++;
      if (int'(amp) != e) begin failures++; $display("FAIL addr %0d: %0d exp %0d", a, amp, e); end
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
