// tb_threshold_detector: random correlator values around the threshold
// (400) and the clean peaks; flag_detect must be |x| > 400, rx_out_bit the
// sign of the last value above threshold (held otherwise), bit_strobe a
// one-clock pulse per detection, all one clock after corr_valid.
`timescale 1ns/1ps
module tb_threshold_detector;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, corr_valid = 0;
  corr_t corr_in;
  logic flag_detect, rx_out_bit, bit_strobe;
  int checks = 0, failures = 0, n_det = 0, n_rej = 0;
  threshold_detector dut (.*);
  always #5 clk = ~clk;
  initial begin
    int x;
    logic ef, eb, es;
    ef = 0; eb = 0; es = 0; corr_in = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks += 3;
      if (flag_detect != ef) begin failures++; $display("FAIL flag %0d", i); end
      if (rx_out_bit != eb)  begin failures++; $display("FAIL bit %0d", i); end
      if (bit_strobe != es)  begin failures++; $display("FAIL strobe %0d", i); end
      corr_valid = ($urandom_range(0, 2) == 0);
      case (i % 6)
        0: x = 889;
        1: x = -889;
        2: x = (i % 12 < 6) ? 400 : -400;
        3: x = (i % 12 < 6) ? 401 : -401;
        default: x = int'($urandom_range(0, 1800)) - 900;
      endcase
      corr_in = corr_t'(x);
      es = 0;
      if (corr_valid) begin
        ef = (x > 400 || x < -400);
        if (ef) begin eb = (x > 0); es = 1; n_det++; end else n_rej++;
      end
    end
    checks++; if (n_det == 0 || n_rej == 0) failures++;
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
