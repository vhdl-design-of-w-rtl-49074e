// tb_bpsk_modulator: random chips, 16 samples each, one sample per clock.
// Every output sample must be +cos for chip 1 and -cos for chip 0, with
// cos = round(31*cos(2*pi*4*s/64)) for sample s of the chip, two samples
// after the chip and phase were presented; out_chip_start must mark
// sample 0 of every chip.
`timescale 1ns/1ps
module tb_bpsk_modulator;
  import cdma_pkg::*;
  localparam int SPC = 16;
  logic clk = 0, rst = 1, sample_en = 1, chip_start = 0, chip = 0;
  sample_t out_ss_signal;
  logic out_chip_start;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;

  bpsk_modulator dut (.*);
  always #5 clk = ~clk;

  function automatic int cref(input int ph);
    return $rtoi($floor(31.0 * $cos(2.0 * 3.14159265358979 * ph / 64.0) + 0.5));
  endfunction

  initial begin
    int exp_q[$];
    logic st_q[$];
    logic cur;
    cur = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 200 * SPC; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        int e; logic es;
        e = exp_q.pop_front(); es = st_q.pop_front();
        checks += 2;
        if (int'(out_ss_signal) != e) begin failures++; $display("FAIL sample %0d: %0d exp %0d", i, out_ss_signal, e); end
        if (out_chip_start != es) begin failures++; $display("FAIL start %0d", i); end
      end
      if (i % SPC == 0) cur = 1'($urandom);
      chip = cur;
      chip_start = (i % SPC == 0);
      exp_q.push_back(cur ? cref(4 * (i % SPC)) : -cref(4 * (i % SPC)));
      st_q.push_back(i % SPC == 0);
      if (cur) n_pos++; else n_neg++;
    end
    checks++; if (n_pos == 0 || n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
