// tb_bpsk_demodulator: a BPSK signal with random chips (16 samples of
// +/-round(31*cos(2*pi*4*s/64)) each) plus uniform noise of +/-NOISE,
// clipped to 6 bits, is demodulated. For every chip the soft output must
// equal sign(S) * min(7, |S| >> 10) with S = sum of sample * cosine over
// the chip, worked out in the testbench. In the first half the sample
// strobe is on every clock and the soft value must come exactly 4 clocks
// after the first sample of the next chip; in the second half the strobe
// has random gaps.
`timescale 1ns/1ps
module tb_bpsk_demodulator;
  import cdma_pkg::*;
  localparam int SPC = 16, NOISE = 12, NCHIPS = 400;
  logic clk = 0, rst = 1, sample_en = 0, rx_chip_start = 0;
  sample_t rx_signal;
  soft_t soft_out;
  logic soft_valid;
  int checks = 0, failures = 0, n_out = 0, n_sat = 0;
  int exp_q[$];
  int start_cyc[$];
  int cyc = 0;
  bit gaps = 0;

  bpsk_demodulator dut (.*);
  always #5 clk = ~clk;

  function automatic int cref(input int ph);
    return $rtoi($floor(31.0 * $cos(2.0 * 3.14159265358979 * ph / 64.0) + 0.5));
  endfunction

  always @(negedge clk) if (!rst) begin
    cyc++;
    if (soft_valid) begin
      int e, t;
      n_out++;
      e = exp_q.pop_front();
      t = start_cyc.pop_front();
      checks++;
      if (int'(soft_out) != e) begin failures++; $display("FAIL chip %0d: %0d exp %0d", n_out, soft_out, e); end
      if (!gaps) begin
        checks++;
        if (cyc - t != 4) begin failures++; $display("FAIL latency %0d", cyc - t); end
      end
    end
  end

  initial begin
    rx_signal = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < NCHIPS; c++) begin
      logic chip;
      int s_sum, m;
      chip = 1'($urandom);
      gaps = (c >= NCHIPS / 2);
      s_sum = 0;
      for (int s = 0; s < SPC; s++) begin
        int v;
        while (gaps && $urandom_range(0, 2) == 0) begin
          sample_en = 0; rx_chip_start = 0;
          @(negedge clk);
        end
        v = (chip ? cref(4 * s) : -cref(4 * s)) + int'($urandom_range(0, 2 * NOISE)) - NOISE;
        if (v > 31) v = 31;
        if (v < -32) v = -32;
        rx_signal = sample_t'(v);
        sample_en = 1;
        rx_chip_start = (s == 0);
        if (s == 0 && c > 0) start_cyc.push_back(cyc + 1);
        s_sum += v * cref(4 * s);
        @(negedge clk);
      end
      m = (s_sum < 0 ? -s_sum : s_sum) >> 10;
      if (m > 7) begin m = 7; n_sat++; end
      exp_q.push_back(s_sum < 0 ? -m : m);
    end
    // the first samples of one more chip flush the last chip through
    sample_en = 1; rx_chip_start = 1; rx_signal = '0;
    if (!gaps) start_cyc.push_back(cyc + 1);
    @(negedge clk);
    rx_chip_start = 0;
    repeat (3) @(negedge clk);
    sample_en = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != NCHIPS) begin failures++; $display("FAIL %0d outputs", n_out); end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
