// tb_cdma_receiver: the testbench plays the transmitter. It spreads random
// bits with the Gold code of KEY1 (two-LFSR recurrence model), BPSK
// modulates them (16 samples of +/-round(31*cos(2*pi*4*s/64)) per chip),
// adds uniform noise of +/-NOISE and clips to 6 bits. Two receivers listen:
// one with KEY1 must report every bit, in order, with a correlation peak
// above the threshold; one with KEY2 (another member of the Gold family)
// must report nothing, which is how users sharing the band are told apart.
// Also reloads the key in the middle of a bit (the sender restarts its
// code, so that bit is lost) and checks that the link then resumes.
`timescale 1ns/1ps
module tb_cdma_receiver;
  import cdma_pkg::*;
  localparam int SPC = 16, NOISE = 16, NBITS = 24;
  localparam key_t KEY1 = 14'b10011110111001;
  localparam key_t KEY2 = 14'b11010111011001;
  logic clk = 0, rst = 1, rst_pn = 0, sample_en = 0, rx_chip_start = 0;
  sample_t rx_signal;
  soft_t soft1, soft2;
  logic sv1, sv2, cv1, cv2, flag1, flag2, bit1, bit2, bs1, bs2;
  corr_t corr1, corr2;
  int checks = 0, failures = 0, n_det = 0, n_other = 0, n_rej = 0, max_side = 0;
  logic exp_q[$];

  cdma_receiver u_rx1 (.clk(clk), .rst(rst), .rst_pn(rst_pn), .user_key(KEY1),
    .sample_en(sample_en), .rx_signal(rx_signal), .rx_chip_start(rx_chip_start),
    .soft_chip(soft1), .soft_valid(sv1), .correlator_out(corr1), .corr_valid(cv1),
    .flag_detect(flag1), .rx_out_bit(bit1), .bit_strobe(bs1));
  cdma_receiver u_rx2 (.clk(clk), .rst(rst), .rst_pn(rst_pn), .user_key(KEY2),
    .sample_en(sample_en), .rx_signal(rx_signal), .rx_chip_start(rx_chip_start),
    .soft_chip(soft2), .soft_valid(sv2), .correlator_out(corr2), .corr_valid(cv2),
    .flag_detect(flag2), .rx_out_bit(bit2), .bit_strobe(bs2));

  always #5 clk = ~clk;

  function automatic pn_vec_t model(input key_t k);
    logic a [PN_LEN+7];
    logic b [PN_LEN+7];
    for (int i = 0; i < 7; i++) begin a[i] = k[7+i]; b[i] = k[i]; end
    for (int n = 0; n < PN_LEN; n++) begin
      a[n+7] = a[n+4] ^ a[n];
      b[n+7] = b[n+6] ^ b[n+5] ^ b[n+4] ^ b[n];
    end
    for (int n = 0; n < PN_LEN; n++) model[n] = a[n] ^ b[n];
  endfunction

  function automatic int cref(input int ph);
    return $rtoi($floor(31.0 * $cos(2.0 * 3.14159265358979 * ph / 64.0) + 0.5));
  endfunction

  always @(negedge clk) if (!rst) begin
    if (bs1) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected detection"); end
      else begin
        logic e;
        e = exp_q.pop_front();
        n_det++;
        if (bit1 != e) begin failures++; $display("FAIL bit %0d: %b exp %b (corr %0d)", n_det, bit1, e, corr1); end
      end
    end
    if (cv1 && !(corr1 > 400 || corr1 < -400)) begin
      n_rej++;
      if (int'(corr1) > max_side) max_side = int'(corr1);
      if (-int'(corr1) > max_side) max_side = -int'(corr1);
    end
    if (bs2) n_other++;
  end

  task automatic send_bit(input logic d, input pn_vec_t code);
    for (int c = 0; c < PN_LEN; c++) begin
      logic ch;
      ch = code[c] ^ ~d;
      for (int s = 0; s < SPC; s++) begin
        int v;
        v = (ch ? cref(4 * s) : -cref(4 * s)) + int'($urandom_range(0, 2 * NOISE)) - NOISE;
        if (v > 31) v = 31;
        if (v < -32) v = -32;
        rx_signal = sample_t'(v);
        sample_en = 1;
        rx_chip_start = (s == 0);
        @(negedge clk);
      end
    end
  endtask

  initial begin
    pn_vec_t code;
    code = model(KEY1);
    rx_signal = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int b = 0; b < NBITS; b++) begin
      logic d;
      d = 1'($urandom);
      exp_q.push_back(d);
      send_bit(d, code);
      if (b == NBITS / 2) begin
        // reload the key in the middle of the next bit: that bit is lost
        logic d2;
        d2 = 1'($urandom);
        for (int s = 0; s < 40 * SPC; s++) begin
          rx_signal = sample_t'((code[s / SPC] ^ ~d2) ? cref(4 * (s % SPC)) : -cref(4 * (s % SPC)));
          rx_chip_start = (s % SPC == 0);
          @(negedge clk);
        end
        rst_pn = 1;
        @(negedge clk);
        rst_pn = 0;
        // the sender restarts its code after a reload: the partly sent bit
        // is lost, the following bits must all be found
        checks++;
        if (n_det != b + 1) begin failures++; $display("FAIL detection during reload"); end
      end
    end
    send_bit(1'b0, code);           // carries the last bit out of the pipeline
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d bits missed", exp_q.size()); end
    checks++;
    if (n_other != 0) begin failures++; $display("FAIL other-key receiver detected %0d bits", n_other); end
    checks++;
    if (n_rej == 0) failures++;
    $display("detected=%0d other_key=%0d rejected=%0d max_offpeak=%0d", n_det, n_other, n_rej, max_side);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NBITS + 3) * PN_LEN * SPC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
