// tb_cdma_transmitter: runs the transmitter at its defaults for several
// bit periods with random data and one key reload. Checks, against models
// kept in the testbench: every chip equals the key's Gold sequence (two
// LFSR recurrences XORed), sos marks chip 0, a new bit is sampled exactly
// every 127 chips and held, chip_signal is the chip for a 1 and its
// complement for a 0, and every output sample equals +/-round(31*cos(2*pi
// *4*s/64)) for sample s of the chip presented two clocks earlier, with
// out_chip_start on sample 0.
`timescale 1ns/1ps
module tb_cdma_transmitter;
  import cdma_pkg::*;
  localparam int SPC = 16;
  localparam key_t KEY1 = 14'b10011110111001;
  localparam key_t KEY2 = 14'b11010111011001;
  logic clk = 0, rst = 1, rst_pn = 0, user_data = 0;
  key_t user_key = KEY1;
  sample_t out_ss_signal;
  logic out_chip_start, sample_en, chip_en, pn_seq, sos, chip_signal, data_bit, data_clk;
  int checks = 0, failures = 0, n_bits = 0, n_chips = 0, n_reload = 0;

  cdma_transmitter dut (.*);
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

  task automatic chk(input bit ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", w); end
  endtask

  pn_vec_t code;
  int ci = 0;
  logic adv_seen = 0, load_seen = 0, ud_seen = 0, exp_data = 0;
  logic chip_hist[$];
  int cyc = 0;

  always @(posedge clk) begin
    adv_seen  <= chip_en;
    load_seen <= rst_pn;
    ud_seen   <= user_data;
  end

  always @(negedge clk) if (!rst) begin
    if (load_seen) ci = 0;
    else if (adv_seen) begin
      chk(pn_seq == code[ci % PN_LEN], $sformatf("chip %0d", ci));
      chk(sos == ((ci % PN_LEN) == 0), "sos");
      if (ci % PN_LEN == 0) begin exp_data = ud_seen; n_bits++; end
      ci++; n_chips++;
    end
    chk(data_bit == exp_data, "data_bit");
    chk(chip_signal == (data_bit ? pn_seq : !pn_seq), "chip_signal");
    chk(chip_en == ((cyc % SPC) == SPC - 1), "chip_en timing");
    // output sample two clocks after the chip it belongs to
    chip_hist.push_back(chip_signal);
    if (cyc >= 2) begin
      int s, e;
      logic ch;
      ch = chip_hist.pop_front();
      s = (cyc - 2) % SPC;
      e = ch ? cref(4 * s) : -cref(4 * s);
      chk(int'(out_ss_signal) == e, $sformatf("sample cyc %0d: %0d exp %0d", cyc, out_ss_signal, e));
      chk(out_chip_start == (s == 0), "out_chip_start");
    end
    cyc++;
  end

  initial begin
    code = model(KEY1);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int b = 0; b < 8; b++) begin
      user_data = 1'($urandom);
      repeat (PN_LEN * SPC / 2) @(negedge clk);
      user_data = !user_data;     // changes in mid period must not matter
      repeat (PN_LEN * SPC / 2) @(negedge clk);
      if (b == 4) begin
        user_key = KEY2; rst_pn = 1; code = model(KEY2); n_reload++;
        @(negedge clk);
        rst_pn = 0;
      end
    end
    chk(n_bits >= 7, "bit periods");
    chk(n_reload == 1, "reload");
    $display("chips=%0d bits=%0d", n_chips, n_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
