// tb_cdma_system_div: end-to-end test of the CDMA link with a divided
// sample clock: one carrier sample every 2 clocks, 8 samples per chip, one
// carrier cycle per chip (phase step 8) and the scaling shift reduced to 9
// so that a clean chip still scales to +/-7. Same checks as the default
// test. The code period is again 127 * 8 * 2 = 2032 clocks; the latency is
// 5 clocks longer than at the defaults (2046) because the five pipeline
// stages gated by the sample strobe (two in the modulator, three in the
// demodulator) now take two clocks each.
// Random information bits are fed to the transmitter; every bit the
// receiver reports must equal the bit the transmitter sampled, in order,
// with correlator peak +/-889 (127 chips x 7).
// Halfway through, the key is reprogrammed (rst_pn with a second key);
// the bit being sent is lost and the link must resume with the new code.
// Mechanisms counted: bits detected as 1 and as 0, correlator outputs
// rejected by the threshold, start-of-sequence marks, key reloads.
`timescale 1ns/1ps
module tb_cdma_system_div;
  import cdma_pkg::*;
  localparam int SPC      = 8;
  localparam int DIV      = 2;
  localparam int LATENCY  = PN_LEN * SPC * DIV + 9 + 5;
  localparam int NBITS    = 12;            // per key
  localparam key_t KEY1   = 14'b10011110111001;
  localparam key_t KEY2   = 14'b11010111011001;

  logic clk = 0, rst = 1, rst_pn = 0, user_data = 0;
  key_t user_key = KEY1;
  sample_t out_ss_signal;
  logic sample_en, chip_en, pn_seq, sos, chip_signal, data_bit, data_clk;
  soft_t soft_chip;
  logic soft_valid, corr_valid, flag_detect, rx_out_bit, bit_strobe;
  corr_t correlator_out;

  cdma_system #(.SAMPLE_DIV(DIV), .SAMPLES_PER_CHIP(SPC), .PHASE_INC(8), .SCALE_SHIFT(9)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_one = 0, n_zero = 0, n_reject = 0, n_sos = 0, n_reload = 0;
  longint cycle = 0;
  logic   exp_q[$];
  longint sos_t[$];
  logic   sos_d = 0;
  bit     done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // transmitter side: record the bit sampled at each start of sequence and
  // present a fresh random bit for the next one
  always @(posedge clk) begin
    sos_d <= sos;
    if (!rst && sos && !sos_d) begin
      n_sos++;
      check(data_bit == user_data, "data_bit differs from sampled user_data");
      exp_q.push_back(user_data);
      sos_t.push_back(cycle);
      user_data <= 1'($urandom);
    end
  end

  // receiver side
  always @(posedge clk) begin
    if (!rst && corr_valid) begin
      if (correlator_out <= corr_t'(400) && correlator_out >= -corr_t'(400)) n_reject++;
    end
    if (!rst && bit_strobe) begin
      if (exp_q.size() == 0) check(0, "bit detected with none outstanding");
      else begin
        logic e; longint t;
        e = exp_q.pop_front();
        t = sos_t.pop_front();
        check(rx_out_bit == e, $sformatf("rx bit %0b expected %0b", rx_out_bit, e));
        check(flag_detect, "flag_detect low with bit_strobe");
        check(correlator_out == (e ? corr_t'(889) : -corr_t'(889)),
              $sformatf("correlator peak %0d", correlator_out));
        check(cycle - t == longint'(LATENCY), $sformatf("latency %0d expected %0d", cycle - t, LATENCY));
        if (rx_out_bit) n_one++; else n_zero++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // key 1
    wait (n_one + n_zero >= NBITS);
    // reprogram in the middle of a bit period: that bit is not completed
    wait (sos && !sos_d);
    repeat (500) @(posedge clk);
    rst_pn   <= 1;
    user_key <= KEY2;
    void'(exp_q.pop_back());
    void'(sos_t.pop_back());
    n_reload++;
    @(posedge clk);
    rst_pn <= 0;
    wait (n_one + n_zero >= 2 * NBITS);
    repeat (3000) @(posedge clk);
    check(exp_q.size() <= 2, "bits left undetected");
    check(n_one > 0,    "no 1 bit detected");
    check(n_zero > 0,   "no 0 bit detected");
    check(n_reject > 0, "threshold never rejected a correlation");
    check(n_sos > 2 * NBITS, "too few start-of-sequence marks");
    check(n_reload == 1, "key reload did not happen");
    $display("mechanisms: ones=%0d zeros=%0d rejected=%0d sos=%0d reloads=%0d",
             n_one, n_zero, n_reject, n_sos, n_reload);
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NBITS * LATENCY + 20000) @(posedge clk);
    if (!done) begin
      failures++;
      $display("watchdog expired: ones=%0d zeros=%0d", n_one, n_zero);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
