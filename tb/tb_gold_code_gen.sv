// tb_gold_code_gen: compares the generator with a recurrence model of the
// two LFSRs: with the key half k[6:0], the LFSR output sequence starts
// s[i] = k[i] (i = 0..6) and continues s[n+7] = s[n+4] ^ s[n] for g1 and
// s[n+7] = s[n+6] ^ s[n+5] ^ s[n+4] ^ s[n] for g2; the Gold chip is their
// XOR. Checks chips, sos, seq_start, period 127, holding without adv, a
// mid-sequence key reload, and the three-valued (-17, -1, +15) periodic
// cross-correlation of two keys' codes.
`timescale 1ns/1ps
module tb_gold_code_gen;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, load = 0, adv = 0;
  key_t key;
  logic pn_chip, sos, seq_start;
  logic [6:0] chip_idx;
  int checks = 0, failures = 0;

  gold_code_gen dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", w); end
  endtask

  function automatic logic [PN_LEN-1:0] model(input key_t k);
    logic a [PN_LEN+7];
    logic b [PN_LEN+7];
    for (int i = 0; i < 7; i++) begin a[i] = k[7+i]; b[i] = k[i]; end
    for (int n = 0; n < PN_LEN; n++) begin
      a[n+7] = a[n+4] ^ a[n];
      b[n+7] = b[n+6] ^ b[n+5] ^ b[n+4] ^ b[n];
    end
    for (int n = 0; n < PN_LEN; n++) model[n] = a[n] ^ b[n];
  endfunction

  task automatic run_key(input key_t k, input int nchips);
    logic [PN_LEN-1:0] ref_seq;
    ref_seq = model(k);
    key <= k; load <= 1;
    @(posedge clk); load <= 0;
    for (int n = 0; n < nchips; n++) begin
      @(negedge clk);
      chk(seq_start == ((n % PN_LEN) == 0), "seq_start");
      adv <= 1;
      @(posedge clk); adv <= 0;
      @(negedge clk);
      chk(pn_chip == ref_seq[n % PN_LEN], $sformatf("chip %0d", n));
      chk(sos == ((n % PN_LEN) == 0), $sformatf("sos %0d", n));
      // random stall: outputs must hold
      if ($urandom_range(0, 3) == 0) begin
        logic c; c = pn_chip;
        repeat (2) @(posedge clk);
        @(negedge clk);
        chk(pn_chip == c, "hold without adv");
      end
    end
  endtask

  initial begin
    logic [PN_LEN-1:0] s1, s2;
    int maxc, vals_ok;
    key = 14'b10011110111001;
    repeat (2) @(posedge clk);
    rst <= 0;
    run_key(14'b10011110111001, 300);   // two and a half periods
    run_key(14'b11010111011001, 60);    // reload mid-way
    run_key(14'b11010111011001, 130);   // reload restarts at chip 0
    // three-valued cross-correlation of the two codes (model property)
    s1 = model(14'b10011110111001);
    s2 = model(14'b11010111011001);
    vals_ok = 1;
    for (int sh = 0; sh < PN_LEN; sh++) begin
      int c; c = 0;
      for (int i = 0; i < PN_LEN; i++) c += (s1[i] ^ s2[(i + sh) % PN_LEN]) ? -1 : 1;
      if (!(c == -1 || c == -17 || c == 15)) vals_ok = 0;
    end
    chk(vals_ok == 1, "Gold cross-correlation not three-valued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
