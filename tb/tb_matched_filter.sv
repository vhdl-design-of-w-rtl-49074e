// tb_matched_filter: random windows of soft chips (-7..+7) and random
// codes; the output must be sum_k (pn[k] ? +1 : -1) * window[126-k], one
// clock after win_valid, and corr_valid must stay low while pn_ready is
// low. Also checks the clean peaks +889 / -889 for a window holding the
// code itself (x7) and its complement.
`timescale 1ns/1ps
module tb_matched_filter;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, win_valid = 0, pn_ready = 0;
  soft_t window [WIN_LEN];
  pn_vec_t pn_vec;
  corr_t corr_out;
  logic corr_valid;
  int checks = 0, failures = 0, n_peak = 0;
  matched_filter dut (.*);
  always #5 clk = ~clk;
  initial begin
    int e, ev_valid;
    for (int k = 0; k < WIN_LEN; k++) window[k] = '0;
    pn_vec = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      for (int w = 0; w < 5; w++) pn_vec[w*32 +: 32] = $urandom;
      pn_ready = (i % 10 != 3);
      case (i % 5)
        0: for (int k = 0; k < PN_LEN; k++) window[PN_LEN-1-k] = pn_vec[k] ? 4'sd7 : -4'sd7;
        1: for (int k = 0; k < PN_LEN; k++) window[PN_LEN-1-k] = pn_vec[k] ? -4'sd7 : 4'sd7;
        default: for (int k = 0; k < PN_LEN; k++) window[k] = soft_t'(int'($urandom_range(0, 14)) - 7);
      endcase
      window[WIN_LEN-1] = soft_t'(int'($urandom_range(0, 14)) - 7);
      win_valid = 1;
      e = 0;
      for (int k = 0; k < PN_LEN; k++) e += pn_vec[k] ? int'(window[PN_LEN-1-k]) : -int'(window[PN_LEN-1-k]);
      ev_valid = pn_ready;
      @(negedge clk);
      win_valid = 0;
      checks += 2;
      if (corr_valid != ev_valid[0]) begin failures++; $display("FAIL valid %0d", i); end
      if (int'(corr_out) != e) begin failures++; $display("FAIL %0d: %0d exp %0d", i, corr_out, e); end
      if (i % 5 < 2) begin
        checks++; n_peak++;
        if (int'(corr_out) != ((i % 5 == 0) ? 889 : -889)) begin failures++; $display("FAIL peak %0d", corr_out); end
      end
      @(negedge clk);
      checks++;
      if (corr_valid) begin failures++; $display("FAIL valid not a pulse"); end
    end
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
