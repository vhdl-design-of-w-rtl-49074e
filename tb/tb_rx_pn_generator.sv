// tb_rx_pn_generator: after reset and after each key load the parallel
// code must equal the Gold sequence of the key (recurrence model, bit k =
// chip k), pn_ready must rise exactly 129 clocks after load is released
// and stay high, and a second key must replace the first.
`timescale 1ns/1ps
module tb_rx_pn_generator;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, load = 0;
  key_t key;
  pn_vec_t pn_vec;
  logic pn_ready;
  int checks = 0, failures = 0;
  rx_pn_generator dut (.*);
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

  task automatic load_and_check(input key_t k, input bit use_rst);
    int t;
    key <= k;
    if (use_rst) rst <= 1; else load <= 1;
    @(posedge clk);
    rst <= 0; load <= 0;
    t = 0;
    while (t < 300) begin
      @(negedge clk);
      t++;
      if (pn_ready) break;
      @(posedge clk);
    end
    checks++;
    if (t != 129) begin failures++; $display("FAIL ready after %0d clocks", t); end
    checks++;
    if (pn_vec !== model(k)) begin failures++; $display("FAIL code for key %b", k); end
    repeat (50) @(posedge clk);
    @(negedge clk);
    checks += 2;
    if (!pn_ready) failures++;
    if (pn_vec !== model(k)) failures++;
  endtask

  initial begin
    key = '0;
    @(posedge clk);
    load_and_check(14'b10011110111001, 1);
    load_and_check(14'b11010111011001, 0);
    load_and_check(14'b00000010000001, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
