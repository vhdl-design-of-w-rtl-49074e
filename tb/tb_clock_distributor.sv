// tb_clock_distributor: checks the sample, chip-start and chip-advance
// strobes of the default divider (1 sample per clock, 16 samples per chip)
// and of a divided one (3 clocks per sample, 5 samples per chip) against
// counters kept in the testbench.
`timescale 1ns/1ps
module tb_clock_distributor;
  logic clk = 0, rst = 1;
  logic se_a, cs_a, ca_a, se_b, cs_b, ca_b;
  int checks = 0, failures = 0;
  int cyc = 0;

  clock_distributor u_a (.clk(clk), .rst(rst), .sample_en(se_a), .chip_start(cs_a), .chip_adv(ca_a));
  clock_distributor #(.SAMPLE_DIV(3), .SAMPLES_PER_CHIP(5)) u_b (
    .clk(clk), .rst(rst), .sample_en(se_b), .chip_start(cs_b), .chip_adv(ca_b));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL cyc %0d: %s", cyc, w); end
  endtask

  initial begin
    int n_cs_b = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      // default: every clock a sample, chip start every 16
      chk(se_a == 1'b1, "default sample_en");
      chk(cs_a == ((cyc % 16) == 0), "default chip_start");
      chk(ca_a == ((cyc % 16) == 15), "default chip_adv");
      // divided: sample every 3rd clock, 5 samples per chip
      chk(se_b == ((cyc % 3) == 2), "div sample_en");
      chk(cs_b == ((cyc % 15) == 2), "div chip_start");
      chk(ca_b == ((cyc % 15) == 14), "div chip_adv");
      if (cs_b) n_cs_b++;
      @(posedge clk);
    end
    chk(n_cs_b == 40, "chip count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
