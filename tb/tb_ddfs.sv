// tb_ddfs: the default synthesizer (phase step 4, 16 samples per carrier
// cycle) and one with phase step 1 are driven with an irregular sample
// strobe and occasional sync pulses. Each output sample must equal
// round(31*cos(2*pi*phase/64)) for the phase tracked by the testbench,
// one strobe late.
`timescale 1ns/1ps
module tb_ddfs;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, en = 0, sync = 0;
  sample_t c4, c1;
  logic [5:0] p4, p1;
  int checks = 0, failures = 0, n_sync = 0;

  ddfs u4 (.clk(clk), .rst(rst), .en(en), .sync(sync), .cos_out(c4), .phase(p4));
  ddfs #(.PHASE_INC(1)) u1 (.clk(clk), .rst(rst), .en(en), .sync(sync), .cos_out(c1), .phase(p1));
  always #5 clk = ~clk;

  function automatic int cref(input int ph);
    return $rtoi($floor(31.0 * $cos(2.0 * 3.14159265358979 * ph / 64.0) + 0.5));
  endfunction

  initial begin
    int ph4 = 0, ph1 = 0, e4 = 0, e1 = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks += 2;
      if (int'(c4) != e4) begin failures++; $display("FAIL inc4 %0d: %0d exp %0d", i, c4, e4); end
      if (int'(c1) != e1) begin failures++; $display("FAIL inc1 %0d: %0d exp %0d", i, c1, e1); end
      en   = ($urandom_range(0, 3) != 0);
      sync = en && ($urandom_range(0, 40) == 0);
      if (en) begin
        if (sync) begin ph4 = 0; ph1 = 0; n_sync++; end
        e4 = cref(ph4); e1 = cref(ph1);
        ph4 = (ph4 + 4) % 64; ph1 = (ph1 + 1) % 64;
      end
    end
    checks++; if (n_sync == 0) failures++;
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
