// tb_signal_spreader: all four input combinations; bit 1 passes the PN
// chip, bit 0 inverts it.
`timescale 1ns/1ps
module tb_signal_spreader;
  logic pn_chip, data_bit, chip_signal;
  int checks = 0, failures = 0;
  signal_spreader dut (.*);
  initial begin
    for (int i = 0; i < 4; i++) begin
      {data_bit, pn_chip} = 2'(i);
      #1;
      checks++;
      if (chip_signal !== (data_bit ? pn_chip : !pn_chip)) begin
        failures++; $display("FAIL data=%b pn=%b got %b", data_bit, pn_chip, chip_signal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
