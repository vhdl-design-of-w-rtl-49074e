// threshold_detector: the bit decision. For every correlator output it
// compares the magnitude with a constant THRESHOLD. Above it, flag_detect
// is raised (a bit was found) and rx_out_bit takes the sign: 1 for a
// positive correlation, 0 for a negative one. Below it, flag_detect is low
// and rx_out_bit keeps the last detected bit.
// Timing: outputs change one clock after corr_valid and hold until the next
// corr_valid, so flag_detect stays high for one chip period per detected
// bit. bit_strobe is a one-clock pulse on each detection.
// Magnitude compare, sign decision and constant threshold follow the
// specification; the value 400 is this design's choice: it is about half
// of the clean peak (889) and well above the largest off-peak correlation
// of the Gold code with random data (about 220).
module threshold_detector
  import cdma_pkg::*;
#(
  parameter int THRESHOLD = 400
) (
  input  logic  clk,
  input  logic  rst,
  input  corr_t corr_in,
  input  logic  corr_valid,
  output logic  flag_detect,
  output logic  rx_out_bit,
  output logic  bit_strobe
);
  corr_t mag;
  logic  above;

  assign mag   = corr_in[CORR_W-1] ? -corr_in : corr_in;
  assign above = (mag > corr_t'(THRESHOLD));

  always_ff @(posedge clk) begin
    if (rst) begin
      flag_detect <= 1'b0;
      rx_out_bit  <= 1'b0;
      bit_strobe  <= 1'b0;
    end else begin
      bit_strobe <= corr_valid && above;
      if (corr_valid) begin
        flag_detect <= above;
        if (above) rx_out_bit <= !corr_in[CORR_W-1];
      end
    end
  end
endmodule
