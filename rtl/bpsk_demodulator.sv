// bpsk_demodulator: coherent BPSK demodulator producing soft chips.
// Instead of a hard 0/1 decision it gives one 4-bit value in -7..+7 per
// chip, because a spread signal is too weak per chip to decide on; the
// decision is left to the correlator. The chain is:
//   local oscillator (a DDFS like the transmitter's, restarted at phase 0
//   on every rx_chip_start) -> multiplier (15-bit product) -> accumulator
//   (sum over one chip) -> scaling device (to -7..+7).
// Interface / timing: rx_signal and rx_chip_start are read on sample_en;
// rx_chip_start marks the first sample of a chip, which keeps the local
// oscillator coherent with the received carrier (carrier and chip timing
// recovery are not part of this design). The soft value of a chip appears
// with a one-clock soft_valid pulse, 3 sample periods plus one clock after
// the first sample of the following chip. The chain follows the
// specification; the alignment and pipeline are this design's choices.
module bpsk_demodulator
  import cdma_pkg::*;
#(
  parameter int unsigned PHASE_INC   = 4,
  parameter int unsigned ACC_W       = 20,
  parameter int unsigned SCALE_SHIFT = 10
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    sample_en,
  input  sample_t rx_signal,
  input  logic    rx_chip_start,
  output soft_t   soft_out,
  output logic    soft_valid
);
  sample_t lo, samp_q;
  logic    first_q, first_p;
  logic signed [PROD_W-1:0] prod;
  logic signed [ACC_W-1:0]  chip_sum;
  logic                     sum_valid;
  logic [PHASE_W-1:0]       unused_phase;

  ddfs #(.PHASE_INC(PHASE_INC)) u_lo (
    .clk(clk), .rst(rst), .en(sample_en), .sync(rx_chip_start),
    .cos_out(lo), .phase(unused_phase)
  );

  // align the received sample and chip mark with the registered LO sample
  always_ff @(posedge clk) begin
    if (rst) begin
      samp_q  <= '0;
      first_q <= 1'b0;
      first_p <= 1'b0;
    end else if (sample_en) begin
      samp_q  <= rx_signal;
      first_q <= rx_chip_start;
      first_p <= first_q;
    end
  end

  multiplier u_mul (.clk(clk), .rst(rst), .en(sample_en), .a(samp_q), .b(lo), .p(prod));

  accumulator #(.ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst(rst), .en(sample_en), .first(first_p), .din(prod),
    .sum(chip_sum), .valid(sum_valid)
  );

  scaling_device #(.IN_W(ACC_W), .SCALE_SHIFT(SCALE_SHIFT)) u_scale (
    .clk(clk), .rst(rst), .valid_in(sum_valid), .din(chip_sum),
    .soft_out(soft_out), .valid_out(soft_valid)
  );
endmodule
