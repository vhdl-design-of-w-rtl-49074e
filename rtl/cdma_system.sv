// cdma_system: a complete single-link DS-SS CDMA system: the transmitter's
// BPSK output drives the receiver directly, both run from one master
// clock, and the receiver takes the sample and chip timing of the
// transmitted signal from the transmitter (the two share the clock and
// control block, as on a single FPGA). user_key programs both Gold code
// generators, so the receiver recovers user_data only when its key matches.
// Interface / timing: synchronous active-high rst (also loads user_key);
// rst_pn reloads user_key into both ends. user_data is sampled once per
// 127-chip period, at the chip step that starts the code (sos rises on the
// next clock). Each bit comes back on rx_out_bit, with flag_detect and a
// bit_strobe pulse, one code period plus 9 clocks after sos rose for it
// (2032 + 9 = 2041 clocks at the defaults: 16 samples per chip, one sample
// per clock). sample_en is tied high when SAMPLE_DIV is 1.
module cdma_system
  import cdma_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV       = 1,
  parameter int unsigned SAMPLES_PER_CHIP = 16,
  parameter int unsigned PHASE_INC        = 4,
  parameter int unsigned SCALE_SHIFT      = 10,
  parameter int          THRESHOLD        = 400
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    rst_pn,
  input  key_t    user_key,
  input  logic    user_data,
  output sample_t out_ss_signal,
  output logic    sample_en,
  output logic    chip_en,
  output logic    pn_seq,
  output logic    sos,
  output logic    chip_signal,
  output logic    data_bit,
  output logic    data_clk,
  output soft_t   soft_chip,
  output logic    soft_valid,
  output corr_t   correlator_out,
  output logic    corr_valid,
  output logic    flag_detect,
  output logic    rx_out_bit,
  output logic    bit_strobe
);
  logic out_chip_start;

  cdma_transmitter #(
    .SAMPLE_DIV(SAMPLE_DIV), .SAMPLES_PER_CHIP(SAMPLES_PER_CHIP), .PHASE_INC(PHASE_INC)
  ) u_tx (
    .clk(clk), .rst(rst), .rst_pn(rst_pn), .user_key(user_key), .user_data(user_data),
    .out_ss_signal(out_ss_signal), .out_chip_start(out_chip_start),
    .sample_en(sample_en), .chip_en(chip_en), .pn_seq(pn_seq), .sos(sos),
    .chip_signal(chip_signal), .data_bit(data_bit), .data_clk(data_clk)
  );

  cdma_receiver #(
    .PHASE_INC(PHASE_INC), .SCALE_SHIFT(SCALE_SHIFT), .THRESHOLD(THRESHOLD)
  ) u_rx (
    .clk(clk), .rst(rst), .rst_pn(rst_pn), .user_key(user_key),
    .sample_en(sample_en), .rx_signal(out_ss_signal), .rx_chip_start(out_chip_start),
    .soft_chip(soft_chip), .soft_valid(soft_valid),
    .correlator_out(correlator_out), .corr_valid(corr_valid),
    .flag_detect(flag_detect), .rx_out_bit(rx_out_bit), .bit_strobe(bit_strobe)
  );
endmodule
