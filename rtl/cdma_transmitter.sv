// cdma_transmitter: DS-SS CDMA transmitter for one user.
// The clock distributor cuts the master clock into carrier samples and
// chips (SAMPLES_PER_CHIP samples per chip). The Gold code generator,
// programmed by the 14-bit user key, issues one chip per chip period and
// marks chip 0 of each 127-chip period with sos. At every chip 0 the data
// sampler takes a new information bit, so one bit is spread over one full
// code period (spreading factor 127). The spreader sends the code for a 1
// and its complement for a 0, and the BPSK modulator turns each chip into
// SAMPLES_PER_CHIP carrier samples of +cos or -cos.
// Interface / timing: rst is synchronous and also loads user_key; rst_pn
// reloads the key and restarts the code at chip 0 without resetting the
// rest. user_data is sampled at the chip step that starts chip 0.
// out_ss_signal lags the chip that produced it by two sample periods;
// sample_en and out_chip_start give the receiver the sample and chip
// timing of out_ss_signal. The block structure follows the specification;
// the timing details are this design's choices.
module cdma_transmitter
  import cdma_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV       = 1,
  parameter int unsigned SAMPLES_PER_CHIP = 16,
  parameter int unsigned PHASE_INC        = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    rst_pn,
  input  key_t    user_key,
  input  logic    user_data,
  output sample_t out_ss_signal,
  output logic    out_chip_start,
  output logic    sample_en,
  output logic    chip_en,
  output logic    pn_seq,
  output logic    sos,
  output logic    chip_signal,
  output logic    data_bit,
  output logic    data_clk
);
  logic chip_start, chip_adv, seq_start;
  logic [6:0] chip_idx;

  clock_distributor #(.SAMPLE_DIV(SAMPLE_DIV), .SAMPLES_PER_CHIP(SAMPLES_PER_CHIP)) u_clk (
    .clk(clk), .rst(rst), .sample_en(sample_en), .chip_start(chip_start),
    .chip_adv(chip_adv)
  );

  assign chip_en = chip_adv;

  gold_code_gen u_pn (
    .clk(clk), .rst(rst), .load(rst_pn), .key(user_key), .adv(chip_adv),
    .pn_chip(pn_seq), .sos(sos), .seq_start(seq_start), .chip_idx(chip_idx)
  );

  data_sampler u_data (
    .clk(clk), .rst(rst),
    .bit_en(chip_adv && seq_start),
    .half_en(chip_adv && chip_idx == 7'(PN_LEN / 2)),
    .user_data(user_data), .data_bit(data_bit), .data_clk(data_clk)
  );

  signal_spreader u_spread (.pn_chip(pn_seq), .data_bit(data_bit), .chip_signal(chip_signal));

  bpsk_modulator #(.PHASE_INC(PHASE_INC)) u_mod (
    .clk(clk), .rst(rst), .sample_en(sample_en), .chip_start(chip_start),
    .chip(chip_signal), .out_ss_signal(out_ss_signal), .out_chip_start(out_chip_start)
  );
endmodule
