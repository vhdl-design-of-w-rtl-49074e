// cdma_receiver: DS-SS CDMA receiver for one user. The BPSK demodulator
// turns each received chip into a soft value in -7..+7; the
// serial-to-parallel converter keeps the latest 128 of them; the matched
// filter correlates them with the user's Gold code, which the receiver's
// own PN generator produces from the same 14-bit key; the threshold
// detector reports a bit whenever the correlation magnitude exceeds the
// threshold, with the bit value given by its sign. Because the correlator
// slides one chip at a time, no bit timing is needed: the peak itself
// marks where each bit ends.
// Interface / timing: rx_signal is read on sample_en, with rx_chip_start
// marking the first sample of each chip (shared transmitter timing).
// rst_pn reloads the key; detection is blocked for 129 clocks while the
// code is regenerated. A chip's soft value is only complete when the first
// sample of the next chip arrives, so at one sample per clock a bit is
// reported 8 clocks after the last sample of its last chip. The block chain follows the
// specification; the timing is this design's choice.
module cdma_receiver
  import cdma_pkg::*;
#(
  parameter int unsigned PHASE_INC   = 4,
  parameter int unsigned SCALE_SHIFT = 10,
  parameter int          THRESHOLD   = 400
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    rst_pn,
  input  key_t    user_key,
  input  logic    sample_en,
  input  sample_t rx_signal,
  input  logic    rx_chip_start,
  output soft_t   soft_chip,
  output logic    soft_valid,
  output corr_t   correlator_out,
  output logic    corr_valid,
  output logic    flag_detect,
  output logic    rx_out_bit,
  output logic    bit_strobe
);
  soft_t   window [WIN_LEN];
  logic    win_valid, pn_ready;
  pn_vec_t pn_vec;

  bpsk_demodulator #(.PHASE_INC(PHASE_INC), .SCALE_SHIFT(SCALE_SHIFT)) u_demod (
    .clk(clk), .rst(rst), .sample_en(sample_en), .rx_signal(rx_signal),
    .rx_chip_start(rx_chip_start), .soft_out(soft_chip), .soft_valid(soft_valid)
  );

  serial_to_parallel u_s2p (
    .clk(clk), .rst(rst), .valid_in(soft_valid), .din(soft_chip),
    .window(window), .win_valid(win_valid)
  );

  rx_pn_generator u_pn (
    .clk(clk), .rst(rst), .load(rst_pn), .key(user_key),
    .pn_vec(pn_vec), .pn_ready(pn_ready)
  );

  matched_filter u_mf (
    .clk(clk), .rst(rst), .window(window), .win_valid(win_valid),
    .pn_vec(pn_vec), .pn_ready(pn_ready),
    .corr_out(correlator_out), .corr_valid(corr_valid)
  );

  threshold_detector #(.THRESHOLD(THRESHOLD)) u_th (
    .clk(clk), .rst(rst), .corr_in(correlator_out), .corr_valid(corr_valid),
    .flag_detect(flag_detect), .rx_out_bit(rx_out_bit), .bit_strobe(bit_strobe)
  );
endmodule
