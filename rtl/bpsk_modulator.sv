// bpsk_modulator: all-digital BPSK modulator. The DDFS produces a cosine
// carrier; a spread chip of 1 sends the carrier as is and a chip of 0 sends
// its negative (a 180 degree phase shift). The result is the 6-bit two's
// complement transmit signal out_ss_signal, range -31..+31.
// Interface / timing (all on sample_en):
//   chip, chip_start are sampled together with the carrier phase; the DDFS
//   restarts at phase 0 on chip_start, so every chip begins at carrier
//   phase 0. Two sample periods later the corresponding sample is on
//   out_ss_signal; out_chip_start is high while that output sample is the
//   first sample of a chip. It is the timing mark the receiver uses to stay
//   aligned with the transmitter.
// The DDFS carrier and the phase-shift modulation follow the
// specification; the chip-to-sign mapping and the pipeline are this
// design's choices.
module bpsk_modulator
  import cdma_pkg::*;
#(
  parameter int unsigned PHASE_INC = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    sample_en,
  input  logic    chip_start,
  input  logic    chip,
  output sample_t out_ss_signal,
  output logic    out_chip_start
);
  sample_t carrier;
  logic    chip_q, start_q;
  logic [PHASE_W-1:0] unused_phase;

  ddfs #(.PHASE_INC(PHASE_INC)) u_ddfs (
    .clk(clk), .rst(rst), .en(sample_en), .sync(chip_start),
    .cos_out(carrier), .phase(unused_phase)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      chip_q         <= 1'b0;
      start_q        <= 1'b0;
      out_ss_signal  <= '0;
      out_chip_start <= 1'b0;
    end else if (sample_en) begin
      chip_q         <= chip;
      start_q        <= chip_start;
      out_ss_signal  <= chip_q ? carrier : -carrier;
      out_chip_start <= start_q;
    end
  end
endmodule
