// ddfs: direct digital frequency synthesizer, used as the transmit carrier
// and as the receiver's local oscillator. A 6-bit phase accumulator steps
// by PHASE_INC on every sample strobe and addresses the 64-entry cosine
// table; the table output is registered.
// Interface / timing:
//   en     - sample strobe; nothing changes without it.
//   sync   - with en: this sample is taken at phase 0 and the accumulator
//            restarts from there (used at every chip start so transmitter
//            and receiver carriers stay phase aligned).
//   cos_out- sample of the phase presented at the previous en, i.e. one
//            sample period of latency.
//   phase  - the accumulator value the next en will sample.
// Carrier frequency = f_sample * PHASE_INC / 64. With the default 4 the
// carrier has 16 samples per cycle. The LUT-based DDFS follows the
// specification; the increment and the phase restart are this design's
// choices.
module ddfs
  import cdma_pkg::*;
#(
  parameter int unsigned PHASE_INC = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic               sync,
  output sample_t            cos_out,
  output logic [PHASE_W-1:0] phase
);
  logic [PHASE_W-1:0] cur;
  sample_t            lut_val;

  assign cur = sync ? '0 : phase;

  cos_lut u_lut (.addr(cur), .amp(lut_val));

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= '0;
      cos_out <= '0;
    end else if (en) begin
      phase   <= cur + PHASE_W'(PHASE_INC);
      cos_out <= lut_val;
    end
  end
endmodule
