// scaling_device: reduces the wide chip sum to a 4-bit soft chip value in
// -7..+7, so that the correlator only adds small numbers. The magnitude is
// shifted right by SCALE_SHIFT and saturated at 7, then the sign is put
// back (symmetric, rounds toward zero). With the default 16 samples per
// chip a clean chip sums to +/-7798, which scales to +/-7; the shift should
// be about log2(SAMPLES_PER_CHIP * 31 * 31 / 2 / 7) for other settings.
// Timing: one clock; valid_out follows valid_in. The -7..+7 range follows
// the specification; the shift-and-saturate method is this design's
// choice.
module scaling_device
  import cdma_pkg::*;
#(
  parameter int unsigned IN_W        = 20,
  parameter int unsigned SCALE_SHIFT = 10
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   valid_in,
  input  logic signed [IN_W-1:0] din,
  output soft_t                  soft_out,
  output logic                   valid_out
);
  logic [IN_W-1:0] mag, shifted;
  logic [SOFT_W-2:0] sat;
  soft_t           scaled;

  always_comb begin
    mag     = din[IN_W-1] ? IN_W'(-din) : IN_W'(din);
    shifted = mag >> SCALE_SHIFT;
    sat     = (shifted > IN_W'(SOFT_MAX)) ? (SOFT_W-1)'(SOFT_MAX) : shifted[SOFT_W-2:0];
    scaled  = din[IN_W-1] ? -soft_t'({1'b0, sat}) : soft_t'({1'b0, sat});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      soft_out  <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) soft_out <= scaled;
    end
  end
endmodule
