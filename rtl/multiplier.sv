// multiplier: the receiver's mixer. On each sample strobe it multiplies the
// received 6-bit two's complement sample by the 6-bit local oscillator
// sample and registers the product, sign-extended to PROD_W (15) bits.
// A 6 x 6 signed product needs 12 bits, so the 15-bit result never
// overflows. Latency: one sample strobe. The two's complement product and
// its 15-bit width follow the specification; the register is this
// design's choice.
module multiplier
  import cdma_pkg::*;
#(
  parameter int unsigned PROD_BITS = PROD_W
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        en,
  input  sample_t                     a,
  input  sample_t                     b,
  output logic signed [PROD_BITS-1:0] p
);
  always_ff @(posedge clk) begin
    if (rst) p <= '0;
    else if (en) p <= PROD_BITS'(a * b);
  end
endmodule
