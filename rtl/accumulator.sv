// accumulator: integrate-and-dump over one chip, the digital equivalent of
// the integrator in an analogue correlation receiver. Every en adds din to
// the running sum. When en comes with first (the first product of a new
// chip) the sum of the chip just finished is put out on sum with a
// one-clock valid pulse, and the running sum restarts from din. So each
// chip's sum appears at the beginning of the next chip. No pulse is given
// for the partial chip seen before the first `first` after reset.
// ACC_W must hold SAMPLES_PER_CHIP * 31 * 31 (15376 at 16 samples per chip);
// the default leaves room for 64 samples per chip. Integrate-and-dump per
// symbol follows the specification; widths and handshake are this
// design's choices.
module accumulator
  import cdma_pkg::*;
#(
  parameter int unsigned ACC_W = 20
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    first,
  input  logic signed [PROD_W-1:0] din,
  output logic signed [ACC_W-1:0] sum,
  output logic                    valid
);
  logic signed [ACC_W-1:0] acc;
  logic                    primed;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc    <= '0;
      sum    <= '0;
      valid  <= 1'b0;
      primed <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (en) begin
        if (first) begin
          if (primed) begin
            sum   <= acc;
            valid <= 1'b1;
          end
          primed <= 1'b1;
          acc    <= ACC_W'(din);
        end else begin
          acc <= acc + ACC_W'(din);
        end
      end
    end
  end
endmodule
