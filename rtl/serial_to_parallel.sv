// serial_to_parallel: keeps the most recent DEPTH (128) soft chips from
// the demodulator as a parallel vector for the correlator. It is a shift
// register of 4-bit words: on each valid_in the new word enters at
// window[0] (newest) and every word moves one place toward window[DEPTH-1]
// (oldest). win_valid pulses for one clock after each shift, when window
// holds the updated contents. Reset clears the window to zero.
// The 128-word depth follows the specification; the ordering and the
// valid pulse are this design's choices.
module serial_to_parallel
  import cdma_pkg::*;
#(
  parameter int unsigned DEPTH = WIN_LEN
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  valid_in,
  input  soft_t din,
  output soft_t window [DEPTH],
  output logic  win_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) window[i] <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= valid_in;
      if (valid_in) begin
        window[0] <= din;
        for (int i = 1; i < DEPTH; i++) window[i] <= window[i-1];
      end
    end
  end
endmodule
