// matched_filter: correlator of the receiver. Each time the window of
// recent soft chips changes, it multiplies the words by the PN sequence
// taken as +1 (chip 1) / -1 (chip 0) and adds the products. The most recent
// word is matched with the last chip of the code (window[PN_LEN-1-k] with
// chip k), so the output peaks, at +/-(127 * 7) = +/-889 for a clean
// signal, when the window holds exactly one complete spread bit. The
// 128-word window is one word longer than the 127-chip code; its oldest
// word has no chip to match and is not used.
// Timing: corr_out and corr_valid are registered one clock after
// win_valid. corr_valid is held low while pn_ready is low. Output width 16
// bits (enough for +/-889). Correlation against the whole code in one step
// follows the specification; the word-to-chip alignment is this design's
// choice.
module matched_filter
  import cdma_pkg::*;
#(
  parameter int unsigned DEPTH = WIN_LEN
) (
  input  logic    clk,
  input  logic    rst,
  input  soft_t   window [DEPTH],
  input  logic    win_valid,
  input  pn_vec_t pn_vec,
  input  logic    pn_ready,
  output corr_t   corr_out,
  output logic    corr_valid
);
  corr_t sum;

  initial assert (DEPTH >= PN_LEN) else $error("window shorter than the code");

  always_comb begin
    sum = '0;
    for (int k = 0; k < PN_LEN; k++) begin
      if (pn_vec[k]) sum = sum + CORR_W'(window[PN_LEN-1-k]);
      else           sum = sum - CORR_W'(window[PN_LEN-1-k]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      corr_out   <= '0;
      corr_valid <= 1'b0;
    end else begin
      corr_valid <= win_valid && pn_ready;
      if (win_valid) corr_out <= sum;
    end
  end
endmodule
