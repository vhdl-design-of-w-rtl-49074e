// rx_pn_generator: the receiver's programmable PN sequence generator. The
// correlator needs the whole Gold sequence at once, so after a key load
// this block runs its own Gold code generator (same key as the
// transmitter) for 127 clocks and shifts the chips into a 127-bit vector,
// bit k = chip k. The vector is then held and pn_ready goes high; it stays
// high until the next load or reset. The correlator reads bit k as +1 for
// 1 and -1 for 0.
// Timing: pn_ready rises 129 clocks after load (or reset) is released.
// Generating the sequence in the receiver and presenting it in parallel
// follows the specification; the fill-then-hold scheme is this design's
// choice.
module rx_pn_generator
  import cdma_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    load,
  input  key_t    key,
  output pn_vec_t pn_vec,
  output logic    pn_ready
);
  logic [7:0] cnt;
  logic       adv, shift_q, pn_chip, unused_sos, unused_seq_start;
  logic [6:0] unused_idx;

  assign adv = (cnt < 8'(PN_LEN));

  gold_code_gen u_gold (
    .clk(clk), .rst(rst), .load(load), .key(key), .adv(adv && !load),
    .pn_chip(pn_chip), .sos(unused_sos), .seq_start(unused_seq_start),
    .chip_idx(unused_idx)
  );

  always_ff @(posedge clk) begin
    if (rst || load) begin
      cnt     <= '0;
      shift_q <= 1'b0;
      pn_vec  <= '0;
    end else begin
      shift_q <= adv;
      if (adv) cnt <= cnt + 1'b1;
      if (shift_q) pn_vec <= {pn_chip, pn_vec[PN_LEN-1:1]};
    end
  end

  assign pn_ready = (cnt == 8'(PN_LEN)) && !shift_q;
endmodule
