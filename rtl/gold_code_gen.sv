// gold_code_gen: programmable Gold code (PN sequence) generator.
// Two 7-stage Fibonacci LFSRs run side by side and the Gold chip is the
// XOR of their last stages. Stage 1 takes the feedback and stage 7 is the
// output. LFSR g1 feeds back stage3 ^ stage7 (x^7 + x^3 + 1); LFSR g2 feeds
// back stage1 ^ stage2 ^ stage3 ^ stage7 (x^7 + x^3 + x^2 + x + 1). The two
// polynomials form a preferred pair, so every key gives one member of a
// three-valued (-17, -1, +15) Gold family of period 127.
// The 14-bit key programs the code: key[13:7] is g1's state and key[6:0]
// g2's state (bit 6 of each half = stage 1). Both halves must be non-zero.
// Interface / timing:
//   load - synchronous; loads the key and restarts the sequence at chip 0.
//   adv  - one step: pn_chip/sos are registered and change only on adv
//          (or load), so they describe the chip now being sent.
//   sos  - high while pn_chip is chip 0 of the period (start of sequence).
//   seq_start - combinational; high when the next adv will issue chip 0.
//   chip_idx  - index of the chip that the next adv will issue.
// The two-LFSR structure, the g1 taps and the 14-bit key follow the
// specification; the exact fourth g2 tap, the key bit order and the
// registered outputs are this design's choices.
module gold_code_gen
  import cdma_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  key_t       key,
  input  logic       adv,
  output logic       pn_chip,
  output logic       sos,
  output logic       seq_start,
  output logic [6:0] chip_idx
);
  // r[0] is stage 1, r[6] is stage 7
  logic [LFSR_W-1:0] g1, g2;
  logic fb1, fb2;

  assign fb1 = g1[2] ^ g1[6];
  assign fb2 = g2[0] ^ g2[1] ^ g2[2] ^ g2[6];
  assign seq_start = (chip_idx == '0);

  function automatic logic [LFSR_W-1:0] seed(input logic [LFSR_W-1:0] k);
    // key bit 6 -> stage 1 ... key bit 0 -> stage 7
    for (int i = 0; i < LFSR_W; i++) seed[i] = k[LFSR_W-1-i];
  endfunction

  always_ff @(posedge clk) begin
    if (rst || load) begin
      g1       <= seed(key[KEY_W-1:LFSR_W]);
      g2       <= seed(key[LFSR_W-1:0]);
      chip_idx <= '0;
      pn_chip  <= 1'b0;
      sos      <= 1'b0;
    end else if (adv) begin
      pn_chip  <= g1[6] ^ g2[6];
      sos      <= seq_start;
      g1       <= {g1[5:0], fb1};
      g2       <= {g2[5:0], fb2};
      chip_idx <= (32'(chip_idx) == PN_LEN - 1) ? '0 : chip_idx + 1'b1;
    end
  end
endmodule
