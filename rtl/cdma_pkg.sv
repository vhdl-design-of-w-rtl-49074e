// cdma_pkg: constants and types shared by the DS-SS CDMA transmitter and
// receiver. The Gold code length (127 chips from two 7-bit LFSRs), the
// 14-bit user key, the 6-bit carrier samples, the 4-bit soft chip range of
// -7..+7, the 128-word correlator window and the 15-bit product width are
// the numbers the design is specified with. The 16-bit correlator output
// width matches the original implementation's correlator output; everything
// else here is this implementation's own choice.
package cdma_pkg;
  localparam int unsigned LFSR_W    = 7;    // each of the two Gold LFSRs
  localparam int unsigned KEY_W     = 2 * LFSR_W; // user key = both seeds
  localparam int unsigned PN_LEN    = 127;  // Gold code period in chips
  localparam int unsigned WIN_LEN   = 128;  // matched filter window (words)
  localparam int unsigned SAMPLE_W  = 6;    // carrier / BPSK sample width
  localparam int unsigned PHASE_W   = 6;    // 64-entry LUT, 5.625 deg steps
  localparam int unsigned PROD_W    = 15;   // demodulator product width
  localparam int unsigned SOFT_W    = 4;    // soft chip value, -7..+7
  localparam int unsigned CORR_W    = 16;   // correlator output width
  localparam int          SOFT_MAX  = 7;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [SOFT_W-1:0]   soft_t;
  typedef logic signed [CORR_W-1:0]   corr_t;
  typedef logic [KEY_W-1:0]           key_t;
  typedef logic [PN_LEN-1:0]          pn_vec_t;   // bit k = chip k
  typedef soft_t                      window_t [WIN_LEN]; // [0] = newest
endpackage
