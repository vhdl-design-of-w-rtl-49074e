// cos_lut: the cosine look-up table of the direct digital frequency
// synthesizer. A 6-bit phase (64 steps of 5.625 degrees per carrier cycle)
// is mapped to a 6-bit two's complement sample round(31*cos(2*pi*addr/64)),
// range -31..+31. Only the first quarter wave (17 values) is stored; the
// other three quadrants are obtained by mirroring the index and negating:
//   quadrant 0: Q[f]   quadrant 1: -Q[16-f]   quadrant 2: -Q[f]   quadrant 3: Q[16-f]
// where f is the low four address bits. Purely combinational: the DDFS
// registers the result, one clock from address to sample. Table size,
// phase step and sample width follow the specification; the one-clock
// registered read and amplitude 31 match the original table's behaviour
// (it returns 3 one clock after address 50 when stepping by one); the
// quarter-wave folding is this design's choice.
module cos_lut
  import cdma_pkg::*;
(
  input  logic [PHASE_W-1:0] addr,
  output sample_t            amp
);
  localparam int unsigned QN = 17;
  typedef logic [4:0] qmag_t;
  // round(31*cos(2*pi*k/64)), k = 0..16
  localparam qmag_t QUARTER [QN] = '{5'd31, 5'd31, 5'd30, 5'd30, 5'd29, 5'd27,
                                     5'd26, 5'd24, 5'd22, 5'd20, 5'd17, 5'd15,
                                     5'd12, 5'd9,  5'd6,  5'd3,  5'd0};
  logic [1:0] quad;
  logic [3:0] f;
  logic [4:0] idx;
  qmag_t      mag;

  always_comb begin
    quad = addr[5:4];
    f    = addr[3:0];
    idx  = quad[0] ? 5'd16 - {1'b0, f} : {1'b0, f};
    mag  = QUARTER[idx];
    // quadrants 1 and 2 are negative
    amp  = (quad == 2'd1 || quad == 2'd2) ? -sample_t'({1'b0, mag}) : sample_t'({1'b0, mag});
  end
endmodule
