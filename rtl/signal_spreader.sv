// signal_spreader: direct-sequence spreading of one information bit.
// For information bit 1 the PN chip is passed unchanged, for bit 0 it is
// inverted: an XOR-controlled inverter, chip_signal = pn_chip XNOR ~data.
// With the BPSK mapping used here (chip 1 -> +carrier) a 1 bit is sent as
// the PN sequence itself and a 0 bit as its negative, which the receiver's
// correlator sees as a positive or negative peak. Purely combinational.
// The function is the one specified; it has no state or timing of its own.
module signal_spreader (
  input  logic pn_chip,
  input  logic data_bit,
  output logic chip_signal
);
  assign chip_signal = pn_chip ^ ~data_bit;
endmodule
