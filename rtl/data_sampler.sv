// data_sampler: takes the user's information bit into the spreading chain.
// On bit_en (the chip step that starts a new PN period) user_data is
// captured into data_bit, which is then held for the whole 127-chip period
// so that exactly one information bit is spread by one full Gold sequence.
// data_clk is a bit-rate clock for observation: it is high for the first
// half of each bit period (it is set by bit_en and cleared by half_en).
// Timing: data_bit changes on the clock edge where bit_en is high, the same
// edge on which the PN generator issues chip 0. Reset clears both outputs.
// Sampling one bit per code period follows the specification; the exact
// capture point and the data_clk shape are this design's choices.
module data_sampler (
  input  logic clk,
  input  logic rst,
  input  logic bit_en,
  input  logic half_en,
  input  logic user_data,
  output logic data_bit,
  output logic data_clk
);
  always_ff @(posedge clk) begin
    if (rst) begin
      data_bit <= 1'b0;
      data_clk <= 1'b0;
    end else if (bit_en) begin
      data_bit <= user_data;
      data_clk <= 1'b1;
    end else if (half_en) begin
      data_clk <= 1'b0;
    end
  end
endmodule
