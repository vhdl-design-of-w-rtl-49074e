// clock_distributor: clock and control of the transmitter. From the master
// clock it derives the timing the spread-spectrum chain runs on. The design
// uses one clock domain; instead of separate divided clocks it produces
// one-cycle enable strobes:
//   sample_en  - one carrier sample (the "ss_signal_clk" rate), every
//                SAMPLE_DIV master clock cycles;
//   chip_start - the sample_en that begins a chip (sample index 0);
//   chip_adv   - the sample_en that ends a chip (sample index
//                SAMPLES_PER_CHIP-1); the PN generator steps on it so its new
//                chip is present at the following chip_start.
// // Both counters clear on the synchronous, active-high reset, so the first
// sample_en after reset is a chip_start. Deriving the clocks from a master
// clock follows the specification; the dividers and strobes are this
// design's choice.
module clock_distributor #(
  parameter int unsigned SAMPLE_DIV       = 1,
  parameter int unsigned SAMPLES_PER_CHIP = 16
) (
  input  logic clk,
  input  logic rst,
  output logic sample_en,
  output logic chip_start,
  output logic chip_adv
);
  localparam int unsigned DW = (SAMPLE_DIV > 1) ? $clog2(SAMPLE_DIV) : 1;
  logic [DW-1:0] div_cnt;
  logic [$clog2(SAMPLES_PER_CHIP)-1:0] sample_idx;

  initial assert (SAMPLES_PER_CHIP >= 2) else $error("SAMPLES_PER_CHIP must be >= 2");

  always_ff @(posedge clk) begin
    if (rst) div_cnt <= '0;
    else if (sample_en) div_cnt <= '0;
    else div_cnt <= div_cnt + 1'b1;
  end

  assign sample_en  = (SAMPLE_DIV <= 1) ? 1'b1 : (32'(div_cnt) == SAMPLE_DIV - 1);

  always_ff @(posedge clk) begin
    if (rst) sample_idx <= '0;
    else if (sample_en) begin
      if (32'(sample_idx) == SAMPLES_PER_CHIP - 1) sample_idx <= '0;
      else sample_idx <= sample_idx + 1'b1;
    end
  end

  assign chip_start = sample_en && (sample_idx == '0);
  assign chip_adv   = sample_en && (32'(sample_idx) == SAMPLES_PER_CHIP - 1);
endmodule
