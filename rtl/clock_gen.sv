// Chip and bit timing derived from the master clock.
//
// The master clock runs at the carrier sample rate. A sample counter divides
// it by SAMPLES_PER_CHIP to give the chip rate, and a chip counter divides
// that by CHIPS_PER_BIT (the spreading factor) to give the data bit rate.
// Instead of generating new clocks, the block raises single-cycle enables:
// chip_en on the last sample of each chip and bit_en on the last sample of
// each bit (bit_en implies chip_en). Everything else runs on the master clock
// and advances on these enables.
//
// sync (or the active-low synchronous reset) restarts both counters at zero,
// so the next chip and bit begin on the following clock. That one master
// clock feeds the chip and bit timing follows the source design; the use of
// enables, the counter structure and the default of 8 samples per chip are
// this design's choices. The default spreading factor of 255 chips per bit
// is one full period of the 8-bit ML sequence.
module clock_gen #(
  parameter int unsigned SAMPLES_PER_CHIP = 8,
  parameter int unsigned CHIPS_PER_BIT    = 255,
  localparam int unsigned SCW = (SAMPLES_PER_CHIP > 1) ? $clog2(SAMPLES_PER_CHIP) : 1,
  localparam int unsigned CCW = (CHIPS_PER_BIT > 1) ? $clog2(CHIPS_PER_BIT) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sync,
  output logic           chip_en,
  output logic           bit_en,
  output logic [SCW-1:0] sample_idx,
  output logic [CCW-1:0] chip_idx
);

  always_ff @(posedge clk) begin
    if (!rst_n || sync) begin
      sample_idx <= '0;
      chip_idx   <= '0;
    end else if (chip_en) begin
      sample_idx <= '0;
      chip_idx   <= bit_en ? '0 : chip_idx + 1'b1;
    end else begin
      sample_idx <= sample_idx + 1'b1;
    end
  end

  assign chip_en = (sample_idx == SCW'(SAMPLES_PER_CHIP - 1));
  assign bit_en  = chip_en && (chip_idx == CCW'(CHIPS_PER_BIT - 1));

endmodule
