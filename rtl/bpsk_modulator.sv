// Digital BPSK modulator with a phase shift register carrier.
//
// The carrier is one period of a sine wave, SAMPLES signed samples of SW bits,
// held in a circular "phase shift register" that rotates by one sample every
// clock, so the register head walks through the carrier at one sample per
// clock. Binary phase shift keying turns the carrier by 180 degrees for a 1
// chip: the output sample (parallel out, the CDMA signal) is the head sample
// for chip 0 and its negation for chip 1. serial_out is the chip that set the
// phase of the current sample.
//
// Carrier samples: s(k) = round(AMP * sin(2*pi*k/SAMPLES)), computed at
// elaboration with Bhaskara's rational approximation of the sine
// sin(x deg) ~ 4x(180-x) / (40500 - x(180-x)) for 0..180 degrees (within 0.2%
// of full scale); for SAMPLES = 8 and AMP = 127 it gives 0, 90, 127, 90, 0,
// -90, -127, -90.
//
// Timing: chip is sampled every clock; parallel_out and serial_out are
// registered, one clock after the chip and carrier sample they belong to.
// sync (or reset) puts the carrier back to phase 0. Active-low synchronous
// reset clears the outputs. BPSK and the phase shift register / parallel out /
// serial out structure follow the source design's block diagram; the carrier
// shape, sample count, width and amplitude are this design's choices.
module bpsk_modulator #(
  parameter int unsigned SAMPLES = 8,
  parameter int unsigned SW      = 8,
  parameter int unsigned AMP     = 127
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sync,
  input  logic                 chip,
  output logic signed [SW-1:0] parallel_out,
  output logic                 serial_out
);

  typedef logic signed [SW-1:0] sample_t;

  // Sine sample k of SAMPLES per period, amplitude AMP, rounded to nearest.
  function automatic sample_t carrier_sample(input int unsigned k);
    longint deg, a, num, den, mag;
    bit     neg;
    deg = (360 * longint'(k)) / longint'(SAMPLES);
    neg = (deg > 180);
    a   = neg ? deg - 180 : deg;
    num = 4 * a * (180 - a);
    den = 40500 - a * (180 - a);
    mag = (2 * longint'(AMP) * num + den) / (2 * den);
    return neg ? sample_t'(-mag) : sample_t'(mag);
  endfunction

  sample_t carrier [SAMPLES];

  always_ff @(posedge clk) begin
    if (!rst_n || sync) begin
      for (int unsigned k = 0; k < SAMPLES; k++)
        carrier[k] <= carrier_sample(k);
    end else begin
      for (int unsigned k = 0; k + 1 < SAMPLES; k++)
        carrier[k] <= carrier[k+1];
      carrier[SAMPLES-1] <= carrier[0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      parallel_out <= '0;
      serial_out   <= 1'b0;
    end else begin
      parallel_out <= chip ? -carrier[0] : carrier[0];
      serial_out   <= chip;
    end
  end

  initial assert (AMP < (1 << (SW - 1))) else $error("bpsk_modulator: AMP does not fit SW bits");

endmodule
