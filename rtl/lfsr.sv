// 8-bit linear feedback shift register (PN sequence source).
//
// A Fibonacci LFSR: on every clock with en high the register shifts one place
// towards the MSB and bit 0 takes the XOR of the bits selected by TAPS. The
// chip is the MSB (serial_out); the whole register is visible on parallel_out.
// With a primitive feedback polynomial the register visits all 2^W-1 non-zero
// states, so the chip stream repeats every 255 clocks for W = 8.
//
// Interface and timing: synchronous, active-low reset (resetn) to RESET_VALUE,
// all ones as in the reference waveform; load (priority over en) copies seed
// into the register on the next edge. An all-zero seed would lock the register,
// so it is replaced by RESET_VALUE; that guard, the enable and the taps are this
// design's choices. The port names resetn, load, seed, parallel_out and
// serial_out follow the reference waveform of the 8-bit LFSR.
module lfsr #(
  parameter int unsigned         W           = cdma_pkg::LFSR_W,
  parameter logic [W-1:0]        TAPS        = cdma_pkg::TAPS_ML,
  parameter logic [W-1:0]        RESET_VALUE = '1
) (
  input  logic         clk,
  input  logic         resetn,
  input  logic         en,
  input  logic         load,
  input  logic [W-1:0] seed,
  output logic [W-1:0] parallel_out,
  output logic         serial_out
);

  logic [W-1:0] q;
  logic         feedback;

  assign feedback = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (!resetn)
      q <= RESET_VALUE;
    else if (load)
      q <= (seed == '0) ? RESET_VALUE : seed;
    else if (en)
      q <= {q[W-2:0], feedback};
  end

  assign parallel_out = q;
  assign serial_out   = q[W-1];

  initial assert (TAPS[W-1]) else $error("lfsr: TAPS must include the x^W term");

endmodule
