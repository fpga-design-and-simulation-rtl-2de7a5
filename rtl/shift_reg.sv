// 8-bit shift register with parallel load, serial in and serial/parallel out.
//
// On a clock edge with aload high the register takes d; otherwise, with en
// high, it moves one position: with SHIFT_LEFT = 1 every bit moves towards the
// MSB, si enters bit 0 and so is the MSB; with SHIFT_LEFT = 0 every bit moves
// towards the LSB, si enters the MSB and so is bit 0. p0 shows the whole
// register. It is the building block of the serial-to-parallel and
// parallel-to-serial converters.
//
// Port names (si, so, aload, d, p0) and the left shift with so = MSB follow
// the reference waveform of the shift register (10101111 loaded, then
// 01011111, 10111111, ...). Here the load is synchronous, and the reset
// (active low, to zero) and the enable are this design's choices.
module shift_reg #(
  parameter int unsigned W          = 8,
  parameter bit          SHIFT_LEFT = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         aload,
  input  logic [W-1:0] d,
  input  logic         si,
  output logic         so,
  output logic [W-1:0] p0
);

  always_ff @(posedge clk) begin
    if (!rst_n)
      p0 <= '0;
    else if (aload)
      p0 <= d;
    else if (en)
      p0 <= SHIFT_LEFT ? {p0[W-2:0], si} : {si, p0[W-1:1]};
  end

  assign so = SHIFT_LEFT ? p0[W-1] : p0[0];

endmodule
