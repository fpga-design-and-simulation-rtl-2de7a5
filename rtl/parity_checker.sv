// Parity checker for 8-bit words.
//
// parity is the XOR of all bits of data_in (1 when the word holds an odd
// number of ones, e.g. 10101101 -> 1 as in the reference waveform) and follows
// data_in without a clock. On an edge with enable high the checker compares
// that parity with expected, the parity of the word as it was sent, and
// registers the result on error (1 = mismatch) until the next enabled check.
//
// Interface: clk, reset (active high, synchronous), enable, data_in, expected
// -> parity, error. The word parity follows the source design; the registered
// compare against an expected bit is this design's reading of the "compare"
// path of the transmitter block diagram. The waveform's output port is called
// parity here because output is a reserved word.
module parity_checker #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         enable,
  input  logic [W-1:0] data_in,
  input  logic         expected,
  output logic         parity,
  output logic         error
);

  assign parity = ^data_in;

  always_ff @(posedge clk) begin
    if (reset)
      error <= 1'b0;
    else if (enable)
      error <= parity ^ expected;
  end

endmodule
