// Parallel-in serial-out converter (8 bits).
//
// dataready loads parallel_data into a right-shifting shift register; the
// current bit, starting with bit 0, is on serial_out. Each clock with en high
// moves to the next bit, so a word takes W enabled clocks and each bit stays
// on the output for one enable period. busy is high while bits of the word
// remain; last marks the final bit. A load on the same edge as the final
// shift starts the next word without a gap.
//
// The names (parallel_data, dataready, serial_out) follow the reference
// waveform; the bit order (LSB first, matching the serial-to-parallel
// converter), the enable, busy/last and the synchronous active-low reset are
// this design's choices. After the last bit serial_out is 0.
module p2s #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         dataready,
  input  logic [W-1:0] parallel_data,
  output logic         serial_out,
  output logic         busy,
  output logic         last
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [CW-1:0] remaining;
  logic [W-1:0]  word;

  shift_reg #(.W(W), .SHIFT_LEFT(1'b0)) u_sr (
    .clk, .rst_n, .en, .aload(dataready), .d(parallel_data), .si(1'b0),
    .so(serial_out), .p0(word)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)
      remaining <= '0;
    else if (dataready)
      remaining <= CW'(W);
    else if (en && remaining != '0)
      remaining <= remaining - 1'b1;
  end

  assign busy = (remaining != '0);
  assign last = (remaining == CW'(1));

endmodule
