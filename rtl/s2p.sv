// Serial-in parallel-out converter (8 bits).
//
// Each clock with en high shifts the serial input x into the MSB of q and the
// older bits one place towards the LSB, as in the reference waveform
// (01100000 -> 10110000 -> 01011000 ...). After W bits the first bit received
// sits in q[0], so a word sent LSB first arrives in its original order. A bit
// counter raises full for one cycle, on the cycle after the edge that took the
// W-th bit, while q holds the complete word; counting starts again after it.
//
// Interface: clk, rst (active high, synchronous, as named in the waveform),
// en, x -> q, full. The counter and the full flag are this design's choices.
module s2p #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         x,
  output logic [W-1:0] q,
  output logic         full
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [CW-1:0] count;
  logic          unused_so;

  shift_reg #(.W(W), .SHIFT_LEFT(1'b0)) u_sr (
    .clk, .rst_n(!rst), .en, .aload(1'b0), .d('0), .si(x),
    .so(unused_so), .p0(q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      full  <= 1'b0;
    end else begin
      full <= 1'b0;
      if (en) begin
        if (count == CW'(W - 1)) begin
          count <= '0;
          full  <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

endmodule
