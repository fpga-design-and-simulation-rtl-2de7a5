// Data sampler: bit-stream buffer for binary image pixels.
//
// The image arrives already binarised, eight pixels per byte, over a
// valid/ready handshake. The sampler holds one byte in its parallel-to-serial
// converter and presents one pixel per data-bit period on data_bit, bit 0
// first. A byte is accepted only at a bit boundary (bit_en high) when the
// converter is idle or on its last bit, so bits always last a full period and
// back-to-back bytes follow without a gap. While idle, data_bit is 0.
//
// Timing: pix_ready is combinational from bit_en and the converter state; a
// byte accepted on an edge is sent from the next clock on, for 8 bit periods.
// busy is high during those periods, last_bit during the eighth, and
// byte_parity holds the XOR parity of the byte being sent. The block's name
// and place in the chain follow the source design; the handshake, bit order and
// idle value are this design's choices.
module data_sampler #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_en,
  input  logic [W-1:0] pix_data,
  input  logic         pix_valid,
  output logic         pix_ready,
  output logic         data_bit,
  output logic         busy,
  output logic         last_bit,
  output logic         byte_parity
);

  logic take;
  logic serial_bit;

  assign pix_ready = bit_en && (!busy || last_bit);
  assign take      = pix_valid && pix_ready;

  p2s #(.W(W)) u_p2s (
    .clk, .rst_n, .en(bit_en), .dataready(take), .parallel_data(pix_data),
    .serial_out(serial_bit), .busy, .last(last_bit)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)
      byte_parity <= 1'b0;
    else if (take)
      byte_parity <= ^pix_data;
  end

  assign data_bit = busy && serial_bit;

endmodule
