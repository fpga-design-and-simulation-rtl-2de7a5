// DS-CDMA transmitter for binary image data (top level).
//
// Chain: binary pixels enter the data sampler eight per byte and leave it one
// per data-bit period. Each data bit is spread by the PN code (spreader, an
// XOR), at CHIPS_PER_BIT chips per bit, and the chips BPSK-modulate a sampled
// carrier at SAMPLES_PER_CHIP samples per chip. The modulator's parallel out,
// one signed 8-bit sample per master clock, is the CDMA signal. The PN
// generator gives, per code_sel, the maximum-length sequence of one 8-bit
// LFSR (0) or the XOR of two LFSRs (1, Gold-type); the user's code is chosen
// by the seed. The clock generator derives chip and bit enables from the one
// master clock.
//
// Compare path: the modulator's serial out (the chip sent) is despread with
// the same PN chip at the end of every bit, the recovered bits are collected
// by the serial-to-parallel converter, and the parity checker compares the
// parity of each recovered byte with the parity of the byte that was sent.
// rx_valid pulses with the recovered byte on rx_byte and the result on
// parity_err. This checks the transmitter's own data path, not a channel.
//
// Timing: load (one cycle, while no byte is being sent) seeds the PN
// generator and restarts the chip, bit and carrier timing; the code then
// starts from the seed at every bit when CHIPS_PER_BIT = 255. pix_ready is
// high only on bit boundaries. A byte occupies 8 * CHIPS_PER_BIT *
// SAMPLES_PER_CHIP clocks (16320 at the defaults). rx_valid comes 2 clocks
// after the byte's last bit period ends. Reset is synchronous, active low.
//
// The block set and their order follow the source design's block diagram;
// the rates, handshake, bit order and the exact form of the compare path are
// this design's choices. SAMPLES_PER_CHIP must be at least 2 for the compare
// path's alignment.
module ds_cdma_tx #(
  parameter int unsigned SAMPLES_PER_CHIP = 8,
  parameter int unsigned CHIPS_PER_BIT    = 255
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              code_sel,
  input  logic              load,
  input  logic [7:0]        seed,
  input  logic [7:0]        pix_data,
  input  logic              pix_valid,
  output logic              pix_ready,
  output logic signed [7:0] cdma_signal,
  output logic              serial_out,
  output logic              chip_en,
  output logic              bit_en,
  output logic              tx_busy,
  output logic [7:0]        rx_byte,
  output logic              rx_valid,
  output logic              parity_err
);

  import cdma_pkg::*;

  logic              pn_chip;
  logic              data_bit;
  logic              last_bit;
  logic              byte_parity;
  logic              tx_chip;
  logic              rec_bit;
  logic              rx_full;
  logic              exp_parity;

  clock_gen #(
    .SAMPLES_PER_CHIP(SAMPLES_PER_CHIP),
    .CHIPS_PER_BIT   (CHIPS_PER_BIT)
  ) u_clock_gen (
    .clk, .rst_n, .sync(load), .chip_en, .bit_en, .sample_idx(), .chip_idx()
  );

  data_sampler #(.W(8)) u_data_sampler (
    .clk, .rst_n, .bit_en, .pix_data, .pix_valid, .pix_ready,
    .data_bit, .busy(tx_busy), .last_bit, .byte_parity
  );

  pn_generator u_pn_generator (
    .clk, .rst_n, .chip_en, .load, .seed, .code_sel(code_e'(code_sel)),
    .pn_chip, .state_a()
  );

  spreader u_spreader (
    .data_bit, .pn_chip, .tx_chip
  );

  bpsk_modulator #(.SAMPLES(8), .SW(8), .AMP(127)) u_bpsk (
    .clk, .rst_n, .sync(load), .chip(tx_chip),
    .parallel_out(cdma_signal), .serial_out
  );

  // ---- compare path ----------------------------------------------------
  // On the last clock of a bit the modulator's serial out still carries a
  // chip of that bit (SAMPLES_PER_CHIP >= 2) and pn_chip the same chip.
  spreader u_despreader (
    .data_bit(serial_out), .pn_chip, .tx_chip(rec_bit)
  );

  s2p #(.W(8)) u_s2p (
    .clk, .rst(!rst_n || load), .en(bit_en && tx_busy), .x(rec_bit),
    .q(rx_byte), .full(rx_full)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      exp_parity <= 1'b0;
      rx_valid   <= 1'b0;
    end else begin
      if (bit_en && last_bit)
        exp_parity <= byte_parity;
      rx_valid <= rx_full;
    end
  end

  parity_checker #(.W(8)) u_parity (
    .clk, .reset(!rst_n), .enable(rx_full), .data_in(rx_byte),
    .expected(exp_parity), .parity(), .error(parity_err)
  );

  initial assert (SAMPLES_PER_CHIP >= 2)
    else $error("ds_cdma_tx: SAMPLES_PER_CHIP must be at least 2");

endmodule
