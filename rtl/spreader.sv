// Spreading multiplier of the DS-CDMA transmitter.
//
// Direct-sequence spreading multiplies each data symbol (+1/-1) by the PN
// chips (+1/-1). With the usual mapping 0 -> +1 and 1 -> -1 that product is
// the XOR of the two bits, so tx_chip = data_bit ^ pn_chip. Combinational;
// the caller holds data_bit for a whole bit period and changes pn_chip once
// per chip. The multiply follows the source design's block diagram; the 0/1
// mapping is this design's choice.
module spreader (
  input  logic data_bit,
  input  logic pn_chip,
  output logic tx_chip
);

  always_comb tx_chip = data_bit ^ pn_chip;

endmodule
