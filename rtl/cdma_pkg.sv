// Shared definitions of the DS-CDMA transmitter.
//
// The PN codes come from 8-bit linear feedback shift registers, as in the
// design this RTL follows; the register width is therefore fixed here. The two
// feedback polynomials are this design's choice: both are primitive of degree
// 8, so each register alone runs through all 255 non-zero states (a maximum
// length or ML sequence). The Gold-code mode XORs the two ML sequences.
//
// Feedback masks are for a Fibonacci register that shifts towards the MSB and
// feeds the XOR of the masked bits back into bit 0; bit i of the mask stands
// for the term x^(i+1) of the polynomial.
package cdma_pkg;

  localparam int unsigned LFSR_W = 8;

  // x^8 + x^6 + x^5 + x^4 + 1
  localparam logic [LFSR_W-1:0] TAPS_ML   = 8'hB8;
  // x^8 + x^4 + x^3 + x^2 + 1
  localparam logic [LFSR_W-1:0] TAPS_PAIR = 8'h8E;

  // Which code the PN generator puts out.
  typedef enum logic {
    CODE_ML   = 1'b0,   // one maximum-length sequence
    CODE_GOLD = 1'b1    // XOR of the two maximum-length sequences
  } code_e;

endpackage
