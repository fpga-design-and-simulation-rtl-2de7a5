// PN code generator: maximum-length sequence or Gold code.
//
// Two 8-bit LFSRs run in lock step, one chip per chip_en. LFSR A holds the
// user's code: its seed selects the phase of the ML sequence. LFSR B always
// starts from SEED_B. The code multiplexer chooses, per code_sel, either A's
// chip alone (ML sequence, period 255) or the XOR of A and B (Gold-type code,
// the two ML sequences combined). Different seeds of A give different codes
// in both modes, which is how users are told apart.
//
// Timing: pn_chip is a register-driven output; it changes on the edge where
// chip_en is high. load (synchronous, priority over chip_en) seeds A with seed
// and B with SEED_B. Two LFSRs XORed for the Gold code and the 8-bit width
// follow the source design; the polynomials, SEED_B and the select encoding
// are this design's choices. Note that no degree-8 preferred pair exists, so
// the cross-correlation of this family is not bounded as for true Gold codes.
module pn_generator
  import cdma_pkg::*;
#(
  parameter logic [LFSR_W-1:0] TAPS_A = TAPS_ML,
  parameter logic [LFSR_W-1:0] TAPS_B = TAPS_PAIR,
  parameter logic [LFSR_W-1:0] SEED_B = '1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              chip_en,
  input  logic              load,
  input  logic [LFSR_W-1:0] seed,
  input  code_e             code_sel,
  output logic              pn_chip,
  output logic [LFSR_W-1:0] state_a
);

  logic chip_a, chip_b;

  lfsr #(.W(LFSR_W), .TAPS(TAPS_A)) u_lfsr_a (
    .clk, .resetn(rst_n), .en(chip_en), .load, .seed,
    .parallel_out(state_a), .serial_out(chip_a)
  );

  lfsr #(.W(LFSR_W), .TAPS(TAPS_B)) u_lfsr_b (
    .clk, .resetn(rst_n), .en(chip_en), .load, .seed(SEED_B),
    .parallel_out(), .serial_out(chip_b)
  );

  // Code multiplexer.
  always_comb begin
    unique case (code_sel)
      CODE_ML:   pn_chip = chip_a;
      CODE_GOLD: pn_chip = chip_a ^ chip_b;
      default:   pn_chip = chip_a;
    endcase
  end

endmodule
