# DS-CDMA transmitter for binary images

This is a direct-sequence CDMA (DS-CDMA) transmitter written in synthesizable SystemVerilog. A binary image arrives eight pixels to a byte. Each pixel becomes one data bit. Each data bit is multiplied by a pseudo-noise (PN) code of 255 chips, which spreads it over a wide band. The chips then phase-modulate (BPSK) a sampled carrier. A user is identified by the code: every transmitter sends in the same band, and a receiver that knows a user's code can pick that user's bits out of the sum.

The codes come from 8-bit linear feedback shift registers (LFSRs). The transmitter can send either of two code families:

* a **maximum-length (ML) sequence** from one LFSR;
* a **Gold-type code**, the XOR of two different ML sequences.

An 8-bit LFSR has 255 non-zero states, so the 8-bit seed selects one of 255 codes.

## Signal chain

```
 pix_data/valid ──► data_sampler ──data_bit──► spreader (XOR) ──tx_chip──► bpsk_modulator ──► cdma_signal (8-bit signed)
   (8 pixels)       (p2s inside)                    ▲                       (phase shift reg)  └► serial_out (chip sent)
                                                    │                                                │
 seed, load, code_sel ──────────────────────► pn_generator ──pn_chip──┬────────────────────────────────┤
                                              (2 x lfsr + mux)        ▼                                ▼
 clk ──► clock_gen ──chip_en / bit_en──► all stages           despreader (XOR) ──► s2p ──► parity_checker ──► parity_err
                                                                                 rx_byte/rx_valid   (vs. parity of sent byte)
```

| module | role |
|---|---|
| `ds_cdma_tx` | top level: the chain above plus the compare path |
| `clock_gen` | turns the master clock into chip and bit enables |
| `data_sampler` | one-byte pixel buffer with a valid/ready handshake; sends one pixel per bit period |
| `p2s` | parallel-to-serial converter, LSB first |
| `s2p` | serial-to-parallel converter; the new bit enters at the MSB |
| `shift_reg` | 8-bit shift register (load, serial in/out, parallel out); used by `p2s` and `s2p` |
| `lfsr` | 8-bit Fibonacci LFSR with seed load |
| `pn_generator` | two LFSRs and the ML/Gold code multiplexer |
| `spreader` | spreading multiplier: one XOR |
| `bpsk_modulator` | sampled sine carrier in a rotating register, negated for chip 1 |
| `parity_checker` | XOR parity of a word, and a registered compare with an expected parity |
| `cdma_pkg` | LFSR width, feedback masks, `code_e` enum |

## Timing: samples, chips and bits

Everything runs on one master clock, which is also the carrier sample rate. `clock_gen` does not make new clocks. It counts and raises single-cycle enables:

* `chip_en` on the last sample of each chip. This happens every `SAMPLES_PER_CHIP` = 8 clocks.
* `bit_en` on the last sample of each bit. This happens every `CHIPS_PER_BIT` = 255 chips, which is 2040 clocks.

One data bit therefore spans exactly one period of the 255-chip code. A byte takes 8 × 2040 = 16 320 clocks.

A `load` pulse does four things:

* seeds the PN generator: LFSR A takes `seed`, LFSR B takes all ones;
* restarts the sample and chip counters;
* puts the carrier back to phase 0;
* clears the compare path.

After a load, every bit starts from the same code state, namely the seed. Give `load` only while `tx_busy` is low; a load in mid-byte cuts that byte short.

The data sampler accepts a byte only on a bit boundary. `pix_ready` is combinational and is high only in the cycle where `bit_en` is high and the sampler is idle or sending its last bit. A producer can therefore hold `pix_valid` high and wait. When it does, bytes follow each other without a gap. Bit 0 of the byte is sent first. While no byte is queued, the sampler sends data 0, so the output carries the bare code.

`cdma_signal` and `serial_out` are registered. They lag the chip they belong to by one clock.

## PN codes

`lfsr` shifts towards the MSB. The feedback into bit 0 is the XOR of the bits selected by `TAPS`, and the chip is the MSB. The reset value is all ones, and an all-zero seed is replaced by all ones, because zero would lock the register. Both default polynomials are primitive, so each has a period of 255:

* LFSR A: x⁸+x⁶+x⁵+x⁴+1, mask `8'hB8`
* LFSR B: x⁸+x⁴+x³+x²+1, mask `8'h8E`

`code_sel` = 0 sends A's chip (ML). `code_sel` = 1 sends A XOR B. The seed moves A to a different phase relative to B, so each seed gives a different member of the code family.

There is one caveat. Degree 8 has no "preferred pair" of polynomials, so the XOR family here lacks the bounded three-valued cross-correlation of textbook Gold codes. If you need that guarantee, move to a width that is not a multiple of 4, such as 7 or 9, with a preferred pair. `lfsr` and `pn_generator` take the width and taps as parameters; `ds_cdma_tx` fixes the seed and data widths at 8.

## BPSK modulator

The carrier is one period of a sine: `SAMPLES` = 8 signed 8-bit values, amplitude 127. It sits in a circular register that rotates one place per clock (the *phase shift register*). The output sample is the head of that register for chip 0 and its negation for chip 1. This is BPSK: a 180° phase flip per 1-chip.

The table is computed at elaboration with Bhaskara's rational sine approximation, sin x° ≈ 4x(180−x)/(40500−x(180−x)). Integer arithmetic is enough for it. For 8 samples it gives 0, 90, 127, 90, 0, −90, −127, −90, the same as round(127·sin(2πk/8)).

`parallel_out` (the top's `cdma_signal`) is the digital band-pass signal; a DAC would follow it. `serial_out` is the chip that set its phase.

## Compare path

The transmitter checks its own data path with the parity checker:

1. On the last clock of every bit, the modulator's `serial_out` is XORed again with the current PN chip. This gives back the data bit.
2. `s2p` collects eight recovered bits.
3. `parity_checker` compares the parity of the recovered byte with the parity of the byte the data sampler sent.

`rx_valid` pulses two clocks after the byte's last bit period, with the byte on `rx_byte` and the result on `parity_err` (1 means a mismatch).

This path checks the transmitter's own logic, not a radio link. It needs `SAMPLES_PER_CHIP` ≥ 2, so that the registered `serial_out` still belongs to the last chip of the bit.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ds_cdma_tx`, `clock_gen` | `SAMPLES_PER_CHIP` | 8 | carrier samples (clocks) per chip |
| `ds_cdma_tx`, `clock_gen` | `CHIPS_PER_BIT` | 255 | spreading factor |
| `lfsr` | `W`, `TAPS`, `RESET_VALUE` | 8, `8'hB8`, all ones | register width, feedback mask, reset state |
| `pn_generator` | `TAPS_A`, `TAPS_B`, `SEED_B` | `8'hB8`, `8'h8E`, `8'hFF` | the two polynomials and B's seed |
| `bpsk_modulator` | `SAMPLES`, `SW`, `AMP` | 8, 8, 127 | carrier samples per period, sample width, amplitude |
| `shift_reg` | `W`, `SHIFT_LEFT` | 8, 1 | width, shift direction |
| `s2p`, `p2s`, `parity_checker`, `data_sampler` | `W` | 8 | word width |

The top fixes the carrier at 8 samples. `SAMPLES_PER_CHIP` sets only the chip length, so a chip can span part of a carrier period or several.

## Where this design departs from or adds to its source

The block set follows the published transmitter: data sampler, clock generator, PN generator (ML and Gold, 8-bit LFSRs), spreading multiplier, shift register with serial-to-parallel and parallel-to-serial conversion, parity checker and BPSK modulator. The port names and 8-bit words of `lfsr`, `shift_reg`, `s2p`, `p2s` and `parity_checker` follow the source's waveforms, and their testbenches replay the values shown there:

* `lfsr`: reset to 11111111, seed 10101111;
* `shift_reg`: 10101111 → 01011111 → 10111111 → 01111111 → 11111111 → 11111110;
* `s2p`: 01100000 → 10110000 → 01011000 → 10101100 → 11010110;
* `p2s`: word 11001010;
* `parity_checker`: words 10101110, 11111001, 11100000 and 10101101, with parity 1 for 10101101.

These are this design's own choices, because the source does not give them:

* the LFSR polynomials, the second register's seed, and the all-zero seed guard;
* rates: 8 samples per chip and 255 chips per bit;
* enables instead of derived clocks;
* the pixel handshake, the LSB-first bit order, and sending data 0 while idle;
* the sine carrier, its width and amplitude;
* the compare path, which is this design's reading of the "compare" connection between the serial output and the parity checker;
* synchronous resets and the `load`/`sync` restart.

`shift_reg` loads synchronously, although the source's `aload` name suggests an asynchronous load.

The source's block diagram draws the data sampler feeding the PN generator. Here the data bit goes to the spreading multiplier instead, and the PN generator runs on its own. This is the usual DS-CDMA arrangement, and the only one in which "spreading" makes sense.

Not included:

* turning a grey-level image into binary pixels (the input is already binary);
* the receiver;
* the DAC and RF stages.

## Simulation

Each module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_lfsr rtl/cdma_pkg.sv tb/tb_lfsr.sv -Mdir obj_lfsr
./obj_lfsr/Vtb_lfsr
```

Use the same pattern for `tb_pn_generator`, `tb_shift_reg`, `tb_s2p`, `tb_p2s`, `tb_parity_checker`, `tb_spreader`, `tb_bpsk_modulator`, `tb_clock_gen`, `tb_data_sampler` and `tb_ds_cdma_tx`.

`tb_ds_cdma_tx` runs the top at its default parameters. It sends an 8 × 8 test image twice: once with the ML code of seed 10101111, and once inverted with the Gold code of seed 01011010. Together that is about 280 000 clocks, well under a second.

Its reference receiver is written independently of the RTL. It rebuilds both codes from the seed and correlates each 2040-sample bit period of `cdma_signal` with carrier × chip. Every correlation must equal exactly ±255 × the carrier energy, which proves that every sample is right, and its sign must give the bit that was sent. The testbench also checks `rx_byte` and `parity_err`. It counts ML bits, Gold bits, idle bits, loads, stalled offers, back-to-back bytes, phase inversions and parity checks, and fails if any of them never happened.
