# QAM-4 software radio with a (16,8) QC-LDPC code

This is a complete baseband-to-carrier QAM-4 link with a small quasi-cyclic LDPC code. Data bits
are grouped eight at a time and encoded into 16-bit codewords. The codewords go out as QAM-4
symbols on a digitally synthesised carrier. On the receive side the symbols are demodulated
coherently, decided by sign, regrouped into 16-bit words and corrected by a hard-decision
bit-flipping decoder. A PN test source, a reference delay and a bit-error counter close the
loop, so the whole link can be measured against an external AWGN channel.

Everything is synthesizable SystemVerilog except the channel model used by the testbenches.
It runs on one clock at the sample rate.

## Signal flow

```
 PN z^6+z+1 ──► S/P 1→8 ──► LDPC encoder ──► P/S 16→2 ─┬─ I bit ─► ±1 × cos (NCO2) ──► tx_i ─┐
 (1 bit/symbol)                                        └─ Q bit ─► ±1 × sin (NCO2) ──► tx_q ─┤
                                                                                            AWGN channel
                                                                                          (outside, complex:
                                                                                           tx_i = Re, tx_q = Im)
 error counter ◄── P/S 8→1 ◄── LDPC decoder ◄── S/P 2→16 ◄─┬─ sign ◄ boxcar LPF ◄ × cos (NCO1) ◄ rx_i ┤
      ▲                                                     └─ sign ◄ boxcar LPF ◄ × sin (NCO1) ◄ rx_q ┘
      └──────────── z^-4096 reference delay ◄── PN bit
```

The in-phase and quad-phase branches are not summed into one real signal. They leave as two
outputs and the channel treats them as the real and imaginary parts of one complex sample.
Each branch is therefore a BPSK link of its own. Eight symbols, two bits each, carry one
16-bit codeword.

## Rates and timing

| quantity | value | where it comes from |
|---|---|---|
| samples per symbol (OSR) | 256 | up/down-sampling factor of the reference model |
| carrier | 32 samples per period (8 per symbol) | NCO increment 2048 on a 16-bit accumulator |
| bits per symbol | 2 (I, Q) | QAM-4 |
| symbols per codeword (frame) | 8 | 16-bit codeword / 2 |
| data bits per symbol period | 1 | 8 message bits per 8 symbols (rate 1/2) |
| end-to-end delay | 16 symbols = 4096 samples | matches the reference model's z^-4096 |

`symbol_timing` holds the two counters everything else keys on. `sample_cnt` runs 0..255 within
a symbol and `sym_idx` runs 0..7 within a frame. On `sym_tick` (sample 0) the transmitter takes
one data bit and puts out the next symbol. On `rx_strobe` (sample 216) the receiver takes its
decisions.

A bit taken at the tick of symbol period P goes through these steps:

* It is the last of its eight message bits at P+7 at the latest. The encoder registers the
  codeword in that period.
* The codeword is sent during the next frame, periods P+8 .. P+15 for the frame it belongs to.
* The receiver decides the last symbol at sample 216 of the frame's last period.
* The decoder has at most 25 cycles. It finishes before the next tick.
* The decoded bits leave one per symbol through the 8→1 P/S converter.

So every decoded bit appears one clock after the tick of period P+16, i.e. 4097 clocks after it
went in (4096 samples plus the output register). The top compares it with the PN bit delayed
by exactly that much. Frame alignment is not recovered from the signal. The receiver reuses the
transmitter's symbol counter, which is valid because both halves are on the same chip and the
channel delay (a few samples) is far below a symbol.

## The code

The parity-check matrix H (8×16) is built from a 2×4 base matrix of circulant shifts with
expansion factor Z = 4:

```
      [ 2  3  0 -1 ]        shift s: 4×4 identity rotated so row r has its 1 in column (r+s) mod 4
B  =  [ 1  0 -1  0 ]        -1:      4×4 zero block
```

The expansion gives the eight checks (bits numbered Y1..Y16):

```
S1 = Y3 ^ Y8 ^ Y9     S5 = Y2 ^ Y5 ^ Y13
S2 = Y4 ^ Y5 ^ Y10    S6 = Y3 ^ Y6 ^ Y14
S3 = Y1 ^ Y6 ^ Y11    S7 = Y4 ^ Y7 ^ Y15
S4 = Y2 ^ Y7 ^ Y12    S8 = Y1 ^ Y8 ^ Y16
```

The right half of H is the 8×8 identity, so H = [P I] and the systematic generator is
G = [I Pᵀ]. Codeword bits Y1..Y8 are the message and Y9..Y16 the parity. Parity bit 8+i is the
XOR of the message bits of check i, for example Y9 = Y3 ^ Y8. Every message bit sits in exactly
two checks and every parity bit in one.

`qam4_ldpc_pkg` expands H from the base matrix at elaboration and derives G from it. It
provides `ldpc_encode` and `ldpc_syndrome`. Vectors use ascending ranges (`logic [1:16]`), so
`cw[3]` is Y3 and matches the equations above.

## The bit-flipping decoder

This is the least obvious block. The decoder visits the checks in order S1 .. S8. A check whose
syndrome bit is 0 costs one cycle and is skipped. For a check whose bit is 1, its three bits
are tried in ascending order, one trial per cycle:

1. Flip the first bit (Y3 for S1) and compute the syndrome of the trial word.
2. If the test passes, keep the flip and go to the next check.
3. Otherwise undo it and flip the second bit (Y8), and test again.
4. If that fails too, undo it and flip the third bit (Y9). This flip is kept without a test.

Whatever happens, S_i is 0 when the decoder leaves check i.

The test is set by the parameter `FULL_SYNDROME_TEST`:

* `1` (default): a trial passes only if the **whole** syndrome becomes zero. A single error
  in any of the 16 bits is always corrected. An error in a message bit sets two checks, and the
  first of them finds the one flip that clears both. An error in a parity bit sets only its own
  check; the first two trials fail and the third flip fixes it.
* `0`: a trial passes when S_i alone becomes zero. That is the literal reading of the
  algorithm's per-check test. Flipping any bit of a check clears that check, so the first flip
  is always kept, and errors in parity bits are "corrected" by flipping a message bit.

With the default test the final syndrome is always zero. A trial that ends decoding leaves no
nonzero check behind. The third flip is a parity bit (Y8+i), which touches only S_i. So a
frame with several errors is always turned into *some* codeword, which may be the wrong one.
Nothing reports a decoding failure. `err_detected` says that the received word was not a
codeword, and `flips` says how many bits were changed.

How far this goes: the code's minimum distance is 3, because a message bit and the two parity
bits of its checks form a codeword. Only a single error per codeword is always corrected. Over
all error patterns the default decoder returns the sent message for 32 of the 120 double errors
and 52 of the 560 triple errors. Errors in all eight message bits turn one codeword into
another, so they cannot even be detected. The reference text says errors are removed even when
all eight bits are wrong. That holds only in the sense that the syndrome always ends at zero.

Latency: the load cycle plus at most 3 cycles for each of 8 checks, so `done` comes at most
25 cycles after `start`.

## Carrier generation and demodulation

`nco` has a 16-bit phase accumulator with increment 2048, a 4-bit dither from an LFSR, and
quantisation to 12 bits. A 1025-entry quarter-wave sine table is computed at elaboration. Sine
and cosine come out in Q1.15 after six register stages. With increment 2048 the accumulator's
low 11 bits are always zero. The dither therefore never reaches the kept bits, and the outputs
are exact table samples.

Each modulator branch multiplies a ±1 level (`qam4_mapper`: 0 → −1, 1 → +1) by its carrier and
keeps Q1.15 (−1 × −1.0 saturates).

Each demodulator branch mixes the received sample (Q3.15, 18 bits) with its local carrier and
feeds the product into a 32-tap boxcar FIR built as a running sum. Mixing leaves ±A/2 plus a
term at twice the carrier frequency. That term has a 16-sample period, so a 32-sample window
cancels it exactly. The filter output is sampled at `rx_strobe`. At that point the window
covers receive samples 183..214 of the symbol, well clear of both symbol edges. `threshold_detector`
outputs 1 when the sample is greater than zero.

Both NCOs start together from reset. The receive carrier is not aligned to the channel delay,
so the 2-sample path delay (modulator register plus channel register) gives a 22.5° phase
error. That costs 8% of the signal amplitude.

## Measured behaviour

The end-to-end testbench runs the link at full size through a complex AWGN channel. It sets the
noise the way an Eb/No-mode AWGN block does when it treats every sample as a symbol: total
variance 4 / (2 · 10^(Eb/No/10)), which is σ = 1.0 full scale per component at 0 dB. With
8000 bits per point, the bit error rate after decoding was:

| Eb/No (dB) | −20 | −15 | −10 | −5 | 0 | 5 | 10 |
|---|---|---|---|---|---|---|---|
| BER | 0.377 | 0.272 | 0.113 | 4.3e-3 | 0 | 0 | 0 |

The reference results also show no errors from 0 dB up. Their error rates at low Eb/No are
about 256 times smaller than these, around 1.6e-3 at −20 dB. That is what counting every sample
of the upsampled bit streams would give: 255 of every 256 samples are zeros on both sides and
always match. This design counts only the samples that carry data.

## Where this design departs from or fills in the reference model

* **Fixed point throughout.** The reference model works in single precision. Here the carriers
  and modulator outputs are Q1.15, received samples are Q3.15 (range ±4, chosen so that noise down
  to about −5 dB is rarely clipped) and the filter works on exact integer sums.
* **Low-pass filter.** Its coefficients are not known. The 32-tap boxcar is this design's choice.
* **NCO word lengths.** The accumulator width (16 bits), quantiser width (12 bits) and dither
  generator are this design's choices. The increment 2048, offset 0, 4 dither bits, Q1.15 output
  and latency 6 are the reference settings. Which carrier (sine or cosine) drives which branch
  is also a choice: cosine drives in-phase.
* **Decoder test.** See the decoder section: the whole-syndrome test is the default, and the
  literal per-check test is available.
* **One clock with enables** replaces the three sample rates (sample, symbol, frame) of the
  reference model. The receiver decision phase (sample 216) is this design's choice. It is
  picked so that the total delay equals the reference model's 4096 samples.
* **PN generator.** The polynomial z^6 + z + 1 and the initial state 0 0 0 0 0 1 are the
  reference settings. Output from the last register with zero shift is this design's reading of
  the generator settings. The generator steps once per symbol instead of being zero-stuffed by
  an upsampler.
* **Error counting** compares only the data-carrying samples and starts when the 4096-sample
  delay line has filled. The counters are 32 bits and saturate. The BER division is left to
  the reader of the counters.
* **Not built:** the AWGN channel, the display and the host/FPGA link. These run on the host
  in the reference setup. The channel exists as a behavioural model for simulation
  (`tb/awgn_channel.sv`).

## Files

| file | block |
|---|---|
| `rtl/qam4_ldpc_pkg.sv` | code tables, types, `ldpc_encode`, `ldpc_syndrome`, `trial_mask` |
| `rtl/sdr_qam4_top.sv` | top: PN source, transceiver, z^-4096, error counter |
| `rtl/qam4_transceiver.sv` | everything between the data bit and the channel, both directions |
| `rtl/symbol_timing.sv` | sample/symbol counters, `sym_tick`, `rx_strobe` |
| `rtl/pn_sequence_generator.sv` | Fibonacci LFSR z^6 + z + 1 |
| `rtl/serial_to_parallel.sv`, `rtl/parallel_to_serial.sv` | S/P and P/S converters (W bits × 8 words) |
| `rtl/ldpc_encoder.sv`, `rtl/ldpc_decoder.sv` | QC-LDPC encoder and bit-flipping decoder |
| `rtl/nco.sv` | sine/cosine oscillator |
| `rtl/qam4_mapper.sv`, `rtl/qam4_modulator.sv` | polar mapper, modulator branch |
| `rtl/qam4_demodulator.sv`, `rtl/threshold_detector.sv` | mixer + boxcar + sampler, sign decision |
| `rtl/delay_line.sv`, `rtl/error_rate_calc.sv` | reference delay, error/bit counters |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/awgn_channel.sv` | behavioural complex AWGN channel with one-sample delay |

Top-level ports of `sdr_qam4_top`:

* `tx_i` / `tx_q`: Q1.15 outputs to the channel.
* `rx_i` / `rx_q`: Q3.15 inputs from the channel.
* `tx_bit` / `rx_bit` / `rx_valid`: the two bit streams, for display.
* `errors` / `bits`: the error and bit counts.
* Decoder status of the last frame: `dec_done`, `dec_err_detected`, `dec_syndrome_ok`,
  `dec_flips`.

Reset is synchronous and active high.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/qam4_ldpc_pkg.sv tb/tb_sdr_qam4_top.sv --top-module tb_sdr_qam4_top -o sim
./obj_dir/sim
```

Replace `tb_sdr_qam4_top` with any other `tb_*` module. The end-to-end test runs the top at
its default sizes:

1. 20 clean frames.
2. 16 frames with a forced symbol error each, all of which must be corrected.
3. The Eb/No sweep above.

It takes about 10 s. `tb_qam4_transceiver` checks the exact 4097-clock latency of every bit.
`tb_ldpc_decoder` checks both decoder variants against a behavioural model of the algorithm,
for all single errors and for random double and triple errors. It also counts the
corrected patterns among all double and triple errors.

Useful knobs:

* `OSR` on the top and on the transceiver: samples per symbol. It must stay at least about 80,
  so that the filter window and the 25-cycle decoder fit between the decision and the next tick.
* `FIR_TAPS`: keep it a multiple of 16 with the default carrier.
* `FULL_SYNDROME_TEST` on the transceiver and the decoder.
* `DELAY` on the top, which must equal 16 × OSR.
