# Multiplier-less half-band decimator using distributed arithmetic

This is a decimate-by-2 filter for 16-bit samples that uses no multipliers.
A 67-tap (order 66) equiripple half-band low-pass removes everything above a
quarter of the input rate, and then every second sample is dropped. The
filter is split into its two polyphase halves, so only the outputs that are
kept are ever computed. The half that does real work has 34 coefficients and
is computed by **distributed arithmetic (DA)**. DA replaces the 34
multiply-accumulates with look-up tables of pre-computed coefficient sums
and a shift-accumulator. On an FPGA those tables are ordinary logic LUTs.

The architecture is a published FPGA design (a half-band polyphase
decimator with DA and an (8 8 8 8 2) LUT partitioning, 16-bit precision).
That design was mapped to a Spartan-3E at about 64 MHz. This RTL is a
new implementation of that architecture. The coefficient values, the
interface, the timing and the number formats are this implementation's own
choices. The section *Departures and open points* lists them.

## What one output is

With input x at rate Fs (48 kHz in the reference design) and filter h[0..66],
the decimated output is

    y[m] = sum_{n=0..66} h[n] x[2m-n]

A half-band filter has h[33] = 0.5, and every other odd-indexed coefficient
is exactly zero. Grouping the taps by the parity of n gives

    y[m] =  sum_{k=0..33} h[2k] x[2m-2k]      even phase: 34 taps, DA
          + 0.5 x[2m-33]                      odd phase: one tap, a shift

The odd phase formally holds the 33 coefficients h[1], h[3], ..., h[65], but
32 of them are zero. So that branch is just a 17-entry delay line of
odd-indexed samples and a one-bit shift. All the arithmetic sits in the even
phase.

## Distributed arithmetic in the even phase (`da_fir`)

Write each 16-bit two's-complement sample as bits, x = -x_15 2^15 + sum_{b<15} x_b 2^b.
The 34-term inner product then becomes a sum over bit positions:

    y = sum_{b=0..14} 2^b L(b) - 2^15 L(15),    L(b) = sum_k h_k * x[k]_b

L(b) depends only on the 34 bits x[0]_b ... x[33]_b, one bit of every sample.
It could be read from a table addressed by those bits. A single table would
need 2^34 words, so the taps are split into five groups: taps 0-7, 8-15,
16-23, 24-31 and 32-33. Each group has its own table of 2^8 (or 2^2) words,
and L(b) is the sum of five table reads. Word `a` of a table holds the sum of
the group's coefficients whose address bit is 1. For a 4-input example with
coefficients 0.45, -0.65, 0.15, 0.55, the words 0..15 are
0, 0.45, -0.65, -0.20, 0.15, 0.60, -0.50, -0.05, 0.55, 1.00, -0.10, 0.35,
0.70, 1.15, 0.05, 0.50. Address bit 0 selects the first coefficient. The
`da_lut` testbench checks exactly this table.

One bit position is processed per clock, LSB first:

1. A 4-bit counter `bit_cnt` picks bit b of all 34 stored samples. This
   34-bit slice addresses the five tables (`da_lut`, combinational ROMs
   whose contents are computed at elaboration from the coefficient array).
2. The five 19-bit words are added into a 22-bit L(b).
3. `da_shift_acc` computes `acc = acc/2 + L(b) * 2^15`. On the last step
   (b = 15, the sign bit) it subtracts instead of adding. This is the +/-
   unit with sign control S and the 2^-1 feedback of the classic DA diagram.

L(b) enters 15 places up and is shifted right at most 15 times. So no shift
ever drops a non-zero bit, and after 16 steps the 38-bit accumulator holds
the exact inner product, scaled by 2^15 per unit (Q.30 for Q1.15 data and
coefficients). No rounding happens inside the filter. The only rounding is
at the output.

Memory cost: four 256 x 19-bit tables and one 4 x 19-bit table. A table for
every 8 taps trades table size (it grows as 2^K) against the number of words
to add.

## Coefficients (`decim_pkg`)

The coefficients come from an equiripple (Parks-McClellan) half-band design
at Fs = 48 kHz, with pass band 0-9.6 kHz and stop band 14.4-24 kHz. They are
built with the usual one-band method:

- design a 34-tap low-pass g with a single band 0..0.4 cycles/sample;
- set h[2k] = g[k] / 2 and h[33] = 0.5;
- round each coefficient to signed Q1.15: `e0[k] = round(32768 * h[2k])`.

Before rounding, this reaches about -110 dB in the stop band. The centre
taps are 0.317 and -0.102. The step response overshoots about 7 %. Rounding
to 16 bits limits the stop band to roughly -77 dB. The 34 even-phase values
are in `decim_pkg::H_EVEN` and are symmetric (e0[k] = e0[33-k]). The two
outermost ones round to 0.

To use another filter, replace `H_EVEN` (any 34 values). The LUT contents
follow automatically. The odd-phase branch assumes a true half-band filter
(centre tap 0.5, all other odd taps zero).

## Interface and timing (`da_decimator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid`, `in_ready` | in / out | 1 | input handshake; a sample is taken when both are 1 |
| `in_data` | in | 16 | signed Q1.15 input sample |
| `out_valid` | out | 1 | one-clock pulse per output |
| `out_data` | out | 16 | signed Q1.15 output; holds until the next output |
| `out_sat` | out | 1 | the output was clipped to the 16-bit range |

- `polyphase_commutator` sends the 1st, 3rd, 5th, ... samples after reset to
  the even (DA) phase and the others to the odd phase. Each even sample
  starts one output, y[m], formed when x[2m] arrives.
- The DA section is busy for 16 clocks after it takes a sample. If the next
  sample due to it arrives during that time, `in_ready` is low and the
  source must hold the sample. Samples for the odd phase are always taken.
  Maximum input rate: 2 samples per 17 clocks. At a 64 MHz clock that is
  about 7.5 Msample/s, far above a 48 kHz audio-rate input.
- `out_valid` comes 18 clocks after the edge that took the even sample:
  1 to load, 16 bit steps, 1 in `round_sat`.
- When an even sample is taken, the odd branch latches its centre term
  (0.5 x[2m-33]). Odd samples arriving during the computation therefore do
  not disturb it.
- `round_sat` adds both terms, rounds half up to Q1.15 and saturates.
  Saturation matters: a full-scale step overshoots by about 7 %.
- Reset clears every stored sample. The first 33 outputs therefore see zeros
  for the samples before reset.
- The top asserts the input handshake rule: an offered sample stays
  offered, unchanged, until it is taken. `da_fir` asserts that it never takes
  a sample while busy.

## Files

| file | contents |
|---|---|
| `rtl/decim_pkg.sv` | widths, coefficients, LUT partitioning |
| `rtl/da_decimator.sv` | top: commutator, even and odd phase, output stage |
| `rtl/polyphase_commutator.sv` | deals samples to the two phases, applies back-pressure |
| `rtl/da_fir.sv` | 34-tap bit-serial DA section: sample register, five LUTs, adder, control |
| `rtl/da_lut.sv` | one DA table (2^K words, computed from the coefficients) |
| `rtl/da_shift_acc.sv` | add/subtract shift-accumulator |
| `rtl/odd_phase_branch.sv` | odd phase: 17-sample delay line and x 0.5 |
| `rtl/round_sat.sv` | final sum, rounding, saturation |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_decim_freq_response.sv` | magnitude response at the 48 kHz / 63.857 MHz operating point |

## Verification

Each testbench checks its module against values it works out on its own,
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_da_decimator` runs the top at its default size. It computes the
  67-tap filter directly (multiply and add, then round and clip) and
  compares every output bit for bit, including the latency of 18 clocks. It
  applies an impulse (the outputs must be the 34 even-phase coefficients),
  a full-scale step (must settle at full scale and clip on the overshoot),
  a 2 kHz tone (must come out with the 33-sample delay, within 4 LSB) and an
  18 kHz tone (must stay within 5 LSB of zero). It ends with 2000 random
  samples, about half of them offered back to back to force stalls. It
  counts even samples, odd samples, outputs, stalls and saturated outputs,
  and fails if any count is zero.
- `tb_decim_freq_response` feeds tones at one sample per 1330.4 clocks,
  which is 48 kHz at a 63.857 MHz clock. It measures the output amplitude
  by correlation over 240 outputs. Measured gains: 0.99989, 0.99996 and
  0.99993 at 1, 5 and 9 kHz; -81 dB at 18 kHz and -94 dB at 22 kHz. The
  15 kHz tone gives exactly zero output. It also checks that the source is
  never stalled at this rate.
- `tb_da_fir`: random and full-scale samples against direct multiplication,
  latency 17 clocks, `in_ready` low for exactly 16 clocks.
- `tb_da_lut`: the 16-word example table above, and all 256 words of a
  table of the real filter.
- `tb_da_shift_acc`, `tb_odd_phase_branch`, `tb_polyphase_commutator`,
  `tb_round_sat`: random stimulus against reference models, including
  extreme values and clipping.

Run one testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl rtl/decim_pkg.sv \
        tb/tb_da_decimator.sv --top-module tb_da_decimator
    ./obj_dir/Vtb_da_decimator

Each one finishes within a few seconds.

## Departures and open points

- **No symmetric pre-adder.** The coefficients are symmetric, so the two
  samples sharing a coefficient could be added first. That would halve the
  DA inputs to 17. The reference design's (8 8 8 8 2) split covers all 34
  coefficients, so that is what is built, even though the reference design
  also calls its structure "symmetric direct form".
- **Bit-serial, one bit per clock.** DA can also be built with several bits
  per clock or fully parallel. The reference design does not say which
  variant it used. The structure here (one table read into an add/subtract
  accumulator with a 1/2 feedback) is the textbook serial form.
- **Odd phase as a shift.** Only the 34-coefficient phase is described as
  using DA tables. The 33-coefficient phase is built as a delay and a shift,
  which is exact for a half-band filter.
- **Own coefficients.** The reference design's values are not available.
  The ones here match its plotted response in order, type, pass and stop
  band, and the -110 dB floor before rounding. After rounding to 16 bits the
  floor is about -77 dB, so the -110 dB of the floating-point design is not
  reached at 16-bit precision.
- **Own interface.** The valid/ready handshake, the synchronous reset, the
  LSB-first bit order, round-half-up and saturation, and all internal widths
  are this design's choices. The widths are sized so that nothing can
  overflow before the output stage.
- **Not checked:** clock rate and FPGA resource use. The reference design
  reports 63.9 MHz, 566 slices and 515 flip-flops on a Spartan-3E. This RTL
  holds 51 x 16 sample bits plus about 100 other register bits. The sample
  register could map to shift-register LUTs. Neither count was measured
  with FPGA tools. The multiplier-based decimator the reference design
  compares against is not included.
