# Quarter-wave direct digital frequency synthesizer

A direct digital frequency synthesizer (DDS) turns a clock into a digital sine
wave whose frequency is set by a number, the frequency tuning word `M`. A
phase accumulator adds `M` to itself on every clock; its value is the phase of
the sine, and each time it overflows one period is complete. A look-up table
converts the phase to a sine sample, which an external DAC and low-pass filter
turn into the analogue output.

The point of this design is the size of that table. A sine wave is symmetric:
the second quarter of a period is the first one mirrored in time, and the
second half is the first half negated. The table therefore holds only the
first quarter period, and a small piece of address-forming logic rebuilds the
other three quarters from it. That takes the table down to 25 % of a
full-period table for the same phase and amplitude resolution.

## Output frequency

With an `n`-bit accumulator clocked at `F_clk`:

    F_out = M * F_clk / 2^n        frequency step = F_clk / 2^n

Here `n = 16`. At a 16.6 MHz clock the step is 253.3 Hz, `M = 10` gives
2532.96 Hz and `M = 20` gives 5065.92 Hz: the output frequency is exactly
proportional to `M`. Changing `M` changes the rate of the phase, not the phase
itself, so frequency switches are phase-continuous. The highest useful word is
below `2^15` (Nyquist); above it the output aliases.

## Data path and timing

    d1 ──► phase_register ──q1──► phase_accumulator ──q2──► quarter_wave_lut ──► output reg ──► out
                                    (adder + register,          (quarter_sine_rom
                                     wraps mod 2^16)             inside)

| stage | module | register | what it holds |
|---|---|---|---|
| 1 | `phase_register` | `q1` | tuning word, loaded from `d1` every clock |
| 2 | `phase_accumulator` | `q2` | phase; `Result = q2 + q1` is the adder output |
| 3 | `quarter_sine_rom` (in `quarter_wave_lut`) | ROM data, sign bit | table magnitude and quadrant sign |
| 4 | `dds1` | `out` | signed sample towards the DAC |

A word placed on `d1` is in `q1` after one clock and first moves `q2` on the
clock after that. A phase value in `q2` appears at `out` two clocks later.
Everything runs on one clock with no stalls or handshakes: one sample per
clock. `reset` is asynchronous and active high; it clears `q1`, `q2`, the sign
stage and `out`. The ROM's read register has no reset; hold `reset` across at
least one clock edge and the first sample after reset is the table entry for
phase 0.

## Rebuilding a full period from a quarter

The 16-bit phase is split as follows (default sizes):

    bit  15 14 | 13 ............ 4 | 3 ... 0
       quadrant|  index (10 bits)  | dropped

| quadrant | phase range | table address | sign |
|---|---|---|---|
| 0 | 0 .. π/2 | `index` (reading forwards) | + |
| 1 | π/2 .. π | `~index` (reading backwards) | + |
| 2 | π .. 3π/2 | `index` | − |
| 3 | 3π/2 .. 2π | `~index` | − |

Reading backwards is done by inverting the index bits, which gives address
`1023 − i` for position `i`. For this mirror to be exact, the table is not
sampled at the step edges but at their centres:

    table[i] = round((2^15 − 1) · sin((2i + 1) · π / 4096)),   i = 0 .. 1023

so the 4096 samples of the rebuilt period are `sin(2π (p + ½) / 4096)` for
`p` = phase bits 15..4. Sampling at `i · π/2048` instead would make
quadrants 1 and 3 skip one entry and repeat another where the mirror meets.
With centre sampling the waveform has no zero sample. It is exactly odd:
`s(p + 2048) = −s(p)`.

The sign is `phase[15]`. It is delayed one register so that it lines up with
the registered ROM read, and the magnitude is then negated in two's
complement. `out` ranges over ±32767.

The low four phase bits do not reach the table (phase truncation). They
still count: they set the frequency resolution. Dropping them creates
spurious tones. In the worst case these lie about 6 dB × (index + quadrant
bits) = 72 dB below the carrier.

## Table contents

The table is computed at elaboration by a constant function in
`quarter_sine_rom`. No data file is involved. The function evaluates the
Taylor series of sin to the x^15 term in 64-bit fixed point with 28
fraction bits, and the result is rounded to `AMP_W` bits. Every entry agrees
with a floating-point evaluation to within one LSB. The table is written as an
array read on a clock edge, so FPGA tools map it onto a block memory (1024 ×
15 = 15,360 bits at the default sizes).

## Parameters

Defaults live in `dds_pkg`. Each module also takes them as parameters, and
`dds1` passes them down.

| parameter | default | meaning |
|---|---|---|
| `PHASE_W` | 16 | width of the tuning word, accumulator and phase bus |
| `SAMPLE_W` | 16 | width of the signed output sample |
| `QADDR_W` | 10 | address bits of the quarter-wave table (2^QADDR_W entries) |
| `AMP_W` | 15 | magnitude bits per table entry |

The rules are `QADDR_W + 2 ≤ PHASE_W` and `AMP_W + 1 ≤ SAMPLE_W`. Elaboration
stops with an error otherwise. Each extra `QADDR_W` bit doubles the table and
lowers the truncation spurs by about 6 dB.

## Top-level ports (`dds1`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock |
| `reset` | in | 1 | asynchronous, active high |
| `d1` | in | 16 | frequency tuning word `M` |
| `out` | out | 16 | signed sine sample for the DAC |
| `q1` | out | 16 | registered tuning word |
| `Result` | out | 16 | adder output, the next phase |
| `q2` | out | 16 | current phase |
| `address` | out | 16 | table address, equal to `q2` |

The internal buses are brought out for observation, as in the reference
design's top level. That gives two 1-bit inputs plus six 16-bit buses: 98 pins.

## What follows the reference design and what does not

The following come from the reference design:
- the three digital blocks: tuning-word register, accumulator (adder plus
  feedback register) and ROM table;
- the 16-bit register and accumulator widths;
- the quarter-wave scheme: forwards, backwards, then both negated;
- the top-level signal names and the output register;
- the frequency formula, and the aim of a spurious-free dynamic range of
  about 73 dB.

The following are this implementation's own choices:
- the table size (1024 entries) and the 15-bit magnitude;
- centre sampling of the table;
- the two's-complement output format;
- asynchronous active-high reset;
- the pipeline latencies.

The reference design's waveforms show 8-bit-scale output values, such as 254
near a peak. They suggest a smaller amplitude, and possibly an unsigned
format. That format is not specified, so the full 16-bit signed range is used
here.

The reference design reports output frequencies of 115,758 Hz (`M = 10`) and
218,851 Hz (`M = 20`) at 16.6 MHz. These do not follow from the frequency
formula with a 16-bit accumulator, which gives 2,533 Hz and 5,066 Hz. This
design follows the formula.

Out of scope: the DAC, the analogue low-pass filter and the reference clock
source. `out` is the digital interface to them.

## Verification

Each testbench checks its block against values computed independently in the
testbench, and each ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `phase_register_tb` | one-clock load, hold between edges, asynchronous reset |
| `phase_accumulator_tb` | `Result` and `q2` against a wide reference sum for random and extreme words; overflow happens; exactly 10 wraps in 2^16 clocks at `M = 10` |
| `quarter_sine_rom_tb` | every entry against floating-point sin (±1 LSB); monotonic; one-clock read latency |
| `quarter_wave_lut_tb` | all 65,536 phase words, in scrambled order, against a full-period floating-point sine (±1 LSB); exact odd and mirror symmetry; all four quadrants exercised |
| `dds1_tb` | full design at default sizes and a 16.6 MHz clock (details below) |
| `dds1_sfdr_tb` | 65,536-point FFT of the output over one full accumulator cycle, for `M` = 10, 20, 1001 and 4661 (details below) |

`dds1_tb` compares every clock with a cycle model. It checks the latency, the
measured output frequency for `M` = 10, 20 and 4660 against the formula, and
that doubling `M` doubles the frequency. It also checks a phase-continuous
word change and an asynchronous reset in mid-run. It counts overflows, word
changes, resets and reads per quadrant, and fails if any of them never
occurred.

`dds1_sfdr_tb` checks that the carrier falls in bin `M` and that the
spurious-free dynamic range is at least 70 dB. It measures 71.3 to 72.2 dB.

Measured frequencies at 16.6 MHz:

| M | formula | measured |
|---|---|---|
| 10 | 2532.96 Hz | 2532.97 Hz |
| 20 | 5065.92 Hz | 5066.21 Hz |

Simulating with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --timescale 1ns/1ps --top-module dds1_tb \
              -y rtl -y tb +libext+.sv -Irtl rtl/dds_pkg.sv tb/dds1_tb.sv -o sim
    ./obj_dir/sim

Use the same command for any other testbench, replacing `dds1_tb` in both
places. The package file must come first on the command line. The
`--timescale` option gives the RTL files, which carry no `timescale`, the
same time unit as the testbenches.
