# Single-stage FIR decimation filter for a 1-bit sigma-delta ADC

A sigma-delta modulator digitises audio as a stream of single bits at a high
rate. In the reference application, 3 MHz is 64 times the 46.875 kHz output word
rate. The modulator's quantisation noise is pushed up in frequency, out of the
band of interest. This design is the digital half of such an ADC. It low-pass
filters that bit stream and keeps one sample in 64, producing a 20-bit word per
output sample. All of this happens in one FIR stage:

* 2406 taps, linear phase (symmetric impulse response);
* a passband of 0–20 kHz with about ±0.01 dB ripple, and a stopband starting at 27 kHz;
* a dc gain of 2^20, so that the modulator's full-scale average of ±0.4714 maps to
  about ±494,000 codes, just inside the ±2^19 output range.

A 2406-tap filter at 3 MHz sounds expensive. Three observations make it cheap:

1. **Compute only the samples that are kept.** One output per 64 input bits
   means 2406 coefficient operations per output instead of per input bit. That is
   113 MHz worth of operations instead of 7.2 GHz.
2. **No multiplier.** The input is +1 or -1, so "multiplying" a coefficient means
   adding it or subtracting it.
3. **Use the symmetry.** h[k] = h[2405-k]. The two input bits that meet the same
   coefficient are added first. Their sum can only be +2, 0 or -2, so one
   coefficient fetch serves two taps. The accumulator adds 2·h, subtracts 2·h,
   or does nothing. That halves the work again, to 1203 accumulate steps per
   output, about 57 MHz.

What remains is one 30-bit accumulator and these memories:

* a 2406 × 1 bit data memory;
* a 1203 × 23 bit coefficient ROM.

## Block diagram

```
 in_valid,in_bit ──► decim_ctrl ── wr_addr ──► sample_mem (2406 x 1b) ─ smp_a, smp_b ─┐
                        │  ── rd_addr_a/b ──►                                          ▼
                        │  ── coef_addr ───► coef_rom (1203 x 23b) ── coef ─────► sym_mac (30b acc)
                        │  ── acc_clear, acc_en ─────────────────────────────────────►  │
                        └─ result_valid ─────────────────────────► out_round ◄────────────┘
                                                                       │
                                                     out_valid, out_data[19:0], out_sat
```

| file | module | role |
|---|---|---|
| `rtl/decim_pkg.sv` | `decim_pkg` | default sizes, pre-add encoding (`pair_sum_e`, `pair_sum()`) |
| `rtl/sample_mem.sv` | `sample_mem` | circular 1-bit data memory, one write and two synchronous read ports |
| `rtl/coef_rom.sv` | `coef_rom` | unique half of the impulse response, loaded from `rtl/filter2_coef.hex` |
| `rtl/sym_mac.sv` | `sym_mac` | pre-adder and add/subtract/hold accumulator |
| `rtl/out_round.sv` | `out_round` | round half up to 20 bits, clip beyond the 20-bit range |
| `rtl/decim_ctrl.sv` | `decim_ctrl` | input counting, address sequencing, overrun and fill tracking |
| `rtl/sd_decimator.sv` | `sd_decimator` | top level |

## How one output is computed

The data memory is a circular buffer. Every input bit is written at the write
pointer, which then advances. The buffer is exactly as deep as the filter is
long, so it always holds the newest 2406 bits. Writing bit *n* overwrites bit
*n*-2406.

An output is due on every 64th input bit. On the clock edge that writes that
bit, the controller does three things:

* it clears the accumulator;
* it points read port **a** at the bit just written (the newest one, tap 0);
* it points read port **b** at the next slot, which holds the oldest bit (tap 2405).

For the next 1203 cycles it reads coefficient *k* at the same time as the two
bits that share it. The two sample addresses then step apart: port a moves
backwards (newest − k), port b moves forwards (oldest + k), both wrapping at the
end of the buffer. The memories answer one cycle later, and the accumulator
takes that pair:

| samples | pre-add | accumulator |
|---|---|---|
| +1, +1 | +2 | acc += 2·h[k] |
| -1, -1 | -2 | acc -= 2·h[k] |
| +1, -1 or -1, +1 | 0 | unchanged |

**Why input bits may keep arriving during a computation.** New bits overwrite
the oldest slots, starting at the slot where port b started. Port b reads one
slot per clock. New bits arrive at most one per clock, and in normal operation
much more slowly. So each old bit has always been read before it is
overwritten. In the worst case, one bit per clock, the read and the write hit
the same slot on the same edge. The memory returns the old bit in that case.
Nothing has to be stalled or double-buffered.

## Number formats

| quantity | bits | format | notes |
|---|---|---|---|
| input sample | 1 | 1 = +1, 0 = −1 | modulator output |
| coefficient | 23 | signed 15.8 | integer part up to ±16383; largest tap +15773.11 |
| accumulator | 30 | signed 22.8 | bits 21..0 integer, 8 fraction bits |
| output | 20 | signed integer | ±524,287; 1 LSB ≈ 1 ppm of the input range |

Every coefficient carries 8 bits below the integer point, because rounding the
taps to integers would destroy the stopband. The filter's gain puts the
coefficients in the range of roughly −3300 to +15700, so integer taps would have
only 14–15 bits of precision. The extra bits bring them to 23 bits.

The accumulator has the output's 20 integer bits, two **guard bits** (20 and 21)
and the 8 fraction bits. Any partial sum is bounded by the sum of the absolute
coefficient values: 2.042·10^6 for the table shipped here. That is below 2^21,
so the accumulator can never overflow, whatever the input. No overflow
detection is needed inside the loop.

The output is `floor(acc/256 + 1/2)`, which rounds half up. The dc gain of 2^20
leaves headroom against offsets, but a sufficiently strong input (for example,
every bit +1) gives a sum beyond ±2^19. `out_round` then clips to +524,287 or
−524,288 and raises `out_sat`.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `in_valid` | in | 1 | `in_bit` carries a modulator bit this cycle (at most one per clock) |
| `in_bit` | in | 1 | modulator output, 1 = +1, 0 = −1 |
| `out_valid` | out | 1 | one-cycle pulse per output word |
| `out_data` | out | 20 | output word, two's complement, held until the next one |
| `out_sat` | out | 1 | the word was clipped |
| `busy` | out | 1 | an output computation is in progress |
| `overrun` | out | 1 | sticky: an output was dropped because the previous one was still busy |

* **Clock rate.** Take the clock edge that writes a 64th bit as edge 0. The
  accumulator is busy until edge N/2+1 = 1204, so the next 64th bit may arrive on
  edge 1205 at the earliest. The clock must therefore run at least
  1205/64 = 18.83 times the input bit rate: 56.5 MHz for a 3 MHz modulator. If
  bits come faster, outputs are dropped and `overrun` is set. The data in the
  memory are never corrupted.
* **Latency.** `out_valid` rises on edge N/2+2 = 1205 after the edge that took
  the 64th bit. The filter itself adds a group delay of (N−1)/2 = 1202.5 input
  samples, as any linear-phase FIR does.
* **Start-up.** The data memory is not reset. Outputs are suppressed until 2406
  bits have been written after reset. The first output therefore follows input
  bit 2432 (the first multiple of 64 at or after 2406).
* **Decimation phase.** An output is computed after input bits 64, 128, 192, …
  counted from reset.

## The coefficient table

`rtl/filter2_coef.hex` holds h[0]…h[1202], one 23-bit two's-complement word per
line in hexadecimal. The other half of the response is its mirror image. The
table is a near-equiripple low-pass built to the following specification:

* 2406 taps at fs = 3 MHz;
* passband 0–20 kHz, stopband 27 kHz–1.5 MHz, stopband error weighted 4000 times
  the passband error;
* minimax error, reached by iteratively reweighted least squares (Lawson's
  method);
* scaled so that all 2406 taps sum to 2^20;
* each tap rounded to the nearest 1/256.

The stopband edge follows from the decimation. After decimation a signal at
f aliases to 46.875 kHz − f. Aliases stay outside the 0–20 kHz band as long as
the stopband starts by 26.875 kHz. The table uses 27 kHz, so aliases from
26.875–27 kHz land in 19.875–20 kHz with less than full attenuation.

Measured on the table:

| property | value |
|---|---|
| dc gain | 120.41 dB |
| passband ripple | ±0.0104 dB |
| stopband attenuation | 126.7 dB below dc (130.5 dB before rounding to 1/256) |
| largest tap | +15773.11 |
| smallest tap | −3344.02 |
| sum of \|h\| | 2.042·10^6 |

The target was 135 dB of stopband attenuation. It is meant to push the
modulator's tones near fs/2 some 30 dB below the in-band noise. This table falls
about 8 dB short of it: about 4.5 dB is lost in the design and 4 dB in rounding the
taps to 1/256. A
better design can replace the file without touching the RTL, for example a true
Remez solution or rounding that is optimised rather than nearest. It must meet
these conditions:

* same format;
* N/2 lines;
* sum of |h| below 2^21.

Point `COEF_FILE` at the new file, or overwrite this one. The path is relative,
so simulate from the directory that contains `rtl/`. The table is loaded with
`$readmemh`, so the synthesis tool must honour `$readmemh` initialisation of a
ROM. A front end that ignores it synthesises an empty ROM. Check the ROM in the
netlist.

## Parameters

`sd_decimator` parameters, with their defaults from `decim_pkg`:

| parameter | default | meaning |
|---|---|---|
| `N_TAPS` | 2406 | filter length. Must be even. The data memory holds `N_TAPS` bits; the ROM holds `N_TAPS/2` words. |
| `DECIM` | 64 | one output per `DECIM` input bits |
| `COEF_W` | 23 | coefficient width, including `FRAC_W` fraction bits |
| `FRAC_W` | 8 | fraction bits of coefficients and accumulator |
| `ACC_W` | 30 | accumulator width; must cover sum of \|h\| |
| `OUT_W` | 20 | output width |
| `COEF_FILE` | `"rtl/filter2_coef.hex"` | coefficient table |

The same datapath runs a longer filter. A 5612-tap version with a 135 dB
stopband from 23 kHz would need:

* `N_TAPS = 5612` and a table of 2806 words;
* 2808 clocks per output, i.e. a clock of 131.6 MHz for a 3 MHz modulator.

No such table is supplied.

## What this design chooses for itself

The filter structure, sizes, number formats, rounding point and guard bits are
the reference design's. Its coefficient values are not published, so the table
is a stand-in with the same specification (see above). The following were
chosen here:

* the `in_valid` strobe and the `out_valid` pulse;
* the asynchronous reset, and the unreset data memory with outputs suppressed
  until it is full;
* the read order (oldest bits first);
* round half up, and clipping with `out_sat`;
* the overrun rule (drop the new output, set a sticky flag);
* synchronous memory reads, which add one pipeline stage;
* no support for odd filter lengths (a centre tap).

Not part of the RTL:

* the analog sigma-delta modulator. Its 1-bit output is the `in_bit`/`in_valid`
  port; its loop has a feedback gain g = 3, so the average output is v_in/3.
* the RC anti-aliasing filter in front of it.

## Simulation

All testbenches check themselves and end with a line
`TB_RESULT checks=<n> failures=<m>`. Run them from the directory that holds
`rtl/` and `tb/`, because the coefficient file is read by relative path:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/decim_pkg.sv tb/tb_sd_decimator.sv --top-module tb_sd_decimator -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_sd_decimator` | Full size, end to end. See the list below. |
| `tb_sine_workload` | Full size. A 1 Vrms, 5 kHz sine through a second-order modulator model with gain 1/3. Each of 100 outputs must match the ideal sine (peak ≈ 494,000 codes, delayed by 1202.5 + 1 samples) within 0.3 % of full scale. Both peaks must be within 1 %, and no output may clip. |
| `tb_sample_mem` | Both read ports against a shadow copy, including read-during-write. |
| `tb_coef_rom` | Read timing; table properties (sum = 2^20, largest and smallest tap, sum of \|h\| < 2^21, centre tap largest). |
| `tb_sym_mac` | Accumulator against an integer model; excursions near ±2^21; clear over enable. |
| `tb_out_round` | Rounding and clipping against a real-number model at the halfway points and the limits. |
| `tb_decim_ctrl` | A 10-tap, decimate-by-4 controller against a circular-buffer model: every address, enable and result strobe, priming and overrun. |

`tb_sd_decimator` compares every output bit-exactly, in value, flag and arrival
edge, with a plain 2406-multiply FIR model. That model does not use the
symmetry trick. The test runs several phases:

* random bits;
* a modulated dc input, also checked against the ideal gain;
* long runs of +1 and −1 that force clipping;
* 64 bits every 1205 clocks, the highest sustained rate, which must not overrun;
* a burst of one bit per clock that forces overrun.

It counts each mechanism and fails if any never happened:

* all three pre-add cases;
* round-up;
* positive and negative clipping;
* suppressed start-up outputs;
* dropped outputs.

`tb/sd_modulator_model.sv` is the behavioural modulator used by the two
full-size tests. It is a first- or second-order loop written with real numbers.
It is not synthesizable and is not a model of any particular modulator.
