# 16-QAM downlink modem for a 26 GHz fixed wireless access system

This is a complete digital 16-QAM modem for the downlink of a point-to-multipoint
broadband wireless local loop, written in synthesizable SystemVerilog. The base station
sends a continuous MPEG-2 transport stream. The modem protects it with DVB-C style channel
coding: energy-dispersal scrambling, Reed-Solomon (204,188) and a convolutional interleaver
of depth 12. The coded bytes are mapped onto a differentially coded 16-QAM constellation,
shaped by a square-root raised-cosine filter (roll-off 0.35) and modulated digitally onto a
40.96 MHz IF carrier. The subscriber side does the reverse. The hard part is the chain of
synchronisation loops:
- gain control;
- Gardner symbol timing recovery with a four-point interpolator;
- a carrier frequency loop working at one sample per symbol;
- a decision-directed carrier phase loop with an 8-bit synthesizer.

The top level, `modem_top`, puts the transmitter and the receiver side by side. Their digital
IF ports (`dac_out`, `adc_in`) can be looped back through a channel model. The end-to-end
testbench does exactly that.

## Rates and clocking

| quantity | value | where it comes from |
|---|---|---|
| symbol rate | 5.12 Msymbol/s | 20.48 Mbit/s / 4 bit per symbol |
| data rate (gross, on the channel) | 20.48 Mbit/s | modem specification |
| IF carrier | 40.96 MHz | modem specification |
| system clock | 163.84 MHz = 32 x symbol rate | design choice |
| baseband sample rate | 4 samples/symbol = 1 per 8 clocks | modem specification (4x) / design choice (8 clocks) |
| DAC/ADC rate | one sample per clock | design choice |

The carrier is exactly a quarter of the clock, so both carrier oscillators run with a phase
increment of 2^30 out of 2^32. The increments are ports (`tx_nco_inc`, `rx_nco_inc`). A
receive carrier offset is set by changing `rx_nco_inc`. The specification quotes both
"up to 20 Mbit/s" and a 20.24 Mbit/s prototype. This design runs at 20.48 Mbit/s, which
gives the round clock ratios above. The net MPEG rate is 20.48 x 188/204 = 18.87 Mbit/s.

Everything runs from one clock with one asynchronous active-low reset (`rst_n`). The
transmitter is paced from its DAC end:
1. The up-converter produces a sample tick every 8 clocks.
2. The pulse shaper takes one symbol every 4 ticks.
3. The differential encoder pulls a byte from the interleaver every two symbols.
4. The interleaver, RS encoder and scrambler pass that pull back to the MAC as `tx_ready`.

The MAC must present a byte whenever `tx_ready` is high. If it does not, `tx_underrun`
pulses and a zero symbol is sent.

## Transmit chain

| stage | module | what it does |
|---|---|---|
| scrambler | `sync_randomizer` | XORs every byte except sync bytes with the PRBS 1+X^14+X^15, register loaded with 100101010000000. The sync byte of every 8th packet is inverted (0x47 to 0xB8), and the PRBS restarts after it. |
| RS encoder | `rs_encoder` | Systematic RS(204,188) over GF(256), field polynomial x^8+x^4+x^3+x^2+1, generator roots alpha^0..alpha^15. It is a 16-stage LFSR. 188 symbol ticks take data and 16 emit parity. |
| interleaver | `conv_interleaver` | 12 branches with delays 0, 17, ..., 187 bytes, all in one 1122-byte RAM. Branch 0 is re-aligned on every sync byte. |
| differential encoder | `diff_encoder` | Splits bytes into two 4-bit symbols, high nibble first. The two quadrant bits are a quadrant number that is accumulated mod 4 when `diff_en` is set. |
| mapper | `qam_mapper` | Maps the 4 bits to 16-QAM levels (-3,-1,1,3) per rail; see below. |
| pulse shaper | `pulse_shaper` | 41-tap, 7-bit SRRC interpolator built as a polyphase filter over the last 11 symbols. |
| up-converter | `up_converter` | Zero-order hold to the clock rate, then I*cos - Q*sin from a 256-entry sine table, saturated to 10 bits. |

### Constellation and the 90-degree ambiguity

The quadrant bits {A,B} are Gray numbered counter-clockwise: 00, 10, 11, 01 = quadrants 0..3.
The two low bits select the point inside the first quadrant: 00 gives (1,1), 01 gives (3,1),
10 gives (1,3) and 11 gives (3,3). Every other quadrant is the first one rotated by 90
degrees times its number. A 90-degree rotation of the constellation therefore changes only
the quadrant number, by a constant. The carrier loops cannot tell the four rotations apart.
With differential coding on, the quadrant difference between consecutive symbols carries the
data, so that ambiguity is harmless. The mod-4 addition is the arithmetic form of the DVB-C
Boolean rule for the two most significant bits.

## Receive chain

| stage | module | rate | what it does |
|---|---|---|---|
| down-converter | `down_converter` | clock in, 1/8 out | Mixes with cos/-sin and sums 8 products (boxcar decimator). With the carrier at fs/4, the image at 2fc falls in the boxcar's null. |
| matched filter | `matched_filter` | 4/symbol | The same 41-tap SRRC, direct form. |
| AGC | `agc` | 4/symbol | Gain detector r_c = (\|I\|+\|Q\|)/sqrt(2) with 181/256 for 1/sqrt(2). Integrates beta*(x_ref - r_c) and sets gain = lambda_ref + integrator, with 8 fraction bits. It settles where mean r_c = `X_REF` = 330, which puts 16-QAM level 1 near 128. |
| timing recovery | `symbol_timing_recovery` | 4 in, 1 out | See below. |
| frequency recovery | `freq_recovery` | 1/symbol | See below. |
| phase recovery | `phase_recovery` | 1/symbol | See below. |
| demapper | `qam_demapper` | 1/symbol | Slices at 0 and +-2 levels (`UNIT` = 128 per level) and inverts the mapping. |
| differential decoder | `diff_decoder` | 1/symbol | Quadrant number difference mod 4. |
| frame sync | `frame_sync` | 1/symbol | Hunts for 0x47/0xB8 in the nibble stream and checks that it repeats every 408 symbols. It locks after 3 hits, drops after 4 misses, and then emits bytes with a start-of-codeword flag. |
| deinterleaver | `conv_deinterleaver` | bytes | Branch delays 187, ..., 17, 0. Start flags are withheld until the RAM has filled once (2244 bytes). |
| RS decoder | `rs_decoder` | bytes | Corrects up to 8 byte errors per codeword. See below. |
| descrambler | `derandomizer` | bytes | Restarts the PRBS on 0xB8 and restores 0x47. Bytes are flagged in `rx_err` until the first 0xB8 and for codewords the RS decoder could not correct. |

### Symbol timing recovery

The interpolator keeps the last four samples. It computes four cubic (Lagrange)
interpolants in parallel for the fractional positions 0, 1/4, 1/2 and 3/4 between the
middle two samples. The position 1 is also available, because it is the next sample itself.
Coefficients, in 1/128:

| mu | x(-1) | x(0) | x(1) | x(2) |
|---|---|---|---|---|
| 0 | 0 | 128 | 0 | 0 |
| 1/4 | -7 | 105 | 35 | -5 |
| 1/2 | -8 | 72 | 72 | -8 |
| 3/4 | -5 | 35 | 105 | -7 |

The sample spacing is T/4, so the positions are T/16 apart, and the worst-case rounding
error is T/32.

The controller is a 16-bit modulo-1 counter `eta`. It is decremented by W = 1/2 + v on every
sample. When it would wrap, a strobe is due, with mu = eta/W rounded to the nearest quarter.
Strobes alternate between mid-symbol and on-time points.

At every on-time strobe the Gardner detector forms
`e = I_mid (I_n - I_{n-1}) + Q_mid (Q_n - Q_{n-1})`, which is positive when the strobes are
late. A proportional-integral filter turns it into v:
- proportional part e / 2^`KP_SH`, with `KP_SH` = 4;
- integral part sum(e) / 2^`KI_SH`, with `KI_SH` = 16.

The integral part absorbs the clock-rate offset. Rate matching is implicit: only on-time
strobes leave the block, so the output runs at the transmitter's symbol rate.

### Carrier frequency recovery

The frequency loop works on one sample per symbol, after timing recovery. It is a
phase-locked loop with a mod-pi/2 detector:
1. The input is derotated by the loop phase phi, using a 1024 x 10-bit sine table.
2. A quadrant (sign) slicer picks the 45-degree reference point.
3. The angle of Y times the conjugate of that point is taken by a 14-step CORDIC. This is the
   carrier angle modulo pi/2, centred on zero.
4. A PI filter updates phi. The integral branch, shown on `freq_word`, holds the carrier
   rotation per symbol in units of 2^-24 turns.

For the corner and inner points the detector output is the exact phase error. The middle-ring
points add +-26.6 degrees of zero-mean noise, which the loop averages out. The detector itself
can measure up to pi/4 per symbol (f_R/8). The loop constants (`KP_SH`=3, `KI_SH`=12) are
chosen for offsets of tens of kHz, up to about 0.01 turn per symbol (51 kHz). That range is
pulled in within a few thousand symbols. Larger offsets are not pulled in by this loop. There
is no separate acquisition mode.

### Carrier phase recovery

The phase loop is decision directed. Its steps:
1. Z = x e^{-j theta}.
2. Take the nearest 16-QAM point d.
3. Form e = Im{Z d*}/|d|^2. The normalisation uses a three-entry reciprocal table, because
   |d|^2 is 2, 10 or 18.
4. Run a second-order loop filter with gains K1 and K2.
5. A phase accumulator drives a 256-entry SIN/COS ROM. Only the top 8 bits address the ROM,
   so the synthesized phase has a resolution of 2*pi/256 (1.4 degrees).

The accumulator carries 8 more fraction bits so that small corrections add up. This loop
removes the static phase left by the frequency loop and any slow residual drift. The
remaining 90-degree ambiguity goes to the differential decoder.

### Reed-Solomon decoder

The decoder runs these stages:
1. 16 syndromes are accumulated as bytes arrive.
2. Berlekamp-Massey runs one iteration per clock, 16 clocks.
3. The error evaluator Omega = S*Lambda mod x^16 is formed.
4. Two Chien search passes follow. The first counts the roots, and fails the codeword if the
   count differs from deg Lambda or deg Lambda > 8. The second corrects bytes as they are read
   out.
5. The Forney value is Omega(X^-1) / Lambda_odd(X^-1) for the roots alpha^0..alpha^15.

Codewords are buffered in a two-bank, 408-byte RAM. One bank receives while the other is
decoded and read out. Decoding takes a little over 2 x 204 clocks: 16 for Berlekamp-Massey plus the two Chien
passes. That is well inside the 64 x 204 clocks a codeword lasts in the modem. The block itself accepts up to one byte every 3 clocks. For
each codeword it reports `cw_done` and `cw_nerr`, the number of corrected bytes. Bytes of an
uncorrectable codeword leave unchanged with `out_err` set. `overrun` flags a codeword that
arrived before the previous one was finished.

## Number formats

- IF samples: 10-bit two's complement at the DAC and ADC.
- Receive baseband: 12-bit two's complement, I and Q. After the AGC, a 16-QAM level of 1 is
  about 128 LSB.
- Angles in the frequency loop: 16 bits per turn, plus 8 fraction bits in the accumulator.
  In the phase loop: 8 bits per turn, plus 8 fraction bits.
- SRRC taps: round(63 p(t)/p(0)) of the square-root raised-cosine impulse response. They are
  computed at elaboration by constant functions in `modem_pkg`, as are all sine tables (the
  tables hold round(A sin(2 pi k / N))). No data files are needed.

## What follows the specification and what does not

Taken from the modem specification:
- the block order of both chains;
- the PRBS and its seed;
- RS(204,188) with T=8;
- interleaver depth 12;
- switchable differential coding;
- 16-QAM;
- roll-off 0.35, 41 taps of 7 bits, 4x oversampling;
- the 40.96 MHz carrier;
- the AGC structure (gain detector, integrator, two multipliers, references lambda_ref and
  x_ref, gain beta);
- the timing loop structure (interpolator with four fixed coefficient sets, Gardner detector,
  loop filter, controller, rate matching);
- the frequency loop structure (slicer, conjugate, angle, mod pi/2, loop filter, accumulator,
  ROM, derotator);
- the phase loop (normalised DD detector, K1/K2 loop filter, 8-bit phase with SIN/COS ROM).

The ROM sizes of the frequency loop (2 x 1024 x 10 bits) and of the phase loop (2 x 256 x 8
bits) were chosen to match the memory the specification's resource table reports.

Choices of this design:
- the clock ratio;
- the DVB-C details the specification implies but does not print: field polynomial,
  generator roots, branch step 17, sync inversion every 8 packets, the differential rule;
- the bit-to-point mapping;
- all word widths;
- all loop constants;
- the cubic interpolator coefficients;
- the NCO timing controller;
- the boxcar down-conversion filter;
- the frame synchroniser, which the receiver needs but the specification does not describe;
- the RS decoding algorithms.

Differences and omissions:
- **Frequency detector modulus.** The text describes a modulo 2*pi/M detector with M = 16.
  The block diagram and the f_R/8 range both point to modulo pi/2, which is what is built.
- **Equalizer.** The receiver's adaptive equalizer is only named in the specification, with
  no structure or algorithm, and is not included. The phase loop output goes straight to the
  demapper.
- **Analog gain.** The AGC controls only the digital gain. The specification also has it set
  the analog gain ahead of the ADC, which needs an output to the IF unit that is not defined.
- **Frequency acquisition.** The frequency loop has no preamble-aided acquisition mode. The
  continuous downlink stream has no preamble defined.
- **Out-of-band rejection.** The prototype's transmit spectrum shows more than 50 dB between
  the in-band and out-of-band levels, measured after the analog reconstruction filter. The
  41-tap, 7-bit shaper alone rejects about 28 dB at the band edge, (1 + 0.35)/2 of the symbol
  rate, and 34 dB further out. The rest has to come from the analog filter.
- **Analog and radio parts.** The DAC/ADC with their filters, the IF and RF units and the MAC
  interface protocol are outside this RTL. `dac_out`, `adc_in` and the `tx_*` / `rx_*` byte
  streams are their digital sides.

## Verification

Each block has a self-checking testbench in `tb/` named `tb_<module>`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values are computed
independently inside the testbenches:

| testbench | what it checks |
|---|---|
| `tb_sync_randomizer`, `tb_derandomizer` | bit-serial PRBS model; sync inversion every 8 packets; descrambler starting mid-group; error flags |
| `tb_rs_encoder` | 16 syndromes of every output codeword are zero, using the testbench's own log/antilog tables; parity ticks |
| `tb_rs_decoder` | random codewords with 0..8 byte errors corrected; 12 errors flagged; per-codeword error counts |
| `tb_conv_interleaver`, `tb_conv_deinterleaver` | branch j delays its bytes by j x 12 x 17 positions; original order restored; sync flags |
| `tb_diff_encoder`, `tb_diff_decoder` | against the Boolean DVB-C rule; rotation invariance; enable/disable |
| `tb_qam_mapper`, `tb_qam_demapper` | all 16 points, quadrant numbering, the 90-degree rotation property; slicer decisions under noise |
| `tb_pulse_shaper`, `tb_matched_filter` | shaper: taps recomputed from the SRRC formula, impulse response, random symbols; filter: impulse response, random and saturating inputs against a reference convolution |
| `tb_up_converter`, `tb_down_converter` | bit-true against a real-valued mixer; I,-Q,-I,Q sequence at fs/4; decimation gain |
| `tb_agc` | output equals input times the reported gain; settles to the reference within 2% for input level steps of 40, 128 and 300 |
| `tb_symbol_timing_recovery` | raised-cosine signal in real arithmetic, 0.37-sample offset, 200 ppm clock offset; 99% of symbols within 0.31 of a level, all symbols right, output count equals symbol count |
| `tb_freq_recovery` | offsets of 0.002, -0.006 and 0.01 turn/symbol; frequency word within 2%; all decisions right up to one 90-degree rotation |
| `tb_phase_recovery` | static offsets of +12 and -15 degrees, and drift; 8-bit phase within 2 LSB; no decision errors |
| `tb_modem_top` | full loopback at default parameters; see below |

`tb_modem_top` sends 64 packets through this channel:
- attenuation to 13/16;
- a delay of 13 clocks, a fractional symbol offset;
- a receive carrier offset of 40 kHz, within the tens of kHz the loop is designed for;
- a 24-clock impulse burst every 200,000 clocks (six in the run).

It compares the received packets byte for byte and counts each mechanism, failing if one
never happened:
- frame lock;
- inverted sync bytes seen;
- codewords with RS corrections;
- AGC adaptation;
- a frequency estimate within 2% of the applied offset.

No byte may come out wrong without its error flag. Packets hit by a burst longer than 8 bytes
per codeword come out flagged. The test runs in a few seconds of simulation. Differential
coding is on in this test, and the switch is exercised in the unit testbenches. With it off,
the loop runs end to end only when the carrier loops happen to settle in the right quadrant;
nothing in the receiver resolves the 90-degree ambiguity without the differential code.

To run any of them with Verilator 5:

```
verilator --binary --timing -y rtl +libext+.sv rtl/modem_pkg.sv tb/tb_modem_top.sv \
          --top-module tb_modem_top -Mdir obj
./obj/Vtb_modem_top +verilator+rand+reset+2
```

Verilator is a two-state simulator. The testbenches give `rst_n` a falling edge at time 1 so
that the asynchronous reset always fires, even when variables start with random values.

## Size

After generic synthesis the whole modem is about 7600 word-level cells, 3100 flip-flop bits
and 59 kbit of RAM/ROM. The RS decoder dominates the logic, with about 6100 cells. Its
Berlekamp-Massey step and the 17-term Chien evaluation are fully parallel GF(256) arithmetic.
The two interleavers hold 2 x 1122 bytes, and the frequency loop's sine table holds 20 kbit.
No timing analysis has been done for an FPGA at 163.84 MHz. The long combinational paths are:
- the RS decoder's discrepancy and Chien sums;
- the 41-tap matched filter, which is written as one sum;
- the CORDIC in the frequency loop.

These are the first places to pipeline.

## Files

- `rtl/modem_pkg.sv`: constants, 16-QAM types and mapping functions, GF(256) arithmetic,
  SRRC tap and sine table generators, CORDIC angle.
- `rtl/<block>.sv`: one module per block, as listed in the tables above.
- `rtl/modem_top.sv`: the top level.
- `tb/tb_<block>.sv`: the testbenches.
