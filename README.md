# Beam position monitor signal processing (four-button BPM, 408 MHz, IQ undersampling)

A beam position monitor (BPM) in a storage ring has four pickup electrodes
(A, B, C, D) around the vacuum chamber. Each electrode delivers a burst of
RF at the ring's RF harmonic. Its amplitude grows as the beam comes closer
to that electrode. The position follows from comparing the four amplitudes.
This RTL is the FPGA part of such a BPM. It takes four 16-bit ADC streams at
108.8 MHz, measures the four amplitudes and gives the beam position at three
data rates:

| stream | rate | what it is for |
|---|---|---|
| raw ADC | 108.8 MHz | diagnostics, spectra |
| turn-by-turn (TBT) | 4.533 MHz, one sample per revolution | beam physics studies |
| fast acquisition (FA) | 10.07 kHz | fast orbit feedback |
| slow acquisition (SA) | 10.07 Hz | slow orbit feedback, long-term orbit |

The numbers fit a ring with a 204 MHz RF and harmonic number 45. The
revolution frequency is then 204 MHz / 45 = 4.533 MHz. The front end filters
the second RF harmonic, 408 MHz.

The design rests on three ideas. Each gets a section below.

1. **IQ undersampling.** The ADC clock is chosen so that consecutive samples
   are directly I, Q, -I, -Q. No mixer, NCO or multiplier is needed to reach
   baseband.
2. **Crossbar switching.** An analog switch in the RF front end rotates
   which RF channel carries which electrode. The FPGA undoes the rotation.
   Over time each electrode sees the mean gain of all four channels, so gain
   drift between channels cancels in the position.
3. **Multi-rate decimation.** Cascaded CIC and FIR filters take the data
   from 54.4 MHz down to 10 Hz. One CORDIC per channel turns I/Q into
   amplitude, and a difference-over-sum divider gives the position.

## Signal path

```
 adc_in[4] (RF-channel order, 108.8 MHz)
   |
 dig_xbar  <---- dig_pattern ---- xbar_ctrl ----> xbar_sw (to the RF front end)
   |   (electrode order A..D)
   +--> adc_raw[4]
   |
 tbt_channel x4:  iq_demux -> cic_decim /12 (I) -> fir_decim 101 taps (I) -+
                             cic_decim /12 (Q) -> fir_decim 101 taps (Q) -+-> quad_adjust -> cordic_mag (7 cells)
   |                                                                          |
   |                                                              tbt_amp (4.533 MHz) ---> dos_position -> tbt_pos
 amp_decim (FA): cic_decim /90 -> fir_decim 69 taps /5  x4 ---> fa_amp (10.07 kHz) ---> dos_position -> fa_pos
 amp_decim (SA): cic_decim /100 -> fir_decim 99 taps /10 x4 --> sa_amp (10.07 Hz)  ---> dos_position -> sa_pos
```

Rates: 108.8 MHz, then /2 (I/Q split) = 54.4 MHz, then /12 = 4.533 MHz
(TBT), then /450 = 10.07 kHz (FA), then /1000 = 10.07 Hz (SA).

Files (`rtl/`):

| file | role |
|---|---|
| `bpm_pkg.sv` | widths, the `amp4_t` and `pos_sample_t` structs, the CIC bit-growth function |
| `xbar_ctrl.sv` | switch pattern generator, period 8160 clocks, aligned copy for the FPGA |
| `dig_xbar.sv` | digital crossbar |
| `iq_demux.sv` | I/Q split with sign correction |
| `cic_decim.sv` | N-stage CIC decimator |
| `fir_decim.sv` | decimating FIR with time-shared multipliers, coefficients from a `.hex` table |
| `quad_adjust.sv` | folds vectors into quadrants I and IV |
| `cordic_mag.sv` | pipelined vectoring CORDIC, magnitude only |
| `frac_div.sv` | pipelined signed fractional divider |
| `dos_position.sv` | difference-over-sum X/Y |
| `tbt_channel.sv` | one electrode from ADC words to TBT amplitude |
| `amp_decim.sv` | four-channel CIC + FIR rate reduction |
| `bpm_dsp_top.sv` | the whole chain |
| `fir_tbt_101.hex`, `fir_fa_69.hex`, `fir_sa_99.hex` | FIR coefficients |

## IQ undersampling

The front end delivers a narrow band around f = 408 MHz. If the ADC clock is
fs = 4f/(4n ± 1), the signal phase advances by ±90° (modulo 360°) from one
sample to the next. The samples of A·cos(ωt − φ) then repeat every four
clocks as

```
 I, Q, -I, -Q, ...   (4n + 1)        I, -Q, -I, Q, ...   (4n - 1)
 with  I = A cos φ,  Q = A sin φ
```

108.8 MHz = 4 · 408 MHz / 15 is the 4n − 1 case with n = 4. The
second-sample stream is then −Q instead of Q. This mirrors the vector and
does not change its length, so the amplitude and position do not depend on
which case applies. The RTL calls the second sample of each pair Q.

108.8 MHz is also 24 times the revolution frequency. So one turn is exactly
24 samples, 12 I/Q pairs, and the TBT decimation factor of 12 is a whole
number.

`iq_demux` keeps a 2-bit phase counter, cleared by reset. It passes phases
0 and 1 as (I, Q) and negates phases 2 and 3. One (I, Q) pair comes out
every second clock. Whether the first sample after reset is really "I" is
unknown. It does not matter: a wrong start only rotates or negates the
vector, and the amplitude is unchanged. The outputs are 17 bits wide, so
negating −32768 cannot overflow.

## Crossbar switching

The RF front end has four channels, each with its own amplifiers, filters
and attenuator. Their gains drift with temperature. A gain error in one
channel looks like a beam movement. The front end therefore has a 4×4 RF
switch in front of the channels. `xbar_ctrl` steps it through four patterns
and holds each for 8160 ADC clocks, so it switches at 13.3 kHz. Pattern p
sends electrode k into RF channel (k + p) mod 4. After a full cycle
(3.3 kHz) every electrode has been amplified by every channel for the same
time.

The FPGA must put the data back in electrode order. `dig_xbar` routes ADC
(k + p) mod 4 to output k. It must use the pattern that was in force when
the sample was taken, not the pattern now on the switch lines. The delay
from the switch control to the ADC word reaching the FPGA (front end, ADC
pipeline) is `XBAR_SYNC` clocks, 4 by default. `xbar_ctrl` gives the
digital crossbar the pattern delayed by that amount. **This value depends
on the board.** Set it to the real ADC latency. If it is wrong, a few
samples after each switch go to the wrong electrode.

Switching causes transients, which show up in the raw and TBT data. Drive
`xbar_enable` low while those are recorded. The pattern then returns to
"straight" (p = 0) at once and stays there. FA and SA data gain the most
from switching. SA in particular averages over thousands of pattern cycles.
The correction is exact only when the filter spans whole pattern cycles.
FA (10 kHz) spans about a third of one, so FA positions keep a small
residue of the channel gain differences at the pattern rate.

The encoding of the 2-bit pattern onto the switches' control lines is
outside this RTL. `xbar_sw` is the pattern number.

## Decimation

### CIC (`cic_decim`)

There are five integrators at the input rate, a decimator, and five combs
with differential delay 1 at the output rate. The registers are
IN_W + ⌈5·log2 R⌉ bits wide. Integrator overflow wraps, and the comb output
is still exact. The output is the top OUT_W bits, so the DC gain is
R⁵/2^⌈5·log2 R⌉ · 2^(OUT_W−IN_W):

| use | R | growth | gain factor R⁵/2^G |
|---|---|---|---|
| 54.4 MHz → TBT | 12 | 18 | 0.949 (×2⁷ for 17→24 bits) |
| TBT → FA/5 | 90 | 33 | 0.687 |
| FA → SA/10 | 100 | 34 | 0.582 |

The integrators are pipelined: each adds its predecessor's registered value.
This delays the response by 4 input samples. The output appears 2 clocks
after the R-th input of each block.

### FIR (`fir_decim`)

Samples go into a circular buffer of `DEPTH` = next power of two ≥ TAPS + 8
words. On every D-th input one output is computed, using `MACS` multipliers
per clock, so it takes ⌈TAPS/MACS⌉ clocks plus 2. Only outputs that survive
decimation are computed. The buffer keeps accepting samples during a
computation. A request that arrives while the previous output is still
being computed is dropped and sets the sticky `overrun` flag. In simulation
an assertion also reports it.

| use | taps | D | MACS | clocks per output | clocks available |
|---|---|---|---|---|---|
| TBT (after CIC/12) | 101 | 1 | 5 | 23 | 24 |
| FA | 69 | 5 | 1 | 71 | 10 800 |
| SA | 99 | 10 | 1 | 101 | 10.9 M |

Coefficients are 18-bit Q1.17 words that sum to 2¹⁷, so each FIR has unity
DC gain. The accumulator is exact. The output is the accumulator shifted
right 17 bits and saturated. The tables are equiripple (Parks-McClellan)
low-pass designs, normalised to unity DC gain:

| table | passband | stopband from | stopband attenuation | ripple |
|---|---|---|---|---|
| `fir_tbt_101.hex` (fs = 4.533 MHz) | 0–1.1 MHz | 1.4 MHz | 84 dB | < 0.01 dB |
| `fir_fa_69.hex` (fs = 50.4 kHz) | 0–2 kHz | 5 kHz | 80 dB | 0.03 dB |
| `fir_sa_99.hex` (fs = 100.7 Hz) | 0–2 Hz | 6 Hz | 75 dB | 0.05 dB |

The TBT filter follows the target of a 2.2 MHz bandwidth (read as ±1.1 MHz),
0.1 dB ripple and 80 dB stopband. The FA and SA band edges are this design's
choice. Any table of the same length can replace these: one hex word per
line, 18-bit two's complement.

## Amplitude (`quad_adjust`, `cordic_mag`)

A vectoring CORDIC converges only for angles up to about ±99.7° (the sum of
atan 2⁻ⁱ). `quad_adjust` therefore negates vectors with I < 0. This rotates
them by 180° and leaves the magnitude unchanged. `cordic_mag` has 7 cells,
one per pipeline stage. Each cell rotates by ±atan 2⁻ⁱ using shifts and
adds, chosen so that Q shrinks. After 7 cells the residual angle is below
0.9°, which costs at most 1.2·10⁻⁴ in magnitude. The magnitude carries the
CORDIC gain K₇ = 1.6468, which is left in because it cancels in the
position ratio. The TBT amplitude of an electrode is therefore

```
 tbt_amp ≈ 0.949 · 2^7 · 1.6468 · (ADC peak amplitude in counts) ≈ 200.1 · A
```

FA and SA amplitudes scale further by 0.687 and 0.582.

## Position (`dos_position`, `frac_div`)

```
 S = VA + VB + VC + VD
 X = Kx · ((VB + VC) − (VA + VD)) / S + Xoff
 Y = Ky · ((VA + VB) − (VC + VD)) / S + Yoff
```

This assumes the usual electrode layout: A top-left, B top-right,
C bottom-right, D bottom-left, seen along the beam. B and C are on +X, and
A and B are on +Y. Kx and Ky (28-bit, nm) are the BPM's sensitivity
coefficients. Typical values are 10–20 mm, i.e. 10 000 000–20 000 000.
Xoff and Yoff are signed nm. The ratios come from two pipelined restoring
dividers, one quotient bit per stage, 24 fraction bits. The quotient is
truncated towards zero, and the final product is truncated towards −∞. At
Kx = 10 mm the arithmetic error is below 2 nm. A new amplitude set is
accepted every clock, and the latency is 27 clocks. A zero sum (for example
just after reset) gives X = Xoff, Y = Yoff and pulses `div_zero`. The sum
S is also output, as a beam-intensity figure.

## Top-level interface (`bpm_dsp_top`)

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | | ADC clock (108.8 MHz); asynchronous active-low reset |
| `adc_in[4]` | in | `adc_t` | ADC words, RF-channel order, one per clock |
| `xbar_enable` | in | 1 | crossbar switching on |
| `kx`, `ky` | in | 28 | position coefficients, nm |
| `x_off`, `y_off` | in | `pos_t` | offsets, nm |
| `xbar_sw`, `xbar_step` | out | 2, 1 | pattern for the front-end switch; strobe on change |
| `adc_raw[4]` | out | `adc_t` | raw data in electrode order, one clock after `adc_in` |
| `tbt_iq_valid`, `tbt_i[4]`, `tbt_q[4]` | out | 24-bit | filtered I/Q at TBT rate |
| `tbt_amp`, `fa_amp`, `sa_amp` | out | `amp4_t` | `valid` strobe and four 27-bit amplitudes |
| `tbt_pos`, `fa_pos`, `sa_pos` | out | `pos_sample_t` | `valid`, `x`, `y` (nm), `sum` |
| `quad_rotated[4]` | out | 4 | quadrant fold applied (per channel, per TBT sample) |
| `fir_overrun` | out | 1 | sticky: some FIR lost an output (mis-set parameters) |
| `div_zero[3]` | out | 3 | zero amplitude sum at TBT / FA / SA |

All strobes are one clock wide. There is no back-pressure: the reader of a
stream must take each sample in the clock its strobe is high. The
parameters are the switching period, the CIC factors, FIR lengths,
decimations and tables, the multiplier count of the TBT FIR and the CORDIC
cell count. Their defaults are the sizes given above. Changing
`TBT_FIR_TAPS` above 5·24 − 2 = 118 needs a larger `TBT_FIR_MACS`. Raising
the turn-by-turn rate needs the same.

The FIR sample buffers are reset registers, so they are flip-flops rather
than block RAM. About 75 000 flip-flop bits in all, mostly those buffers
and the CIC registers. A version without reset on the buffers could use
distributed or block RAM.

## What is outside this RTL

The RTL covers the digital processing only. The following stay outside it:

- the analog RF front end: switch matrix, band-pass filters, the optional
  32 dB amplifier branch, fixed amplifiers, the 7-bit 0.25 dB step
  attenuator and the NTC attenuator. How the attenuation code is set is
  not part of this design.
- the ADCs and the single-ended-to-differential rear card
- the clock synthesizer that makes the 108.8 MHz ADC clock, locked to the
  machine RF
- the readout of all streams to the crate CPU over PCI Express, and the
  control-system software above it. The streams are plain output ports
  with strobes; buffering and DMA belong to the readout logic.

## Choices made in this implementation

These points are this design's own. The processing structure, filter
orders, decimation factors, switching period and CORDIC length follow the
reference design.

- FA and SA are decimated from the four TBT amplitudes, not from I/Q. One
  CORDIC per channel therefore serves all rates.
- Positions are computed at every rate by separate dividers, with the same
  Kx, Ky and offsets.
- The filter orders "101, 69, 99" are read as tap counts. The coefficient
  tables are this design's own low-pass designs of those lengths.
- The pattern sequence is a rotation 0→1→2→3, the synchronisation delay is
  4 clocks, and disabling switching returns to pattern 0.
- All widths: 16-bit ADC, 17-bit I/Q, 24-bit TBT I/Q, 27-bit amplitude,
  18-bit coefficients, 24 fraction bits in the ratio, 32-bit nm positions.
- The CIC and CORDIC gains are not compensated. They cancel in the position
  and only scale the amplitudes.
- There is no blanking of samples around switch instants. The digital
  crossbar is exact if `XBAR_SYNC` matches the hardware latency.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_xbar_ctrl` | period (short instance and the default 8160), rotation order, delay of the aligned pattern, disable |
| `tb_dig_xbar` | random words and patterns, exact routing |
| `tb_iq_demux` | I,Q,−I,−Q sequences → (I,Q) every second clock |
| `tb_cic_decim` | against an N-fold boxcar convolution (not integrator/comb), R = 12 and R = 90, latency |
| `tb_fir_decim` | against direct convolution, 101 taps/D=1/5 MACs and 69 taps/D=5/1 MAC, saturation, latency |
| `tb_quad_adjust` | all quadrants, most negative code |
| `tb_cordic_mag` | against K₇·√(I²+Q²) in floating point, latency 7 |
| `tb_dos_position` | against the formula in floating point, signs, zero sum, latency 27 |
| `tb_bpm_dsp_top` | whole chain with small FA/SA filters and a 240-clock switch period. With a signal model of the front end (`tb/bpm_signal_model.sv`): positions and amplitude scale at all rates; bias from unequal channel gains without switching; SA position back on the truth with switching; raw-data reordering at every clock. Counts pattern steps, disable, quadrant folds, zero-sum guard, negative positions. |
| `tb_bpm_level_sweep` | the signal level stepped over 50 dB (30 000 down to 95 ADC counts), fixed beam position, no added noise. Position error at TBT and FA rate, and amplitude linearity, at each level. The error floor from ADC rounding alone grows from about 0.2 µm at full scale to about 30 µm at 95 counts (Kx = 10 mm). |
| `tb_bpm_dsp_full` | whole chain at default sizes through 11 SA outputs (≈120 M clocks, a few minutes). Raw reordering; TBT and FA positions within 3 µm; FA and SA amplitudes recomputed bit-exactly from the DUT's own TBT and FA amplitudes; settled SA positions; output rates and FA latency |

Running one with plain Verilator, from the directory that holds `rtl/` and
`tb/` (the coefficient files are opened by the relative path
`rtl/*.hex`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/bpm_pkg.sv tb/tb_bpm_dsp_top.sv --top-module tb_bpm_dsp_top -o sim
./obj_dir/sim
```

The simulator has only two states. All state that is read is reset, and the
testbenches ignore outputs until reset has been applied.

What the testbenches do not establish: the resolution figures of a real
system. These depend on the analog front end, the ADC noise and the clock
jitter, none of which is modelled beyond a few counts of uniform noise.
They also do not test timing closure at 108.8 MHz. The CIC comb chain and
the 45-bit FIR products are single-cycle and may need extra pipelining on
a given FPGA.
