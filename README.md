# Wideband receiver: FPGA channel selector and digital down-converter

A wideband software-radio receiver samples a 50 MHz slice of spectrum
directly with a fast ADC, so that one converter sees every user at once.
Each user, however, occupies only a narrow channel (about 24 kHz wide). This
RTL is the FPGA half of such a receiver, after the design published as *The
Design of High Speed Wideband Receiver Based on FPGA*. It takes the
converter's 12-bit stream at 192 MS/s and picks out one of 1800 channels by
number. It moves that channel to 0 Hz and filters away everything else. It
hands on a 16-bit, 240 kS/s baseband stream, 800 times slower than its
input, for a host to demodulate.

```
chan_i ──► chan_rom ──fcw──► dds ──sine──┐
                                         ▼
adc_i ─────────(3-clock delay)─────────► mixer ──► cic_decim ──► hb_cascade ──► fir_shape ──► ddc_o
12 bit, 192 MS/s                          16 bit      ÷25, 7.68 MS/s  5 × ÷2, 240 kS/s  112 taps
```

Everything runs on one 192 MHz clock, with one input sample per clock.

## Files

| file | what it is |
|---|---|
| `rtl/ddc_pkg.sv` | widths, rates, CIC settings, all filter coefficients, the saturation helpers |
| `rtl/chan_rom.sv` | channel number → 32-bit DDS frequency control word (1800-word ROM) |
| `rtl/dds.sv` | phase accumulator plus a quarter-wave sine table (17 phase bits); 16-bit local oscillator |
| `rtl/mixer.sv` | 12 × 16-bit multiplier, scaled and saturated to 16 bits |
| `rtl/cic_decim.sv` | 3rd-order CIC decimator, R = 25, M = 1, 30-bit registers |
| `rtl/hb_decim.sv` | one half-band decimate-by-2 FIR stage (parameterised taps) |
| `rtl/hb_cascade.sv` | five half-band stages: four of 7 taps, then one of 11 taps |
| `rtl/fir_shape.sv` | 112-tap shaping filter computed serially (one tap per clock) |
| `rtl/ddc_sys.sv` | top level: the chain above |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_bpsk.sv` and `tb_dds_sfdr.sv` |

## Channel plan and frequency words

A channel is chosen by a frequency control word (FCW). The DDS adds the FCW
to a 32-bit phase every sample, so it produces
`f = FCW × 192 MHz / 2^32`, with a step of 0.045 Hz. `chan_rom` holds one
FCW per channel at address `channel − 1`:

```
FCW(k) = 0x4D52316D + k × 0x00075F70        k = 0 … 1799
```

This formula gives channel 1 at 57.9908 MHz and steps of 21.600 kHz. Channel
693, the one used in the tests, lands at 72.938 MHz, and channel 1800 at
96.849 MHz. The grid reproduces the first two published table entries,
0x4D52316D and 0x4D5990DD. It does **not** reproduce the published last
entry, 0x754BA3B4 (87.97 MHz). No single uniform grid matches all three
published words, so the two adjacent entries were taken as the definition.
To use a different channel plan, change `FCW0`/`FCW_STEP` in `ddc_pkg`, or
the `initial` loop in `chan_rom`. The ROM is built at elaboration, so no
data file is needed. A channel number of 0 or above 1800 raises `bad_chan_o`
and keeps the previous word.

## The local oscillator

`dds` truncates the 32-bit phase to its top 17 bits. The top two of those
bits select the quadrant. The other 15 bits address a table of 2^15 values
of `round(32767 · sin(2π(i + 0.5)/2^17))`, read backwards in the second and
fourth quadrants and negated in the second half of the cycle. The half-step
offset makes the mirrored quadrants exact. The phase runs on across channel
changes and is zero after reset.

The number of phase bits P sets the worst spur. It comes when the dropped
phase bits are exactly half a step, and lies about 6.02·P − 3.9 dB below
the carrier. With 16 bits that is 92.4 dB, short of the required 95 dB
spurious-free dynamic range. With 17 bits it is 98.4 dB, and `tb_dds_sfdr`
measures exactly that. The table costs 2^15 × 15 bits.

## Mixing: one real path

The published block diagram multiplies the input by a single sine, and this
RTL does exactly that. There is no I/Q pair. A real tone `A·cos(ω_in t)`
times `sin(ω_c t)` leaves two terms: the difference frequency at half
amplitude, which is the wanted baseband, and the sum frequency, which the
CIC removes. Two consequences follow:

* A channel is folded about 0 Hz, so content at +Δf and −Δf from the
  channel centre lands on top of each other.
* A carrier exactly at the channel centre comes out scaled by the sine of
  its phase against the oscillator. `tb_bpsk` uses a carrier that is phase
  locked to the DDS. A receiver for unsynchronised carriers would need a
  cosine path as well (a second multiplier and filter chain).

## Word widths and gain through the chain

This is the part that needs care when the design is changed.

| point | width | scaling |
|---|---|---|
| ADC sample | 12 bit signed | A (full scale 2047) |
| DDS sine | 16 bit signed | peak 32767 |
| mixer output | 16 bit, saturated | product × 2^-11; the baseband term peaks at 8·A |
| CIC registers | 30 bit, wrap-around | DC gain 25^3 = 15625 |
| CIC output | 16 bit, saturated | bits [27:12], so gain 15625/4096 = 3.81 |
| each half-band | 16 bit, rounded and saturated | unity DC gain |
| shaping filter | 16 bit, rounded and saturated | unity DC gain (±0.0003) |

An in-channel tone of amplitude A (ADC units) therefore leaves as a tone of
about **30.5·A**. Full scale at the output is reached at A ≈ 1070. Stronger
in-channel signals clip in the CIC, and `sat_o` pulses. The published design
gives 16-bit stages and a saturated CIC output, but not the shift; 12 was
chosen so that a channel well below ADC full scale (a single user among many)
still uses most of the 16-bit output.

The CIC width comes from `Bmax = N·log2(R·M) + Bin = 3·4.64 + 16 = 29.93`,
so 30 bits. The published text quotes 29 bits. That is too few to hold 15625
times a full-scale 16-bit input, so the formula was followed.

## Decimation filters

**CIC (÷25, 192 → 7.68 MS/s).** The three integrators are chained without
pipeline registers, so the new sample counts in the same clock. The first
output is taken on the 25th accepted sample after reset. Three combs with
delay 1 then run once per 25 samples. The response is
`((1 − z^-25)/(1 − z^-1))^3`.

**Half-bands (5 × ÷2, 7.68 MS/s → 240 kS/s).** Each stage computes its
output on every second accepted sample, over a window that includes the new
sample. The published design fixes the tap counts, 7 for stages 1–4 and 11
for stage 5, but not the values. This RTL uses the maximally flat
half-bands:

```
7 taps : [-1 0 9 16 9 0 -1] / 32
11 taps: [3 0 -25 0 150 256 150 0 -25 0 3] / 512
```

For a 24 kHz pass band these droop by less than 0.00015. They attenuate
everything that folds onto the pass band by at least 77 dB, which beats the
0.001 (60 dB) tolerance in the specification.

**Shaping filter (112 taps at 240 kS/s).** The specification is a pass band
to 24 kHz, a stop band from 34 kHz, ripple 0.001 and stop-band ripple
0.0002. The coefficients are a Parks–McClellan equiripple design for those
edges, with stop-band weight 5, quantised as `round(h · 2^17)`. Quantised,
the pass-band ripple is 0.0003 and the stop band is 78 dB down (0.00012).
Only the first 56 values are stored, because the filter is symmetric. The
clock is 800 times the output rate, so `fir_shape` uses a single
multiplier. It keeps a 112-word circular sample buffer and spends 112 clocks
per output, walking back from the newest sample. A sample that arrives while
it is busy is dropped and flagged on `ovr_o`. At the receiver's rates this
cannot happen, and an assertion in `ddc_sys` states it.

## Interface and timing of `ddc_sys`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 192 MHz |
| `rst` | in | 1 | synchronous, active high |
| `adc_vld_i` | in | 1 | `adc_i` holds a sample this clock |
| `adc_i` | in | 12 | signed ADC sample (from the JESD204B receiver) |
| `chan_i` | in | 11 | channel number 1…1800, may change at any time |
| `ddc_o` | out | 16 | signed baseband sample |
| `ddc_vld_o` | out | 1 | one-clock pulse per output, once per 800 accepted inputs |
| `sat_o` | out | 1 | a stage clipped a sample |
| `ovr_o` | out | 1 | the shaping filter dropped a sample (never at normal rates) |
| `bad_chan_o` | out | 1 | `chan_i` out of range |

Every stage moves data on a valid strobe, so the whole chain pauses while
`adc_vld_i` is low. The latency, counted in clocks, is fixed:

* 4 clocks from an ADC sample to the CIC input. The DDS registers its sine
  two clocks after the slot, and the mixer needs one more clock. The ADC
  sample is held back by three registers to meet its own sine.
* 1 clock in the CIC, and 1 in each half-band stage.
* 112 clocks in the shaping filter.

That makes 122 clocks in all. A new channel number reaches the oscillator
two clocks after it is applied. The filters' group delay is about 55 output
samples (≈ 3.7 symbols at 16 ksym/s), so a change at the input takes that
long to show fully at the output.

## What is outside this RTL

The published receiver also contains parts that are bought rather than
designed, or that are described too briefly to build:

* the ADC12J4000 converter. It samples at 1536 MHz, so the 2100 MHz carrier
  appears at 564 MHz. It mixes and decimates by 8 on chip.
* the JESD204B receiver in the FPGA transceivers.
* the SPI writes that configure the ADC. No register values are given.
* the clock tree: OCXO, PLLs and divide-by-8.
* the analog input matching.
* the Ethernet/UDP link to the host. Its framing and interface are not
  given. `ddc_o`/`ddc_vld_o` are what it would carry.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
All of them pass.

* `tb_chan_rom`: the two published words, 3000 random channels against the
  grid formula, the 1-clock read, and rejection of out-of-range numbers.
* `tb_dds`: every sine sample for six frequency words, with random enable
  gaps. Each sample is checked exactly against the truncated-phase sine, and
  within 4 LSB of the ideal sine. Also checks the latency, and that no
  sample is lost.
* `tb_dds_sfdr`: an FFT of 2^18 DDS samples at three bin-centred words,
  including the worst case for the phase truncation. The SFDR must be at
  least 95 dB; it measures 98.4 dB.
* `tb_mixer`: the corner products and 20 000 random products against
  `floor(a·b/2^11)`, saturated.
* `tb_cic_decim`: a direct 73-tap convolution reference, random gaps, and
  full-scale inputs that must clip.
* `tb_hb_decim`: the 7- and 11-tap stages against a convolution reference,
  including forced clipping.
* `tb_hb_cascade`: a five-stage software model, the 32:1 rate, and the
  5-clock latency.
* `tb_fir_shape`: a convolution reference for 3000 outputs, the 112-clock
  latency, deliberate overruns, and clipping.
* `tb_ddc_sys`: end to end at full size. It checks that:
  * a 5 kHz offset tone in channel 693 comes out with the computed RMS
    (within 3 %; measured 6474.7 against 6473.6) and the right frequency;
  * a tone in channel 700 is rejected (RMS 2.3, limit 32);
  * switching to channel 700 recovers it, with 20 % input gaps;
  * a strong tone clips;
  * a bad channel number is flagged;
  * every output comes exactly 800 inputs after the last.
* `tb_bpsk`: the reference test signal. BPSK at 16 ksym/s repeating
  `10010010` on channel 693 with a phase-locked carrier. 48 of 48 symbols
  are decided correctly, and the eye opening is 8406 against an expected
  level of 9155. The symbols are rectangular here, not raised-cosine.

To simulate with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/ddc_pkg.sv tb/tb_ddc_sys.sv --top tb_ddc_sys
obj_dir/Vtb_ddc_sys
```

Replace `tb_ddc_sys` with any other testbench name. The end-to-end
testbench simulates about 1.3 million clocks in a few seconds.

## Changing the design

* **Channel plan:** change `FCW0` and `FCW_STEP`, or the ROM loop. Change
  `N_CHAN` and `CHAN_W` together.
* **Gain:** `CIC_SHIFT` moves the whole chain's level by factors of 2.
  Lower values clip sooner.
* **Filters:** the half-band coefficients and shifts, and the shaping
  filter's half table and `SHAPE_SHIFT`, all live in `ddc_pkg`. `hb_decim`
  accepts any odd tap count. `fir_shape` assumes an even, symmetric tap
  count.
* **CIC:** `N`, `R` and `W` are parameters. Only `M = 1` is built, and any
  other value stops elaboration.
