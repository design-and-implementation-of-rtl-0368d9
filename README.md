# Linear-phase multirate audio equalizer

This is a ten-band graphic equalizer for 16-bit audio at 44.1 kHz. Its phase
response is exactly linear. Each band is a bandpass filter with a gain the user
sets, and the output is the sum of the bands.

Sharp linear-phase bandpass filters at low audio frequencies would need
thousands of taps at the full sample rate. Each band avoids that with a
single-sideband multirate structure:

1. The band is shifted down to zero frequency.
2. The signal is decimated in three stages, so the sharp filter runs at one
   eighth of the audio rate.
3. The sharp filter runs on a quarter-rate-shifted complex signal.
4. The result is interpolated in three stages and shifted back up.

All thirteen FIR filters of a band share four serial-parallel multipliers. The
filters that run at low sample rates share the same hardware. Each stage is
sized so that it finishes its work within one audio sample period at a 25 MHz
clock.

Every filter is symmetric, so the two samples that meet the same coefficient
are added before the multiply. This halves both the multiplications and the
coefficient storage.

## Signal flow of one band

```
u(k) --+-- x sqrt2 cos(wc k) -- h1 v2 -- h2 v2 -- h3 v2 --+                      +-- ^2 h8  -- ^2 h9  -- ^2 h10 -- x sqrt2 cos --+
       |                                                   +- centre - h7 - gain -+                                                 +-- + -- buffer -- y(k)
       +-- x sqrt2 sin(wc k) -- h4 v2 -- h5 v2 -- h6 v2 --+  combine            split  ^2 h11 -- ^2 h12 -- ^2 h13 -- x sqrt2 sin --+
```

- **`quad_modulator`**
  - Multiplies each input sample by √2·cos(ωc k) and √2·sin(ωc k). This gives the
    in-phase branch I and the quadrature branch Q.
  - k runs modulo a programmable table length T, so ωc = 2πp/T for some integer p.
  - The tables are held in `mod_table`. Both the modulator and the demodulator
    read them.
- **Decimation chains (h1–h3 on I, h4–h6 on Q)**
  - Each stage is a low-pass FIR followed by keeping one sample in M (M = 2 per
    stage by default).
- **`quarter_combine`** joins the two branches into one real signal at the low
  rate.
  - It multiplies I by the sequence 0, 1, 0, −1 and Q by 1, 0, −1, 0, then adds.
  - Only one term is non-zero in each phase, so the output runs Q, I, −Q, −I, …
  - This moves the band from zero frequency to a quarter of the low sample rate.
  - h7, the actual bandpass, is therefore a real symmetric filter centred at fs/4
    of its own rate.
- **`band_gain`** applies the user gain of the band (Q2.14, where 16384 = 1.0).
- **`quarter_split`** is the inverse of the combiner. It routes the samples into
  two branches with zeros in between, using the same two sequences:
  (0, x), (x, 0), (0, −x), (−x, 0).
- **Interpolation chains (h8–h10 on I, h11–h13 on Q)**
  - Each stage inserts one zero after every sample.
  - It then filters and multiplies by the factor, to restore the signal level.
- **`quad_demodulator`** computes y = I·√2 cos(ωc k) + Q·√2 sin(ωc k), which shifts
  the band back up.
- **`output_buffer`** collects the bursts of output samples and releases one per
  audio strobe.

Two things to know when designing filters for a band:

- **h7 needs a passband gain of 2.** The two 0, 1, 0, −1 modulators around h7 each
  halve the signal, so the band has unity gain only if h7's passband gain is 2.
  The test filters in `tb/lpeq_ref_pkg.sv` are built that way.
- **The I and Q chains use the same filters** (h4 = h1, h5 = h2, and so on), but
  each has its own coefficient memory.

`lpeq_equalizer` instantiates `NBANDS` = 10 bands side by side:

- All bands are fed by the same input strobe.
- Each band's structure is a per-band parameter array: the rate factors
  `M1`..`L3` and the filter lengths `LEN_H1`..`LEN_H10`, where entry b belongs to
  band b. By default all bands are equal.
- Each band can be delayed in two ways, described below:
  - by `LOW_DELAY[b]` samples at its lowest rate, with `low_rate_delay` placed
    before h7;
  - by `DELAY[b]` audio samples after the band, with `band_delay`.
- `band_adder` adds the delayed outputs at full precision and saturates the sum
  once.

### Delay equalisation

The sum of linear-phase bands is linear-phase only if every band's impulse
response is symmetric about the same instant. The total delay of band b, in
input samples, is

    S_b + GD_b + M·LOW_DELAY[b] + DELAY[b]

The terms are:

- **GD_b** is the group delay of the band's filter chain:
  (L1−1)/2 + M1·(L2−1)/2 + M1·M2·(L3−1)/2 + M·(L7−1)/2 +
  (M/L1)·(L8−1)/2 + (M/(L1·L2))·(L9−1)/2 + (L10−1)/2,
  where M = M1·M2·M3 and Lx is the length of hx.
- **S_b** is the strobe on which the band delivers its first output sample. It
  is fixed by the pipeline and the output buffer. It is best read from a
  simulation.
- **LOW_DELAY[b]** gives the coarse part of the delay. `low_rate_delay` hands
  h7 that many zero samples first, then the real samples.
  - The real samples wait in a FIFO of LOW_DELAY + 2 words.
  - So M·LOW_DELAY audio samples of delay cost only LOW_DELAY words.
  - LOW_DELAY must be a multiple of 4, so that the 0, 1, 0, −1 modulators on
    either side of h7 stay in step.
  - The preloaded zeros also change S_b.
- **DELAY[b]** is a plain ring buffer at the audio rate. It supplies the
  remainder in single samples.

Choose the two delays so that the totals match.

Examples:

- With the default structure, GD = 602 and S = 11.
- With M1 = 4, L3 = 4 and h1/h7/h10 lengths of 31/63/23, GD = 1074 and S = 19.
- A default band next to such a band therefore needs 480 samples of extra delay,
  for instance DELAY = 480 on its own.
- `tb_lpeq_equalizer_mixed` uses LOW_DELAY = 56 (448 samples) instead, which
  moves S to 5, plus DELAY = 38.

The delay lines run on every strobe from the first band output on. A band that
has not started yet contributes zeros, so bands that start at different times
stay aligned.

## Sharing a multiplier: `fir_engine`

This is the heart of the design and the part that takes most care to change.

### Filter-to-multiplier mapping

One `fir_engine` owns one `sp_multiplier` and serves up to eight filters, called
"slots". A band uses four engines:

| engine | slots (filters) | rate of the work |
|---|---|---|
| `u_e1` | h1, h4, h2, h5 | fs and fs/2 (decimating) |
| `u_e2` | h3, h6, h7, h8, h11 | fs/4 and fs/8 |
| `u_e3` | h9, h12 | fs/2 (interpolating) |
| `u_e4` | h10, h13 | fs (interpolating) |

### Jobs

Every slot has an input FIFO, a ring buffer of its last LEN samples, and a half
coefficient table h(0) … h(⌈LEN/2⌉−1). A round-robin scheduler picks the next
slot that has a job. Each job is one of:

- **Decimating slot (DOWN > 1).** Every input sample is written into the ring
  buffer. An output is computed only for every DOWN-th input, starting with the
  first. The other inputs take one clock and no multiplications.
- **Interpolating slot (UP > 1).** Each real input is stored and convolved. The
  engine then itself inserts UP−1 zeros, each stored and convolved as a job of
  its own. The result is multiplied by UP.
- **Computing job.** Two pointers walk inwards from both ends of the ring buffer.
  The two samples are added (the centre sample of an odd length only once) and
  multiplied by the coefficient. The result is accumulated exactly in 40 bits,
  rounded by 2^−15, scaled by UP, and saturated to 16 bits.

### Timing

- One multiplication takes SAMPLE_W + 1 = 17 clocks: one bit of the 17-bit
  pre-added sample per clock.
- One more clock hands over to the next coefficient, so a tap costs 18 clocks.
- A computing job costs 18·⌈LEN/2⌉ + 2 clocks.

### Flow control

The hard rule is that a filter may only start if its result will have somewhere
to go. Each slot's consumer is a FIFO: the next slot's input FIFO, a combiner or
splitter FIFO, or the output buffer. A slot is eligible only when:

- its input FIFO has data, or it still owes inserted zeros; and
- if the job will compute, the consumer's `out_ready` is high and the slot's
  previous result is not being delivered in that same clock.

The result appears as a one-clock `out_valid[s]` pulse on a bus shared by all
slots. Only that slot writes into its consumer, so the space it saw at the start
is still there at the end. An assertion checks this.

### Why this makes the design exact

Every stage moves samples by valid/ready handshakes. Timing therefore only
decides *when* a sample is produced, never *which* sample or its value. The
output sequence is a pure function of the input sequence and the coefficients.
The testbenches use this to compare the RTL bit for bit against a plain
sequence-level model: convolution, keep every M-th sample, insert zeros.

The only places where time matters are the two ends:

- **Input.** Samples arrive on a fixed strobe and cannot wait. If the first
  stage is not ready, the modulator drops the sample and raises `overrun`. Its
  phase counter still advances, so the modulation stays locked to time.
- **Output.** The output buffer fills up to a block of M1·M2·M3 samples before
  it starts. It then gives one sample per strobe. A strobe that finds it empty
  raises `underrun`.

When the input runs at the rate the design is sized for, neither event happens.

## Numbers and formats

| quantity | format |
|---|---|
| audio samples, all intermediate samples | 16-bit two's complement |
| FIR coefficients | Q1.15, half table per filter |
| cos/sin tables (including the √2) | Q2.14 |
| band gain | Q2.14, reset value 1.0 |
| FIR accumulator | 40 bits |

Every product or sum that is brought back to 16 bits is rounded half-up and
saturated.

## Cycle and memory budget (defaults)

### Cycle budget

At 25 MHz and 44.1 kHz there are 566 clocks per input sample. The default
decimation and interpolation factors are 2 per stage. The default lengths are:

| filter | h1/h4 | h2/h5 | h3/h6 | h7 | h8/h11 | h9/h12 | h10/h13 |
|---|---|---|---|---|---|---|---|
| taps | 15 | 31 | 63 | 79 | 47 | 31 | 15 |

The work per input sample is then:

| engine | pre-added taps per input sample | clocks |
|---|---|---|
| 1 | 16 | ≈ 294 |
| 2 | 25 | ≈ 452 |
| 3 | 16 | ≈ 290 |
| 4 | 16 | ≈ 292 |

The busiest engine uses about 80 % of the sample period. Longer filters or
larger factors are parameters of `lpeq_band` and `lpeq_equalizer`. Check this
sum again when you change them: an engine that cannot keep up shows up as
`overrun`.

### Memory per band

- Sample memory: 483 words.
- Coefficient memory: 248 half-table words.
- Together that is about 1.5 kB of 16-bit words.
- The two modulation tables add 2 × TAB_DEPTH words.

## Configuration

Everything is written through one port: `cfg_we`, `cfg_band`, `cfg_addr`,
`cfg_wdata`. `cfg_band` selects the band. `cfg_addr[15:12]` selects the target:

| `cfg_addr[15:12]` | target | index |
|---|---|---|
| 0–3 | coefficients of engine 1–4 | `cfg_addr[9:0]`: the slots' half tables one after another, in the slot order of the table above |
| 4 | √2·cos table | `cfg_addr[7:0]` |
| 5 | √2·sin table | `cfg_addr[7:0]` |
| 6 | table length T (1 … TAB_DEPTH) | — |
| 7 | band gain | — |

Notes:

- After reset the engines clear their sample memories, one word per clock.
  `ready` rises when every band is done.
- Coefficients reset to nothing useful and must be loaded.
- A band's centre frequency is chosen by writing a table of T entries with
  p whole periods: √2·cos(2πpk/T) and √2·sin(2πpk/T). This gives a centre at
  p/T of the sample rate.

## Interface of the top, `lpeq_equalizer`

| port | meaning |
|---|---|
| `in_valid`, `in_data` | Audio sample strobe (one clock per sample period) and the sample. |
| `out_valid`, `out_data` | One output sample per strobe, three clocks after it, once the first band has started. |
| `overrun`, `underrun` | Pulse when some band dropped an input or had no output on a strobe. |
| `ready` | All bands have finished clearing after reset. |
| configuration | As above. |

The delay through the equalizer is S + GD + DELAY input samples (see the
section on delay equalisation). At the defaults that is 11 + 602 = 613 samples,
or about 14 ms.

## What this design adds or assumes

The structure is taken as described:

- single-sideband modulation with three-stage decimation and interpolation;
- the quarter-rate combiner and splitter;
- the division of h1–h13 over four multipliers;
- symmetric pre-addition;
- zero insertion with gain;
- decimation by dropping samples.

The following are this implementation's own choices:

- **Factors and filter lengths.** No factors or filter lengths were given for the
  hardware. The defaults above are chosen to fit the 25 MHz / 44.1 kHz budget.
  They are not tuned to any particular band specification.
- **Band specifications.** A true octave equalizer (about 30 Hz to 20 kHz, with
  90 dB stopbands) would need much larger factors and longer filters for the low
  bands. The lowest bands would also need a faster clock or more multipliers.
  Band 10, a highpass, is not covered by this lowpass-based structure. At the
  defaults, only a band of roughly 3–8 kHz meets such a specification.
- **Band structures.**
  - The rate factors and lengths are per-band parameters.
  - The delays that equalise the bands are computed by the designer and given as
    parameters. They are not derived in hardware.
  - The coarse delay sits before h7, the point of lowest rate. Its step is
    4·M samples.
- **Memories.**
  - Sample and coefficient memories are on-chip arrays loaded through the
    configuration port, not external RAM.
  - On-chip arrays also make the one-multiply-per-clock access pattern simple.
- **Thirteen filters.** The design uses thirteen filters, h1–h13.
- **Modulation and gain multipliers.** These are separate parallel multipliers,
  one product per sample, rather than shared serial ones. The 0, 1, 0, −1
  modulators need no multiplier at all.
- **Glue logic.** All of the following are this design's choices:
  - the scheduler and FIFO depths;
  - the handshakes;
  - the output buffer's start rule;
  - the number formats;
  - rounding and saturation;
  - the reset behaviour.
- **Not built:**
  - an alternative architecture with two deeply pipelined parallel multipliers;
  - the chip's pads and package.

## Files

RTL (`rtl/`):

| file | contents |
|---|---|
| `lpeq_pkg.sv` | widths, shared types, `sat`/`round_shift` helpers |
| `sp_multiplier.sv` | serial-parallel two's-complement multiplier |
| `sample_fifo.sv` | small valid/ready FIFO used throughout |
| `fir_engine.sv` | multiplier stage shared by several filters |
| `mod_table.sv` | cos/sin tables with programmable length |
| `quad_modulator.sv`, `quad_demodulator.sv` | √2 cos/sin modulation and demodulation |
| `quarter_combine.sv`, `quarter_split.sv` | 0, 1, 0, −1 centre shifts |
| `band_gain.sv` | user gain |
| `output_buffer.sv` | burst-to-strobe output buffer |
| `lpeq_band.sv` | one band |
| `low_rate_delay.sv` | coarse per-band delay at the lowest rate |
| `band_delay.sv` | fine per-band delay line at the audio rate |
| `band_adder.sv` | sum of the bands |
| `lpeq_equalizer.sv` | ten bands, top level |

Testbenches (`tb/`):

- Every block has a self-checking testbench, `tb_<module>.sv`.
- `lpeq_ref_pkg.sv` is the sequence-level reference model of a band. It uses
  direct convolution with full impulse responses and shares no code with the RTL.
- `tb_lpeq_band` runs one band at the default parameters and in real time, with
  566 clocks per sample. It checks:
  - every output bit-exactly;
  - that a tone at the band centre passes with the set gain;
  - that overrun and underrun appear when the input is strobed too fast.
- `tb_lpeq_equalizer` does the same for the full ten-band equalizer. It includes
  a loud burst that saturates the band sum. It also counts that store-only jobs,
  zero insertion, consumer stalls, saturation, overrun and underrun all occur.

- `tb_lpeq_band_rates` repeats the band test with a second structure. It uses
  total decimation 16 (M1 = 4, L3 = 4) and longer h1, h7 and h10. This shows
  that the rate factors and lengths really are parameters. It is also a sketch
  of the structure that lower octave bands need.

- `tb_lpeq_equalizer_mixed` runs three bands of two different structures in
  real time. It checks:
  - each band and the equalizer output bit for bit;
  - that with the chosen DELAY values all bands have the same total delay.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Simulating

From the top directory, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/lpeq_pkg.sv tb/lpeq_ref_pkg.sv tb/tb_lpeq_equalizer.sv \
    --top-module tb_lpeq_equalizer
./obj_dir/Vtb_lpeq_equalizer
```

Replace the testbench name to run another one. Block testbenches that do not use
the reference model do not need `tb/lpeq_ref_pkg.sv`.

Run times:

- The ten-band test builds in under a minute and simulates in a few seconds.
- The block tests take well under a second each.
