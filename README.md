# Upstream DOCSIS QAM modulator and channel emulator

A cable-modem receiver has to cope with a difficult upstream channel. The channel
carries echoes ("micro-reflections") from impedance mismatches in the cable plant,
neighbouring channels that spill into the band, and thermal noise from the analog
front end. Testing a receiver against a real RF channel emulator is expensive. This
design builds the whole thing digitally, at complex baseband, small enough to sit in
the same FPGA as the receiver under test:

- a QAM modulator for the channel of interest, sending a programmable preamble and
  then pseudorandom data;
- a multipath channel with a direct path and three echoes, each with an integer plus
  fractional delay and a complex gain;
- two adjacent QAM channels, shifted up and down in frequency;
- complex Gaussian noise;
- a summing stage, the "channel stack", that produces a 22-bit I/Q output at 8
  samples per symbol. That output is also captured in RAM for off-line analysis.

Most of the arithmetic is shared in time, and much of it uses successive
approximation (CORDIC, shift-and-add logarithm, bit-serial square root) in place of
multipliers. The structure, rates and arithmetic of the blocks follow the design
documentation (a thesis on this emulator). Where that documentation leaves something
open, the choice made here is stated in the block's opening comment and listed in
"Departures and open points" below.

## Clocking: one clock, many enables

The original hardware runs from five PLL clocks: the symbol clock (5 MHz) and 2x, 8x,
16x and 32x that rate. Here everything runs on a single clock at the 32x rate (160
MHz for 5 Msym/s), which is 32 clocks per symbol. `emu_timing` counts the 32 ticks of
each symbol and issues one-clock enables:

| signal      | rate                 | used by                                          |
|-------------|----------------------|--------------------------------------------------|
| `sym_en`    | 1 per symbol (tick 0) | symbol generators, preamble and capture counters |
| `tim.ce16`  | 16 per symbol        | multiplexed I/Q streams, parameter loading        |
| `tim.ce8`   | 8 per symbol         | complex output rate, channel stack               |
| `tim.sel16`, `tim.half` | tick fields | pulse-shaping filter sequencing               |

A block that ran on the falling edge of a clock in the original runs on the next
32x edge here.

## Number formats and streams

- Mapped symbols are signed 1.4 numbers (`sym_t`): the constellation levels are
  ±2, ±4, ±6, ... in units of 1/16.
- Samples inside the channel are signed 2.16 (18 bits, `s18_t`). The channel stack
  and the output are signed 6.16 (22 bits).
- Gains are unsigned or signed 1.17. A frequency is a 32-bit phase increment per
  output sample, where 2^32 is one full turn.
- `iqmux_t` is a *multiplexed* stream. One 18-bit sample travels per `valid` strobe,
  and `q` says whether it is the I or the Q component. The pulse-shaping filter, the
  upsampler and all echo hardware process I and Q through one datapath at 16 samples
  per symbol. This time-sharing halves the multiplier count.
- `iqpar_t` is a *parallel* stream: I and Q together, one complex sample per `valid`,
  at 8 per symbol. `cordic_demux` converts multiplexed to parallel ahead of the
  frequency shifters.

All types, the parameter slot map and the filter coefficients are in `emu_pkg`.

## Signal flow

```
 load_params --param[]--> everything        button_0 / loading -> reset
                                                                     sw[2]     sw[3]
 main_tx_data -> ps_filter(8 sym) -> upsampler -> multipath -> cordic_demux   |         |
   (preamble,      4x, SRRC           2x, Farrow    direct +     -> cordic_cmul  |         |
    LFSR data,                                      3 echoes      -> gain_boost -+-> (+) <-+- awgn_gen
    capture)                                                                    |     |
 adj_channel x2: symbol_generator -> mapper -> ps_filter(16 sym) -> upsampler   |     +--> out_i/out_q
                 -> cordic_demux -> cordic_cmul(+-6.25 MHz) -> gain, shift -----+     +--> out_capture
```

### Parameters and profiles (`load_params`)

Four channel profiles of 32 words each are held in RAM. `sw[1:0]` selects one. A
32-word address counter steps on `ce16`, so one sweep takes 64 clocks (2 symbols).
Each word read is copied into its parameter register. The first sweep after
`button_0` raises `loading`, which holds the rest of the emulator in reset, so every
circuit starts with a complete, valid set of parameters. After that the counter keeps
sweeping. This means an edit written through the `ed_*` port, or a new `sw[1:0]`,
takes effect within 64 clocks without a reset. The `ed_*` port stands in for the
FPGA vendor's JTAG memory editor.

Slot map (see `emu_pkg`):

| slot | meaning |
|------|---------|
| 0, 1, 2 | modulation of the main channel, adjacent channel 1 and adjacent channel 2 |
| 3 | preamble length (0..256) |
| 4, 5, 6 | frequency of the main and the two adjacent channels |
| 7 + 4e .. 10 + 4e | echo e (e = 0..2): integer delay, fractional delay, gain re, gain im |
| 19, 20 | adjacent channel filter gains (0.17) |
| 21, 22 | adjacent channel left shifts |
| 23 | noise level (1.17; the noise standard deviation is level/2) |

The default profiles are:

| profile | main channel | echoes | noise level |
|---------|--------------|--------|-------------|
| 1 | QPSK | none | 0.2 |
| 2 | 16-QAM | one echo at -10 dB | 0.05 |
| 3 | 64-QAM | two echoes at -10 and -20 dB, with fractional delays | 0.05 |
| 4 | 32-QAM | three echoes, the third at -30 dB and 60 samples (1.5 µs) | 0.05 |

In every profile the adjacent channels sit at ±6.25 MHz.

### Main transmit data (`main_tx_data`, `symbol_generator`, `lfsr`, `symbol_mapper`)

After reset, the circuit first reads `pre_len` words from the preamble RAM of the
current modulation. There are five RAMs of 256 words, 2 to 6 bits wide, and both QPSK
modes share the 2-bit one. Then it raises `preamble_done` and switches to pseudorandom
data.

The data comes from six Fibonacci LFSRs of lengths 32, 33, 35, 36, 39 and 41, one bit
from each per symbol. Their unequal lengths make the words practically independent.
The word is cut to the 2..6 bits of the mode.

Every data word is also written to a 6-bit x 65536-word capture RAM, which stops when
full. `symbol_mapper` turns the word into I/Q coordinates for:

- QPSK at two power levels;
- 8-QAM;
- 16-QAM;
- 32-QAM (cross);
- 64-QAM.

### Pulse shaping (`ps_filter`, `dsmac`)

The pulse-shaping filter is a square-root raised-cosine filter with roll-off 0.25. It
is polyphase and interpolates by 4. The main channel uses 8 symbols (33 taps); the
adjacent channels use 16 (65 taps).

One symbol period holds 32 clocks. Each polyphase output needs `NSYM` products for I
and `NSYM` for Q. The filter spreads these over four `dsmac` units (dual-stream
multiply-accumulate). Each `dsmac` alternates between an I sum and a Q sum. It uses
one accumulator, with separate I and Q output registers.

The tap that does not fit the DSMAC schedule shares one multiplier with the output
gain. The output is re-ordered into an I,Q,I,Q stream at 16 samples per symbol. It
lags the ideal response by 2 symbols.

### Upsampling (`upsampler`)

A second-order Farrow interpolator doubles the rate to 8 complex samples per symbol.
It keeps each original sample and inserts a half-sample interpolated one. The
constants ALPHA0 = 63630 and ALPHA1 = -9449 come from the design documentation.

### Multipath (`multipath`, `echo_path`, `cshift_reg`, `frac_delay`, `path_attenuator`)

Each echo has three stages:

1. An integer delay of 0..63 complex samples, in a multiplexed shift register
   (`cshift_reg`).
2. A fractional delay Δ of -0.5..+0.5 sample. `frac_delay` is a 3-tap maximally flat
   filter with coefficients (Δ²-Δ)/2, 1-Δ² and (Δ²+Δ)/2. It uses three multipliers and
   is pipelined to a latency of 8 stream steps (half a symbol).
3. A complex gain. Two `path_attenuator` multipliers, one for the real and one for the
   imaginary part of the gain, act on the multiplexed stream. The two results are
   combined into the rotated sample.

The direct path is a plain delay equal to a zero-delay echo, so an echo with delay D
lands exactly D samples after the direct signal. At 8 samples per symbol and 5
Msym/s, one sample is 25 ns. So 63 samples cover the 1.5 µs echo limit of the DOCSIS
upstream specification. The sum is saturated to 2.16.

### Frequency shifting (`cordic_demux`, `cordic_cmul`, `cordic`)

Each channel is shifted by a rotating phase. The rotation uses a CORDIC instead of a
sine table and multipliers.

The phase accumulator adds the 32-bit frequency word once per complex sample. A
pipelined 18-stage CORDIC in rotation mode is loaded with the sample's I and Q and
rotated by the phase. The first stage uses a quarter-turn pre-rotation, so the full
circle is covered. The CORDIC gain K is removed by one constant multiplication at the
output.

Latency: 20 clocks for `cordic`, and 21 clocks from input to output for `cordic_cmul`.

### Adjacent channels (`adj_channel`)

Each adjacent channel has:

- its own symbol generator, with different seeds and bit wiring;
- a mapper;
- a 16-symbol filter, whose programmable gain sets the level;
- an upsampler;
- a frequency shifter.

In the stack the gain is extended by a left shift of 0..7 bits. This allows adjacent
channels much stronger than the main one, as the upstream specification allows.

### Noise (`awgn_gen`, `awgn_component`, `ln_unit`, `sqrt_unit`)

Each noise component uses the Box-Muller method, built from successive-approximation
units:

- Two banks of 18 LFSRs, with lengths between 33 and 79, give two uniform 18-bit
  numbers x1 and x2 per clock.
- `ln_unit` computes ln(x1). It multiplies by the constants (1 + 2^-k) and adds the
  matching ln(1 + 2^-k), over 18 stages; the exponent is handled by a leading-zero
  count.
- `sqrt_unit` takes the bit-serial square root of -2 ln(x1) over 18 stages.
- The CORDIC rotates a vector of length √2/K by the angle 2π·x2. This gives cos and
  sin without multipliers.

Four consecutive samples are averaged. This pushes the distribution further towards
Gaussian and yields one sample every 4 clocks. The average is then scaled by the
noise level. I and Q come from two components with different seeds.

The testbench measures:

- standard deviation = level/2 (to within 5 %);
- kurtosis 3.0 ± 0.25;
- I/Q correlation below 0.05.

### Channel stack and outputs

The stack holds the latest sample of each source. On every `ce8` it forms

    out = main + sw[2]·(adj1 << s1 + adj2 << s2) + sw[3]·noise

in 27 bits and saturates the result to 22 bits (6.16).

The main channel can be raised by +6, +12 or +18 dB using `dip[0..2]` (`gain_boost`,
shifts; the highest switch wins).

`out_capture` stores the first 65536 output samples (about 8000 symbols). It then
stops, so the preamble at the start is kept.

`led_display` shows "P" and the profile number on two seven-segment digits. The
decimal points light when the adjacent channels are on, and `ledg0` lights when the
noise is on.

## Timing summary

| block | latency |
|-------|---------|
| `ln_unit` | 20 clocks |
| `sqrt_unit` | 19 clocks |
| `cordic` | 20 clocks |
| `cordic_cmul` | 21 clocks |
| `frac_delay` | 8 stream steps |
| echo path, direct path | 12 stream steps |
| `ps_filter` | 2 symbols beyond the filter response |
| parameter load | 64 clocks |

Output rate: one complex sample every 4 clocks.

## Simulating

Every block has a self-checking testbench `tb/<block>_tb.sv`. Each one:

- drives the block with `$urandom` stimulus;
- compares against values computed in the testbench (reference arithmetic in `real`,
  LFSR models, independent filter designs);
- checks latencies and rates;
- ends with a `TB_RESULT checks=N failures=M` line;
- has a watchdog.

With Verilator 5:

```
verilator --binary -y rtl --top-module cordic_tb rtl/emu_pkg.sv tb/cordic_tb.sv
./obj_dir/Vcordic_tb
```

The package file is named first. `-y rtl` lets Verilator find every module it needs
by its file name. With `-Wall`, add `-Wno-fatal`: a single-block testbench leaves most
of the package's constants unused, and Verilator reports each of them.

`tb/channel_emulator_tb.sv` runs the complete emulator at its default sizes and takes
about half a minute. It runs two emulators side by side with identical seeds. One
control at a time is changed in the second, so the difference isolates each
mechanism:

- noise on and off, and its level;
- adjacent channels on and off;
- every DIP gain setting;
- two echoes written through the edit port, checked against g·x[n-D];
- parameter loading time;
- preamble words and the switch to data;
- symbol and output capture contents, and both capture memories filling;
- output rate;
- a live profile switch;
- a repeat of the preamble after a second reset.

It counts each mechanism and fails any that never happened.

`tb/mer_tb.sv` also runs at the default sizes. It measures the emulator's modulation
error ratio (see below).

## Departures and open points

- **Single clock.** The five PLL clocks are replaced by one clock and enables. The
  PLL, the DACs and the JTAG memory editor are outside this design. The editor is
  replaced by plain RAM write ports.
- **Choices where the documentation gives no values:**
  - LFSR tap positions, seeds and output wiring;
  - the parameter slot map and default profiles;
  - preamble RAM start-up contents (word = address);
  - the lengths of the noise LFSRs;
  - the bias constant of the logarithm;
  - the sequencer's counter layout.
- **Added saturation.** Saturation was added where an extreme gain could overflow:
  the path attenuator's single overflow case, the multipath sum and the channel
  stack.
- **Symbol timing.** The transmitted data word is the generator word present at the
  symbol enable, so the first data word is the generator's reset state.
- **Implementation MER.** `tb/mer_tb.sv` measures the modulation error ratio of
  the whole emulator with no impairments. It runs 64-QAM at the default sizes and acts
  as an ideal receiver: a long matched filter, a timing search and a least-squares
  gain. The result is 55.66 dB over 3000 symbols, with or without a frequency shift.
  The design target is 55 dB, which is the 35 dB DOCSIS requirement plus a 20 dB
  margin, and the original hardware reached 55.29 dB. The error is dominated by the
  8-symbol pulse-shaping filter. The component accuracies are also checked
  separately:
  - CORDIC within 2 LSB;
  - logarithm within 1 LSB;
  - exact square root;
  - fractional delay and echoes to a few LSB.
- **Resources.** On the original FPGA the design used 43 multipliers and about 401 KB
  of RAM. The RAM here is of the same order: about 3.4 Mbit, mostly the two capture
  memories.
