# Wailing siren with an I2S stereo DAC

This design turns one 50 MHz clock into a police-style siren. The tone's pitch
sweeps up and down between about 256 Hz and 512 Hz. The audio leaves the chip
as a 16-bit I2S stream for an external stereo DAC (a Cirrus CS4344 on a
PmodI2S module). It needs no memory and no multiplier. A phase accumulator
makes the tone, a second, much slower counter sweeps its pitch, and one
binary counter supplies every clock the DAC needs.

```
                 +------------------------------------------------+
 clk_50MHz ----->| siren_timing  (20-bit counter tcount)          |
 rst ----------->|   ~tcount[1] -> MCLK 12.5 MHz -----------------+--> dac_MCLK
                 |    tcount[4] -> SCLK 1.5625 MHz ---------+-----+--> dac_SCLK
                 |    tcount[9] -> LRCK 48.828 kHz ----+----|-----+--> dac_LRCK
                 |   tcount[19] -> wail clock 47.68 Hz |    |     |
                 |   load_l / load_r strobes ---+      |    |     |
                 +------------------------------|------|----|-----+
                                                |      |    |
        +---------------------------------+     |      |    |
        | wail                            |     |      |    |
        |  pitch sweep  (on wail clock)   |     v      |    v
        |  tone: phase += pitch (on LRCK) |--> dac_if (16-bit shift reg,
        |        -> triangle sample       |    falling SCLK edge) ----> dac_SDIN
        +---------------------------------+
```

The siren sends the same sample on both channels. Three optional
extensions, all off by default, are described in
[Optional extensions](#optional-extensions).

## Files

| file | contents |
|---|---|
| `rtl/siren_pkg.sv` | shared types (`pitch_t`, `speed_t`, `sample_t`, `phase_t`), counter taps, strobe windows, defaults |
| `rtl/siren.sv` | top level: timing, wail(s), DAC interface, optional extensions |
| `rtl/siren_timing.sv` | 20-bit timing counter, derived clocks, load strobes |
| `rtl/wail.sv` | pitch sweeper, contains one `tone` |
| `rtl/tone.sv` | phase accumulator and triangle (or square) shaper |
| `rtl/dac_if.sv` | 16-bit parallel-to-serial shift register |
| `tb/*_tb.sv` | self-checking testbenches, one per module plus three end-to-end ones |
| `tb/siren_scoreboard.sv` | reference model and checker for the whole siren |
| `tb/cs4344_model.sv` | behavioural I2S receiver standing in for the DAC |

## One counter, all clocks

`siren_timing` is a free-running 20-bit counter `tcount` on the 50 MHz clock.
Its bits are used directly as clocks:

| signal | source | frequency | role |
|---|---|---|---|
| MCLK | `~tcount[1]` | 12.5 MHz | DAC master clock, 256 × LRCK (the CS4344's 256× oversampling mode) |
| SCLK | `tcount[4]` | 1.5625 MHz | DAC bit clock, 32 × LRCK = 2 channels × 16 bits |
| LRCK | `tcount[9]` | 48.828 kHz | channel select (low = left), and the audio sampling clock of `tone` |
| wail clock | `tcount[19]` | 47.68 Hz | pitch-sweep clock of `wail` |

The clock ratios are the point of this scheme. Because all clocks are powers of
two of the same counter, MCLK/LRCK = 256 and SCLK/LRCK = 32 hold exactly,
which the DAC requires. The rates quoted loosely as 48.8 kHz and 1.56 MHz are
these exact binary fractions of 50 MHz.

The tone, the sweep and the shift register are clocked by these counter bits.
They are not clock enables on the 50 MHz clock. On an FPGA, each of these
clocks should be treated as a generated clock. The design has four clock
domains (50 MHz, SCLK, LRCK and the wail clock). They all come from one
counter, so their edges stand in fixed relation to each other.

## I2S frame timing

This is the part most worth understanding before changing anything. One LRCK
period is 1024 system clocks, `tcount[9:0]` = 0x000 to 0x3FF:

```
count   event
0x000   LRCK falls: left slot begins; SCLK falls
0x010   SCLK rises (1st): DAC takes the LSB of the previous right word
0x020   SCLK falls inside load_l: dac_if loads the left sample, SDATA = L[15]
0x030   SCLK rises (2nd): DAC takes L[15]
 ...    each falling edge shifts one bit, each rising edge samples it
0x200   LRCK rises: right slot begins; tone advances to a new sample; SDATA = L[0]
0x210   SCLK rises (1st): DAC takes L[0]
0x220   SCLK falls inside load_r: dac_if loads the right sample, SDATA = R[15]
0x230   SCLK rises (2nd): DAC takes R[15]
```

* SCLK rises at counts 0x010, 0x030, ... and falls at 0x000, 0x020, ...
* `load_l` is a registered compare: it is high from count 0x010 to 0x02E. The
  compare window is `[0x00F, 0x02E)`, and the register adds one clock. The only
  falling SCLK edge in that window is at 0x020. There `dac_if` loads the left
  sample, and its MSB appears on SDATA. `load_r` does the same at 0x220.
* The DAC samples SDATA on the rising edges. The first rising edge after LRCK
  changes (0x010) still carries the previous word's LSB. The MSB is taken on
  the second rising edge (0x030), as I2S requires. The 16th bit of the left
  word, its LSB, is taken at 0x210, already in the right-channel slot. That
  one-bit delay is the I2S format.
* `tone` advances on the rising edge of LRCK (0x200). The right word, loaded
  at 0x220, carries that new sample. The left word of the next frame (0x020)
  carries the same sample again, so each sample goes out right channel first.
  In each case the sample has had at least 32 system clocks to settle before
  it is loaded.

To retime anything, keep a single falling SCLK edge inside each load window
(`siren_timing_tb` checks this).

## Tone: phase accumulator to triangle

`tone` keeps a 16-bit phase `count` and adds `pitch` (14 bits) once per
sample. The phase wraps `pitch × 48828 / 65536` times per second, so one pitch
unit is about 0.745 Hz. Pitch 1000 is about 745 Hz, and the largest pitch,
16383, is about 12.2 kHz. The top two phase bits select a quadrant, and the
other 14 bits form the index `i`:

| quadrant | output | shape |
|---|---|---|
| 0 | `i` | 0 → +16383 |
| 1 | `16383 − i` | +16383 → 0 |
| 2 | `−i` | 0 → −16383 |
| 3 | `i − 16383` | −16383 → 0 |

The output is a 16-bit signed triangle of peak ±16383, half of full scale. The
output is combinational from the phase register. It changes right after each
rising sampling edge and is stable for the rest of the period.

## Wail: the pitch sweep

On each rising wail-clock edge, `wail` first decides the direction and then
moves the pitch by `wspeed`:

* if `pitch >= hi_pitch`, it turns down;
* else if `pitch <= lo_pitch`, it turns up;
* otherwise it keeps the previous direction.

The limits are inclusive. A sweep can overshoot a limit by less than one step:
with the defaults the pitch reaches 688 before it turns. After reset the pitch
is 0, so the siren starts silent and climbs into range. At 8 units per
21 ms, that takes 43 steps, about 0.9 s. After that it sweeps 344 ↔ 688, up
or down in about 0.9 s each way. The pitch register is 14 bits and wraps. It
cannot wrap as long as `lo_pitch >= wspeed` and `hi_pitch + wspeed < 16384`.

## Parameters of the top (`siren`)

| parameter | default | meaning |
|---|---|---|
| `LO_TONE` | 344 | lower pitch limit (~256 Hz) |
| `HI_TONE` | 687 | upper pitch limit (~512 Hz) |
| `WAIL_SPEED` | 8 | pitch units per wail clock |
| `TCOUNT_W` | 20 | timing counter width; the wail clock is `50 MHz / 2^TCOUNT_W` (must be > 10) |
| `SQUARE_ON_BTN` | 0 | extension: square wave while `btn0` is high |
| `SPEED_FROM_SW` | 0 | extension: `sw[7:0]` sets the wail speed |
| `RIGHT_WAIL` | 0 | extension: a second sweep drives the right channel |
| `R_LO_TONE`, `R_HI_TONE`, `R_WAIL_SPEED` | 516, 1031, 12 | limits and speed of that second sweep (~384–768 Hz) |

Ports: `clk_50MHz`, `rst` (asynchronous, active high), `btn0`, `sw[7:0]`,
and `dac_MCLK`, `dac_LRCK`, `dac_SCLK`, `dac_SDIN`. Only the four DAC outputs
go to the DAC board. With an extension off, its input is ignored.

## Optional extensions

These are modifications of the basic siren, selected by parameter:

* **Square wave** (`SQUARE_ON_BTN`). While `btn0` is high, `tone` outputs
  +16383 for the first half of each period and −16383 for the second half.
  The square has the triangle's frequency, peak and zero crossings, so it can
  be switched in and out without a phase jump. It sounds much harsher, since
  its harmonics fall off as 1/n where the triangle's fall off as 1/n².
* **Speed switches** (`SPEED_FROM_SW`). `sw[7:0]` replaces `WAIL_SPEED` for
  the main sweep.
* **Stereo sweep** (`RIGHT_WAIL`). A second `wail` instance, with its own
  limits and speed, drives the right channel. The square-wave button acts on
  both channels. The switches act only on the left.

`btn0` and `sw` pass through two-flop synchronisers on the 50 MHz clock. The
button is not debounced. Bounce only toggles the waveform a few extra times.

## Where this design makes its own choices

* **Reset.** Every register has an asynchronous active-high reset to zero.
  Without one, the design would rely on FPGA power-up values. Because the
  reset is asynchronous, it works although the wail clock has no edge for
  10 ms after reset.
* **Output width.** The data path is 16 bits throughout. The triangle uses
  ±16383, half of the 16-bit range.
* **Limit comparisons.** These are inclusive (`>=`, `<=`), so the sweep turns
  on reaching a limit, not only on passing it.
* **Extensions.** Their details are this design's own: square amplitude and
  phase, the right channel's limits (516/1031/12), synchronisers, button
  polarity (high = pressed).
* **Board pins.** The 50 MHz clock, MCLK, SCLK, LRCK and SDIN go to one PMOD
  connector. The pin assignments are a board constraint and are not part of
  the RTL.

## Verification

Each module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. The expected values are computed
independently, in the testbench, from the formulas above:

| testbench | what it checks |
|---|---|
| `tone_tb` | each sample against the triangle or square of a reference phase; pitches 1, 1000, 8192 and 16383 and random ones; number of periods = ⌊samples·pitch/65536⌋; all four quadrants; switching to and from the square wave |
| `wail_tb` | sweep and tone against a reference for four limit/speed settings, including the defaults and a step larger than the range; turns at both limits counted |
| `dac_if_tb` | every SDATA bit after each falling edge and again after the rising edge; left and right loads; left wins if both strobes are high; zero fill |
| `siren_timing_tb` | one full 2^20 counter period: every derived clock each cycle, periods of 4/32/1024 clocks, 256 MCLK and 32 SCLK per LRCK, 31-clock strobes with exactly one falling SCLK edge each |
| `siren_tb` | end to end with a 13-bit counter (wail clock every 8192 clocks): clock pins each cycle, and every I2S word, decoded by `cs4344_model`, against a replay of sweep and tone; runs until two turns at each limit |
| `siren_full_tb` | the same at the default parameters (20-bit counter): 136 M clocks, from reset through a turn at 688 and back down to a turn at 344; about 1–2 minutes |
| `siren_ext_tb` | all three extensions on: `btn0` toggling, switches changing the speed, the right channel's own sweep |

The end-to-end testbenches count each mechanism: turns at the upper and at
the lower limit, left and right words, all triangle quadrants, square
samples and counter wraps. A run fails if any of them never happened. Every
testbench has a watchdog.

Synthesized with the default parameters (Yosys coarse synthesis), the top is
about 52 word-level cells and 69 flip-flops. There are no memories and no
latches.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/siren_pkg.sv tb/siren_tb.sv --top-module siren_tb
./obj_dir/Vsiren_tb
```

Replace `siren_tb` with any testbench name. The package file must come first.
`siren_pkg` holds the shared types and constants. Keep it the single place
where widths and counter taps are defined. The testbenches' reference models
hard-code the same formulas on purpose, so they do not inherit a mistake in
it.

## Limits of what is verified

* The analog side of the DAC is not modelled. `cs4344_model` checks the
  serial format and the word contents only.
* The clocks derived from counter bits are checked in simulation. Their
  timing on a real FPGA (generated-clock constraints, skew between the 50 MHz
  domain and the SCLK/LRCK domains) is not.
* `siren_ext_tb` runs the extensions only with a shortened wail period.
