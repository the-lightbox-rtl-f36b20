# LightBox: an audio-driven light sequencer

The LightBox turns music into a light show. The audio is split into eight frequency
bands. Each band is rectified into a slowly varying level and digitised. The digital
part then does two things. It marks the bands that are louder than a weighted
average. It then plays one of 100 light sequences on eight lights, stepping the
sequence on rhythmic events in those bands. The user picks the sequence number,
00 to 99, on a 4x4 keypad. A two-digit seven-segment display shows the number,
and the digit being edited blinks.

This repository holds the digital part as synthesizable SystemVerilog. It also
holds self-checking testbenches for every module and for the whole design. The
analog front end and the analog-to-digital converter are not logic and are not
here. Their output enters the design as eight parallel samples. Those blocks are
the summing amplifier, the eight band-pass filters and rectifiers, and the
converter.

```
 samples[8] ──► band_threshold ──► channel_in[7:0] ──► light_sequencer ──► lights_out[7:0]
                                                            ▲
 rows[3:0] ──► keypad_ui ─────────────── pnum (BCD 00-99) ──┘
 columns[3:0] ◄──┘   └──► ssvdds[1:0], ssout[6:0]  (two-digit display)
```

## Top level: `lightbox_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | single clock; synchronous, active-high reset |
| `sample` | in | 8 × `SAMPLE_W` | A/D result per band, `[0]` = lowest frequency |
| `sample_valid` | in | 1 | one-cycle strobe: a complete set of eight samples |
| `rows` | in | 4 | keypad rows, active low (asynchronous, synchronised inside) |
| `columns` | out | 4 | keypad column drive, one low at a time |
| `ssvdds` | out | 2 | digit enables of a common-anode display, active low; `[1]` = tens |
| `ssout` | out | 7 | segments, active low, `{a,b,c,d,e,f,g}` |
| `lights_out` | out | 8 | the lights; bit 7 is the leftmost |
| `channel_in` | out | 8 | the "hot band" bits, brought out for observation |
| `pnum` | out | 8 | confirmed sequence number, `{tens, ones}` in BCD |

The whole design runs on one clock. The original design clocked registers
directly from band bits and counter bits. Here every such clock is a rising or
falling edge, found synchronously and used as a clock enable.

## Which bands are hot: `band_threshold`

Each sample is multiplied by a fixed per-band weight, `MULT = {1,1,2,2,2,3,5,5}`
from the lowest band to the highest. The weights damp the bass, which carries
most of the energy in music. A noisy band can be silenced by lowering its weight.
The eight weighted values are summed and divided by eight, truncating. Band *i*
is hot when its weighted value is strictly greater than that average.

The result is registered on `sample_valid` and held until the next set arrives.
With equal inputs in every band, the bands weighted 3 and 5 win. The original
design computed this on a microcontroller. Here it is one pipeline stage, with
the same arithmetic.

## The light sequence bank: `light_sequencer`, `light_pattern`, `light_cue`

This is the most involved part of the design.

### State and stepping

The state of a sequence has three parts:

- a 5-bit step counter;
- a stored 8-bit random pattern, for the random sequences;
- a three-deep history of random light numbers, for 25 and 26.

`light_pattern` is purely combinational. It takes the number, the state, fresh
random bits and the synchronised band bits. From them it gives four things:

- the lights;
- the **cue** that advances this sequence;
- the sequence length, after which the step counter wraps to 0;
- for timed sequences, whether the current step is a **rest** step.

`light_sequencer` holds the state. It advances the state when the selected cue
fires, and registers the lights. Changing the number restarts at step 0, with a
dark random pattern.

### Cues (`light_cue`)

The band bits are synchronised with two flops. A third registered copy gives
the edges. A rising edge of one counter bit gives the slow tick.

| Cue | Advances on |
|---|---|
| `DIRECT` | nothing: the lights are a function of the current bands |
| `RISE5` | band 5 going high |
| `RISE2` | band 2 going high |
| `RISE321` | any of bands 3, 2, 1 going high |
| `BOTH5` | band 5 rising, from an even step; band 5 falling, from an odd step. So odd steps mean "band 5 is high". |
| `SLOW` | the slow clock, a rising edge of counter bit `SLOW_BIT` |
| `TIMED` | from a rest step, only a band-5 rise; from any other step, the slow clock |

From a band edge to a change of the lights takes 4 clocks: two for the
synchroniser, one for edge detection and one for the step register. Direct
sequences follow the bands 3 clocks after them. Measured from `sample_valid`,
`channel_in` changes at the edge that takes the samples, and the lights of a
direct sequence change three edges later.

### The 100 sequences

Numbers 00-49 are the base sequences. They are generated by rule, not stored
as tables. Light 7 is the leftmost.

| No. | Family | Cue | Lights |
|---|---|---|---|
| 00 | direct | DIRECT | the hot-band bits |
| 01 | pair outwards | RISE5 | a symmetric pair moving from the centre to the edges (18, 24, 42, 81 hex) |
| 02 | pair inwards | RISE5 | the same pair moving in |
| 03 | pair bounce | RISE5 | in and back out (6 steps) |
| 04 | pair bounce, pausing | RISE5 | like 03, with each end shown twice (8 steps) |
| 05 | explode from centre | TIMED | a centred block growing from 2 to 8 lights and shrinking back to 4 |
| 06 | explode from dark | TIMED | rest dark, then grow from the centre to full and back |
| 07 | fill from left | TIMED | fill from the left one light per tick, then collapse toward the centre |
| 08 | fill left, then right | TIMED | fill and empty from the left, rest, then fill and empty from the right (32 steps, two rests) |
| 09 | fill from right | TIMED | fill from the right and empty again |
| 10-19 | chase | RISE5 | a seed rotated one place right per step. Seeds: 80 88 C0 CC E0 EE F0 F8 FC FE |
| 20-22 | random lights | RISE5 | 1, 2 or 3 random lights |
| 23 | random pair | RISE5 | one of the four aligned pairs |
| 24 | random half | BOTH5 | a random half (F0 or 0F) while band 5 is high, dark while it is low |
| 25, 26 | progressive random | RISE5 | one new random light per rise; each stays lit for 2 (25) or 3 (26) rises |
| 27, 28 | random adjacent pairs | RISE321 | 1 or 2 random adjacent pairs, wrapping round |
| 29 | random triples | SLOW | random groups of three adjacent lights |
| 30 | all follow | BOTH5 | every light on while band 5 is high |
| 31 | all toggle | RISE5 | every light toggles on each rise |
| 32 | alternating halves | BOTH5 | dark while band 5 is low; each high period lights the other half |
| 33 | shuffled | DIRECT | bands reordered 7,5,3,1,0,2,4,6 from left to right |
| 34, 35 | all follow band 2 / band 3 | DIRECT | every light equals one band |
| 36 | checkerboard | RISE5 | 55 and AA alternating |
| 37-49 | multi-paced chase | RISE5 for 37-43, RISE2 for 44-49 | several lights chasing left at different paces |

The multi-paced chase works like this. At step *t* (1..8), light `(p·t) mod 8`
is on for each pace *p* in the sequence's set. The sets are:

| Sequence | Paces |
|---|---|
| 37 | 1-3 |
| 38 and 44 | 1-2 |
| 39 to 43 | 1-4, 1-5, up to 1-8 |
| 45 to 49 | 1-4, 1-5, up to 1-8 |

Numbers 50-99 are *N*−50 with every light inverted. The exception is 60-69,
which are chases 10-19 running left instead of right.

A BCD code above 9 in either digit cannot be entered from the keypad. If it
appears anyway, the lights stay dark.

**Explode sequences 05-09.** Each of these waits at a rest pattern. It leaves the
rest only on a band-5 rise, then runs on the slow clock until it wraps back to
the rest. Sequence 08 has two rests, one before each half. A band-5 rise while
the sequence is running is ignored.

**Randomness.** A 16-bit maximal-length LFSR runs every clock. Its polynomial is
x^16 + x^14 + x^13 + x^11 + 1 and its seed is ACE1 hex. Its low nine bits are
caught at the moment of the cue. Because the cues come from audio, whose timing
is unrelated to the clock, the result is unpredictable in practice.

## Keypad entry: `keypad_ui`

Five smaller blocks make up the keypad side:

- a column-polling scanner (`keypad_scanner`, `key_decoder`);
- a keystroke and repeat unit (`key_repeat`);
- the entry state machine (`digit_entry`);
- display multiplexing (`display_mux`, `seven_seg`);
- digit blinking (`digit_blink`).

The keypad layout, with the top row first and `columns[0]` as the left column:

```
   1     2     3      UP
   4     5     6      DOWN
   7     8     9      CANCEL
  LEFT   0   RIGHT    CONFIRM
```

### Scanning and keystrokes

One column is driven low at a time. The scan moves on once per scan tick, but
only while every row reads high. A low row pauses the scan on that column for
as long as the key is held.

The rows pass a two-flop synchroniser. The column value is delayed by the same
two clocks, so a row is always decoded against the column that produced it. A
key counts only when exactly one row of the paused column is low.

`key_repeat` samples the "key down" level at a much slower repeat tick. This
also rides over contact bounce. The first tick that finds the key down gives
one keystroke. While the key stays down, another keystroke follows every 8
ticks. Holding an arrow key therefore keeps counting. A tick that finds no key
re-arms the unit.

### Entry state machine (`digit_entry`)

There are two pairs of digit registers:

- the **active** pair `tens_digit`, `ones_digit`, which selects the sequence (`pnum`);
- the **displayed** pair `tens_temp`, `ones_temp`, which is being edited.

| State | Meaning | 0-9 | UP / DOWN | LEFT | RIGHT | CONFIRM | CANCEL |
|---|---|---|---|---|---|---|---|
| IDLE (0) | showing the active number | set tens, go to TENS | step ones, go to ONES | go to TENS | go to ONES | copy displayed → active | copy active → displayed |
| TENS (1) | tens blinking | set tens, stay | step tens | — | go to ONES | copy displayed → active, go to IDLE | copy active → displayed, go to IDLE |
| ONES (2) | ones blinking | set ones, stay | step ones | go to TENS | — | copy displayed → active, go to IDLE | copy active → displayed, go to IDLE |

Digit steps wrap between 9 and 0. Every output is registered and changes in the
clock after the keystroke.

### Display and blinking

The display alternates between the two digits on bit `MUX_BIT` of a
free-running counter. It always shows the *displayed* pair. `ssvdds` is active
low, because the display is common anode.

When an edit is in progress, the enable of the digit being edited is ORed with
counter bit `BLINK_BIT`. This turns the digit off for half of every blink
period.

## Parameters and timing

Each time base is a bit of a free-running counter. The defaults are the
original design's bit positions. The original design's clock frequency is not
given. The times below assume a 40 MHz clock.

| Parameter | Default | Use | Period at 40 MHz |
|---|---|---|---|
| `SCAN_BIT` | 7 | keypad column step | 6.4 µs |
| `REPEAT_BIT` | 18 | keystroke sampling and repeat | 13 ms per tick; repeat every 105 ms |
| `MUX_BIT` | 8 | display digit switch | 6.4 µs per digit |
| `BLINK_BIT` | 26 | blink of the edited digit | 3.4 s |
| `SLOW_BIT` | 24 | slow light clock (`SLOW`, `TIMED`) | 0.84 s |
| `SAMPLE_W` | 10 | A/D sample width (right-justified 10-bit result) | — |

`band_threshold` also has these parameters:

- `N` = 8 bands;
- `MULT_W` = 3;
- the `MULT` weights.

`key_repeat` has `REPEAT_TICKS` = 8. `light_sequencer` has `CNT_W` = 32.

## Where this design departs from the original

- **One clock.** The original design clocked registers from band bits and
  counter bits. Here those signals are synchronised, and their edges are used
  as enables.
- **One sequence state.** The original design keeps one state register per cue
  type and a selector. Here there is a single state, a step counter, and a cue
  chosen per sequence.
- **Sequences by rule.** The original design's sequences are hand-written state
  tables. Here they are generated from the families above. Seeds, paces, cues,
  lengths and the inversion rule follow the original.
- **Explode sequences 05-09.** The original design marks these as
  non-working. They are built here with the behaviour it intended. The exact
  shapes of the steps are this design's.
- **Progressive random 25 and 26.** These are also marked non-working in the
  original design. They are built as described there: a new light on each
  band-5 spike, kept for 2 or 3 spikes. The original code cued them from bands
  3..1. Here they follow the description and use band 5.
- **Sequences 60-69** run the chase leftwards, not inverted, as the original
  description says of the chases.
- **Random source.** The original design took random bits from the low bits of
  a counter. At a slow-clock tick those bits are always zero, so sequence 29
  would never change. Here an LFSR is used.
- **Digit entry.** The description and the code of the original entry machine
  differ. Here, a digit typed in TENS stays in TENS, following the description.
  LEFT in TENS and RIGHT in ONES are ignored. UP/DOWN from IDLE enter ONES.
- **Key repeat.** The original design says that holding a key repeats. The exact
  rule here is this design's: first keystroke at once, then one every 8 ticks.
- **Threshold in logic.** The original computed the threshold in software on a
  microcontroller. The arithmetic is the same, with truncating division by 8.
- **Dropped.** An unused switch-sum output of the original display module is
  not part of this design.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and ends with `$finish`. Each has a
watchdog that counts a failure if the run hangs. Build and run a testbench with
plain Verilator 5. The package must come first; `-y` finds the other modules by
file name:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/lightbox_pkg.sv tb/tb_lightbox_top.sv --top-module tb_lightbox_top
./obj_dir/Vtb_lightbox_top
```

Replace `tb_lightbox_top` with any other testbench name:

| Testbench | What it checks |
|---|---|
| `tb_lightbox_top` | end to end, with short time bases: keypad typing, sequences of every cue type, inversion, chases both ways, timed explode, blinking. Counts 18 mechanisms and fails if any never happens. |
| `tb_lightbox_full` | the top at its default parameters: direct sequence 00, then type 1, RIGHT, 0, CONFIRM and check chase 10 (about 3 s of simulation) |
| `tb_voltage_ladder` | an eight-step resistor ladder, 3.3 V down to 0 V, as samples with a 5 V reference; checks the hot bands (0D hex), and E0 hex when reversed |
| `tb_light_pattern`, `tb_light_sequencer`, `tb_light_cue` | written-out tables for every family; a sweep of all 100 numbers (cue, length, inversion and mirroring); stepping per cue; cue timing |
| `tb_band_threshold` | 500 random sample sets against a model, plus corner cases |
| `tb_digit_entry` | directed key sequences and 3000 random keys against a reference model |
| `tb_keypad_scanner`, `tb_key_decoder`, `tb_key_repeat`, `tb_keypad_ui` | scan pause, decode of every row/column pair, repeat timing, the UI with a keypad model (`keypad_model`) |
| `tb_display_mux`, `tb_digit_blink`, `tb_seven_seg`, `tb_free_counter` | the small blocks |

The testbenches shrink the time-base bits with parameter overrides, so they
finish in seconds. To try a change in timing, override the same parameters on
`lightbox_top`.

## How far it can be trusted

- Every module passes Verilator lint and its own testbench.
- Each testbench was also run against a deliberately broken copy of its module,
  and it caught the fault.
- The expected values come from models written separately from the RTL: the
  sequence rules, the entry rules and the threshold arithmetic.
- The full design has been simulated at its default parameters for one complete
  selection-and-play operation.
- It has not been run on hardware.
- Real audio has not been played through it.
- The weights and threshold match the original arithmetic. Whether the lights
  look good depends on the analog front end, which is not part of this RTL.
- A few lint warnings about unused signals remain. They are harmless:
  - edge bits are computed for all eight bands, but only four are used;
  - the upper bits of a product in the pace rule are unused;
  - the threshold's `out_valid` strobe is left unconnected at the top;
  - the package's `STEP_W` is unused when the package is linted alone.
