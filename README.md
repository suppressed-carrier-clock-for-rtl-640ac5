# Suppressed carrier clock (SCC) modulator and demodulator

A free-running clock puts its energy into narrow spectral lines at the
clock frequency and its harmonics. Those lines cause most of the radiated
emission of a fast digital board. A suppressed carrier clock spreads that
energy without a PLL or DLL. The regular clock is multiplied by a square
wave of +1 and -1, the *modulating signal*. Each time the modulating
signal changes sign, the clock is inverted, which means that one of its
transitions is skipped. The carrier line then disappears, as in
double-sideband suppressed-carrier AM. Its power moves into side bands
whose shape follows the spectrum of the modulating signal.

How well this works depends on where the skips fall. The *modulation
profile* is the sequence of the number of clock transitions between two
adjacent skipped transitions. Spectral simulations of several profiles
(random, sinusoidal, triangular, saw-tooth and others) favour a saw-tooth:
an increasing series such as 1, 2, 3, ..., 100 that then starts again. Its
attenuation is about 18 dB, against 9 dB for a constant spacing of 50. It
is also the easiest profile to build. This RTL builds a saw-tooth SCC
modulator with its two profile generators. It also gives a behavioural
model of a demodulator that rebuilds a plain clock from the SCC alone.

```
             +---------------------+   profile    +----------------+  mod_sig
             | saw-tooth generator |------------->|  down-counter  |-----------+
             | (I: mux/adder/cmp/  |<-------------|  load at 0,    |           |
             |  divider/register;  |   advance    |  toggle at 0   |           v
             |  II: up-counter/cmp)|   (zero)     +----------------+   +---------------+
             +---------------------+                                   | glitch-free   |  scc_out
clk_in --------------+-------------------------------------------------| clock mux     |--------+--> to receiver
                                                                       +---------------+        |
                                                       scc_out XOR mod_out = rec_clk_local      |
                                                                                                v
                                                             +-----------------------------------+
                                                             | demodulator (behavioural model):  |
                                                             | XOR transition detectors on SCC   |--> rec_clk
                                                             | and on SCC delayed 1 slot, OR, /2 |
                                                             +-----------------------------------+
```

## Transition slots and what a profile value means

This part matters most for using the design. The glitch-free multiplexer
(see below) divides its input clock by two. So the SCC carrier runs at
**half the frequency of `clk_in`**. The SCC has one *slot* per `clk_in`
period. A slot is a falling edge of `clk_in`, where the SCC either changes
or, at a skip, stays put. A 500 MHz carrier therefore needs a 1 GHz
`clk_in`.

The down-counter loads a profile value `P` when it reads zero. It counts
`P, P-1, ..., 0` and then toggles the modulating signal. So the signal
toggles every `P+1` slots. Each toggle skips exactly one transition, and
`P` transitions sit between two skips. The profile value is therefore the
number of transitions between skips. A value of 0 gives two skips in a
row.

For the default series the SCC looks like this (t = transition, s = skip):

```
profile:      1      3          5              ...   11                        1 ...
slots:    s   t  s   t t t  s   t t t t t  s   ...   t t t t t t t t t t t  s   t  s
```

One modulation period of a series lasts `sum over the series of (P+1)`
slots, multiplied by the divider ratio. For the default series that is 42
slots.

## Profile generators

Both generators present the current value on `profile`. They step to the
next value on the down-counter's zero strobe (`skip_strobe`). The
down-counter loads the old value on that same clock edge. Parameter `GEN`
of `scc_modulator` / `scc_link` selects the generator.

**Generator I** (`sawtooth_gen_i`, `GEN_ADDER`, the default) holds the
value in a register. On each step, a multiplexer loads either the value
plus the increment, from the adder, or the start value. It loads the start
value when the comparator finds that the register has reached the limit. A
divider in front of the register lets each value be used `div_n` times in
a row.

- start 1, increment 2, limit 11 gives 1, 3, 5, 7, 9, 11, 1, ...
- Divider 2 gives 1, 1, 3, 3, 5, 5, ...
- Any increasing arithmetic series can be set up. An increment of 0 gives a
  constant spacing.

**Generator II** (`sawtooth_gen_ii`, `GEN_COUNTER`) is an up-counter that
reloads its start value when the comparator sees the limit. It gives
start, start+1, ..., limit. Its `step` and `div_n` inputs do not exist;
the modulator leaves them unused.

## Glitch-free clock multiplexer

In concept, the modulator is a 2:1 multiplexer between the clock and its
inverse, selected by the modulating signal. Switching a clock through a
gate at an arbitrary moment can glitch, so `gf_clock_mux` never switches
the clock directly:

- A toggle flip-flop on the rising edge of `clk_in` makes the carrier.
- A second flip-flop on the same edge re-times the modulating signal.
- Their XOR is captured on the **falling** edge of `clk_in`, half a period
  after both have settled. `scc_out` is therefore a flip-flop output that
  changes only on falling edges.
- The re-timed modulating signal is captured on the same falling edge
  (`mod_out`). `scc_out ^ mod_out` (`rec_clk_local`) gives back the plain
  carrier, for a receiver that has the modulating signal.

Latency: the modulating signal toggles at rising edge `k`. The skip shows
at the falling edge after rising edge `k+1`.

## Demodulator (behavioural model)

`scc_demodulator` rebuilds a periodic clock from the SCC alone. It uses no
knowledge of the modulating signal.

- An XOR of a signal with a copy delayed by a quarter slot gives a short
  pulse at each of its transitions.
- One such detector watches the SCC. A second one watches the SCC delayed
  by one slot.
- At a skipped slot, the delayed copy still carries the previous slot's
  transition. So the OR of the two detectors pulses once in every slot.
- A divide-by-2 turns that pulse train into a clock with the carrier
  period, `2*T_SLOT`.

The delays are analog delay lines, so the module is written with transport
delays (`<= #`). It simulates with `--timing` but does not synthesize; a
synthesizer keeps none of it. `T_SLOT` (default 1 ns, a 500 MHz carrier)
must match the slot time of the SCC that feeds it. Limitations:

- The phase of `rec_clk` depends on the initial state of the divider.
- A profile value of 0 leaves a slot without a pulse, and the recovered
  clock slips half a period there.

## Modules

| module | role |
|---|---|
| `scc_pkg` | shared constants (`PROFILE_W` = 8, default series), generator-select enum |
| `gf_clock_mux` | glitch-free multiplexer: SCC, aligned modulating signal, locally recovered clock |
| `scc_down_counter` | counts each profile value down to 0, toggles the modulating signal |
| `sawtooth_gen_i` | generator I: register, adder, comparator, multiplexer, divider |
| `sawtooth_gen_ii` | generator II: up-counter and comparator |
| `scc_modulator` | generator + down-counter + glitch-free multiplexer |
| `scc_demodulator` | behavioural demodulator model |
| `scc_link` | top: modulator feeding demodulator |

Parameters of `scc_link`:

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 8 | width of the profile register and down-counter |
| `GEN` | `GEN_ADDER` | generator I or II |
| `START` | 1 | first value of the series |
| `STEP` | 2 | increment (generator I) |
| `LIMIT` | 11 | last value; the series restarts after the value that reaches it |
| `DIV_N` | 1 | uses of each value (generator I) |
| `T_SLOT` | 1.0 ns | slot time assumed by the demodulator model |

All logic resets asynchronously on `rst_n` low. After reset the first
value is loaded in the first clock cycle. The synthesizable part, the
modulator, has 29 flip-flops with `WIDTH` = 8.

## Settings for the profiles of interest

| profile | START | STEP | LIMIT | DIV_N | slots per modulation period |
|---|---|---|---|---|---|
| 1, 3, 5, 7, 9, 11 (default) | 1 | 2 | 11 | 1 | 42 |
| 1, 1, 3, 3, ..., 11, 11 | 1 | 2 | 11 | 2 | 84 |
| saw-tooth 1..100, 200 skips per period (about 10,000 clocks, 1 % clock loss) | 1 | 1 | 100 | 2 | 10,300 |
| constant 50 (zero offset) | 50 | 0 | 50 | 1 | 51 per skip |
| offset k around 50 | 50-k | 1 | 50+k | about 100/k | about 10,000 |

Non-arithmetic profiles (random, sinusoidal, triangular and the like) are
outside what either generator can produce.

## Measured spectra

`tb/scc_spectrum_tb.sv` samples the simulated SCC once per slot over exactly
one modulation period of `N` slots, then computes the spectral lines at
`carrier + k/N` for `|k| <= 150`. A regular clock, sampled the same way,
has one line of relative amplitude 1 at the carrier.

| profile | slots `N` | carrier line | peak line below a regular clock |
|---|---|---|---|
| saw-tooth 1..100, each value twice | 10,300 | none (balanced modulating signal) | 17.7 dB |
| constant 50 | 1,020 (10 periods) | none | 3.9 dB |
| default 1, 3, ..., 11 | 42 | -16.9 dB | 7.3 dB |

The saw-tooth figure agrees with the roughly 18 dB that the original study
reports for the profile {1, 2, ..., 100}. For the constant spacing, the
original reports about 9 dB. Its spectra were taken at a measurement
bandwidth that is not known here. The exact-line metric above puts all the
energy of that profile into a few lines, so it shows less suppression. The
testbench checks the line spectra against the same sums computed from the
reference profile. It also checks that the carrier line vanishes, that the
saw-tooth reaches at least 17 dB, and that the saw-tooth beats the
constant spacing by at least 6 dB. The default series is short and
unbalanced (its modulating signal spends 6 more slots at one sign than the
other), so it keeps a carrier line. Use a longer series in practice.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Example, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module scc_link_tb \
    -y rtl -y tb +libext+.sv rtl/scc_pkg.sv tb/scc_ref_pkg.sv tb/scc_link_tb.sv
./obj_dir/Vscc_link_tb
```

| testbench | what it checks |
|---|---|
| `gf_clock_mux_tb` | the SCC against carrier XOR re-timed modulating signal after every falling edge; no change away from falling edges; run lengths against toggle spacing |
| `scc_down_counter_tb` | zero exactly `value+1` cycles after each load, with the value changing every cycle; one toggle per zero |
| `sawtooth_gen_i_tb`, `sawtooth_gen_ii_tb` | the series against a reference model (`tb/scc_ref_pkg.sv`) and the literal list 1, 3, 5, 7, 9, 11, 1 |
| `scc_modulator_tb` | measured SCC profile for generator I, generator I with divider 2, and generator II; skip-to-skip cycle counts |
| `scc_demodulator_tb` | recovered clock period exactly 2 ns and one pulse per slot, for random skips |
| `scc_link_tb` | end to end at the default parameters: profile, 42-slot modulation period, recovered clock; counts skips, restarts and skips bridged by the demodulator |
| `scc_workloads_tb` | the 1..100 saw-tooth (10,300-slot period), constant 50, generator II 1..100 and offset 10 around 50, through both recovery paths |

| `scc_spectrum_tb` | line spectra of three profiles, as in the section above |

`tb/scc_profile_monitor.sv` measures a profile from the SCC waveform.
`tb/scc_profile_checker.sv` compares it with the reference model.

## Where this RTL departs from, or adds to, the original circuit

- **Carrier at half of `clk_in`.** The conceptual modulator switches the
  regular clock with its inverse, so its carrier would equal the input
  clock. The glitch-free multiplexer as drawn toggles a flip-flop on every
  input period. The RTL follows that drawing.
- **Modulating-signal toggle flip-flop.** The original says that the
  multiplexer switches whenever the down-counter reaches zero. The toggle
  flip-flop that does this is placed in `scc_down_counter`.
- **Choices the original does not specify:**
  - The comparator tests `value >= limit`, so a limit off the series still
    restarts it (one value past the limit).
  - The adder wraps.
  - Generator II steps on the down-counter's zero strobe.
  - A divider ratio of 0 acts as 1.
  - Widths are 8 bits.
  - Reset values are as given above.
- **Demodulator delays.** "One clock" is taken as one slot and "a quarter
  clock" as a quarter slot. Both are transport delays in a model, not
  logic.
- **Not built:** the programmable-logic board used for measurement, and
  any radiated-emission measurement. Spectra are checked only as the ideal
  line spectra of the simulated waveform (see "Measured spectra").
- **Assertion:** `scc_down_counter` asserts that the modulating signal
  changes only after a zero of the count.
- **Timing at speed** (a 1 GHz `clk_in` for a 500 MHz carrier) has not
  been analysed.
