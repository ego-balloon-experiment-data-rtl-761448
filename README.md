# EGO balloon-experiment data processor

A quick-look processor for magnetic tapes recorded by the EGO balloon experiments (Mark II,
Mark III and Mark IV). Each tape has 16 parallel tracks. A word on the tape is a set of
simultaneous pulses, with a "one" pulse meaning 1 and no pulse meaning 0, plus an
**index** pulse on one track that says a word is present. Words come at up to 1000 per
second. The processor picks out the data points worth looking at: those whose first
experiment word is at least a preset value. It converts their binary words to decimal for a
display and a printer. The printer needs 200 ms per line, so the processor refuses new data
while a line prints.

This is a synchronous SystemVerilog version of that processor. The original timing came
from monostables and free-running multivibrators. Here every delay is a counter on a 1 MHz
clock, so one clock cycle is 1 µs.

## Data path at a glance

```
track_det[16] ─┬─ sync ─┬─ temp_memory x16 (0.6 ms) ── patch_panel ──> registers A, B, C
 (or simulator)│        └─ index track ── strobe_delay (0.3 ms) ──> strobe
               │                                                       │
sim_generator ─┘                      control_unit <── go <── preset_compare (reg A)
                                         │  load / extra count / start / clear / print
                         readout_clock ──┴──> count pulses ──> registers ──> split_decimal_counter x2
```

| Module | Role |
|---|---|
| `ego_processor` | top level, wires everything below |
| `ego_pkg` | patch-panel type `patch_cfg_t`, the two standard boards, BCD type |
| `temp_memory` | per-track memory that holds a detected "one" for 0.6 ms |
| `strobe_delay` | 0.3 ms index memory whose trailing edge is the data strobe |
| `patch_panel` | routes tracks to register bits, picks the index, ID, C and sensitivity tracks |
| `binary_register` | experiment-word register, loaded with the complement and counted out to zero |
| `preset_compare` | accept gate on register A |
| `readout_clock` | shared 100 kHz count-pulse source, runs for 10 ms after a start |
| `split_decimal_counter`, `bcd_counter` | six-digit counter split into two three-digit BCD halves |
| `control_unit` | event sequencer: strobes, decision, extra count, start, print, lockout |
| `sim_generator` | simulated 1 kHz signals driven by the test toggle switches |

## Skew tolerance: temporary memories and the centred strobe

Tape skew means the pulses of one word do not arrive together. A data track may lead or lag
the index by up to 0.3 ms, which is ±108° of a 1 kHz cycle. Each data track therefore
feeds a `temp_memory`. On the leading edge of a pulse the memory goes high for 600 cycles,
and it ignores further edges until that time is up. The index track drives a memory of half
that length, `strobe_delay`. The trailing edge of the index memory produces a one-cycle
strobe 301 cycles after the index is seen. That strobe samples every data memory at the
centre of its 0.6 ms window. A data pulse is captured if its leading edge is between 299
cycles before and 300 cycles after the index edge. The original set these times with potentiometers. Here
they are the parameters `DUR_CYC` of `temp_memory` and `DELAY_CYC` of `strobe_delay`, fixed
when the design is built. If a head stack has constant skew, change `DELAY_CYC` to move the
strobe.

The memories cannot be retriggered. As with the monostables they replace, this sets a
limit: a track must be quiet again before its next pulse. A fixed skew per track is
handled at the full rate, including at 10 % over speed (909 µs per word). Two consecutive
"ones" on the same track with opposite skews of almost 0.3 ms are closer than the 0.6 ms
memory time, and the second one is lost.

The track inputs are asynchronous. They pass a two-flip-flop synchroniser, which adds 2
cycles to every latency. The 16 memory outputs appear on `dma_out`, and the index memory
appears on `index_dma`. The original unit had a monitor jack for each memory, used when
setting them up.

## Word formats and the patch panel

The format of a word is not fixed in logic. It comes from a plug-in board, which is the
`patch` input of type `ego_pkg::patch_cfg_t`. A board holds:
- one cord per register bit: plugged or not, which word (I or II), and which track;
- the index track and the ID track;
- the C track and the sensitivity track;
- the preset mask and a "process all" bit.

Tracks are numbered 1–16 in the tables below. Track *k* is bit *k−1* of every 16-bit vector
in the RTL.

**Mark II / III** (`mark23_panel()`): one word per event.

| tracks | 1–7 | 8–14 | 15 | 16 |
|---|---|---|---|---|
| meaning | A0–A6 | B0–B6 | C | index |

C goes to bit 0 of register C, so it prints as word C (0 or 1). C also gates the strobe in
ABC̄ mode.

**Mark IV** (`mark4_panel()`): two words per event. Word I carries the ID marker. Word II
has no ID marker and follows about 1 ms later.

| tracks | 1–7 | 8 | 9 | 10–11 | 12–15 | 16 |
|---|---|---|---|---|---|---|
| word I | A0–A6 | ID | index | A7–A8 | C0–C3 | C4 |
| word II | B0–B6 | (no ID) | index | B7–B8 | C5–C8 | sensitivity |

All three registers are 9 bits wide. An unplugged bit reads as data 0. This lets the 7-bit
Mark II/III words use the same registers.

## Event sequence (`control_unit`)

Every strobe is a candidate word. Lockout and busy states are described further down.

* **Mark II/III.** The strobe loads all register bits at once. In ABC̄ mode
  (`abc_mode = 1`) a word whose C bit is set is skipped entirely. In AB mode every word is
  processed.
* **Mark IV.** A strobe with the ID marker present is the *initial strobe*. It loads the
  word-I bits and opens a 2 ms window. A strobe inside the window without the ID marker is
  the *delayed strobe*. It loads the word-II bits and the sensitivity flip-flop. A lone
  word II is ignored. A window that closes with no word II clears the registers. A new
  word I inside the window replaces the old one.

One cycle after the deciding strobe, the accept gate decides what happens next. Times are
measured from that strobe.

| time | accepted (`go`) | rejected |
|---|---|---|
| +10 µs | extra count to A, B, C; decimal counters reset; sensitivity count; 200 ms lockout starts | – |
| +30 µs | – | 200 µs register reset, then ready for new data |
| +110 µs | readout clock started | |
| +10.11 ms | readout over: `print_cmd` pulse, registers cleared | |
| +200.01 ms | lockout ends | |

From the index edge on the tape to `print_cmd` takes 10 413 cycles (2 for the synchroniser,
301 for the strobe, then 10 110 to the print). While `lockout` is high, strobes are ignored.
Because of the lockout, lines reach the printer at least 200 ms apart, which is the
printer's 5 lines per second.

## Binary-to-decimal conversion by counting

The conversion uses no divider. When a strobe loads a bit, the register bit is set only if
the data line is 0, so the register holds the one's complement of the word N, that is
(2⁹−1) − N. The extra count turns this into the two's complement 2⁹ − N.

The `readout_clock` then sends a count pulse every 10 cycles to all three registers. Each
register has its own gate flip-flop. While the gate is open, each pulse increments both the
register and its decimal counter. After exactly N pulses the register wraps to zero, and
that wrap closes the gate. The decimal counter is left holding N. A word of 0 is already
zero after the extra count, so its gate never opens and it prints 000. The largest word,
511, needs 5.11 ms, which fits inside the 10 ms that the readout clock runs.

The decimal side is two six-digit counters, each split into two independent three-digit
BCD halves (`word_a`/`word_c` and `word_b`/`word_s`, digit 0 = units). Word C counts into
the lower half of counter A. The sensitivity flip-flop counts once, with the extra count,
into the lower half of counter B, so `word_s` reads 0 or 1.

## Accept gate (`preset_compare`)

The accept decision is made on register A while it still holds the complement. To accept
words of 2ᵏ or more, patch bits k…8 into `preset_mask` (`ego_pkg::preset_ge_pow2(k)`). The
gate is a NAND of those bits:
- if they are all 1, the data bits are all 0, so N < 2ᵏ and the gate says *stop*;
- if any of them is 0, N ≥ 2ᵏ and the gate says *go*.

Setting `process_all` accepts everything, and both standard boards set it. So the preset can
only be a power of two, as in the original.

## Simulation (TEST) mode

With `test_mode = 1` the tape inputs are replaced by `sim_generator`. A 1 kHz multivibrator
triggers a 0.5 ms pulse each period, and every track whose toggle in `sim_sw` is on carries
that pulse. For Mark IV the ID track instead carries the multivibrator divided by two.
Periods therefore alternate between word I and word II, and both words carry the same
switches. Expected printouts:

* **Mark II/III**, index switch on:
  - switches 1–7 print A = 1, 2, …, 64;
  - switches 8–14 print B = 1 … 64;
  - switch 15 prints C = 1 in AB mode.
* **Mark IV**, index and ID switches on:
  - switches 1–7, 10 and 11 print equal A and B (1 … 64, 128, 256);
  - switches 12–15 print C = 33, 66, 132, 264;
  - switch 16 prints C = 16 with sensitivity 1.

## Ports of `ego_processor`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 1 MHz clock, asynchronous active-low reset |
| `track_det` | in | 16 | threshold-detector outputs, asynchronous, high while a pulse exceeds threshold |
| `test_mode` | in | 1 | 1 = simulated inputs, 0 = tape |
| `sim_sw` | in | 16 | test toggle switches |
| `patch` | in | `patch_cfg_t` | inserted board |
| `abc_mode` | in | 1 | Mark II/III: 1 = ABC̄, 0 = AB |
| `lamp` | out | 16 | indicator drive (synchronised detector state) |
| `dma_out`, `index_dma` | out | 16, 1 | memory monitor outputs |
| `word_a`, `word_c`, `word_b`, `word_s` | out | 3×4 BCD each | the four counter halves |
| `print_cmd` | out | 1 | one-cycle print command; the counters are valid from then until the next accepted event |
| `lockout`, `busy` | out | 1 | 200 ms inhibit active / event in progress |

The parameter `CYC_PER_US` (default 1) scales every delay if you use a faster clock.

## What is outside the RTL

These parts are outside the RTL:
- the analog threshold detectors (Schmitt triggers, set to about −2 V);
- the printer and the Nixie displays, which are commercial instruments;
- the indicator lamps;
- the power supplies;
- the THRESHOLD position of the mode switch, which only calibrates the analog detectors.

The design starts at the detector outputs and ends at the BCD digits and the print command.

## Choices this design makes

These points are not set by the original design, or are set differently here:
- **Clock and pulse widths.** The clock is 1 MHz. Strobes and control pulses are one cycle
  long, where the original used 10 µs pulses.
- **Count rate.** The readout count rate is 100 kHz. The original rate is not known; any
  rate that finishes 511 counts in 10 ms works.
- **Accept threshold.** A word is accepted at "equal to or greater than" the preset, which
  is what the NAND gate does. Another reading of the original says "greater than".
- **Memories.** The memories cannot be retriggered and have no recovery time.
- **Mark IV window.** If the Mark IV window closes without word II, the registers are
  cleared. A repeated word I restarts the window.
- **Print timing.** The print command is issued when the 10 ms readout ends, and the
  registers are cleared at the same moment.
- **Mark II/III C bit.** The C bit is printed through register C.
- **Simulation input.** The simulated signals are switched in after the detectors. In the
  original they were switched in before.

## Simulating

Each testbench in `tb/` checks its own results and ends with a
`TB_RESULT checks=N failures=M` line. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ego_pkg.sv rtl/*.sv tb/tb_ego_processor.sv \
          --top-module tb_ego_processor -Wno-fatal
./obj_dir/Vtb_ego_processor
```

`tb_ego_processor` runs the whole design at its default size (about 2.8 s of simulated time,
a few seconds of wall time). It uses a tape model that can skew each track by up to ±250 µs
and a printer model, and covers:
- Mark II/III and Mark IV events, with and without skew;
- a word arriving during the lockout;
- ABC̄ inhibit;
- a preset reject;
- a Mark IV window timeout;
- both simulation modes.

It counts each of these mechanisms, and a mechanism that never occurs counts as a failure.
It also checks the index-to-print latency, the 200 ms lockout and the printer spacing.

Two further testbenches run the documented operating cases at full size:
- `tb_test_procedure` throws every test switch of both formats in turn and checks each
  printout: 16 lines for Mark II/III and 15 for Mark IV.
- `tb_rate_skew` checks the skew window at its edges: −299 and +300 µs are read, −301 and
  +302 µs are lost. It then plays 1100 back-to-back words at 1000 µs and at 909 µs
  spacing, with a fixed skew of up to ±290 µs per track and a preset of 64. The printed
  lines must match a model of acceptance and lockout.

The block testbenches (`tb_temp_memory`, `tb_strobe_delay`, `tb_patch_panel`,
`tb_binary_register`, `tb_preset_compare`, `tb_readout_clock`, `tb_split_decimal_counter`,
`tb_control_unit`, `tb_sim_generator`) test each module alone. Some of them use shortened
delays.
