# Power frequency deviation meter with a digital encoder

This meter shows, in one 20 ms measurement, how far the mains frequency is
from 50 Hz, in steps of 1 Hz from 46 Hz to 54 Hz. It needs no arithmetic
and no display decoder. The signal under test is multiplied by 100, and
the pulses of the product are counted while a fixed 20 ms gate is open.
That gives exactly **2 counts per hertz**: 92 counts at 46 Hz, 100 at 50 Hz
and 108 at 54 Hz. A row of AND gates on the BCD counter outputs then marks
the counts. Each gate goes high only when the count reaches its own
frequency's value, so every 1 Hz step gives its own pattern. The pattern
can be read as pulses on nine wires or, through latches, as nine steady
levels that can drive indicator lamps or a controller directly.

All the logic is synchronous to one clock, the 1 MHz crystal. The analog
parts stay outside the RTL: the mains transformer, the input selector and
the PLL's phase comparator, loop filter and oscillator.

```
 signal under test ──► PLL (analog, x100) ──► sig_a ─► sync_2ff ─┬─► fb_divider ÷100 ─► pll_fb ─► back to PLL
                                                                  │
 1 MHz clk ─► DDA-1..4 (÷10^4) ─► FF-1 (÷2, 50 Hz) ─► FF-2 (÷2) ─┐│
                                        gate_b = FF-2 Q (25 Hz)   ││
                                        clear  = FF-2 Q-bar       ▼▼
                                                     G-0: A·B ─► DC-1 ─► DC-2 ─► DC-3   (BCD, cleared while B low)
                                                                   └───────┴───────┴──► G-46..G-54 ─► gate[8:0]
                                                                                             └─► output latches ─► level[8:0]
```

## Timebase and gate window (`ref_timebase`)

Four cascaded decade counters (`dda_decade`, 74160-style, each giving a
ripple carry every tenth enabled cycle) divide 1 MHz down to a 100 Hz tick.
FF-1 (`toggle_ff`) halves the tick to 50 Hz. FF-2 halves FF-1 again. It
toggles when FF-1 goes from 1 to 0, as a falling-edge JK flip-flop would.
FF-2's Q is gate signal **B**: 25 Hz, high for 20 000 cycles and low for
20 000. FF-2's Q-bar is the counter **clear**: the counters are held at
zero for the 20 ms in which B is low. A new count therefore starts from
000 every 40 ms.

`N_DDA` (default 4) sets the number of decade stages. The window is
2·10^N_DDA clock cycles long.

## Pulse counter (`bcd_pulse_counter`, `decade_counter`)

Gate G-0 forms A·B (`and_out`). Each falling edge of A·B, caused by A
falling while B is high, advances DC-1. DC-1's 9→0 wrap advances DC-2, and
DC-2's wrap advances DC-3. This is the falling edge of QD that clocks the
next 7490 in a ripple chain. Each `decade_counter` digit is ordered
QD QC QB QA, the 7490's pins 11, 8, 9 and 12. The gate table below uses
those pin numbers.

Two choices here are not taken from a datasheet:

* A fall of A·B caused by B itself falling is **not** counted, because the
  clear that comes with B's fall wins. The discrete circuit has a race at
  this point.
* `sig_a` arrives asynchronously. It goes through a two-flip-flop
  synchronizer, and its edges become single-cycle count enables. At 1 MHz
  against at most 5.4 kHz, every pulse is seen. A count shows on `count`
  three cycles after the edge of `sig_a`.

## The encoder gates (`deviation_gates`)

This is the part that needs the most care. The gates do not compare the
count with a number. Each one ANDs a few counter bits, chosen so that the
gate is high during counts that the counter passes through, or stops at,
only when the frequency is at least its own. "n/k" means pin n of DC-k
(12 = QA, 9 = QB, 8 = QC, 11 = QD):

| output | inputs            | high at counts          | first reached at |
|--------|-------------------|-------------------------|------------------|
| G-46   | 9/1 12/2 11/2     | 92–93, 96–97            | 46 Hz            |
| G-47   | 8/1 12/2 11/2     | 94–97                   | 47 Hz            |
| G-48   | 8/1 9/1 11/2 12/2 | 96–97                   | 48 Hz            |
| G-49   | 11/2 12/2 11/1    | 98–99                   | 49 Hz            |
| 50 Hz  | 12/3 (a wire)     | 100–199                 | 50 Hz            |
| G-51   | 9/1 12/3          | 102–103, 106–107        | 51 Hz            |
| G-52   | 8/1 12/3          | 104–107                 | 52 Hz            |
| G-53   | 8/1 9/1 12/3      | 106–107                 | 53 Hz            |
| G-54   | 11/1 12/3         | 108–109                 | 54 Hz            |

The count rises from 0 to its final value in each window. It stays there
until B falls and is then cleared. So a gate whose range lies below the
final count gives complete pulses. A gate whose range holds the final count
stays high until the end of the window. The number of pulses on each
output identifies the frequency:

| f (Hz) | 46 | 47 | 48 | 49 | 50 | 51 | 52 | 53 | 54 |   |
|--------|----|----|----|----|----|----|----|----|----|---|
| G-46   | 1  | 1  | 2  | 2  | 2  | 2  | 2  | 2  | 2  |   |
| G-47   | 0  | 1  | 1  | 1  | 1  | 1  | 1  | 1  | 1  |   |
| G-48   | 0  | 0  | 1  | 1  | 1  | 1  | 1  | 1  | 1  |   |
| G-49   | 0  | 0  | 0  | 1  | 1  | 1  | 1  | 1  | 1  |   |
| 50 Hz  | 0  | 0  | 0  | 0  | 1  | 1  | 1  | 1  | 1  |   |
| G-51   | 0  | 0  | 0  | 0  | 0  | 1  | 1  | 2  | 2  |   |
| G-52   | 0  | 0  | 0  | 0  | 0  | 0  | 1  | 1  | 1  | * |
| G-53   | 0  | 0  | 0  | 0  | 0  | 0  | 0  | 1  | 1  |   |
| G-54   | 0  | 0  | 0  | 0  | 0  | 0  | 0  | 0  | 1  |   |

\* Measurements on a discrete build of this circuit are reported to give
2 pulses on G-52 at 53 and 54 Hz. With the gate connections above, G-52
covers the unbroken range 104–107 and gives one pulse. This design follows
the connections. Every other entry matches those measurements.

Each hertz covers two counts (92–93 is 46 Hz). So the ±1 count uncertainty
of a gated count moves the reading only when the true count sits right at
an even number. The meter reads frequencies in the band [f, f+1) Hz as f.

Only counts below 200 are meaningful. The gates ignore the higher decades,
so 292 would look like 92. The hardware never gets near that at power
frequencies.

## Output latches (`output_latch`)

Every gate output sets a sticky flag while B is high. One cycle after B
falls, the counters still hold the final count. At that cycle the flags,
ORed with the gates' present outputs, are copied to `level`, and the flags
are cleared. `level_update` pulses at the same time. `level` then stays
constant for the next 40 ms. The result is a **thermometer code**: bit k
is set when the frequency is at least 46+k Hz. 45 Hz reads all zeros, and
anything from 54 Hz upwards reads all ones.

The source describes latches on the gate outputs only by what they give:
stable high or low levels. Set-on-pulse latches with a transfer at the end
of each window are this design's choice.

## PLL feedback divider (`fb_divider`)

The PLL multiplies by 100 because a ÷100 counter in its feedback path makes
its phase comparator see the input frequency. This counter is digital and
is part of the RTL. It counts rising edges of the synchronized `sig_a` and
drives `pll_fb` with a 50 % duty square wave. The PLL's analog part must
take `pll_fb` as its comparator's second input.

## Top level (`freq_dev_meter`)

| port           | dir | width | meaning                                          |
|----------------|-----|-------|--------------------------------------------------|
| `clk`          | in  | 1     | 1 MHz crystal clock                              |
| `rst_n`        | in  | 1     | asynchronous active-low reset                    |
| `sig_a`        | in  | 1     | PLL oscillator output (pulse train A), async     |
| `pll_fb`       | out | 1     | `sig_a` ÷ 100, to the PLL phase comparator       |
| `gate_b`       | out | 1     | gate signal B (FF-2 Q)                           |
| `clear`        | out | 1     | counter clear (FF-2 Q-bar)                       |
| `and_out`      | out | 1     | G-0 output, A·B                                  |
| `count`        | out | 3×4   | BCD count; `count[0]` = DC-1 (units)             |
| `gate`         | out | 9     | encoder pulses; bit k is 46+k Hz, bit 4 is 50 Hz |
| `level`        | out | 9     | latched thermometer code of the last window      |
| `level_update` | out | 1     | one cycle when `level` loads                     |

Parameters: `N_DDA` = 4 (window 2·10^N_DDA cycles) and `FB_DIV` = 100.
With a clock other than 1 MHz, the window is 2·10^N_DDA / f_clk seconds.
The readings keep 2 counts per hertz only while FB_DIV × window = 2 s.
The gate connections assume those 2 counts per hertz around 100.

Types and constants (BCD digit, three-digit count, nine-bit gate vector,
QA..QD bit positions) are in `fdm_pkg`.

## How far it follows the source

These follow the source circuit: the chain of four decade dividers and two
flip-flops, the 20 ms/40 ms gate, the AND gate in front of three cascaded
BCD decades cleared by FF-2's inverted output, the ÷100 PLL feedback, and
every encoder gate connection.

These are choices of this design:

* one synchronous clock instead of ripple clocking;
* the input synchronizer;
* the asynchronous reset;
* the single enable of the decade dividers;
* the feedback divider's duty cycle;
* how the B-fall race is resolved;
* the set-and-transfer form of the latches.

The source also mentions two variants that it does not describe, and they
are not built: a 0.5 Hz resolution version and longer measurement windows.
Longer windows would need more counters and gates.

## Simulation

Every testbench checks itself. Each prints
`TB_RESULT checks=N failures=M` and ends with a watchdog. To run one with
Verilator 5:

```
verilator --binary --timing --assert --top-module tb_freq_dev_meter \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/fdm_pkg.sv tb/tb_freq_dev_meter.sv
./obj_dir/Vtb_freq_dev_meter
```

| testbench              | what it shows                                                                                      |
|------------------------|----------------------------------------------------------------------------------------------------|
| `tb_dda_decade`        | decade count and ripple carry against a reference, random enables                                  |
| `tb_toggle_ff`         | toggling only on enabled edges, complement output                                                  |
| `tb_ref_timebase`      | at full size: 10 000-cycle tick, 20 000-cycle 50 Hz period, B high 20 000 of 40 000 cycles         |
| `tb_decade_counter`    | BCD count, clear priority, carry only on 9→0                                                       |
| `tb_bcd_pulse_counter` | counts for 46..54 Hz digit by digit against the expected BCD outputs, random counts, clear, B-fall race |
| `tb_deviation_gates`   | every count 0..199 against the decoded ranges, and the pulse table above                           |
| `tb_output_latch`      | levels are the OR of the window's pulses, steady between loads, one load per window                 |
| `tb_fb_divider`        | fb period 100 and high time 50 edges of A                                                          |
| `tb_freq_dev_meter`    | the whole meter at default size, closed through a PLL model, 45–55 Hz                              |
| `tb_freq_table`        | the whole meter at default size, ideal x100 pulse train at exactly 46..54 Hz: BCD outputs, gate pulses and levels per row |

`tb_freq_dev_meter` runs the top with its default parameters. A square wave
drives `tb/pll_x100_model.sv`, a behavioural PLL that locks frequency only
through the meter's `pll_fb`, and the model drives `sig_a`. The test steps
through 50, 46…55 and 45 Hz, each 0.25 Hz above the whole hertz, so that the
count is 2f or 2f+1. For every step it waits 8 windows for the loop to
settle. It then checks two windows: the final count, the number of pulses
on each gate, the latched thermometer code and the B timing. It counts the
carries, clears and latch loads, and readings below, at, above and outside
46–54 Hz. Any of these that never happened counts as a failure. It takes
about 10 s.

Verilator warns (ZERODLY) about the variable delays in the PLL model and
in the stimulus. These warnings do no harm.
