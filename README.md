# Zero-crossing-synchronised switching controller for a grid-tied square-wave inverter

This is the digital part of a single-phase, grid-tied square-wave inverter.
An FPGA drives the four MOSFET gates of a full bridge so that the bridge
output stays in step with a 50 Hz grid. The controller's only view of the grid
is one bit. An external zero-crossing detector (ZCD) sets it to 1 while the
grid voltage is positive and to 0 while it is negative.

The idea is to lock to the grid by re-timing every half cycle rather than with
a closed-loop PLL. Each grid polarity has its own counter. The counter restarts
at the zero crossing that begins its half cycle and counts at 18 MHz, so at
50 Hz one 10 ms half cycle is 180000 counts and **one electrical degree is
exactly 1000 counts**. A decoder compares the count with two constants and
switches one diagonal of the bridge on between them. The inverter therefore
follows a phase or frequency change of the grid from the next half cycle on,
i.e. within 10 ms.

```
 clock_50Mhz ──► clock_pll (x9/25) ──► c0 = 18 MHz (clocks everything below)

 ZCD ──► zcd_comparator ──o──┬──────────► cnt_en  half_cycle_counter u_cnt_pos ──q──► switch_window u_sw_pos ──F──► s1, s2
         (2-flop sync)       └──NOT─────► sset
                        ──oi─┬──────────► cnt_en  half_cycle_counter u_cnt_neg ──q──► switch_window u_sw_neg ──F──► s3, s4
                             └──NOT─────► sset
```

## The output waveform: a notched and advanced quasi-square wave

Each diagonal is on for one window in its own half cycle and off for the rest.
Between the windows all four switches are off. The load sees +Vdc, 0, −Vdc, 0:
a quasi-square wave, on from α to 180° − α of each half cycle. Its Fourier
amplitudes are

    V_n = (4 Vdc / (n π)) · cos(n α)        (odd n)

so the fundamental can be set through α, and harmonic n disappears when
α = 90°/n. With **α = 30°** the third harmonic, the largest one, is removed.

The LC output filter delays the fundamental by about 7.2° at 50 Hz. The
controller cancels that delay by moving the whole window **7.2° earlier**, so
the filtered voltage crosses zero together with the grid. The window is
therefore:

| quantity                        | degrees | counts (18 MHz, 50 Hz) | time after zero crossing |
|---------------------------------|---------|------------------------|--------------------------|
| window opens (α − lag)          | 22.8    | 22800                  | 1.267 ms                 |
| window closes (180 − α − lag)   | 142.8   | 142800                 | 7.933 ms                 |
| pulse width (180 − 2α)          | 120     | 120000                 | 6.667 ms                 |
| half cycle / counter modulus    | 180     | 180000                 | 10 ms                    |

`switch_window` takes α and the lag compensation in millidegrees (30000 and
7200). It converts them to counts for the counter modulus it is given:
`counts = mdeg × HALF / 180000`, computed at elaboration by
`inverter_pkg::mdeg_to_counts`. The window has to open after count 0, so
`LAG_COMP < ALPHA` is required. The counter of the absent polarity is held
at 0, and that keeps its diagonal off. An elaboration-time assertion enforces
the rule.

## How a half cycle is timed

1. **Input stage** (`zcd_comparator`). A two-flop synchroniser brings the
   asynchronous ZCD level into the 18 MHz domain. It outputs `o` (positive
   half) and `oi = ~o` (negative half). This adds two clock cycles of delay.
2. **Counters** (`half_cycle_counter`, two instances). A counter's `cnt_en`
   is its polarity enable and its `sset` is the inverse of that enable. While
   its polarity is absent, the counter is reloaded with 0 on every clock. When
   its polarity appears, it counts 1, 2, 3, … and wraps from 179999 to 0.
   `sset` takes priority over `cnt_en`.
3. **Window decoders** (`switch_window`, two instances). These are
   combinational: `F = (22800 <= q < 142800)`. `F` of the positive decoder
   drives s1 and s2, and `F` of the negative one drives s3 and s4.

Latency: suppose a ZCD edge arrives between two clock edges. On the third
rising edge after it, the new polarity's counter holds 1. A gate rises when
that counter reaches 22800, which is 22802 clock edges after the zero
crossing, within one 55.6 ns clock period of the ideal 1.267 ms. The old
polarity's counter runs for two more edges and then reloads to 0.

### Behaviour when the grid moves

* **Phase jump, grid early.** The half cycle ends before its window closes.
  The running pulse is cut at the zero crossing (3 clock cycles later), and
  the next half cycle starts a fresh, aligned window.
* **Phase jump, grid late, or a slow grid.** The half cycle lasts longer than
  180000 counts, so the counter wraps to 0 and keeps counting. As long as the
  overrun is under 22800 counts, nothing happens. That covers a grid down to
  about 44.4 Hz, or a late jump of up to 22.8°. **If the overrun is longer,
  the window opens a second time in the same half cycle.** The counter
  modulus is kept at 180000 to match the original design, so this limit
  stands. A saturating counter would remove it if it matters in your
  application.
* **Fast grid** (e.g. 51 Hz, 176470 counts per half). The window still fits,
  and the pulses stay 120° wide in counts, which is slightly wider in angle.

## Gate mapping and the power stage

The bridge has leg A = s1 (high side) over s4 (low side), and leg B = s3
(high side) over s2 (low side). The diagonal s1/s2 puts +Vdc on the load and
s3/s4 puts −Vdc. The two diagonals can never be on together, because the
counter of the absent polarity is held at 0. The top-level module asserts
that no leg ever has both of its switches on. In the zero intervals all four
gates are off, and the load current freewheels through the MOSFET body
diodes.

The gates are driven in pairs, as in the original FPGA design. The same
output voltage can also be produced with four 50 %-duty gate signals, where
one leg is shifted by 2α against the other and the zero state is made by
both high or both low switches on. That variant is not built here. Its gate
signals are not the pairs generated by this design.

The gate drivers (3.3 V to 15 V), the bridge, the 22 mH / 120 µF LC filter,
the transformers and the ZCD chip are analog parts. They are not part of this
RTL. `tb/full_bridge_model.sv` is an ideal model of the bridge that the
system testbench uses to check output levels and shoot-through.

On the reference board (an Altera DE2-70, Cyclone II), the four gate
outputs went to pins PIN_C30, PIN_C29, PIN_D29 and PIN_D28. Assigning them to
s1, s2, s3 and s4 in that order is likely but not confirmed.

## Clock

`clock_pll` is a **behavioural model**, not synthesisable. It multiplies its
input clock by 9/25 (50 MHz → 18 MHz) with 50 % duty cycle and 0° phase, and
re-aligns to the input every 25 input periods. For an FPGA build, replace it
with the vendor's PLL configured the same way, keeping the ports `inclk0` and
`c0`. Every other module is synthesisable. The count constants assume
exactly 18 MHz. With a different clock, set `HALF` on the top to the number
of clock cycles in 10 ms; the angles are rescaled automatically.

## Modules and parameters

| file | module | what it is |
|------|--------|------------|
| `rtl/inverter_pkg.sv` | package | `COUNT_W = 18`, `HALF_COUNTS = 180000`, `ALPHA_MDEG = 30000`, `LAG_COMP_MDEG = 7200`, `mdeg_to_counts()` |
| `rtl/inverter_switch_top.sv` | `inverter_switch_top` | the controller; ports `clock_50Mhz`, `rst_n`, `ZCD`, `s1..s4`; parameters `PLL_MUL = 9`, `PLL_DIV = 25`, `HALF`, `ALPHA`, `LAG_COMP` |
| `rtl/clock_pll.sv` | `clock_pll` | behavioural clock multiplier, `MUL = 9`, `DIV = 25` |
| `rtl/zcd_comparator.sv` | `zcd_comparator` | synchroniser and polarity enables, `SYNC_STAGES = 2` |
| `rtl/half_cycle_counter.sv` | `half_cycle_counter` | counter with sync load and enable, `MODULUS = 180000`, `WIDTH = 18`, `SSET_VALUE = 0` |
| `rtl/switch_window.sv` | `switch_window` | window decoder, `HALF`, `WIDTH`, `ALPHA`, `LAG_COMP` (millidegrees) |

Reset: `rst_n` is asynchronous and active low. It clears the synchroniser
and both counters, so all gates are off. The controller then times the
first, negative half cycle from the release of reset. It is aligned from the
first ZCD edge onward.

## Simulation

Each testbench is self-checking. It ends with
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/inverter_pkg.sv \
    tb/inverter_switch_top_tb.sv --top-module inverter_switch_top_tb -Mdir obj
./obj/Vinverter_switch_top_tb
```

Substitute another `*_tb` for the block tests.

| testbench | what it checks |
|-----------|----------------|
| `zcd_comparator_tb` | o equals the input of two edges earlier, oi is its complement, reset state |
| `half_cycle_counter_tb` | cycle-by-cycle against a reference count: two full wraps at 180000, random enables and loads (sset wins), asynchronous reset |
| `switch_window_tb` | all 2^18 counts against a window computed in degrees; start 22800, last on 142799, width 120000 |
| `clock_pll_tb` | 55.556 ns period (±5 ps), 50 % duty, 9 output cycles per 25 input cycles, aligned group starts |
| `inverter_switch_top_tb` | the whole controller at default parameters over 320 ms of grid: 50 Hz, a +54° and a −18° phase jump, 49 Hz (counter wraps), 51 Hz, 50 Hz, and a final 45° late jump that shows the second window of an over-long half cycle; every gate compared every clock with an independent timing model, pulse start 1.267 ms after each zero crossing, pulse width 6.667 ms, no shoot-through, and counts of each mechanism (pulses of both polarities, counter holds, wraps, jumps, truncated pulses, re-triggered window, zero output level) |

The system test runs at full size (18 MHz, 180000 counts per half cycle). It
takes about 15 s of wall time.

## Own choices and departures

These points are choices of this implementation, not part of the original
design:

* The `rst_n` input and the two-flop synchroniser on ZCD.
* The load value 0 on `sset`.
* The exact decoding inside the window blocks. The original gives only their
  names, their inputs and outputs, and the 30° and 7.2° angles.
* Applying the 7.2° lag compensation as a fixed advance of the window. The
  original describes this compensation as part of its "digital PLL". Here
  there is no closed-loop phase detector. Phase lock comes from restarting the
  counters at every zero crossing, and the 7.2° is a fixed parameter
  (`LAG_COMP`).
* No ZCD debouncing. A glitch on the ZCD line restarts a counter. Add a
  filter in front of `zcd_comparator` if your detector output chatters.
* No dead time between switches. It is not needed with paired gates, because
  a leg's two switches are never switched against each other.
