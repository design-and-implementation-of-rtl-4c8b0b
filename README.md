# Micro-stepping controller for a solar-array stepper motor

A two-phase stepper motor driven in full steps jumps its stator field 90
electrical degrees at a time. That jerk excites resonances and limits
positioning to the motor's native step angle. This controller micro-steps the
motor instead. It drives both windings at once, winding A-B with a current
proportional to sin θ and winding C-D with one proportional to cos θ, and
advances θ in small increments. The field then turns smoothly and the total
current stays constant (sin² + cos² = 1), so micro-stepping costs no torque.
Up to 128 micro steps per full step are supported, i.e. 25,600 positions per
revolution on a 1.8° motor.

The controller is intended for a solar-array drive, as on a satellite or a
terrestrial tracker. A host processor programs it over a small I/O bus with
speed, direction, micro-stepping ratio and current level. It produces:

* two 10-bit current magnitudes, `sine` and `cosine`, for two external DACs;
* four steering signals `a_pos` (A+), `b_neg` (B-), `c_pos` (C+), `d_neg` (D-)
  for the external power drivers. These select the direction in which each
  winding's current flows.

The external DACs, the power stage, the motor and the host processor are not
part of this RTL.

```
            +---------------------+   step_rate    +------------------+
 host bus ->| processor_interface |--------------->| clock_generation |
 ia,id,mion |  decoder + 8 latches|                +--------+---------+
 iodis,wrn  +---+-----------------+                         | sys_tick
                | dir, enable, msr, tmax, toffset           v
                |     +-------------------------------------------------+
                +---->| microstep_core                                  |
                      |  steps_counter -> sine_cos_rom -> 2 x multiplier|--> sine, cosine
                      |  torque_subtractor ----------------^            |--> A+ B- C+ D-
                      +-------------------------------------------------+
```

## How one electrical cycle is produced

This is the part worth reading closely. Everything else is plumbing around it.

**One quarter-wave table serves the whole cycle.** `sine_cos_rom` holds only
the first quadrant: 129 twelve-bit samples of sin θ for θ = 0…90° in steps of
90/128°:

    SIN[i] = round(4095 · sin(i · π / 256)),   i = 0 … 128

The cosine is read from the same table at the mirrored index,
`cos θᵢ = SIN[128 − i]`, so the block gives both values for one angle at once.
The table is computed at elaboration time from this formula. There is no data
file.

**Magnitude from the table, sign from the steering signals.** The DAC words
are always non-negative. Over a full electrical cycle the steps counter walks
the table index up and down, like a triangle wave:

| quadrant | index goes          | `sine` follows | `cosine` follows |
|----------|---------------------|----------------|------------------|
| I        | 0 → 128 (rising)    | \|sin θ\|      | \|cos θ\|        |
| II       | 128 → 0 (falling)   | \|sin θ\|      | \|cos θ\|        |
| III      | 0 → 128 (rising)    | \|sin θ\|      | \|cos θ\|        |
| IV       | 128 → 0 (falling)   | \|sin θ\|      | \|cos θ\|        |

When the index reaches an end of the table, the next quadrant starts. The
quadrant selects which driver of each winding is on. The signs of the two
currents thus come from the steering signals, not from the DAC words.

**The micro-stepping ratio is the index stride.** MSR is the number of micro
steps per full step, i.e. per quadrant. Each micro step moves the index by
128 / MSR. So MSR = 128 visits every entry, and MSR = 8 visits 0, 16, 32, …,
128. At MSR = 8 and full amplitude the first quadrant gives:

| micro step | index | sine (% / DAC code) | cosine (% / DAC code) |
|-----------:|------:|--------------------:|----------------------:|
| 0 | 0   |   0.00 / 0    | 100.00 / 1023 |
| 1 | 16  |  19.51 / 200  |  98.07 / 1003 |
| 2 | 32  |  38.27 / 391  |  92.38 / 945  |
| 3 | 48  |  55.56 / 568  |  83.15 / 850  |
| 4 | 64  |  70.72 / 723  |  70.72 / 723  |
| 5 | 80  |  83.15 / 850  |  55.56 / 568  |
| 6 | 96  |  92.38 / 945  |  38.27 / 391  |
| 7 | 112 |  98.07 / 1003 |  19.51 / 200  |
| 8 | 128 | 100.00 / 1023 |   0.00 / 0    |

One electrical cycle is 4 · MSR micro steps, which is four full steps of the
motor.

Ratios 2, 4, 8, 16, 32, 64 and 128 are the intended ones. For any other value
the highest set bit of MSR decides the stride. MSR = 1 gives plain full steps
(one winding at a time, index 0 or 128), and MSR = 0 stops stepping.

### Winding sequence and direction

Bit `dir` selects the direction: 0 is counter-clockwise, 1 is clockwise. For
each direction, the quadrants are numbered in the order they are visited:

| direction | quadrant I | quadrant II | quadrant III | quadrant IV |
|-----------|------------|-------------|--------------|-------------|
| CCW (0)   | A+, D-     | A+, C+      | B-, C+       | B-, D-      |
| CW  (1)   | A+, C+     | A+, D-      | B-, D-       | B-, C+      |

In each cell, the first signal carries the sine current and the second the
cosine current. The clockwise row visits the standard quadrants in the order
II, I, IV, III, which turns the field the other way. The index walk is the
same in both directions.

Assertions in `steps_counter` check two rules. A+ and B- are never on
together, nor are C+ and D-. While enabled, exactly one end of each winding is
on.

If `dir` changes while the motor runs, the other row of the table takes
effect in the current quadrant. The field then jumps rather than reversing
smoothly. Stop the motor (clear `enable`) before reversing if that matters.

### Current amplitude

`torque_subtractor` forms `amplitude = Tmax − Toffset`, clamped to 0 if the
offset is larger. `shift_add_multiplier` scales each table value by it:

    DAC word = (amplitude · SIN + 2048) >> 12

The product is formed by shift-and-add: one shifted copy of the amplitude is
added for each set bit of the 12-bit fraction. All twelve steps are unrolled
into one combinational chain, so a new product is ready every clock. With
Tmax = 1023 and Toffset = 0 the peak word is 1023, the DAC's full scale.
Normally Tmax stays at maximum, and Toffset trims the current for the motor's
detent torque.

## Speed: `step_rate` and SYS_CLK

`clock_generation` divides the master clock by the 12-bit `step_rate`. A
counter restarts every `step_rate/2` clocks, and SYS_CLK changes level at each
restart. One SYS_CLK period therefore lasts `step_rate` clocks: step rate 2
gives SYS_CLK at half the clock frequency. Odd values round down to even, and
0 and 1 behave like 2.

Each SYS_CLK period makes one micro step, so the motor speed is

    micro steps / s = f_clock / step_rate
    revolutions / s = f_clock / (step_rate · MSR · full steps per rev)

The block also gives `sys_tick`, a one-clock pulse ending at each SYS_CLK
rising edge. The rest of the controller runs on the master clock and uses
`sys_tick` as a clock enable, so the design has a single clock domain.
`sys_clk` is only brought out for observation.

## Host register map

The host writes 16-bit words over a 10-bit address / 16-bit data bus. A write
is accepted when all four of these hold:

* MION is low (I/O cycle);
* IODIS is low;
* WRN is low;
* IA9…IA3 match the 100H window.

The word is stored on that clock edge. Anything else is ignored.

| address | port  | contents |
|---------|-------|----------|
| 100H | PORTA | bits 11..0 `step_rate`, bit 12 `dir`, bit 13 `enable` |
| 101H | PORTB | bits 7..0 `msr` |
| 102H | PORTC | bits 9..0 `tmax` |
| 103H | PORTD | bits 9..0 `toffset` |
| 104H–107H | PORTE–PORTH | spare 16-bit registers, on output `misc_port[0..3]` |

The bit positions inside each word are a choice of this implementation; adapt
`microstep_pkg` (`PORTA_DIR_BIT`, `PORTA_ENABLE_BIT`) to the host software.
To move the window, change `BASE_ADDR`.

A typical start-up after POR writes 102H (Tmax), 103H (Toffset), 101H (MSR),
and finally 100H with `enable` set.

## Reset, enable and timing

* `por` is an asynchronous, active-high reset. It clears every register, so
  the controller starts disabled at quadrant I, index 0, with all outputs 0.
* While `enable` is 0, the position holds and `sine`, `cosine` and all four
  steering signals are 0. When `enable` is set again, stepping resumes from
  the held position.
* A register write takes effect on the clock edge that ends the write cycle.
* The position changes on the edge where `sys_tick` is high. `sine`, `cosine`
  and the steering signals are registered together, one clock later, so they
  always change in the same cycle.
* The critical path is the table read followed by the unrolled 10 × 12
  multiplier.

## Files

`rtl/` holds one module or package per file:

| file | role |
|------|------|
| `microstep_pkg.sv` | widths, base address, PORTA bit positions, the `drive_en_t` struct, the quadrant enum, the winding table |
| `stepper_drive.sv` | top level: processor interface, clock generation and micro-step core |
| `processor_interface.sv` | address decoder and eight port latches, split into settings |
| `address_decoder.sv` | 3-to-8 chip-select decoder for 100H–107H |
| `data_latch.sv` | one 16-bit port register |
| `clock_generation.sv` | step-rate divider, SYS_CLK and `sys_tick` |
| `microstep_core.sv` | steps counter, table, subtractor, two multipliers, output registers |
| `steps_counter.sv` | index walk, quadrant counter, steering signals |
| `sine_cos_rom.sv` | quarter-wave sine table with mirrored cosine read |
| `torque_subtractor.sv` | Tmax − Toffset with clamp |
| `shift_add_multiplier.sv` | 10 × 12 shift-and-add multiply, rounded to 10 bits |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. The shared
package `microstep_ref_pkg.sv` recomputes the expected table values, products
and winding patterns independently of the RTL. Every testbench ends by
printing `TB_RESULT checks=N failures=M`, and has a watchdog.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/microstep_pkg.sv tb/microstep_ref_pkg.sv tb/tb_stepper_drive.sv \
    --top-module tb_stepper_drive
./obj_dir/Vtb_stepper_drive
```

To run another unit, replace `tb_stepper_drive` with that unit's testbench.
Any other simulator that handles SystemVerilog-2017 assertions and `$sin` in
constant functions should also work.

`tb_stepper_drive` runs the complete controller at its default sizes. It plays
the host over the bus, then runs these cases:

* MSR 4 counter-clockwise at step rate 2;
* MSR 8 in both directions;
* MSR 128 counter-clockwise for 640 micro steps;
* every other ratio, with a torque offset;
* enable off and back on;
* a change of speed;
* bus cycles that must be ignored (IODIS high, MION high, address outside the
  window);
* the spare ports.

On every clock it checks four things:

* each step is the right next index and quadrant;
* steps are exactly `step_rate` clocks apart;
* the DAC words and steering signals match the expected values one clock
  later;
* everything is zero while disabled.

It counts how often each of these mechanisms occurred, and fails if any never
did. It takes well under a second.

## What to trust, and where this departs from the original description

The following are taken from the original description:

* the block structure;
* the port list and widths (10-bit address, 16-bit data, 12-bit step rate,
  8-bit MSR, 10-bit torque words, 12-bit table, 10-bit DAC words);
* the 100H–107H port window;
* the 129-entry quarter-wave table shared by sine and cosine;
* the MSR-8 current table (matched to within 0.02 % of full scale);
* the winding sequence for both directions;
* the SYS_CLK period of `step_rate` clocks;
* outputs active only while POR is low and ENABLE is high.

The following were not specified there and are this implementation's own
choices:

* **Bit fields** inside PORTA–PORTD, and that WRN takes part in the address
  decode.
* **Synchronous register loads.** The description calls the port latches'
  chip select asynchronous; here the chip select loads on the clock edge.
* **Clock enable instead of a derived clock.** SYS_CLK paces the design as a
  clock enable. The divider restarts one count earlier than a literal "count
  equals STEP_RATE/2" reading would, which gives exactly the stated period.
* **How the steps counter counts.** The up/down index walk and the stride of
  128/MSR are inferred from the 129-entry table and the MSR-8 current table.
* **Number formats.** The table is scaled to 4095 with rounding, and the
  multiplier rounds.
* **Edge cases:** the clamp of Tmax − Toffset at zero, the handling of
  non-power-of-two MSR values, and the behaviour on a direction change while
  running.
* **Output timing:** one register stage after the position.

Not covered by this RTL:

* the host processor, the DACs, the power drivers and the motor;
* the original's FPGA resource and timing figures (about 19 MHz on a
  radiation-hardened device). Those depend on the target device and tools.

After coarse synthesis the controller has about 150 flip-flop bits plus the
sine table.
