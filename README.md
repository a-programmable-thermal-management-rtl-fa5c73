# TMIC: a programmable thermal management interface for PowerPC 604 nodes

This block lets software on a PowerPC 604 node watch the temperature in two
ways, and mix them: by polling, or by interrupt. The hardware samples one of
four temperature sensors at an interval software chooses. It keeps the latest
reading in an 8-bit register and compares every sample with an 8-bit
threshold. When the reading is above the threshold, a read-only flag is set.
If interrupts are enabled, an interrupt line is also raised. Both the flag and
the reading are readable over the processor bus at any time.

The processor only acts when a sample crosses the threshold it has set, so no
software loop has to watch the temperature. Software can still read the
temperature whenever it wants. The design is a small synchronous circuit: 54
flip-flops and about 75 word-level cells after generic synthesis.

The RTL rebuilds a published circuit, the Thermal Management Interface
Circuit (TMIC) of a thermal management chip for an embedded PowerPC
multi-computer. The published description gives:
- the block diagram
- the register set and its widths
- the sampling scheme
- the threshold/interrupt behaviour
- the 8-bit down-counter for ring-oscillator sensors
- the four-beat burst bus interface

It leaves out bit positions, the register map inside the two cache lines,
cycle-level bus timing and reset values. Those were chosen here and are listed
in "Design choices" below.

## The parts

```
 OSC1..3 ──► osc mux ──► sync ──► 8-bit down counter ─┐
 (ERIF ring oscillators)                               ├─► sensor mux ──► temperature ──┬──► bus
 filter_temp (on-chip sensor, 8 bits) ─────────────────┘                  register      │
                                                                              ▲          ▼
 SYSCLK ──► clock counter ══ sample register ──── load_en ───────────────────┘    comparator ◄── threshold
                                                                                         │           register
 sensor select ──► oscillator power selector ──► osc_vdd_en[2:0]                          └─ & ie ──► int_n
```

| module | what it does |
|---|---|
| `tmic_top` | wires everything together; top-level ports are plain signals |
| `ppc604_if` | PowerPC 604 bus slave: TS/AACK, DBB/TA, four-beat bursts, register strobes |
| `tmic_regfile` | configuration, sample and threshold registers and the read-back mux |
| `clock_counter` | free-running counter compared with the sample register: makes `load_en` |
| `ring_osc_counter` | oscillator mux, synchronizer and 8-bit down counter (frequency counter) |
| `osc_power_selector` | powers only the selected ring oscillator |
| `temp_register` | picks oscillator count or on-chip reading, latches it on `load_en` |
| `interrupt_gen` | `flag = temp > threshold`, `irq = flag & ie` |
| `tmic_pkg` | shared types: sensor-select enum, configuration layout, register strobes, read selects |

## Sampling and the two kinds of sensor

**Sampling interval.** `clock_counter` counts SYSCLK cycles from 0 upward. When
the count equals the sample register N, it emits `load_en` for one cycle and
starts again at 0. The temperature register is therefore reloaded every N+1
cycles. N = 0 means every cycle. N = 255 (the reset value) means every 256
cycles.

The compare is an equality. If software lowers N below the count already
reached, the counter first runs on to 255 and wraps. So the first interval
after such a write can last up to 256 cycles.

**On-chip sensor.** With sensor select 00, the temperature register takes
`filter_temp` as it is. That is the 8-bit output of the on-chip sensor's A/D
converter and digital filter, which are outside this RTL.

**Ring oscillators.** With sensor select 01, 10 or 11, the reading comes from
OSC1, OSC2 or OSC3. These oscillators are on the router chip and slow down as
they heat up. The down counter measures frequency like this:
- On every `load_en` it is reloaded to 255.
- Each rising edge of the selected oscillator lowers it by one, and it stops
  at 0.
- On the same `load_en` edge, the temperature register takes the value the
  counter had reached.

The reading is therefore `255 - (oscillator edges in one sampling interval)`,
so a hotter oscillator gives a larger number. Converting it to degrees needs a
per-board calibration table, which is software's job.

Things to know when using the oscillator path:
- The oscillator passes a two-flip-flop synchronizer before the counter, so
  it must run below half of SYSCLK.
- The interval must be short enough that fewer than 256 edges occur in it.
  Otherwise the reading sticks at 0.
- The first interval after switching sensors is a partial window, so discard
  one sample.

**Oscillator power.** `osc_vdd_en` powers only the oscillator being measured.
All three are off while the on-chip sensor is selected, so idle oscillators
add neither heat nor noise.

## Bus interface and register map

The TMIC takes two cache lines of the node's address space. It answers every
access to them as a four-beat burst and uses byte lane D0–D7. PowerPC numbers
bits from the MSB, so D0 is bit 7 of `d_in`/`d_out`, and A0 is `addr[3]`.

Decode:
- `addr[3:1]` (A0–A2) must equal the parameter `DEV_SEL` (default `3'b110`).
  The board decides which system address lines reach these pins.
- `addr[0]` (A3) picks the line.
- The beat number picks the register inside the line.

| line (A3) | beat 0 | beat 1 | beat 2 | beat 3 |
|---|---|---|---|---|
| 0: temperature | temperature (read-only) | 0 | 0 | 0 |
| 1: control | configuration | sample | threshold | 0 / ignored |

Configuration byte:

| bit | D0 (7) | D1 (6) | D2–D3 (5:4) | D4–D7 (3:0) |
|---|---|---|---|---|
| field | threshold flag, read-only | interrupt enable | sensor select: 00 on-chip, 01 OSC1, 10 OSC2, 11 OSC3 | 0 |

The flag sits in the sign bit, so after a single load, software can branch on
the sign to check it. A write to the control line always sets all three
registers. Software keeps a copy of the values it does not mean to change.

Bus timing. All signals are sampled on the rising edge of `clk`.

```
cycle     0     1      2..k        k+1 .. k+4
ts_n      L     H
aack_n    H     L      H
dbb_n     -     (L)    L at k      L
ta_n      H     H      H           L L L L      four consecutive beats
d_out/oe                           read: register byte each beat
d_in                               write: taken at the end of each beat
```

- AACK comes one cycle after TS.
- TA starts the cycle after AACK if DBB is already asserted. Otherwise it
  starts the cycle after DBB is first seen asserted. The TMIC only
  acknowledges data while the master owns the data bus.
- Read or write comes from `tt_rd` (the 604's TT1, 1 = read).
- While an access is in progress, further TS cycles are ignored. Address
  pipelining is not supported.
- The pad driver is outside the design: `d_oe` says when to drive `d_out`.

## Threshold flag, interrupt, and the ACPI sequence

The flag is a level: it is high while the temperature register is strictly
above the threshold. It is not latched. `int_n` (active low) is the flag
gated by the interrupt enable. This gives three modes:
- Enable clear: pure polling, reading the flag or the temperature.
- Enable set: interrupt-driven.
- A mix of the two.

Because the flag is a level, software clears an interrupt by storing a higher
threshold. That is how the ACPI passive/active/critical trip points map onto
one register:
1. Store the passive trip point (PSV) and enable the interrupt.
2. On the interrupt, start passive cooling and store the active trip point
   (ACX). The interrupt drops at once if the temperature is below ACX.
3. On the next interrupt, start active cooling and store the critical trip
   point (CRT).
4. On the last interrupt, shut down.

The interrupt follows a crossing within one sampling interval, N+1 cycles.
Software can also step the threshold through any number of levels for
finer-grained control.

## Design choices not fixed by the original description

- Register bit positions, sensor-select encoding, and the beat-based register
  map inside the two cache lines.
- Reset values: sensor select = on-chip, interrupt disabled, sample = 255,
  threshold = 255 (no interrupt possible), temperature register = 0.
- The down counter's reload-to-255 / count-down / stop-at-0 scheme, and
  synchronizing the oscillators into SYSCLK instead of clocking the counter
  from them.
- The `tt_rd` input for read/write: the original diagram only names A0–A3,
  TS, DBB and Reset as inputs. Every access is treated as a burst, with no
  TBST/TSIZ.
- Reset is asynchronous and active low, on all flip-flops.
- The on-chip filter input is taken as 8 bits. The original text calls the
  filter output 8-bit, while the chip's die annotation calls it a 16-bit
  reading. Only 8 bits reach the temperature register either way.

## Not included

- The PTAT temperature sensor, its A/D converter and the digital filter. They
  come from earlier work and their internals are not given. Their 8-bit
  result enters as `filter_temp`.
- The three ring oscillators, which sit on another chip. `osc` and
  `osc_vdd_en` connect to them. `tb/ring_osc_model.sv` is a behavioural model
  used in simulation.
- The fan controller and the "programmable unit" of the surrounding system.
  Their connection to the TMIC is not described, so the TMIC has no ports for
  them.
- Timing closure. The original chip ran at 50 MHz in a 0.5 µm process. The
  deepest logic here is an 8-bit compare into a register enable, but nothing
  here has been timed.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_clock_counter` | interval N+1 for several N, first pulse, one-cycle pulse |
| `tb_ring_osc_counter` | count = 255 - edges for each oscillator, unselected oscillator ignored, on-chip selection counts nothing, stop at 0 |
| `tb_osc_power_selector` | all four selections |
| `tb_temp_register` | random stimulus against a reference model |
| `tb_interrupt_gen` | all 2 x 256 x 256 input combinations |
| `tb_tmic_regfile` | reset values, every write strobe, read-back, read-only flag |
| `tb_ppc604_if` | AACK/TA timing with and without DBB delay, four beats, beat map, read-only temperature line, foreign addresses ignored |
| `tb_tmic_top` | end to end at default parameters (see below) |
| `tb_tmic_polling` | a polling loop with a granularity window and PSV/ACX/CRT actions over a rising and falling reading; a two-cycle spike caught by the interrupt when sampling every cycle |

`tb_tmic_top` runs the whole design at its default parameters, acting as the
processor. It checks:
- reset values
- the full PSV→ACX→CRT sequence driven by a rising on-chip reading, including
  interrupt latency and the drop after each re-arm
- polling with the interrupt disabled
- the oscillator readings against the behavioural oscillator models, with
  supply enables
- that every mechanism occurred: burst read and write, DBB-delayed TA,
  foreign address, sampling, each sensor, each trip point, re-arm, polling,
  interrupt enable

Run any testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/tmic_pkg.sv tb/tb_tmic_top.sv --top-module tb_tmic_top
./obj_dir/Vtb_tmic_top
```

Replace `tb_tmic_top` with any other testbench name. The package must come
first on the command line. `ppc604_if` carries two concurrent assertions:
AACK and TA never overlap, and every burst has exactly four beats. They are
active with `--assert`.

## Changing it

- `DEV_SEL` on `tmic_top` moves the TMIC in the address map.
- The register width `DW` is in `tmic_pkg`. The submodules take it as a
  parameter, but the bus byte lane and the configuration layout assume 8 bits.
- The register map lives in `tmic_pkg` (`BEAT_*`, `line_e`, `cfg_t`) and the
  decode in `ppc604_if`.
