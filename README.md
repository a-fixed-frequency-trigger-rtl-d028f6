# Fixed-frequency trigger veto (FFTV) for a silicon-tracker read-out crate

Wire-bonds on silicon detector modules carry current pulses each time a trigger makes the
front-end electronics read out. Inside a magnetic field each pulse pushes on the bond. If
triggers come at a fixed rate near the bond's mechanical resonance (around 17 kHz was seen
to be destructive), the bond can vibrate until it breaks. Physics triggers are random and
harmless. Calibration and test runs often use fixed-rate triggers, and those are the danger.

The FFTV watches the trigger stream. When it recognises a fixed frequency in the dangerous
band, it vetoes. It does not use an FFT. It measures the time between successive triggers,
compares each period with the previous one, and counts how many matched in a row. This RTL
implements the veto at both places it sits in the crate:

- the TTC interface module (TIM), which passes every trigger to the read-out drivers;
- a read-out driver (ROD), which can also make triggers of its own.

It also includes the TIM's pseudo-random trigger generator, which was used to measure the
veto's false-alarm rate.

All logic runs on the 40 MHz bunch-crossing clock. All times below are in 25 ns clocks.

## The detection algorithm (`fftv_core`)

A **period counter** starts from zero in the clock after an accepted trigger. A trigger that
arrives P clocks after the previous one therefore sees the count P-1. Each trigger is
classified by that count:

| count | meaning | action |
|---|---|---|
| < `PERIOD_MIN` (85) | too fast | Ignored. The counter keeps running, so a close double trigger merges into one longer period. |
| 85 … `PERIOD_MAX` (2666) | in the band, about 15 kHz to 471 kHz | Compared with the previous in-band period. A difference of at most `MATCH_TOL` (40) increments the match counter; a larger one decrements it. The period is stored and the counter restarts. |
| > 2666 | too slow | Only restarts the counter and forgets the stored period. Slow periodic triggers pass. |

If no trigger is accepted for `PERIOD_ROLLOVER` (4100) clocks, the counter **rolls over**:
it restarts, forgets the stored period and decrements the match counter. The match counter
is 4 bits wide, saturates at 0 and 15, and is never cleared by the veto. During a veto it
drains only through roll-overs.

The **veto** rises when an increment makes the match counter reach the *match-level*. It
rises one clock after the trigger and lasts exactly `VETO_DURATION` (40000 clocks, 1 ms).
The match-level is the only run-time setting: 2 … 10 are valid, and any other code means 10.
Match-level N needs N matching periods, so N+1 triggers of the same period. For example, a
20 kHz trigger is vetoed on its 11th trigger at level 10. Holding `enable` low keeps
everything cleared, and counting starts again when it rises.

Some consequences to keep in mind:

- **Short periods merge.** Because too-fast triggers are skipped, a very fast train is seen
  as a multiple of its period. A 500 kHz train is matched at 250 kHz. The lower limit
  protects against double triggers, not against fast fixed rates.
- **The lower limit is 86 clocks in terms of true period.** With the count starting at zero,
  an 85-clock trigger period still counts as too short. This matches the measured period
  scan of the real hardware.
- **Roll-over bounds the memory.** After 4100 clocks of silence the match counter loses one.
  A 1 ms veto with no triggers therefore takes it from 10 down to 1.

## What a veto does on the TIM (`tim_fftv`)

```
 NIM ─┐                          ┌──────────── veto ─────────────┐
 ECL ─┼─ tim_standalone ─ SA ─┐  │                                ├─ OR ─ busy to CTP
 LFSR ┘   (inhibit ◄── veto)   OR ─ trigger ─ fftv_core ─ veto ───┤       ▲
                  TTC trigger ─┘      │                            │  ROD0..15 busy
                                      └──── fftv_lea ── OK ─ AND ──┴─ trigger_out
```

- **Stand-alone mode.** The TIM's own sources (front-panel NIM and ECL, internal generator)
  are inhibited at once, before they are numbered. Trigger numbers stay consecutive.
- **Run mode.** External triggers from the TTC system cannot simply be dropped, because that
  would put event numbers out of step. The only way to stop them is the busy to the central
  trigger processor (CTP). The veto is OR-ed into it with the 16 ROD busy lines.
- **Local Emergency Action (`fftv_lea`).** The busy needs a round trip to take effect, so
  triggers pass for `LEA_DELAY` = 80 clocks (about 2 µs) after the veto rises. A trigger that
  arrives later while the veto is still on is dropped, and it starts the emergency:
  - every trigger from then on is dropped;
  - the busy stays asserted after the veto ends;
  - `tim_ok` drops.

  The emergency ends only with a Clear-LEA command written after the veto has ended. A
  Clear-LEA written during the veto is ignored.
- **Disable.** The veto is off only when the board jumper is fitted **and** the software
  disable bit is set. Both are needed so that the veto cannot be switched off by accident.
  Detectors that do not need the protection use this.

`fftv_monitor` counts, for dead-time accounting:

- total busy clocks (48 bits, rolls over after 81 days);
- busy clocks caused by the veto or the emergency (48 bits);
- the number of vetoes (32 bits);
- the number of triggers received during a veto (32 bits).

`tim_fftv_regs` makes these counters readable as 16-bit registers:

| address | content |
|---|---|
| 0x20 / 0x22 | ROD busy, live / latched |
| 0x46 | control (write): bit 0 Clear-LEA, bit 1 clear timers, bit 2 clear veto counters |
| 0x48 | bits 3:0 match-level (reset value 10), bit 4 software disable |
| 0x5A / 0x5E | status, live / latched: bit 10 busy to CTP, bit 13 emergency, bit 14 veto |
| 0x60, 0x62, 0x64 | total busy count, least significant word first |
| 0x74, 0x76, 0x78 | FFTV busy count |
| 0x84, 0x86 | veto count |
| 0x88, 0x8A | triggers received during a veto |

Latched registers are cleared by writing 1s to the bits to clear. Addresses 0x48 and
0x88/0x8A, and control bits 1-2, are this design's choices. The others follow the original
register map. The ROD-busy "monitor" register at 0x24 is not implemented and reads 0.

## The ROD variant (`rod_fftv`)

On a ROD, triggers come from DSPs as serial commands on a one-bit line. `serial_trig_detect`
recognises the command `0110` and feeds the same core and emergency logic. To actually stop
a command, the line passes through a 6-clock delay. When a command must be dropped, its two
`1` bits are cleared inside the delay line.

Monitoring is reduced:

- a 24-bit FFTV busy timer and an 8-bit veto counter, each with a latching roll-over bit;
- busy-active and emergency-active bits, each live and latched;
- no overall busy timer.

The settings are inputs: match-level, plus emergency-clear, count-clear and id-clear. The
clear bits act as levels. While any of them is 1, commands are also held back, so
software writes it back to 0 to let triggers through again. `fftv_disable` is meant for the
"I am a Pixel ROD" line.

`fftv_system`, the top, holds one TIM path and one ROD. The ROD's busy is OR-ed into the
TIM's ROD0-busy input, so a ROD veto reaches the CTP.

## The pseudo-random trigger generator (`tim_random_trigger`)

A 39-bit XNOR shift register advances every clock: bit 1 takes NOT(bit 39 XOR bit 35). Each
bit is 1 about half the time. The generator fires when a chosen set of k bits is all ones,
which gives a pseudo-random rate of about 40 MHz / 2^k. The 5-bit frequency setting selects
the bit set from a fixed table:

| setting | bits required | rate |
|---|---|---|
| 23 and above | none | every clock |
| 22 | 1 | about 20 MHz |
| 14 | 9 | about 78 kHz |

Each step down in setting halves the rate. To imitate LHC fills with widely spaced bunches,
the output is also gated by a one-clock pulse every `bunch_spacing` clocks (typical values
are 22 and 82).

## How well it matches the measured hardware

Two testbenches repeat the published measurements at the default settings:

- `tb_fftv_random_veto`: the TIM vetoes its own 78 kHz random triggers. The probability that
  a trigger causes a veto comes out as:
  - 2.5e-3 at match-level 2 (measured on hardware at 77 kHz: about 2.5e-3);
  - 3.0e-4 at match-level 3 (measured: about 3e-4).

  Higher levels need 10^6 to 10^9 triggers and were not simulated.
- `tb_fftv_period_scan`: a fixed-period trigger is applied and the triggers passed per veto
  are counted (hardware values in brackets):

  | period (clocks) | triggers per veto |
  |---|---|
  | 40 | 31 (about 34) |
  | 85 | 21 (about 23) |
  | 86 to 2667 | 11 (about 11-12) |
  | 2668 | no veto |

## Choices this design makes where the original is not specific

- The period roll-over of 4100 clocks comes from the illustrative simulation settings. The
  final settings do not list one.
- Behaviour after a roll-over or an over-long period: the stored period is forgotten.
- No new veto starts while one is running. The one-clock veto latency is this design's.
- The LFSR follows the shift-register description (39 bits). A prose description of the
  same generator calls it 38 bits long.
- The ROD counter widths follow the 24/8-bit figure, which is stated twice. A status-word
  list elsewhere gives 20 and 12 bits.
- Trigger-number width (24 bits) and the event-counter reset. The two-flip-flop synchroniser
  on the front-panel inputs. The ROD command-blanking mechanism. The meaning of latched bits
  and clears. `tim_ok` = TTC clock good AND no emergency.
- The oscilloscope test settings used a match threshold of 16. That cannot be set here: the
  match-level is 4 bits and limited to 2 … 10.
- Not included: the TTC optical receiver, the CTP, the NIM/ECL/backplane electrical
  interfaces and the jumper itself. Their logic signals are ports.

## Files and simulation

`rtl/fftv_pkg.sv` holds the shared constants. There is one module per file in `rtl/`.
Everything is synchronous to `clk`, with an active-low asynchronous reset, and trigger
inputs are one-cycle pulses. Parameters default to the final settings (85, 2666, 4100, 40,
40000, 80). Other settings, such as the demonstration set used in `tb_fftv_table1`, are
parameter overrides.

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`. `tb_fftv_system` runs the whole crate (TIM and ROD) at the
default parameters, through the random generator, a stand-alone veto, an emergency and its
clear, roll-over, and a ROD veto with command removal. To run it:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv -Irtl \
    rtl/fftv_pkg.sv tb/tb_fftv_system.sv --top-module tb_fftv_system -o sim
./obj_dir/sim
```

The other testbenches run the same way with their own name. `tb_fftv_random_veto` takes
about a minute. All the others take seconds.
