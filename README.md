# Multiplex time sequence controller

Range tests of munitions place several measuring instruments (high-speed
cameras, velocity screens, pressure gauges) along a trajectory or around a
warhead. Each instrument must start at its own moment after one common event,
such as the firing pulse. This controller takes that single start trigger and
issues **20 independent delayed trigger pulses**. Each channel has its own
delay of 0 to 10 s in 0.1 µs steps, and each output is a 5 ms pulse.

The logic is a set of presettable down counters. A 32-bit delay value is
loaded into each counter before the shot. The start trigger enables all the
counters at once, and each channel fires when its counter reaches zero.
Because the counter runs on a 10 MHz clock, the delay is exact to the clock
period. The logic adds no error beyond the one period in which the trigger
is sampled.

The RTL covers the digital part of the instrument:

- the FPGA logic of the four time sequence control modules, five channels each;
- a digital one-shot that forms the 5 ms output pulse.

The microcontrollers that program it, the panel, the level shifters, the
isolation and the 12 V output drivers are outside the RTL. Their signals
appear as ports.

## Structure

```
mtsc_top                      20 channels, one start trigger
├── timing_module  x4         one per slave microcontroller: 5 channels
│   ├── address_decoder       bus address -> latch-byte / load strobes
│   └── counting_channel x5   one delay channel
│       ├── data_latch32      4 x 8-bit latches (WR0..WR3) -> 32-bit delay
│       ├── trigger_enable    trigger edge -> held counting enable
│       └── preset_counter32  32-bit down counter, COUT at zero
└── pulse_former   x20        5 ms one-shot per channel output
mtsc_pkg                      shared constants and the bus address map
```

Channel `c` of module `m` is bit `m*5 + c` of the top's per-channel vectors.

## How one channel makes its delay

This section defines the timing of every delay, so it is worth reading
closely.

1. **Latch.** The microcontroller writes the delay N one byte at a time into
   the channel's four 8-bit latches. Byte 0 is the least significant byte.
   The latches only hold the value, so the microcontroller can write them at
   any time.
2. **Load.** A load command copies the latched word into the down counter and
   *arms* the channel. It also clears a previous result: the output and the
   counting enable drop, so a reloaded channel waits for a new trigger.
3. **Trigger.** `trigger_enable` watches the common trigger. The first rising
   edge seen while the channel is armed sets the counting enable, which then
   stays set until reset or reload. Further trigger edges do nothing during
   the count. A trigger that is already high when the channel comes out of
   reset does nothing either: a low-to-high change is needed. A channel that
   was never loaded ignores the trigger.
4. **Count.** While the enable is set, the counter steps down once per clock
   until it reaches 0, where it stops.
5. **Fire.** The terminal count is registered as the channel's delayed
   trigger (`delay_out`). Its rising edge is the output moment. It stays high
   until the next reload or reset.

The exact relation is:

> If clock edge *k* is the first edge that samples `trig` high, then
> `delay_out` rises at clock edge *k + N* (for N ≥ 1; N = 0 behaves like
> N = 1).

At 10 MHz, a value of 55 therefore gives 5.5 µs, and 10 s is N = 100,000,000.
The 32-bit counter could reach about 429 s.

`trig` is sampled directly, with no synchronizer, because a synchronizer
would add a fixed latency to every delay. It is assumed to arrive through the
input isolation already clean and reasonably aligned to the clock. If it is
truly asynchronous, add a two-flop synchronizer in front of `trig`. Every
delay then grows by two clocks (0.2 µs), which you can take off the loaded
values.

## The output pulse

The test instruments need a pulse of defined width, not a level. Each
channel's `delay_out` feeds a `pulse_former`. On the first clock edge that
samples its input high, the `pulse_former` starts a pulse of exactly
`PULSE_CYCLES` = 50,000 clocks (5 ms). In the full design that edge is one
clock after `delay_out` rose. The pulse cannot be retriggered. In the
original instrument this job is done by an analog mono-stable in the driver
stage. Here it is done in logic on the counting clock, so the width is exact.
The 12 V level shifting and drivers come after `pulse_out` and are not part
of this RTL.

## Programming a module

Each `timing_module` has its own write bus, which in the instrument is driven
by that module's slave microcontroller:

| signal | width | meaning |
|---|---|---|
| `bus_addr[m]` | 5 | address command |
| `bus_data[m]` | 8 | write data |
| `bus_wr[m]` | 1 | one write on every clock edge where it is high |
| `bus_rdata[m]` | 8 | read-back of the latched byte that `bus_addr[m]` selects (0 for other addresses), combinational |
| `mod_rst[m]` | 1 | soft reset of this module only |
| `done_irq[m]` | 1 | "delay finished" interrupt |

The bus is synchronous to the 10 MHz clock. A microcontroller bus that is
not synchronous needs a small strobe synchronizer in front of it.

Address map (defined in `mtsc_pkg`):

| address | action |
|---|---|
| `4*c + b` (0..19) | write byte `b` (0 = LSB) of channel `c`'s delay latch |
| `24 + c` (24..28) | load channel `c`'s counter from its latch and arm it |
| `31` | load and arm all five channels |
| others | ignored |

A typical sequence for one shot:

1. Write the 20 bytes of the module.
2. Optionally read them back on `bus_rdata` to show them on the panel.
3. Load all channels with address 31, or load them one by one.
4. Wait for the shot.

When every armed channel of the module has fired, `done_irq` goes high. It
rises one clock after the last `delay_out` of the module. The microcontroller
answers it with `mod_rst`, which clears that module's latches, counters and
flags and leaves the other modules alone. The global `rst` clears everything.
All resets are synchronous and active high.

The status outputs `ch_armed` and `ch_running` show, per channel, that a
delay is loaded and that the channel is counting.

Two assertions in `timing_module` and one in `counting_channel` check these
rules:

- a bus write strobes at most one latch byte;
- a channel never fires without a loaded delay;
- the output never rises without a counting enable.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `mtsc_top` | `NMOD` | 4 | modules |
| `mtsc_top`, `timing_module` | `NCH` | 5 | channels per module (the address map has room for 6) |
| `mtsc_top` | `PULSE_LEN` | 50,000 | output pulse width in clocks (5 ms at 10 MHz) |
| `preset_counter32` | `WIDTH` | 32 | counter width |
| `data_latch32`, `counting_channel` | `DATA_W`, `BYTES` | 8, 4 | bus width and bytes per delay |
| `mtsc_pkg` | `CLK_HZ` | 10,000,000 | counting clock, which sets the 0.1 µs step |

All defaults are the values of the original instrument. The bus width, the
5-bit address and the address map are this design's choices.

## Where this RTL departs from, or adds to, the original

These parts follow the original instrument:

- the four modules of five channels;
- the 8-bit byte latches forming a 32-bit delay;
- the 32-bit preset down counter with its terminal-count output;
- the trigger-derived counting enable;
- the 10 MHz step (55 counts = 5.5 µs);
- the 5 ms output pulse.

These are choices of this design, because the original leaves them open:

- The address map, the synchronous bus and the read-back port.
- Byte order: the least significant byte comes first.
- The arming rule: a trigger is ignored until the channel is loaded.
- A reload clears the previous result.
- The output is held high after firing until reload or reset.
- The interrupt rule: all armed channels have fired.
- Synchronous active-high resets with zero reset values.
- No trigger synchronizer.
- The digital 5 ms one-shot in place of an analog mono-stable.
- The counter written as plain RTL rather than a vendor counter macro.

The microcontroller firmware is not modelled. In the instrument, a host
microcontroller receives the delays from a PC or from the panel and
distributes them to four slave microcontrollers. The testbenches play the
slave microcontrollers' part directly on the bus ports.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_data_latch32` | random byte writes, several strobes at once, reset |
| `tb_preset_counter32` | exact expiry time for a range of presets (0, 1, 2, 55, 500, random), hold while disabled, stop at zero, reload, wide values |
| `tb_trigger_enable` | no start from a level or while unarmed, enable on the sampling edge, hold, clear |
| `tb_address_decoder` | all 32 addresses with and without the strobe |
| `tb_counting_channel` | bus-written delays incl. 55 → 5.5 µs, exact clock count, early trigger ignored |
| `tb_pulse_former` | 5 ms width at the default size, no retrigger, no fire at reset |
| `tb_timing_module` | five different delays, read-back, single and load-all, exact per-channel delays, interrupt timing, soft reset |
| `tb_mtsc_top` | one full shot of all 20 channels at default parameters (see below) |
| `tb_table1` | the laboratory delay test: ten delays from 50 µs to 1 s, then one channel at 10 s |

`tb_mtsc_top` runs the whole design at its default size through one shot:

- programme, read back and load all 20 channels;
- fire;
- re-trigger during the count;
- check every delay, pulse start, 5 ms width and interrupt;
- soft-reset one module.

It counts each mechanism and fails if any of them never happened: byte write,
read-back, single load, load-all, ignored early trigger, ignored re-trigger,
delay, pulse, interrupt and soft reset.

`tb_table1` repeats the reference bench test on module 0. The first round
sets 50, 100, 500, 1,000 and 25,000 µs. The second round sets 1,000, 2,000,
5,000, 50,000 and 1,000,000 µs. A final round sets one channel to 10 s.

Every delay comes out exact to the clock. The laboratory measurements of the
original instrument deviate by 0.1 to 1.5 µs. Those deviations come from
cabling, drivers and trigger edges, which this logic does not model. The 10 s
round simulates 10⁸ clocks and takes about a minute.

To run a testbench with Verilator 5 (from the directory that holds `rtl/`
and `tb/`):

```
verilator --binary --timing --assert -y rtl rtl/mtsc_pkg.sv \
          tb/tb_mtsc_top.sv --top-module tb_mtsc_top -Mdir obj_top
./obj_top/Vtb_mtsc_top
```

Replace `tb_mtsc_top` with any other testbench name. The package file must
come first on the command line; `-y rtl` finds the remaining modules.

## Trust and limits

- All logic is synchronous to one clock and uses no vendor primitives. It
  lints with Verilator `-Wall` (the only warnings are package constants a
  given module does not use), elaborates with the Yosys/slang front end and
  synthesizes without latches. At the default size this is about 1,700
  flip-flops.
- Timing in the testbenches is checked in clock cycles against values worked
  out independently of the RTL. No gate-level or timing analysis was done.
- The bus protocol and the interrupt are this design's. Firmware written for
  the original instrument would need to be adapted to this address map.
