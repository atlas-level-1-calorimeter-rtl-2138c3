# Clock Alignment Module (CAM) — phase measurement of processor clocks

In a crate of trigger processor modules, each module receives data from its
neighbours over fast links that carry no timing of their own. Each receiver
relies on its clock coming from the same source as the transmitter's clock. For
that to work, the 40.08 MHz clocks of neighbouring modules must agree in phase
to well under a nanosecond. The CAM is a single board in the crate that takes a
clock cable from each of up to 16 modules. It measures the phase of any one
clock against any other to better than 100 ps. It can also compare them against
a local clock that it recovers itself from the crate's TTC timing line. That
local clock is also sent over fibre to other crates, and up to three such fibre
clocks can be measured in turn, so the clock phase can be compared across
crates.

The method needs no fast counter. Two 40 MHz clocks are turned into a stream
of 20 MHz pulses whose duty cycle is proportional to their phase difference.
The stream is low-pass filtered, and the resulting DC level is read with a
10-bit ADC. Around this analog core sits digital logic: clock-selection
multiplexers, the TTC clock and data recovery, the ADC sequencer, a small VME
slave with its register file, and bench test modes. This repository holds that
logic in SystemVerilog. The parts that are analog or bought in are behavioural
models for simulation.

```
 16 processor clocks ─┐        ┌───────────── reference mux ──┐
 local 40 MHz ────────┼────────┤ (CPM / TTC / ~TTC / TTC+dT)  ├─ clk1 ┐
 local, inverted ─────┤        └──────────────────────────────┘       │  phase_detector ── pulses ──► (analog LPF + ADC)
 local + 2.2..12.4 ns ┤        ┌──────────── variable mux ────┐       │                                    │
 3 fibre clocks ──────┴────────┤ (CPM / fibre 1..3)           ├─ clk2 ┘                                    │ serial
                               └──────────────────────────────┘                                           ▼
 TTC line ─► ttc_clock_recovery ─► iz_nrz_decoder ─► ab_align ─► local 40 MHz       adc_controller ◄──────┘
                                                                                        │
 VME-- bus ◄──► vme_slave ◄──► cam_registers ◄── mux_test (bench jumpers) ◄────────────┘
```

## Measuring phase: divide, resample, XOR (`phase_detector`)

This is the part of the design that is least obvious.

- **Dividing clock 1.** Clock 1 (the reference) drives a two-flip-flop twisted
  ring, `div_a <= ~div_b; div_b <= div_a`. This divides it by four, giving a
  10 MHz square wave.
- **Resampling with clock 2.** Clock 1 and clock 2 are not each divided.
  Instead, the divided signal is sampled by clock 2 (the variable clock): first
  on its falling edge, then again on its rising edge.
- **XOR.** The XOR of the divided signal and its resampled copy is the output
  pulse stream.
- **Zero phase.** When both clocks have the same phase, the two XOR inputs are
  in quadrature, so the output has a 50 % duty cycle.

As clock 2 lags clock 1 by τ (period T = 25 ns), the high time per 2T is

    d = τ + T   for 0 ≤ τ < T/2
    d = τ       for T/2 ≤ τ < T

The duty cycle d/2T therefore runs linearly from 0.25 to 0.75 and wraps at
τ = ±T/2. That wrap is the ±π discontinuity of the detector. Zero phase sits in
the middle of the range, not at an end, so small errors either way are
measured without wrapping.

The low-pass filter and pre-amplifier that follow are analog and are not
built here. The testbench model `tb/phase_adc_model.sv` stands in for them and
for the ADC. It integrates the pulse stream over the ADC's conversion window
and scales the result with a gain of two around mid-scale:

    code = 512 + (duty − 0.5) · 2048

In that model, clocks in phase read about 0x200, and one count is 25 ns / 1024
≈ 24 ps. The real board's filter and amplifier gains have to be calibrated.
The digital design carries all ten bits unchanged.

Clock 2 is resampled on its falling edge first, so its mark-space ratio sets
where the wrap falls. For a clock 2 that is high for h,

    d = ((τ + h) mod T) + T − h

Zero phase still reads 50 %, but the wrap moves to τ = T − h, where a rising
edge of clock 1 meets a falling edge of clock 2. Clock 1's mark-space ratio
has no effect, because only its rising edges are used.

Because the resampling uses opposite edges of clock 2, the first flip-flop
never samples near a clock-1 edge when the clocks are nearly in phase. That is
where a precise measurement matters most.

## Choosing the clocks (`clock_select`)

Each side is a 16-way processor multiplexer, built as four 4:1 multiplexers
(by processor bits 1-0) feeding a 4:1 (bits 3-2). A final 4:1 then selects by
source type:

| type | reference (clock 1)           | variable (clock 2)  |
|------|-------------------------------|---------------------|
| 0    | processor clock 0..15         | processor clock 0..15 |
| 1    | local TTC clock               | fibre receiver 1    |
| 2    | local TTC clock, inverted     | fibre receiver 2    |
| 3    | local TTC clock + programmable delay | fibre receiver 3 |

- The inverted choice shifts the reference by half a period, 12.5 ns. This
  moves a measurement that falls near the ±π wrap back into the linear region.
- The delayed choice (`ttc_delay`, 2.2 ns + code × 10 ps, 10-bit code) lets
  the detector be calibrated by stepping a known delay.
- `ttc_delay` is a behavioural model of an ECL programmable delay chip.

## Recovering a local clock from the TTC line

The TTC line carries two time-multiplexed channels in biphase-mark code with
12.5 ns cells:

- channel A carries the Level-1 Accept (L1A) bits;
- channel B carries the command data;
- every cell boundary has a transition;
- a '1' adds a second transition in mid-cell.

The recovery is a chain of three blocks.

1. **`ttc_clock_recovery` (behavioural model of a PECL circuit).**
   - The line is XORed with a copy of itself delayed by 3 ns. Each transition
     then gives a 3 ns pulse.
   - That pulse sets a flip-flop whose output resets it 4 ns later.
   - The flip-flop ignores new pulses only while it is set. For the mid-cell
     transitions to be ignored, they must land in that set time. The model
     reproduces this with transport delays, so the result depends on the
     4 ns + 3 ns figures and on the cell timing. Changing either delay in the
     model is a quick way to see the chain break.
   - Output `clock80` is the recovered 80 MHz clock.
   - Output `clock80_sample` is `clock80` delayed by 9 ns. It is the sampling
     clock for the next stage.
2. **`iz_nrz_decoder`.**
   - The line is sampled once per cell, after any mid-cell transition and
     before the next boundary. This gives an IZ sample.
   - The sample is then retimed onto `clock80`.
   - If two successive samples are equal, the cell contained two transitions,
     so the bit is '1'. If they differ, the bit is '0'. In logic terms,
     `nrz = ~(iz ^ iz_prev)`.
3. **`ab_align`: which bit belongs to which channel.**
   - After reset the block assumes the line is idle. In idle, channel B sends
     1s and channel A sends 0s. The first '1' seen is therefore taken as a B
     bit, and the slots alternate from there.
   - A wrong guess shows up as a long run of (A, B) = (1, 0) pairs, because
     idle B bits are then being read as A. More than 11 such pairs in a row is
     treated as illegal.
   - On an illegal run, the A/B slot signal is held for one 80 MHz cycle. This
     swaps the channels. A one-cycle `violation` pulse drives the error
     indicator.
   - The slot signal, retimed by a flip-flop, is the local 40 MHz clock.
   - Each A-channel '1' gives a one-cycle `l1a` pulse.

The TTC receiver documentation also quotes a second rule: more than 23
consecutive A bits of 1 are illegal. Setting `A_ONES_RULE = 1` on `ab_align`
selects it (limit `A_RUN_LIMIT = 23`). The run is then checked in the A slot,
and the offending bit is re-taken as a B bit.

A genuine burst of 12 or more consecutive L1As also trips the default rule. The
design then swaps the channels once, and swaps them back when the idle pattern
returns. The testbenches show both swaps.

## Reading the ADC (`adc_controller`)

The sequencer has four states, and the ADC Status register reflects its
Busy/DAV flags:

| state  | Busy | DAV  | what happens |
|--------|------|------|--------------|
| IDLE   | 0    | kept | waits for a start |
| START  | 1    | 0    | pulls chip select low to start a conversion |
| WAIT   | 1    | 0    | waits until the ADC's DOUT goes high (end of conversion) |
| UPDATE | 0    | 1    | stores the result |

- **Start.** A conversion is started by the StartConversion bit. That bit
  clears itself as soon as the conversion begins.
- **READ phase.** Between WAIT and UPDATE, a READ phase clocks out 12 bits,
  MSB first: ten data bits and two trailing sub-bits.
- **Continuous mode.** With the ADC test jumper fitted, conversions follow
  each other continuously.
- **SCLK.** The serial clock is `clk / (2·SCLK_HALF)`. The default is 20 logic
  clocks per SCLK period, about 2 MHz.

## VME-- slave and registers (`vme_slave`, `cam_registers`)

The backplane offers only a reduced VME bus: DS0*, WRITE*, DTACK*, A23-A1 and
D15-D0. There is no address strobe and there are no address modifiers, so
DS0* alone frames a cycle.

- **Strobe handling.** `vme_slave` synchronises DS0* with two flip-flops. It
  accepts the strobe only after it has been stable for `DS_FILTER` (3) logic
  clocks, so glitches cannot start a cycle.
- **Decode.** It compares A23-A8 with the base address 0x060000. A7-A1 select
  one of 128 words.
- **Cycle.** It issues a one-cycle read or write strobe, drives the data
  lines, and holds DTACK* low until DS0* is released.
- **Timing.** DTACK* falls on the (DS_FILTER+5)th clock edge after DS0*
  falls. It is released on the (DS_FILTER+3)th edge after DS0* rises.
- **Assertions.** Two assertions check the handshake.

| word (byte) | access | contents |
|------|----|------|
| 0x00 (0x00) | R  | module type 0x3380 |
| 0x01 (0x02) | R  | [15:12] firmware rev, [11:8] PCB rev, [7:0] serial number |
| 0x02 (0x04) | R  | [15] PS_ALERT (latched), [7:6] SFP3 RX-LOS / removed, [4:3] SFP2 RX-LOS / removed, [2] SFP1 TX fault, [1:0] SFP1 RX-LOS / removed |
| 0x03 (0x06) | RW | [1] CAN µC programming mode, [0] fibre transmitter enable |
| 0x04 (0x08) | RW | reference source: [5:4] type, [3:0] processor |
| 0x05 (0x0A) | RW | [9:0] TTC delay code (10 ps steps from 2.2 ns) |
| 0x06 (0x0C) | RW | variable source: [5:4] type, [3:0] processor |
| 0x07 (0x0E) | W  | [15] = 1 clears status bit 15 |
| 0x08 (0x10) | R  | [1] data available, [0] busy |
| 0x09 (0x12) | RW | [0] start conversion (self-clearing) |
| 0x0A (0x14) | R  | [9:0] phase value |

Unused bits and unused words read as zero.

## Bench test modes (`mux_test`)

Two jumpers select the bench test mode:

| mode | selections | fibre Tx |
|------|------------|----------|
| 0 | from the registers (normal operation) | control register bit 0 |
| 1 | both driven by a 6-bit counter that steps every 1 ms (40 080 logic clocks), so an oscilloscope can walk through every input | on |
| 2 | both selections 0 | off |
| 3 | reference 0, variable 1 | off |

A third jumper runs the ADC continuously.

## Top level (`cam_top`)

`cam_top` wires these blocks together. It brings out as plain ports every
signal that belongs to a part not built here:

- receiver outputs for the processor and fibre clocks;
- SFP status lines;
- the phase-pulse output and the ADC's serial pins;
- the monitor outputs, and the two selected clocks as test points;
- the CAN daughter card's alarm and programming line;
- the indicators.

Its parameters are `BASE_ADDR`, `RUN_LIMIT`, `A_ONES_RULE`, `SCLK_HALF`,
`STEP_CYCLES` and `DS_FILTER`. The logic clock `clk` (40.08 MHz) runs the VME slave, the
registers, the ADC sequencer and the test counter. It is independent of the
clocks being measured.

## Simulating

Each block has a self-checking testbench, `tb/<block>_tb.sv`. Each one prints
`TB_RESULT checks=… failures=…` at the end and carries a watchdog. For example,
the whole design:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/cam_pkg.sv tb/cam_top_tb.sv --top-module cam_top_tb -Mdir obj -o sim
./obj/sim
```

`cam_top_tb` runs the top with every parameter at its default. It simulates
2 ms in a few seconds and exercises the following, counting each:

- processor-to-processor phase at several offsets;
- TTC-to-fibre phase;
- the inverted and delayed references, including a delay scan;
- fibre inputs 2 and 3;
- an L1A;
- an A/B slip;
- the fibre transmitter enable;
- the PS_ALERT latch and its clear;
- a cycle at a foreign address;
- a test-counter step timed to 1 ms, with the selected clock visible on the
  test-point outputs `ref_clk_tp` and `var_clk_tp`;
- continuous ADC conversion.

`cam_sweep_tb` runs the module's main use, also at default parameters. It
takes one processor clock through 240 delay settings of 104 ps, the fine
steps of a TTC receiver, covering a full period. At each setting it reads the
phase through the registers. It checks three things:

- every reading against the transfer function;
- a monotonic rise with exactly one wrap;
- that the setting read closest to 0x200 lies within 100 ps of true zero
  phase (46 ps in this run).

It simulates 5 ms in about 5 s.

`cam_crate_tb` scans a full crate at default parameters. It puts all 16
processor inputs in use, as in the largest crate. It measures each input
against the local TTC-derived clock, then on both multiplexer sides against
processor 0, and compares every reading with the transfer function.

Testbench helpers:

- `tb/ttc_source.sv` generates a biphase-mark TTC line with chosen A and B
  bits.
- `tb/phase_adc_model.sv` models the filter, amplifier and serial ADC.

The block testbenches for the ADC sequencer, VME slave, registers and test
counter shorten their timing parameters.

## What follows the specification and what is a choice

**Taken from the specification:**

- the block partition and the clock sources;
- the reference/variable type encodings;
- the structure of the phase detector and its opposite-edge resampling;
- the 3 ns / 4 ns transition-detector and monostable delays;
- the IZ sampling rule;
- the A/B alignment rule with its limit of 11;
- the 2.2 ns + 10 ps × code delay;
- the ADC state machine and flags;
- the reduced VME bus, base address and 128-word block;
- the register map and the test modes.

**Choices of this design:**

- *TTC idle pattern.* Which channel carries 1s when the line is idle: B.
- *Sampling delay.* The 9 ns delay of the sampling clock.
- *Serial ADC.* The protocol (a MAX1243-style device), the SCLK rate and the
  READ phase.
- *VME strobe filter and timing.* The DS0* filter length and the bus-cycle
  timing.
- *Reset values.* All zero.
- *PS_ALERT.* The status bit is implemented as a latch.
- *Test counter.* It steps once per millisecond.
- *Fibre Tx in mode 0.* It follows the control register bit rather than being
  forced off.
- *Pulse stretching.* None on the indicators.
- *Phase detector reset.* An asynchronous reset, added for simulation.

The specification is inconsistent in two places, and these choices were made:

- *A/B slip rule.* It states the rule both as "(A,B) = (1,0) more than 11
  times" and as "A = 1 more than 23 times". The first is used.
- *Fibre transmitter in normal mode.* The test-mode table shows it off, but
  the control register has an enable bit for it. The register wins.

At 10 ps per step, the delay code reaches 12.43 ns, not the 12.2 ns upper end
quoted for the delay chip. The linear formula is kept over the full code
range.

## Limits

- **Behavioural models.** `ttc_clock_recovery` and `ttc_delay` model analog
  and ECL timing with transport delays. They are for simulation only, so
  `cam_top` as a whole is a simulation model. Every other block is
  synthesizable logic.
- **Not modelled.** The input receivers, filter, pre-amplifier, ADC chip,
  SFP modules, monitor drivers, CAN microcontroller and power circuits are not
  modelled in the RTL. The filter/ADC pair exists only as a testbench model.
- **Calibration.** The phase reading depends on the analog gain and offset of
  the real board. The ADC codes in the testbenches assume the ideal transfer
  function above.
- **Lint warnings that stand.**
  - In `vme_slave`, the reset is used both as an asynchronous reset and as
    the disable condition of the bus assertions, which sample it on the
    clock. Lint reports this mixed use. It is intended and noted in the file.
  - Unused-signal warnings in `cam_top` are for the intermediate TTC signals
    (A and B bits, lock, slot), which are kept for observation.
