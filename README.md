# Trigger supervisor for a multi-partition detector

A large particle-physics detector is split into subsystems (tracking,
particle identification, calorimetry, ...), here called *partitions*. Each
partition offers up to eight first-level trigger signals, and each has its
own front-end electronics (ADCs, TDCs, latches) that must be gated when an
event is taken, read out afterwards, and kept from taking new events while
busy. The trigger supervisor sits between the trigger signals and the front
ends of up to 16 partitions and decides, event by event:

* which trigger components count (enable mask, prescaling up to 1 in 2^24);
* which partitions get gates, and exactly when, with the gate start
  independent of which partition or component caused the event;
* whether an event survives the second-level (veto) decision 1 µs later,
  ending in a readout interrupt, or is thrown away by a fast clear of the
  front ends with the busy logic released, with no processor involved.

The host configures and monitors all of it through a 1024-byte register
window in VME short (A16) address space.

This repository holds a synchronous SystemVerilog model of the whole crate:
a control module and 16 partition modules connected by backplane lines.

## Coupled and uncoupled partitions

This is the central idea, and the least obvious part of the design.

* **Coupled** partitions (normal data taking) share one dead time. A
  first-level trigger accepted in *any* coupled partition is put on the
  wired-OR backplane line `SYSTEM FIRST-LEVEL`. That sets the single system
  busy latch and the Busy bits of all coupled partitions, and every coupled
  partition opens its gates for the event, whether or not it triggered
  itself. System busy is released only when the Busy bits of *all* coupled
  partitions have been cleared, so the event is complete in every subsystem
  before a new one is accepted.
* **Uncoupled** partitions (calibration, debugging) have their own dead
  time. Only their own triggers open their gates, their own Busy bit
  blocks them, and they take no part in the backplane lines.

The Coupled register on the control module picks the mode of each
partition, one bit per partition.

## One event, step by step

Times are clock cycles of `clk`. Every parameter default assumes a 1 ns
clock, so cycles and nanoseconds are the same number.

| cycle (after the trigger is sampled) | what happens |
|---|---|
| 0 | interaction trigger sampled by the **standardizer** |
| 1 | standardized pulse starts: 50 cycles wide, a new one at least 125 cycles after the last start; earlier triggers are dropped |
| 2 | **busy synchronizer**: if system busy is clear at the pulse start, the whole pulse becomes `EVENT STROBE` |
| 2.. | in each partition, every component with A·B, enable and strobe true is *gated*; the prescaler decides whether it is *accepted* (S4). The OR of the S4 signals is `X FIRST-LEVEL`, and for coupled partitions the backplane OR of those is `SYSTEM FIRST-LEVEL` |
| +1 | Busy bits and system busy are set; the event counter (coupled) and the partition's transaction counter count; the trigger pattern register records the accepted components |
| 30 | `DELAYED EVENT STROBE` (the strobe 28 cycles later) starts |
| 31 | gates open on every partition that takes part, for 50 cycles |
| 0..1000 | a partition may withdraw its vote with its `X VETO` input |
| 1000 | second-level decision: votes outstanding → `INITIATE X INTERRUPT` (250 cycles; its end clears the vote); none → `INITIATE X FAST CLEAR` (250 cycles; its end clears the partition's Busy bit) |
| later | the readout processor clears the Busy bits of interrupted partitions through Set-Clear Select and the Function byte |

The gate is timed only by the delayed strobe, never by the trigger path, so
its start is the same to the cycle for every partition and every component.
Its position (31 cycles, within the original ≈50 ns insertion-time budget)
follows from the pipeline above.

## Prescaling

Each component has a 24-bit preset register and a 24-bit counter. The
counter advances on the trailing edge of every gated trigger that was not
accepted, unless the partition is busy at that edge. Its overflow flag is
high while the counter is all ones. A trigger whose leading edge finds the
flag high, and the partition not busy, is accepted for its whole length. Its trailing edge reloads the
counter from the preset register. With preset `P` the factor is
`N = 2^24 − P`:

| wanted factor N | preset to write |
|---|---|
| 1 (every trigger) | `FFFFFF` (reset value) |
| 2 | `FFFFFE` |
| 10^6 | `F0BDC0` |
| 2^24 | `000000` |

Writing a preset also reloads the counter, so the new factor takes effect
at once. Reading a prescaler slot returns the preset.

## Second-level veto

* `X VOTE` is set by the rising edge of the partition's own first-level
  signal. For a coupled partition, the vote also drives the wired-OR line
  `SYSTEM VOTE`.
* `X VETO` clears the vote at any time before the decision, unless a
  component marked in the **Veto Override** register (a "veto survivor") was
  among the accepted ones. That protects rare, heavily prescaled triggers.
* At the decision, a coupled partition looks at `SYSTEM VOTE` and an
  uncoupled one at its own vote. So coupled partitions always reach the same
  decision.
* `global_veto`, high at the decision, forces a fast clear whatever the
  votes and survivors are. It is meant for events spoiled by pile-up.

## Register map

The window sits at `A15..A10 = BASE` (parameter, default 0) and answers
address modifiers `0x29` and `0x2D`. Words are at even addresses, with the
even byte in `D15..D8`. Byte accesses carry their data in `D7..D0`.

| A09 | A08..A05 | A04..A00 | register |
|---|---|---|---|
| 0 | board | `4k+1 .. 4k+3` | prescaler preset of component k, bits 23:16, 15:8, 7:0 (SCALER SELECT) |
| 1 | board | `0_0000` | Enable (8 bits, R/W) |
| 1 | board | `0_0001` | Veto Override (8 bits, R/W) |
| 1 | board | `0_0010` | transaction counter (8 bits, R) |
| 1 | board | `0_0011` | trigger pattern of the last event (8 bits, R) |
| 1 | board | `0_0100` | Pulse (W): one simulated trigger in every enabled component, with its own interaction trigger |
| 1 | any | `1_0000` | Coupled (16 bits) |
| 1 | any | `1_0010` | Busy (16 bits, R) |
| 1 | any | `1_0100` | Event Counter (16 bits, R/W) |
| 1 | any | `1_0110` | Set-Clear Select (16 bits) |
| 1 | any | `1_1000` | Function (W): bit 0 sets, bit 1 clears the Busy bits selected by Set-Clear Select |

A partition board answers when `A08..A05` equals its geographic address.
The top level gives board `p` the address `p`. A transfer that nothing
answers gets no acknowledge.

## Module hierarchy

```
trigger_supervisor              backplane ORs, 1 control + 16 partition modules
├── control_module              registers, address decode, busy bits, event counter
│   ├── trigger_standardizer    50-cycle pulses, 125-cycle spacing
│   ├── busy_synchronizer       system busy latch, whole-pulse EVENT STROBE
│   └── strobe_delay            28-cycle delay → DELAYED EVENT STROBE
└── partition_module ×16        registers, gates, trigger pattern, local strobe for uncoupled mode
    ├── trigger_component ×8    A·B, enable, strobe, S1..S4
    │   └── prescaler24         24-bit preset / counter / overflow
    ├── first_level_coupler     SYSTEM FIRST-LEVEL drive, X/SYSTEM FIRST-LEVEL select
    ├── busy_synchronizer       (uncoupled mode) own busy gating of the strobe
    ├── strobe_delay            (uncoupled mode) own delayed strobe
    └── veto_logic              vote, veto, survivors, 1 µs decision
```

`ts_pkg` holds the shared sizes, register offsets and the bus structs
(`vme_req_t`, `vme_rsp_t`, `local_req_t`).

## Where this model departs from the original hardware

The original is fast ECL and LSTTL logic with asynchronous edges and
analog details. This model is one synchronous clock domain, and the
following are its own choices. The first comment of each module lists them
in detail.

* **Clock.** One 1 GHz sampling clock, with all trigger inputs assumed
  already synchronous to it. "Constant to within 1 ns" becomes "constant to
  the cycle". Use a slower clock by scaling `WIDTH`, `SEP`,
  `STROBE_DELAY`, `DECISION`, `INT_LEN` and `FCLR_LEN`.
* **Not modelled.** The NIM-to-ECL receiver, the backplane terminations and
  Schottky clamps, the VME arbitration module and the crate interconnect.
  The wired-OR lines are plain ORs. The host bus is a one-cycle transfer
  struct rather than the VME handshake.
* **Uncoupled strobe.** How an uncoupled partition gets its strobe was not
  specified. Here each board has its own busy synchronizer and delay line,
  driven by the standardized trigger and its own Busy bit.
* **Choices where no detail was available.** The address bits other than
  A08..A05, the Function byte bit assignment, and the 8-bit transaction
  counter. The fast-clear pulse length (250 cycles) and the release of the
  Busy bit at its end. The Pulse register also firing an interaction
  trigger. Separation counted start to start, with too-early triggers
  dropped. One gate output per partition, exactly one strobe wide.
* **Prescaler encoding.** The factor encoding `N = 2^24 − P`, and the busy
  inhibit sampled at the trailing edge.
* **Reset.** Everything resets to idle: not busy, nothing coupled or
  enabled, all prescalers at factor 1.

## Simulating

Each module has a self-checking testbench in `tb/` named `tb_<module>`,
which prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -Irtl -y rtl +libext+.sv rtl/ts_pkg.sv \
    tb/tb_trigger_supervisor.sv --top-module tb_trigger_supervisor -o sim
./obj_dir/sim
```

`tb_trigger_supervisor` runs the full-size crate (16 × 8, all defaults)
through about 50 events with random triggers, vetoes and global vetoes.
Partitions 0–3 are coupled and partition 8 is uncoupled. An independent
model predicts every gate, interrupt, fast clear, Busy bit and counter.
The testbench also counts each mechanism and fails if one never occurs:
coupled events (including partitions gated by another's trigger),
uncoupled events, prescale rejections, busy blocking, veto fast clears,
veto survivors, global vetoes, interrupts, dropped too-close triggers and
the Pulse-register test. A final phase keeps the uncoupled partition busy
while a coupled event is taken, which shows that the two dead times are
independent. It runs in well under a second.

`tb_prescale_million` programs one component for a factor of 10^6, the
setting meant for a rare beam trigger. It then sends two million triggers
through it and checks that exactly the millionth and the two-millionth
are accepted.

## How far to trust it

Every block is checked against hand-worked expectations, and every
testbench has been shown to catch a deliberately broken copy of its
module. Beyond that, the timing relations and register behaviour are only
as exact as the choices listed above. Anything that relied on the
asynchronous behaviour of the original logic, such as glitch immunity on
the wired-OR lines or pulse widths shorter than a clock, has no counterpart
here.
