# Global interconnect with memory: a distributed FIFO moved by local clocks

A wire that crosses a large chip is slower than the logic at either end of
it. Repeaters cut the RC delay of the wire into pieces, but a plain repeater
chain still carries one word at a time, needs the global clock at both ends,
and loses data if a stage turns out slower than planned. This design gives
the repeater sites memory. At each site a small latch holds a word, and a
self-timed control stage moves the word to the next site when that site is
free. The repeater chain becomes a FIFO spread along the wire. Its shift
pulses are local clocks made on demand, so no clock tree runs along the wire,
nothing toggles while no word is sent, and a receiver that stops just leaves
the words stored on the wire.

The RTL has two channels side by side:

* **Distributed FIFO channel** (`dfifo_channel`, the main design): GasP-style
  control stages (`gasp_ctrl`), their state wires (`gasp_state`) and data
  latches (`fifo_data_latch`). It is synthesizable, with a request generator
  (`dfifo_sender_if`) at the sending end.
* **Wave-pipelined repeater line** (`wp_repeater_channel`): the earlier,
  storage-free form of the idea. It is a behavioural timing model, not
  synthesizable logic.

`wp_interconnect_top` instantiates both.

## The distributed FIFO: state wires and the firing rule

With `NSTAGES` control stages there are `NSTAGES+1` state wires, `S0` to
`S[N]`. Wire `S[i]` lies between stage `i-1` and stage `i`, and one bit of
storage (a keeper) holds its level:

| level | meaning | who sets it |
|---|---|---|
| low (`WIRE_FULL`) | a word waits in front of stage `i` | stage `i-1` when it fires; for `S0`, the sender's write request |
| high (`WIRE_EMPTY`) | the place is free | stage `i` when it fires; for `S[N]`, the receiver's read |

The low-means-full encoding is the transistor circuit's. There, the upstream
side pulls the node down through an NMOS device and the downstream side pulls
it up through a PMOS device.

**Firing rule.** Stage `i` fires when `S[i]` is full and `S[i+1]` is empty.
Its firing does three things at once:

1. loads its latch with the word in front of it (from `data_in` for stage 0,
   otherwise from latch `i-1`);
2. empties `S[i]`, which tells the upstream side that the word has been taken;
3. fills `S[i+1]`, which tells the downstream stage that a word is waiting.

Neighbouring stages share a wire and see it at opposite levels, so they can
never fire in the same cycle. An assertion in `dfifo_channel` checks this. A
word therefore moves forward one stage at a time. A wire has to go empty
before its upstream stage can fill it again.

**The control stage (`gasp_ctrl`).** The logic mirrors the control circuit:

* node B is a NAND of "A full" and "C empty" and is active low;
* its inverse is the local clock `enable`.

The original GasP circuit fed several inverters from the NAND output.
Because their loads differ, the NAND's self-reset timing became
load-dependent. The version modelled here gives the NAND a fan-out of one
and lets the following AND stage drive three loads: the latch, the pull-up
on A and the pull-down on C. In silicon the pulse ends by itself a few gate
delays after A goes high. In this RTL the pulse is exactly one `clk` cycle.

## Timing of the RTL

The self-timed handshake is modelled as one `clk` cycle per handshake.
Self-timed pulse loops cannot be written as synthesizable RTL. The
sending and receiving modules are assumed to share this clock, which is the
case the design was evaluated in. With that abstraction:

| behaviour | cycles |
|---|---|
| request (`write`) to stage 0 firing | 1 |
| stage `i` to stage `i+1` firing | 1 |
| request to `out_valid` for a single word | `NSTAGES + 1` (4 at the default) |
| burst throughput | one word every 2 cycles |
| capacity | `NSTAGES` words in the latches, plus one held at the sender |
| idle channel | no `enable` pulse at all |

If the receiver stops, the words stay in their latches and the wires stay
full until `in_busy` blocks the sender. When reads resume, the word at the
end leaves at once and the next one follows two cycles later. No cycles are
spent refilling or flushing a pipe.

The transistor-level implementation (180 nm, stages 2 mm apart) was
reported to run its handshake in about 285 ps with a 2.22 GHz transfer rate.
This RTL makes no claim about those numbers. The ratio of one word per two
handshakes is a property of the abstraction here. It is not a measured
property of the circuit.

## Ends of the channel

* **Sending end (`dfifo_sender_if`).** The sending module uses a
  valid/ready handshake. `tx_ready` is `!in_busy`, which is the level of
  `S0`. A request is `tx_valid && tx_ready`. The accepted word is held in a
  register on the channel input until stage 0 has taken it, because `S0`
  only says *that* a word waits. While `tx_valid` stays high, requests follow
  each other as soon as `S0` frees, so bursts need no extra control.
* **Receiving end.** `out_valid` (`rx_valid` at the top) is the level of
  `S[N]`, and `data_out` is the last latch. Raising `read` (`rx_ready`)
  while `out_valid` is high takes the word and empties `S[N]`.

These two status signals are what lets the two modules start and stop
independently. Each module decides from its own end of the channel whether
it may access it.

## The wave-pipelined repeater line (`wp_repeater_channel`)

This model has no storage between repeaters:

* a pass transistor on `clk1` places each word onto the input node;
* the word runs through `N_STAGES` inverter-pair repeaters;
* a pass transistor on `clk2` picks it off at the far end (`clk2` is the
  same clock, arriving later there).

All bits pass the same repeaters, so words keep their spacing. A new word can
enter before the previous one has arrived, and several "waves" share the wire.

In the model, the pass transistors are latches that are transparent while
their clock is high. Each repeater with its wire segment is a transport delay
of `STAGE_DELAY_PS`. The default of 228.5 ps is the delay of an inverter pair
driving 1 mm of metal-1 in 180 nm. With three stages the line delay is
685.5 ps, and the number of waves on the line is that delay divided by the
period, rounded up:

| clock period | waves on the line (model) | published circuit range |
|---|---|---|
| 229–342 ps | 3 | 250–350 ps |
| 343–685 ps | 2 | 420–800 ps |
| 686 ps and slower | 1 | 1070 ps and slower |

The line has one hard limit. A new wave must not enter until the previous
one has moved at least two inverter delays down the line, which is one
repeater stage (`MIN_SPACING_PS`, 228.5 ps by default). Closer launches make
one wave run into the one ahead.

* The model raises `overrun` on a `clk1` rising edge that comes too soon.
  The flag stays high until the next edge that is far enough apart.
* The modelled data is not corrupted when this happens. The flag only
  reports the violation.

The line has no memory of its own and cannot stall: this is why the FIFO
channel exists.

## How far to trust it, and where it departs

Taken from the circuit description:
* the state-wire protocol;
* the NAND/AND structure of a stage and its fan-out;
* one enable per 16-bit word;
* three stages;
* the latch's function;
* the wave-pipelined line's structure, its per-stage delay and the
  two-inverter-delay spacing rule.

Choices made in this RTL:
* **One cycle per handshake.** The self-timed circuit is replaced by a
  synchronous model. Throughput and latency are therefore counted in `clk`
  cycles, not picoseconds.
* **Flip-flops instead of latches.** Each data latch stores on the clock
  edge that ends its one-cycle enable pulse. The stored value is the same as
  the circuit's level-sensitive latch, and the synthesizable part has no
  latches.
* **Reset.** An asynchronous active-low reset empties all state wires. The
  data latches have no reset.
* **Sender interface.** The valid/ready handshake and the holding register
  at the sending end are this design's own.
* **Modelled only behaviourally or not at all.** The following have no RTL
  counterpart:
  * the 2 mm spacing, wire parasitics and any electrical timing;
  * pulse-width effects of the NAND's varying delay;
  * power;
  * operation at reduced supply voltage;
  * senders and receivers on different clocks. The status signals at both
    ends are the hooks for that, but no synchronizer is included.

The latches in `wp_repeater_channel` are intended: they are the dynamic
pass-transistor nodes of that circuit.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `dfifo_pkg` | `DATA_W` | 16 | bits per local clock |
| `dfifo_pkg` | `N_STAGES` | 3 | control stages along the channel |
| `dfifo_channel`, `wp_interconnect_top` | `WIDTH`, `NSTAGES` | `DATA_W`, `N_STAGES` | as above |
| `wp_repeater_channel` | `WIDTH` | 16 | parallel data lines |
| `wp_repeater_channel` | `N_STAGES` | 3 | repeater stages |
| `wp_repeater_channel` | `STAGE_DELAY_PS` | 228.5 | delay of one repeater with its wire |
| `wp_repeater_channel` | `MIN_SPACING_PS` | 228.5 | shortest legal spacing of launches (two inverter delays) |

`NSTAGES` can be raised freely. Latency grows by one cycle per stage and
capacity by one word per stage; throughput is unchanged.

## Files

`rtl/`:

| file | contents |
|---|---|
| `dfifo_pkg.sv` | shared constants and the `wire_state_t` encoding |
| `gasp_state.sv` | one state wire with its keeper |
| `gasp_ctrl.sv` | one control stage |
| `fifo_data_latch.sv` | stage data storage |
| `dfifo_channel.sv` | the chained channel |
| `dfifo_sender_if.sv` | request generator |
| `wp_repeater_channel.sv` | wave-pipelined line, behavioural |
| `wp_interconnect_top.sv` | top level |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
`tb_wp_interconnect_top` runs the whole top at its default size. It runs a
scoreboard over several thousand cycles of random traffic, plus directed
single-word, burst and stall/restart phases. It also counts that every
mechanism occurred: requests, bursts, a blocked sender, a full channel,
receiver stalls, restarts, idle cycles and every local clock.

## Simulating

All files use `timeunit 1ps`. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_wp_interconnect_top \
    rtl/dfifo_pkg.sv tb/tb_wp_interconnect_top.sv
./obj_dir/Vtb_wp_interconnect_top
```

Replace the top-module name to run any other testbench. `-Irtl` lets
Verilator find the modules by file name. The synthesizable part is
everything except `wp_repeater_channel`. For a synthesis run, take
`dfifo_channel` (with `dfifo_sender_if` if wanted) as the top.
