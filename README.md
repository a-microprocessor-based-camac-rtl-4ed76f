# 32-channel isolated digital output module for CAMAC

This is a CAMAC module with 32 independently controlled outputs. Each output
can be held on or off (DC), or pulsed on or off for a programmable time.
An output's pulse can also be chained to another channel's pulse. A host
loads a whole sequence of output actions at full dataway speed and starts it
later with a single command. The module then runs the sequence by itself.

The original module used a small microcontroller behind a command FIFO. This
RTL keeps that split: command decoding and a 16-word FIFO sit on the fast
dataway side, and a slower command executor sits behind them. The executor's
work (running the commands, per-channel pulse timers, pulse transfer) is
written here as synchronous logic rather than as firmware. The opto-isolated
output switches and the connector supply sensing are analog, so they are not
part of the RTL. Their digital signals are ports of the top module.

## Block structure

```
 dataway ──► camac_decoder ──► cmd_fifo (16 words) ──► output_sequencer ──► output_latches ──► out[31:0]
   ▲            │  X, Q                                 │  32 × pulse_channel        │
   │            │  rsel                                 ▲                            │
   └─ r[19:0] ◄─ read_gates ◄───────────────────────────┼────────────────────────────┘
                                        tu_timebase ────┘ (TU tick)
```

| module | role |
|---|---|
| `idom_top` | wires everything together |
| `camac_decoder` | decodes N, F, A and the strobes; answers X and Q; queues commands; raises the module clear |
| `cmd_fifo` | 16-word first-word-fall-through queue; `present` means "command waiting", `full` forces Q=0 |
| `output_sequencer` | takes one command at a time, fans it out to 32 `pulse_channel`s, routes transfer triggers |
| `pulse_channel` | one channel's pulse counter, one-shot width preset and one-shot transfer entry |
| `tu_timebase` | one-clock tick per time unit (TU) |
| `output_latches` | the 32 output bits |
| `read_gates` | drives R1–R20 from the latches and status |
| `idom_pkg` | function codes, the queued command word `cmd_t`, field positions in W |

## Command set

W1 is `w[0]` and R1 is `r[0]`. Group 0 is channels 0–15 and group 1 is
channels 16–31. The sub-address A picks the group (A=0 or A=1).

| F | A | action | path | Q = 1 when |
|---|---|---|---|---|
| 0 | 0,1 | read a group: R1–R16 outputs, R17–R20 status | immediate | both supplies good |
| 1 | 0 | read status on R1–R4 | immediate | always |
| 9 | 0 | all outputs off, FIFO emptied, executor reset | immediate at S1 | always |
| 10 | 0,1 | whole group off | queued | FIFO not full |
| 16 | 0,1 | group ← W1–W16 | queued | FIFO not full and both supplies good |
| 17 | 0 | channel W1–W5: W7 polarity (1 = pulse on), W8 = 1 store for later / 0 pulse now, W9–W16 width in TU | queued | same |
| 17 | 1 | channel W1–W5: W8 = 1 trigger at pulse start / 0 at pulse end; W9–W13 channel to trigger | queued | same |
| 18 | 0,1 | selective set (1 = on, 0 = unchanged) | queued | same |
| 19 | 0,1 | selective pulse on | queued | same |
| 21 | 0,1 | selective clear (1 = off, 0 = unchanged) | queued | same |
| 23 | 0,1 | selective pulse off | queued | same |
| 27 | 0 | test status, Q only | immediate | FIFO not full and both supplies good |
| Z with S2 | — | same as F9 (N not needed) | immediate | — |

Every other F/A pair gives X=Q=0. C and I do nothing. The status bits are
R17 (or R1 for F1): J1 supply below +12 V; R18 (R2): J2 supply below +12 V;
R19 (R3): FIFO full; R20 (R4): commands waiting.

A queued command is stored only if its Q is 1. With Q=0 the command is
dropped, so the host can retry it without it running twice.

## Pulses

A pulse has a polarity and a width. A pulse "on" drives the output to 1 when
it starts and to 0 when it ends, whatever the output was before. A pulse
"off" is the mirror image. So pulsing "on" an output that is already on
changes nothing at first and switches it off one width later. This gives a
delayed turn-off; a pulse "off" on an output that is off gives a delayed
turn-on.

**Width.** Each channel has an 8-bit counter in TU. `tu_timebase` gives one
tick every `TU_CYCLES` clocks (25 ms by default). On every tick each running
counter steps down, and the pulse ends when its counter reaches zero. All
channels share the same tick. A pulse started between two ticks with width w
therefore ends on the w-th tick after it started, and lasts more than
(w-1)·TU and at most w·TU. The widths run from 1 to 255 TU (25 ms to
6.375 s). A width of 0 is taken as the default.

**Which width and polarity a pulse uses:**

| started by | polarity | width |
|---|---|---|
| F17 A0 with W8=0 | W7 | W9–W16 |
| F19 / F23 | on / off | stored preset if any, else `DEFAULT_WIDTH` (10 TU = 250 ms) |
| transfer trigger | stored preset's polarity, else on | stored preset's width, else default |

A preset stored by F17 A0 with W8=1 is used by the next pulse of that channel
only. After that, the channel goes back to the default.

**Pulse transfer.** F17 A1 gives a channel one transfer entry: "when your next
pulse starts (or ends), trigger channel T". The entry fires once and is then
cleared. The triggered channel starts a pulse with its own preset (or the
default). That pulse may have a transfer entry of its own, so sequences can
be chained. The test sequence is 18 → 3 → 7 → 24 → 23:

- 18 pulses on, and its end starts 3 (a pulse off).
- The start of 3 starts 7 (a pulse off).
- The end of 7 starts 24 (a pulse on).
- The start of 24 starts 23.

The whole chain is armed with deferred presets and transfer entries. One F19
on channel 18 then starts it.

Triggers pass through a register in `output_sequencer`. Each link of a chain
therefore follows the edge that caused it by exactly one clock. This also
means a loop of transfer entries (for example A triggers B and B triggers A)
cannot form a combinational loop. Such a loop simply keeps running until the
entries are used up. When several channels trigger the same target in one
clock, the triggers merge into one.

**Interactions on one channel** within one clock, highest priority first:
clear (F9/Z), DC write (F16/F18/F21/F10, which also cancels a running pulse),
pulse start (command or trigger; restarts a running pulse), end of pulse.

## Command timing

- **Strobes.** The decoder acts on the rising edges of S1 (writes, F9) and
  S2 (Z). A strobe may last any number of clocks, but it must last at least
  one clock. All dataway inputs are assumed to be synchronous to `clk`.
- **X, Q and R.** These are combinational from N/F/A and the current status,
  and the dataway samples them at S1. After a write is accepted, the "full"
  flag, and with it Q, may change for the rest of that cycle.
- **Executor.** When a command reaches the FIFO output, `output_sequencer`
  waits `EXEC_CYCLES` clocks and then applies the whole command in one clock.
  In that same clock it pops the word. This stands in for the
  microcontroller's interrupt and service time, which is what makes the FIFO
  necessary. With the defaults (600 clocks at 12 MHz, about 50 µs), a burst
  of 16 commands is always accepted, and later commands get Q=0 until there
  is room again.
- **Latches.** Outputs change one clock after the executor (or a pulse
  counter) decides. A read returns the latches as they are at that moment,
  so queued commands are not yet visible in it.

## Parameters (`idom_top`)

| parameter | default | meaning |
|---|---|---|
| `TU_CYCLES` | 300000 | clocks per time unit: 25 ms at an assumed 12 MHz clock |
| `DEFAULT_WIDTH` | 10 | default pulse width in TU (250 ms) |
| `FIFO_DEPTH` | 16 | command FIFO depth |
| `EXEC_CYCLES` | 600 | executor time per command, in clocks |

The channel count (32, two groups of 16) is fixed by the command format:
5-bit channel numbers and 16-bit group words.

## How far it follows the original, and where it departs

Taken from the original module:

- the command set, the X/Q rules and the R bit layout;
- the 16-word FIFO with Q=0 on overflow;
- the TU time base and the 25 ms / 250 ms / 1–255 numbers;
- the one-shot width preset and the transfer semantics;
- F9 and Z·S2 clearing everything.

This design's own choices:

- **Executor in logic.** The microcontroller and its firmware are replaced by
  logic with the described behaviour. The firmware itself was never
  available. The logic is faster and more regular than firmware: each
  command is applied in one clock, and all 32 counters step on the same
  clock as the tick.
- **Clock and service time.** The 12 MHz clock and `EXEC_CYCLES`.
- **Queued F10.** F10 (group clear) goes through the FIFO. The command list
  says it answers Q according to FIFO room, even though elsewhere "clear"
  commands are described as immediate.
- **Polarity of F19/F23 on a preset channel.** These take their polarity
  from the command, and only the width from the preset.
- **DC writes cancel pulses.** A DC write cancels a pulse that is running on
  that channel.
- **No store on Q=0.** A queued command answered with Q=0, including for a
  low connector supply, is not stored.
- **One-clock transfer delay.** A transfer trigger takes one clock. In the
  original the hand-over happens in firmware; its latency is unknown.
- **FIFO word.** The FIFO word format: 3-bit opcode, group bit and W1–W16.

Not built:

- the opto-isolated switches (75 V, 100 mA, floating) and the two 16-channel
  connectors;
- the +12 V sensing on connector pin C9;
- the microcontroller itself;
- the on-line program loading that was only proposed for the module.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/idom_pkg.sv tb/tb_idom_top.sv --top-module tb_idom_top
obj_dir/Vtb_idom_top
```

- `tb_idom_top` drives the whole module through dataway cycles. It uses
  `TU_CYCLES=50` and `EXEC_CYCLES=40` so that a command burst overruns the
  FIFO. It covers every command and both clears, and it checks that each
  pulse's length in clocks lies in the expected window. It also checks the
  one-clock hand-overs of the transfer chain, and it counts each mechanism,
  failing if any of them never happened.
- `tb_idom_full` runs the module at its default parameters: a group write
  and read-back, a default 250 ms pulse (3 million clocks), and the
  five-channel transfer chain. It simulates about 6 million clocks.
- Block tests:
  - `tb_camac_decoder` walks all F/A codes under all FIFO and supply states.
  - `tb_cmd_fifo` compares the FIFO with a queue model.
  - `tb_pulse_channel` and `tb_output_sequencer` cover the pulse rules, the
    presets and the transfers.
  - `tb_tu_timebase`, `tb_output_latches` and `tb_read_gates` are small
    exhaustive or random checks.

The FIFO and the pulse counters carry assertions: no write to a full FIFO, no
read from an empty one, and no running pulse with a zero count. Run with
`--assert` to check them.
