# Distributed FIFO on a global SoC wire

A long global wire between two components of a system on chip takes longer to
cross than a clock period. A plain repeater chain cannot hold data. So the
sender has to slow down to the wire's speed, and both ends need a common clock.
This design turns the wire into a FIFO. The wire is cut into segments. At the end
of each segment sits a column of *buffer cells*: repeaters that can also hold a
value. One small *control cell* gates each column. A word moves forward one
column whenever the column ahead is empty. As a result:

* the sender can write at its own rate while the receiver is busy, until every
  column is full;
* the sender sees a single status bit, `buffer_state`, which says whether it
  may write again;
* nothing switches while neither side issues a pulse, and the words on the
  wire simply stay put.

The scheme comes from the published distributed-FIFO proposal for SoC
inter-component communication. That proposal builds its control cell as a
trimmed GasP circuit (GasP is a family of self-timed FIFO control circuits). The
original is a transistor-level, self-timed circuit. This repository gives a
synthesizable **cycle-level model** of it in SystemVerilog. Every internal node of
the control cell is a flip-flop, and one clock cycle stands for one unit of
internal delay. The section on departures below lists what that changes.

```
sender wp-clk --write--> [cell 1] --copy--> [cell 2] --copy--> ... [cell n] <--read_n-- receiver wp-clk
buffer_state <--node A-- [cell 1] <--empty-- [cell 2] <--empty-- ... [cell n]
                            |enable           |enable               |enable
                            v                 v                     v
[sender output latch] --> [column 1] -----> [column 2] --> ... --> [column n] --> [receiver input latch]
                          (32 buffer cells per column, all gated by the same enable)
```

## The control cell (`fifo_control_cell`)

The control cell is the heart of the design. It has three state nodes, named
after the nodes of the transistor circuit:

| node | meaning when 1 | set to 1 by | cleared to 0 by |
|------|----------------|-------------|-----------------|
| A | no word is waiting in the previous latch | the cell's own firing (the transistor P1, while node B is low) | a `write` pulse (N1): the previous latch now holds a word |
| C | the next stage is ready to take a word | an active-low `read_n` pulse (P3) | the cell's own firing (N4): the word it copies fills this stage |
| Ā | a word is waiting (A inverted by the keeper inverter, one cycle later) | A falling | A rising |
| B | idle, precharged | self-reset (P2) one cycle after firing | the NAND pull-down (N2 and N3): Ā = 1 **and** C = 1 |

`enable` is the inverse of B. The cell therefore *fires* when a word is waiting
behind it and the stage ahead is free. Firing produces one enable pulse, one
cycle wide, which copies the previous latch into this stage's column. The
self-reset then re-arms the cell: A goes back to "nothing waiting" and C to
"stage occupied". The master reset sets all three nodes to 1, which means every
stage is empty and nothing is in flight.

Cycle by cycle: a `write` taken at edge *t* lowers A. Ā rises at *t*+1. If C
is 1, B falls at *t*+2, so `enable` is high during the cycle after that edge. A
`read_n` pulse taken at edge *t* while a word is already waiting raises C, and B
falls at *t*+1. The read path is one step shorter because C drives its
pull-down transistor directly, while A goes through the keeper inverter first.
The original circuit shows the same asymmetry. After a transfer, C drops one
cycle before Ā. That order keeps the cell from firing twice on one word. A
write that arrives while A is still 0 would overwrite a word. An assertion flags
it, because the protocol forbids it.

## How the cells talk to each other

Neighbouring cells share the same events, seen from both sides:

* The `enable` of cell *k* is the `write` (copy) input of cell *k*+1. The word
  that cell *k* just latched now waits for cell *k*+1.
* The inverted `enable` of cell *k*+1 is the active-low `read_n` (empty) input
  of cell *k*. Once cell *k*+1 has copied the word, column *k* is free again.
* The sender's wave-pipelined clock pulse is the `write` of the first cell. The
  same pulse loads the sender output latch.
* The receiver's wave-pipelined clock pulse is the `read_n` of the last cell.
  If the last column holds a word, the same pulse copies it into the receiver
  input latch.

"Stage *k* is full" is therefore recorded twice: as node C = 0 in cell *k* and
as node A = 0 in cell *k*+1. Both nodes are set by the same pulse and cleared by
the same pulse. The top brings out node C of every cell, inverted, as
`stage_full`. The first cell's node A becomes `buffer_state`, the "first entry
empty" signal that the sender watches.

The FIFO holds `STAGES` words in the columns. One more word can wait in the
sender output latch, at which point `buffer_state` stays 0 and the sender is
stalled.

## The data line (`buffer_cell`)

In the circuit, each bit of a column is a two-inverter repeater with two pass
gates. One sits on the input and conducts while `enable` is 1. The other sits
in the feedback loop and conducts while `enable` is 0. Together they make the
repeater transparent during the enable pulse and a storage loop otherwise. The
model turns this into a `WIDTH`-bit register that loads when `enable` is 1. One
enable drives all 32 bits of a column, as in the original, where one control
stage is sized to gate a 32-line bus.

## The two ends

* `sender_output_latch` holds the sender's word. It is loaded by `snd_wp_clk`.
  An assertion checks that the sender pulses only while `buffer_state` is 1.
* `receiver_input_latch` captures the last column on a `rcv_wp_clk_n` pulse,
  but only if that column is full (`rcv_valid`), and strobes `rcv_taken`.
  A pulse on an empty FIFO just tells the last cell that the receiver is ready.
  After reset, the last cell already counts the receiver as ready.

## Timing of the model

All numbers are clock cycles of the model:

| event | cycles |
|-------|--------|
| write pulse to enable of the same cell, next stage ready | 3 |
| read pulse to enable, word already waiting | 2 |
| write pulse to word at `data_out` / `rcv_valid`, empty FIFO | 3·`STAGES` + 1 |
| spacing of words in a sustained stream, `STAGES` ≥ 2 | 5 |
| spacing of enable pulses in a burst through a single stage | 4 |
| width of every enable pulse | 1 |

In the transistor circuit the same steps are analog delays. The published
simulation, in a 0.25 µm process, reports 390.6 ps from write to enable and
190.6 ps from read to enable. It reports 599.1 ps per succeeding transfer, for
an enable rate of up to 1.67 GHz, limited by the load on node B. The model does
not try to reproduce these numbers.

## Where the model departs from the circuit, and what is this design's own

* **Clocked, not self-timed.** The circuit has no global clock: each cell times
  itself, and the two components may run in different clock domains. Here every
  node moves on the edge of one clock `clk`, and the sender and receiver pulses
  are single-cycle strobes of that clock. The handshake order is the circuit's,
  but the exact delays and the crossing between clock domains are not modelled.
* **Step counts instead of delays.** Write to enable takes 3 steps and read to
  enable 2 steps. In the circuit the ratio of the two delays is about 2:1, not 3:2.
* **Registers instead of transparent latches.** A column captures at the clock
  edge that ends its one-cycle enable pulse.
* **Protocol errors are assertions.** A write while a word is still waiting is
  not defined by the original. Here it is an assertion failure.
* **Own choices:** the default depth `STAGES = 8` (the original gives no count,
  only a stage spacing of 3 mm of wire in its experiment); the reset values of
  the data registers; the active-high `write` and active-low `read` pulses as
  one-cycle strobes; `buffer_state` as a level, node A of the first cell; the
  `rcv_valid` flag, which tells the receiver there is a word (the original does
  not say how the receiver learns this); the `rcv_taken`, `stage_enable` and
  `stage_full` observation outputs.
* **Not modelled:** the wave-pipelined clock generators of the two components,
  and the wire segments themselves with their RC/RLC delay.

## Files and parameters

| file | contents |
|------|----------|
| `rtl/dfifo_pkg.sv` | `DATA_WIDTH = 32`, `NUM_STAGES = 8` |
| `rtl/fifo_control_cell.sv` | the control cell |
| `rtl/buffer_cell.sv` | one column of buffer cells, parameter `WIDTH` |
| `rtl/sender_output_latch.sv`, `rtl/receiver_input_latch.sv` | the two end latches |
| `rtl/distributed_fifo.sv` | top: parameters `WIDTH` (32) and `STAGES` (8) |

Top ports: `clk`, `rst_n` (asynchronous, active low); sender side `snd_wp_clk`,
`snd_data`, `buffer_state`; receiver side `rcv_wp_clk_n`, `rcv_valid`,
`data_out` (the last column), `rcv_data`, `rcv_taken`; observation
`stage_enable`, `stage_full`.

To use it: pulse `snd_wp_clk` for one cycle only while `buffer_state` is 1.
Pulse `rcv_wp_clk_n` low for one cycle to take the word shown while `rcv_valid`
is 1.

## Testbenches

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_fifo_control_cell`: reset values; a transfer into a free stage; a write
  blocked by a full stage and released by a read; a read alone; and a random
  phase that checks pulse width, preconditions and that every write is
  transferred exactly once.
* `tb_buffer_cell`, `tb_sender_output_latch`, `tb_receiver_input_latch`:
  random stimulus compared against a reference.
* `tb_distributed_fifo`: the whole FIFO at its default size (32 bits,
  8 stages). It checks the latency through the empty FIFO and fills the FIFO
  with the receiver stalled (exactly `STAGES` + 1 words accepted, sender
  stalled, data held). It then runs a full-speed burst (one word every 5 cycles)
  and 20 000 cycles of random traffic, including ready pulses into an empty
  FIFO. A scoreboard checks order and contents, and each of these mechanisms
  must occur at least once.
* `tb_burst_transfer`: one stage. The receiver is ready before any data exists.
  A first word crosses, and a long idle period follows during which the line
  must keep its value. Then comes a back-to-back 0, 1, 0 burst with enable
  pulses every 3 cycles.

* `tb_rate_decoupling`: the default FIFO, with sender and receiver pulsing on
  their own, unrelated periods (5 against 17, 13 against 5, 7 against 11 cycles
  of the model clock). Every word must arrive in order, and the delivered rate
  must be that of the slower side.

Running one with Verilator, from the repository root:

```
verilator --binary --timing --assert rtl/dfifo_pkg.sv -y rtl \
    tb/tb_distributed_fifo.sv --top-module tb_distributed_fifo
./obj_dir/Vtb_distributed_fifo
```

Lint warnings that remain (Verilator `-Wall`):

* `SYNCASYNCNET`: `rst_n` is both the asynchronous reset of the flip-flops and
  the `disable iff` condition of the assertions.
* `UNUSEDSIGNAL`: node A of the inner cells duplicates `stage_full` and is
  left unread.
* `UNUSEDPARAM`: a package constant that a given module does not use.
