# Queue-balancing output-queued switch

A packet switch for FPGAs with `P` input and `P` output ports that accepts one
fixed-size packet per input and delivers one per output every clock cycle. It is
built as an **output-queued switch**. Every input owns one small FIFO per output
port, so there are `P x P` FIFOs, and each output drains its own `P` FIFOs
through a `P`-to-1 multiplexer. The outputs never compete for a shared crossbar.
Each output's scheduler can therefore decide on its own, in a single cycle, and
no internal speed-up is needed.

The weakness of this organisation is **queue fragmentation**. A burst from one
source to one destination fills a single FIFO while the `P-1` other FIFOs for
that destination stay empty. When that FIFO is full, packets are dropped even
though the port as a whole has plenty of free space. The switch fixes this with
two additions:

1. An **input rotator**. A barrel shifter, driven by a free-running cycle
   counter, rotates all input lanes by a different amount every cycle. A burst
   from one source is then dealt round-robin over all `P` FIFOs of its
   destination.
2. A **valid-bit queue per output**. It records in which cycle each packet
   arrived, so the output can still deliver the packets of each
   source/destination flow in sending order, even though the flow now sits in
   several FIFOs.

The default configuration is 16x16 ports, 256-bit packets and FIFOs of depth 8.

## Datapath

```
 in[0..P-1] --> barrel rotator --> demux --> P x P FIFOs --> per-output arbiter --> out[0..P-1]
                 (log2 P stages)   (per lane)  (group i, port d)  + P:1 mux + register
                      ^                              |
                cycle counter              push strobes, grouped per output
                                                     v
                                       P valid-bit queues (P bits wide)
```

| module | role |
|---|---|
| `qbs_switch` | top level: wires everything below together |
| `cycle_counter` | modulo-`P` counter; its value is the rotation amount |
| `barrel_rotator` | `log2 P` registered stages; stage `k` moves lanes by `2^k` when bit `k` of the amount is set |
| `input_demux` | one per rotated lane: decodes the destination into the push strobe of one FIFO of its group, or flags a drop |
| `output_queue` | FIFO with a combinational head read, the shape that maps to LUT RAM; also used inside the valid-bit queue |
| `valid_bit_queue` | one per output: FIFO of `P`-bit arrival vectors, `P x FIFO_DEPTH` deep |
| `output_arbiter` | one per output: scheduler, `P`:1 AND-OR multiplexer and output register |
| `qbs_pkg` | default sizes and the `idx_w()` index-width helper |

A packet that enters on input `s` in a cycle where the counter reads `r` leaves
the rotator on lane `g = (s + r) mod P`. Lane `g` is *queue group* `g`: it owns
FIFO `(g, d)` for every output `d`. The destination travels through the
rotator next to the payload, and the group's demultiplexer writes the packet
into FIFO `(g, dest)`.

## Keeping packet order: valid-bit queues

Rotation breaks ordering. Take consecutive packets of source 3 to output 5.
They land in FIFOs `(3+r,5)`, `(3+r+1,5)`, and so on. An arbiter that simply
round-robins over the FIFOs of output 5 could send them in any order. The switch
therefore records arrival time per output instead of per FIFO:

* In every cycle, the push strobes that go to the FIFOs of output `d` form a
  `P`-bit vector, with bit `g` meaning "group `g` stored a packet for `d` now".
  If the vector is non-zero, it is written as one entry into the valid-bit
  queue of `d`. Cycles with nothing for `d` write nothing, so idle cycles use
  no queue space and every entry has at least one bit set.
* The arbiter of `d` works only on the head entry. Each cycle it grants the
  lowest group whose bit is set and has not yet been served. It pops that
  group's FIFO and registers the packet on the output. A `served` mask holds
  the groups already taken from the head entry.
* In the cycle that serves the last marked group, the arbiter also pops the
  entry and clears `served`. The next entry is then served in the very next
  cycle. While work is pending, the output sends one packet per cycle with no
  bubbles.

All packets of one entry arrived in the same cycle, so they come from
different sources. Their relative order is irrelevant, and lowest-group-first
is only a simple choice. Across entries, service follows arrival order, so
every source/destination flow leaves in the order it was sent.

**Why the valid-bit queue never overflows.** It has `P x FIFO_DEPTH`
entries. Each entry accounts for at least one packet still held in one of
the `P` FIFOs of that output, and those FIFOs hold at most `P x FIFO_DEPTH`
packets. An assertion in `valid_bit_queue` checks this.

## Timing

Let a packet be presented on an input in cycle `c` to an otherwise idle
switch. Then:

| cycle | what happens |
|---|---|
| `c` ... `c+S-1` | rotator stages, `S = log2(P)` |
| `c+S` | demultiplex; write into the FIFO and the valid-bit queue |
| `c+S+1` | arbiter sees the head, grants, multiplexes; output register loads |
| `c+S+2` | packet valid on `out_valid`/`out_data` |

The port-to-port latency is **`log2(P) + 2` cycles**: 6 at 16x16 and 5 at 8x8.
Without the rotator it would be 2. The switch-level testbenches check this number.
Throughput is one packet per input and one per output per cycle.

The rotation amount is sampled together with the packets and travels down the
pipeline with them. All packets of one cycle are therefore rotated by the same
amount, and a source visits all `P` groups in `P` consecutive cycles.

## Overflow and packet loss

The switch is lossy by design and has no back-pressure. If the FIFO chosen
for a packet is full, the packet is discarded, and `drop[g]` pulses in the
enqueue cycle (`g` is the queue group, not the input port). A full FIFO counts
as full even if it is being popped in the same cycle. This is a conservative
choice, and it keeps the full test off the arbiter's timing path. Outputs have
no ready input: a packet is sent whenever `out_valid` is high.

The rotator's effect on loss can be seen in `tb_qbs_packet_loss`. It uses 16
ports, bursty traffic with a mean burst of 32 packets, 80 % average load and
25 000 cycles. With this testbench's traffic generator, single-register FIFOs
(depth 1) lose about 27 % of the packets. FIFOs of depth 7 lose 8 to 9 %, and
FIFOs of depth 32 lose 0.3 to 0.5 %, depending on the random seed. The design
description quotes 26.1 %, 11.7 % and 1.3 % for these points, from its own
traffic simulator. The generators differ in detail, so the numbers only agree in
trend and magnitude.

Under heavy load the queueing delay dominates. `tb_qbs_latency` runs the 16-port
switch at 100 % bursty load (mean burst 32) for 25 000 cycles. Its FIFOs have
1024 entries, so that nothing is dropped and the queues behave as if they were
unbounded. Packets then spend about 600 cycles in the switch on average,
including the 6-cycle pipeline. The published figure for output-queued
switches under this traffic is 633 cycles, and rotation does not change the
average latency when queues are unbounded.

## Parameters and ports of `qbs_switch`

| parameter | default | meaning |
|---|---|---|
| `NUM_IN` | 16 | input ports = queue groups; must be a power of two, at least 2 |
| `NUM_OUT` | 16 | output ports, at least 2 |
| `DATA_W` | 256 | packet payload width |
| `FIFO_DEPTH` | 8 | entries per FIFO; need not be a power of two |

| port | direction | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active-high reset |
| `in_valid[NUM_IN]` | in | 1 | packet offered on the input |
| `in_dest[NUM_IN]` | in | `log2 NUM_OUT` | destination port |
| `in_data[NUM_IN]` | in | `DATA_W` | payload |
| `out_valid[NUM_OUT]` | out | 1 | packet on the output (registered) |
| `out_data[NUM_OUT]` | out | `DATA_W` | payload |
| `drop` | out | `NUM_IN` | bit `g`: a packet for queue group `g` was discarded |

At the defaults the switch stores 16 x 16 x 8 x 256 bits of packets. It also
has 16 valid-bit queues of 128 x 16 bits. Together that is 557 056 memory bits,
written as arrays with combinational reads.

## What follows the original design and what is this implementation's own

Taken from the published design:

* The output-queued organisation with `P x P` FIFOs.
* The rotator in front of the queues: a pipelined barrel shifter with
  `log2 P` stages, driven by a cycle counter.
* The per-output valid-bit queues, `P` bits wide and `P x FIFO_DEPTH` deep,
  written only in cycles that store a packet for their port.
* The arbiter that holds the head entry until all of its packets have left.
* The sizes: 16 ports, 256-bit packets and depth-8 LUT-RAM FIFOs. The 8x8
  build is the other size evaluated.
* The resulting `log2 P + 2` cycle latency.

Choices made here, where the description is silent:

* The port format, with the destination as a separate field.
* A synchronous active-high reset. It resets pointers, counters and valid
  bits but not the FIFO arrays.
* Dropping on a full FIFO, with no back-pressure and no output ready.
* The rotation direction, `(s + r) mod P`.
* Carrying the rotation amount down the rotator pipeline with the packets.
* Lowest-group-first service inside one arrival vector.
* The `drop` output.

Not built: the switches the design is compared against. These are an
input-queued switch with virtual output queues and DRRM scheduling, a plain
output-queued switch without rotator, and a fully pipelined output-queued
crossbar. None of them is part of this design.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog.

* `tb_cycle_counter`, `tb_barrel_rotator`, `tb_input_demux`, `tb_output_queue`,
  `tb_valid_bit_queue`, `tb_output_arbiter`: unit tests against software
  models with random stimulus. They include the rotator latency, simultaneous
  push and pop, all-zero arrival vectors, and back-to-back entries at the
  arbiter.
* `qbs_switch_checker`: a traffic generator, cycle-accurate reference model
  and scoreboard, shared by the switch-level tests.
  * Every cycle it compares all outputs and drop flags with the model.
  * Independently of the model, it checks the destination, per-flow order and
    packet integrity, and that sent = delivered + dropped.
  * It measures the latency of a lone packet.
  * It fails the run unless rotation spread a source over several groups, a
    drop happened, an arrival vector held several packets, and an output was
    busy on consecutive cycles.
* `tb_qbs_switch`: 4x4, 32-bit packets, depth 2.
* `tb_qbs_switch_8x8`: 8x8, 256 bits, depth 8.
* `tb_qbs_switch_full`: the default 16x16 switch, with no parameter overrides.
* `tb_qbs_packet_loss`: the three 16-port loss points above.
* `tb_qbs_latency`: the 16-port average-latency run above.

To simulate with Verilator 5, for example the full-size test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/qbs_pkg.sv tb/tb_qbs_switch_full.sv --top-module tb_qbs_switch_full -o sim
./obj_dir/sim
```

Lint a module with `verilator --lint-only -Wall -Irtl -y rtl rtl/qbs_pkg.sv rtl/<module>.sv`.
Building the full-size test takes under a minute, and the simulation takes
well under a second.
