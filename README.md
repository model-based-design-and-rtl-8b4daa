# Dynamic transmit scheduler for an ARINC-664 end system

An ARINC-664 (AFDX) end system sends traffic over *virtual links* (VLs). Each
VL may send at most one frame per *Bandwidth Allocation Gap* (BAG), so it
behaves like a leaky bucket. When several VLs are allowed to send at once,
a scheduler decides which goes first, and that choice sets each VL's
*jitter*: how long a frame waits between the moment its VL may send and the
moment it is picked.

No single ordering is best for every traffic mix. This design therefore has
four schedulers in hardware. A processor can switch between them while
traffic runs. It watches the per-VL jitter measured by the logic and writes
a new choice into a shared block RAM:

| select | name | serves, among the eligible VLs, the one with the ... |
|---|---|---|
| 0 | SB — smallest BAG | smallest configured BAG |
| 1 | LQ — longest queue | most bytes queued |
| 2 | FIFO | earliest arrival time of its head-of-line frame |
| 3 | SS — smallest size | shortest head-of-line frame |

The logic runs at 125 MHz and sends one byte per clock, which is 1 Gbit/s.
It is written for 8 VLs (`NUM_VL`); larger counts are a parameter change.

## Block structure

```
 loaders ──► vl_memory ──────────────────────────────┐ bytes
  (per VL)   ├ frame_fifo  (bytes, 4 KB per VL)       │
             └ fwft_fifo   (head-of-line {arrival, length}, 64 frames)
                    │ hol, queue_bytes                ▼
            dynamic_server ─────────────────────► scheduler_server ──► tx_* byte stream
             ├ shaper          (BAG leaky bucket per VL)     ▲ trig / result
             ├ eligible_queues (sticky "may send" set)       │
             └ dynamic_scheduler_decider ────────────────────┘
                 └ 4 × scheduler_decider (masker + extremum_finder tree)
                    │ eligible, served
            jitter_calculator ──► bram_wrapper ──► tdp_bram ◄── port A: processor
                                     ▲ sch_select (read from 0x200)
```

`es_dynamic_scheduler_top` connects all of these. The processor and its bus
adapter are not part of the RTL. Port A of the block RAM is brought out as
plain top-level ports, and that is where they connect.

## Frame input and the VL memory

A loader starts a frame on VL *q* by pulsing `ld_len_push[q]` with the
payload length on `ld_len[q]`. In the same cycle it pushes the first byte
on `ld_data[q]`/`ld_data_push[q]`. The byte stream of a frame is a two-byte
big-endian length header followed by the payload, one byte per push.

`vl_memory` keeps two FIFOs per VL:

- **Frame FIFO** (`frame_fifo`, 8-bit, `FRAME_DEPTH` = 4096 bytes). It holds
  the header and payload bytes. Its fill count is the VL's queue size, which
  is the key LQ uses.
- **Head-of-line FIFO** (`fwft_fifo`, first-word-fall-through, 80-bit,
  `HOL_DEPTH` = 64). It holds one `{arrival[63:0], length[15:0]}` record per
  frame. The arrival time is a free-running 64-bit cycle counter sampled at
  the length push. Its head gives FIFO and SS their keys without any read
  latency. The record is popped when its frame is granted.

A push into a full FIFO is dropped and reported on `overflow[q]`. There is
no back-pressure to the loaders. Upstream logic must not offer more than
the FIFOs hold.

## Shaping and eligibility

`shaper` stores a 32-bit BAG per VL in clock cycles. The default is 6250,
which is 50 µs. The BAG is written through `bag_we/bag_idx/bag_val`. When a
VL is served, its gap counter is loaded with `BAG-1` and counts down. The
VL's `status` is high once a frame is waiting and the counter is zero, so
grants on one VL are never less than one BAG apart.

`eligible_queues` turns these pulses into a set. A VL joins when its status
is high and stays until it is served. In effect, the decider sees "this VL
has been allowed to send since cycle X and is still waiting".

## The decision: masker and extremum tree

This is the core of the design. Each of the four schedulers is a
`scheduler_decider`, and they differ only in the key width and in the
search direction:

| scheduler | key | width | search | non-eligible key set to |
|---|---|---|---|---|
| SB | BAG | 32 | minimum | all ones |
| LQ | queue bytes | 32 | maximum | 0 |
| FIFO | head-of-line arrival | 64 | minimum | all ones |
| SS | head-of-line length | 16 | minimum | all ones |

A decision is a short pipeline started by `trig`:

1. **Masker** (1 cycle). It registers every VL's key, replacing the key of
   each non-eligible VL with the sentinel. A non-eligible VL therefore
   cannot win unless nobody is eligible.
2. **Extremum tree** (`extremum_finder`, one registered level per stage).
   Groups of four are reduced by a Min4/Max4 stage, and the last pair by a
   Min2/Max2 stage. For 8 VLs that is Min4 → Min2 (2 levels). For 32 VLs it
   is Min4 → Min4 → Min2 (3 levels). On ties the lowest VL index wins.
3. **Result.** `done` rises `1 + levels` cycles after `trig`, which is 3
   cycles for 8 VLs. If the winning value equals the sentinel, no VL was
   eligible, so `found` is low and the server triggers again.

Every decider evaluates every decision. `dynamic_scheduler_decider`
registers `sel` when the trigger fires and forwards that decider's result.
A change of the select word therefore takes effect at the next decision,
never in the middle of one. The select encoding (SB=0, LQ=1, FIFO=2, SS=3)
is in `es_pkg`.

A sentinel cannot be told apart from a genuine key of the same value. SB
with a BAG of `0xFFFFFFFF`, LQ with an empty but eligible queue, and FIFO
with an arrival time of all ones would all read as "nothing eligible". An
eligible VL always has a frame waiting, so the LQ case does not occur. The
other two need a BAG of about 9 hours or a 64-bit cycle counter that has
wrapped.

## The server

`scheduler_server` is a small state machine:

```
S_TRIG ─► S_WAIT ─(done & found)─► S_GRANT ─► S_HDR_HI ─► S_HDR_LO ─► S_DATA ─(last byte)─┐
   ▲         │(done & !found: retrigger)                        │(length 0)               │
   └─────────┴──────────────────────────────────────────────────┴─────────────────────────┘
```

- **Grant.** `served[vl]` pulses for one cycle. That pulse restarts the VL's
  BAG, removes it from the eligible set, pops its head-of-line record and
  closes its jitter measurement.
- **Header.** The two length bytes are read from the frame FIFO and are not
  forwarded.
- **Data.** One payload byte per cycle appears on `tx_data`, with
  `tx_valid`, `tx_sof` on the first byte, `tx_eof` on the last, and `tx_vl`.
  If a byte has not been loaded yet, the server waits and raises `stall`.

When the server is idle, it triggers the decider every 4 cycles. A frame
pushed into an idle system becomes eligible 2 cycles after its length push.
It is granted 6 to 9 cycles after that push, depending on where the trigger
cycle falls. Its first payload byte leaves 3 cycles after the grant. Back to
back, a frame of *L* payload bytes occupies the output for about `L + 7`
cycles: trigger, a 3-cycle decision, grant, and two header cycles.

`dynamic_server` contains the shaper, the eligible set, the dynamic decider
and the server. An assertion checks that every grant is one-hot and goes to
an eligible VL.

## Jitter measurement and the processor link

`jitter_calculator` keeps one 32-bit counter per VL. It counts every cycle
the VL is eligible and saturates at its maximum. On the grant it presents
the count as `queue_jitter[q]` with a one-cycle `queue_enable[q]` pulse,
then clears. The jitter is therefore the waiting time, in cycles, between
becoming eligible and being chosen.

`bram_wrapper` is the logic side (port B) of `tdp_bram`, a 1024×32
true-dual-port RAM with byte enables, read-first, with a one-cycle read
latency on both ports. The address map uses byte addresses:

| address | content |
|---|---|
| `0x10 × (q+1)`, i.e. 0x10 … 0x80 | QueueJitter of queue q+1 |
| `0x90 + 0x10 × q`, i.e. 0x90 … 0x100 | QueueEnable of queue q+1 (1 = new value) |
| `0x200` | Scheduler Select (bits 1:0) |

For each reported jitter the wrapper writes the value, then writes 1 to the
matching enable word in the next cycle. Jitters that arrive while the port
is busy wait in a one-deep holding register per queue. If a second value
for the same queue arrives before the first is written, it replaces the
first and `jitter_dropped` pulses. Every `POLL_PERIOD` (16) cycles the
wrapper reads 0x200 and drives `sch_select` from the low two bits. Writes
have priority over the poll, and a due poll waits for a free cycle.

The processor is expected to do the following:
1. For each queue, read QueueEnable.
2. If it is set, read QueueJitter and write 0 back to QueueEnable.
3. Update its running statistics.
4. Write its choice of algorithm to 0x200.

One VL produces at most one jitter per BAG, so even a slow processor loop
keeps up.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_VL` | 8 | number of VLs, queues and deciders' inputs |
| `FRAME_DEPTH` | 4096 | bytes per VL frame FIFO (power of two) |
| `HOL_DEPTH` | 64 | frames per VL head-of-line FIFO |
| `DEFAULT_BAG` | 6250 | BAG after reset, in cycles (50 µs at 125 MHz) |
| `POLL_PERIOD` | 16 | cycles between reads of the Scheduler Select word |

Widths are in `es_pkg`: 64-bit time, 16-bit length, 32-bit queue size, BAG
and jitter.

## What follows the original design and what is this implementation's own

Taken from the original design:
- the block breakdown;
- the four algorithms and their key widths;
- the masker sentinels (all ones for minimum searches, 0 for LQ);
- the Min4/Min2 tree shape for 8 and 32 queues;
- retriggering when nothing is eligible;
- the 80-bit combined head-of-line record;
- the 64-bit arrival stamp taken at the start of loading;
- the jitter definition (eligible → decided);
- the shared block RAM with its address map;
- polling 0x200;
- the 125 MHz, one-byte-per-cycle data path.

Chosen here:
- The select encoding. The original names SS as 3, and the others follow
  the order SB, LQ, FIFO.
- The two-byte big-endian length header at the front of each frame.
- The pipeline register placement, which gives a 3-cycle decision for 8 VLs.
- The tie-break: lowest index wins.
- BAG counting: the next grant is no earlier than BAG cycles after the
  previous one.
- The FIFO depths, and dropping (with a flag) on overflow.
- The server's idle triggering every 4 cycles.
- The wrapper's write ordering, holding registers and poll period.
- Saturating jitter counters.
- Reset values: select = SB, BAG = 6250.

The original quotes a 4-cycle trigger overhead for its single-queue model.
This pipeline's idle-to-grant time is 6–9 cycles. That adds a constant
offset to the first frame's latency and does not affect ordering.

Not in the RTL:
- The processor, its AXI block-RAM controller and the statistics it keeps
  (running mean, standard deviation, maximum, frame count). These are
  software on the processor.
- The traffic loaders and the statistics module of the original simulation
  model. These exist only in simulation.

The end-to-end testbench contains behavioural models of the loaders and of
the processor's polling loop.

## Verification

Each block has a self-checking testbench in `tb/`. It compares against an
independent model and prints `TB_RESULT checks=N failures=M`:

- **FIFOs and memory.** Random push/pop against queue models, including
  overflow, count and timestamp checks.
- **Shaper and eligible set.** Exact grant spacing and set/clear behaviour
  for random BAGs.
- **Extremum finder and deciders.** Reference minimum/maximum with
  lowest-index ties, at 8 and 32 inputs. The deciders also check the masker
  sentinels, the `found` flag, the 3-cycle latency, and that `sel` is
  sampled at the trigger.
- **Server.** Grant/header/data timing, stalls, retriggers and zero-length
  frames.
- **Dynamic server.** Every grant matches the reference choice of the
  selected algorithm. Also checked: BAG spacing, frame integrity, and the
  9–12 cycle idle start (first payload byte).
  `tb_dynamic_server_32vl` repeats this with 32 VLs. There the tree has
  three levels, a decision takes 4 cycles and the idle start is 10–14
  cycles.
- **Jitter calculator, block RAM, wrapper.** Exact jitter values, the RAM's
  byte enables with both ports active in the same cycle, the address map, the poll period and
  the drop flag.

`tb_es_dynamic_scheduler_top` runs the whole design at its default
parameters. It simulates about 31 ms of 125 MHz time in a few seconds. Its
traffic comes in three phases:

1. **Mixed traffic, algorithm rotation (10 ms).** Eight VLs with frames of
   1400 down to 100 bytes, BAGs of 50 to 400 µs, and Poisson arrivals of
   220 down to 1 Mbit/s. The processor model rotates the algorithm through
   SB, LQ, FIFO and SS every 2.5 ms.
2. **Cold start (about 2.5 ms after the switch).** The queues drain first.
   Then every VL receives a frame in the same cycle. The processor model
   runs SB and switches to SS once queue 5's maximum jitter exceeds 2000
   cycles. Under SB, queue 5 waits behind four longer frames and reaches
   about 4400 cycles.
3. **Equal-rate traffic (5 ms SB, then 5 ms SS).** Frames of 160 to 1280
   bytes, 25 Mbit/s per VL, the same BAGs.

It checks:
- every byte of every frame;
- BAG spacing;
- that every jitter the processor reads equals the eligible-to-grant time
  measured on the top's ports;
- that no FIFO overflows.

It also counts each mechanism and fails if any never occurs: each algorithm
deciding, select switches, the threshold switch, BAG holds, empty decisions
and server stalls.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_es_dynamic_scheduler_top \
    rtl/es_pkg.sv tb/tb_es_dynamic_scheduler_top.sv --Mdir obj -o sim && obj/sim
```

Replace the top module and file for any other testbench. The RTL is plain
synthesizable SystemVerilog. `tdp_bram` uses two ordinary `always` blocks
on one array, the usual inference pattern for a true-dual-port RAM. At the
defaults, the design is about 2.2 k flip-flop bits plus 8 × 4 KB frame
memories, 8 × 64 × 80-bit head-of-line memories and the 4 KB shared RAM.
