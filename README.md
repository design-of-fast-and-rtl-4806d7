# Sequential greedy scheduler for an input-buffered packet router

An input-buffered router is the most scalable single-stage router, but its
inputs must be told, slot by slot, which output each of them may send to so
that no two inputs send to the same output at once. This RTL implements such
a scheduler with **sequential greedy scheduling (SGS)**: in every time slot
the inputs take turns along a chain; each input picks the first output for
which it holds waiting cells and which no earlier input has already taken,
and passes the remaining free outputs on. The result in every slot is a
maximal matching with each output used at most once, so the switch fabric
behind it never blocks.

Packets are cut into fixed-length cells at the inputs. Each input keeps its
cells in one shared buffer organised as **virtual output queues** (one queue
per output), built as linked lists in a small pointer memory.

## Structure

```
router_scheduler                         (top, N input ports, slot counter)
 └─ input_port  x N                      (one per input, chained)
     ├─ network_processor                route lookup, packet -> cells
     ├─ queue_manager                    list pointers, 3 operations per slot
     ├─ linked_list_memory               next-pointer store, F locations
     ├─ data_memory                      cell store, F locations
     ├─ output_selector                  first-available-output picker
     │   └─ output_selector_cell x N-1   two-port selector
     └─ output_memory                    one frame of this input's schedule
router_pkg                               shared default sizes
```

Defaults: N = 8 ports, frames of F = 16 slots, 16 cells of 8 bits buffered per
input, packets of up to 16 cells, 32-bit destination addresses.

## The cell buffer: three pointers per queue

This is the part that needs the most care. Each input has F buffer locations,
numbered 1..F; pointer value 0 means NULL. Location L of the data memory
holds a cell; location L of the linked-list memory holds the number of the
location that follows L in its list. Every location is in exactly one list:

* the **empty-queue list (EQL)** of free locations, with a head and a tail
  pointer. After reset it is 1 → 2 → … → F.
* one **virtual-queue list (VQL)** per output, with three pointers: **head**
  (oldest cell, the next to leave), **first unscheduled** (the oldest cell
  not yet given a slot) and **tail** (newest cell). Cells between head and
  first-unscheduled have been scheduled and wait for their slot.

The queue manager performs up to three operations in the same slot, on the
same or different queues:

| operation | effect |
|---|---|
| arrival to output j | EQL head is handed out as the cell's location, unlinked from the EQL and linked behind the tail of VQL j. If VQL j had no unscheduled cell, the new cell becomes its first unscheduled cell. |
| schedule of output j | first-unscheduled of VQL j moves to the next cell, or to NULL if it was the tail. |
| departure to output k | head of VQL k is read out, unlinked, and appended to the EQL tail. |

End-of-list is always detected by comparing with the tail pointer, so the
link of the last element is never needed. Same-slot interactions are
resolved in this order: departure, then schedule, then arrival on the queue
pointers; arrival, then the freed location on the EQL. So a cell may arrive
to a queue whose only cell departs in the same slot, and the location freed
in a slot can be the only one in the EQL afterwards. The two link writes of
a slot always hit different locations (one in a VQL, one in the EQL), which
`linked_list_memory` checks with an assertion.

When the EQL is empty the buffer is full: `queue_manager.arr_ready` drops and
the network processor stalls with its cell until a departure frees a
location.

## One time slot

One clock cycle is one slot; `slot` counts 0..F-1 and wraps every frame.
In each slot, in every input:

1. The network processor offers at most one cell; it is written to the data
   memory at the location the queue manager hands out.
2. The request vector is `r = unsched & avail_in`: outputs for which this
   input has unscheduled cells, minus those taken by earlier inputs this
   slot. The output selector grants the lowest such output (`sched_q`,
   one-hot), if `sched_en` is high. The queue manager marks the cell
   scheduled and `avail_out = avail_in & ~sched_q` goes to the next input.
   Input 0 sees all outputs free.
3. The grant is written into the output memory entry of this slot number,
   to be used in the same slot of the next frame. The entry written one
   frame earlier is read first: if valid, the head cell of that output's
   queue departs.
4. The departing cell appears on `out_valid/out_port/out_data` one cycle
   later (synchronous data-memory read).

So every cell leaves exactly **F + 1 cycles** after the slot that scheduled
it, and per output the cells of an input leave in arrival order. Because the
grants of a slot are distinct outputs, so are the cells sent in any cycle;
`router_scheduler` asserts this.

The availability chain is combinational through all N inputs within a cycle
(N output selectors of log2 N levels each). For large N this chain sets the
clock period; it is not pipelined here.

## Output selector

An N-port selector is two N/2-port selectors and one two-port cell: the cell
takes the "any request" outputs `c` of the two halves as its requests, and
its two grants enable the halves, so the lower half wins whenever it has a
request. The two-port cell computes `q1 = e & r1`, `q2 = e & ~r1 & r2`,
`c = r1 | r2`. In `output_selector` the recursion is unrolled into a binary
tree of N-1 cells in heap order (node k has children 2k, 2k+1). N must be a
power of two.

## Network processor

A packet arrives whole: `pkt_dst` (destination address), `pkt_len` (1..16
cells) and `pkt_data` (cell k in bits `k*8 +: 8`), with a valid/ready
handshake. The output port is read from a route table of 16 entries indexed
by the four low destination bits (reset: entry a → port a mod N; rewrite
through `rt_wr_*`). The cells then go to the queue manager one per cycle,
tagged with that port. The next packet is taken in the cycle the last cell
goes, so a packet of L cells costs L cycles when the buffer has room.

## Top-level interface (`router_scheduler`)

Per input i (unpacked arrays of N): `pkt_valid, pkt_ready, pkt_dst, pkt_len,
pkt_data`; `rt_wr_en, rt_wr_addr, rt_wr_port`; `sched_en[i]` (the selector's
enable, where a traffic policer would act); outputs `out_valid, out_port,
out_data` towards the switch fabric; status `sched_q` (this slot's grants),
`avail_last` (outputs left free), `buf_full`, `voq_empty`, `np_stall`, and
the shared `slot`. Reset (`rst`) is synchronous and active high.

## What is not included, and where this RTL chooses for itself

Not included:

* the **switch fabric**, which carries the cells from inputs to outputs;
  connect it to `out_*`;
* **traffic policing**, on which the non-blocking guarantee of SGS rests;
  `sched_en` is the hook for it;
* the optical line interface in front of the network processor; packet
  checksums are not checked.

Choices made here where the scheduler's description is silent:

* sizes: N = 8, F = 16, 8-bit cells, 16-cell packets are the sizes of the
  published block simulations; 32-bit destination and the 16-entry,
  direct-indexed route table are this RTL's own;
* one slot per clock cycle, and all three queue operations in that cycle
  (hence three read and two write ports on the linked-list memory, and a
  data memory with separate read and write ports instead of one shared
  port);
* the output memory holds one frame of grants, so a cell is sent one frame
  after it is scheduled;
* the chain always starts at input 0 and is not pipelined;
* a full buffer stalls the network processor; nothing is dropped;
* the linked-list memory is a register file with reset, not a RAM macro.

## Verification

Each block has a self-checking testbench in `tb/` that compares the block
with a model written independently in the testbench and prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `output_selector_tb` | every request vector for N = 2 and 8, a sweep for N = 16; grant = lowest set bit |
| `linked_list_memory_tb` | reset chain, random two-port writes, three read ports |
| `data_memory_tb` | random reads/writes, read-during-write returns the old cell, one-cycle read latency |
| `output_memory_tb` | what is written in a slot is read back one frame later |
| `queue_manager_tb` | random arrivals, schedules, departures in any combination, against queue models; full buffer, all three operations in one slot, arrival and departure on one queue, refilling a queue that empties |
| `network_processor_tb` | cell order, data and port through route-table rewrites and random stalls; one cycle per cell back to back |
| `input_port_tb` | one input with the rest of the chain simulated: grants, `avail_out`, F+1 latency, order and data per output, draining |
| `router_scheduler_tb` | whole 8×8 scheduler at its default parameters: SGS grants slot by slot, distinct outputs every cycle, F+1 latency, per input/output order and data, complete drain; counts stalls, contention, multi-cell packets, disabled inputs, frames |
| `router_scheduler_scaled_tb` | the same end-to-end test (`router_scheduler_env`) at 2×2 with F = 4, 4×4 with F = 8 and 16×16 with F = 32 |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/router_pkg.sv \
    tb/router_scheduler_tb.sv --top-module router_scheduler_tb
./obj_dir/Vrouter_scheduler_tb
```

Replace the testbench file and top module name for the other blocks
(`-y tb` is needed for the two that use `router_scheduler_env`). All
testbenches run in well under a second.

The RTL carries its own assertions, active in any simulation built with
`--assert`: the schedule vector is one-hot and only hits queues with
unscheduled cells, only scheduled cells depart, no two link writes of a slot
hit one location, packet lengths are in range, and the cells sent in one
cycle go to distinct outputs.

Not verified: timing closure of the combinational chain, and behaviour with
an N that is not a power of two (rejected by an assertion).
