# MCNS: a Clos-network cell switch with direct links and one-shot module matching

The MCNS (modified memory-space-memory Clos-network switch) is a three-stage
cell switch. Its first stage is made of buffered input modules (IMs). Its
second stage is made of bufferless central modules (CMs). Its third stage is
made of buffered output modules (OMs). It differs from a plain MSM Clos switch
in one way. Every IM also has a **direct link to every OM**. These links do the
work of one central module, so the switch needs only n-1 CMs. It is written
C_M(n, n-1, n).

The direct links carry most uniform traffic without any arbitration: in each
time slot every IM may send one cell to every OM. The CMs matter when traffic
is not uniform and one IM has a long queue for one OM. A single **central
arbiter** then pairs IMs with OMs at module level, once per slot, with no
request-grant-accept iterations. The same IM-to-OM pattern is set in all CMs,
so a matched IM can move up to n cells to its OM in one slot: one over the
direct link and n-1 through the CMs. The arbiter is a small ripple of masking
gates. For an FPGA this is a few nanoseconds, well inside a 50 ns slot
(64-byte cells at 10 Gb/s).

This repository holds synthesizable SystemVerilog for the whole switch at the
size n = 8, k = 2: a 64 x 64 switch with 8 IMs, 7 CMs and 8 OMs. Every size is
a parameter.

## Structure

```
             direct links: IM(i) -> OM(j), one cell per slot each
     +-------------------------------------------------------------+
     |                                                             v
 in -> IM(1..n) --> CM(1..n-1) (bufferless, same pattern in all) --> OM(1..n) -> out
     |  VOMQs     ^                                                 output queues
     |  request   | connection pattern (OM number per CM input)
     +--------> central arbiter
```

| Module | Role |
|---|---|
| `mcns_switch` | Top: n IMs, n-1 CMs, n OMs, arbiter, all links |
| `input_module` | IM: n VOMQs, request generation, cell selection for direct and CM links |
| `request_generator` | Turns VOMQ occupancies into the IM's (n+1)-bit request |
| `central_arbiter` | Request ordering, buffers load matrix, decision, round-robin pointers |
| `request_reorder` | Places requests into matrix rows: high priority first, round-robin inside each class |
| `buffers_load_matrix` | The masking network that produces the IM-OM matching |
| `central_module` | n x n crosspoint switch set by the broadcast pattern, can be switched off |
| `output_module` | OM: 2n-1 inputs per slot, one output queue per port |
| `cell_queue` | Multi-write, multi-read circular FIFO; used for VOMQs and output queues |
| `mcns_pkg` | The cell type |

Numbering in the RTL is zero-based: IM(1) is `in_cell[0]`, OM(1) is bit 1 of a
request and column 0 of the matrix. Switch input `s` is port `s % n` of IM
`s / n`; output `d` is port `d % n` of OM `d / n`.

A cell (`mcns_pkg::cell_t`) carries only a header: a valid bit, the
destination OM, the destination port within that OM, the source port and a
per-source sequence number. The last two exist so that order and loss can be
checked; a payload field can be added to the struct without touching any
module. Field widths are fixed at 8 bits for OM and port numbers, which
covers every n up to 256.

## One time slot

One clock cycle is one time slot. Within the cycle:

1. Each IM forms its request from the VOMQ occupancies registered at the
   start of the slot.
2. The arbiter orders the requests, runs the matrix and returns one grant per
   IM (`grant_valid`, `grant_om`). The same vector is the connection pattern
   of every CM: CM input i goes to CM output `grant_om[i]`.
3. Each IM puts the oldest cell of every non-empty VOMQ on the direct link to
   that OM. If it is granted OM g, it puts the 2nd, 3rd, ... oldest cells of
   VOMQ g on the links to the enabled CMs, in CM order.
4. At the clock edge the cells that left are popped. The arriving cells are
   written into the VOMQs, and the cells that crossed the fabric are written
   into the output queues.
5. Each output port sends the oldest cell of its output queue in the next
   slot.

A cell that reaches an empty switch therefore appears on its output two slots
after it was offered at the input. The only long combinational path is
request -> ordering -> matrix -> cell selection -> OM queue write. It is
`O(n)` gate levels deep, through the ripple of the matrix.

## Requests

An IM's request has n+1 bits. Bit 0 is the priority bit. Bit j (1..n) names
OM(j). For n = 8, `9'b000010100` is a low-priority request for OM(2) and
OM(4).

* A VOMQ with at least `HIGH_THR` = k·n cells (16) qualifies for a
  **high-priority** request.
* A VOMQ with at least `LOW_THR` = n cells (8) qualifies for a
  **low-priority** request.

A request has only one priority bit, but each VOMQ qualifies on its own. This
design settles the mixed case as follows. If any VOMQ of the IM is at the high
threshold, the IM sends a high-priority request that names only those OMs.
Otherwise it sends a low-priority request that names every OM at or above n.
Because a granted IM then holds at least n cells for its OM, the batch of n
cells (direct plus n-1 CMs) is always full.

The thresholds are parameters (`LOW_THR`, `HIGH_THR`) of
`request_generator`, `input_module` and `mcns_switch`. They can be redefined.
For instance, a lower `LOW_THR` lets shorter queues use the CMs when n is
large; a granted VOMQ then sends only the cells it holds. The arbiter does not
change when the thresholds do.

## The central arbiter

This is the heart of the design and the part worth reading closely.

**Ordering (`request_reorder`).** Requests are loaded into the rows of an
n x n binary matrix. Rows are IMs and columns are OMs. All high-priority
requests come first, then all low-priority ones. Within each class the order
is round-robin. The IM named by that class's pointer comes first, followed by
the next IM numbers, wrapping around. IMs without a request get no row. Empty
rows stay at the bottom. In hardware, each IM's row number is its rank: the
count of requests of its class that are nearer to the pointer, plus the
number of high-priority requests if it is low priority. A permutation
multiplexer then fills the rows. The priority bit is not loaded, so column 0
is OM(1).

**Matching (`buffers_load_matrix`).** The rows are scanned top to bottom. In
each row the lowest column that is still free is chosen, and that column is
marked busy for all rows below. In gates this is a chain of n stages. Each
stage ANDs its row with the inverted busy mask, isolates the lowest set bit
(`a & -a`) and ORs that bit into the busy mask. The result has at most one 1
per row and per column. Its properties:

* the top request is always granted its lowest requested OM;
* a later request can lose to an earlier one and is then rejected for this
  slot; it is not carried over (the IM simply asks again);
* the matching is greedy and maximal in scan order, not maximum.

**Decision.** Each IM reads back the row it was placed in. `grant_om[i]` is
both IM(i)'s grant and entry i of the connection pattern. The arbiter
broadcasts this pattern to all CMs. The pattern is a list of OM numbers, one
per CM input port. A valid bit is added for IMs that got no grant.

**Round-robin pointers.** At the end of a slot, each class pointer moves to
the IM after the one that was placed first in that class. A pointer stays
where it is when its class had no request. This keeps the top row, which is
always served, rotating among the IMs that compete. This update rule is a
choice of this design.

Assertions in the arbiter check two things: that the row and IM maps of the
ordering stage are inverses, and that no OM is granted twice. Each CM checks
the second as well.

## Moving a batch through the CMs, and cell order

A granted IM sends the oldest cell of the matched VOMQ over the direct link.
It sends the following cells through CM 1, 2, ... (the enabled ones only, in
index order). The CMs have no buffers, so all these cells reach the OM in the
same slot. The OM writes the cells of a slot into its queues in a fixed input
order: direct links from IM 1..n first, then CM 1..n-1. So cells of one
(input, output) flow leave in the order they arrived, and the switch needs no
resequencing. The end-to-end testbench checks this for every cell.

## Switching CMs off

`cm_en` has one bit per CM. A switched-off CM passes nothing. A granted IM
then sends one cell per enabled CM, so with c CMs on it moves up to c+1 cells
to its OM per slot. With all CMs off the switch runs on direct links alone.
The arbiter still matches as before. This lets CMs be turned off under
near-uniform load to save energy. The control policy that decides when to do
that is not part of this design.

## Buffers

The switch's scheme assumes unbounded queues. Here they are finite:

* `VOMQ_DEPTH` = 32 cells per VOMQ, twice the high-priority threshold;
* `OQ_DEPTH` = 64 cells per output queue.

Depths must be powers of two. A queue accepts cells in port order until it is
full and drops the rest. Drops are counted (`vomq_drops`, `oq_drops` on the
top). Cells leaving in a slot make room for cells arriving in the same slot.

Each IM is built as n separate circular buffers, one per VOMQ, each with n
write ports and n read ports. Each OM has n output queues with 2n-1 write
ports and one read port. This is the memory speed-up a shared-memory first
and third stage needs. In an ASIC or FPGA the queues would be mapped to
multi-banked memories. Here they are written as plain arrays.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 8 | n: ports per IM/OM, number of IMs and OMs; n-1 CMs; switch is n² x n² |
| `K` | 2 | sets the default high-priority threshold, K·N cells |
| `VOMQ_DEPTH` | 32 | cells per VOMQ (power of two, >= N) |
| `OQ_DEPTH` | 64 | cells per output queue (power of two) |
| `LOW_THR` | N | VOMQ occupancy for a low-priority request |
| `HIGH_THR` | K·N | VOMQ occupancy for a high-priority request |

The arbiter alone (`central_arbiter`) is also simulated at N = 32 and N = 64,
the matrix sizes of 1024- and 4096-port switches. The whole switch is
simulated at N = 2 and N = 8, and it elaborates at N = 4 and N = 16.

## Top-level ports (`mcns_switch`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | slot clock; synchronous active-low reset (empties all queues, pointers to IM 1) |
| `in_cell[i][p]` | in | cell arriving at port p of IM i in this slot |
| `out_cell[j][p]` | out | cell leaving port p of OM j in this slot |
| `cm_en` | in | CMs switched on |
| `req[i]` | out | IM i's request |
| `grant_valid[i]`, `grant_om[i]` | out | arbiter decision, equal to the CM pattern |
| `hp_ptr`, `lp_ptr` | out | round-robin pointers |
| `vomq_cells`, `oq_cells` | out | cells currently held in all VOMQs / all output queues |
| `vomq_drops`, `oq_drops` | out | cells dropped since reset |

## Simulating

Every testbench in `tb/` checks itself. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mcns_pkg.sv tb/arb_ref_pkg.sv tb/mcns_switch_tb.sv --top-module mcns_switch_tb
./obj_dir/Vmcns_switch_tb
```

Replace `mcns_switch_tb` with the testbench you want. `tb/arb_ref_pkg.sv` is a
reference model of the matching that several testbenches share.

| Testbench | What it checks |
|---|---|
| `cell_queue_tb` | random multi-writes and pops against a queue model, including full and dropping |
| `request_generator_tb` | request format and thresholds, random occupancies against a model |
| `buffers_load_matrix_tb` | selection against a literal row/column masking procedure; matching properties |
| `request_reorder_tb` | row order, maps and first-of-class against the reference ordering |
| `central_arbiter_tb` | grants and pointer movement, slot by slot, against the reference arbiter |
| `central_module_tb` | random partial permutations, switched on and off |
| `input_module_tb` | requests, direct-link cells, CM cells (with CMs partly off), occupancies, drops |
| `output_module_tb` | per-port queueing and order of 2n-1 inputs, overflow |
| `mcns_switch_tb` | the full 64 x 64 switch at default parameters, end to end (below) |
| `mcns_4x4_tb` | the smallest switch, n = 2 (4 x 4, one CM), end to end against the reference arbiter |
| `mcns_load_sweep_tb` | default switch, five traffic patterns x five loads (below) |
| `arbiter_scale_tb` | arbiter alone at 32 x 32 and 64 x 64 |

`mcns_switch_tb` runs these traffic phases without draining in between:

* a single cell, to check the two-slot minimum latency;
* Bernoulli traffic:
  * uniform at load 0.5;
  * Chang's pattern (no cell to the same-numbered output) at 0.8;
  * diagonal (2/3 to output i, 1/3 to output i+1) at 0.8;
  * hot-spot (half to output i) at 0.9;
* uniform traffic at 0.8 with one CM on, then with two CMs on;
* bursty on/off traffic at 0.6;
* an overload in which two IMs send everything to one output port.

Every slot it compares the arbiter's decision with the reference model. Every
departing cell must leave at its own destination and in flow order. At the
end it checks that cells in = cells out + cells dropped. It also requires that
each of these mechanisms occurred at least once:

* direct-link transfers;
* CM transfers;
* high-priority and low-priority requests;
* rejected requests;
* moves of both pointers;
* slots with CMs switched off;
* VOMQ overflow and output-queue overflow.

The Bernoulli phases must keep the average delay below 10 slots. It runs in
under a minute.

Average delays measured by that testbench, from the slot a cell is offered to
the slot it leaves, with the queues not drained between phases:

| Phase | Load | Average delay (slots) |
|---|---|---|
| uniform | 0.5 | 2.9 |
| Chang | 0.8 | 5.2 |
| diagonal | 0.8 | 3.6 |
| hot-spot | 0.9 | 6.1 |
| uniform, 1 CM | 0.8 | 5.3 |
| uniform, 2 CMs | 0.8 | 5.3 |
| bursty | 0.6 | 8.5 |

These come from short runs and are only a plausibility check, not a
performance study.

`mcns_load_sweep_tb` measures the default switch over a range of loads. For
each traffic pattern and load it runs 700 slots and then drains the switch.
It reports:

* d3: delay to leave the switch (minimum 2 slots);
* d1: delay to leave the IM (minimum 1 slot);
* vq: mean cells per VOMQ;
* oq: mean cells per output queue.

One run gave:

| Pattern | p | d3 | d1 | vq | oq | dropped |
|---|---|---|---|---|---|---|
| uniform | 0.2 | 2.2 | 1.1 | 0.2 | 0.2 | 0 |
| uniform | 0.6 | 3.3 | 1.6 | 1.0 | 1.0 | 0 |
| uniform | 0.8 | 5.1 | 2.3 | 1.8 | 2.2 | 0 |
| uniform | 0.95 | 10.9 | 2.8 | 2.6 | 7.6 | 0 |
| Chang | 0.8 | 5.2 | 2.3 | 1.8 | 2.3 | 0 |
| diagonal | 0.2 | 3.9 | 2.8 | 0.5 | 0.2 | 0 |
| diagonal | 0.8 | 3.5 | 1.5 | 1.2 | 1.6 | 0 |
| hot-spot | 0.8 | 4.2 | 1.6 | 1.3 | 2.1 | 0 |
| hot-spot | 0.95 | 8.6 | 1.6 | 1.5 | 6.5 | 0 |
| bursty | 0.6 | 10.0 | 1.9 | 0.7 | 3.0 | 18 |
| bursty | 0.8 | 11.9 | 2.0 | 0.9 | 4.5 | 155 |

A few patterns stand out:

* Most of the delay is spent in the output queues. VOMQs stay short because
  the CMs empty them faster than the output ports can send.
* Diagonal traffic is slowest at light load. An IM's single busy VOMQ must
  first collect n cells before it can request the CMs. Until then it drains
  one cell per slot over its direct link.
* Bursty traffic loses cells at the default queue depths. The fix is deeper
  queues, set with `VOMQ_DEPTH` and `OQ_DEPTH`.

The testbench fails if any of these hold:

* a Bernoulli point drops a cell;
* d3 reaches 10 slots at any load below 0.95;
* d1 reaches 3 slots;
* bursty d3 reaches 100 slots.

`arbiter_scale_tb` checks `central_arbiter` at N = 32 and N = 64 against the
reference matching, every slot.

## Design choices beyond the dispatching scheme

The following are choices of this implementation, not part of the scheme it
implements:

* **Timing.** One clock cycle is one slot. Requests, matching and transfer
  all happen in that slot, with no pipeline.
* **Mixed requests.** How an IM with both long and medium VOMQs sets its
  single priority bit (see Requests). The low threshold is inclusive
  (at least n cells).
* **Pointer update.** Each pointer moves to the IM after the first one placed
  in its class, and only when that class had requests.
* **Direct links.** Each slot, every non-empty VOMQ sends its head cell over
  its direct link.
* **CMs switched off.** A granted IM sends one cell per enabled CM.
* **Cell order.** The order in which cells of one slot enter an output queue.
* **Buffers.** Finite queue depths with drop-on-full, and VOMQs as separate
  circular buffers rather than one shared memory.
* **Interfaces.** Requests and the CM pattern are parallel wires inside one
  design, with a valid bit added to each pattern entry. In a multi-chip build
  they would travel over serial I/O links: n sets of n+1 request bits in, and
  n·log2(n) pattern bits out on a bus shared by all CMs. Those links are not
  part of this RTL.
* **Reset.** The reset behaviour is this design's own.
