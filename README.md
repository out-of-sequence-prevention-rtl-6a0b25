# Multicast IQ-SMM Clos switch with flow-based cell dispatching

A three-stage Clos switch spreads its traffic over m parallel central
modules. That is what makes it scalable, and also why it reorders cells.
Two cells of the same packet that cross different central modules meet
different queues and can reach the output in the wrong order. The output
line card must then buffer and reorder them before it can rebuild the
packet. With multicast this gets worse, because each cell is copied to
several outputs, and each copy can be delayed differently.

This RTL implements an *input-queuing space-memory-memory* (IQ-SMM) Clos
switch for multicast cells:

- The first stage (input modules, IM) is bufferless.
- The second and third stages (central modules, CM, and output modules, OM)
  are input-queued multicast crossbars.

Because every stage-2 and stage-3 input has its own queue, no stage needs
internal speed-up. The interesting part is how an IM decides which central
module each of its inputs uses: the *cell dispatching* scheme. Two schemes
are built, and both are keyed to **multicast flows**. A flow is a run of
cells with the same fan-out vector; all cells of one packet share their
fan-out vector, so they belong to one flow.

- **MFRR** (multicast flow-based round robin). An input keeps its central
  module for the whole of a flow. It moves to a new one only when its own
  flow changes, and it takes that one from a list of currently idle links.
  All cells of a packet then follow one path, which is FIFO end to end, so
  cells of a packet can never overtake each other.
- **MF-DSRR** (multicast flow-based desynchronized static round robin).
  All inputs of an IM rotate their links together by one position whenever
  any input starts a new flow. This is cheaper, but a packet can be split
  over two central modules when another input's flow changes in the middle
  of it.

The default size is C(4,7,4): n = 4 ports per IM/OM, m = 7 central modules,
r = 4 IMs and OMs, N = 16 ports.

## Structure and numbering

```
 port g = i*n+p                               port g = j*n+q
 ──► [input queue] ─► IM i ──IL(i,k)──► CM k ──CL(k,j)──► OM j ─► out
                      n x m            r x r              m x n
                      bufferless       r input queues     m input queues
```

- Input port `g = i*n + p` is input `p` of IM `i`. Output port `g = j*n + q`
  is output `q` of OM `j`. All indices count from 0.
- IM `i` has exactly one link to each CM `k`. That link ends in input queue
  `i` of CM `k`. CM `k` has exactly one link to each OM `j`, which ends in
  input queue `k` of OM `j`.
- A cell is `{fanout[N-1:0], data[DW-1:0]}`. Bit `j` of the fan-out vector
  asks for a copy at output port `j`.
- The fan-out vector is split into r **bit-clusters** of n bits. Cluster `d`
  covers ports `n*d .. n*d+n-1`, which are the ports of OM `d`.
  - A CM sends one copy of a cell to OM `d` if cluster `d` is non-zero.
  - The OM then copies the cell to each of its own ports whose bit is set.
  - So a multicast cell is copied at most once per OM in the CM, and once
    per port in the OM.

## Flow changes

`fanout_change_detect` sits on the head of each input queue. It raises
`change` for one cycle when a cell with a fan-out vector different from the
previous head's reaches the head. The flag is raised once per flow:

- It is raised even if that cell cannot leave in that cycle. The cell
  simply waits on its new link.
- Two consecutive packets with identical fan-out vectors are one flow.
- The first cell after reset is not a change.

The dispatcher reacts in the same cycle. The cell that starts a flow is the
first to use the new link.

## MFRR and the available list

An IM with n inputs and m > n links always has exactly m − n idle links.
`available_list` holds them in a shift register that is always full:

- A link is taken from the top (the link that has been idle longest).
- A link that becomes free is added at the bottom.
- After reset, input `p` uses link `p`, and the list holds links n .. m−1.

When input `p` changes flow, it takes the top entry and puts its old link
at the bottom. No other input moves. This is constant work per input,
whatever m is.

**Several inputs changing in the same cycle** is the subtle case. The
changes are served as if one after another:

1. `mfrr_ctrl` puts the changing inputs in a service order. The order
   starts at an input picked by a 16-bit LFSR (x^16+x^14+x^13+x^11+1) and
   runs round from there. This randomises who gets the oldest idle link.
2. The k-th input in that order receives element k of the sequence
   "current list, then the links released by the inputs served before it".
3. If more inputs change than the list holds, a later input can receive a
   link that an earlier input released in the same cycle. With m − n = 3
   and n = 4, this happens when all four inputs of an IM change together.
4. The new list is that same sequence with the first k elements dropped.

The result is combinational, and `conn[p]` already holds the new links in
the cycle of the change. The pattern always stays one-to-one; an assertion
in `input_module` checks this.

Example with a 4 × 6 IM (links counted from 1, as in the usual drawing):

| step | event | pattern (I1..I4) | list |
|---|---|---|---|
| 0 | reset | 1 2 3 4 | 5 6 |
| 1 | I1 changes | 5 2 3 4 | 6 1 |
| 2 | I4 changes | 5 2 3 6 | 1 4 |
| 3 | I3 changes | 5 2 1 6 | 4 3 |

`tb_mfrr_ctrl` and `tb_available_list` replay this example exactly.

## MF-DSRR

`mfdsrr_ctrl` keeps one offset per IM; input `p` uses link
`(p + offset) mod m`. The offset moves by one in every cycle in which at
least one input of the IM changes flow. It moves by one even if several
inputs change in that cycle; this is a choice of this design. Plain DSRR,
which is not built here, would move the offset every cell time. After m
moves the pattern is back where it started.

## Central and output modules

Both are wrappers around `mc_xbar`, an input-queued multicast crossbar. It
has one `cell_fifo` per input, and each queued cell carries a destination
mask. The wrapper computes that mask from the fan-out vector: the
bit-cluster ORs in a CM, and the module's own cluster in an OM.

The scheduler is this design's own, chosen for simplicity:

- Each output has an independent round-robin arbiter. In every cycle it
  grants one head-of-line cell that still owes it a copy, provided the
  queue behind that output has room.
- A head cell may win several outputs in one cycle. It is then copied to
  all of them at once.
- Copies still owed are kept in a residue mask. The cell leaves its queue
  when the residue is empty (fan-out splitting).

A different multicast scheduler can replace `mc_xbar` without touching the
rest of the switch.

## Flow control and timing

- All interfaces are valid/ready. One clock cycle is one cell time.
- A full CM queue blocks the IM link in front of it. The head cell of the
  IM input on that link then waits in its input queue. A full OM queue
  holds back the CM output in front of it. `out_ready` lets a line card
  hold back an output port.
- Minimum latency is 3 cycles, from a cell accepted at `in_valid/in_ready`
  to its copy on `out_valid`: one cycle in each of the input, CM and OM
  queues.
- Queues have no fall-through: a cell written into an empty queue can leave
  in the next cycle.
- `scheme` selects MFRR or MF-DSRR for all IMs. It is meant to be static:
  change it only while the switch is in reset. Both dispatchers are always
  present; the one not selected sees no flow changes.
- Reset is asynchronous and active low (`rst_n`).

## Files

| file | contents |
|---|---|
| `rtl/clos_pkg.sv` | default sizes, `scheme_e` |
| `rtl/cell_fifo.sv` | cell queue (input queues, CM and OM queues) |
| `rtl/fanout_change_detect.sv` | per-input flow-change monitor |
| `rtl/available_list.sv` | idle-link list with multiple pops/inserts per cycle |
| `rtl/mfrr_ctrl.sv` | MFRR dispatcher |
| `rtl/mfdsrr_ctrl.sv` | MF-DSRR dispatcher |
| `rtl/input_module.sv` | IM: change monitors, both dispatchers, n × m space stage |
| `rtl/mc_xbar.sv` | input-queued multicast crossbar with round-robin scheduler |
| `rtl/central_module.sv` | CM: bit-cluster masks around `mc_xbar` |
| `rtl/output_module.sv` | OM: port masks around `mc_xbar` |
| `rtl/clos_switch.sv` | top: input queues, r IMs, m CMs, r OMs |

Top-level parameters: `N` (n, 4), `M` (m, 7), `R` (r, 4), `DW` (payload
bits, 32) and `QDEPTH` (depth of every queue, 8). The sizes n, m and r are
those of the evaluated configuration. `DW` and `QDEPTH` are this design's
choices. The design needs m > n, so that the available list is not empty.

## Simulation

Each testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=... failures=...` line. For example, to run the
end-to-end test:

```
verilator --binary --timing --assert --top-module tb_clos_switch \
  -y rtl -Irtl rtl/clos_pkg.sv tb/tb_clos_switch.sv -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_cell_fifo` | order, full/empty flags, 1-cycle write-to-head |
| `tb_fanout_change_detect` | one flag per new flow, none after reset |
| `tb_available_list` | 4 × 6 list example; random pop/insert counts against a queue model, including reuse within a cycle |
| `tb_mfrr_ctrl` | 4 × 6 MFRR example; random changes against a model with its own LFSR copy |
| `tb_mfdsrr_ctrl` | 4 × 6 MF-DSRR example (1-2-3-4 → 2-3-4-5 → 3-4-5-6); offset model |
| `tb_input_module` | change flags, pattern, link contents and stalls, for both schemes |
| `tb_mc_xbar` | per-source order at every output, every copy exactly once, multicast in one cycle, round-robin rotation |
| `tb_central_module`, `tb_output_module` | bit-cluster / port copy rules, order, completeness, back-pressure |
| `tb_clos_switch` | full switch at default size, both schemes, loads 30% and 70%, random output back-pressure (see below) |
| `tb_oos_sweep` | full switch at default size, loads 10%–70%, both schemes; reports out-of-sequence rates, cell delay and reorder-buffer occupancy |

**The end-to-end tests** model segmenting line cards:

- Packet length is uniform in 1–23 cells (mean 12).
- Each port is in a packet's fan-out with probability 1/4 (mean fan-out
  about 4).
- Packets arrive at random, at the selected mean offered load per output.

The scoreboard checks that every cell reaches exactly the ports in its
fan-out vector, once each, intact. It counts two kinds of out-of-sequence
(OOS) cells:

- **in-packet OOS**: a cell arrives before an earlier cell of the same
  packet;
- **inter-packet OOS**: a cell arrives after a cell of a later packet from
  the same input.

Each run begins with a burst in which every input changes flow in the same
cycle, which forces simultaneous changes and list reuse. The tests also
count how often each mechanism is used: flow changes, simultaneous changes,
list reuse, MF-DSRR wrap-around, IM stalls, full input queues, CM and OM
multicast, fan-out splitting and output hold. A mechanism that never
happens is a failure. A run takes well under a minute.

`tb_oos_sweep` also measures two more things:

- the mean delay of a cell copy, from acceptance at the input to delivery;
- the mean number of cells an output would have to hold only to put a
  packet's cells back in order (a reorder buffer, summed over all
  outputs).

Measured by `tb_oos_sweep` with one seed and 3000 cycles of traffic per
point. OOS figures are a percentage of delivered copies. The
"reorder buf." columns give the mean number of cells held.

| load | MFRR in-pkt OOS | MF-DSRR in-pkt OOS | MFRR inter-pkt OOS | MF-DSRR inter-pkt OOS | MFRR delay | MF-DSRR delay | MFRR reorder buf. | MF-DSRR reorder buf. |
|---|---|---|---|---|---|---|---|---|
| 0.1 | 0 | 0.7 | 0.04 | 0.0 | 4.9 | 4.5 | 0 | 0.02 |
| 0.3 | 0 | 6.2 | 1.3 | 1.0 | 10.6 | 8.7 | 0 | 2.1 |
| 0.5 | 0 | 18.7 | 3.9 | 3.3 | 18.4 | 24.3 | 0 | 23.4 |
| 0.7 | 0 | 35.1 | 8.3 | 10.3 | 60.0 | 87.5 | 0 | 118 |

MFRR never splits a packet, which is the property the design is built
around. Its outputs never need to reorder the cells of a packet, so it
needs no reorder buffer at any load. MF-DSRR reorders more as load grows.
The absolute values depend on choices of this implementation: the CM/OM
scheduler, the queue depths, the Bernoulli arrivals and the way OOS cells
are counted here. They are not a reproduction of any published curve.

## Choices made in this implementation

- **Scheduler:** the CM/OM multicast scheduler (round robin per output,
  with fan-out splitting) is a simple stand-in for a dedicated multicast
  scheduling algorithm.
- **Sizes:** the queue depth (8), the payload width (32 bits) and the cell
  format are free choices.
- **Interfaces:** valid/ready flow control, the line-card `out_ready` and
  the asynchronous reset are this design's own.
- **MF-DSRR:** it moves one step per cycle, however many inputs changed.
- **MFRR:** simultaneous changes are ordered by an LFSR-chosen rotation.
  Links released in the same cycle may be handed out again in that cycle.
- **Flow changes:** a change is detected when a new fan-out vector reaches
  the head of the input queue. It is acted on at once, even if the cell has
  to wait.
- **OM queues:** an OM has one input queue per CM, that is m queues.
- **Not built:**
  - The "Static" and plain DSRR dispatchers, which serve only as reference
    points for the two flow-based schemes.
  - Segmentation of packets into cells and reassembly at the outputs. These
    are line-card functions outside the switch fabric; the testbenches model
    them.
