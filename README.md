# PCRRD: a pipelined round-robin dispatcher for a three-stage Clos switch

A three-stage Clos network builds a large cell switch from small crossbars.
Here the middle stage has no buffers, which keeps cells in order and avoids
resequencing at the outputs. The price is a scheduling problem. In every
cell slot, each input module must decide which of its queued cells goes on
which of its links to the central modules, and no two cells may meet on a
central-module output link.

Concurrent round-robin dispatching (CRRD) solves this with plain
round-robin arbiters. Their pointers drift apart ("desynchronize") under
load, and the switch then reaches 100 % throughput under uniform traffic
without any internal speed-up. CRRD, however, must finish a whole matching
within one cell slot. At 40 Gbit/s with 64-byte cells, a slot is 12.8 ns.

PCRRD removes that limit. It runs **P independent copies of the CRRD engine
(subschedulers)**, whose windows are staggered by one slot. Each copy has P
slots to compute a matching, and one copy finishes in every slot. A small
request counter per queue hands each copy its own requests, so the copies
never compete for the same cell. This repository holds synthesizable
SystemVerilog for the whole switch:

- the input modules with their virtual output queues;
- the bufferless central modules;
- the output modules with their output buffers;
- the PCRRD scheduler.

Its default configuration is a 64-port switch with P = 4.

## The switch and its numbering

| symbol | meaning | parameter | default |
|---|---|---|---|
| n | input ports per input module (IM) and output ports per output module (OM) | `N` | 8 |
| m | central modules (CM) = output links per IM | `M` | 8 |
| k | IMs = OMs | `K` | 8 |
| P | subschedulers; slots each one may take per matching | `P` | 4 |
| I | request/grant/accept rounds inside an IM | `ITER` | 4 |
| | cell size in bits (64 bytes) | `CELL_W` | 512 |
| | cells per virtual output queue (VOQ) | `VOQ_DEPTH` | 16 |
| | cells per output-port buffer | `OB_DEPTH` | 32 |

The input ports are IP(i,h) and the output ports OP(j,h), with port h of
module i or j. Every IM(i) keeps n·k VOQs, one per output port of the
switch. VOQ(i,v) holds cells for OP(j,h), where **v = h·k + j**. This index
is the only address a cell carries:

- `in_dst` on an input port;
- the routing tag beside the cell on every internal link;
- how a CM picks its output link (j = v mod k);
- how an OM picks its output port (h = v div k).

The links are wired as follows. IM(i) link r goes to input i of CM(r).
CM(r) output j goes to input r of OM(j).

One clock cycle is one cell slot. In each slot:

1. Every input port may deliver one cell and its tag `v`. The cells enter
   their VOQs in port order. A VOQ can take up to n cells in a slot.
2. The dispatch decided at the end of the previous slot is carried out. For
   each link r, IM(i) puts the head cell of the chosen VOQ on the link. The
   cell crosses the CM combinationally and is written into its output
   buffer at the end of the slot.
3. Every non-empty output buffer sends one cell.

A cell that arrives at an idle switch in slot t leaves its output port in
slot **t + P + 2**:

- the request is flagged at the start of slot t+1;
- the matching is computed over slots t+1 … t+P;
- the cell crosses the switch in slot t+P+1;
- the cell leaves the output buffer in slot t+P+2.

## The CRRD engine (one subscheduler)

A subscheduler sees one request flag per VOQ, F(i,v,p). It holds three kinds
of round-robin arbiter, each with its own pointer:

- A_L(i,r): one per IM output link;
- A_V(i,v): one per VOQ;
- A_C(r,j): one per CM output link.

**Phase 1, inside each IM** (`crrd_im_match`):

- *Request:* every flagged VOQ asks every output-link arbiter.
- *Grant:* every free link arbiter grants one requesting VOQ, searching
  from its pointer P_L(i,r).
- *Accept:* every VOQ arbiter accepts one of the grants it received,
  searching from its pointer P_V(i,v).

This request/grant/accept round repeats `ITER` times. Later rounds involve
only VOQs and links that are still unmatched. Unlike iSLIP, a VOQ asks
*every* link, because any link reaches any CM.

**Phase 2, in each CM** (`crrd_cm_arb`):

- Every matched IM link r asks CM(r) for the OM its VOQ is destined to.
- A_C(r,j) grants one requesting IM, searching from its pointer P_C(r,j).
- A match that the CM does not grant waits for another matching.

**Pointer update.** This is the rule that makes the pointers desynchronize.
A pointer moves to one past the position it granted or accepted, and only
when both of these hold:

- the IM match was made in the *first* round;
- the CM granted it.

This applies to P_L, P_V and P_C alike. Matches made in later rounds carry
cells, but they never move a pointer.

The worked example with n = m = k = 2, one round, every VOQ always backlogged
and all pointers starting at 0 behaves as follows:

- 1 cell goes through in slot 0, 3 in slot 1, and 4 (all links) from slot 2 on.
- The pointers step through fixed sequences, for example P_L(0,0) = 0 1 2 3 0 1 2 3.

`pcrrd_subscheduler_tb` reproduces both the cell counts and the pointer sequences.

## Pipelining: request counters, request flags and windows

This part is the least obvious one.

- **Request counter** RC(i,v) (`pcrrd_rc`, one bank per IM). Its value
  C(i,v) counts the cells in VOQ(i,v) whose request has not yet been given
  to any subscheduler. It goes up by the number of cells accepted into the
  VOQ in a slot.
- **Request flag** F(i,v,p), one bit per VOQ in each subscheduler
  (`pcrrd_subscheduler`). It is set when the VOQ has a request pending in
  subscheduler p.

Subscheduler p computes during slots Pl+p … Pl+p+P−1. For P = 3:

```
slot              0   1   2   3   4   5   6   7   8
subscheduler 0   [-----------][----------][----------]
subscheduler 1       [-----------][----------][-------
subscheduler 2           [-----------][----------][---
```

`pcrrd_scheduler` keeps `phase` = t mod P. At the clock edge between slot t
and slot t+1, the subscheduler e = (t+1) mod P is the one whose window ends.
Three things happen at that edge:

1. **Stage 4.** The result of e becomes the registered dispatch for slot
   t+1. Every flag of e that was granted is cleared. Its pointers move.
2. **Stage 2.** For each VOQ with a pending request (C + this slot's
   arrivals > 0) whose flag in e is now zero, one request moves from the
   counter into the flag. This opens e's next window.
3. **Stage 1.** The counters add this slot's arrivals.

A flag is set only for a cell already in the VOQ. Each VOQ holds at most one
flag per subscheduler. Only one subscheduler finishes per slot, so a VOQ
sends at most one cell per slot. The cell sent for a grant is always the
head of the VOQ. Cells of one VOQ therefore leave in order, whichever
subscheduler granted them.

The bookkeeping invariant holds at all times: **L(i,v) − C(i,v) = Σp
F(i,v,p) ≤ P**, where L is the VOQ occupancy. A cell that is leaving in the
current slot is not counted in L. The scheduler testbench checks this
invariant every slot.

### Timing relaxation, and what it means for synthesis

A subscheduler's matching logic is purely combinational. It is computed
from the subscheduler's flags and pointers, and both change only at the
edge that ends its window. Its result is used only at the end of the next
window, P cycles later. At that edge the result does three things:

- it is selected into the dispatch registers;
- it clears flags and moves pointers;
- through the stage-2 hand-over, it sets what the request counters
  subtract.

Every path that *starts* at a subscheduler's flag or pointer registers is
therefore a **P-cycle multicycle path**. That is exactly the scheduling time
PCRRD buys: T_sch = P·L_cell / C, which is 51.2 ns for P = 4 at 40 Gbit/s.

A timing run must declare these paths as multicycle (setup P, hold P−1).
Without that, static timing analysis will demand that all `ITER` unrolled
rounds fit into one slot. Paths that start at `phase`, at the request
counters or in the datapath are ordinary single-cycle paths.

The phase-1 rounds are unrolled combinationally inside that window. A design
with a faster internal clock could instead run one round per cycle. That is
a different implementation of the same algorithm and is not provided here.

## Modules

```
pcrrd_clos_switch            top: the switch
├── im_voq        ×k         IM: VOQ storage (multi-write circular buffers), head cells onto m links
├── pcrrd_scheduler          centralized PCRRD dispatcher, slot phase
│   ├── pcrrd_rc  ×k         request counters of one IM
│   └── pcrrd_subscheduler ×P   request flags + one CRRD engine
│       ├── crrd_im_match ×k    phase 1 in IM(i): A_L, A_V arbiters and pointers
│       └── crrd_cm_arb   ×m    phase 2 in CM(r): A_C arbiters and pointers
│           (both use rr_arbiter, the programmable-priority round-robin arbiter)
├── cm_switch     ×m         CM: bufferless k×k crossbar steered by the routing tag
└── om_outbuf     ×k         OM: n FIFO output buffers, up to m writes and one read per slot
pcrrd_pkg                    default sizes, shared by all modules
```

Each subscheduler is built as one block holding the IM parts and CM parts
for all modules. This is the *centralized* arrangement. The IM parts
(`crrd_im_match`) and CM parts (`crrd_cm_arb`) are separate modules. Placing
them in the IMs and CMs instead, the distributed arrangement, would use the
same modules, with the link requests and grants carried between chips.

Top-level ports (all plain unpacked arrays):

| port | direction | shape | meaning |
|---|---|---|---|
| `in_valid`, `in_dst`, `in_cell` | in | [k][n] | cell on IP(i,h), its tag v = h·k + j |
| `out_valid`, `out_cell` | out | [k][n] | cell leaving OP(j,h) |
| `voq_drop` | out | [k][n] | the cell offered on IP(i,h) found its VOQ full and was lost |
| `ob_drop` | out | [k][m] | the cell arriving at OM(j) from CM(r) found its output buffer full and was lost |
| `cm_conflict` | out | [m] | two cells for one CM output link; cannot happen with a correct schedule, asserted |

## Design choices beyond the algorithm

These are choices made for this design, not part of the published scheme:

- **Finite queues with loss.** The scheme assumes queues large enough never
  to overflow. Here the VOQs hold `VOQ_DEPTH` cells and the output buffers
  hold `OB_DEPTH` cells. A cell that finds its queue full is dropped and
  reported on `voq_drop` or `ob_drop`. A VOQ judges free space on its
  occupancy at the start of the slot. The request counter width follows
  from `VOQ_DEPTH`, because C can never exceed the occupancy.
- **Routing tag beside the cell.** The tag v travels on its own wires next
  to the `CELL_W`-bit cell instead of inside a header field.
- **When stage 2 happens.** A cell that arrives during slot t is already
  eligible for the subscheduler whose window starts at slot t+1.
- **Reset.** An asynchronous, active-low reset clears all pointers,
  counters, flags and queues. The slot phase resets to P−1, so the first
  slot after reset is slot 0 and belongs to subscheduler 0.
- **CM collisions.** A CM never needs to resolve a collision. If one
  happened, the lower-numbered input would win; an assertion flags it.
- **Queue depths.** 16 and 32 are this design's defaults, not published
  values.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it establishes |
|---|---|
| `rr_arbiter_tb` | every request pattern × pointer for N = 5, random patterns for N = 9, against a direct model |
| `crrd_im_match_tb` | n = m = k = 3 phase-1 example (requests from VOQs 0, 3, 4, 6), then 3000 random cycles against a behavioural model with its own pointers and the first-round/CM-grant update rule |
| `crrd_cm_arb_tb` | CM arbitration and pointer rule against a model |
| `pcrrd_rc_tb` | counter arithmetic with up to n arrivals and a hand-over per slot |
| `pcrrd_subscheduler_tb` | the n = m = k = 2 desynchronization example: 1, 3, 4, 4 … cells per slot and seven pointer sequences over slots 0–7; legality of random matchings (flagged VOQs only, one link per VOQ, one cell per CM output link, no CM output left idle while requested) and the flag update |
| `pcrrd_scheduler_tb` | P = 3 window timing (which subscheduler finishes when), lone-cell dispatch exactly P+1 slots after arrival in all phases, the L − C = ΣF ≤ P invariant every slot, **100 % dispatch rate with all VOQs backlogged**, no lost requests under random load |
| `im_voq_tb`, `cm_switch_tb`, `om_outbuf_tb` | datapath blocks against queue models, including overflow |
| `pcrrd_clos_switch_tb` | whole switch, n = m = k = 3, P = 3, two rounds: light, full and hot-spot traffic through the scoreboard below. It also counts each scheduler mechanism and fails if one never happens: CM rejection, later-round match, request held back by a busy flag, counter ≥ 2, several arrivals into one VOQ, VOQ overflow, output-buffer overflow, all links busy, a result from every subscheduler |
| `pcrrd_clos_switch_full_tb` | whole switch at the default size (64 ports, P = 4, four rounds, 512-bit cells), about 130 000 cells |
| `pcrrd_bernoulli_tb` | delay against load at 64 ports under uniform Bernoulli traffic, for three settings side by side (table below); each run goes through the same route/order/latency checks |

The end-to-end scoreboard (`clos_bench`) checks that every cell:

- leaves at the port its tag names;
- arrives unchanged;
- arrives exactly once;
- stays in order within its input/output pair;
- takes at least P+2 slots, with exactly P+2 observed.

Its only exception is a cell reported lost at an output buffer.

**Throughput.** The full-load phase sends a rotating permutation: input g
sends to tag (g+t) mod n·k. Over its second half, every IM output link
carries a cell in every slot, both in the reduced run and at the default
size. From an idle start, the default-size switch needs a few hundred slots
of full load before its pointers desynchronize. Over slots 150–300 of such a
run, the links were busy 79 % of the time. Over slots 1150–2150, they were
busy 100 % of the time.

**Delay under Bernoulli traffic.** `pcrrd_bernoulli_tb` drives three
64-port switches with 64-bit cells (`tb/delay_bench.sv`). Each load point
runs 300 warm-up slots and 1500 measured slots. Delay runs from the arrival
slot to the slot the cell leaves its output port, so it includes the P+2
slot pipeline. Mean delay in slots:

| load | P = 1, 4 rounds | P = 4, 4 rounds | P = 4, 1 round |
|---|---|---|---|
| 10 % | 3.1 | 6.3 | 6.7 |
| 40 % | 3.6 | 7.3 | 51 |
| 70 % | 34 | 54 | 49 |
| 90 % | 55 | 72 | 72 |

The testbench checks three things:

- at light load, P = 4 costs 2–5 slots more than P = 1 (measured: 3.2);
- at 40 % load, one round gives a higher delay than four;
- carried traffic matches offered traffic within 3 %.

Two results differ from the source's curves, so they are reported here but
not checked. First, at 70 % and 90 % load the P = 4 delay stays well above
the P = 1 delay, where the source shows the curves meeting. Second, at 70 %
and above the 16-cell VOQs and 32-cell output buffers drop some cells, up to
about 2 % of arrivals at 90 % with P = 4. The cause has not been isolated. The buffer
sizes are this design's own choice, and the source gives none.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Irtl -Itb rtl/pcrrd_pkg.sv \
          tb/pcrrd_clos_switch_tb.sv --top-module pcrrd_clos_switch_tb -j 8
./obj_dir/Vpcrrd_clos_switch_tb
```

Use the same command with any other testbench name. Verilator finds the
modules under test through `-Irtl`. The two whole-switch testbenches also
use the traffic source and scoreboard in `tb/clos_bench.sv`, which it finds
through `-Itb`. `pcrrd_bernoulli_tb` uses `tb/delay_bench.sv` the same way.

The default-size testbench takes about 4 minutes to compile and 2 seconds to
run. Most of the compile time goes to the 4 × 8 unrolled IM matchings with
64-input arbiters.

To change the configuration, override the top's parameters, for example
`pcrrd_clos_switch #(.P(2), .ITER(1)) u (...)`. `VOQ_DEPTH` and `OB_DEPTH`
must be powers of two.

## Limits

- Delay is measured only under Bernoulli traffic, for P = 1 and 4, at four
  load points, with one seed. Bursty traffic (mean burst of 10 cells) is
  not run. `delay_bench` has a bursty source, but no testbench uses it.
  P = 2 and 3 are not run either.
- Heavy-load delay does not match the source's claim that P stops
  mattering; see the delay table above.
- No timing analysis has been done. Whether the matching logic fits a P-slot
  window at a given port speed depends on the technology.
- Only the centralized arrangement of the subschedulers is assembled. The
  distributed one would reuse the same modules.
