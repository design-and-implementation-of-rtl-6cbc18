# P-iSLIP: a prioritized iSLIP scheduler for a VOQ switch fabric

An input-queued switch with a crossbar needs a scheduler. In every cell time it
decides which inputs may send to which outputs, so that no input sends two
cells and no output receives two. The inputs keep one queue per output
(*virtual output queues*, VOQs), so a cell waiting for a busy output never
holds up cells for other outputs. The scheduler then sees an N x N request
matrix and must find a large matching in it, quickly.

This RTL implements **Prioritized iSLIP (P-iSLIP)**, an iterative
request-grant-accept matcher. It is built from 2N identical round-robin
arbiters that honour P priority levels. The default configuration is a
16 x 16 switch with 4 priority levels and 8 iterations per scheduling round.
Around the scheduler sits a small but complete switch fabric:

- input ports with VOQs;
- an N x N crossbar;
- output ports with class-of-service queues;
- a flow-control broadcast that stops traffic toward a full output.

With it the scheduler can be exercised end to end.

## The algorithm

Each input keeps P x N FIFOs: one per output and per priority. In one
iteration:

1. **Request.** For every output, each input requests with the priority of its
   highest-priority non-empty queue for that output.
2. **Grant.** Each output looks at the requests it received. It keeps only
   those at the highest priority present, and grants one of them round-robin.
   Each output has a separate round-robin pointer for every priority level.
3. **Accept.** Each input looks at the grants it received. It keeps only those
   at the highest granted priority, and accepts one of them round-robin. Here
   too there is a separate pointer for every level.

An accepted pair joins the matching. Its input row and output column then drop
out of the later iterations, which only try to fill the gaps. After
`N_ITER` iterations the matching is final.

**Pointer rule.** A pointer is moved to one place past the port it chose.
This happens only in the first iteration of a round. A grant pointer moves only
if its grant was accepted, so that the output pointers do not lock into step.
The same rule is used in classic iSLIP. Only the pointer of the priority level
that was served moves.

## Grant and Accept blocks (`pslip_arbiter`)

The grant step and the accept step do the same operation on different lists.
One module therefore serves both. The scheduler holds N of them per output
(Grant) and N per input (Accept). Each one takes:

- `input_list`: N bits, port k requests (or, at an input, output k granted);
- `prio_list`: N priority codes, `log2(P)` bits each, with 0 where
  `input_list` is 0.

Inside, the list goes through four stages:

1. **`get_max_priority`** finds the largest code present. It also gives the
   N-bit list of ports that request at that code.
2. The maximum code is decoded to select one of the **P pointers**
   (`priority_pointers`).
3. **`rr_arbitration`** picks the first candidate at or after that pointer,
   wrapping from N-1 to 0. If there are no candidates it raises `is_there`.
   The name is kept from the original signal list. High means *no request*.
4. The chosen index goes through a `log2(N)`-to-N decoder (`select`). The index
   plus one (mod N) is written into the active pointer when `load` is high and
   there was a request.

The Grant block also passes the priority it granted (`sel_prio`) to the Accept
stage. This lets the input compare the levels of the grants it received.

### Finding the maximum priority without a comparator tree

For four levels (two-bit codes) the maximum comes from three wide ORs:

```
temp0 = OR_k  code[k][1]                  -- some code is 1x
temp1 = OR_k  code[k][0]                  -- some code is x1
temp2 = OR_k (code[k][1] & code[k][0])    -- some code is 11
max[1] = temp0
max[0] = temp2 | (temp1 & ~temp0)
```

A plain OR of the LSBs would be wrong. With codes 00, 01 and 10 in the list it
would claim 11. The `temp2`/`temp0` terms fix that case, and
`tb_get_max_priority` checks it directly. The list of ports at the maximum is
`input_list[k] & (code[k] == max)`, built from XORs, a NOR and an AND per
entry.

The two-bit circuit relies on codes of non-requesting ports being 0. The
masking is done where the lists are formed, in the scheduler, and an
assertion in `pslip_arbiter` checks it. For code widths other than two bits
(for example two priority levels) a generic MSB-first narrowing search is
used. For two bits it gives the same result.

## One scheduling round (`pslip_scheduler`, `pslip_controller`)

```
clock   0        1        2   ...   N_ITER    N_ITER+1
        start    iter 0   iter 1    iter N-1  done (match valid)
        (sample  (load)
        requests)
```

- `start` (accepted while `ready`) stores the request matrix.
- Each of the next `N_ITER` clocks runs one full request-grant-accept
  iteration. These iterations are combinational between registers.
- `load` is high only in the first iteration.
- `done` is high for one clock after the last iteration. `match`,
  `in_matched` and `in_match_out` hold the result through that clock.
- `ready` is high when idle and also in the `done` clock. A `start` given
  in the `done` clock begins the next round at once, so rounds can run back to
  back.
- Latency from start to done is `N_ITER + 1` clocks. Back to back, one round
  finishes every `N_ITER + 1` clocks.

The critical path is one iteration: a Grant block, then an Accept block, each
made of a wide OR, the per-entry compare and an N-way round-robin search. The
reference point for this scheduler is a 16 x 16 switch at 8 iterations with
about 60 ns for a whole round. That works out to a clock of about 150 MHz for
this implementation. No timing analysis was done here to confirm it.

## The fabric around it (`switch_fabric`)

| block | role |
|---|---|
| `ipp_voq` | Input port. Holds N x P FIFOs of `VOQ_DEPTH` cells. Gives the request row: per output, valid unless paused, with the highest non-empty priority. The row describes the queues as they will be after the cell leaving in this clock. On a match it pops the head of the highest non-empty priority queue for the matched output. `in_ready` drops when the addressed queue is full. |
| `pslip_scheduler` | Builds the matching as described above. |
| `crossbar` | AND-OR multiplexer per output, controlled by the match matrix. |
| `oq_opp` | Output port. Holds one FIFO per priority (`OQ_DEPTH` cells). Delivers to the receiver by strict priority over a valid/ready handshake. Reports `full` (some class queue is full, or is filled by the cell written in this clock) and `empty`. |
| `fcb` | Flow-control broadcast. Pauses requests toward an output from the clock its queue becomes full until that queue has drained completely. |

**Cell time.** The scheduler never rests. In the `done` clock of a round,
every matched input pops its cell. The cell crosses the crossbar
combinationally and is written into the output queue. In that same clock the
next round starts, so scheduling overlaps the transfer. For that to work, the
next round's request matrix and pause vector must describe the state after
this transfer:

- the input ports report their queues minus the cell that is leaving;
- the output ports report `full` including the cell that is arriving.

A cell time is therefore `N_ITER + 1` clocks. Each input and each output moves
at most one cell per cell time. A cell is one `CELL_W`-bit word that carries
its priority alongside it through the crossbar.

**Why nothing overflows.** Requests are sampled at `start`. Between that
sample and `done`, an output queue can only drain. The `full` seen at `start`
already counts any cell written in that clock. So if it is low, the one cell
that can arrive at `done` fits. `fcb` passes `full` straight through to the
pause, so the round starting in the same clock sees it. An
assertion in `oq_opp` checks that no write ever hits a full queue.

## Parameters

| parameter | default | meaning | origin |
|---|---|---|---|
| `N` | 16 | ports | reference configuration (16 x 16) |
| `P` | 4 | priority levels | reference configuration (2-bit codes) |
| `N_ITER` | 8 | iterations per round | reference configuration |
| `CELL_W` | 32 | payload bits per cell | own choice |
| `VOQ_DEPTH` | 4 | cells per VOQ (per output and priority) | own choice |
| `OQ_DEPTH` | 4 | cells per output class queue | own choice |

The defaults live in `rtl/pslip_pkg.sv`. `N` need not be a power of two, and
`P` may be any value of 2 or more.

Other choices made in this implementation:

- Clocking and reset: all registers sit on one clock, with a synchronous
  active-high `rst`. Reset clears every pointer to port 0 and empties every
  queue.
- Pointer storage: the pointers are flip-flops selected by a multiplexer. The
  original scheme uses latches with tri-state outputs on a shared bus. The
  behaviour per round is the same.
- `load` is given in the first iteration only, and to a Grant block only when
  its grant was accepted. This is the iSLIP rule; the original description only
  says the pointer is set past the accepted port.
- Priority encoding: larger code means more urgent. Whether a request exists is
  carried by a separate valid bit per request, so all P codes are usable.

## How far it goes, and where it departs

- **Output scheduling is strict priority only.** The output port processor is
  specified to combine weighted round robin (WRR) with strict priority. The
  WRR weights and how the two combine are not specified, so WRR is left out.
- **The network-processor link is a plain handshake.** In the original
  architecture the fabric talks to the network processors through a CSIX
  interface. Here each port has a plain valid/ready cell interface instead.
  The network processor, the line interfaces and the system processor are
  outside this design.
- **A round uses one clock per iteration.** The reference point is a
  combinational delay (about 60 ns for 16 x 16 at 8 iterations). A round here
  takes `N_ITER + 1` clocks. A cell crosses in a single clock, and that clock
  overlaps the start of the next round. A multi-clock cell, sent while a whole
  round runs, is not modelled.
- **"Occupied" means any class queue is full.** `fcb` pauses an output while
  any of its class queues is full, and resumes only once all of them are empty.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_get_max_priority` | the 00/01/10 corner and random lists, at 2-bit, 1-bit and 3-bit codes, against a plain maximum search |
| `tb_rr_arbitration` | five reference cases of an 8-port arbiter (below), and random 16-port lists |
| `tb_priority_pointers` | random loads per level, and reset |
| `tb_pslip_arbiter` | pick, priority and per-level pointer updates against a model, over 4000 clocks |
| `tb_pslip_controller` | iteration count, `load` only in the first iteration, `done` at `N_ITER+1`, rounds with a gap and rounds started in the `done` clock |
| `tb_pslip_scheduler` | 1500 random rounds at 16 x 16 x 4 x 8 against an independent P-iSLIP model, latency, and use of the later iterations |
| `tb_ipp_voq`, `tb_oq_opp`, `tb_fcb`, `tb_crossbar` | queue, request, priority, flow-control and switching behaviour against reference models |
| `tb_switch_fabric` | 4-port fabric under random light and heavy traffic, checked below |
| `tb_switch_fabric_full` | default-size fabric: a 192-cell burst with all outputs contended, each cell checked, done within a bound of cell times (155 clocks measured: 12 cells per output at 9 clocks each, plus fill time) |
| `tb_iteration_sweep` | matching efficiency against iteration count for N = 8/16/32 and P = 2/4 |

`tb_switch_fabric` checks:

- ordering per (input, output, priority);
- that every cell is delivered.

It also requires each of these to happen at least once:

- a refused arrival;
- a flow-control pause;
- a pair matched in a later iteration;
- a grant decided by priority;
- a high class overtaking a waiting low class;
- a receiver stall.

The five reference arbitration cases (8 ports):

| pointer | requests (bit 7..0) | selected |
|---|---|---|
| 0 | 00010101 | 0 |
| 2 | 11010010 | 4 |
| 6 | 00001100 | 2 (wraps) |
| 7 | 00000000 | none, `is_there` = 1 |
| 5 | 10001111 | 7 |

Matching efficiency from `tb_iteration_sweep` uses 10,000 random request
matrices per row. Each pair requests with probability 1/2 at a random
priority. The figures are the percentage of ports connected after each
iteration:

```
             it1   it2   it3   it4   it5  ... it10
N=8  P=2    65.7  85.4  87.5  87.5  87.5      87.5
N=16 P=2    65.2  87.5  93.1  93.4  93.4      93.4
N=32 P=2    64.8  87.1  95.0  96.5  96.6      96.6
N=8  P=4    65.7  85.3  87.1  87.1  87.1      87.1
N=16 P=4    64.6  87.4  92.9  93.1  93.1      93.1
N=32 P=4    64.1  87.2  95.2  96.5  96.5      96.5
```

The matching saturates after three to five iterations. Larger switches need
more iterations to get there but end at a higher fraction. These trends match
the published evaluation of P-iSLIP (about 88-98 % at saturation). The exact
values depend on the request density, which that evaluation does not state;
1/2 is this testbench's own choice. The first-iteration values here are higher
than the published ones. The likely reason is the different traffic model, but
this has not been confirmed.

## Simulating

Every testbench is self-contained. `pslip_pkg.sv` must be read first; the rest
of `rtl/` is found through the library path:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl +libext+.sv rtl/pslip_pkg.sv tb/tb_pslip_scheduler.sv \
    --top-module tb_pslip_scheduler
./obj_dir/Vtb_pslip_scheduler
```

Substitute any testbench name. `tb_switch_fabric_full` and
`tb_iteration_sweep` take the longest to build (about a minute and a half
each); the sweep then simulates for about ten seconds. To change the configuration, override the parameters of
`switch_fabric` or `pslip_scheduler`, or edit the defaults in `pslip_pkg.sv`.
