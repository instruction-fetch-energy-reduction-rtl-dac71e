# Forward-branch bufferable innermost loop buffer

Most of a small embedded program's instruction fetches come from a few innermost
loops. A loop buffer is a tiny instruction store next to the core: while a loop
runs out of it, the much larger L1 instruction cache (IL1) is not read, and each
fetch costs a fraction of the energy. Simple loop buffers address themselves with
a counter, so they can only hold straight-line code: a loop with an `if` inside
(a forward branch) is either not buffered at all or only up to that branch.
Schemes that can hold arbitrary code need address tags or an address generator,
which cost energy and latency, and usually need compiler hints.

This design keeps the simple counter-addressed, tagless buffer and still holds
loops with forward branches. The trick is to store the **predicted instruction
trace** of one iteration, and to remember, for each forward branch in that
trace, which way it went when the trace was written. That one bit, the
**P-bit**, is kept in the branch's existing BTB entry. Whenever the loop is
served from the buffer, the branch predictor's current prediction for each
forward branch is compared with its P-bit. While they agree, the core would
fetch exactly the stored trace, so the buffer can keep serving it with a plain
counter. When they disagree, the buffer either hands over to IL1 or rewrites the
rest of the trace along the other path.

The cost is one bit per BTB entry: next to a 21-bit tag, a 32-bit target and a
2-bit counter that is under 2 % more BTB storage. Nothing in the instruction set
changes and no compiler help is needed: loops are found in hardware from taken
backward branches.

The RTL implements the scheme of "Instruction Fetch Energy Reduction Using
Forward-Branch Bufferable Innermost Loop Buffer" (the HCLB design, HCLB-1 and
HCLB-2 fill strategies). Where the original description leaves details open,
the choices made here are listed in [Own choices](#own-choices-and-departures).

## Where it sits

```
             fetch address                     prediction (next address)
   core  ───────────────┬───────────────────────────────▲──────────────┐
                        │                               │              │
                        ▼                               │              │
              ┌──────────────────┐   lookup / P-bit  ┌──┴──┐           │
              │ loop buffer      │◄─────────────────►│ BTB │◄── branch │
              │ controller (FSM) │                   └─────┘  resolution
              └──┬────────┬──────┘                   (execute stage)
        il1_en   │        │ lb_we / lb_re / lb_addr
                 ▼        ▼
              ┌─────┐  ┌─────────────┐
              │ IL1 │─►│ loop buffer │
              └──┬──┘  └──────┬──────┘
                 │            │
                 └──►[ mux ]◄─┘ sel_lb
                        │
                        ▼ instruction to the core
```

`hclb_top` contains the BTB, the controller, the loop buffer and the mux. The
core and IL1 are outside it and connect through its ports.

| Module | What it is |
|---|---|
| `hclb_pkg` | shared types: addresses, instructions, controller states and actions, the 2-bit counter encoding, the BTB lookup bundle |
| `loop_buffer` | tagless array, one 32-bit instruction per entry, one write and one read port |
| `btb` | 512-set 4-way BTB; entry = tag, target, 2-bit bimodal counter, P-bit |
| `hyst_ctr` | update rule of the 2-bit counter, used by `btb` |
| `loop_buffer_controller` | IDLE / FILL / ACTIVE state machine, S_addr register, fill/read counter |
| `fetch_mux` | loop buffer or IL1 to the core |
| `hclb_top` | the front end wired together |

## The stored trace

The buffer is filled from entry 0 with the instructions in the order the core
fetches them, so a forward branch predicted taken is followed by its target, not
by its fall-through. For a nine-instruction loop with a forward branch at C3 to
C6:

```
 C1  L:                 taken trace    entry: 0  1  2  3  4  5  6
 C2                                          C1 C2 C3 C6 C7 C8 C9   P-bit(C3)=1
 C3  bne A
 C4                     not-taken      entry: 0  1  2  3  4  5  6  7  8
 C5                     trace                C1 C2 C3 C4 C5 C6 C7 C8 C9   P-bit(C3)=0
 C6  A:
 C7
 C8
 C9  bne L
```

The controller keeps the loop's start address (`S_addr`), the address of its
closing backward branch (`S_end`) and the number of stored instructions. In
ACTIVE the core keeps producing fetch addresses and the BTB keeps being looked
up; the controller only needs the lookup to know whether the current
instruction is a forward branch and what its prediction and P-bit are, and
whether it is the loop end (where the read counter wraps to 0).

## The controller

Three states. Each cycle the controller also reports the action it took
(`lbc_action`), using the letters of the loop buffer state diagram.

| From | Action | Condition | To |
|---|---|---|---|
| IDLE | A | watching for a loop; IL1 serves | IDLE |
| IDLE | B | a loop was detected and it is not the stored one | FILL |
| IDLE | C | a loop was detected and it is the stored one | ACTIVE |
| FILL | D | IL1 serves, the instruction is also written to the buffer | FILL |
| FILL | E | the loop-end branch was written and is predicted taken | ACTIVE |
| FILL | F | buffer full before the loop end (BIG loop) | IDLE |
| FILL | G | misprediction, predictor went strong → weak | IDLE |
| FILL | H | misprediction, predictor went weak → strong: refill the other path | FILL |
| ACTIVE | I | the buffer serves, IL1 is not read | ACTIVE |
| ACTIVE | J | a forward branch's prediction ≠ its P-bit, predictor weak | IDLE |
| ACTIVE | K | any misprediction | IDLE |
| ACTIVE | L | the last entry of a BIG loop was served | IDLE |
| ACTIVE | M | a forward branch's prediction ≠ its P-bit, predictor strong | FILL |
| FILL/ACTIVE | EXIT | the predicted flow leaves the loop (added, see below) | IDLE |

IL1 is read in IDLE and FILL, the loop buffer is written in FILL and read in
ACTIVE; both are never read for the same fetch.

### Finding a loop, and the one-cycle compare

A loop candidate is a BTB hit whose target lies at or below the branch and which
is predicted taken. With `FILL_STRATEGY = 1` (HCLB-1) the first such branch
starts a candidate. With `FILL_STRATEGY = 2` (HCLB-2) a register holds the last
taken backward branch and the candidate starts only when the same branch comes
again without having resolved not taken in between. HCLB-2 fills fewer loops
that turn out to be short-lived; HCLB-1 serves loops one iteration earlier.

The candidate's start address is compared with `S_addr` in the cycle after the
backward branch, which is also the cycle in which the loop's first instruction
is fetched. That instruction therefore still comes from IL1:

```
cycle   t          t+1                     t+2
fetch   loop end   loop start (IL1)        2nd instruction
        (taken)    compare with S_addr     C: buffer entry 1
                                           B: written entry 0 at t+1, entry 1 now
```

### Mispredictions while filling (G and H)

Fill runs in the fetch stage on predicted flow; branches resolve `PIPE_P`
cycles later in execute. When a branch inside the loop turns out mispredicted,
the last `PIPE_P` fetches were wrong-path: `PIPE_P − 1` were already written to
the buffer and the one in the resolving cycle is squashed. The predictor's
state change decides what happens:

* **strong → weak (G)**: the prediction for that branch has not changed
  direction, so next time the same wrong path would be predicted again.
  Filling is abandoned and the stored loop is marked invalid.
* **weak → strong (H)**: the prediction has flipped. The fill counter moves
  back by `PIPE_P − 1` entries to the entry right after the branch, the
  branch's P-bit is set to its real direction, and filling continues along the
  correct path.

Skipping the refill on a strong → weak change is what keeps a branch that
alternates from making the buffer refill on every iteration.

The count-back is exact only if the core fetches one instruction every cycle
while the buffer fills, so that exactly `PIPE_P` fetches separate a branch from
its resolution. A core with fetch stalls would have to carry the buffer entry
index down the pipeline instead.

The 2-bit counter uses the update rule under which a misprediction can move it
either way: a misprediction in a strong state goes to the weak state of the same
direction, a misprediction in a weak state goes to the strong state of the other
direction, and a correct prediction goes to the strong state.

### Loop buffer misses while active (J and M)

When a forward branch is fetched from the buffer and its prediction differs from
its P-bit, the rest of the stored iteration is on the wrong path. The branch
itself is still served from the buffer. If the predictor is weak (J) the
controller simply hands the rest of the iteration to IL1; the stored trace stays
valid and will be used again once the prediction swings back. If the predictor
is strong (M) the new direction is expected to last: the P-bit is flipped and the
buffer is refilled from the entry after the branch, through FILL, to the loop
end.

### BIG loops (F and L)

A loop longer than the buffer is stored in part: its first `LB_ENTRIES`
instructions. The controller goes back to IDLE when the buffer is full (F) and,
each later iteration, when the last stored entry has been served (L), so IL1
supplies the rest of the iteration.

### Mispredictions while active (K)

Any misprediction means the core is redirecting fetch. The controller goes to
IDLE but keeps the buffer contents, so the next iteration of the same loop goes
straight back to ACTIVE through C.

## Interface and timing of `hclb_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (controller to IDLE, BTB emptied) |
| `if_valid`, `if_pc` | in | 1, 32 | fetch request, one per cycle |
| `if_instr` | out | 32 | the instruction, same cycle |
| `if_pred_taken`, `if_pred_target` | out | 1, 32 | BTB prediction for `if_pc`; the core uses it for its next address |
| `ex_valid`, `ex_pc`, `ex_taken`, `ex_target` | in | 1, 32, 1, 32 | a conditional branch resolved in execute (decoded target, taken or not) |
| `ex_mispredict` | in | 1 | that branch was mispredicted; the core squashes the fetch of this cycle and all younger ones and redirects |
| `il1_en`, `il1_addr` | out | 1, 32 | IL1 read request |
| `il1_instr` | in | 32 | IL1's instruction, expected in the same cycle |
| `lbc_state`, `lbc_action` | out | 2, 4 | controller state and action, for counters and debug |

Everything is single-cycle: the BTB lookup, the loop buffer read and the
IL1 word all arrive combinationally in the fetch cycle, and state, the buffer
and the BTB update at the clock edge. A branch is expected to resolve exactly
`PIPE_P` cycles after its fetch. Addresses are byte addresses of 32-bit
instructions; bits [1:0] are ignored.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `LB_ENTRIES` | 256 | loop buffer entries (1 KB). Configurations of 16…512 entries (64 B…2 KB) were evaluated for this scheme; 256 with HCLB-1 and 128 with HCLB-2 saved the most fetch energy |
| `FILL_STRATEGY` | 1 | 1 = HCLB-1, fill on the first taken backward branch; 2 = HCLB-2, on the second in succession |
| `PIPE_P` | 2 | cycles from fetch to branch resolution (a five-stage pipeline); this design's choice |
| `BTB_SETS`, `BTB_WAYS` | 512, 4 | BTB organisation of the evaluated configuration |

## Own choices and departures

These are not fixed by the scheme's description and were chosen here:

* **Loop end register (`S_end`) and valid bit.** A loop matches the stored one
  only if both its start and its end branch match; the end address is also
  where the read counter wraps.
* **EXIT transition.** FILL and ACTIVE also return to IDLE when the predicted
  flow leaves the loop: the loop-end branch predicted not taken, another
  backward branch predicted taken while filling (not an innermost loop), or a
  forward branch predicted to jump past the loop end. The original state
  diagram has no transition for these cases.
* **BTB evictions.** Replacing a valid BTB entry may lose a P-bit, so it
  invalidates the stored loop.
* **Detection on prediction.** "Taken" for loop detection means predicted taken
  at fetch, since the buffer is filled from the fetch stream. With a cold BTB
  the loop-end branch is unknown in the first iteration, so a new loop is
  filled in its third iteration rather than its second (HCLB-1).
* **IL1 address.** The fetch address goes to IL1 directly; the controller only
  enables or idles the IL1 read.
* **BTB policy.** Every resolved branch is allocated on a miss (first free way,
  otherwise per-set round robin), with a weak counter in its direction and
  P-bit 0. A forward branch that misses in the BTB while filling is predicted
  not taken, so P-bit 0 matches the trace written for it.
* **Counter rule**, **`PIPE_P`**, single-cycle memories and the one-fetch-per-cycle
  requirement of the count-back, as described above.
* IL1 and the core are not part of the RTL.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_loop_buffer` | all 256 entries written and read back, random traffic against a reference array |
| `tb_fetch_mux` | random selections |
| `tb_btb` | 8-set 2-way BTB under random lookups, updates and P-bit writes against a reference model; a directed walk through the counter states |
| `tb_loop_buffer_controller` | directed, cycle by cycle, on the nine-instruction example loop above and a second loop with an 8-entry buffer: every action A–M, buffer addresses, P-bit writes, the compare delay, the H count-back; a second controller checks that HCLB-2 waits for the second taken branch |
| `tb_hclb_top` | the whole front end at default parameters with a model core and IL1 running a random program of eight innermost loops (0–3 forward branches each, one loop longer than the buffer) for at least 400 000 fetches; every delivered instruction is checked against IL1's word for its address, IL1 must be idle exactly when the buffer serves, the compare delay is checked at every C, and every action A–M must occur |
| `tb_hclb_top_fill2` | the same with `FILL_STRATEGY = 2` |
| `tb_hclb_size_sweep` | twelve front ends side by side on one program: buffers of 16…512 entries (64 B…2 KB), each with both fill strategies; correctness checks as above, and a report of loop buffer and IL1 access shares and of fetch energy |
| `tb_hclb_pkg` | direction and strength decode of each counter state |
| `tb_hyst_ctr` | the counter update rule, state by state and outcome by outcome |

The end-to-end run also prints the share of fetches served by the loop buffer
(about 75 % for HCLB-1 and 69 % for HCLB-2 on its synthetic program).

The size sweep estimates fetch energy relative to a front end without a loop
buffer as `R_IC + (E_LB / E_IC) · R_LB`, where `R_IC` and `R_LB` are the
shares of fetches that read IL1 and the loop buffer (a fill reads both) and
`E_LB / E_IC` is the energy of one loop buffer access, controller included,
relative to one IL1 access: 6.91 %, 7.44 %, 8.65 %, 11.53 %, 18.8 % and
34.23 % for 64 B…2 KB. On the synthetic program:

| Buffer | HCLB-1 R_LB | HCLB-1 energy saved | HCLB-2 R_LB | HCLB-2 energy saved |
|---|---|---|---|---|
| 64 B | 27.6 % | 26.0 % | 26.3 % | 24.8 % |
| 128 B | 37.2 % | 34.8 % | 35.4 % | 33.1 % |
| 256 B | 45.7 % | 42.2 % | 43.5 % | 40.1 % |
| 512 B | 58.2 % | 52.0 % | 55.6 % | 49.6 % |
| 1 KB | 73.1 % | 59.8 % | 70.0 % | 57.2 % |
| 2 KB | 76.3 % | 50.6 % | 73.0 % | 48.4 % |

These numbers depend entirely on the synthetic loop mix (loops of 3…40
instructions and one of 300); they show the trend, not the figures of a real
benchmark suite: beyond 1 KB the buffer catches little more, while each access
costs much more.

To run one, with Verilator 5:

```
verilator --binary --timing --assert -Wno-TIMESCALEMOD -Irtl -Itb -y rtl \
    rtl/hclb_pkg.sv tb/tb_hclb_top.sv --top-module tb_hclb_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_hclb_top` with any other testbench name. All RTL is synthesizable
SystemVerilog-2017; the BTB and loop buffer arrays are plain arrays that a
synthesis tool maps to memories. The controller carries assertions that the
loop buffer is never read and written in the same cycle and that a buffer read
never coincides with an IL1 read.
