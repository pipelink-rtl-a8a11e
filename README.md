# Pipelined sharing of a stateful function in a dataflow circuit

A dataflow circuit has no central state machine. Each operator fires when its
input tokens arrive and passes results on over handshake channels, so the
circuit pipelines itself. Sharing one hardware unit `f` between several call
sites is hard in such a circuit. If `f` has side effects (it updates a static
variable or a memory), the calls must reach it in program order. If `f` is
pipelined, many calls may be inside it at once. First-come-first-served
arbitration gives neither guarantee without blocking.

This RTL solves it with a separate **control token network** that runs next to
the datapath. The network looks only at the program's control flow (branch and
loop conditions). From that it computes:

- the order in which the call sites use `f`;
- the select tokens for the **collection** tree of MERGE elements, which feeds
  arguments into `f`;
- the select tokens for the **delivery** tree of SPLIT elements, which returns
  results to the callers.

Because the control tokens do not depend on data, they are usually ready early.
FIFOs in front of the SPLITs let the network run several calls ahead of the data.

The design here links one concrete program:

```c
y0 = f(x0);              // call site f^0
if (c) y1 = f(x1);       // call site f^1
while (d) y2 = f(x2);    // call site f^2
```

By default, `f` counts its calls (`static int count; count++;`) and returns
`x + count`. Any reordering of calls therefore shows up in the results.

With `SHARE_MEM=1`, `f` is instead a memory access `A[x]++` on a 64-word array,
returning the new value. Memory is shared by exactly the same network as
functions: an access is simply a call with side effects on the array.

## Use-resource sequences

The control network carries **use-resource sequences**: one-bit token streams
that encode, in run-length form, how often one part of the program calls `f`
during one execution. Each `1` grants one call. A `0` closes that part's
accesses for the current execution.

| program part | sequence |
|---|---|
| a single call | `1, 0` |
| a part that calls `f` three times | `1, 1, 1, 0` |
| a part with no call | `0` |

Sequences of larger program parts are built from smaller ones by three
composition elements. Each one also emits **dp** tokens, one per `1`, that
steer its level of the MERGE/SPLIT trees:

| element | inputs | behaviour | dp |
|---|---|---|---|
| `actn_seq` (`S; T`) | `t0`, `t1` | Forwards the `1`s of `t0`, then drops `t0`'s `0` and switches to `t1`. Forwards the `1`s of `t1`, then forwards `t1`'s `0` and switches back to `t0`. | `0` for each `1` of `t0`, `1` for each `1` of `t1` |
| `actn_if` (`if (c) S else T`) | `c`, `ts`, `tt` | Reads `c`. Forwards the `1`s of the selected branch only, drops that branch's `0`, then appends one `0`. | `1` for the then branch, `0` for the else branch |
| `actn_loop` (`while (c) B`) | `c`, `tb` | For each true `c`, forwards the `1`s of one body sequence and drops its `0`. A false `c` emits the closing `0`. | none (a loop has one body) |

For example, `f(a); f(b);` with both sources at `1,0` gives `t = 1,1,0` and
`dp = 0,1`. The `actn_seq` testbench checks exactly this case.

The base case, `use_resource_src`, offers `1,0,1,0,...` and has no trigger.
Because it is always valid, every `1,0` it supplies is the same for every
execution. The composing element reads it only when the program reaches that
call site: `actn_if` ignores its untaken branch, and `actn_loop` reads a body
sequence only for a true condition.

## How the pieces are linked (`pipelink_top`)

```
 src0 ──────────────────────────────┐
 src1 ─┐                            │t0
  "0" ─┤ actn_if ── t_if ─┐         │
    c ─┘   │dp_if         │t0       │
 src2 ─┐   │         actn_seq(in) ──┤t1
    d ─┴ actn_loop ── t_loop┘ │dp_in  actn_seq(out) ── t (program sequence)
           │                  │          │dp_out
           ▼                  ▼          ▼
      fork → MERGE_if    fork → MERGE_in fork → MERGE_out
      fork → FIFO → SPLIT_if  ... FIFO → SPLIT_in  ... FIFO → SPLIT_out

 collection:  x1 → MERGE_if(in1) → MERGE_in(in0);  x2 → MERGE_in(in1)
              x0 → MERGE_out(in0); MERGE_in → MERGE_out(in1) → f
 delivery:    f → SPLIT_out: out0 → y0, out1 → SPLIT_in
              SPLIT_in: out1 → y2, out0 → SPLIT_if: out1 → y1
```

Each dp stream goes through an eager two-way fork (`token_fork`). One copy
selects at the MERGE of the same nesting level. The other copy waits in a
`token_fifo` until the matching SPLIT receives the result from `f`.

The trees mirror the program's nesting. A call from inside the loop passes
through two levels:

- `MERGE_out` selects its input 1 (the "second part" of the outer SEQ);
- `MERGE_in` selects its input 1 (the "loop" part of the inner SEQ).

The else part of the `if` contains no call. So the else input of `actn_if` is a
constant `0` stream, `MERGE_if` input 0 is tied off, and `SPLIT_if` output 0
never fires. An assertion checks that it never fires.

Why the order is correct: each MERGE accepts a data token only together with
its select token. Select tokens are produced in program order, so arguments
enter `f` in program order. `f` keeps its results in order. The delivery FIFOs
replay the same select tokens, so each result returns to its own caller.
Neither the callers nor `f` have to wait for each other beyond the data
dependencies.

### Ports of `pipelink_top`

All channels are `valid`/`ready`/`data`. A token moves on a rising clock edge
when both `valid` and `ready` are high.

| channel | dir | width | meaning |
|---|---|---|---|
| `x0`, `x1`, `x2` | in | `DW` | Arguments of the three call sites. |
| `c` | in | 1 | `if` condition, one token per program run. |
| `d` | in | 1 | `while` condition, one token per loop test: `1` per iteration, then `0`. |
| `y0`, `y1`, `y2` | out | `DW` | Results, in each caller's call order. |
| `t` | out | 1 | Use-resource sequence of the whole program: one `1` per call, then `0` per run. It would feed an enclosing composition element in a larger program. |

Reset is synchronous and active low (`rst_n`). It empties every stage.

| parameter | default | meaning |
|---|---|---|
| `DW` | 32 | Data width; arguments are C `int`. |
| `FIFO_DEPTH` | 4 | Depth of each delivery-end FIFO: how many calls the control can run ahead per SPLIT. |
| `F_STAGES` | 3 | Pipeline depth of `f`. |
| `SHARE_MEM` | 0 | `0`: `f` is the call-counting function (`shared_func`). `1`: `f` is the memory access `A[x]++` (`shared_mem_inc`). |
| `MEM_WORDS` | 64 | Array size when `SHARE_MEM=1`. The argument's low `log2(MEM_WORDS)` bits index it. |

### Timing

Every dataflow element (`actn_*`, `df_merge`, `df_split`) registers its outputs.
Each is one pipeline stage and handles one token per cycle. A stage may refill
in the same cycle its content leaves.

`token_fifo` has a register-array read path:

- a written token can be read in the next cycle;
- a full FIFO accepts a write in a cycle in which it is read.

`token_fork` adds no delay.

`shared_func` and `shared_mem_inc` return a result `F_STAGES` cycles after
accepting the call and accept one call per cycle. `shared_mem_inc` does its
read-modify-write in the cycle it accepts the access, in arrival order. So back
to back accesses to one word need no forwarding. A stall at the output of
either propagates back stage by stage.

Argument path: an argument reaches `f` after one to three MERGE stages,
depending on its nesting level. Return path: the result reaches the caller
after one to three SPLIT stages. This holds once the select tokens are
waiting, which is the normal case because the control runs ahead.

The use-resource sources keep offering tokens. As a result, after the last
data of a run the control network may already have issued the first `1` of the
next run on `t`.

## Files

| file | content |
|---|---|
| `rtl/pipelink_pkg.sv` | Token types and encodings (`UR_USE`, `UR_END`, `DP_FIRST`, `DP_SECOND`). |
| `rtl/use_resource_src.sv` | Base-case sequence `1,0` of a single call site. |
| `rtl/actn_seq.sv`, `rtl/actn_if.sv`, `rtl/actn_loop.sv` | The three composition elements. |
| `rtl/df_merge.sv`, `rtl/df_split.sv` | Two-way MERGE (collection) and SPLIT (delivery). |
| `rtl/token_fifo.sv` | Delivery-end FIFO for select tokens. |
| `rtl/token_fork.sv` | Eager fork of a select stream to a MERGE and a FIFO. |
| `rtl/shared_func.sv` | Example shared function with a call counter, pipelined. |
| `rtl/shared_mem_inc.sv` | Shared memory resource performing `A[i]++`, pipelined. |
| `rtl/pipelink_top.sv` | The linked three-call-site program. |
| `tb/tb_<module>.sv` | Self-checking testbench of each module. |
| `tb/tb_pipelink_top_mem.sv` | End-to-end test with `SHARE_MEM=1`. |
| `tb/tb_pipelink_top_slack.sv` | End-to-end test with FIFO depth 2 and a 7-stage `f`. |
| `tb/tb_stream_src.sv`, `tb/tb_stream_sink.sv` | Random-rate token source and sink used by the testbenches. |

## Simulating

Each testbench prints one line, `TB_RESULT checks=N failures=M`, and ends with
`$finish`. Each also has a cycle watchdog that fails the test if it hangs. For
example:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_pipelink_top -y rtl -y tb +libext+.sv \
  rtl/pipelink_pkg.sv tb/tb_pipelink_top.sv -o sim
./obj_dir/sim
```

`tb_pipelink_top` runs the top at its default parameters. It runs 150 random
program runs (about 540 calls):

- random `c`;
- loop trip counts from 0 to 4;
- random valid on every input and random ready on every output.

A reference model numbers the calls in program order. The test checks that
every caller gets `x + i` for its `i`-th call overall, and that `t` matches the
program.

It also counts how often each mechanism occurred, and fails if any never did:

- `if` taken and not taken;
- zero-trip and multi-trip loops;
- the SEQ serving its second part;
- every delivery FIFO holding two or more tokens ahead of the data, and a full
  FIFO;
- two or more calls in flight in `f`;
- a MERGE holding a select token while its data is late;
- back-pressure on results.

The element testbenches check the following:

| testbench | checks |
|---|---|
| SEQ, IF, LOOP | The sequence rules with random lengths and random stalls. |
| MERGE, SPLIT | Routing. |
| FIFO | Order, the full condition and read-while-full. |
| `tb_shared_func`, `tb_shared_mem_inc` | Results, the latency of `F_STAGES` cycles and one result per cycle. |

`tb_pipelink_top_mem` repeats the end-to-end test with the memory resource. It
draws the indices from only six words, so calls from different sites often
update the same word in quick succession. A reference array applied in program
order must match every returned value.

`tb_pipelink_top_slack` repeats it with FIFO depth 2 and a 7-stage `f`. The
network is deterministic: buffer sizes and latencies change only the timing,
never which result goes where. The same reference model must therefore still
match.

## Where this design departs from, or goes beyond, the method

- **Clocked instead of asynchronous.** The method targets asynchronous
  circuits: bundled-data channels with 4-phase handshakes and micropipeline
  stage control. Here every channel is a synchronous `valid`/`ready` handshake
  and every element is a clocked register stage. The token-level behaviour is
  the same. The energy and delay results reported for asynchronous
  implementations do not carry over.
- **The linked program is an example.** In the method, a compiler builds the
  control network from the call graph of each program. This RTL is one
  hand-linked instance. It nests all three composition elements: SEQ at two
  levels, IF and LOOP inside. For another program, instantiate the same
  elements following its structure: a SEQ per sequence, an IF per branch, a
  LOOP per loop, and a MERGE/SPLIT/FIFO per SEQ or IF level.
- **The body of `f` is invented.** The method only requires that `f` may have
  side effects. The counter and the `x + count` formula exist to make ordering
  errors visible. The same holds for the memory option: `A[i]++` returning the
  new value, a register array cleared at reset, and 64 words.
- **Unspecified details, chosen here:**
  - FIFO depth 4;
  - `f` depth 3;
  - two-input MERGE and two-output SPLIT;
  - an eager fork for the select streams;
  - base-case sources without a trigger;
  - synchronous active-low reset.
- **Not provided:**
  - the compiler passes that generate such networks;
  - the asynchronous control circuits;
  - the benchmark datapaths that the method was evaluated on.
