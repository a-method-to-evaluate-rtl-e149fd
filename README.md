# Exact evaluation of logic functions with unknown inputs on LUT rings

Logic simulators often have to evaluate a two-valued function `f` while some
inputs are unknown (`u`). Simulating gate by gate with three-valued gates is
fast but loose. For `f = ~x1·x2 | x1·x3` with `(x1,x2,x3) = (u,1,1)`, the
inverter, both AND gates and the OR gate all give `u`. Yet `f` is 1 whichever
value `x1` takes. The exact answer is the *regular ternary* (RT) value:

* `0` if every way of filling in the unknowns gives `f = 0`,
* `1` if every way gives `f = 1`,
* `u` only if both occur.

This RTL computes RT values in hardware, in time linear in the length of a
LUT cascade. It implements the method of the paper "A Method to Evaluate
Logic Functions In the Presence of Unknown Inputs Using LUT Cascades". The
main idea is to split every ternary signal into two binary rails. The RT
function then becomes two ordinary binary functions, and ordinary lookup
tables (LUTs) can compute them.

## Double-rail code

Each ternary value travels as a pair `{L,H}` (`rt_pkg::tern_t`):

| value | L | H | read as |
|---|---|---|---|
| 0 | 1 | 0 | "may be 0" |
| 1 | 0 | 1 | "may be 1" |
| u | 1 | 1 | may be either |
| (unused) | 0 | 0 | flagged as an input error |

For an output, `F_L = 1` exactly when some filling-in of the unknowns gives
`f = 0`. Likewise `F_H = 1` exactly when some filling-in gives `f = 1`. Both
are binary functions of the `2n` input rails. They are undefined where an
input pair is `(0,0)`. That leaves `4^n − 3^n` don't-care combinations, which
keep the LUTs small.

Unate variables make the rail functions cheaper still. Suppose `f` grows
monotonically with `x_i`. Then `F_L` needs only `x_iL` and `F_H` needs only
`x_iH`. For a fully monotone `f`, `F_H = f(x_H)`: `f` evaluated with every
unknown set to 1. Likewise `F_L = ~f(~x_L)`: `f` evaluated with every unknown
set to 0, then inverted. Such a function needs no more cascade rails than
`f` itself.

## Top level: two LUT rings (`rt_eval_top`)

`rt_eval_top` holds two identical LUT rings. Ring L is programmed with the
cascades of `F_L` for all outputs, and ring H with those of `F_H`. Both rings
capture the same input vector `x` (an array of `tern_t`) on `start` and run
in parallel. Output `j` is decoded from `(f_l[j], f_h[j])` into `y[j]`.

The two rings may need different numbers of LUT steps. `done` pulses one
clock after the slower ring finishes. The outputs then hold until the next
`start`. A `start` is accepted while idle and in the `done` cycle itself, so
evaluations can follow each other without a gap. At other times while busy
it is ignored.

Both rings are loaded through one write bus, with `prog_ring` selecting
L (0) or H (1):

* `prog_lut_*` writes one 16-bit LUT word;
* `prog_ic_*` writes one program entry.

Load only while `busy` is low; an assertion checks this. `in_err` reports an
input pair `(0,0)`.

## The LUT ring (`lut_ring`)

A fixed LUT cascade has fixed input and output counts per LUT, so it covers
only functions of that shape. The ring emulates any cascade that fits in its
memory. It applies the LUTs one after another, one per clock, from a single
large memory. Its parts are named after the blocks of the ring architecture:

| part | module | what it does here |
|---|---|---|
| Input Register | `ring_in_reg` | captures `{x_H, x_L}` on start, flags `(0,0)` pairs |
| Memory for Interconnection | `ic_mem` | one program entry per LUT step, asynchronous read |
| Programmable Connection Network | `conn_net` | builds the LUT address of the step |
| Memory for LUT | `lut_mem` | 2^20 words × 16 bits; all LUTs of all cascades, synchronous read |
| Control | `ring_ctrl` | IDLE → RUN (one clock per step) → FLUSH → done |
| Output Register | `ring_out_reg` | cleared on start; each step may write any of its output bits anywhere |

### How a step works

The **rails** between two cascade cells are simply the 16-bit word read in
the previous step. Each step does the following:

1. Each of the 15 local address bits of the step's LUT takes one of these
   sources:
   * a rail bit of the previous word;
   * one input rail bit;
   * constant 0.
2. The local address is added to the LUT's base word, and that word is read.
3. In the next clock, the step's selected word bits are copied into the
   output register.

The first LUT of a cascade selects no rail bits, so one ring can run several
cascades back to back. Intermediate outputs come from any LUT of a cascade,
not only the last.

### Program entry (`rt_pkg::ic_entry_t`, 254 bits)

| field | width | meaning |
|---|---|---|
| `base` | 20 | first word of this LUT in the LUT memory |
| `sel[i]`, i = 0..14 | 7 each | source of local address bit i (numbering below) |
| `out_idx[j]`, j = 0..15 | 7 each | output position for LUT output bit j |
| `out_en` | 16 | which LUT output bits are written to the output register |
| `last` | 1 | this is the final step of the program |

Source numbers (`sel`):

| range | source |
|---|---|
| 0–15 | rail bit j, the previous word's bit j |
| 16–65 | `x_L` of variable 0–49 |
| 66–115 | `x_H` of variable 0–49 |
| 116 and above | constant 0 |

Each LUT occupies a block of words of its own, starting at `base`. Giving a
LUT with k address bits its own `2^k` words keeps the memory dense. Steps are
stored from program address 0. Execution stops at the step marked `last`, or
at address 255 if no step is marked.

### Timing

Take a program of S steps, started at clock edge 0 (`start` high before it):

| edge | what happens |
|---|---|
| 0 | inputs captured, output register cleared, step counter = 0 |
| 1 … S | step s−1 reads its LUT word (`run` high in the cycle before) |
| 2 … S+1 | the word of the previous step is written to the output register |
| S+1 | `done` goes high for one cycle |

Evaluation therefore takes one LUT-memory reference per cascade level, plus
one clock. A three-level cascade takes three memory references, as the
method intends.

## Programming a function

The hardware does not decompose functions itself. The LUT contents and the
program entries are computed beforehand, for example from a BDD of `F_L` and
`F_H`, by iterative functional decomposition. The end-to-end testbench shows
a construction that is exact by design and easy to reproduce:

* The rails of a cascade carry the *set* of states of the underlying binary
  cascade that are still possible.
* Each LUT maps (set of possible states, input rails of its group) to the
  set of possible next states. It enumerates the states in the set and every
  completion of the group's unknown inputs.
* An output bit then says "a state with bit 0 = 0 is reachable" (`F_L`) or
  "… = 1 is reachable" (`F_H`).

With four binary states this needs four rails and leaves ten address bits for
five ternary inputs. Ring L stores the `F_L` bit of each word and ring H the
`F_H` bit. Both rings may hold identical LUT words.

## Fixed cascades (`lut_cascade`, `dr_cascade_pair`)

`lut_cascade` is the fixed form of the method. It is a chain of LUTs, each
addressed by the previous cell's rails and its own primary inputs. It has
one `lut_mem` per cell and runs as a pipeline:

* one vector per clock;
* a latency of `N_CELLS` clocks;
* the inputs of cell k are delayed k clocks to meet their rails;
* all cell outputs are delayed to appear together.

Of each 16-bit cell word, bits `[RAILS-1:0]` feed the next cell. Bits
`[15:RAILS]` leave the cascade as that cell's outputs.

`dr_cascade_pair` realises a *partially unate* function: binate in `N1 = 4`
variables `X1` and unate in `N2 = 11` variables `X2`. It uses two 2-cell
cascades:

* the `F_L` cascade reads `X1L, X1H`, then `X2L`;
* the `F_H` cascade reads `X1L, X1H`, then `X2H`.

Variables in which `f` is negative are made positive by swapping their two
rails (`x2_neg`). This saves the input width a general double-rail cascade
would need. `rt_eval_top` carries one instance with its own `cp_*` ports,
independent of the rings.

## Sizes and what fits

All sizes are constants in `rt_pkg`:

| constant | value | origin |
|---|---|---|
| `LUT_IN` | 15 | the paper's LUT limit |
| `LUT_OUT` | 16 | the paper's LUT limit |
| `N_VARS` | 50 | chosen: the largest input count among the paper's benchmarks |
| `N_OUTS` | 73 | chosen: the largest output count among them |
| `MEM_AW` | 20 (2^20 × 16 bits = 16 Mbit per ring) | chosen |
| `PROG_AW` | 8 (256 steps) | chosen |

The paper's benchmarks use up to 27 cascade levels, up to 7 cascades per rail
function, and up to about 10.9 Mbit of LUTs per rail function. All of them
fit the input, output and step limits. Whether the LUTs fit in 2^20 words
depends on how many output bits each LUT has, which is not published. Rail
functions under 1 Mbit certainly fit. Larger ones fit if their LUTs average
more than (LUT bits ÷ 2^20) outputs each, e.g. more than 11 outputs for
10.9 Mbit.
Raise `MEM_AW` if needed. Changing `N_VARS` or `N_OUTS` changes the program
entry width automatically.

## Departures and own choices

What follows the paper:

* the double-rail code;
* separate rings for `F_L` and `F_H`;
* the list of ring parts;
* rails as the links between cells;
* the two-cascade split for partially unate functions;
* the 15-input / 16-output LUT limit.

These are this design's own choices:

* the program-entry format;
* the one-step-per-clock pipeline with a synchronous LUT memory and an
  asynchronous program memory;
* the write ports and the start/done handshake;
* detection of the `(0,0)` code;
* the output scatter by position;
* the pipelining of the fixed cascades;
* all sizes other than the LUT limits.

The paper draws the output register as fed through the connection network.
Here the network only forms addresses, and the output register does its own
selection from the same program entry.

In the paper, a monotone function's `F_L` cascade ends in an inverter; here
the inversion is stored in the LUT contents. Nothing here generates LUT
contents from a function description; that is left to software.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_lut_mem`, `tb_ic_mem` | read-back against a shadow copy, hold, read-during-write |
| `tb_conn_net` | random entries against a bit-by-bit address model |
| `tb_ring_in_reg`, `tb_ring_out_reg` | capture/hold, `(0,0)` flag, scatter against a model |
| `tb_ring_ctrl` | step sequence, S+1 latency, single-cycle done, start ignored while busy, program wrap |
| `tb_lut_ring` | random programs of 1–30 steps on random LUT words against a step model, S+1 latency |
| `tb_lut_cascade` | random contents, streaming inputs, latency and throughput |
| `tb_dr_cascade_pair` | a random partially unate function with negative variables, against brute force |
| `tb_rt_eval_top` | end to end at full size (see below) |
| `tb_table61_shapes` | programs shaped like each published benchmark (below) |

`tb_rt_eval_top` runs the top at full size and checks all 73 outputs of
about 300 vectors. The expected values are computed by enumerating every
completion of the unknowns. It loads three cascades per ring:

* 4 LUTs with an intermediate output;
* 3 LUTs with an intermediate output;
* the example `~x1·x2 | x1·x3`, as 1 LUT in ring L and 2 in ring H.

It also:

* covers the worked vectors `(0,0,u) → 0`, `(u,1,1) → 1` and `(u,1,u) → u`;
* counts vectors where gate-by-gate ternary simulation would have said `u`
  but the exact value is definite;
* checks the 10-clock latency set by the slower ring;
* checks the `(0,0)` flag;
* checks the fixed cascade pair against the ternary AND table.

`tb_table61_shapes` reproduces the shape of each published benchmark
realisation. Each ring gets as many cascades of as many levels as the
benchmark's `F_L` or `F_H`, and the benchmark's output count. The LUT
contents are random, because the benchmark functions themselves are not
part of this design. The test checks the outputs against a ring model, and
the evaluation time against one clock per LUT step plus one. The largest
shape is 45 steps for `F_L` and 112 steps for `F_H`; it finishes in 113
clocks. The smallest is 3 and 3 steps, finishing in 4 clocks.

To simulate, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_rt_eval_top rtl/rt_pkg.sv tb/tb_rt_eval_top.sv
./obj_dir/Vtb_rt_eval_top
```

Replace the module name to run any other testbench. Each run takes well
under a second.
