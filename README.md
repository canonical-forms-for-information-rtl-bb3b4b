# Information-lossless finite-state machines: canonical forms and their inverses

A finite-state machine is *information-lossless* when its input sequence can
be worked out again from its output sequence, given the machine's description
and its initial and final states. Such machines are useful as coders: the
output can be scrambled, redundant or state-dependent, yet nothing about the
input is destroyed. This library gives synthesizable SystemVerilog for the
canonical circuit forms that every such machine can be put into, each one
filled in with a concrete example machine, together with the decoders that
recover the input:

| Form | Coder | Decoder | What the decoder needs | Decoding delay |
|---|---|---|---|---|
| Lossless combinational map | `lossless_comb3` | `lossless_comb3_inv` | the output | none |
| (contrast: a machine that loses information) | `lossy_two_state` | none possible | | |
| Class I | `class1_coder` | `class1_inverse` | initial state, outputs | none |
| Class II | `class2_coder` | `class2_reverse_decoder` | final state, outputs last-first | whole experiment |
| General | `gen_coder` (sequential), `gen_iterative_coder` (unrolled) | `gen_iterative_decoder` | initial a, outputs, final b | whole block |
| N-th order | `nth_coder` | `nth_decoder` | initial state (reset), outputs | exactly N symbols |

`lossless_machines_top` puts all of them side by side. The six are separate
examples with their own ports; the coder/decoder pairs that can run in step
(Class I, N-th order, the combinational map) are chained inside the top.

Notation used throughout: `x` is a coder input bit, `y` an output bit, `s` the
present state, `S` the next state; "lossless network" means a combinational
block whose inputs can be solved for from its outputs (for each value of any
control inputs it has).

## Conventions

* One symbol per rising clock edge. Coder outputs are combinational from the
  present input and the state; state registers update on the edge.
* `rst` is synchronous and active high. It puts each machine in the initial
  state named below; the initial states are this library's choice.
* Shared encodings (states `S1..S4`, a-symbols `A1/A2`, b-symbols `B1..B3`)
  and the Class I tables live in `lossless_pkg`.

## Lossless combinational map (`lossless_comb3`, `lossless_comb3_inv`)

Three nonlinear equations over AND and XOR map `x1 x2 x3` onto `y1 y2 y3` as a
permutation of the eight combinations:

    y1 = 1 ^ x1 ^ x3 ^ x1x2 ^ x1x3        x1 = 1 ^ y1 ^ y3 ^ y1y2
    y2 = 1 ^ x1 ^ x2 ^ x3                  x2 = y1 ^ y2y3
    y3 = 1 ^ x1 ^ x2 ^ x1x2 ^ x2x3         x3 = y2 ^ y3 ^ y1y2 ^ y2y3

The right-hand column is the inverse. In the RTL, `x1` and `y1` are bit 2
of their 3-bit vectors.

## A machine that is not lossless (`lossy_two_state`)

`y = x AND s`, `S = x XOR s`. Starting in s1, the input pairs 0,1 and 1,0
both give outputs 0,0 and both end in s2, so no decoder can tell them apart.
It is included as the reference case that the other forms avoid.

## Class I: the output reveals the input at once

In a Class I machine the two transitions leaving any state carry different
output symbols. Such a machine can always be written as

    y = x XOR f(s),     S = g(s, y)

and its inverse is the same circuit with the XOR moved to the other side:
`x = y XOR f(s)`, with the same `g` driven by the received `y`. Coder and
inverse have the same number of states and run in lock-step with no delay.

The example (s1..s4 = 0..3) is the flow table

    s1: x=0 -> S3,1  x=1 -> S4,0      s2: x=0 -> S4,0  x=1 -> S1,1
    s3: x=0 -> S4,1  x=1 -> S2,0      s4: x=0 -> S3,0  x=1 -> S2,1

giving `f = (1,0,1,0)` for s1..s4 and `g` as in `lossless_pkg::class1_next`.

## Class II: the state is recoverable backwards

In a Class II machine every state is entered by exactly two transitions, with
different output symbols. Then the combinational part itself, `(x, s) ->
(y, S)`, is a lossless network (`class2_net`), and the machine is that network
with its `S` outputs fed back through a register (`class2_coder`).

Decoding runs backwards: the final state and the last output symbol fix the
previous state and the last input (`class2_net_inv`). `class2_reverse_decoder`
does this one symbol per clock: pulse `load` with `final_state`, then supply
the outputs newest first on `y`; each cycle `x` is the input of that step and
`s` moves one state back. After the whole experiment `s` is the initial state.

Example (s1..s4 = 0..3):

    s1: x=0 -> S2,0  x=1 -> S3,1      s2: x=0 -> S1,0  x=1 -> S3,0
    s3: x=0 -> S4,1  x=1 -> S1,1      s4: x=0 -> S2,1  x=1 -> S4,0

## General canonical form (`gen_coder`, `gen_iterative_coder`, `gen_iterative_decoder`)

Every lossless machine, whether or not it is Class I or II, can be built from
two communicating subcircuits:

* an **a-subcircuit**, `A = h(a, y)`, driven only by the output. Its state is
  a set of machine states that an observer of the output cannot tell apart;
  since it depends on outputs only, a decoder can always run a copy of it.
* a **lossless subcircuit** that, under control of `a`, maps `(x, b)`
  one-to-one onto `(y, B)`. The pair `(a, b)` names the machine state.

The example is a five-state machine. Its a-logic is `A = NOT a OR y`
(a1 = 0, a2 = 1), the state naming is

    (a1,b1)=s4  (a1,b2)=s1  (a1,b3)=s5  (a2,b1)=s1  (a2,b2)=s3  (a2,b3)=s2

(s1 has two names), and the lossless network and its inverse are the tables in
`gen_net.sv` and `gen_net_inv.sv`. The fourth b code is never reached; it
behaves as a dummy state that copies `x` to `y`, which keeps the network
one-to-one on every code.

**Why the decoder is a block decoder.** The a-symbols can be computed forward
from the initial `a` and the outputs, but the b-symbols can only be recovered
backwards, from the final `B`, because the lossless network gives `x, b` from
`y, a, B`. Information has to flow from the end of the experiment to its
start, so no finite-delay sequential inverse exists in general.
`gen_iterative_decoder` is therefore a combinational array of `STEPS` cells
(default 3): a flows left to right through `gen_a_logic`, b flows right to
left through `gen_net_inv`. Give it `a_first`, the outputs `y[0..STEPS-1]`
(oldest in bit 0) and `b_last`; it returns the inputs, `b_first` and `a_last`.

`gen_iterative_coder` is the coder drawn the same way: `STEPS` cells of
`gen_net` and `gen_a_logic` with both a and b flowing left to right. It
computes, in one combinational pass, what `gen_coder` produces over `STEPS`
clocks, and its outputs plug straight into the block decoder. Set side by
side, the two arrays show why decoding works: every cell of the decoder is
the coder's cell with the b-path turned round, which the lossless network
allows.

## N-th order canonical form (`nth_coder`, `nth_decoder`)

This is the largest part of the library and the one that takes the most
explaining. An N-th order lossless machine guarantees that each input can be
decoded at most N symbols after it was applied, using only the outputs seen
so far. The canonical circuit (default N = 3) is built from four sections.

**Input section.** A shift register holding `x_{t-N} .. x_{t-1}`; together
with the current input these are the N+1 inputs the output may depend on.

**Output section and C-signals** (`nth_output_section`). A state machine
driven by the coder's own output, so a decoder can copy it exactly. Its state
selects 2^N signals `C^r`, one for each combination `r = (r1..rN)` of the N
newest inputs `x_{t-N+1} .. x_t`. Any function of the past outputs is
allowed here. This library uses an M-bit shift register of the last M outputs
(default M = 1) and a constant table `CTABLE` (2^M rows of 2^N bits; row `a`
is `CTABLE[a*2^N +: 2^N]`, bit r of a row is `C^r`, r1 is the MSB). The
default `16'hF0CA` was chosen so that every decoding path below is exercised.

**Transfer section** (`nth_transfer_section`). N levels of controlled
exchanges steered by `c_i = x_{t-N+i} AND K0`. Level i exchanges, when its
control is 1, each pair of leads that differ in index bit i and have all
earlier bits 0. At the end

* lead 0 carries `F^0 = C^(c1..cN)`, the signal actually used, and
* a lead whose first 1 is at position i carries what `F^0` would have been
  had input i been the other value (and the later inputs anything).

The output is `y_t = F^0 XOR x_{t-N}`.

**Comparators and K-section** (`nth_k_section`). `G^r = F^0 XOR F^r`, and
`K^i` is the AND of the `G^r` over the leads whose first 1 is at position i:
`K^i_t = 1` means that `y_t` alone settles `x_{t-N+i}` once the older inputs
are known. A chain of N registers with ORs between them forms

    K0_t = K^1_{t-1} OR K^2_{t-2} OR ... OR K^N_{t-N}

`K0_t = 1` means `x_{t-N}` was already settled by an earlier output. If it
was not, all steering controls are forced to 0 and `y_t = C^0 XOR x_{t-N}`
carries `x_{t-N}` plainly: this is the mode switch that guarantees the
N-symbol bound.

**Decoder** (`nth_decoder`). Fed `y_t`, it outputs `x_{t-N}` in the same
cycle. It keeps the last N outputs, the last N decoded inputs, and N+1 copies
of the output section driven by `y_t .. y_{t-N}`, so it has the C-signals of
each of the last N+1 coder steps. For each earlier step in which `x_{t-N}`
was a steering input, an `nth_decision` block rebuilds that step's `F^0` as
`y XOR` (the input then N steps old), routes that step's C-signals by the
already decoded older inputs, and compares `F^0` with the candidates for
`x_{t-N} = 0` and for `= 1`. If it differs from every 0-candidate the input
was 1. If it differs from every candidate of either group, that step decided
the bit (`k[m-1]`, the coder's `K^m`). Decision block `MI` (a parameter
of `nth_decision`) handles the step in which the bit being decoded was
steering input `MI`; the decoder holds one instance for each `MI = 1..N`.
The OR of these flags is the decoder's own `K0_t`; if it is 0, the plain
path gives `x_{t-N} = NOT K0 AND (C^0_t XOR y_t)`. The decoded bit is the OR
of all paths. For the first N symbols after reset the decoder
outputs the known reset inputs (0) with `x_valid` low.

### Departure: K-flags are gated by K0

Here the library departs from the circuit as usually drawn, where the
comparators feed the K-section directly. While `K0_t = 0` the output depends
on `x_{t-N}` alone, yet the comparators still compare the C-signals and can
raise a `K^i` claiming that a newer input has been settled. That false flag
later sets K0 to 1 for a bit that no output has settled. The step concerned
then mixes all its stored inputs into its output, and the decoder cannot
separate them. With the decoder also left ungated, the cascade test in
`tb_nth_decoder` (thirteen tables) fails on 7754 of 51488 checks. This
library therefore ANDs every `K^i` with `K0` in the coder
(`nth_k_section`). That is what the meaning of `K^i` asks for anyway: while `K0_t = 0`, `y_t` does not depend on
`x_{t-N+i}` at all, so it cannot settle it. In the decoder, each
decision block is gated with the decoder's K0 of the step it examines (an
N-deep history register). With both gates the coder/decoder pair decodes every
bit for every table tried. A consequence worth knowing: once K0 has been 0 for
N symbols in a row it stays 0, and the coder settles into plain mode
(`y_t = C^0 XOR x_{t-N}`) until reset. Decoding stays correct in that
mode; the output then carries each input N symbols late, XORed with `C^0`.

Other choices made here: the K registers reset to 1 and the stored inputs to 0
(the inputs before reset count as known). The output-section structure and
table are also this library's. N must be at least 2.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `nth_*`, top | `N` | 3 | order (decoding delay) |
| `nth_decision` | `MI` | 1 | steering position the block examines |
| `nth_*`, top | `M` | 1 | output-section state bits |
| `nth_*`, top | `CTABLE` | `16'hF0CA` | C-signal table, 2^(M+N) bits; coder and decoder must match |
| `nth_output_section`, `nth_coder`, `nth_decoder` | `A_INIT` | 0 | output-section reset state |
| `gen_iterative_coder`, `gen_iterative_decoder`, top | `STEPS` | 3 | block length |
| `class1_*`, `class2_coder` | `INIT` | `S1` | reset state |
| `gen_coder` | `INIT_A`, `INIT_B` | `A1`, `B2` | reset symbols (state s1) |

## Simulation

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/lossless_pkg.sv \
        tb/tb_lossless_machines_top.sv --top-module tb_lossless_machines_top
    ./obj_dir/Vtb_lossless_machines_top

Replace the testbench name to run another. The package must come first. What
they check:

* `tb_lossless_machines_top`: all machines at default parameters, end to
  end. Every coder/decoder pair must round-trip random inputs, the unrolled
  general-form coder must agree with the sequential one, and every
  mechanism must occur at least once: all comb inputs, all Class I states,
  backward decoding, both a-symbols, N-th order warm-up, the plain path and
  each `K^i` path.
* `tb_nth_coder`: the coder against a model written from the definitions of
  `K0`, `K^i` and `y` (N = 3, M = 1 and N = 4, M = 2).
* `tb_nth_decoder`: coder-to-decoder cascades for thirteen (N, M, table)
  configurations, eight of them with arbitrary tables, with frequent
  resets. The decoder must match the input delayed by N, and its K0 must
  match the coder's.
* `tb_nth_transfer_section`, `tb_nth_k_section`, `tb_nth_output_section`:
  each section against its defining equations.
* `tb_nth_decision`: each of the three decision blocks of a third-order
  decoder against a search over all steering inputs that could have
  produced the observed output. A decision of 1 must be true whenever the
  output came from a real coder step.
* `tb_gen_iterative_coder`: the unrolled coder against the example
  table for every 3-step experiment, cascaded into the block decoder.
* `tb_class1_*`, `tb_class2_*`, `tb_gen_*`, `tb_lossless_comb3*`,
  `tb_lossy_two_state`: each block against the example flow tables above,
  typed independently in the testbench. The Class II and general-form
  decoders are checked on random experiments, and the 3-step block decoder
  exhaustively.

## Limits

* The example tables are fixed in the RTL. To build another machine in one
  of these forms, replace the case tables of `class2_net`/`class2_net_inv`,
  `gen_net`/`gen_net_inv`/`gen_a_logic`, or the Class I functions in
  `lossless_pkg`. Nothing checks that new tables are lossless.
* The procedure that derives a canonical form from a flow table (the tabular
  test and the a/b symbol assignment) is a design-time procedure. It is not
  implemented in hardware.
* `gen_iterative_decoder` and `class2_reverse_decoder` decode bounded blocks.
  An unbounded stream needs block framing around them, which is not
  provided.
