# A self-testing ESOP network with a universal single stuck-at test set

Any Boolean function can be written as an exclusive-or of product terms
(ESOP form), for example

    f = x1 ^ x2x3 ^ x2'x3'

Built as a plain AND–XOR circuit, such a function has a useful property for
test. With a few extra control inputs and two extra gates, one fixed set of
test vectors detects nearly every single stuck-at fault. The set depends only
on the number of data inputs `n`, not on the function. This RTL builds that
testable network for any ESOP expression. It also builds the sequencer that
applies one of three vector sets (`n+5` or `n+6` vectors) and collects the
responses into a signature. The signature can be compared with the fault-free
one or looked up in a fault dictionary.

The default build is the three-input example above.

## The network

The network has four parts (`esop_network`):

```
 x1..xn ──┬──────────────┬──────────────────────────┐
          │              │                          │
 c0 ──────┼─► complement ┤ z_i = x_i ^ c0           │
          │   XOR gates  │                          ▼
 c1..c3 ──┼──────────────┼─► AND array ─► XOR tree ─► f
          │              │   (one gate per term,
          ▼              │    plus one of c1..c3)
   o1 = AND(c0..c3, x1..xn)
   o2 = OR (c0..c3, x1..xn)
```

* **Literal-complementing block** (`lit_complement`). There is one XOR gate
  for each variable that appears complemented somewhere in the expression.
  The gate forms `z_i = x_i ^ c0`. In normal use `c0 = 1`, so `z_i = x_i'`.
  During test, `c0 = 0` passes the true value through the same gate, so the
  gate can be exercised both ways.
* **AND array** (`and_block`). There is one AND gate per product term. Each
  gate ANDs the term's literals with exactly **one** of the control lines
  c1, c2, c3. Which line a term gets is set by its place in the XOR tree (see
  below).
* **XOR tree** (`xor_tree`). Two-input XOR gates combine the terms into `f`.
* **Auxiliary gates** (`aux_gates`). `o1` is the AND and `o2` the OR of all
  data and control inputs. They catch input faults that `f` alone cannot
  separate.

In normal operation all four controls are 1 and `f` is the expression.

### Which control line gates which term

This is the part of the scheme that needs the most explanation. The XOR tree
is labelled with three colours 1, 2 and 3:

* the tree output is labelled 3;
* for every XOR gate, its output and its two inputs carry three different
  labels.

So a gate labelled L has children labelled L+1 and L+2 (mod 3, counted from
1). Each leaf's label is the control line (c1, c2 or c3) that its AND gate
receives. For an eight-term tree (seven XOR gates), the leaves read, left to
right,

    c3  c1  c1  c2  c1  c2  c2  c3

and the three-term default tree `(T1 ^ T2) ^ T3` gets `c2, c3, c2`.

Because of this labelling, the test vectors that hold exactly one of c1..c3
at 0 switch off a set of terms. That set is structured so that every XOR
gate sees its inputs in different combinations. The switched-off terms are
those whose leaf label is the zeroed line.

`esop_pkg::term_ctrl(S, t)` computes this label for any number of terms. The
tree is stored in heap order: node 1 is `f`, and node k has children 2k and
2k+1. The S leaves are nodes S..2S-1. Terms are placed left to right, so the
first terms are deepest and the last terms join closest to the output. For a
power-of-two S this is the full balanced tree shown above. For three terms it
is the chain `(T1 ^ T2) ^ T3`. Other shapes of tree are not covered.

## The test sets

A test vector is `c0 c1 c2 c3 | x1 .. xn`. `test_vector_gen` produces one
vector per clock:

| row | c0 c1 c2 c3 | x1..xn | REF | ALT | AC |
|---|---|---|---|---|---|
| 1 | 0 0 0 0 | all 0 | ✓ | ✓ | ✓ |
| zero walk over the controls | 0, one of c1..c3 = 0, rest 1 | all 1 | c1, c2 | c2, c3 | c1, c2, c3 |
| next | 0 1 1 1 | all 1 | ✓ | ✓ | ✓ |
| n rows | 0 1 1 1 | walking zero over x1..xn | ✓ | ✓ | ✓ |
| last | 1 0 0 0 | all 0 | ✓ | ✓ | ✓ |
| **length** | | | n+5 | n+5 | n+6 |

* **REF** is the reference test set that this scheme extends.
* **ALT** (alternative vectors) moves the zero walk over the controls to c2
  and c3.
* **AC** ("all-control" zero walk) walks the zero over all three lines.

Choose the set with the `method` input (`esop_pkg::method_e`).

The control values in the `n` walking-zero rows were not given explicitly.
They were fixed by requiring that the published signatures come out. That
requirement forces c0 = 0 and c2 = c3 = 1. c1 = 1 was chosen. With c1 = 0,
examples 5, 8 and 9 below would show unidentifiable faults where the
published results have none.

## Signatures and what they tell

Each output's responses over the sequence form a binary word, with the first
vector in the most significant bit. For the default function the fault-free
signatures `{f, o1, o2}` are:

| set | f | o1 | o2 |
|---|---|---|---|
| REF | 118 | 0 | 127 |
| AC  | 214 | 0 | 255 |
| ALT | 86  | 0 | 127 |

The network has 14 fault sites: c0..c3, x1..x3, the two complementing gates,
three AND gates and two XOR gates. That gives 28 single stuck-at faults. Each
fault gives its own signature (tabulated in `tb/esop_diag_top_tb.sv`), which
serves as a fault dictionary. Faults fall into three groups:

* **unidentifiable**: the signature equals the fault-free one. For all three
  sets this is only s-a-0 on c1, which gates no term of this function.
* **indistinguishable**: detected, but the signature is shared with another
  fault. 13 faults for REF, 12 for AC and ALT.
* **diagnosed**: the remaining faults, each with a unique signature.

## Timing and interface of the top (`esop_diag_top`)

* **Idle (functional mode).** The network runs from `c_in`/`x_in`, and
  `f_out`, `o1_out` and `o2_out` follow combinationally. Drive
  `c_in = 4'b1111` for normal use.
* **Start.** A `start` pulse while idle latches `method`. `busy` is then high
  for `nvec` clocks, one vector per clock.
* **Done.** `done` pulses on the clock edge `nvec + 1` cycles after the edge
  that sampled `start`. `sig_f`, `sig_o1` and `sig_o2` then hold the
  signature and keep it until the next start.
* **Mismatch.** `mismatch` compares the signature with `exp_f`, `exp_o1` and
  `exp_o2`, the fault-free signature that the user supplies for the chosen
  set.
* **Busy.** A `start` while busy is ignored.
* **Fault injection.** `fault_en`, `fault_site` and `fault_val` force one
  node stuck-at. The site numbering is listed in `rtl/esop_pkg.sv`. Tie
  `fault_en` low in a real circuit; the forcing logic then reduces to wires.
* **Reset.** Reset is asynchronous and active low.

### Building your own function

Set `N` and `S`. Set `POS[t][i]` for each term t that contains x(i+1), and
`NEG[t][i]` for each term that contains x(i+1)'. Term 1 is `t = 0`, and
`S >= 2`. Complementing gates are generated only for variables that appear
in `NEG`. `NV_MAX` (default `N+6`) must hold the longest sequence.

## Files

| file | content |
|---|---|
| `rtl/esop_pkg.sv` | method enum, sequence lengths, tree labelling, fault-site count |
| `rtl/stuck_at.sv` | per-bit stuck-at forcing at the input, complementing-gate and AND-gate sites (the XOR tree forces its gates inline) |
| `rtl/lit_complement.sv` | complementing XOR gates |
| `rtl/and_block.sv` | AND array with control-line assignment |
| `rtl/xor_tree.sv` | heap-ordered XOR tree |
| `rtl/aux_gates.sv` | o1/o2 |
| `rtl/esop_network.sv` | the testable network with fault injection |
| `rtl/test_vector_gen.sv` | REF/AC/ALT sequencer |
| `rtl/response_capture.sv` | signature shift registers |
| `rtl/esop_diag_top.sv` | top: network + sequencer + capture + compare |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `esop_examples_tb` |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. With
Verilator 5:

```
verilator --binary --timing -y rtl rtl/esop_pkg.sv tb/esop_diag_top_tb.sv \
          --top-module esop_diag_top_tb
./obj_dir/Vesop_diag_top_tb
```

Substitute any other testbench name. The testbenches do the following:

* **`esop_diag_top_tb`** runs the default design at its default parameters.
  It covers functional mode, then all three sets fault-free and with each of
  the 28 faults. It checks every signature, the latency, `mismatch`, and the
  unidentifiable and indistinguishable counts.
* **`esop_examples_tb`** builds the nine evaluation functions below, each as
  its own top. It runs every fault under every set and checks the fault
  totals and the two counts.
* **The block testbenches** check each module exhaustively or against
  hand-written gate equations.

## Results on the nine evaluation functions

`esop_examples_tb` reproduces these figures. U is unidentifiable and I is
indistinguishable, both as a share of all single stuck-at faults.

| # | function | faults | REF U / I | AC U / I | ALT U / I |
|---|---|---|---|---|---|
| 1 | x1 ^ x2x3 ^ x2'x3' | 28 | 3.57 / 46.43 | 3.57 / 42.86 | 3.57 / 42.86 |
| 2 | x1 ^ x1x2x3 ^ x2'x3' | 28 | 3.57 / 50.00 | 3.57 / 46.43 | 3.57 / 46.43 |
| 3 | x1' ^ x1'x2' ^ x2x3' | 30 | 6.67 / 46.67 | 6.67 / 40.00 | 6.67 / 40.00 |
| 4 | x1x2x3 ^ x2x3x4 ^ x2'x3'x4' | 32 | 3.13 / 43.75 | 3.13 / 40.63 | 3.13 / 40.63 |
| 5 | x1x5 ^ x1x2x3 ^ x2x3x4 ^ x2'x3'x4' | 38 | 0 / 44.74 | 0 / 44.74 | 0 / 44.74 |
| 6 | x1x2x6' ^ x2x3x4 ^ x3'x4'x5' | 38 | 2.63 / 52.63 | 2.63 / 50.00 | 2.63 / 50.00 |
| 7 | x1x2x7' ^ x3x4x5 ^ x4'x5'x6' | 40 | 2.50 / 47.50 | 2.50 / 45.00 | 2.50 / 45.00 |
| 8 | x1x2x8' ^ x3x7'x6' ^ x4'x5' ^ x1'x2'x3' | 54 | 0 / 44.44 | 0 / 44.44 | 0 / 48.15 |
| 9 | x1x2x8' ^ x3x7'x6' ^ x4'x5'x9 ^ x1'x2'x3' | 56 | 0 / 46.43 | 0 / 46.43 | 0 / 46.43 |

These numbers match the published evaluation of this scheme for examples 1,
2, 4 and 6. Example 1 also matches every individual published signature. For
example 3, the published counts are the same, but the published percentages
are taken over 28 faults rather than the 30 that the network has.

Four entries differ from the published figures:

* **Example 5, REF:** 44.74 % indistinguishable here, against 55.26 %
  published.
* **Example 7, AC:** 45.00 % here, against 42.50 % published.
* **Example 8, ALT:** 48.15 % here, against 44.44 % published.
* **Example 9:** 56 faults here, where 52 are published. The fault sites
  counted the same way as in the other examples give 56, so the percentages
  differ.

These differences may come from a tree shape or term order for the
four-term and seven-input functions that was not given. They are not
resolved here.

## Where this RTL goes beyond or departs from the published scheme

* **Own additions.** The sequencer, the signature registers, the comparison
  with a supplied fault-free signature and the fault-injection port are this
  design's own. In the published work, vectors are applied and faults
  evaluated in software.
* **Auxiliary gates.** `o1` and `o2` use all data and control inputs, as in
  the modified circuit that the scheme proposes. The reference circuit it
  improves on fed them from the data inputs and the complementing-gate
  outputs instead. That variant is not built. REF vectors applied to this
  network therefore give `o1 = 0` for the fault-free case, where the
  reference circuit gives 112.
* **Own choices.** The tree shape for term counts that are not a power of
  two, the control values of the walking-zero rows (see above), the site
  numbering and all timing are choices of this design.
* **Scope.** Only single stuck-at faults at the listed sites are modelled.
  Faults on fan-out branches, and bridging or stuck-open faults, are not.
