# Low-power 4-bit magnitude comparator: pre-computation and BDD forms

A magnitude comparator tells whether an unsigned number A is greater than,
less than or equal to another number B. This one is the cascadable 4-bit kind
(in the style of the 74x85): besides A[3:0] and B[3:0] it takes three cascade
inputs from a less significant stage and passes the decision on through three
outputs:

    agtbout = (A > B) | (A == B) & agtbin
    altbout = (A < B) | (A == B) & altbin
    aeqbout = (A == B) & aeqbin

A single stage ties `aeqbin = 1`, `agtbin = altbin = 0`. With exactly one
cascade input high, exactly one output is high.

The RTL gives this function in two forms, each aimed at low switching power:

* **Pre-computation comparator** (`precomp_comparator`). The operands pass
  through registers. When the MSBs already decide the result, the registers
  holding the lower bits are not loaded, so those bits do not toggle inside
  the comparator.
* **BDD comparator** (`bdd_comparator`). A reduced ordered binary decision
  diagram (BDD) of the function, built as a network of 2x1 multiplexers with
  one multiplexer per diagram node.

`comparator_top` holds both side by side. They share no signal: `pc_*` ports
belong to the pre-computation half, `bdd_*` ports to the BDD half. The
original study that these follow also synthesized the plain comparator
(`mag_comparator`) on its own as a baseline. Here that comparator is the core
of the pre-computation form.

## The pre-computation comparator

### Idea

Take a clocked circuit whose inputs are registered. Suppose a cheap
*predictor* function of a few inputs can guarantee the output. Then the other
inputs need not be loaded in that cycle. Their registers hold their value and
the logic behind them does not switch. For a comparator the predictors are
obvious and exact:

    g1 = A3 & ~B3    -> A > B, whatever A[2:0] and B[2:0] are
    g2 = ~A3 & B3    -> A < B, whatever A[2:0] and B[2:0] are

The register for the lower bits is loaded only when neither predictor fires:

    load_en = ~(g1 | g2) = A3 XNOR B3

With uniformly random operands, A3 and B3 differ in half of all cycles. In
those cycles the six lower operand bits seen by the comparator stay frozen.

### Structure

    A3,B3 ──────────────► msb_reg (2 bits, loads every edge) ──┐
       │                                                       ├─► mag_comparator ─► agtbout
       └─► precompute_enable ── load_en                        │   (registered        altbout
                                   │                           │    operands)         aeqbout
    A[2:0],B[2:0] ──────► lsb_reg (6 bits, en = load_en) ──────┘
    agtbin, altbin, aeqbin ─────────────────────────────────────► (straight to mag_comparator)

| Module              | Role                                             |
|---------------------|--------------------------------------------------|
| `msb_reg`           | 2-bit register `{A3, B3}`, no enable             |
| `lsb_reg`           | 6-bit register `{A[2:0], B[2:0]}` with load enable |
| `precompute_enable` | `g1`, `g2` and `load_en = XNOR(A3, B3)`          |
| `mag_comparator`    | cascadable comparator on the registered operands |

### Why the frozen bits never give a wrong answer

Take the rising edge at which operands (A, B) are sampled.

* If A3 = B3, both registers load, and the comparator sees (A, B) exactly.
* If A3 ≠ B3, `msb_reg` loads A3 and B3, but `lsb_reg` keeps whatever lower
  bits it held before. The comparator therefore sees the correct MSBs with
  stale lower bits. Because its registered MSBs differ, the A>B and A<B
  outputs depend only on them. A=B is 0, so the cascade inputs are masked
  too. The stale bits cannot reach the outputs.

Three concurrent assertions in `precomp_comparator` state these rules:

* `g1` and `g2` are never both high.
* A cycle without `load_en` leaves `lsb_reg` unchanged.
* When the registered MSBs differ, the outputs are `{A3, B3, 0}`.

### Timing

* `a` and `b` are sampled at the rising edge of `clk`.
* The outputs are combinational from the registers. They are valid after
  that edge, one clock after the operands were applied.
* The cascade inputs are **not** registered. They act combinationally in the
  cycle in which they are applied, together with the operands sampled at the
  previous edge. To get a fully registered comparison, register the cascade
  inputs outside the block, or hold them steady for the cycle.
* There is no reset. The ports are the eight operand bits, three cascade
  inputs, the clock and three outputs, as in the original study. The outputs
  have a meaning once one edge has passed with valid operands.
* `load_en` is computed from the live (unregistered) A3 and B3. The predictor
  logic therefore sits in the input path, ahead of the registers. The
  comparator's own path is unchanged.

## The BDD comparator

Every node of a BDD is a Shannon expansion of a function on one variable x:
`f = x' · f|x=0 + x · f|x=1`. That is precisely a 2x1 multiplexer
(`mux2`, `y = s'·a + s·b`) with x on the select, the 0-child on `a` and the
1-child on `b`. A diagram with N nodes is thus a network of N multiplexers.
The path through the network is as long as the number of variables tested.

The node count depends on the variable order. This design uses the
**interleaved, most-significant-first** order:

    a3, b3, a2, b2, a1, b1, a0, b0, then the output's cascade input

Each output is a chain built from the least significant end. `f_0` is a node
on the output's cascade input, with children 0 and 1. Then, for bit i:

    lo_i    = mux(s = b_i, a = f_i,  b = L)     reached when a_i = 0
    hi_i    = mux(s = b_i, a = H,    b = f_i)   reached when a_i = 1
    f_(i+1) = mux(s = a_i, a = lo_i, b = hi_i)

Equal bits pass the decision down to `f_i`. Unequal bits settle the output
with the constant L (for a_i=0, b_i=1) or H (for a_i=1, b_i=0):

| output    | L | H |
|-----------|---|---|
| `agtbout` | 0 | 1 |
| `altbout` | 1 | 0 |
| `aeqbout` | 0 | 0 |

Each output needs 3 nodes per bit plus one cascade node. In this order no
sub-function of one output equals a sub-function of another, so nothing is
shared. For 4 bits the total is 3 × (3·4 + 1) = **39 multiplexers**, and the
depth is 9 multiplexers.

The original study fed the 78 product terms of the sum-of-products form into a
BDD package. It used the input order aeqbin, agtbin, altbin, a3…a0, b3…b0,
and reported 46 nodes. That diagram cannot be rebuilt exactly from what was
published. The interleaved order used here realizes the complete
function, cascade inputs included, in 39 nodes. It is also the order that
variable reordering reaches for comparators. The multiplexer count therefore
differs from the study's 46.

## The plain comparator (`mag_comparator`)

This is a gate-level comparator in the classic form:

* An XNOR gate for each bit pair gives `e_i = (a_i == b_i)`.
* A>B is the OR over bits of `a_i · b_i'` ANDed with `e_j` for every more
  significant bit j. A<B is built the same way with `a_i' · b_i`.
* A=B is the AND of all `e_i`.
* The three cascade equations above come last.

It is written with a loop over `WIDTH`, so it also covers other widths.

## Parameters

| Parameter | Where | Default | Meaning |
|-----------|-------|---------|---------|
| `WIDTH` | `comparator_top`, `precomp_comparator`, `mag_comparator`, `bdd_comparator` | 4 (`mag_cmp_pkg::CMP_WIDTH`) | operand width |
| `WIDTH` | `msb_reg` | 2 | `{A_msb, B_msb}` |
| `WIDTH` | `lsb_reg` | 6 | `{A[W-2:0], B[W-2:0]}`; `precomp_comparator` sets it to 2·(WIDTH−1) |

The pre-computation form always predicts on the single MSB, whatever the
width. The BDD form grows as 3·(3·WIDTH+1) multiplexers.

## What follows the original study and what does not

Taken from the study:

* the cascade equations and the gate structure of the comparator;
* the pre-computation comparator's split into a 2-bit register, a 6-bit
  register and an XNOR load enable;
* the unregistered cascade inputs and the absence of an output register;
* the one-multiplexer-per-BDD-node realization.

Choices made here:

* **Edges and reset.** Rising-edge clocking and no reset.
* **Register bit order.** Inside `lsb_reg` the A bits sit above the B bits.
* **Explicit predictors.** `g1` and `g2` are separate outputs of
  `precompute_enable`. The study shows only the XNOR gate they reduce to.
* **BDD variable order.** The interleaved order gives 39 nodes, against the
  study's 46.
* **Cascade inputs that are not one-hot.** These follow the three equations
  literally. The study only says that in normal use exactly one is asserted.
* **Power and area.** The study's synthesis figures are not reproduced by
  anything here: 164.29 µW for the plain comparator, 66.67 µW with
  pre-computation, and 46 × 0.76 µW ≈ 35.07 µW for the multiplexer network,
  all in a 180 nm library. Those figures depend on a commercial flow and
  library. The RTL only preserves the structural reasons behind them: frozen
  low bits in one form, and a small multiplexer network in the other.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`:

| Testbench | What it does |
|-----------|--------------|
| `tb_mux2` | all 8 input combinations |
| `tb_mag_comparator` | all 2^11 input vectors, against integer comparison; one-hot cascade in must give one-hot out |
| `tb_bdd_comparator` | the same 2^11 vectors on the multiplexer network |
| `tb_precompute_enable` | all four MSB pairs |
| `tb_msb_reg` | random data; one-cycle latency; holds between edges |
| `tb_lsb_reg` | random data and enable, against a reference register |
| `tb_precomp_comparator` | all 256 operand pairs in random order with random cascade inputs (details below) |
| `tb_comparator_top` | all 2048 vectors through both halves at default parameters (details below) |
| `tb_precomp_activity` | switching activity with random operands (details below) |

`tb_precomp_comparator` checks three things:

* the result one clock after the operands are applied;
* that the outputs still show the previous operands before the sampling edge;
* that the lower-bit register really holds whenever A3 ≠ B3.

`tb_comparator_top` checks the BDD half combinationally and the
pre-computation half with its one-clock latency. It counts hold cycles,
load cycles, vectors decided by the cascade inputs, and each output being
high on each half. Every one of these must occur at least once.

`tb_precomp_activity` feeds 2000 random operand pairs to the
pre-computation comparator. It counts toggles of the six lower operand bits at
two points: the inputs (what an ungated registered comparator would see) and
the comparator core. A typical run gives 6104 toggles at the inputs against
3000 at the core, with the lower bits held in 1016 cycles. The core count
must match a reference model of the gated register exactly.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/mag_cmp_pkg.sv \
        tb/tb_comparator_top.sv --top-module tb_comparator_top
    ./obj_dir/Vtb_comparator_top

Replace the testbench name to run any other. The package file must come
first. Every testbench finishes in well under a second.
