# Majority-logic parallel prefix adders

Several emerging device technologies (quantum-dot cellular automata, nano-magnetic
logic, resonant tunnelling diodes) offer the three-input majority gate
`M(x, y, z) = xy + yz + zx` as their native primitive, not AND and OR. A prefix adder
built on the usual generate/propagate signals wastes most of that primitive. In majority
terms, its output carry costs about `2·log2(n) − 1` gate delays.

This design writes the whole carry computation in majority gates. As a result:

* no generate (`g = ab`) or propagate (`p = a + b`) signal is ever formed;
* every prefix operator is **two majority gates working in parallel**, one gate delay,
  the same in every stage;
* the carry-in is absorbed at bit 0, and the lower carries are reused for the higher
  ones. The output carry of an n-bit adder is then ready after **`log2(n) + 1`** majority
  gate delays.

The default configuration is an 8-bit Kogge-Stone adder. The same operator also drives
a Ladner-Fischer and a Brent-Kung graph, chosen with a parameter. The RTL describes the
majority-gate netlist structurally, so the gate counts and depths below are the ones
the RTL actually has. When it is synthesised for an FPGA or a CMOS library, each
majority gate becomes ordinary logic.

## The carry as a chain of majority gates

A full adder's carry-out is the majority of its three inputs: `C_{i+1} = M(a_i, b_i, C_i)`.
Unrolling this gives the carry of an n-bit adder as a nested chain:

    C_n = M(a_{n-1}, b_{n-1}, M(a_{n-2}, b_{n-2}, ... M(a_0, b_0, C_0)))

Write `R_{i:j}(c)` for the chain over bits i down to j applied to an incoming carry `c`.
This is the function by which the group of bits `[i:j]` turns its carry-in into its
carry-out. This function is itself a single majority gate with two fixed inputs:

    R_{i:j}(c) = M(X_{i:j}, Y_{i:j}, c)
    X_{i:j} = R_{i:j+1}(a_j)        Y_{i:j} = R_{i:j+1}(b_j)

The reason is that `M(a_j, b_j, c)` equals `a_j` when `a_j = b_j`, and equals `c` otherwise.
A chain of majority gates is monotone, so in the second case `R(c)` lies between `R(0)`
and `R(1)`, which is exactly `M(R(a_j), R(b_j), c)`. So a group of any length is fully
described by **one pair of signals `(X, Y)`**. A single bit is the pair `(a_i, b_i)`.
This is the "(Sum ≥ 2^n, Sum ≥ 2^n − 1)" view of the carry: on a group, `X` and `Y` are
its carry-out for carry-in 0 and 1, up to the order of the two.

## The prefix operator (`maj_prefix_op`)

Two adjacent groups, `hi` above `lo`, compose as
`M(Xh, Yh, M(Xl, Yl, c))`. Applying the same identity once more gives:

    (Xh, Yh) ∘ (Xl, Yl) = ( M(Xh, Yh, Xl), M(Xh, Yh, Yl) )

These are two majority gates that share two inputs and run in parallel. The operator is
associative, and the testbench checks this over all inputs. It can therefore be placed
in the nodes of any prefix graph. Compared with the classic `(g, p)` operator
(`g_h + p_h·g_l`, `p_h·p_l`), each node costs two majority gates and one gate delay.
The classic operator in majority form needs three gates and two levels.

**A special case makes the adder cheap.** If the lower group reaches all the way down
to bit 0 and has already absorbed the carry-in, its "pair" is a finished carry `(C, C)`.
Both gates then compute the same `M(Xh, Yh, C)`, so the networks instantiate a single
`maj_gate` there, and its output is again a finished carry. Every carry network starts
by resolving bit 0 into `C1 = M(a0, b0, C0)`. Every merge with a group that contains
bit 0 is then one gate.

## The three carry networks

All three networks take `a`, `b`, `c0` and return `c[WIDTH:0]`, with `c[0] = C0` and
`c[i] = C_i`. They differ only in which positions merge in each stage. Widths that are
not powers of two are accepted.

| network | stage k merges position i with | stages | carry delay (gates) |
|---|---|---|---|
| `maj_ks_carry`, Kogge-Stone | `i − 2^(k−1)`, for every `i ≥ 2^(k−1)` | log2 n | log2 n + 1 |
| `maj_lf_carry`, Ladner-Fischer (Sklansky form) | top of the lower half of its `2^k` block, for the upper half | log2 n | log2 n + 1 |
| `maj_bk_carry`, Brent-Kung | up-sweep, then down-sweep with distances halving | 2·log2 n − 1 | ≤ 2·log2 n (see below) |

Majority gates in the carry networks, as counted after elaboration:

| WIDTH | Kogge-Stone | Ladner-Fischer | Brent-Kung |
|---|---|---|---|
| 8  | 28  | 18  | 16  |
| 16 | 84  | 50  | 38  |
| 32 | 228 | 130 | 84  |
| 64 | 580 | 322 | 178 |

In all three graphs, the cone of the output carry is the same balanced structure. For
8 bits it has twelve gates:

    C1 = M(a0,b0,C0);  C2 = M(a1,b1,C1);  [3:2], [5:4], [7:6] pairs (2 gates each);
    C4 = M(X32,Y32,C2);  [7:4] pair (2 gates);  C8 = M(X74,Y74,C4)

Its depth is four gates, and `log2(n) + 1` in general.

**Brent-Kung depth.** Counting stages gives `2·log2(n) − 1` stages plus the `C1` gate.
That is six gate delays at 8 bits, the figure normally quoted, and the value the module
reports as `CARRY_DELAY`. Because the carry-in is folded in at bit 0, the slowest carries
(C6 and C7 at 8 bits) skip the last up-sweep stage. So the longest gate path is
actually one gate shorter: 5 gates at 8 bits, 7 at 16. Logic-depth analysis after
synthesis confirms this. Its output carry takes `log2(n) + 1` gates, like the others.

`CARRY_DELAY` and `STAGES` are local parameters of each network. Testbenches read them
hierarchically, so Verilator's lint reports them as unused.

## Sum stage (`maj_sum`)

Once the carries are known, each sum bit is formed with the majority-gate full adder
(three gates and two inverters, the third gate being the carry that the network already
provides):

    t_i = M(a_i, b_i, ~C_i)          s_i = M(~C_{i+1}, C_i, t_i)

If `C_{i+1} = 1`, at least two of `a_i, b_i, C_i` are 1, and the expression reduces to
`a_i·b_i·C_i`. Otherwise it reduces to `a_i + b_i + C_i`. In both cases it equals the
XOR. This adds `2·WIDTH` gates and two gate delays after the carries, and keeps the whole
adder in majority gates and inverters.

## Modules and interfaces

| file | role |
|---|---|
| `rtl/maj_pkg.sv` | `maj_pair_t` (the `{x, y}` pair), `prefix_topology_e`, stage-count functions |
| `rtl/maj_gate.sv` | 3-input majority gate |
| `rtl/maj_prefix_op.sv` | two-gate prefix operator on pairs |
| `rtl/maj_ks_carry.sv`, `maj_lf_carry.sv`, `maj_bk_carry.sv` | carry networks |
| `rtl/maj_sum.sv` | sum bits from carries |
| `rtl/maj_prefix_adder.sv` | top: carry network chosen by `TOPOLOGY`, plus the sum stage |

Top-level `maj_prefix_adder`:

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | WIDTH | operands |
| `cin` | in | 1 | carry-in C0 |
| `sum` | out | WIDTH | low WIDTH bits of a + b + cin |
| `cout` | out | 1 | carry-out C_n |

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 8 | operand width, any value ≥ 1 |
| `TOPOLOGY` | `KOGGE_STONE` | `KOGGE_STONE`, `LADNER_FISCHER` or `BRENT_KUNG` |

The design is purely combinational, with no clock and no reset. For a clocked system,
register the operands and results around it.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=N failures=M` line.
With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/maj_pkg.sv \
        tb/tb_maj_prefix_adder.sv --top-module tb_maj_prefix_adder -o sim
    ./obj_dir/sim

| testbench | what it covers |
|---|---|
| `tb_maj_gate` | all 8 input combinations |
| `tb_maj_prefix_op` | all 16 operand pairs against sequential composition; associativity over all 64 triples |
| `tb_maj_ks_carry`, `tb_maj_lf_carry`, `tb_maj_bk_carry` | every carry against integer addition. Exhaustive at 1–5, 7 and 8 bits; random at 12, 16, 32 and 64 bits, with a third of the vectors using `b = ~a` so that the carry runs end to end. Also checks `STAGES` and `CARRY_DELAY` |
| `tb_maj_sum` | all 2^17 operand/carry-in combinations at 8 bits |
| `tb_maj_prefix_adder` | all three graphs, exhaustive at 8 bits and random at 13/16/32/64 bits. Fails if carry-in, overflow or end-to-end propagation never occurs in a configuration |
| `tb_maj_prefix_adder_full` | the default 8-bit Kogge-Stone adder, untouched parameters, all 2^17 inputs |

The helpers `tb/carry_harness.sv` and `tb/adder_harness.sv` hold the checking loop for
one width/topology, and the testbenches instantiate them several times. Each testbench
runs in well under a second.

## How far it follows the source design, and where it departs

Taken from the source design:

* the majority formulation of the carry;
* the two-gate, one-delay operator with no generate or propagate signals;
* folding `C0` into bit 0 and reusing lower carries for higher ones;
* the three graphs and their stage counts;
* 8-bit Kogge-Stone as the main configuration;
* `log2(n) + 1` gate delays to the output carry;
* the twelve-gate C8.

Worked out here:

* **Operator equations.** The source states the operator's cost (two gates, one delay)
  but its gate-level wiring had to be reconstructed. The form above is derived from the
  carry formulation and verified exhaustively. The single-gate merge with a finished
  carry is the same operator with its two gates merged.
* **Ladner-Fischer graph.** It is taken in its minimum-depth (Sklansky) form, which
  matches the stated three stages at 8 bits.
* **Brent-Kung delay.** The quoted six gate delays at 8 bits is the stage-count bound.
  This implementation's longest path is five (see above).
* **Sum stage.** The source does not say how sum bits are formed. The majority full
  adder is used so that the adder stays in majority logic. A plain XOR would work
  equally well in CMOS or FPGA fabric.
* **Clocking.** The adder is left combinational. The source mentions FPGA
  implementation but gives no register placement, device or timing results, so none
  are reproduced.
* **Delay and gate counts.** The figures in this document come from elaborating and
  analysing the RTL. The testbenches check functional results, stage counts and the
  stated delay bounds, but they cannot measure gate depth in a zero-delay simulation.
