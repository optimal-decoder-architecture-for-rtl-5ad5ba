# Approximate belief-propagation node network for polar codes

Polar codes can be decoded by belief propagation (BP) on their factor graph:
a grid of log2(N) stages, each made of N/2 butterflies, through which
log-likelihood ratios (LLRs) are passed. The two operations a butterfly
performs are the whole arithmetic of the decoder:

* a **G node**, the min-sum check operation:
  `sign = Sa xor Sb`, `magnitude = min(|a|, |b|)`;
* an **F node**, the variable-node sum of two LLRs: `a + b`.

This RTL builds that node network as pure combinational logic and makes
both nodes cheaper and faster in two ways:

1. the G node's magnitude comparator is **approximate**: it ignores the K
   lowest bits of the magnitudes;
2. the F node does its sign-magnitude addition on a single
   **parallel-prefix adder**, either a Kogge-Stone adder (fast, larger) or a
   Brent-Kung adder (slower, smaller), chosen by one parameter.

The default configuration is a decoder for code length N = 8: eight LLR
inputs, three stages of four F and four G nodes, 64-bit magnitudes,
Kogge-Stone adders.

## Number format

Every LLR is in sign-magnitude form: one sign bit (1 = negative) and a W-bit
unsigned magnitude. W is 64 by default. A fixed-point format of 1 sign bit,
5 integer bits and 3 fraction bits (W = 8) is a natural small setting, and
it is tested at N = 64.

## The network (`polar_decoder`, `bp_stage`)

The factor graph is used in its constant-geometry form. Every stage is wired
the same way (a perfect shuffle):

```
stage input k  ---+--> G node k --> stage output 2k
                  |
stage input k+N/2 +--> F node k --> stage output 2k+1       k = 0 .. N/2-1
```

Both nodes of butterfly k get the same two operands: input k is operand
`a` and input k+N/2 is operand `b`. `bp_stage` is one such column of N/2
butterflies. `polar_decoder` chains log2(N) copies of it. After the last
stage the even outputs are brought out as `g_sign/g_mag[k]` and the odd
outputs as `f_sign/f_mag[k]`. For N = 8 these eight outputs are the
third-stage results, which could be called f31..f34 and g31..g34.

The decoder has no clock, registers or reset. Its delay is log2(N) node
delays, and the F node's adder dominates each of them. That is why the adder
choice sets the decoder's speed.

## G node: approximate minimum (`g_node`)

```
a_gt_b = Ma[W-1:K] > Mb[W-1:K]
Ms     = a_gt_b ? Mb : Ma        // the whole word of one operand
Ss     = Sa ^ Sb
```

The comparator looks only at the upper W-K bits. The same select line
drives the upper bits and the lower K bits of the output, so the result is
always one of the two input magnitudes, never a mix. If the upper bits are
equal, `a` is passed. This is wrong only when a's K low bits are larger than
b's. For uniformly distributed magnitudes the error rate is

    ER = 2^-(W-K) * (2^K - 1) / 2^(K+1) = (2^K - 1) / 2^(W+1)

For W = 8 and K = 2 that is 384 of the 65536 magnitude pairs. The testbench
counts this number exhaustively. When an error happens, the result is larger
than the true minimum by less than 2^K. K = 2 by default. K = 0 gives an
exact comparator.

## F node: sign-magnitude sum on one adder (`f_node`)

Adding two sign-magnitude numbers usually takes an adder, a subtractor and
a final negation. Here it takes one adder:

* An exact comparator computes `b_gt_a = Mb > Ma`. The result sign is the
  sign of the larger magnitude: `Ss = b_gt_a ? Sb : Sa`.
* **Equal signs:** both magnitudes go into the adder unchanged, with carry
  in 0, and the adder gives `Ma + Mb`. If this produces a carry out, the sum
  does not fit in W bits, and the magnitude saturates to all ones.
* **Different signs:** the smaller magnitude is bit-inverted on its way into
  the adder and the carry in is set to 1. The adder then computes
  `larger - smaller` in two's complement. The result can never be negative,
  so it needs no second negation. The carry out is ignored in this case.
* If the inputs have opposite signs and equal magnitudes, the result is
  zero and takes the sign Sa.

The adder is `ks_adder` when `ADDER = ADDER_KS` and `bk_adder` when
`ADDER = ADDER_BK`. The type is declared in `bp_pkg`.

## The two prefix adders (`ks_adder`, `bk_adder`)

Both adders work in three steps:

1. Pre-processing: `g = a & b`, `p = a ^ b`. The carry in is folded into
   bit 0 as `g0 |= p0 & cin`.
2. A prefix tree combines (g, p) pairs with the operator
   `(g, p) o (g', p') = (g | p & g', p & p')`.
3. Post-processing: `sum = p ^ {carries, cin}`. The carry out is the prefix
   generate of all W bits.

How the two trees differ:

* **Kogge-Stone:** log2(W) levels. At level l, every bit i ≥ 2^l merges
  bit i - 2^l. This is the shallowest possible tree, with about
  W·log2(W) cells.
* **Brent-Kung:** an up-sweep and then a down-sweep.
  * The up-sweep builds the spans 1:0, 3:0, 7:0, and so on, at bits whose
    index + 1 is a power-of-two multiple.
  * The down-sweep fills in the remaining prefixes. For 16 bits it builds
    11:0 first, then 5:0, 9:0 and 13:0, then every even bit.
  * This needs about 2W cells and 2·log2(W) - 1 levels.

Both adders accept any width W ≥ 1. Their testbenches check W = 8
exhaustively, W = 13 (not a power of two) at random, and W = 64 on corner
cases and at random.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `polar_decoder`, `bp_stage` | `N` | 8 | number of LLRs, a power of two ≥ 2; the network has log2(N) stages |
| all nodes | `W` | 64 | magnitude width |
| `g_node` and above | `K` | 2 | low bits ignored by the G comparator |
| `f_node` and above | `ADDER` | `ADDER_KS` | `ADDER_KS` (Kogge-Stone) or `ADDER_BK` (Brent-Kung) |

## Where this RTL departs from, or adds to, the architecture it follows

* **One pass only.** The network is a single left-to-right sweep of the
  node grid, which is what the original architecture wires up. The
  following parts of a complete iterative BP decoder are not here:
  * right-to-left messages;
  * iterations and their scheduling;
  * frozen-bit priors;
  * hard decisions and early stopping.

  The original description does not define these, so this RTL does not
  guess at them.
* **Which node goes where.** Butterfly k sends G to output 2k and F to
  output 2k+1, and every stage repeats the same shuffle. This follows the
  N = 8 factor graph, which has a check node above an equality node in each
  butterfly. The original gate-level schematics do not clearly show how
  their node instances map to graph positions.
* **Own choices in the F node:**
  * which operand is negated;
  * negation by inverting the bits and setting the carry in;
  * saturation on overflow;
  * the sign of a zero result.
* **The G node keeps the approximate comparator (K = 2).** This is the
  example value of the approximation. The proposed node is drawn with a
  plain comparator and described as the same architecture, further
  reduced.
* **Not included:** the earlier F node used as the comparison baseline.
  That node has a separate adder, a subtractor and an approximate add-one
  unit for the negation.
* **Area and delay are not reproduced.** The published figures are FPGA
  results for an unnamed device:
  * existing design: 4825 LUTs, 143 ns;
  * Kogge-Stone version: 9369 LUTs, 65 ns;
  * Brent-Kung version: 7189 LUTs, 120 ns.

  Nothing in this repository reproduces or checks these numbers.

## Verification

Each testbench compares the RTL with a reference model in
`tb/tb_bp_ref_pkg.sv`. That model is written from the arithmetic, not from
the structure: the F node is checked against a signed integer sum with its
magnitude clipped, and the G node against its selection rule. Each
testbench ends by printing `TB_RESULT checks=<n> failures=<m>`, and each has
a watchdog.

| testbench | what it covers |
|---|---|
| `tb_ks_adder`, `tb_bk_adder` | adders at widths 64 (corner cases and random), 8 (exhaustive) and 13 (random) |
| `tb_g_node` | the 64-bit node; exhaustive 8-bit check with K = 2 (including the 384-error count) and with K = 0 |
| `tb_f_node` | both adders at 64 bits (random and directed) and at 8 bits (exhaustive, all sign pairs); checks that add, both subtract cases and saturation all happen |
| `tb_bp_stage` | one stage with each adder, checking the shuffle and the node order |
| `tb_polar_decoder` | the whole decoder at default parameters: 20 000 vectors, with the counts of every node mechanism required to be non-zero |
| `tb_polar_decoder_variants` | Brent-Kung at N = 8, W = 64, and N = 64, W = 8 with both adders |

To run one of them with Verilator:

```
verilator --binary --timing --assert -Wall \
  rtl/bp_pkg.sv tb/tb_bp_ref_pkg.sv rtl/ks_adder.sv rtl/bk_adder.sv \
  rtl/g_node.sv rtl/f_node.sv rtl/bp_stage.sv rtl/polar_decoder.sv \
  tb/tb_polar_decoder.sv --top-module tb_polar_decoder
./obj_dir/Vtb_polar_decoder
```

Every testbench finishes in well under a second of simulation.
