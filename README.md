# Systolic GF(2^m) multipliers for irreducible all-one polynomials

This RTL multiplies two elements of the binary field GF(2^m) when the field
is defined by an all-one polynomial (AOP)

    Q(z) = 1 + z + z^2 + ... + z^m .

Such fields exist whenever m + 1 is prime and 2 is primitive modulo m + 1
(m = 28, 100, 148, ...). They are attractive for elliptic-curve hardware
because almost all of the modular reduction disappears. The multiplication
is rewritten so that reducing the degree of the result is a cyclic shift of
wires, and the rest is AND gates and XOR trees arranged as a systolic
pipeline.

Two multipliers are provided, both following the structures of the paper
"Modified Time Multiplexed Systolic Array for Finite Field Multiplication
over GF(2^m) Based on Irreducible All-One Polynomials":

* **TM-n, the time-multiplexed multiplier** (`tm_aop_multiplier`). This is
  the main design. It has hardware for n rows of the computation and runs
  the rows in sets of n. The default is TM-4 at m = 28.
* **The bit-parallel systolic array** (`ps_aop_multiplier`). It is a chain
  of l processing elements that takes one product per cycle, with a latency
  of l + ceil(log2 s) + 1 cycles.

`aop_mult_top` instantiates both side by side. Each has its own ports.

## The arithmetic: why reduction becomes rotation

Since (z + 1) Q(z) = z^(m+1) + 1, every computation modulo Q can be done
modulo z^(m+1) + 1 and reduced to modulo Q only once, at the end. Modulo
z^(m+1) + 1, multiplying by z just moves bit m to bit 0. It is a one-bit
cyclic left shift of an (m+1)-bit vector, with no gates.

So the datapath works on m+1 bits:

1. Extend A with a zero coefficient for z^m: P = (0, a_(m-1), ..., a_0).
2. Form C' = sum over i = 0..m-1 of b_i * (z^i * P). Each term is an AND of
   b_i with P rotated left by i bits. The sum is a bitwise XOR.
3. Reduce C' (m+1 bits) to m bits. Since z^m = 1 + z + ... + z^(m-1)
   modulo Q, the top bit folds onto every other bit: c_i = c'_i XOR c'_m.
   This is the output reduction cell (ORC, `aop_orc`).

Throughout the RTL, bit i of a vector is the coefficient of z^i. Inputs and
outputs are m-bit polynomial-basis values.

## The dependence graph: s rows of l terms

The m terms of step 2 are arranged as a grid of s rows and l columns, with
m = l*s - r and 0 <= r < l. Row k, column c holds the term
b_(kl+c) * z^(kl+c) * P. B is padded with r zero bits. Moving one column to
the right is a rotation by one bit; the design calls this the reduction
node R. Moving one row down is a rotation by l bits; the design calls this
the multi-reduction node S. Both are wiring. For m = 28 the grid is 4 rows
of 7 columns.

The two multipliers differ in how they walk this grid:

* The bit-parallel array walks it **column by column**. There is one PE per
  column, in a pipeline, and all rows are in flight at once.
* TM-n walks it **row set by row set**. There is one PE per row, all rows of
  a set are computed in the same cycle, and the sets follow in time.

## TM-n, the time-multiplexed multiplier

```
            +-------------+  op (m+1), digits (n*l)
 A, B ----->| tm_sequencer|-----+-----------+----------+
 valid/ready|  P register |     |           |          |
            |  rotates by |  +--v---+    +--v---+   +--v---+
            |  l*n per    |  | PE 0 |    | PE 1 |...|PE n-1|   tm_pe: one row
            |  row set    |  | acc  |    | acc  |   | acc  |   per cycle, accumulates
            +-------------+  +--+---+    +--+---+   +--+---+
                                |           |          |
                             +--v-----------v----------v--+
                             |  aop_pat: XOR tree,         |
                             |  ceil(log2 n) register stages|
                             +-------------+---------------+
                                           |
                                       aop_orc -----> C (m bits)
```

**Sequencer (`tm_sequencer`).** On an input handshake it loads P and the
zero-padded B. On each following cycle of the same product it rotates P by
l*n bits. That is n applications of the S node, which jumps n rows down.
It also shifts B right by l*n bits. So in row set t the PEs see the operand
z^(t*l*n) * P and the next n*l bits of B. The product needs
K = ceil(s/n) row sets. `in_ready` is high when the sequencer is idle or in
the last row set, so products can follow back to back.

**PEs (`tm_pe`).** PE j adds the fixed rotation j*l + c for columns
c = 0..l-1 to the broadcast operand. In PE 0 these are the one-bit R nodes;
in the others they are the S nodes. All of it is wiring. Each PE then has l
AND cells and an XOR sum, and computes one row per cycle. The result is
accumulated over the K row sets in the PE's `acc` register. A `first`
flag restarts the accumulation.

**Adder tree (`aop_pat`).** On the cycle after the last row set, the n
accumulators go into a pipelined XOR tree with ceil(log2 n) registered
levels. At that same edge the PEs may already start the next product. The
ORC then produces C.

**Timing.** Latency is counted in register stages, from the clock edge that
takes A and B to the one that registers C, both included:

| configuration                | row sets K | latency 1 + K + ceil(log2 n) + 1 | new product every |
|------------------------------|-----------:|---------------------------------:|------------------:|
| TM-4, m = 28, l = 7 (default) | 1          | 5                                | 1 cycle           |
| TM-2, m = 28, l = 7          | 2          | 5                                | 2 cycles          |
| TM-1, m = 28, l = 7          | 4          | 6 = 1 + s + 1                    | 4 cycles = s      |
| TM-4, m = 100, l = 10        | 3          | 7                                | 3 cycles          |
| TM-4, m = 148, l = 37        | 1          | 5                                | 1 cycle           |

In the testbenches, `out_valid` is observed `latency` rising edges after the
edge at which `in_valid && in_ready` was sampled.

## The bit-parallel systolic array

`ps_aop_multiplier` is a chain of l PEs (`ps_pe`), one per column. PE c
receives z^c * P and, for every row k, the B bit b_(kl+c). It registers
three things:

* `t1[k]`: one partial product per row, b_(kl+c) AND (z^(kl) * its
  operand).
* `t2[k]`: the running row sums. PE-1 has none. PE-2 passes on PE-1's
  products. Every later PE XORs the two vectors it received.
* `p_out`: its operand rotated by one bit, which is the R node. The last PE
  has no R node.

After the last PE, the adder tree adds t1 and t2 of each row, sums the s
rows in ceil(log2 s) stages, and the ORC reduces the result. A and B are
presented together: the block delays B by c cycles for PE c. There is no
back-pressure. A product enters every cycle that `in_valid` is high, and the
latency is l + ceil(log2 s) + 1, which is 10 at m = 28.

## Interface of `aop_mult_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `tm_in_valid` / `tm_in_ready` | in / out | 1 | TM operand handshake |
| `tm_a`, `tm_b` | in | M | TM operands |
| `tm_out_valid`, `tm_c` | out | 1, M | TM product, valid for one cycle |
| `ps_in_valid` | in | 1 | parallel array: operands present |
| `ps_a`, `ps_b` | in | M | parallel operands |
| `ps_out_valid`, `ps_c` | out | 1, M | parallel product |

The parameters are `M` (field degree, default 28), `L` (bits of B per row,
default 7) and `N` (rows processed in parallel by TM-N, default 4). The
number of rows is s = ceil(M/L). The RTL is written for any M >= 2,
L >= 1 and N >= 1; the configurations actually simulated are listed under
Verification. The
result is the residue modulo 1 + z + ... + z^M, and it is a field product
only when that polynomial is irreducible. The defaults live in
`rtl/aop_pkg.sv`.

## Where this RTL departs from the published description

The published text describes TM-4 loosely and not always consistently. This
RTL makes the following choices:

* **TM-4 latency is 5, not 6.** The text gives 6 cycles for TM-4: 4 for the
  PEs, 1 for the adder tree and 1 for the ORC. It also says that TM-n needs
  an adder tree of ceil(log2 n) stages, and that the time-multiplexed
  structure delivers its first result after 1 + s + 1 cycles with one result
  every s cycles. The RTL follows the general statements: load, K row sets,
  ceil(log2 n) tree stages, ORC. TM-1 then matches 1 + s + 1 exactly.
* **Broadcast operand, no PE-to-PE chain in TM-n.** The block diagram feeds
  the same P to all PEs and every PE into the adder tree, and the RTL
  follows it. The text also mentions "two partial outputs per PE" and shift
  registers acting as latches between PEs. Those fit a chained PE pipeline,
  which is not what is built here.
* **Accumulation across row sets** in each TM PE, the **valid/ready
  handshake** and the **reset** are this design's own. The published design
  does not specify them.
* **XOR cell counts.** The published counts are five XOR cells in PE-1 and
  six in PE-2 to PE-4. Here each TM PE uses l - 1 = 6 XOR cells (each m+1
  bits wide) for its row, plus one more for the accumulator.
* **Throughput claim.** TM-4 at m = 28 and the bit-parallel array both take
  one product per cycle. The "4 times higher throughput" of TM-4 holds only
  against TM-1.
* **The extra bit of P is the z^m coefficient.** The figures write P as
  "0 & A" in one place and "A & 0" in another. A zero in the z^0 position
  would multiply the result by z.
* **Skew of B in the bit-parallel array** is done inside the block. The
  published figure feeds each PE its own B digit without saying when.
* **Per-cycle gate depth is not reproduced.** The published design aims at a
  cycle of one XOR delay. In this RTL each TM PE evaluates its whole row
  (one AND and ceil(log2 l) XOR levels) in one cycle, and the first tree
  stage of the bit-parallel array holds two XOR levels. Adding pipeline
  registers to match would change the latencies above.

Area, delay and power figures from the paper's results table are not
reproduced.

## Verification

Every block has a self-checking testbench in `tb/`. Products are compared
with a schoolbook multiply followed by long division by Q
(`tb/gf_ref_pkg.sv`). That model is written independently of the rotation
scheme used by the RTL. The testbenches also check latencies and
acceptance rates.

| testbench | what it runs |
|-----------|--------------|
| `tb_aop_orc`, `tb_aop_pat`, `tb_tm_pe`, `tb_tm_sequencer`, `tb_ps_pe` | each block on random data; the tree at 1, 4 and 5 inputs; the sequencer at N = 4 and N = 1 |
| `tb_tm_aop_multiplier` | TM-4, TM-1 and TM-3 at m = 28; TM-3 at m = 28 split as l = 5, s = 6; TM-2 at m = 12 with padded B; random gaps, stalls and a back-to-back burst |
| `tb_ps_aop_multiplier` | m = 28 split as l = 7 (latency 10) and as l = 5, s = 6, r = 2 (latency 9); m = 12, l = 5 (padded, latency 8) |
| `tb_aop_mult_top` | the top at its defaults, both multipliers, about 1300 products each |
| `tb_aop_mult_top_tmn` | the top with TM-1 and TM-2, exercising the row-set loop and input stalls |
| `tb_aop_fields` | both multipliers at GF(2^100) (l = 10, s = 10) and GF(2^148) (l = 37, s = 4) |

The top-level testbenches fail if any of these never happened: back-to-back
products, idle gaps, an ORC fold (top coefficient set), and, where TM
iterates, stalls and row-set iterations.

To run one with Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aop_pkg.sv tb/gf_ref_pkg.sv \
    rtl/aop_orc.sv rtl/aop_pat.sv rtl/tm_sequencer.sv rtl/tm_pe.sv \
    rtl/tm_aop_multiplier.sv rtl/ps_pe.sv rtl/ps_aop_multiplier.sv \
    rtl/aop_mult_top.sv tb/tb_aop_mult_top.sv \
    --top-module tb_aop_mult_top -Mdir obj_top
./obj_top/Vtb_aop_mult_top
```

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. A
watchdog ends a hung run with a failure.

## Files

* `rtl/aop_pkg.sv`: default parameters and small helper functions.
* `rtl/aop_orc.sv`: output reduction cell.
* `rtl/aop_pat.sv`: pipelined XOR adder tree.
* `rtl/tm_sequencer.sv`, `rtl/tm_pe.sv`, `rtl/tm_aop_multiplier.sv`: TM-n.
* `rtl/ps_pe.sv`, `rtl/ps_aop_multiplier.sv`: bit-parallel array.
* `rtl/aop_mult_top.sv`: both multipliers side by side.
* `tb/`: testbenches, the reference model and a shared top-level checker
  (`top_check.svh`).
