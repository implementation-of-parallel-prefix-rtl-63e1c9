# Parallel-prefix adder components for RNS reverse converters

A residue number system (RNS) does its arithmetic on small, independent
residues. Turning the residues back into an ordinary binary number (reverse
conversion) is the slow part, and most of it is wide additions. Parallel-prefix
adders make those additions fast but cost power and area. This RTL provides
the components used to find a middle ground. Each one uses a prefix network
only where both operands really vary, and cheaper logic elsewhere:

* **HRPX** (hybrid regular parallel-prefix XNOR/OR adder). This is a
  (4n+1)-bit adder whose second operand is constant 1 above its low bits.
  A Brent-Kung prefix adder handles the low bits. A two-gate-per-bit ripple
  chain handles the rest.
* **HMPE** (hybrid modular parallel-prefix excess-one adder). This adds
  modulo 2^n - 1 with a single representation of zero. It is a prefix adder
  followed by a conditional incrementer.
* **Kogge-Stone adder**: an 8-bit adder with carry in and carry out. It is
  the fast choice where speed is all that matters.

Everything is combinational. There is no clock, no reset and no register. An
output is valid one logic delay after its inputs change.

The reverse converter that would wire these adders together is **not** part
of this RTL. No particular moduli set or conversion algorithm is fixed here,
so `rns_ppa_top` simply places the three components side by side, each with
its own ports.

## Prefix adders in three stages

Every adder here has the same three stages.

1. **Preprocessing** (`pg_cell`). Each bit produces three signals: the
   half-sum `H = a ^ b`, the generate `G = a & b` and the propagate
   `P = a | b`. The OR form of P goes into the carry network. The carries
   come out the same as with XOR, because the two differ only when G is
   already 1. The OR form also makes the group propagate used by the HMPE
   mean "a + b is all ones".
2. **Prefix carry tree**. It combines (G, P) pairs of adjacent bit spans
   with the associative operator
   `(G, P)_hi o (G, P)_lo = (G_hi | P_hi & G_lo, P_hi & P_lo)`.
   * A **black cell** (`black_cell`) computes both halves of the result.
   * A **gray cell** (`gray_cell`) computes only G. It is used where the
     span already reaches bit 0, so that G is the final carry.
   * **Buffer cells** are plain wires in this RTL.
3. **Postprocessing** (`sum_cell`). Each sum bit is `S_i = H_i ^ C_{i-1}`.

The (G, P) pair is the packed struct `ppa_pkg::gp_t`.

### Brent-Kung tree (`bk_prefix_tree`)

For N bits the tree has L = ceil(log2 N) up-sweep levels:

* At level l, bit i joins with bit i - 2^l whenever (i+1) is a multiple of
  2^(l+1).
* After the up-sweep, bit 2^k - 1 holds the carry G_{2^k-1:0}.

It then has L - 1 down-sweep levels, which fill in the remaining bits:

* At level ll = L-2 down to 0, bit i joins with the finished span ending on
  bit i - 2^ll.
* This applies where (i+1) mod 2^(ll+1) = 2^ll and i >= 2^(ll+1).

For N = 4 the result is three cells in a row:

* 1:0 (gray)
* 3:2 (black)
* 3:0 (gray), then 2:0 (gray)

No bit drives more than two cells per level. This low fan-out is why
Brent-Kung is used here. Widths that are not a power of two work too.

The `KEEP_P` parameter controls the group propagate:

* `KEEP_P = 0` puts gray cells wherever the span reaches bit 0. `p_all` is
  then not formed and reads 0.
* `KEEP_P = 1` makes every cell black, so `p_all = P_{N-1:0}` is available.
  The HMPE needs this.

### Brent-Kung adder (`bk_adder`)

The adder's three stages are the `pg_cell`s, the tree and the `sum_cell`s.
The carry in is in effect one more bit below bit 0, with G = cin and P = 0.
One gray cell merges it into bit 0 before the tree. This gives the same
carries as an (N+1)-bit tree.

### Kogge-Stone adder (`ks_adder`)

The carry in is position 0 of an (N+1)-position network. At every level l,
every position j >= 2^l joins with position j - 2^l.

* When the joined span reaches the carry-in position, the join is a gray
  cell. Its propagate is 0, because the carry-in position propagates nothing.
* Otherwise the join is a black cell.

For N = 8 this gives ceil(log2 9) = 4 levels. `cout` is the carry of the top
position.

## HMPE: modulo 2^n - 1 with a single zero

For residues `a, b` in `0 .. 2^n - 2`, the correct result is
`(a + b) mod (2^n - 1)`. A plain n-bit sum needs correcting in two cases:

| case                   | detected by   | plain sum          | correction        |
|------------------------|---------------|--------------------|-------------------|
| a + b < 2^n - 1        | neither       | right              | none              |
| a + b = 2^n - 1        | `P_{n-1:0}`   | all ones           | +1 gives 0        |
| a + b >= 2^n           | `G_{n-1:0}`   | a + b - 2^n        | +1 (end-around)   |

An end-around-carry adder alone leaves the all-ones word as a second zero.
The **modified excess-one unit** (`modified_excess_one`) handles both
corrections at once. It adds `inc = P_{n-1:0} | G_{n-1:0}` to the sum
modulo 2^n, using an AND chain from bit 0 upward:

* `t_0 = inc`
* `t_{i+1} = t_i & S_i`
* `S'_i = S_i ^ t_i`

The chain's carry out is dropped. The prefix adder inside `hmpe` is a
`bk_adder` with `KEEP_P = 1`, so `P_{n-1:0}` comes out next to the carry.

## HRPX: prefix where both operands vary, ripple where one is constant

`hrpx` computes `s = (a + {all ones, b}) mod 2^(4n+1)`, where:

* `a` has 4n+1 bits;
* `b` gives the low `VAR_BITS` bits of the second operand;
* all higher bits of the second operand are 1.

The low `VAR_BITS` bits go through a Brent-Kung adder with no carry in. Its
carry out enters `xnor_or_chain`. A full adder with one input tied to 1
needs only two gates:

* `sum = ~(a ^ c)`
* `carry = a | c`

The chain's final carry is dropped, because nothing needs it. The ripple is
slow in principle, but it is only an OR chain, and it starts from a carry
that the prefix part delivers early.

Defaults: n = 5, so the adder is 21 bits wide, and `VAR_BITS` = 8.

## Modules

| module                | what it is                                            | default parameters |
|-----------------------|-------------------------------------------------------|--------------------|
| `ppa_pkg`             | `gp_t` (generate, propagate) struct                   | -                  |
| `pg_cell`             | preprocessing cell: H, G, P                           | -                  |
| `black_cell`          | prefix operator: G and P                              | -                  |
| `gray_cell`           | prefix operator: G only                               | -                  |
| `sum_cell`            | S = H xor C                                           | -                  |
| `bk_prefix_tree`      | Brent-Kung carry tree                                 | N=4, KEEP_P=0      |
| `bk_adder`            | Brent-Kung adder with cin, cout, optional P_{N-1:0}   | N=4, KEEP_P=0      |
| `ks_adder`            | Kogge-Stone adder with cin, cout                      | N=8                |
| `modified_excess_one` | conditional +1 driven by P or G                       | N=5                |
| `hmpe`                | modulo 2^N - 1 adder                                  | N=5                |
| `xnor_or_chain`       | ripple adder of a constant-one operand                | M=13               |
| `hrpx`                | (4N+1)-bit hybrid adder                               | N=5, WIDTH=21, VAR_BITS=8 |
| `rns_ppa_top`         | HRPX, HMPE and KSA side by side                       | N=5, VAR_BITS=8, KSA_N=8 |

Ports of `rns_ppa_top`:

* HRPX: `hrpx_a[4N:0]`, `hrpx_b[VAR_BITS-1:0]` → `hrpx_s[4N:0]`
* HMPE: `hmpe_a[N-1:0]`, `hmpe_b[N-1:0]` → `hmpe_s[N-1:0]`
* KSA: `ksa_a`, `ksa_b`, `ksa_cin` → `ksa_s`, `ksa_cout`

## Where this design makes its own choices

The following points are inferred or chosen here, not fixed by the source
description:

* **Constant bits of the HRPX are ones.** One description calls the cells
  XOR/OR and another calls them XNOR/OR. XNOR/OR is used, because an OR carry
  only arises with a constant-one input.
* **Width of the HRPX's prefix part.** `VAR_BITS = 8` follows the drawing of
  the component, which has eight prefix columns. The total width 4n+1 = 21
  follows the stated n = 5. The drawing's own top bit index (17) does not
  match 21 bits; the stated n was followed.
* **Prefix network and width of the HMPE.** Brent-Kung is chosen, the
  structure preferred for these components. N = 5 is chosen to match n.
  Neither is given for this component.
* **Increment condition.** `inc = P | G` is derived from the arithmetic.
* **OR-form propagate.** The source gives both the OR and the XOR form; OR
  is used in the carry network.
* **Kogge-Stone width.** Only the 8-bit Kogge-Stone adder is described. The
  module is parameterised, and its testbench also runs 5 and 16 bits.
* **Published FPGA area figures.** They cannot be compared directly. The
  published HRPX result used 24 I/O pins, which is fewer than the 50 of the
  21-bit configuration. The Kogge-Stone result used 32 pins, against 26 for
  the 8-bit adder. So the published instances were sized differently from
  the described ones.
* **Merged carry in.** In `bk_adder` the carry in is merged by a gray cell
  ahead of the tree, instead of widening the tree by one position.
* **Not built.** The reverse converter itself, a forward converter and RNS
  channel arithmetic are not built; no structure for them is specified.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
compares the module with integer arithmetic and prints
`TB_RESULT checks=N failures=M`. Coverage:

* **Cells**: exhaustive.
* **`ks_adder`**: exhaustive over all 2^17 inputs at 8 bits; random at 5 and
  16 bits.
* **`hmpe`**: exhaustive over all residue pairs at N = 3, 5 and 8.
* **`hrpx`**: exhaustive at a 13-bit / 4-prefix-bit size; random plus
  forced long carry chains at the default size.
* **`bk_prefix_tree`**: widths 1, 4, 5, 7, 8, 13 and 16, in both `KEEP_P`
  forms, against a bit-serial carry recurrence.
* **`tb_rns_ppa_top`**: runs the top at its default parameters. It counts,
  and requires at least once, each of the following:
  * an HRPX carry into the chain;
  * an HRPX carry through the whole chain;
  * each of the three HMPE cases;
  * a KSA carry in;
  * a KSA carry out.

Run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl +libext+.sv \
    rtl/ppa_pkg.sv tb/tb_rns_ppa_top.sv --top-module tb_rns_ppa_top
./obj_dir/Vtb_rns_ppa_top
```

Each testbench finishes in well under a second of simulated work.

## Changing the design

* To change the HRPX width, set `N` (the width is `4*N+1`) and `VAR_BITS`.
  `VAR_BITS` must be below the width.
* To change the residue width of the HMPE, set its `N`.
* To try another prefix network in a component, replace `bk_prefix_tree`
  with one that has the same ports. `ks_adder` shows the Kogge-Stone
  pattern.
