# Hybrid-size digit-serial systolic multipliers

Elliptic-curve and other binary-field cryptosystems need a GF(2^m)
multiplier. A multiplier built for one field size fixes the security level
of the whole system. The **hybrid field-size** multiplier here supports two
fields in one core: a small field defined by a trinomial and a large field
defined by a pentanomial. A mode input selects the field for each
operation. The core is **digit-serial** and **systolic**. The multiplier
operand B is cut into `d` digits of `w` bits. A row of `d` identical
processing elements (PEs) works on the digits in parallel, one bit per
cycle. A single partial sum then ripples through the row and leaves it
`d + w` cycles after the operands were loaded.

The same design idea is also described for integer multiplication: an
n-bit product is built from a "small" k-bit and a "large" (k+1)-bit digit
multiplier, with k = n/2. Those two multipliers use conventional and
modified Booth recoding, and a carry-save adder (CSA) tree and a
carry-select adder (CSLA) sum the results. The integer multiplier is
included as a second, independent design. The top level `hsds_top` holds
both side by side. They share only the clock and reset.

This RTL follows the architecture of the paper "Design Analysis of
Hybrid-Size Digit-Serial Systolic Multiplier". That paper gives the block
structure, the broadcasting scheme and the `d + w` latency. It gives no
field sizes, digit size, word widths, handshakes or PE internals. Those are
filled in here and listed under [Choices made in this RTL](#choices-made-in-this-rtl).

## Field multiplier (`gf_hybrid_mult`)

### Algorithm

With A, B in GF(2^m) (polynomial basis, bit i = coefficient of x^i):

    C = A*B mod f(x) = sum_{i=0}^{m-1} b_i * (A * x^i mod f(x))

The index i is written as i = (k-1)*w + t. Here k = 1..d is the digit
(the PE) and t = 0..w-1 is the cycle. PE-k needs only bit `b_((k-1)w+t)`
and operand `A^((k-1)w+t) = A*x^((k-1)w+t) mod f(x)` in cycle t. Addition is
XOR, so each PE only needs an AND row and an XOR row.

### Input broadcasting (`gf_pe0`, "PE-0")

In a classic systolic array, the A operand is pipelined from PE to PE.
That costs one m-bit register per PE just for the operand. Here PE-0
instead *broadcasts* to every PE the operand it needs:

* PE-0 holds one register `R = A*x^t mod f(x)`. It is loaded with A, and
  each cycle it is multiplied by x and reduced (shift left, XOR in the low
  terms of f if the top bit falls out).
* From R, a chain of constant "multiply by x^w mod f" XOR networks forms
  bus entry k-1 = `R * x^((k-1)w)`, which is `A^((k-1)w+t)`.
* PE-k is wired to bus entry k-1 only. This is the *selective connection*:
  each PE taps a different point of the same bus.

Each bus entry is a fixed GF(2)-linear function of R. A synthesis tool can
flatten it to one XOR tree per output bit. The chained form in the RTL only
keeps the source short.

### Processing element (`gf_pe`, "PE-1 .. PE-d")

Each PE has two m-bit registers:

* `acc`: cleared at load. In each of the w accumulation cycles it does
  `acc ^= b_bit ? a_in : 0`.
* `psum_out`: registered every cycle as `psum_in ^ acc`. PE-1 gets
  `psum_in = 0`.

Only `psum` goes from one PE to the next.

### Timing

The load edge is edge 0. Operation of one multiplication:

| edge | what happens |
|---|---|
| 0 | `start` seen while idle: R := A, B digits latched, all `acc` cleared, mode latched |
| 1 .. w | accumulation: every PE adds one term; R := R*x; each B digit shifts right one bit |
| w+1 | PE-1's `psum` holds digit 1's sum |
| w+k | PE-k's `psum` holds the sum of digits 1..k |
| w+d | PE-d's `psum` = C; `done` pulses |

`c` is valid when `done` is high and stays valid until one cycle after the
next `start`. The core runs one multiplication at a time, and `busy` is high
from edge 0 to edge w+d. `start` is ignored while `busy` is high.

### Hybrid field size

Elements are always M2 bits wide. In the trinomial field (`mode = 0`):

* operand bits at and above M1 are masked off;
* the shift-and-reduce step reduces modulo f1 instead of f2;
* the PEs whose digits lie wholly above M1 see zero bits and only forward
  the partial sum.

The latency is therefore `d + w` in both fields. An immediate assertion
checks that a trinomial-field result has no bits at or above M1.

Defaults (in `gf_pkg` and the `W` parameter):

| name | value | meaning |
|---|---|---|
| `M1`, f1 | 233, x^233 + x^74 + 1 | small field, trinomial |
| `M2`, f2 | 283, x^283 + x^12 + x^7 + x^5 + 1 | large field, pentanomial |
| `W` (w) | 16 | digit size |
| `D` (d) | ceil(M2/W) = 18 | number of PEs; B is zero-padded to d*w = 288 bits |

At these defaults a product takes 34 cycles. The field multiplier has about
10.8k flip-flops: 2 x 18 x 283 in the PEs, 283 in PE-0 and 288 for B.

To use other fields, change `M1`, `M2`, `F1_LOW` and `F2_LOW` in
`rtl/gf_pkg.sv` (and the same constants in `tb/tb_ref_pkg.sv`). `M1 < M2`
is assumed. `W` can be any value from 1 up; `D` follows from it.

## Integer multiplier (`hybrid_int_mult`)

### Digit split

An N-bit unsigned operand (default N = 32) is split into two k = N/2-bit
digits: A = Ah*2^k + Al and B = Bh*2^k + Bl. The product is rebuilt from
three digit products:

    A*B = H*2^(2k) + (M - H - L)*2^k + L
    L = Al*Bl,  H = Ah*Bh              (k x k bits:         small multiplier)
    M = (Ah+Al)*(Bh+Bl)                ((k+1) x (k+1) bits: large multiplier)

The digit sums are k+1 bits wide, and that is where the (k+1)-bit "large"
multiplier gets its operands. This three-product split is a choice of this
RTL; see below.

### Digit multipliers

* `booth_r2_mult` (small): radix-2 Booth. The multiplier, read as a
  (k+1)-bit number with a zero sign bit, gives k+1 digits
  `y[i-1] - y[i]` in {-1, 0, +1}.
* `booth_r4_mult` (large): radix-4 ("modified") Booth. It scans
  overlapping triplets and gives K/2+1 digits in {-2, ..., +2}, about half
  as many partial products.

In both, a negative partial product is the inverted, shifted multiplicand.
The missing +2^(shift) of each negative product is collected in one extra
correction word. The words are summed by `csa_tree`, and `csla_adder` adds
the final sum and carry. All arithmetic is modulo 2^(2K), which holds the
unsigned product exactly.

### CSA tree and carry-select adder

* `csa_tree` reduces N words to two, in Wallace order. At each level the
  words are taken in groups of three through rows of full adders; one or
  two left-over words pass through unchanged. The function works for any
  N >= 1.
* `csla_adder` splits the addition into blocks (default 8 bits). Every
  block except the lowest computes its sum for carry-in 0 and for
  carry-in 1. The carry from the block below then selects one.

### Schedule

| edge | what happens |
|---|---|
| 0 | `start` seen while idle: digits and digit sums latched |
| 1 | small multiplier: L; large multiplier: M |
| 2 | small multiplier: H (the same hardware, used again: digit-serial) |
| 3 | 6-word CSA tree + CSLA: `p` registered, `done` pulses |

The six words are H*2^(2k), L, M*2^k, the two subtracted terms as inverted
words, and one correction word 2^(k+1).

## Top level (`hsds_top`)

The top has parameters `GF_W` (default 16) and `INT_N` (default 32). Its
ports are the two cores' ports with `gf_` and `int_` prefixes:

* `gf_start`, `gf_mode`, `gf_a`, `gf_b`, `gf_busy`, `gf_done`, `gf_c`;
* `int_start`, `int_a`, `int_b`, `int_busy`, `int_done`, `int_p`;
* `clk` and an asynchronous active-low `rst_n`.

`gf_mode` is of type `gf_pkg::field_e`: `FIELD_TRI = 0`, `FIELD_PENTA = 1`.

## Choices made in this RTL

These details are not given by the original description and were chosen
here:

* **Field sizes and polynomials.** The original only says "trinomial" and
  "pentanomial". The NIST B-233 and B-283 polynomials are used.
* **Digit size.** w = 16 was chosen.
* **PE internals and PE-0.** The PE behaviour here is built from the
  broadcasting structure (serial 1-bit B inputs, tapped A^(i) operands, one
  forwarded signal per PE) and the `d + w` latency. The inside of PE-0 is
  this RTL's own. No separate "second accumulation cell" is built, because
  PE-d already outputs the finished sum at `d + w`.
* **Cross-digit products.** The integer multiplier computes the full
  product `P = A*B`, including every cross-digit term, not only the
  products of digits of equal weight.
* **Recombination of the (k+1)-bit product.** The original does not say how
  the (k+1)-bit digit product is used. The three-product split above was
  chosen because it is where (k+1)-bit digits arise with k = n/2.
* **Control.** The start/busy/done handshake, one operation at a time and
  the asynchronous reset are choices of this RTL. So are the 3-cycle
  integer schedule, the Wallace tree order, the 8-bit CSLA blocks and
  N = 32.
* **Relation of the two cores.** How the integer and field multipliers
  relate is not described, so they are kept separate.

The original reports area, delay and power against a conventional
hybrid-field design. Those are technology results; they are not reproduced
or checked here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog:

| testbench | what it checks |
|---|---|
| `tb_gf_pe0` | every bus entry, every cycle, both fields, against A*x^i mod f |
| `tb_gf_pe` | random bits, operands and partial sums against a model |
| `tb_gf_hybrid_mult` | 38 products (corner cases, random, both fields) and the d+w latency |
| `tb_booth_r2_mult`, `tb_booth_r4_mult` | random and corner products at full width; exhaustive at 4 and 5 bits |
| `tb_csa_tree` | N = 1, 2, 3, 5, 12 |
| `tb_csla_adder` | 32-bit and 13-bit (short last block) adders |
| `tb_hybrid_int_mult` | about 1000 32-bit products, the 3-cycle latency, a 12-bit instance |
| `tb_hsds_top` | both cores at default size, running at the same time |

`tb_hsds_top` runs the top at its default parameters. It counts how often
each mechanism happened and fails if one never did: products in each
field, field switches, masked operand bits, integer products, and cycles
with both cores busy.

The field reference (`tb/tb_ref_pkg.sv`) does not use the RTL's
shift-and-reduce step. It forms the full carry-less product and divides
it by the whole field polynomial.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/gf_pkg.sv tb/tb_ref_pkg.sv tb/tb_hsds_top.sv \
        --top-module tb_hsds_top -o sim
    ./obj_dir/sim

Replace `tb_hsds_top` with any other testbench name. Every testbench
finishes in well under a second.
