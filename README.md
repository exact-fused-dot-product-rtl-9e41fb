# Exact fused dot product add (FDPNA) in SystemVerilog

This operator computes

    R = round(X_0*Y_0 + X_1*Y_1 + ... + X_{N-1}*Y_{N-1} + Z)

with **one** rounding of the exact sum. Subnormals are handled on every input and on the
output. The result is bit-exact with the mathematically correct result in all five IEEE 754
rounding modes, cancellations included. This holds even in the awkward cases: two large
products cancel and only a tiny third term is left, or a product involves a subnormal.

The textbook way to get an exact sum is a Kulisch accumulator: a fixed-point register wide
enough for any product. That register is 554 bits for FP32 and 4196 bits for FP64. Most of
its columns only ever hold zeros or copies of a sign bit. This design removes those columns
and adds the terms in a *compressed* accumulator.

With N = 2 the operator is a complex multiply-add:
Re = round(a*c - b*d + e) and Im = round(a*d + b*c + f). Each component is rounded only
once, which is the most accurate result possible. That accumulator is roughly (N+1) times
one significand wide, whatever the exponent range. The exact sum can still be read back from
it. Most of the design's logic decides where each term goes in that smaller accumulator.

The default build is FP32 with N = 4 (253-bit compressed accumulator instead of 557 bits).
The same RTL builds FP16, FP64 and mixed BF16-to-FP32 operators with any N.

## Terms in a common format

Each product X_i*Y_i becomes a pair (E_i, M_i) (`fdp_product`). The implicit bit is 0 for a
subnormal and 1 otherwise. The two significands are multiplied exactly. The product is
negated if the signs differ, and the exponents are added. The addend Z is brought into the
same form (`fdp_addend`). Every term then has the same shape:

    value = M * 2^(E - (w-2))

Here M is a w-bit magnitude with two integer bits, carried as a (w+1)-bit two's complement
number. E is a signed, unbiased exponent. The width is w = max(2 + m_out, 2(1 + m_in)). For
example, w = 48 for FP32, 106 for FP64 and 22 for FP16. For BF16 products with an FP32
addend, set `W = 32` so that subnormal BF16 products stay exact (see Limits).

## The compressed accumulator: zones

First the N+1 terms are sorted by exponent, largest first. Call them (E*_0, M*_0) ...
(E*_N, M*_N). The accumulator is cut into N+1 zones. Bit positions are counted from the left
(most significant) end. Zone i starts at position d_i and holds, in order:

* p_i protection bits;
* a w-bit slot for a significand;
* one spare bit, where a round bit can land.

The sizes are:

    p_i = ceil(log2(N + 1 - i))          (carries of the up to N+1-i terms that can share zone i)
    d_0 = 0,   d_{i+1} = d_i + w + 1 + p_i,   w_compressed = d_{N+1}

For FP32 with N = 4 this gives d = 0, 52, 103, 154, 204 and w_compressed = 253. One extra sign
bit sits to the left of position 0.

A term either sits in its own zone or joins the zone of a larger term it overlaps. If a term
is far below every larger term, it sits in the slot of its own zone. The bits that would
separate it from the larger terms in a full-width accumulator are all equal, so leaving them
out loses nothing. If it is close to a larger term, it is placed at its true distance from
that term, inside that term's zone. It then uses the zones to its right, which would
otherwise be empty, as room for the addition.

## Shift computation (parallel prefix)

Sorted term i has its MSB placed at position S_i:

    x_j = d_j + p_j + E*_j
    S_i = min over j <= i of x_j  -  E*_i
    k_i = index j of that minimum   (the zone term i belongs to)

`fdp_shift_compute` computes the prefix minimum with a Hillis-Steele network of `fdp_min_sel`
nodes. Position i is combined with position i - 2^l at level l, giving ceil(log2(N+1)) levels
instead of a chain of N dependent steps. Each node also carries the index k of the minimum it
keeps. On a tie the term keeps its own zone; both choices give the same shift and the same
exponent. S_0 = d_0 + p_0 and k_0 = 0 fall out of the same formula. S_i never exceeds
d_i + p_i, so the shifter of term i (`fdp_rshift`) only needs that range. An assertion
checks this.

## Reading the exact sum back

`fdp_adder_tree` adds the aligned, sign-extended terms. `fdp_norm` converts the sum to
sign-magnitude, counts its leading zeros L and shifts it left. `fdp_final_exp` then works out
which exponent the leading one has:

* It finds the zone i with d_i <= L < d_{i+1}.
* That zone belongs to the group of zone k_i. The slot of that group holds the 2^1 bit of a
  term with exponent E*_{k_i}.
* So the leading one has exponent E = E*_{k_i} + 1 - (L - (d_{k_i} + p_{k_i})).
* If the sum is zero, L = w_compressed.

Once the leading one is found, the bits below it are correct for rounding. A partial
cancellation between normal terms leaves more than a significand's worth of bits in the
zone, because merging widened it. A full cancellation makes the leading-zero count skip the
whole zone. Bits from lower zones can then only feed the sticky bit, and "are they all zero"
has the same answer in the compressed and the full accumulator.

`fdp_round` subnormalises if needed, takes the round and sticky bits, and rounds once. It
also produces infinities, overflows, NaNs and exact zeros, and raises the flags.

## Sorting

`fdp_exp_sort` uses the key {E_i, nz_i}. nz_i is 0 only for a zero significand, so a
subnormal term sorts above a zero term with the same exponent. The sort works by ranking:

* all (N+1)N/2 key pairs are compared in parallel;
* a population count per term gives its rank;
* a crossbar moves each term's exponent and index to its rank.

The significands do not go through the crossbar. Each sorted position picks its significand
with a multiplexer driven by the index. This keeps the sort off the multiplier's critical
path. Equal keys keep their input order.

## Module map

| module | role |
|---|---|
| `fdp_pkg` | rounding-mode enum, flag and term-class structs, the p_i / d_i / w functions |
| `fdpna` | top: N `fdp_product`, one `fdp_addend`, `fp_sigma`, output register |
| `fdp_product` | implicit bit, multiply, negate, exponent add, special-value class |
| `fdp_addend` | Z to (E_N, M_N) |
| `fp_sigma` | the compressed exact sum and rounding; special-value and zero-sign rules |
| `fdp_exp_sort` | ranking sort by {exponent, non-zero} |
| `fdp_shift_compute`, `fdp_min_sel` | parallel-prefix S_i and k_i |
| `fdp_rshift` | per-term arithmetic right shift, range 0..d_i+p_i |
| `fdp_adder_tree` | N+1 operand adder (balanced tree) |
| `fdp_norm`, `fdp_lzc` | sign-magnitude, leading-zero count, left shift |
| `fdp_final_exp` | zone of the leading one and its exponent |
| `fdp_round` | subnormalise, round, overflow/NaN/infinity/zero, flags |

## Interface and timing of `fdpna`

| port | width | |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; active-low synchronous reset (clears `out_valid`) |
| `in_valid` | 1 | operands are valid this cycle |
| `x`, `y` | N x (1+EIN+MIN) | packed arrays of multiplicands, element i is X_i / Y_i |
| `z` | 1+EOUT+MOUT | addend |
| `rm` | 3 | 0 RNE, 1 RTZ, 2 RDN, 3 RUP, 4 RMM (RISC-V encoding) |
| `out_valid`, `r`, `flags` | 1, 1+EOUT+MOUT, 4 | result one cycle after `in_valid`; flags = {invalid, overflow, underflow, inexact} |

The whole datapath is combinational between the operands and the output register. The
latency is 1 cycle and one operation can start every cycle. For a fast clock, pipeline
registers would go between the stages listed above, for example after the sort and shift
computation, after the adder, and after normalisation. No such pipelining is built here.

Parameters: `N` (4), `EIN`/`MIN` (8/23) for X and Y, `EOUT`/`MOUT` (8/23) for Z and R, and
`W`, which defaults to max(2+MOUT, 2(1+MIN)).

Configurations:

| configuration | N | EIN | MIN | EOUT | MOUT | W | w_compressed |
|---|---|---|---|---|---|---|---|
| FP32 (default) | 4 | 8 | 23 | 8 | 23 | 48 | 253 |
| FP16 | 2 | 5 | 10 | 5 | 10 | 22 | 72 |
| BF16 to FP32 | 4 | 8 | 7 | 8 | 23 | 32 | 173 |
| FP64 | 16 | 11 | 52 | 11 | 52 | 106 | 1873 |

Compression pays while w_compressed is below the full-size width. That is 80 + guard bits
for FP16, 554 + guard bits for FP32 and 4196 + guard bits for FP64. So FP16 gains only at
N = 2, FP32 up to about N = 10, and FP64 at every N up to 16.

## Special values and rounding details

These are choices made in this implementation, following IEEE 754 practice for fused
operations:

* **NaN:** any NaN operand gives the canonical quiet NaN (sign 0, MSB of the fraction set,
  rest zero). Infinity times zero, or infinities of both signs, also give that NaN.
* **Invalid flag:** raised for a signalling NaN operand, infinity times zero, or +inf plus
  -inf. A quiet NaN next to +inf and -inf still raises it.
* **Overflow:** gives infinity in RNE, RMM and the directed mode that points away from zero.
  Otherwise it gives the largest finite number. The overflow and inexact flags are raised.
* **Underflow:** tininess is detected before rounding. The underflow flag is tiny and inexact.
* **Exact zero:** if every term is a zero of the same sign, the result is that signed zero.
  Otherwise it is +0, or -0 when rounding toward minus infinity.

## Limits and departures

* Sign bits: the protection bits p_i are read as ceil(log2(N+1-i)). One extra accumulator
  sign bit is added on the left, and significands carry one extra sign bit. These keep the
  exact sum inside the word for any signs of the terms.
* Adder: `fdp_adder_tree` is a plain tree of wide adders, not a hand-built compressor tree.
  The shifter of term i is only W+1+d_i+p_i bits wide and fills the rest of its word with
  constant zeros. The summed bits therefore form a staircase, term 0 the narrowest, and
  synthesis drops the constant bits. Mapping that staircase onto compressors is left to the
  synthesis tool.
* Mixed precision: exactness is guaranteed for homogeneous formats and for BF16 to FP32 with
  W = 32. With the default W = 25 for BF16 to FP32, a subnormal BF16 operand can produce a
  product whose useful bits cross into the next zone. Use W = 32 if BF16 subnormals must be
  honoured. Other mixed formats where e_in <= e_out (FP16 to FP32, for example) have the
  same problem in general and are not guaranteed exact.
* Not built: a full-size (Kulisch) variant, a sequential shift computation, a sorting-network
  sort, and real pipelining.

## Verification

Every module has a self-checking testbench in `tb/`. The values they compare against are
worked out independently of the RTL. The main reference, `tb/fdp_ref_pkg.sv`, forms the exact
sum in a 4224-bit fixed-point integer (a full-size accumulator) and rounds it bit by bit.

* `tb_fdpna`: the default FP32, N = 4 operator. It runs 20,000 operations, one per cycle, and
  checks the 1-cycle latency. Stimulus covers:
  * random operands;
  * all products at one exponent with random signs;
  * pairs of equal-exponent products of opposite sign;
  * a leading product of a subnormal and a large normal;
  * exact cancellation of the leading products, down to an exact zero;
  * overflows and special values.

  It counts how often each mechanism happened: zone merging, separate zones, a leading one
  below zone 0, full cancellation, subnormal and overflowing results, rounding increments,
  NaN, infinity and negative results. A mechanism that never happened counts as a failure.
* `tb_fdpna_formats`: all 16 configurations of FP16, BF16 to FP32 (W = 32), FP32 and FP64
  with N = 2, 4, 8 and 16. It runs 600 checked operations each. This testbench takes a few
  minutes to compile.
* `tb_fdpna_twiddle`: an application test. It computes FFT twiddle factors on the fly with
  the recurrence w_{k+1} = w_k + w_k * (e^{j theta} - 1), for P = 2^6 up to 2^16 points. Each
  step is a complex multiply-add done as two operations, each with two products. Because
  every step is rounded only once, the largest distance from the exact factors stays near
  2e-6 over all 65,536 steps (measured: 2.4e-7 at P = 64 and 3.3e-6 at worst). Every
  operation is also checked bit for bit against the reference.
* `tb_fdpna_fdp2a`: directed tests of the two-product operator in FP32 and FP64, 250,000
  operations per format. The classes are:
  * exact cancellation between two products whose significands all differ but whose
    products are equal, built from four half-width integers as (a1 a2)(b1 b2) and
    (a1 b1)(a2 b2);
  * cancellation between Z and a product, exact or one ulp off, with a small third term
    far below;
  * sums that sit exactly on a rounding tie, with a tiny term of either sign 1 to 60 places
    further down (or one that removes the tie);
  * subnormal operands and results;
  * random operands, special values included.
* Block testbenches: `tb_fdp_product`, `tb_fdp_addend`, `tb_fdp_exp_sort`,
  `tb_fdp_shift_compute` (against the sequential zone-by-zone definition of the shifts),
  `tb_fdp_rshift`, `tb_fdp_adder_tree`, `tb_fdp_norm`, `tb_fdp_final_exp`, `tb_fdp_round`,
  `tb_fp_sigma`.

To simulate with Verilator 5, for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fdp_pkg.sv tb/fdp_ref_pkg.sv rtl/*.sv tb/tb_fdpna.sv \
        --top-module tb_fdpna -o sim
    ./obj_dir/sim

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>`.
