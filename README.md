# Modulo 2^n − 2^k − 1 adder, with a modular-feedback random number generator and a residue FIR filter

In a residue number system (RNS) an integer is carried as its remainders
with respect to several pairwise co-prime moduli. Additions and
multiplications then run independently in every residue channel, without
carries between channels. The channel that limits speed is the modular
adder, `s = (a + b) mod m`. Moduli of the form **m = 2^n − 2^k − 1**
(1 ≤ k ≤ n−2) are attractive because a whole family of them exists for one
word width n, which lets a designer build many channels of almost equal
width and delay.

This RTL implements:

* **`mod_adder`** – a modulo 2^n − 2^k − 1 adder that needs only **one**
  parallel-prefix carry network. It computes the carries of A+B+T, and when
  the sum does not overflow it corrects them into the carries of A+B. There
  is no second carry tree.
* **`rns_rng`** – a random number generator. It is an LFSR-style shift
  register of n-bit words in which the XOR feedback is replaced by this
  modular adder.
* **`rns_fir`** – a direct-form FIR filter in one residue channel. It has a
  delay line, modular multipliers and a chain of these modular adders.
* **`rns_top`** – the generator and the filter side by side.

The default channel is n = 8, k = 4, so **m = 239**. Everything is
parameterised by `N` and `K`.

The adder is the one of Ma, Hu and Hao (IEEE TCAS-I, 2013). The generator
and the filter built around it follow Purushothaman and Divya (IJIRCCE,
vol. 3, no. 8, 2015). Where those descriptions leave a detail open, this RTL
makes its own choice. The section *Choices and departures* lists them.

## Why one carry tree is enough

Let T = 2^n − m = 2^k + 1. For residues a, b < m:

* if A+B+T ≥ 2^n (a carry out of bit n−1), then A+B ≥ m, and the result is
  the low n bits of A+B+T;
* otherwise the result is A+B.

A textbook modular adder builds two adders, one for A+B and one for A+B+T,
and a multiplexer. Here only the carries of A+B+T, `ct[i]`, are computed.
The carries of A+B follow from them by cheap logic. This works because of
one identity. Let C⁰ and C¹ be the carries of the same addition with carry
in 0 and with carry in 1, and let P be the group propagate. Then

    C⁰(i+1) = ~P(i:0) · C¹(i+1)

T has only two 1 bits, at bit 0 and at bit k. So "removing T" means
removing two carry-ins, and each one is removed with the identity above.

### The four units

```
 a,b ─► madd_preproc ─(g,p,c_scsa)─► madd_carry_gen ─(ct,cout)─► madd_carry_corr ─(creal)─► madd_sum ─► s
            └────────────── x = a^b, p ──────────────────────────────┘               ▲ p, cout
```

**Pre-processing (`madd_preproc`).** T is folded into the generate and
propagate pairs (g, p) so that the prefix tree sees a plain two-operand
addition with no carry in. The word splits into two sub-adders.

* **A1, bits 0 … k−1.** The '1' of T at bit 0 acts as a carry in, and bit 0
  absorbs it:
  * bit 0: (g0, p0) = (a0 | b0, ~(a0 ^ b0));
  * bits 1 … k−1: ordinary (a&b, a^b).
* **A2, bits k … n−1.** These bits add a, b and the '1' of T at bit k. A
  simple carry-save stage does it:
  * first (g′, p′) = (a&b, a^b);
  * bit k: (p′k, ~p′k), which is p′k plus the constant 1;
  * each higher bit i: (p′i & g′(i−1), p′i ^ g′(i−1));
  * the carry-save stage's own carry out, `c_scsa = a(n−1) & b(n−1)`,
    leaves the tree.

The unit's defining identity is Σ p_i·2^i + Σ g_i·2^(i+1) + c_scsa·2^n =
A + B + T. Its testbench checks this identity for every operand pair.

**Carry generation (`madd_carry_gen`).** A Sklansky prefix tree computes
the group generates, so that `ct[i+1] = G(i:0)`. The overflow flag is
`cout = c_scsa | G(n−1:0)`. Any prefix tree gives the same result; Sklansky
uses log2(n) levels.

**Carry correction (`madd_carry_corr`).** This is the subtle part. When
`cout = 1`, the carries are already right. When `cout = 0`:

1. *First correction (A1).* This removes the '1' at bit 0. For bits below k:
   `creal[i+1] = ct[i+1] & (cout | ~X(i:0))`, where X is the group
   propagate of the plain a^b bits. The preprocessed p0 is an XNOR, so it
   cannot be used here. For this reason the pre-processing unit also brings
   out x = a ^ b.
2. *Second correction (A2).* This removes the '1' at bit k. The carry into
   A2 has itself just been corrected. So the condition depends on the
   lower group propagate and on whether p_k agrees with ct[k]:

       e            = ~X(k−1:0) & (p_k ^ ct[k])
       creal[k+1]   = ct[k+1] & (cout | e)
       creal[i+1]   = ct[i+1] & (cout | ~P(i:k+1) | e),   i = k+1 … n−2

   Here p_k and P(i:k+1) are the *pre-processed* propagates.

When `cout = 0`, the carries above bit k are those of the carry-save form
p′ + 2g′ of A+B, not those of plain a + b. This is why the sum stage keeps
using the pre-processed p bits.

**Sum (`madd_sum`).** At bits 0 and k the partial sum of A+B is the
complement of that of A+B+T, so `cout` chooses between them:

    s0 = cout ^ ~p0        sk = creal_k ^ cout ^ ~p_k        si = creal_i ^ p_i

`cout ^ ~p_k` is ready as early as `creal`, so the adder has only the delay
of one prefix adder plus the AND-OR correction.

**Worked example (m = 239).** Take a = 0xD7 (215) and b = 0xB1 (177).
* The pre-processing gives p = 0101_0111 and g = 0010_0001.
* A+B+T = 409 ≥ 256, so cout = 1.
* s = 409 − 256 = 153 = 0x99, which equals (215 + 177) mod 239.

Now take a = 100 and b = 50.
* A+B+T = 167 < 256, so cout = 0.
* The corrected carries are those of 100 + 50, and s = 150.

## Random number generator (`rns_rng`)

Four n-bit stages SR1 → SR2 → SR3 → SR4. On every clock:

    SR1 <= (SR3 + SR4) mod m      SR2 <= SR1      SR3 <= SR2      SR4 <= SR3

* `shiftout` is SR4. `tap` is the feedback word (the adder output).
* The output sequence therefore satisfies
  `out(t+4) = (out(t) + out(t+1)) mod m`. This is a lagged-Fibonacci
  recurrence modulo m.
* Whenever the sum reaches m the adder wraps. The modulus (the choice of n
  and k) can itself be treated as part of the secret.
* `rst_n` (synchronous, active low) loads the `SEED` parameter. `load`
  loads the `seed` port, with `seed[0]` going to SR1.
* Seed words must be residues (< m). An assertion checks this on `load`.
* The default seed is SR1..SR4 = 0x22, 0x99, 0x30, 0x60. From it the
  generator produces `shiftout` = 60, 30, 99, 22, 90, … and
  `tap` = 90, C9, BB, B2, 6A, … (hex), the sequence of the published
  simulation. From this seed the state repeats after 3570 clocks (this is
  measured, and the testbench prints it). Other seeds give other cycles.
  With 239^4 possible states, the period depends strongly on the seed.

## FIR filter (`rns_fir`) and modular multiplier (`mod_mult`)

    y(n) = b0·x(n) + b1·x(n−1) + b2·x(n−2) + b3·x(n−3)   (mod m)

**Structure.**
* The filter has three delay registers and four `mod_mult` products.
* A chain of three `mod_adder`s sums the products. The first adder adds the
  b0 and b1 products, and each later adder adds one more product.
* `TAPS` sets the length; the default is 4 and at least 3 are needed.

**Timing.**
* `y` is combinational from `x` and the delay line. There is no output
  register, so y(n) is valid in the cycle that x(n) is applied.
* The delay line shifts on a clock edge when `en` = 1 and holds otherwise.
  `rst_n` clears it.
* The coefficients come in through the `coeff` port and must be residues.

**`mod_mult`.**
1. It forms the full 2n-bit product.
2. It folds the product N+2 times with 2^n ≡ 2^k + 1 (mod m): the step
   H·2^n + L → (H << k) + H + L keeps the residue and at least halves H.
3. A final conditional subtraction of m brings the result into [0, m−1].

The filter works in one residue channel. A full multi-channel RNS filter
would also need binary-to-residue and residue-to-binary converters, which
are not part of this design.

## Top level (`rns_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of both blocks |
| `rng_load`, `rng_seed` | in | 1, 4×N | load the generator's four stages |
| `rng_out`, `rng_tap` | out | N | generator output (SR4) and feedback word |
| `fir_en`, `fir_x`, `fir_coeff` | in | 1, N, TAPS×N | filter enable, sample, coefficients |
| `fir_y` | out | N | filter output |

The two blocks share only the clock, the reset and the modulus parameters.

## Parameters

`N` and `K` (package `rns_pkg`: `RNS_N = 8`, `RNS_K = 4`) set the modulus
2^N − 2^K − 1. The only requirement is 1 ≤ K ≤ N−2, and an elaboration-time
assertion checks it. The adder testbench runs m = 61, 59, 47 (n = 6, with
k = 1, 2, 4) and m = 1015 (n = 10, k = 3) as well as 239. `rns_rng`'s
default `SEED` is written for N = 8; give a matching seed for other widths.

## Files

| file | content |
|---|---|
| `rtl/rns_pkg.sv` | default n, k; modulus and correction functions |
| `rtl/madd_preproc.sv`, `madd_carry_gen.sv`, `madd_carry_corr.sv`, `madd_sum.sv` | the adder's four units |
| `rtl/mod_adder.sv` | the modular adder |
| `rtl/mod_mult.sv` | modular multiplier |
| `rtl/rns_rng.sv`, `rtl/rns_fir.sv`, `rtl/rns_top.sv` | generator, filter, top |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/madd_ref_pkg.sv` | ripple-carry reference models for the unit testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rns_pkg.sv tb/madd_ref_pkg.sv \
          tb/tb_rns_top.sv --top-module tb_rns_top -Mdir obj_top
./obj_top/Vtb_rns_top
```

Replace `tb_rns_top` with any other `tb_*` name. All testbenches finish in
well under a second. The checks in each:

* **Adder and its units.** Exhaustive over all residue pairs of m = 239,
  compared with integer `%` or with a ripple-carry model. The checks also
  include the values printed in the published adder trace.
* **`tb_mod_mult`.** Exhaustive for m = 239, 61 and 47.
* **`tb_rns_rng`.** The published trace from reset, then 2000 clocks from
  random seeds against a software model.
* **`tb_rns_fir`.** The impulse response, then 5000 random samples with a
  random enable.
* **`tb_rns_top`.** Runs both blocks at the default parameters for 3000
  clocks, with the filter fed by the generator. It counts resets, seed
  loads, feedback wraps, held filter cycles, adder wraps in the filter and
  multiplier reductions, and each must occur.

## Choices and departures

* **Prefix tree.** Sklansky. The adder works with any prefix tree, and the
  tree drawn in the original gate-level schematic is not copied.
* **Bit-k pre-processing.** The pair is (g_k, p_k) = (p′_k, ~p′_k). This is
  the reading that agrees with the published g/p simulation values and with
  the correction and sum equations.
* **Multiplier.** The source only states that the filter's taps multiply.
  The fold-and-subtract multiplier is this design's own simplest choice. It
  is not an optimised 2^n − 2^k − 1 multiplier.
* **Filter controls.** The filter's enable, reset, run-time coefficient port
  and the absence of an output register are this design's choices.
* **Generator controls.** The generator's reset, seed load and default seed
  are choices too. The default seed was picked to reproduce the published
  sequence.
* **Not built.** The generator's randomness and its use in a cipher are not
  covered: no cipher is specified. There are no area or timing figures from
  an FPGA flow; the original reports Spartan-3E results for the adder only.
* **Baselines.** The baseline adders used for comparison in the original
  (two-adder select, reused binary adder, modulo 2^n − 2^(n−2) − 1) are not
  part of this design.
