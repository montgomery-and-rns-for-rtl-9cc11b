# Carry-save Montgomery and residue arithmetic for RSA

RSA encryption and decryption are modular exponentiations, `c^d mod N`, on
operands of 512 bits and more. This RTL holds two hardware approaches to that
arithmetic, side by side:

* **Montgomery engine.** A complete 1024-bit RSA exponentiator. It is built
  from bit-serial radix-2 Montgomery multipliers that never propagate a carry
  across the word. All values stay in carry-save form (two vectors whose sum is
  the number) from the first multiplication to the last. A single serial
  addition at the very end turns the result back into one binary number.
* **Residue (RNS) arithmetic units.** The processing units of a residue number
  system for moduli of the form `2^n - 1` and `2^n + 1`: multipliers, binary to
  residue converters and accumulating modular adders. The `2^n + 1` units work
  in diminished-1 form.
* **RNS Montgomery multiplier and exponentiator.** A residue-domain
  Montgomery multiplication (improved Bajard scheme) over two bases of 10
  moduli each plus a redundant power-of-two modulus, and a square-and-multiply
  sequencer that runs RSA on it. The result is left in residue form; the final
  exact correction and the conversion back to binary are not part of this RTL
  (see "What is not here").

Everything is synthesizable SystemVerilog-2017. It has been linted with
Verilator and elaborated with Yosys (slang front end), and every block has a
self-checking testbench.

## Block map

```
rsa_top
├── rsa_mont            RSA exponentiation c^d mod N (Montgomery engine)
│   ├── mont5to2_new ×2 carry-save Montgomery multipliers (square / multiply)
│   │   ├── brfa        serial bits of the multiplier operand a = a1 + a2
│   │   └── csa_array ×3
│   └── brfa            final serial addition M = M1 + M2
├── mont_io             one Montgomery multiplication behind 32-bit I/O registers
│   └── mont5to2_new
├── conv_mod2n_m1 → mul_mod2n_m1 → add_mod2n_m1     residue channel, mod 2^r - 1
├── conv_dim1_p1  → mul_mod2n_p1 → add_mod2n_p1     residue channel, mod 2^r + 1
│                   (built from csa_eac rows; the multipliers through csa_tree_eac)
└── rns_exp             RNS exponentiation a^e mod N, residue in and out
    └── rns_mm          RNS Montgomery multiplication, K moduli per base
rsa_pkg                 I/O width (32) and the exponentiator phase enum
```

Top-level parameters: `N_BITS = 1024` (operand width `n`), `E_BITS = 512`
(exponent length, half the operand size), `RNS_N = 8` (width `r` of the
example residue channels), `RNS_K = 10` (moduli per RNS base) and `RNS_W = 7`
(residue width of the RNS multiplier). The RNS exponentiator uses the same
`E_BITS` exponent length as the Montgomery engine. All registers use one clock and one synchronous,
active-high `rst`.

## The Montgomery multiplier (`mont5to2_new`)

### The arithmetic

Radix-2 Montgomery multiplication computes `a·b·2^-n mod N` one bit of `a` at a
time:

```
S = 0
for i in 0 .. n-1:   q = (S + a_i·b) mod 2;   S = (S + a_i·b + q·N) / 2
```

`q` depends on `a_i·b_0`, and that dependency sits on the critical path. This
multiplier removes it. It feeds in `B = 2b` instead of `b`, so `B_0 = 0` and the
quotient bit becomes simply the parity of the running sum. It then runs one
extra step to cancel the extra factor 2:

```
S = 0
for i in 0 .. n:     q = S mod 2;   S = (S + a_i·B + q·N) / 2     -- a_n = 0
result = a·2b·2^-(n+1) = a·b·2^-n  (mod N)
```

Callers see the same function as the classic multiplier, for one extra clock.

### The datapath

`S`, `a` and `b` are all held in carry-save form: `S = S1 + S2`, `a = a1 + a2`,
`b = b1 + b2`. Each step adds five vectors:

| row | operand |
|-----|---------|
| 1, 2 | `S1`, `S2` |
| 3, 4 | `a_i & 2·b1`, `a_i & 2·b2` |
| 5 | `q & N`, with `q = S1[0] xor S2[0]` |

Three chained 3:2 CSA arrays (`csa_array`) reduce the five rows to two vectors.
Both vectors are then halved into the SUM/CARRY register. `q` comes straight
from register bits, so the `N` row is ready as soon as the clock edge passes.
The total is always even, and the carry vector's LSB is always zero, so the
sum vector's LSB is zero too and both vectors can be halved exactly.

The bits `a_i` come from a **barrel register full adder** (`brfa`). It holds
`a1` and `a2` in two rotating registers and feeds their bit 0 through one full
adder that keeps its carry in a flip-flop, so each clock yields the next bit of
`a1 + a2`. The full sum of `a` is never formed. The extra bit `a_n` is forced
to 0.

### Timing and interface

* One `start` clock clears `S1/S2` and loads `a1/a2` into the BRFA. Then `n+1`
  iteration clocks follow.
* `done` pulses in the cycle after the last iteration, so the result is ready
  `n+2` clocks after the start edge (1026 for n = 1024).
* `b1`, `b2` and `n_mod` must stay stable until `done`. `a1`/`a2` are read only
  at `start`. A new `start` may be given in the `done` cycle.
* Outputs `s1`, `s2` are `n+1` bits.

### The range condition (read this before using it)

There is no final conditional subtraction, so results are only kept below `2N`.
That holds for all inputs below `2N` only if **`N < 2^(n-2)`**: the modulus
needs two spare top bits in the `n`-bit datapath. So the default `n = 1024`
accepts moduli of up to 1022 bits. For a true 1024-bit RSA modulus, set
`N_BITS = 1026`. Internally the CSA chain is `n+3` bits wide, so no vector can
overflow before it is halved.

## The exponentiator (`rsa_mont`)

Right-to-left square and multiply, with every value kept in carry-save form:

| phase | work | clocks |
|-------|------|--------|
| `PH_PRE`   | `P = mont(K, c)`, `R = mont(K, 1)` (into Montgomery form) | n+2 |
| `PH_LOOP`  | for each exponent bit `d[i]`, i = 0 … E-1: `P = mont(P,P)`; `R = mont(R,P)` kept only if `d[i] = 1` | E·(n+2) |
| `PH_POST`  | `M1 + M2 = mont(1, R)` (back to ordinary form) | n+2 |
| `PH_FINAL` | `M = M1 + M2`, bit-serial through a BRFA | n+2 |

Total: **(n+2)(E+3) clocks**, which is 528 390 for n = 1024 and E = 512.

* The squaring multiplier and the `R` multiplier run in parallel. In every
  loop step the `R` multiplier runs whatever the exponent bit is; when the bit
  is 0, its result is simply not taken. The run time therefore does not depend
  on the exponent's bit pattern.
* `mont(x, y) = x·y·2^-n mod N`.
* `K = 2^(2n) mod N` is an input (`k_const`). The host computes it once per
  modulus.

Interface:

* Inputs: `c_in < N`, `d_in`, `n_mod` (odd, below `2^(n-2)`) and `k_const`.
  Hold all four stable until `done`.
* Pulse `start` for one clock.
* `done` pulses once `m_out` holds `c^d mod N`. `m_out` then stays valid until
  the next start.
* `phase` shows the current phase.

An immediate assertion checks that the two multipliers always finish together.

## The Montgomery multiplier chip (`mont_io`)

This is one multiplier behind I/O registers sized for a limited pin count.

* **Input.** `a1, a2, b1, b2, N` arrive on five 32-bit ports, one word of each
  per clock while `in_valid` is high, least significant word first.
* **Start.** The multiplication starts automatically once `n/32` words have
  arrived.
* **Output.** One clock after the multiplier finishes, `S1` and `S2` are copied
  into output shift registers. They leave 32 bits per clock, least significant
  word first, qualified by `out_valid`, with `out_last` on the final word.
  Only the low `n` bits of each vector are sent; the range condition keeps both
  vectors below `2^(n-1)`.
* **Busy.** Input is ignored while `busy` is high.

Latency is `n/32 + (n+2) + 1` clocks from the first input word to the first
output word.

## Residue arithmetic units

### Number codes

| modulus | code used here |
|---------|----------------|
| `2^n - 1` | plain `n`-bit residue. Zero may appear as all zeros or all ones. |
| `2^n + 1`, diminished-1 | `n+1` bits. Bit `n` set (low bits 0) means zero. Otherwise the low bits hold `x - 1`. |

Diminished-1 form makes `2^n + 1` arithmetic use `n`-bit adders. Adding two
numbers is `d(x) + d(y) + 1`. In an `n`-bit adder, that means the carry out is
inverted and fed back into bit 0.

### `csa_eac`: the common building block

A 3:2 carry-save row whose top carry is fed back into bit 0 of the carry vector:

* straight for `2^n - 1` (because `2^n ≡ 1`);
* inverted for `2^n + 1` (because `2^n ≡ -1`).

The inverted version performs exactly one diminished-1 addition. If its three
inputs are diminished-1 numbers, its two outputs are diminished-1 numbers with
the same diminished-1 total. Every unit below is a few of these rows, then an
`n`-bit adder, then a half-adder row that adds the (inverted) carry out of that
adder.

### `mul_mod2n_p1`: multiplier modulo 2^n + 1

With `b_i` the bits of `d(b)`, the product is a sum of only `n+1` terms of `n`
bits:

```
d(ab) = ( Σ_{i=1..n-1} b_i·d(2^i a)  ⊕  ~Z  ⊕  d1(a) ) + 1
  d(2^i a) = d(a) rotated left by i, the wrapped bits inverted
  d1(a)    = b_0 ? d(2a) : d(a)
  Z        = number of zero bits among b_1 … b_{n-1};  ~Z its n-bit complement
```

Here `⊕` is diminished-1 addition. A term whose `b_i` is 0 contributes a
diminished-1 1 instead of 0; the `~Z` term cancels exactly those errors.
The datapath works as follows:

1. A Wallace tree of `n-1` inverted end-around CSA rows (`csa_tree_eac`;
   levels of 3, 2, 1, 1 rows for n = 8) reduces the `n+1` terms to two
   vectors.
2. An adder with carry-in 1 provides the final `+1`.
3. A half-adder row adds the inverted carry out.

The carry out of that last row is bit `n` of the product. It is set only when
the product is zero, which can happen with non-zero operands when `2^n + 1` is
composite (for example 65 = 5·13). A zero operand forces a zero result, because
the formula does not hold for zero.

### `mul_mod2n_m1`: multiplier modulo 2^n - 1

The product is `Σ b_i·rotl(a, i)`. It uses a Wallace tree of `n-2`
end-around CSA rows (levels of 2, 2, 1, 1 for n = 8) and the same two-adder
end. There is no zero count, no `d1` term and no zero
detection.

### Converters: six `n`-bit blocks to a residue

* **`conv_mod2n_m1`.** The residue is the sum of the six blocks mod `2^n - 1`.
  Four CSA rows (odd blocks, even blocks, two merge rows) reduce them before
  the adder.
* **`conv_dim1_p1`.** The residue is `(B0+B2+B4) - (B1+B3+B5)` mod `2^n + 1`.
  Each group of three blocks is summed as if the blocks were already
  diminished-1 numbers. Both groups have the same number of blocks, so the
  error of that pretence cancels in the subtraction. The subtraction
  `d(x) + ~d(y) + 1` is done by inverting the odd group's sum and carry vectors
  and folding them in with two more rows. The output is `d(x mod (2^n+1))`
  with the zero flag in bit `n`.

### Accumulating adders

* **`add_mod2n_p1`.** Each clock, `reg + d(x) + 1` is computed with the
  inverted carry correction. Reset clears the register to 0, and 0 is read as
  the ordinary number 0, not as `d(1)`. The register therefore always holds the
  *ordinary binary* running sum, so no conversion out of diminished-1 form is
  needed. A zero input (bit `n` set) leaves the register unchanged; this is how
  to hold the sum. Limitation: the register is `n` bits wide, so a running sum
  of exactly `2^n` (≡ -1) is stored as 0.
* **`add_mod2n_m1`.** Each clock, it adds its input with end-around carry.
  Drive 0 to hold the sum.

In `rsa_top` each channel works as follows:

1. The converter reduces the 48-bit `rns_x`.
2. The multiplier multiplies the residue by a coefficient given each clock
   (`rns_km`, or `rns_dkp` in diminished-1 form).
3. The adder accumulates the products: `Σ x_t·K_t mod m`. This is the
   multiply-accumulate step an RNS base extension is built from.

`rns_clear` clears both accumulators.

## The RNS Montgomery multiplier (`rns_mm`)

A number `x` is held as its residues `x mod m` for every modulus of two bases,
`B = (m_1 … m_K)` with product `M` and `B' = (m'_1 … m'_K)` with product `M'`,
plus a redundant modulus `m_r` (a power of two, at least `K`). The unit returns
`r ≡ a·b·M^-1 (mod N)` with `r < (K+1)N`, as residues in all three. Because
`r` stays small, it can go straight back in as an operand, so an
exponentiation is a chain of calls.
Below, `M_i = M / m_i` and `M'_j = M' / m'_j`; `σ`, `ξ` and `ρ` are the
per-channel intermediate values.

Each modulus has a channel with one modular multiplier and one modular adder.
Work runs in five groups. Inside a group every channel works at once:

All constants below are precomputed residues, each taken mod the modulus of
the channel that uses it:

| group | computes | clocks |
|-------|----------|--------|
| 1 | `σ = (a·b)·c` in every channel, with `c = -N^-1·M_i^-1` (B), `M^-1·M'_j^-1` (B'), `M^-1` (m_r) | 2 |
| 2 | `ξ_j = σ_j + Σ_i σ_i·(M_i·N·M^-1·M'_j^-1)`, and likewise `r mod m_r` | K |
| 3 | `ρ_i = Σ_j ξ_j·M'_j`, and `α1 = Σ_j ξ_j·(M'^-1·M'_j)` mod m_r | K |
| 4 | `α = α1 - (r mod m_r)·M'^-1`; `r_j = ξ_j·M'_j` | 1 |
| 5 | `r_i = ρ_i - α·M'` | 1 |

* **Group 2** moves the quotient from base B to base B'. In each clock one
  `σ_i` is sent to every channel. This conversion is approximate: it adds a
  multiple of `M` smaller than `K·M` to the quotient. That only adds a
  multiple of `N` to the result, which is why `r < (K+1)N` and not `r < N`.
* **Groups 3–5** move the result back from B' to B. This conversion is exact:
  the redundant residue tells how many times `M'` to subtract (`α`).

The precomputed constants are merged. For example, `-N^-1` and `M_i^-1`
become one constant. That saves one multiplication for each `σ` and halves the
stored constants for `ξ`.

Interface and timing:

* Moduli and all constants are input buses, standing for a constant memory the
  host fills once per key. Element `i` sits in bits `[i*W +: W]`. The `K×K`
  tables are indexed `row*K + column`, where the row is the channel that uses
  the element. Hold them while `busy`.
* A multiplication takes `2K+4` clocks (24 at `K = 10`), counting the `start`
  clock. `done` pulses with the results valid. They stay on the outputs until
  the next result.
* The numbers must satisfy:
  * pairwise-coprime moduli;
  * `M < M'`;
  * `(K+2)^2·N < M`;
  * `N` coprime to every modulus;
  * `a·b < M·N`, which holds for any `a, b < (K+2)N`.
* The moduli are run-time inputs, and each channel reduces its products with a
  generic `mod m`, so any coprime set works. The default width `W = 7` fits a
  demonstration set (primes 3 … 73, `m_r = 16`). For RSA-1024 the moduli would
  need about 104 bits each.

## The RNS exponentiator (`rns_exp`)

`rns_exp` runs left-to-right square and multiply with `rns_mm` as its only
arithmetic unit. `MM(x, y)` below stands for `x·y·M^-1 mod N`:

```
abar = MM(a, Q)          Q = M^2 mod N, given by the host: a·M mod N
cbar = MM(Q, 1)          = M mod N, the Montgomery form of 1
for i = E-1 downto 0:    cbar = MM(cbar, cbar);  if e[i]: cbar = MM(abar, cbar)
c    = MM(cbar, 1)
```

* **Range.** Every intermediate stays below `(K+1)N`. Because
  `(K+2)^2·N < M`, any product of two such values stays within the
  multiplier's `a·b < M·N` limit. So results feed straight back with no
  reduction.
* **Output.** The output is congruent to `a^e mod N` and below `(K+1)N`, as
  residues in every channel. It is not reduced below `N`.
* **Inputs.** `a < N` and `Q` come in as residues. Moduli and constants pass
  through to `rns_mm`. Hold them and `e` from `start` until `done`.
* **Timing.** Each multiplication costs `2K+5` clocks: `2K+4` in `rns_mm` plus
  one to hand over. There are `E + w + 3` multiplications, where `w` is the
  number of one bits in `e`. `done` rises `(E+w+3)(2K+5)` clocks after the
  `start` clock, about 19 300 clocks for a random 512-bit exponent at
  `K = 10`. Unlike the Montgomery engine, the run time depends on the
  exponent's weight.

## What is not here

The last steps of RNS RSA are not implemented: an exact mixed-radix base
extension for the final call (which would bring the result below `N`), the
conversion of the residues back to one binary number, and the final reduction.
No hardware for them is specified beyond their cycle counts.

The moduli intended for RNS RSA are of the form `2^n ± 1` with pairwise-coprime exponents, and
such a set cannot exist for ten pairs: two odd exponents always make `2^n + 1`
moduli share the factor 3. The constant memories and the control schedule are
not specified either. So `rns_mm` uses generic moduli, and the `2^n ± 1`
residue units stand on their own as building blocks.

## Choices made where the description is silent or loose

* **Modulus range.** The modulus must satisfy `N < 2^(n-2)` (see above).
* **Loop length.** The loop runs over exactly `E_BITS` exponent bits, to match
  the `(n+2)(E+3)` cycle budget.
* **`K` input.** `K = 2^(2n) mod N` is supplied by the host.
* **Handshakes and word order.** Start/done/busy/valid handshakes, word order
  and the automatic start of `mont_io` are this design's own.
* **Wallace tree order.** The residue multipliers reduce their partial
  products in a Wallace tree (`csa_tree_eac`). Which term enters which row is
  this design's own choice.
* **Register clock gate.** The `2^n + 1` adder's register clock gate is a load
  enable.
* **Zero flag widths.** The zero flag of the diminished-1 converter and
  multiplier is brought out as an extra output bit.
* **RNS channel width.** The residue channels use `r = 8`, the size of the
  worked 2^8 ± 1 examples, because the intended channel widths are not given.
* **RNS multiplier organisation.** `rns_mm` uses generic moduli, one
  multiplier per channel, and constants on ports; groups 4 and 5 take one clock
  each; `r mod m_r` is kept so results can be fed back; `W = 7` by default.
  Where the printed group-1 constant for `B'` reads `M'^-1`, the derivation's
  `M'_j^-1` is used.
* **RNS exponentiation.** `Q = M^2 mod N` is supplied by the host, the
  Montgomery form of 1 is computed as `MM(Q, 1)`, and one `rns_mm` is used
  sequentially with one hand-over clock per multiplication.

## Verification

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_csa_array` | sum/carry identity on random vectors |
| `tb_brfa` | serial bits equal `a1+a2`; rotation restores the registers; `zero_out` |
| `tb_mont5to2_new` | 4-bit worked example `1101·1001 mod 1111`, partial sums S[1..5] = 01001, 01100, 01111, 11000, 01100; 64-bit random products: congruence, result < 2N, n+2 clocks |
| `tb_mont_io` | 64-bit products through the word ports, word count and latency |
| `tb_rsa_mont` | 64-bit RSA with 32-bit exponents against a software model; (n+2)(E+3) clocks; every phase entered |
| `tb_mul_mod2n_p1` | exhaustive, n = 8 (mod 257) and n = 6 (mod 65, zero products from non-zero operands) |
| `tb_mul_mod2n_m1` | exhaustive, n = 8 and n = 5 |
| `tb_conv_dim1_p1`, `tb_conv_mod2n_m1` | random and edge-case 48-bit inputs |
| `tb_add_mod2n_p1`, `tb_add_mod2n_m1` | random accumulation sequences, hold on zero, reset |
| `tb_rns_mm` | default size (K = 10, primes 3 … 73, m_r = 16): 400 multiplications with fresh moduli `N`, all constants computed in the testbench; result rebuilt by the Chinese remainder theorem must satisfy `r·M ≡ a·b (mod N)` and `r < (K+1)N`; all residues; 2K+4 clocks; fed-back results |
| `tb_rns_exp` | default size (K = 10, 512-bit exponent): 12 exponentiations including `e = 0`, `e = 1` and all ones; result congruent to `a^e mod N`, below `(K+1)N`, all residues, `(E+w+3)(2K+5)` clocks |
| `tb_rsa_top` | whole top at reduced size (RNS at K = 3 with 16-bit exponents); counts R-update taken/skipped, phases, word transfers, zero holds, clears, the 2^n+1 wrap, RNS exponentiations, RNS exponent bits 1 and 0, and non-zero `α` corrections |
| `tb_rsa_top_full` | whole top at default size: one RSA exponentiation with a 1022-bit modulus and a 512-bit exponent (528 390 clocks, about 2 s in Verilator), a 1024-bit word-serial multiplication, a residue sequence, and four RNS exponentiations with 512-bit exponents at K = 10 |
| `tb_rsa_workloads` | RSA at the two published sizes with full-length moduli: 1024-bit modulus (N_BITS = 1026, E = 512) and 512-bit modulus (N_BITS = 514, E = 256) |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/rsa_pkg.sv tb/tb_rsa_mont.sv --top-module tb_rsa_mont
./obj_dir/Vtb_rsa_mont
```

## Expected performance

At n = 1024:

* A multiplication takes `n+2 = 1026` clocks.
* An RSA operation with a 512-bit exponent takes `(n+2)(E+3) = 528 390`
  clocks.

Throughput is `n·f / cycles`. For example, 0.14 Mb/s at 70 MHz for 1024-bit
RSA, and about 70 Mb/s for back-to-back multiplications on a 512-bit datapath
(`N_BITS = 512`) at that clock.
The residue units are combinational except for the accumulators. The RNS
multiplier takes `2K+4` clocks per product, and an RNS exponentiation
`(E+w+3)(2K+5)` clocks.
