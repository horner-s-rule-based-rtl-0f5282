# Horner's-rule modular multipliers over F_p and GF(p^m)

A modular multiplier computes `A*B mod F`. The designs here all use Horner's
rule. They scan the multiplier `A` one digit at a time, most significant
digit first, and keep a running remainder:

```
R <- 2*R + a_i*B          (for polynomials: R <- x*R + a_i*B)
```

Without reduction, `R` would grow to `2N` bits. Every design here keeps `R`
close to `N` bits in each step. The trick is to look at only a few top bits
of `R` and add a correction that is a multiple of `F`, found in a small
table or chosen by a simple rule. This avoids a full compare-and-subtract in
every step. What separates the designs is:

* **where the correction sits** in the loop:
  * shift, then reduce, then add the partial product;
  * shift and add, reducing inside the sum;
  * reduce, then shift;
* **the number system `R` lives in**:
  * plain binary, which suits FPGA carry chains;
  * carry-save or borrow-save, where every adder is carry-free;
  * polynomials over GF(p).

Every iteration stage has the same four parts:
* the partial-product generator, which forms `a_i*B`;
* Modshift, which produces something congruent to `2R`;
* Modsum, which adds the partial product;
* Modred, a final reduction to `[0, F)` plus conversion back to binary,
  which runs once after the loop.

This repository has twelve complete multipliers of this kind and their shared
building blocks. Each is a separate, self-contained module.

| module | number system | modulus | computes | iterations | latency (start edge to `done`) |
|---|---|---|---|---|---|
| `bm_radix2_mul`     | binary        | input    | `(A*B+C) mod F` | N   | N+1 |
| `bm_radix2_psi_mul` | binary        | input    | `(A*B+C) mod F` | N   | N+1 |
| `bm_const_phi_mul`  | binary        | two constants, selectable | `(A*B+C) mod F` | N | N |
| `bm_const_psi_mul`  | binary        | constant | `(A*B+C) mod F` | N   | N   |
| `kh_cs_mul`         | carry-save, signed | input | `A*B mod F` | N+3 | N+3 |
| `ty_bs_mul`         | borrow-save   | input    | `A*B mod F`     | N+1 | N+1 |
| `jb_cs_mul`         | carry-save    | constant | `A*B mod F`     | N   | N   |
| `ks_cs_mul`         | carry-save    | constant | `A*B mod F`     | N   | N   |
| `amanor_cs_mul`     | carry-save    | constant, `B` constant too | `A*B mod F` | N | N |
| `peeters_cs_mul`    | carry-save    | constant | `A*B mod F`     | N+1 | N+1 |
| `shu_gfpn_mul`      | GF(p)[x]      | constant polynomial | `A*B mod F` | ceil(M/D) | ceil(M/D) |
| `sp_gfpn_mul`       | GF(p)[x]      | constant polynomial | `A*B mod F` | ceil(M/D)+1 | ceil(M/D)+1 |

In the last column, the radix-2 designs with the modulus as an input spend
one extra clock building their table. All results are fully reduced, so they lie in `[0, F)`.

## Handshake and timing (`horner_ctrl`)

Every multiplier uses the same sequencer, `horner_ctrl`, and so has the same
interface: `clk`, `rst_n` (synchronous, active low), `start`, operands,
`result`, `busy` and `done`.

* Raise `start` for one cycle while the block is idle or showing `done`.
  The operands are captured at that rising edge. They do not need to stay
  valid afterwards.
* `busy` is high while the iterations run. `start` is ignored during that
  time.
* `done` is high for exactly one cycle, L rising edges after the start
  edge, where L is the latency column above. `result` is valid from `done`
  until the next accepted start.
* `result` is combinational from the state registers (the final reduction).
  Register it if you need a short path.

There is no pipelining. One multiplication is in flight at a time, and the
throughput is one result per L+1 cycles (including the `done` cycle).
`horner_ctrl` takes `ITERS` (number of iterations) and `PRE` (number of
table-building cycles before the first iteration).

## Redundant words: how to read the state

Most of the designs never hold `R` as a single binary number. This is the
part of the code that takes the most care to read.

**Carry-save** (`kh_`, `jb_`, `ks_`, `amanor_`, `peeters_`). `R` is held in two
words: `R = rs + 2*rc`. A row of full adders (`csa_row`) adds three words in
constant time and produces a new (sum, carry) pair. Adding a number to a
carry-save value never propagates a carry. The price is that the top bits of
`R` are spread over both words, so "how big is R?" can only be answered by
adding a few top bits of `rs` and `rc`. Those few bits are the table
address, or the sign estimate, in every carry-save design.

In `csa_row`, carry bit `c[j]` has weight `2^(j+1)`. The designs line up the
words by shifting their slices. Each module's header gives the exact slices.

**Borrow-save** (`ty_bs_mul`, `bs_adder`, `bs_reduce`). Each digit is in
{-1, 0, 1} and is held as two bits, `d = p - n`. So a number is `P - N` for
two bit vectors, and many bit pairs encode the same value.
* `bs_adder` adds two borrow-save numbers in constant time with two rows of
  full adders. In the first row the negative input bits are inverted. In the
  second row the roles of positive and negative are swapped. Together this
  is the classic PPM/MMP pair of full-adder cells.
* `bs_reduce` takes an (N+2)-digit value in `(-2F, 2F)` and returns an
  (N+1)-digit value in `(-F, F)`. It adds the three top digits
  (`k = 4a_{N+1} + 2a_N + a_{N-1}`), and the sign of `k` decides whether to
  add `+F`, `0` or `-F`. Adding `-F` uses `-F = (-F-1) + 1`:
  * `-F-1` has a single negative digit at the top and otherwise the bits
    `~f`;
  * the `+1` goes into the free positive bit of digit 0.

  The new top digit is `2a_{N+1} + a_N + v - [k>0]`, where `v` is the carry
  from the full adder at position N-1. It is computed directly from that
  equation rather than from a stored table.

**Signed carry-save** (`kh_cs_mul`). Both words are two's-complement
numbers (`rs` has N+4 bits, `rc` has N+3). `R` stays in `[-6F, 7F]`.

## Modulus as an input

### Radix-2 with a table built on the fly (`bm_radix2_mul`, `bm_radix2_psi_mul`)

These designs compute `(A*B + C) mod F` with plain adders, which map onto
FPGA carry chains. Each step forms `T = 2R + c_i + a_i*B`, which has N+2
bits. The step then folds the bits of `T` above position N back in, using
the table `phi(k) = (k*2^N) mod F`:

```
R = phi(T >> N) + (T mod 2^N)        k = T >> N in 0..3
```

`phi` has only four entries, and `phi(0) = 0`. Because `F` is an input, the
other three are built at run time with the recurrence
`phi(k) = phi(k-1) + 2^N - 2F` if that is non-negative, else
`phi(k-1) + 2^N - F`. One value is produced per clock. Three registers take
them in turn:
* register 1 loads only in the first cycle;
* register 2 loads in the first two cycles;
* register 3 loads through the third cycle.

Only one extra cycle is needed before the first iteration, because early
iterations cannot yet produce the large addresses.

At the end, `R` is below `3F` (below `2F` when `F >= 2^(N-1) + 2^(N-2)`).
The block builds both final reductions, and bit N-2 of `F` picks one. The
first reduction compares `R` with `F` and `2F`. The second is a single
addition of `2^N - F`, keeping the result if it carries out.

`bm_radix2_psi_mul` folds at bit N-1 instead:
`R = psi(T >> (N-1)) + (T mod 2^(N-1))`, with `psi(k) = (k*2^(N-1)) mod F`
and k in 0..7. This keeps `R` below `2F`, so only one conditional
subtraction is left at the end.
* `psi(0)` and `psi(1) = 2^(N-1)` are constants.
* Two copies of the same recurrence build `psi(2..7)`. One starts from
  `psi(0)` and yields the even entries; the other starts from `psi(1)` and
  yields the odd entries.
* The six registers are wired to the multiplexer crosswise: register 1
  feeds address 3, register 2 address 2, register 3 address 5, and so on.
  See the case statement.
* The register that starts the odd chain is preset to `2^(N-1)` at start.

Both designs need `2^(N-1) < F < 2^N` and `B < F`. `A` and `C` may be any
N-bit values.

### Radix-2 with constant tables (`bm_const_phi_mul`, `bm_const_psi_mul`)

When the modulus is known in advance, the same two loops need no
table-building cycle. The tables become constants, computed at elaboration.
Each bit of the table output depends on only a few signals:
* for phi: `T[N+1]`, `T[N]`, and a select bit choosing between two moduli;
* for psi: `T[N+1]`, `T[N]`, `T[N-1]`.

On an FPGA such a bit fits into the same lookup table as the sum bit of the
carry-chain adder that forms `R`. The stage is then little more than one
adder.

`bm_const_phi_mul` holds the phi tables of two moduli, `F1` and `F2`.
* A `sel` input, captured at start, picks the modulus for each operation.
* Each modulus gets the final reduction that fits its range.

`bm_const_psi_mul` uses all three address bits for the psi table, so it
supports a single modulus `F`. The RTL writes the lookup and the addition as
ordinary SystemVerilog (an array look-up on the address and a `+`). It does not
instantiate device primitives, so the synthesis tool decides the packing.

### Sign estimation (`kh_cs_mul`)

Here the correction is chosen by estimating the sign of `R`. The design
never looks up a remainder. Each step:

1. Compute `k = rs[N+3:N-1] + rc[N+2:N-2]`, a 5-bit two's-complement sum.
   This is roughly `2R / 2^N`.
2. Set `es+ = ~k4 & (k3|k2|k1)` (R is clearly positive) and
   `es- = k4 & (~k3 | ~k2 | ~k1&~k0)` (R is clearly negative).
3. Compute `R <- 2R + a_i*B - 8F` if `es+`, `+ 8F` if `es-`, unchanged
   otherwise.

Only multiples of `8F` are ever added. After N steps, `R = A*B + 8*alpha*F`.
Three more steps with zero digits give `R = 8*A*B + 8*beta*F`, which is a
multiple of 8. Shifting right by 3 gives a value in `(-F, F)`, and adding
`F` when negative finishes the job. The output port `est` shows
`{es+, es-}` so a testbench can see which corrections fire.

The low part of `2R + a_i*B` is a carry-save row over N-1 bits, and the top
five bits are `k` itself. The `+-8F` correction is then added with a second
full carry-save row modulo `2^(N+4)`. This is a plain-adder replacement for a
hand-derived bit-level shortcut that computes only the three top bits from
`es+`/`es-`. The sum is the same, but the stage is one CSA row larger than
that optimised version.

### Borrow-save (`ty_bs_mul`)

Operands `A` and `B` are borrow-save numbers in `(-F, F)`. Any encoding is
accepted. Each step:
1. Shift `R` left and fold it back into `(-F, F)` with `bs_reduce` (this is
   Modshift).
2. Add `a_i*B` with `bs_adder`. For `a_i = -1` the positive and negative
   bit vectors of `B` are simply swapped.
3. Fold the sum back into `(-F, F)` with a second `bs_reduce`.

After N+1 digits, `result = P - N`, plus `F` if that is negative.

## Modulus fixed at elaboration: table-driven carry-save

When `F` is a parameter, the correction for the overflow bits of `R` can be
read from a constant table. Every table here is computed in SystemVerilog at
elaboration by a constant function (`pow2mod`, modular doubling). No data
files are used, and changing `F` regenerates every entry. All tables hold
values of the form `(k * 2^e) mod F`, where `k` is the small sum of the
overflowing top bits.

* **`jb_cs_mul`** (shift, then reduce). `R = rs + 2rc` with N-bit words.
  * Modshift adds `(k1*2^N) mod F`, where `k1 = 2rc[N-1] + rs[N-1] + rc[N-2]`
    (0..4), to the shifted low bits. That is one CSA row.
  * Modsum adds `a_i*B` with a second row.
  * The two carries that leave the word address a second table
    `(k2*2^N) mod F` (k2 in 0..2), added by a third row.
* **`ks_cs_mul`** (shift and add in one row). `k = rs[N-1] + 2rc[N-1] +
  rc[N-2] + tc[N-1]` (0..5), where `tc[N-1]` is the overflow of the first
  CSA row. The table `(k*2^N) mod F` is added by a second row. That makes
  two rows per step.
* **`amanor_cs_mul`**. Here `B` is also a parameter, so one table holds
  `(a_i*B + k*2^N) mod F` for `a_i` in {0,1} and
  `k = 2rc[N-1] + rc[N-2] + rs[N-1]`. One CSA row per step.
* **`ks_modred`**. This is the final reduction shared by the three designs
  above. `R = rs + 2rc` can be as large as `F + 2^(N+1) - 4`. The block
  1. adds `rs + 2rc[N-2:0]` into U (N+1 bits);
  2. adds `U[N-1:0]` and `((rc[N-1] + U[N]) * 2^N) mod F` from a 3-entry
     table into V < 3F;
  3. forms `V - F` and `V - 2F` in parallel and picks the non-negative one
     of smallest value.
* **`peeters_cs_mul`** (reduce, then shift). `rs` has N+1 bits and `rc` has
  N bits (its bit 0 is always 0).
  * `u = rs[N:N-2] + rc[N-1:N-3]` (0..14) addresses `(u*2^(N-2)) mod F`.
    This table value and the shifted low bits plus `a_i*B` go through two
    CSA rows, so the step reduces `R` before doubling it.
  * One extra step with a zero digit makes `R` even and below `2F + 2^N`.
  * `result = (rs + 2rc)/2`, minus `F` if that is still `>= F`.

Requirements for all of them: `2^(N-1) < F < 2^N` and `B < F`. Primality
is not needed for correctness.

## GF(p^m): digit-serial polynomial multipliers (`shu_gfpn_mul`, `sp_gfpn_mul`)

Elements of GF(P^M) are polynomials of degree < M over GF(P).
* Coefficient `j` is a binary number `< P` in bits `[CW*j +: CW]`, with
  `CW = clog2(P)`.
* `FCOEF` holds the low M coefficients of the monic modulus `F(x)`. The
  default is `x^97 + x^12 + 2` over GF(3).
* D coefficients of `A` are consumed per clock, the top ones first. The
  coefficients used in step i are `a_{D*i+j}`, and `A` is padded with zeros
  to a multiple of D.

* `shu_gfpn_mul` keeps `R` of degree < M at all times:
  `R <- x^D*R mod F + sum_j (x^j * a_{Di+j} * B) mod F`. Each `x*(.) mod F`
  removes the top coefficient times `F`. No final step is needed.
* `sp_gfpn_mul` lets the sum grow to M+D coefficients:
  `S <- T + x^D * (S mod F)`, where `T` is the unreduced sum of the D
  partial products. One extra step with zero digits leaves
  `S = x^D * (A*B mod F)`, and the result is just `S` shifted down by D.

Both are written as loops over coefficients. Any P, M, D and modulus
polynomial can be set through parameters. Each is a single combinational
stage; its size grows with M*D.

## The top module (`horner_top`)

The designs are alternatives rather than parts of one machine, so
`horner_top` instantiates all twelve side by side:
* each has its own `start`/operands/`result`/`busy`/`done`, with port
  names prefixed by the design (`bm1_`, `bm2_`, `bc1_`, `bc2_`, `kh_`, `ty_`, `jb_`, `ks_`,
  `am_`, `pe_`, `shu_`, `sp_`);
* `kh_est` brings out the sign estimate.

Parameters:
* `N = 32`;
* `F = 32'hC0000001` (3*2^30 + 1, a prime), the modulus of the
  constant-modulus instances;
* `F2 = 32'h80000011`, the second modulus of `bc1_` (`bc1_sel = 1`);
* `AM_B = 32'h12345678`, the constant multiplicand of the Amanor instance;
* `P = 3`, `M = 97`, `D = 2` and `FCOEF = x^97 + x^12 + 2` for GF(3^97).

The default modulus, `3*2^30 + 1`, was picked for testing. With it, the
carry-save tables reach most of their entries, and the reachable branches of
the final reductions all occur in the tests. `2^32 - 5`, for example, leaves
several of them unused.

## Where this design departs from, or adds to, the published algorithms

* **Handshake, reset and the extra "done" cycle** are this design's own.
  The published algorithms describe only the iteration stages.
* **`kh_cs_mul`, sign estimate.** The logic equations treat `k <= -4` as
  "negative". A purely inequality-based definition would draw the line at
  `k < -4`. The logic equations are implemented, and both keep `R` inside
  `[-6F, 7F]` (checked in simulation).
* **`kh_cs_mul`, correction row.** The `+-8F` correction is a full CSA row,
  not the three-bit shortcut. The function is the same; only the stage area
  differs.
* **`bm_radix2_mul`, final reduction.** Comparisons use `>=` so that
  `R = F` and `R = 2F` reduce to 0.
* **`bm_radix2_mul`, `bm_radix2_psi_mul`, operand range.** `B < F` is
  required. The second design also allows `R[0]` (below a bound of about
  `2^(N+2)/3`) to be chained into the next multiplication without a final
  reduction. These blocks always return the fully reduced result and do
  not offer that mode.
* **`amanor_cs_mul`, table address.** The address uses `rs[N-1]`, the bit
  that actually leaves the word when `R` is doubled. A written description
  of this stage names `rs[N-2]`; with that bit the products come out
  wrong.
* **`ty_bs_mul` is radix 2 only.** Radix-4 signed-digit versions exist but
  are not built.
* **Tables are computed at elaboration** for any `F`. The radix-2 designs
  with the modulus as an input build theirs at run time instead.
* **Not included:**
  * the high-radix carry-save variant of the Peeters design, whose choice of
    word sizes and conversion logic is modulus-specific and needs an
    external search;
  * the earlier reduce-then-shift carry-save scheme with (N+2)/(N+1)-bit
    words and a more complex final reduction;
  * device-level (LUT and carry-chain primitive) mapping of the
    constant-table radix-2 stages; they are written behaviourally.

## Simulating

Everything runs with plain Verilator 5 (`--binary --timing`). For any
testbench:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl --top-module tb_ks_cs_mul tb/tb_ks_cs_mul.sv
./obj_dir/Vtb_ks_cs_mul
```

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>` at the end. A watchdog ends the run if
`done` never arrives. The testbenches compare against integer arithmetic on
64-bit values, or a schoolbook polynomial product for GF(p^m), and also
check each latency.
* The constant-modulus testbenches run two instances, with `F = 3*2^30+1`
  and `F = 2^31+17`.
* `tb_bs_reduce` is exhaustive at N = 6.
* `tb_ty_bs_mul` feeds random borrow-save encodings of each operand.

`tb_horner_top` runs all twelve designs at full size through the top module.
It also keeps its own model of each recurrence to count how often each
mechanism fires:
* every phi/psi entry;
* every reachable ROM address;
* each branch of every final reduction;
* the three sign estimates;
* the three kinds of borrow-save partial product;
* both modulus ranges of the radix-2 design.

A mechanism that never fires is a failure.

`tb_workloads` runs the operand sizes these stages are usually compared at.
* At 16 and 64 bits it runs the Jeong-Burleson, Kim-Sobelman and Peeters
  stages, and both constant-table radix-2 stages.
* At 256 bits it runs the Peeters stage with ten random 256-bit primes.

Its reference uses 512-bit vectors. A few table entries exist only
because the bounds used to size the tables are not tight. At this modulus
they are never addressed: `psi(7)`, the `k = 5` entry of `ks_cs_mul`, the
`k1 = 4` entry of `jb_cs_mul`, Peeters entries 12 to 14 and the `V - 2F`
branch of `ks_modred`. They are counted and reported, not required.

To change a size, set the parameters: `N` for the integer designs, `F`/`B` for the constant ones, and `P`, `M`, `D`,
`FCOEF` for the polynomial ones. The 64-bit reference models in the
unit testbenches limit them to N <= 32. `tb_workloads` shows how to check
wider instances.
