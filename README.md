# Three-parallel syndrome and factorised Chien search for RS/BCH decoders

An algebraic Reed-Solomon or BCH decoder spends most of its cycles and much
of its logic in two stages that evaluate polynomials over a Galois field:

* the **syndrome stage**, which evaluates the received word R(x) at the 2t
  roots of the generator polynomial, S_i = R(alpha^i), and
* the **Chien search**, which evaluates the error-locator polynomial L(X)
  at every nonzero field element. A zero marks an error position.

This RTL implements reduced-cost versions of both stages, following the
paper *Performance Comparison of New Designs of Chien Search and Syndrome
Blocks for BCH and Reed Solomon Codes*:

| stage | module | idea |
|---|---|---|
| syndromes | `synd3_block`, `synd3_cell` | three received symbols per clock, Horner's rule in steps of alpha^3i: n/3 + 1 clocks per codeword instead of n + 1 |
| Chien search, first factorization | `chien_fact1` | locator given as a product of first-degree factors (aX + beta_k). One stepping register serves all factors, and each factor costs one adder. |
| Chien search, second factorization | `chien_fact2` | locator coefficients taken in pairs X^p (A X + B) that share a power chain. About half the multipliers of the term-per-coefficient search remain. |
| top | `rs_bch_blocks_top` | the three blocks side by side for RS(255,239) over GF(2^8), t = 8 |

The stage between the two, the key-equation solver (for example
Berlekamp-Massey) that turns syndromes into a locator, is not part of this
design. In the top the syndromes are outputs and the locator is an input.

## Field arithmetic (`gf_pkg`)

Symbols are elements of GF(2^m) in polynomial basis, with alpha = x.
Addition is XOR. `gf_mul(a, b, m, poly)` is a shift-and-add multiplier that
reduces by the primitive polynomial. When one operand is a constant, such as
alpha^i or alpha^3i, synthesis reduces it to a small XOR network. `gf_pow`
computes those constants at elaboration. `default_poly(m)` gives a standard
primitive polynomial for m = 2..16:

* x^4 + x + 1 for GF(2^4). With it the RS(15,11) example checked in
  the Verification section gives the published syndromes.
* x^8 + x^4 + x^3 + x^2 + 1 (0x11D) for GF(2^8).
* x^14 + x^10 + x^6 + x + 1 for GF(2^14).

The paper does not name its primitive polynomials. Every module therefore
takes `PRIM_POLY` as a parameter.

## The three-parallel syndrome block

### Arithmetic

With a = alpha^i, the syndrome is

    S_i = r_254 a^254 + r_253 a^253 + ... + r_1 a + r_0.

Horner's rule, taken one coefficient at a time, needs n steps of
`acc = acc*a + r_j`. Grouping the coefficients in threes, highest degree
first, gives

    acc <- acc * a^3  +  r_{3j+2} a^2  +  r_{3j+1} a  +  r_{3j}

so a word of n = 3q symbols takes q steps. Each cell (`synd3_cell`) holds
this accumulator, called latch (1) in the paper's drawing. Around it are three
constant multipliers (a, a^2 and a^3) and a start multiplexer (3). On the
first triple of a codeword, the multiplexer replaces the fed-back term by 0,
so no separate clear cycle is needed.

### Output chain

Every cell also has an output register (2). Its input multiplexer (4)
selects one of two sources:

* `load`: the cell's own accumulator. All cells copy their finished syndrome
  at once.
* `shift`: the output register of the previous cell, S_{i-1}. The registers
  then form a chain with 0 entering cell 0.

After a load, `synd[]` shows all 2t syndromes in parallel. Each `shift_en`
moves the chain one place, and `synd_serial` (the last register) gives
S_{2t-1}, S_{2t-2}, ..., S_0.

### Timing (`synd3_block`)

```
clock edge      1        2       ...   q        q+1           q+2
input           r254..2  r251..  ...   r2,r1,r0 (next word    ...
                (in_sop)                         may start)
accumulators    step 1   step 2  ...   step q = S_i
output regs                                     <- load
synd_valid                                      ............. high
```

* The first triple is taken at edge 1 with `in_valid` and `in_sop`.
* The q-th triple completes the accumulators.
* Edge q+1 copies them into the output registers. `synd_valid` is high in
  the clock that follows.
* A codeword therefore costs q + 1 = n/3 + 1 clocks: 86 for n = 255. The
  accumulators are free again at edge q+1, so the next codeword's first
  triple may arrive on that same edge, and a continuous stream of words
  needs only q clocks each.
* A clock without `in_valid` is a stall: the accumulators hold and the count
  simply extends.
* An assertion flags a triple that arrives without `in_sop` when no codeword
  is in progress.
* `N` must be a multiple of 3. A shortened code can be padded with leading
  zero symbols.

Iteration counts, matching the paper's comparison table:

| code | one symbol per clock | three-parallel | saved |
|---|---|---|---|
| n = 63 | 64 | 22 | 65.6 % |
| n = 255 | 256 | 86 | 66.4 % |
| n = 3240 | 3241 | 1081 | 66.6 % |

## Chien search by factorization

Both search blocks share the same front end. A register D is loaded through
a multiplexer and multiplied by alpha on every clock: D <= (load ? k_init :
D) * alpha. After the loading edge, D holds k_init·alpha. Over the next
2^m - 1 clocks it runs through k_init·alpha^j for every j. `eval` is the
locator value for the current register content, and it is combinational.
`err_pos` is high when `eval` is zero.

**`chien_fact1`, first factorization.** The locator must be supplied
already factored, with one leading coefficient a shared by all factors:

    L(X) = (aX + beta_1)(aX + beta_2)...(aX + beta_NF)

Load `k_init = a`. The register then holds a·X, and each factor is a single
XOR with its beta_k. The NF factor values are multiplied in a chain of NF - 1
general multipliers. The circuit is very small: 20 cells for two factors over
GF(2^4). It assumes, however, that the locator's factors are already known;
where they come from is outside this block. For the paper's example
L = 14X^2 + 14X + 1 over GF(2^4): a = alpha^13 (a^2 = 14), the roots are
alpha^6 and alpha^13, and beta_k = a·root_k.

**`chien_fact2`, second factorization.** It takes the ordinary coefficients
`coef[i]` = A_i, which is what a key-equation solver produces, and groups
them in pairs:

    odd degree:   L = X^(d-1)(A_d X + A_{d-1}) + ... + X^2(A_3 X + A_2) + (A_1 X + A_0)
    even degree:  L = X^(d-1)(A_d X + A_{d-1}) + ... + X(A_2 X + A_1) + A_0

* A squarer produces X^2.
* A multiplier chain builds the shared powers: X^2, X^4, ... for odd
  degree, X, X^3, X^5, ... for even degree.
* Each pair costs one coefficient multiplier, one adder and one power
  multiplier.

A locator of lower degree than `DEG` is given with its upper coefficients
set to zero. The top builds it for degree 8, which covers every
correctable error count of RS(255,239).

## Top level (`rs_bch_blocks_top`)

Defaults: `M = 8`, `N = 255`, `T = 8`, `FCR = 0` (roots alpha^0..alpha^15),
`PRIM_POLY = 0x11D`. The three blocks share only the clock and the
asynchronous active-low reset:

* **Syndrome stage:** `in_valid`, `in_sop`, `in_hi/in_mid/in_lo` (r_{3j+2},
  r_{3j+1}, r_{3j}), `synd_shift`, `synd[16]`, `synd_valid`, `synd_serial`.
* **First-factorization search (8 factors):** `c1_load`, `c1_k_init`,
  `c1_beta[8]`, `c1_x`, `c1_eval`, `c1_err_pos`.
* **Second-factorization search (degree 8):** `c2_load`, `c2_k_init`,
  `c2_coef[9]`, `c2_x`, `c2_eval`, `c2_err_pos`.

To locate errors with the usual locator L(x) = prod(1 + X_k x), start the
search with `k_init = 1`. `err_pos` in the clock after the j-th edge since
the load means alpha^j is a root, so the error is at position
e = (255 - j) mod 255.

After synthesis the top has about 970 word-level cells and 281 flip-flops.

## Readings and departures

These points are not fixed by the paper. The RTL settles them as follows:

* **Order of symbols within a triple.** The paper's text has the
  highest-degree symbol (r_254 in the first clock) multiplied by alpha^2i,
  which is what Horner's rule requires. Its drawing labels the inputs the
  other way round. The RTL follows the text.
* **Syndrome indices.** The text counts syndromes S_1..S_16. The generator
  polynomial and drawings use roots alpha^0..alpha^15. The RTL uses
  alpha^FCR.. with FCR = 0 by default; set `FCR = 1` for S_1..S_16.
* **Serial order.** The output chain passes S_{i-1} into S_i, so the
  highest syndrome leaves first.
* **This design's own choices**, not in the paper: the handshake (`in_valid`,
  `in_sop`), stalls, the shift enable on the output chain, the `load` inputs
  of the Chien searches, the `err_pos` zero flags, the resets, the primitive
  polynomials, and the default GF(2^4) field of the stand-alone Chien blocks
  (the field of the paper's RS(15,11) example).
* **Not built.** The one-symbol-per-clock syndrome circuit and the
  one-term-per-coefficient Chien search that the paper uses as baselines.
  The binary-BCH shortcut S_2i = S_i^2 that it mentions for the serial
  circuit. The key-equation solver.
* **Gate counts.** The paper's gate-count reduction and bit-error-rate
  figures are properties of its own gate accounting. This RTL does not
  reproduce or check them.

## Verification

Every testbench is self-checking. It computes expected values with its own
table-based (log/antilog) GF arithmetic in `tb/tb_gf_ref_pkg.sv`, not with
the RTL's multiplier, and ends with `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_synd3_cell` | paper example S1 = 3, S2 = 4; random GF(2^8) words with stalls; shift path; load over shift |
| `tb_synd3_block` | paper example S0..S3 = 15, 3, 4, 12 and its serial read-out; RS(255,239) codewords with 0-8 errors, random words, stalls, back-to-back words; 86-clock latency |
| `tb_chien_fact1` | factor forms with known roots and random factors for 2, 5 and 8 factors; the worked locator 14X^2 + 14X + 1; reload |
| `tb_chien_fact2` | degrees 3-8 (the drawn 5 and 6 included) against direct evaluation, with known roots and random coefficients |
| `tb_rs_bch_blocks_top` | full default size, end to end: codeword + errors -> syndromes; bench-built locator -> both Chien searches find exactly the error positions; stall, back-to-back words, serial read-out and reload all exercised |
| `tb_table4_codes` | iteration counts and syndromes for n = 63 (2t = 8, 48), n = 255 (2t = 16, 120) and the binary (3240,3072) BCH code over GF(2^14) |

Each testbench was also run against a deliberately broken copy of its
module (for example a wrong feedback constant, or `synd_valid` one clock
early), and it reported failures.

## Simulating

With Verilator 5, from the repository root (the object directory can be
anywhere):

```
verilator --binary --timing -Wno-fatal -y rtl -y tb -Irtl -Itb \
  rtl/gf_pkg.sv tb/tb_gf_ref_pkg.sv tb/tb_rs_bch_blocks_top.sv \
  --top-module tb_rs_bch_blocks_top --Mdir /tmp/obj_top
/tmp/obj_top/Vtb_rs_bch_blocks_top
```

Replace the testbench name to run another. Every run takes well under a
second. To change a size, override the module parameters: for example
`synd3_block #(.M(6), .N(63), .TWO_T(8))` for a length-63 code, or
`chien_fact2 #(.M(8), .DEG(7))`. The primitive polynomial follows `M`
unless `PRIM_POLY` is given.
