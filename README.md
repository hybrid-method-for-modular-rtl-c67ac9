# Fixed-base modular exponentiation in a hybrid ternary-quinary number system

This design computes `g^x mod P` for a fixed base `g`, a 512-bit modulus `P` and
any 512-bit exponent `x`. It spends about **0.325 modular multiplications per exponent
bit**, roughly 166 for a 512-bit exponent. Plain binary exponentiation with a table of
`g^(2^i)` needs 0.5 per bit.

It gets there in two steps. First it rewrites the exponent in a mixed base-3/base-5
number system, the hybrid ternary-quinary number system (HTQNS). Then it multiplies together
precomputed powers of `g` in two passes over the digits. Only ternary digits equal to 1 or 2
cost anything. Quinary positions are free: they only shift the weights of the positions above
them. The price is a table of 35 888 precomputed 512-bit values, about 18.4 Mbit. A host
computes this table once for each `g` and `P` and loads it before any exponentiation.

## The number system

The exponent is taken apart from the least significant end. While `x` is not zero:

- if 5 divides `x`, emit a **quinary** position (base 5, digit 0) and set `x = x / 5`;
- otherwise emit a **ternary** digit `x mod 3` (0, 1 or 2) and set `x = floor(x / 3)`.

Example: `47` becomes base `3,5,3,3` with digits `2,0,0,1`, least significant first.

The weight of position `i` is `3^it * 5^iq`. Here `it` counts the ternary positions below
`i` and `iq` counts the quinary positions below `i`. For `47` the weights are 1, 3, 15, 45,
so `47 = 2*1 + 1*45`. Every step divides by at least 3, so a 512-bit exponent has at most 324
digits. On average it has 0.585 digits per bit. About 17 % of the digits are quinary zeros,
and those never cost a multiplication.

Each position is stored as one 2-bit code (`htqns_pkg::htqns_digit_e`):
`0/1/2` = ternary digit, `3` = quinary zero.

## The two-pass product

Let `F[it][iq] = g^(3^it * 5^iq) mod P`. Let `B2` be the product of `F` over the positions
holding a 2, and `B1` the product over the positions holding a 1. Then `g^x = B2^2 * B1`.
The controller computes this with a running product `b` and an accumulator `a`:

1. **Pass d = 2:** walk all digits. At every 2, multiply `b = b * F[it][iq]`. At the end,
   `a = b` (= `B2`).
2. **Pass d = 1:** walk the digits again, **without clearing `b`**. At every 1, multiply
   `b = b * F[it][iq]`. `b` is now `B2 * B1`. At the end, `a = a * b` = `B2^2 * B1`.

While `b` or `a` is still 1, a multiplication by it is done as a copy. It takes no
multiplier cycles and is not counted. So for an exponent with `N1` ones and `N2` twos, the
multiplication count is:

- `N1 + N2` when `N2 > 0` (that is, `N2 - 1` in the first pass, `N1` in the second, and 1 final);
- `max(N1 - 1, 0)` when there is no 2.

`mult_count` reports this number for each operation. For `x = 0` the result is 1.

## The precomputed table

The design can only ever address `F[it][iq]` with `3^it * 5^iq < 2^512`. A position's weight
never exceeds `x`. There are exactly 35 888 such pairs. The table stores only those, packed
row by row:

- row `it` holds `row_len(it)` consecutive words, for `iq = 0, 1, ...`;
- `row_len(it)` is the number of `iq` with `3^it * 5^iq < 2^N`.

Row 0 has 221 words, and the last row (`it = 323`) has 1.

**Loading.** Write the words at addresses 0, 1, 2, ... in that order: `it` in the outer loop,
`iq` in the inner loop. A convenient way to compute them is:

- `F[0][0] = g`;
- `F[it+1][0] = F[it][0]^3`;
- `F[it][iq+1] = F[it][iq]^5`.

Every word must already be reduced below `P`. The testbenches do exactly this.

During a pass the controller does not compute `it * stride + iq`. It follows the address
incrementally:

- at a quinary position, +1 (next column);
- at a ternary position, + the length of the current row (same column, next row).

The row lengths come from a 324-entry constant ROM. `htqns_pkg::row_len` builds it at
elaboration time with exact big-integer arithmetic.

## Blocks

| module | role |
|---|---|
| `htqns_pkg` | digit code and the elaboration-time size functions (`max_digits`, `table_rows`, `row_len`, `table_entries`) |
| `htqns_encoder` | produces one HTQNS digit per clock; `x/3` and `x/5` are computed in the same cycle by two `const_div` chains |
| `const_div` | combinational division by a small constant (restoring long division) |
| `digit_buffer` | 324 x 2-bit memory between encoder and controller; one write port, one registered read port |
| `precomp_table` | 35 888 x 512-bit memory; host write port, registered read port |
| `hybrid_exp_ctrl` | the two-pass controller, the copy-instead-of-multiply rule, table address tracking |
| `mod_mult` | `a*b mod p`, MSB-first interleaved shift-and-add, one bit per clock |
| `hybrid_modexp` | top: wires the above together |

All sizes derive from one parameter, `N` (default 512). `MAXD`, `ENTRIES` and the address
widths are computed from it. Changing `N` on `hybrid_modexp` rescales everything. The
package functions handle `N` up to 2048.

### Top-level interface (`hybrid_modexp`)

- `clk`, `rst_n` (asynchronous, active low).
- Table load port: `tbl_we`, `tbl_waddr`, `tbl_wdata`. Load it only while `busy` is low.
- `start` (one-cycle pulse), with `x` and `p` valid. `p` must be > 1 and must stay stable
  until `done`. `start` is ignored while `busy` is high.
- Outputs: `busy`, `done` (one-cycle pulse), `result = g^x mod p`, `mult_count` and
  `num_digits` (the HTQNS length `m` of `x`). All three hold until the next start.

### Timing

Operations run in sequence: encoding first, then the two passes.

- **Encoding:** `m + 1` cycles.
- **Each pass:** two cycles per digit (read the digit and table word, then evaluate).
- **Each multiplication:** `N + 1` extra cycles.

From the clock edge that samples `start` to the edge that raises `done`:

    5m + 5 + (N + 1) * mult_count      (3 for x = 0)

For a random 512-bit exponent this is about 1 500 + 166 x 513, roughly 87 000 cycles. Nearly
all of that is the bit-serial multiplier. A faster multiplier can replace `mod_mult` without
touching the controller, which only uses the handshake: `start` when idle, `done` one cycle
before the result is consumed.

## Own choices

The method fixes the digit rule, the two-pass product, what `F` holds and how multiplications
are counted. The following are this design's own choices:

- **Modular multiplier.** The method takes one modular multiplication as its unit of cost and
  does not say how to build it. The interleaved radix-2 multiplier is the simplest general one.
  It accepts any modulus > 1, even or odd.
- **Table bound.** Entries are kept for `3^it * 5^iq < 2^N` rather than `< P`. This makes the
  table independent of the modulus value. The count, 35 888 for N = 512, lies within the
  method's bound of at most 36 027 stored values.
- **Table packing.** The packed row layout and the incremental address are this design's own.
- **Sequencing.** Encoding and exponentiation do not overlap, and the digits are buffered.
  The second pass needs them again anyway.
- **Interfaces and timing.** Reset behaviour, the handshakes, the one-cycle memory read
  latency and all cycle counts are this design's own.
- **Zero exponent.** `x = 0` returns 1 without a pass.

## Verification

Each block has a self-checking testbench in `tb/`. All references are computed independently
in the testbench with plain `%`, `/` and `*` on wide vectors.

| testbench | size | what it checks |
|---|---|---|
| `tb_mod_mult` | N = 64 | products against `(a*b) % p`, edge operands, latency |
| `tb_htqns_encoder` | N = 512 | every digit and address against a reference encoder, the 47 example, 0, 2^512-1, 5^200, random exponents, latency `m + 1` |
| `tb_digit_buffer` | 324 words | read-back, read latency, hold |
| `tb_precomp_table` | N = 64 | depth against a brute-force pair count (591), random read-back |
| `tb_hybrid_exp_ctrl` | N = 32 | controller with real memories and multiplier: result against binary square-and-multiply, `mult_count`, latency, over four random moduli |
| `tb_hybrid_modexp` | N = 512, defaults | the whole design (details below) |

`tb_hybrid_modexp` runs the whole design at its default size:

- It loads the full table, then runs special exponents and 64 random 512-bit exponents.
- For each exponent it checks the result, the digit count, the multiplication count and the
  exact latency.
- It counts how often each mechanism occurred: quinary digits, a pass with no multiplication,
  the copy of a 1 operand, and the final `a * b`. It fails if any of them never happened.
- It prints the average multiplications and digits per exponent bit. A typical run gives about
  0.32-0.33 multiplications and 0.585 digits per bit.

It takes well under a minute.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/htqns_pkg.sv \
        tb/tb_hybrid_modexp.sv --top-module tb_hybrid_modexp
    ./obj_dir/Vtb_hybrid_modexp

Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>`. Elaborating the 512-bit
top takes about 15 s, because the size functions do exact big-integer arithmetic at compile
time.

## Limits

- The design does not compute the table. `g` enters only through the table, so a new base
  means reloading 35 888 words.
- No check verifies that table words are reduced below `p`. An assertion in `mod_mult`
  catches unreduced operands in simulation.
- The 18.4 Mbit table is written as a plain memory array. A real implementation would map it
  onto SRAM macros or external memory. The controller reads at most one word every two cycles,
  so a slower memory with more read latency would only need an extra wait state.
