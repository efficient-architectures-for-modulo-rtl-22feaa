# Modulo 2^n-1 squarers: non-encoded and Booth-folded

Residue number systems split arithmetic into independent channels. One of the
most common channels works modulo 2^n-1, and signal-processing workloads
square numbers very often. This RTL has two combinational squarers that compute
`|A^2| mod (2^n-1)` for an n-bit operand. Both are much cheaper than a modulo
multiplier with both inputs tied together:

* **`sq_nonenc`** has no operand encoding. It starts from the folded square
  matrix and merges bits with two rewrites. The matrix shrinks from
  n(n+1)/2 bits to n(n-1)/2 bits (for n ≥ 5), and its height drops by 2.
  It is the better choice for small n.
* **`sq_booth`** recodes the operand into radix-4 Booth digits and *folds*
  the cross terms into n/2-1 signed words. Its matrix has about n/4+3 rows
  instead of about n/2. It is the better choice for medium and large n.

Both squarers have the same three stages:

1. a partial-product matrix that is exactly n columns wide,
2. an end-around-carry carry-save tree that reduces it to two n-bit words,
3. a modulo 2^n-1 (one's complement) adder.

`mod_sq_top` drives both squarers from one operand, so they can be used or
compared side by side.

## Why the matrix is n columns wide

Modulo 2^n-1, `2^n ≡ 1`. A bit of weight 2^w therefore belongs in column
`w mod n`. Every bit that would land above column n-1 wraps around to the
bottom. The same rule turns the carry out of column n-1 of any adder into a
carry into column 0 (the "end-around carry"). All the matrix work below is
column bookkeeping under this rule.

An operand of all ones is congruent to 0. Both squarers accept it and return
a residue of zero.

## Non-encoded squarer

Start from the folded square. `a_i·a_i = a_i`, and `a_i a_j + a_j a_i` becomes
one bit one column higher. This gives

    A^2 = Σ a_i·2^(2i) + Σ_{i<j} a_i a_j·2^(i+j+1)

with every weight reduced mod n. At n = 8 that is 36 bits and the highest
column holds 6 of them. Two identities then remove bits:

**Recoding a_i with a_i a_{i-1}.** Both bits sit in column 2i. They become
`a_i·~a_{i-1}` in column 2i and `a_i a_{i-1}` in column 2i+1:

    (a_i a_j + a_i)·2^k = a_i a_j·2^(k+1) + a_i ~a_j·2^k

The bit count stays the same, but columns get shorter.

**Pre-calculated pairs (`sc_precalc`).** For each i (indices mod n), three
bits are replaced by two:

* `a_i·~a_{i-1}` in column 2i,
* `a_{i-1}a_{i-2}` and `a_i a_{i-2}`, both in column 2i-1.

The two new bits are:

    c = a_i·(~a_{i-1} | a_{i-2})   in column 2i
    s = (a_i ^ a_{i-1})·a_{i-2}    in column 2i-1

This works because `2·a_i~a_j + a_i a_k + a_j a_k = 2c + s` for all inputs.
If column 2i is n, it is column 0 again. That is how `c_{4,3,2}` (and
`c_{0,7,6}`) ends up in column 0 at n = 8.

After both rewrites, only the products `a_i a_j` whose index distance is
between 3 and n-3 are left as plain bits. Each of the n triplets also gives
one c bit and one s bit. At n = 8 the columns hold:

| column | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|
| | s4,3,2 | c3,2,1 | s3,2,1 | c2,1,0 | s2,1,0 | c1,0,7 | s1,0,7 | c4,3,2 |
| | s0,7,6 | c7,6,5 | s7,6,5 | c6,5,4 | s6,5,4 | c5,4,3 | s5,4,3 | c0,7,6 |
| | a1a5 | a0a5 | a0a4 | a0a3 | a3a7 | a2a7 | a2a6 | a1a6 |
| | | a1a4 | | a4a7 | | a3a6 | | a2a5 |

That is 28 bits with a maximum height of 4. The rows shown are only a
picture. `nonenc_ppm` fills each column from row 0 down, in a fixed walk
order.

**n = 4 is special.** At distance 2 = n-2, the products `a_i a_{i-2}`
coincide in pairs. So only two triplets (i = 2 and 3) are formed, and
`a_0~a_3`, `a_1~a_0`, `a_0a_3` and `a_3a_2` stay as plain bits. This gives
8 bits in columns of height 2, so no carry-save level is needed at all.

Any n ≥ 4 works, odd n included.

## Booth-folded squarer (even n)

This is the subtle part of the design.

### Digits

The operand is recoded into m = n/2 digits:

    A_i = -2·a_{2i+1} + a_{2i} + a_{2i-1},   A_i ∈ {-2,-1,0,1,2}

The bit below digit 0 is **a_{n-1}**, not 0 (`a_{-1} = a_{n-1}`). In
ordinary radix-4 recoding the top digit leaves a term `-a_{n-1}·2^n`.
Modulo 2^n-1 that term is `-a_{n-1}`, which is exactly cancelled by feeding
a_{n-1} into digit 0. So `A ≡ Σ A_i 4^i` holds exactly, and no extra digit
is needed. `booth_enc` gives `one` (|A_i| = 1), `two` (|A_i| = 2) and `neg`
(= a_{2i+1}) for each digit.

### Folding

Squaring the digit sum and merging `A_iA_k + A_kA_i` gives

    A^2 = Σ_i C_i·2^(4i) + Σ_{i<m-1} P_i·2^(4i+3)
    C_i = A_i^2 ∈ {0,1,4}
    P_i = A_i · Q_i,   Q_i = Σ_{k>i} A_k·4^(k-i-1)

`C_i` has only bits 0 and 2, and these are the encoder's `one` and `two`
outputs. So the squares cost no logic.

### Building P_i with a one's complement stage (`booth_fold_term`)

The digits above i recode the operand bits above a_{2i+1}. So
`Q_i = T + a_{2i+1}`, where T is the two's complement value of
`a_{n-1} … a_{2i+2}` (L = n-2i-2 bits).

A negative digit always has a_{2i+1} = 1, and then
`-Q_i = -(T+1) = ~T`. This gives

    P_i = |A_i| · (T xor a_{2i+1})

This is a row of XOR gates followed by a ×1/×2 select. No incrementer or
extra "+1" bit is needed. The group 111 (digit 0 with `neg` = 1) gives 0
through `one = two = 0`.

P_i always fits in L+1 = n-2i-1 bits: 7, 5 and 3 bits for P_0, P_1 and P_2
at n = 8. The one value that would need another bit is +2^L, and it cannot
occur.

### Wrapping signed words

P_i is a signed word whose bits reach past column n-1. Its non-sign bits
wrap around like any other bit. The sign bit s, at weight n+2i+1, is handled
differently:

* `-s·2^(n+2i+1) ≡ -s·2^(2i+1)`,
* and modulo 2^n-1 this equals an n-bit word of all ones (≡ 0) with `~s` in
  column 2i+1.

The positions 2i+1 differ for every i. So the correction words of all P_i
merge into **one** word: all ones, except `~sign(P_i)` in column 2i+1. At
n = 8 this word is `1 1 ~P2,2 1 ~P1,4 1 ~P0,6 1`.

At n = 8 the Booth matrix holds 28 bits. Five of them are the constant 1,
and the maximum height is 5 (columns 0 and 4).

## Reduction and final addition

**`eac_csa_tree`** takes the matrix as H rows of n bits. Empty positions
are zero. Each level works like this:

* Rows are taken three at a time. `csa_eac` turns each group into a sum word
  and a carry word.
* The carry word is *rotated* left by one, not shifted, so the end-around
  carry is handled.
* Rows left over pass on to the next level.

The number of levels comes from the height:

* height 2: 0 levels,
* heights 3 and 4: 1 and 2 levels,
* height 5: 3 levels.

Zero and constant-one inputs are left for synthesis to simplify into half
adders or wires. The constant bits of the Booth correction word are the main
case.

**`mod_adder`** adds the two words modulo 2^n-1:

* A Kogge-Stone prefix tree gives G[i:0] and P[i:0].
* The end-around carry is `cout = G[n-1:0]`.
* The carry into bit i is `G[i-1:0] | P[i-1:0]·cout`. This is one AND-OR
  level after the tree.

**Zero convention.** The result is `x+y` if that is below 2^n, otherwise
`x+y-2^n+1`. Zero therefore appears as all ones whenever the two words add
up to exactly 2^n-1. At n = 8 this happens for 2 of the 256 operands in at
least one of the two squarers. A consumer that needs a unique zero must map
all ones to 0.

## Sizes

The same walk order fills the matrices and the counting functions in
`modsq_pkg`:

| n | non-encoded bits | non-encoded height | Booth bits | Booth height |
|---|---|---|---|---|
| 4 | 8 | 2 | 10 | 4 |
| 8 | 28 | 4 | 28 | 5 |
| 16 | 120 | 8 | 88 | 7 |
| 32 | 496 | 16 | 304 | 11 |
| 64 | 2016 | 32 | 1120 | 19 |
| 128 | 8128 | 64 | 4288 | 35 |

For comparison, the plain folded matrix has n(n+1)/2 bits and height
n/2+2, for n ≥ 8. A standard radix-4 Booth modulo multiplier has about n/2
rows.

## Modules

| module | role |
|---|---|
| `mod_sq_top #(N=8)` | `a[N-1:0]` → `sq_nonenc`, `sq_booth`; N must be even |
| `sq_nonenc #(N=8)` | non-encoded squarer, `a` → `sq` |
| `sq_booth #(N=8)` | Booth-folded squarer, `a` → `sq`, N even |
| `nonenc_ppm #(N)` | non-encoded matrix, `rows[nonenc_height(N)]` |
| `sc_precalc` | c/s cell of the pre-calculated pairs |
| `booth_ppm #(N)` | Booth-folded matrix, `rows[booth_height(N)]` |
| `booth_enc` | one Booth digit: `grp[2:0]` → `one`, `two`, `neg` |
| `booth_fold_term #(L)` | P_i from `one`/`two`/`neg` and `t[L-1:0]`, output `p[L:0]` |
| `eac_csa_tree #(N, ROWS)` | rows → `sum`, `carry` |
| `csa_eac #(N)` | one 3:2 row with rotated carry |
| `mod_adder #(N)` | `x + y` mod 2^N-1, plus `cout` for observation |
| `modsq_pkg` | bit counts, heights and tree-level functions |

Everything is combinational. There is no clock, reset or handshake, and the
output follows the input after the logic delay. To pipeline, register `a`
and `sq` around a squarer, or register the two `eac_csa_tree` outputs.

## Simulating

Each testbench in `tb/` checks its results itself. It prints
`TB_RESULT checks=N failures=M` and stops. For example:

    verilator --binary --timing --assert rtl/*.sv tb/tb_mod_sq_top.sv \
        --top-module tb_mod_sq_top -Mdir obj && obj/Vtb_mod_sq_top

`rtl/modsq_pkg.sv` must be read before the modules. Verilator reports
`MODDUP` if the package is listed twice.

What the testbenches check:

* **`tb_mod_sq_top`** runs the top at its default N = 8:
  * Both outputs must be right for all 256 operands, and the two must agree.
  * It counts how often each mechanism is exercised, and fails if one never
    is: c = 1 and s = 1 from the pre-calculated cells, every Booth digit
    value, negative P_i, and end-around carries in both trees and both
    adders.
* **`tb_workloads`** covers n = 4, 8, 16, 32, 64 and 128 for both squarers:
  * n = 4, 8 and 16 are tested exhaustively.
  * Larger n use 2,000 to 20,000 random and corner operands.
  * A shift-and-add reference computes the expected result.
  * It takes about a minute to build and a few seconds to run.
* **Block testbenches** (`tb_<module>`):
  * The small cells are tested exhaustively.
  * The matrices are tested exhaustively at n = 8 and at n = 5 or 6, and
    their bit counts and heights are compared with the table above.
  * The adder is tested on all 65,536 pairs at n = 8.

Every testbench was also run against a copy of its module with one
deliberate fault, and each one reported failures.

## Own choices and limits

These points are not fixed by the architecture and were chosen here:

* **Row packing.** Which row a bit occupies inside its column is a choice.
  Only the column is fixed.
* **Tree shape.** The reduction is a row-wise Wallace tree of 3:2 rows.
  Half adders appear only where synthesis removes a constant input. No
  hand-built column compressors are used.
* **Final adder.** It is a Kogge-Stone prefix tree plus one end-around-carry
  level. It is not a cyclic-prefix design with carry recirculation inside
  the tree, so its delay is one gate level longer than such adders.
* **P_i logic.** The circuit for P_i is the one's complement form derived
  above.
* **Zero output.** The result is not normalised: zero can appear as all
  ones (see above).
* **Booth width.** The Booth squarer is only defined for even n.
* **No timing data.** No area or delay figures come with this RTL. They
  depend on the cell library and the synthesis flow.
