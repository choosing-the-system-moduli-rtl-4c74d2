# RNS arithmetic processor with a ROM-based CRT decoder

A residue number system (RNS) represents an integer `X` by its remainders
`r_i = |X|_m_i` with respect to a set of pairwise relatively prime moduli
`m_1 .. m_n`. Addition, subtraction and multiplication then work digit by
digit, with no carry between digits, so a wide operation becomes `n` small,
independent ones. The price is at the two ends. Binary numbers must be
converted into residues. The result must be converted back with the Chinese
Remainder Theorem (CRT), which needs an addition modulo `M = m_1 * ... * m_n`.
That modulo-`M` addition is the slow and costly part.

This RTL builds the whole processor from small ROMs and adders. Its main idea
is that the choice of moduli decides both the ROM size and how simple the
final modulo-`M` adder can be. If one modulus is a power of two, `2^K`, the
modulo-`M` addition splits into a `K`-bit addition that simply drops its
carries, one small ROM and two ordinary adders. That form is the default
here.

## Datapath

`rns_processor` computes `X = |A op B|_M` for unsigned `IN_W`-bit operands.
It has four stages with one register each. It accepts one operation per
clock, and each result appears four clocks after its operands.

| stage | module | per modulus `m_i` (w_i = ceil(log2 m_i)) |
|---|---|---|
| 1. binary to residue | `rns_fwd_conv` (two per modulus, for A and B) | `r = |x|_m_i`: a chain of `IN_W` compare-and-subtract cells (Horner's rule, MSB first) |
| 2. residue arithmetic | `rns_mod_proc` | ROM of `2^(2 w_i)` words of `w_i` bits, address `{a, b}`, word `|a op b|_m_i` |
| 3. CRT summands | `crt_split_rom` (or `crt_term_rom`) | ROM of `2^w_i` words holding the CRT summand of each residue digit |
| 4. modulo-M sum | `crt_vu_decoder` (or `crt_modm_adder`, `crt_eac_adder`) | one unit for all moduli |

The CRT summand of digit `r` of modulus `m_i` is

    S_i = (M/m_i) * | r * (M/m_i)^-1 |_m_i ,   0 <= S_i < M

and `X = | S_1 + ... + S_n |_M`. Each `S_i` is a multiple of `M/m_i` that is
congruent to `r` modulo `m_i`. Every ROM is computed from the moduli when it
is initialised, in an `initial` block. No table is read from a file. Synthesis
sees each ROM as a memory with an initial value.

The operation (`OP`: `OP_ADD`, `OP_SUB` or `OP_MUL`) is fixed per build,
because each processor is a single table. Subtraction wraps modulo `M`.

## The decoder for a power-of-two modulus (default)

Let `m_j = 2^K` be one of the moduli and `M' = M / 2^K`. The summand ROM
(`crt_split_rom`) does not store `S_i` as a plain binary number. It stores it
as a quotient and remainder by `M'`:

    S_i = q_i * M' + rho_i ,   0 <= q_i < 2^K ,  0 <= rho_i < M'

Because `M' * 2^K = M`, only `q = |sum q_i|_2^K` matters for the first part:

    X = | M' * |sum q_i|_2^K  +  sum rho_i |_M

If there are no more moduli than `2^K` (`N <= 2^K`), then
`sum rho_i < N * M' <= M`. Both parts are then below `M`, and one correction
finishes the sum. `crt_vu_decoder` does this in four levels. Let
`c = ceil(log2 M)`.

1. **Mod-2^K multi-operand adder.** `q = sum q_i` on `K` bits, with the
   carries dropped. Beside it, `r = sum rho_i` on `c` bits. This sum never
   exceeds `M`. Both are carry-save trees (`mo_adder`). Each tree level
   turns three operands into two with a row of full adders, so the depth
   grows with `log N`. One carry-propagate adder finishes the sum.
2. **Small ROM, 2^K words.** `Y[q] = q*M' + 2^c - M`. The ROM adds the offset
   `2^c - M` in advance.
3. **2-operand adder.** `{carry, Z} = Y + r`. The carry out of bit `c` is set
   exactly when `q*M' + r >= M`. In that case `Z` is already the answer.
4. **2-operand adder.** If there was no carry, `X = Z + M (mod 2^c)`. This
   removes the `2^c - M` that level 2 added.

So the only comparison with `M` is a carry bit. No comparator is needed.

Worked example with the default moduli `{16, 5, 7, 11, 13}` (`M = 80080`,
`M' = 5005`, `c = 17`) and `A = 300`, `B = 500`, `op = multiply`:

| | m=16 | 5 | 7 | 11 | 13 |
|---|---|---|---|---|---|
| residues of A | 12 | 0 | 6 | 3 | 1 |
| residues of B | 4 | 0 | 3 | 5 | 6 |
| product digits | 0 | 0 | 4 | 4 | 6 |
| S_i | 0 | 0 | 22880 | 65520 | 61600 |
| q_i / rho_i | 0/0 | 0/0 | 4/2860 | 13/455 | 12/1540 |

`sum q_i = 29`, so `q = 13`. `r = 4855`. `Y = 13*5005 + 131072 - 80080 = 116057`.
`Z = 120912` with no carry, so `X = 120912 + 80080 - 131072 = 69920`. That is
`150000 mod 80080`.

## Other decoders (`DEC` parameter)

The moduli set decides which summation is possible, so `rns_processor` has
three forms of stages 3 and 4:

- `DEC_SPLIT` (default): the decoder above. It needs one modulus `2^K` and
  `N <= 2^K`. Both are checked at elaboration.
- `DEC_EAC`: the moduli multiply to exactly `M = 2^c - 1`. Then `2^c` is
  congruent to 1 modulo `M`. `crt_term_rom` gives the plain `t_i = S_i`, and
  `crt_eac_adder` adds them in a multi-operand adder with end-around carry.
  It uses two folds of the high bits onto the low bits, then maps `2^c - 1`
  to 0. This is the fastest summation, but such sets are rare. `2^l - 1`
  must factor into suitable coprime moduli, and none exists when `2^l - 1` is
  prime (l = 7, 13).
- `DEC_TSUM`: any coprime set. `crt_modm_adder` adds the `t_i`. It compares
  the raw sum with every multiple `j*M` (`j < N`) in parallel and subtracts
  the largest one that fits. This is the slowest and most general form.

## Choosing the moduli

The moduli must be pairwise relatively prime, and `M` must be at least
`2^l - 1` for `l`-bit results. Among the sets that qualify, the aim is the
least ROM:

    sum_i 2^(2 w_i) * w_i   (processors)   +   sum_i 2^(w_i) * l_i   (summand ROMs)

Here `w_i = ceil(log2 m_i)` and `l_i` is the word length of summand ROM `i`.
Small moduli are cheap, but more of them are needed. A power-of-two modulus
or a product of exactly `2^l - 1` gives a faster decoder, possibly at the
cost of more ROM. The search over moduli sets is an offline design-time
step. The RTL takes its result as the `MODULI` parameter.

The default set `{16, 5, 7, 11, 13}` gives `M = 80080 >= 2^16 - 1`. This
covers 16-bit results with the power-of-two decoder. It has 3456 processor
ROM bits, 1088 split-summand ROM bits and a 272-bit level-2 ROM. The default
set is this design's own choice under the rules above. It is not a published
optimum.

Moduli sets exercised by `tb_rns_workloads`, one per result size:

| l | `DEC_SPLIT` | `DEC_EAC` (product = 2^l - 1) |
|---|---|---|
| 7 | 8, 3, 7 | none (127 is prime) |
| 8 | 8, 5, 7 | 3, 5, 17 |
| 9 | 16, 5, 7 | 7, 73 |
| 10 | 16, 3, 5, 7 | 3, 11, 31 |
| 11 | 16, 9, 5, 7 | 23, 89 |
| 12 | 16, 9, 5, 7 | 9, 5, 7, 13 |
| 13 | 16, 9, 7, 11 | none (8191 is prime) |
| 14 | 16, 3, 5, 7, 11 | 3, 43, 127 |
| 15 | 16, 9, 5, 7, 11 | 7, 31, 151 |
| 16 | 16, 5, 7, 11, 13 | 3, 5, 17, 257 |

The test also runs `DEC_TSUM` on `{16, 5, 7, 11, 13}` and on
`{3, 5, 7, 11, 13, 17}`, and addition and subtraction on the default set.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset of the valid pipeline only |
| `in_valid` | in | 1 | `a`, `b` hold an operation this clock |
| `a`, `b` | in | `IN_W` | unsigned operands |
| `out_valid` | out | 1 | `x` holds a result; exactly 4 clocks after `in_valid` |
| `x` | out | `ceil(log2 M)` | `|a op b|_M` |

The processor has no back-pressure and no stall. A new operation may enter
every clock. The data registers are not reset. They are overwritten before
`out_valid` can point at them.

Parameters of `rns_processor`: `N` (5), `MODULI` (`'{16, 5, 7, 11, 13}`),
`IN_W` (16), `OP` (`OP_MUL`), `DEC` (`DEC_SPLIT`). Elaboration stops with an
error in these cases:

- the moduli are not coprime;
- `M` does not fit in 32 bits;
- `DEC_SPLIT` is chosen but no modulus is a power of two, or `N > 2^K`;
- `DEC_EAC` is chosen but `M != 2^c - 1`.

## Files

- `rtl/rns_pkg.sv`: operation and decoder enums, and the constant functions
  (gcd, modular inverse, CRT summand, table entry).
- `rtl/rns_fwd_conv.sv`, `rtl/rns_mod_proc.sv`: stages 1 and 2.
- `rtl/crt_split_rom.sv`, `rtl/crt_vu_decoder.sv`: the power-of-two decoder.
- `rtl/crt_term_rom.sv`, `rtl/crt_modm_adder.sv`, `rtl/crt_eac_adder.sv`:
  the t-ROM and the two other summation units.
- `rtl/mo_adder.sv`: the carry-save multi-operand adder used by all three
  summation units.
- `rtl/rns_processor.sv`: the top.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_rns_workloads.sv` with `tb/rns_cfg_check.sv`: 23 configurations
  (see the table above).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and ends with
`$finish`. Each one also has a watchdog. Run one with plain Verilator from
the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
        rtl/rns_pkg.sv tb/tb_rns_processor.sv --top-module tb_rns_processor -o sim
    ./obj_dir/sim

The expected values are computed inside the testbenches, by brute-force
search for the CRT summands and by plain integer arithmetic for the results.
They never come from the package functions that fill the ROMs.

`tb_rns_processor` runs the top at its default parameters. It streams 20,000
products, most of them back to back, and checks every value and the
four-clock latency. It also counts the decoder's mechanisms, and any that
never occurs is a failure:

- the mod-16 wrap of `sum q_i`;
- the level-3 carry;
- the level-4 correction;
- products beyond `M`, which wrap modulo `M`.

The unit testbenches sweep the ROMs exhaustively. They drive the adders with
random values and with boundary values, such as sums of exactly `k*M` and
the all-ones sum of the end-around-carry adder.

## Design choices and limits

These points are this design's own choices, where the method leaves room:

- The forward converter (MSB-first compare-and-subtract).
- The register at the end of every stage.
- The valid bit.
- The carry-save form of the multi-operand adders. The method needs only
  some adder of logarithmic depth.
- The inside of `crt_modm_adder` and `crt_eac_adder`.
- Zero in the ROM words of invalid residues.

Other limits:

- Only unsigned operands are handled. There is no conversion to or from
  two's complement.
- One operation per build. A processor that switches between add and
  multiply would need one table per operation.
- `M` is limited to 32 bits. The processor ROMs grow as `2^(2w)`, so moduli
  above about 256 make very large tables.
- The decoder's four levels are combinational in one clock. For high clock
  rates they can be split with extra registers, and the valid pipeline must
  be lengthened to match.
- A summation unit built entirely from one ROM is not provided. It would
  need `2^(sum w_i)` words, which is impractical even for small systems.
