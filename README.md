# Double adjacent error correcting codecs for fast cache words

A radiation strike on a dense SRAM array often flips two neighbouring cells at
once. A plain SEC-DED code (Hamming, Hsiao) can only detect such a double
adjacent error (DAE), and interleaving the words to spread the upsets costs
wiring in a cache. This RTL implements two codes built from orthogonal Latin
square (OLS) style parity-check matrices. Both correct every single error and
every double adjacent error in a 16-bit word. Each data bit sits in two or
three parity equations, and any two data bits share at most one equation.
That property keeps the decoder at one level: syndrome, one AND per data bit,
one XOR per data bit. Nothing like a Hamming syndrome decoder is needed.

| code | name in RTL | check bits | corrects | flags | per-bit correction |
|------|-------------|-----------:|----------|-------|--------------------|
| SEC-DED-DAEC (28,16) | `sec_ded_daec_*` | 12 | single errors, double adjacent errors, double errors whose bits share no check | all other double errors | 3-input AND |
| SEC-DAEC (24,16)     | `sec_daec_*`     |  8 | single errors, double adjacent errors | nothing (no double error detection) | 2-input AND + DAEC cell |

`daec_codec_top` puts both codecs side by side. Each has a write path (data
word in, codeword out) and a read path (codeword in, corrected word and a flag
out). The cache array between the two paths is not part of this RTL. Every
block is combinational: the codecs are meant to sit directly in the cache
access path, and there is no clock or reset.

## The matrices

Both codes are defined by the data part of their parity-check matrix H. Check
bit r is the XOR of the data bits marked in row r. The check part of H is an
identity, up to a column permutation. The matrices live in `rtl/daec_pkg.sv`,
stored by row as 16-bit masks.

**SEC-DED-DAEC (28,16)** (`PRO1_H`). Each data bit lies in exactly three of
the 12 rows. Two columns share at most one row. Two adjacent columns share
none. Using 0-based rows, the column sets are:

```
d0 {0,1,2}   d1 {3,7,11}  d2 {0,9,10}  d3 {1,4,6}   d4 {2,7,10}  d5 {0,3,4}
d6 {5,8,11}  d7 {2,3,6}   d8 {1,7,9}   d9 {0,5,6}   d10 {1,8,10} d11 {2,4,5}
d12 {0,7,8}  d13 {6,9,11} d14 {1,3,5}  d15 {2,8,9}
```

**SEC-DAEC (24,16)** (`PRO2_H`). Each data bit lies in exactly two rows, and
never in two neighbouring rows:

```
p0 = d0 ^ d6 ^ d10 ^ d13          p4 = d2 ^ d4 ^ d7 ^ d10
p1 = d1 ^ d7 ^ d11 ^ d14          p5 = d3 ^ d5 ^ d8 ^ d11 ^ d13
p2 = d0 ^ d2 ^ d8 ^ d12           p6 = d4 ^ d9 ^ d12 ^ d14
p3 = d1 ^ d3 ^ d6 ^ d9 ^ d15      p7 = d5 ^ d15
```

The full matrix has 40 ones, at most 6 in a row. The widest equation is a
5-input XOR.

## Decoding the SEC-DED-DAEC code

The decoder regenerates the check bits and XORs them with the stored ones to
get a 12-bit syndrome. Each data bit ANDs its three syndrome bits and is
flipped when that AND fires. The column rules make each error pattern behave
as follows:

| stored upset | syndrome | outcome |
|---|---|---|
| one data bit | its 3 rows | corrected |
| one check bit | 1 bit | ignored; data intact, no flag |
| two adjacent data bits | 6 rows, disjoint | both corrected. A third column cannot fit inside those 6 rows, because it would share two rows with one of them. |
| two non-adjacent data bits sharing a row | 4 bits | no AND fires; flagged |
| two non-adjacent data bits sharing no row (e.g. d0, d13) | 6 bits | both corrected |
| two check bits | 2 bits | flagged; data intact |
| data bit plus a check bit in one of its rows | 2 bits | flagged |
| data bit plus any other check bit | 4 bits | corrected |

`ded_o` is raised when the syndrome is non-zero, has even weight and no
correction fired. A flagged word leaves the decoder exactly as it was read.
What the cache then does with it (refetch, machine check) is up to the
surrounding design.

## Decoding the SEC-DAEC code

This code saves four check bits by giving every data bit only two equations.
Its Hamming distance is therefore 3. Correction is one 2-input AND per data
bit, `c_j = S_a & S_b`, so single errors are handled exactly as above.

**The problem:** when two adjacent data bits flip, the syndrome holds their
four rows. Any other column whose two rows both lie among those four fires
too. For example, an upset of d0 {p0,p2} and d1 {p1,p3} sets S0 to S3. This
also fires d6 {p0,p3}, which would be miscorrected. In the 16-bit code, 14 of
the 15 adjacent pairs raise such a foreign correction signal.

**The fix** takes two parts, both in `sec_daec_dec`:

1. *DAE detection.* `DAE = OR over j of (c_j & c_(j+1))`, an OR of the K-1
   products of neighbouring correction signals. No two adjacent columns share
   a row, and every adjacent pair of columns covers a different set of four
   rows. So a double adjacent error makes exactly one of these products true,
   and no single error makes any of them true.
2. *DAEC cells* (`daec_module`), one per adjacent pair, chained from d0
   upwards. Cell j sees `a1 = c_j`, `a3 = c_(j+1)` and `a2 = ~DAE`:
   - with DAE low, it passes both corrections (`b1 = a1 | ad`, `b2 = a3`);
   - with DAE high, it passes only its own pair (`b1 = (a1 & a3) | ad`,
     `b2 = a1 & a3`). Every stray correction signal is masked.

   `b2` of cell j feeds `ad` of cell j+1. So data bit j+1, which belongs to
   cells j and j+1, is flipped by `b1` of cell j+1. `ad` of the first cell is
   0, and `b2` of the last cell flips d15.

The critical path is: regenerate check bit, syndrome XOR, AND, the K-1 input
OR, DAEC cell, output XOR. The OR and the cells work in parallel across the
word.

**Check bit placement.** The code is only safe against adjacent upsets
*anywhere* in the stored word if the check bits are stored in a suitable
order. The stored order is p2 p3 p4 p5 p6 p7 p0 p1, after d15. With this order:
- two neighbouring check bits hit rows r and r+1, or p7 and p0. Neither
  pair is the row pair of any data bit, so nothing is corrected;
- d15 {p3,p7} next to p2 cannot cancel or imitate a data column.

`pro2_wr_cw_o` uses exactly this layout.

`dae_o` shows the DAE signal, for error logging.

## Interface of `daec_codec_top`

| port | dir | width | meaning |
|------|-----|------:|---------|
| `pro1_wr_data_i` | in  | 16 | word to store (SEC-DED-DAEC) |
| `pro1_wr_cw_o`   | out | 28 | `{check[11:0], data[15:0]}`; check bit r is row r+1 |
| `pro1_rd_cw_i`   | in  | 28 | word read back, same layout |
| `pro1_rd_data_o` | out | 16 | corrected word |
| `pro1_ded_o`     | out | 1  | uncorrectable double error |
| `pro2_wr_data_i` | in  | 16 | word to store (SEC-DAEC) |
| `pro2_wr_cw_o`   | out | 24 | `{p1,p0,p7,p6,p5,p4,p3,p2, data[15:0]}` |
| `pro2_rd_cw_i`   | in  | 24 | word read back, same layout |
| `pro2_rd_data_o` | out | 16 | corrected word |
| `pro2_dae_o`     | out | 1  | a double adjacent data error was corrected |

The codeword types are the packed structs `pro1_codeword_t` and
`pro2_codeword_t` in `daec_pkg`. All outputs are combinational functions of
the inputs of the same path.

The building blocks can be used on their own. These are
`sec_ded_daec_enc`/`_dec` and `sec_daec_enc`/`_dec` (ports `data_i`,
`check_i`/`check_o`, `data_o`, `ded_o`/`dae_o`, with check bits in row order),
and `daec_module`.

## 64- and 256-bit words

The same two schemes were specified for 64- and 256-bit words: SEC-DED-DAEC
(87,64) and (300,256), and SEC-DAEC (77,64) and (281,256). Their matrices were
not published. The encoders and decoders are generic: `K` (data bits), `R`
(check bits) and `H` (matrix, type `daec_pkg::hmat_t`, at most 256 x 64).
`daec_pkg` builds matrices for these sizes at elaboration time:

- `pro2_gen_h(k, r)`: weight-2 columns `{i, i+s}` with `s >= 2`, taken by
  increasing distance. A candidate is skipped if it shares a row with the
  previous column, or if it would give an adjacent pair the same row union as
  an earlier pair. For (77,64) the result has 141 ones and at most 11 per row,
  the figures given for the published (77,64) matrix. For (281,256) it has
  537 ones and at most 23 per row.
- `pro1_gen_h(k, r)`: weight-3 columns, greedy in lexicographic order, with no
  row pair reused and no row shared with the previous column. (87,64) has 215
  ones; (300,256) has 812.
- `pro2_check_start(h, k, r)`: picks where the rotated SEC-DAEC check-bit
  order starts. It gives the same reasoning as the p2-first order above, and
  returns 2 for the 16-bit matrix.

Example: `sec_daec_dec #(.K(64), .R(13), .H(daec_pkg::pro2_gen_h(64, 13)))`.
These matrices have the same correction properties as the published ones,
which the wide testbench checks. Their gate counts and delays are not those
of the published 64/256-bit matrices.

## Files

| file | contents |
|------|----------|
| `rtl/daec_pkg.sv` | sizes, the two 16-bit matrices, codeword structs, matrix builders for wider words |
| `rtl/sec_ded_daec_enc.sv`, `rtl/sec_ded_daec_dec.sv` | SEC-DED-DAEC encoder and decoder |
| `rtl/sec_daec_enc.sv`, `rtl/sec_daec_dec.sv` | SEC-DAEC encoder and decoder |
| `rtl/daec_module.sv` | DAEC selective-correction cell |
| `rtl/daec_codec_top.sv` | both codecs, codeword ports |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_daec_wide_words` |
| `tb/wide_code_checker.sv` | helper used by `tb_daec_wide_words` |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each has a watchdog that counts a failure if it hangs. For example,
with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/daec_pkg.sv tb/tb_daec_codec_top.sv --top-module tb_daec_codec_top
./obj_dir/Vtb_daec_codec_top
```

| testbench | what it covers |
|-----------|----------------|
| `tb_sec_daec_enc`, `tb_sec_ded_daec_enc` | all 65,536 data words against equations written independently of the RTL; matrix statistics (40 ones, max 6 per row) |
| `tb_daec_module` | all 16 input combinations against the selective-correction rule |
| `tb_sec_daec_dec` | 600 words × (no error, all 24 single, all 23 adjacent stored-bit pairs); DAE must rise exactly for data pairs; fails unless masking of stray corrections was actually exercised |
| `tb_sec_ded_daec_dec` | 200 words × every single and every double error of the 28 stored bits, with the outcome table above worked out from the column sets |
| `tb_daec_codec_top` | end to end: writes 64 words through both encoders into an array model, upsets them with every pattern class of both tables, reads back and checks data and flags over 8 passes, and counts each class. This testbench runs the top with its default parameters. |
| `tb_daec_wide_words` | the four 64/256-bit codes: matrix structure, encoder, all single and adjacent stored-bit errors, and random double errors for the SEC-DED-DAEC codes |

All pass. Each block's testbench was also run against a deliberately broken
copy of the block and fails there.

## Where this RTL departs from, or adds to, the original description

- **No registers.** The codecs are described and evaluated as combinational
  circuits. Pipelining them into a cache is left to the integrator.
- **Double error flag rule.** The flag follows the verbal rule "even number of
  syndrome bits and no correction". The original points to an earlier
  detection circuit for this and does not spell it out.
- **DAEC cell.** The cell is written from its stated behaviour as three
  product terms. It is not copied gate for gate, and its truth table is what
  the testbench checks.
- **Status outputs.** `dae_o` on the SEC-DAEC decoder is an added status
  output.
- **Wider words.** The 64/256-bit matrices and the rotated check order for
  them are this design's constructions (see above).
- **Not included.** The cache array, any handling of flagged words, and the
  baseline codes the schemes were compared against (Hsiao SEC-DED, earlier
  SEC-DAEC and SEC-DED-DAEC codes) are not part of this RTL.
