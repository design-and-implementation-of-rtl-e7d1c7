# DeBAM: a decoder-based approximate multiplier

An unsigned N x N multiplier (8 x 8 -> 16 bits by default) for error-tolerant
work such as image processing, where a small, bounded error in the low part of
a product is acceptable in exchange for less hardware. An exact array
multiplier makes one AND row per multiplier bit, eight rows for 8 bits, and
spends most of its adders summing them. This design makes only five rows:

* the low six multiplier bits are taken two at a time, and each pair drives a
  small **decoder** that emits one whole row;
* the top two bits (a7, a6) make ordinary exact AND rows, so no error can reach
  the high half of the product through them.

The five rows are reduced to two by **3:2 carry-save adders**, and a
**ripple carry adder** adds the last two rows into the product.

## The decoder and where the error comes from

A bit pair `{a[2k+1], a[2k]}` can be worth 0, 1, 2 or 3 times the multiplicand
B. The decoder produces:

| a[2k+1] a[2k] | row (at weight 4^k) | exact? |
|:---:|---|---|
| 00 | 0 | yes |
| 01 | B | yes |
| 10 | B << 1 | yes |
| 11 | B \| (B << 1) | no: should be B + 2B |

The first three cases need only gating and a one-place shift. The fourth would
need an adder. Instead, the two values are combined with a bitwise OR, so every
carry of `B + 2B` is lost. Since `x + y = (x | y) + (x & y)`, the error of one
group is exactly

    error_k = (B & (B << 1)) << 2k      when the pair is 11, else 0

It is never negative, so the product is never larger than the exact product, and
it is zero unless the pair is 11 *and* B has two adjacent 1 bits. The total error
is the sum of the three groups' errors. The worst case is a = xx111111 with
B = 255: 254 x (1 + 4 + 16) = 5334.

Measured over all 65536 operand pairs of the 8-bit design (printed by
`tb_debam_mult`):

| metric | value |
|---|---|
| results that differ from a*b | 45.39 % |
| mean error distance | 333.4 |
| mean relative error (pairs with a*b != 0) | 2.37 % |
| largest error | 5334 |

## Partial product rows (N = 8)

    row 0  decoder(a1 a0) x B      bits  8..0
    row 1  decoder(a3 a2) x B      bits 10..2
    row 2  decoder(a5 a4) x B      bits 12..4
    row 3  a6 ? B : 0              bits 13..6
    row 4  a7 ? B : 0              bits 14..7

All rows are carried as 16-bit values. The accumulator is a chain of three
carry-save rows: (row0, row1, row2), then (sum, carry << 1, row3), then
(sum, carry << 1, row4). The result pair goes to a 16-bit ripple carry adder
with carry-in 0. Arithmetic is modulo 2^16. The dropped carries above bit 15 are
always harmless, because the true total is at most a*b < 2^16.

## Modules

| module | role |
|---|---|
| `debam_pkg` | default sizes (`DEBAM_N = 8`, `DEBAM_EXACT_BITS = 2`) and the decoder select enum |
| `debam_decoder` | 2-bit decoder block: N-bit B in, N+1-bit row out |
| `and_pp_row` | exact AND row for one multiplier bit |
| `debam_ppg` | partial product generation: the decoders and AND rows, shifted to their weights |
| `full_adder` | one-bit full adder cell |
| `csa_3to2` | one row of 3:2 carry-save adders (returns the carry unshifted) |
| `debam_accumulator` | chain of `ROWS-2` CSA rows, ROWS rows in, two rows out |
| `rca` | ripple carry adder |
| `debam_mult` | top: `a`, `b` in (N bits each), `p` out (2N bits) |

The whole multiplier is combinational. It has no clock, no reset and no
handshake: `p` follows `a` and `b` after the gate delay. The critical path runs
through a decoder, three full adders and the 16-bit carry ripple.

### Parameters

`debam_mult #(N, EXACT_BITS)`: N is the operand width, and EXACT_BITS is how
many top multiplier bits use exact AND rows. `N - EXACT_BITS` must be even,
because the remaining bits are split into 2-bit decoder groups. Elaboration
stops with an error otherwise. The defaults are 8 and 2. Other widths follow the
same rule, for example 16 x 16 with seven decoder groups and two exact rows.
Larger EXACT_BITS gives fewer errors and more rows.

## Choices made in this RTL

The decoder table, the grouping of the multiplier bits, the two exact top rows,
the 3:2 carry-save accumulation and the ripple carry final adder follow the
published design. The following are this implementation's own choices:

* The order in which the carry-save adders take the rows. It is a linear chain
  here, and a different tree gives the same result.
* Row widths, and the N+1-bit decoder output.
* No pipeline registers and no I/O registers. The multiplier is a single
  combinational block.
* The generalisation to other widths through `N` and `EXACT_BITS`. Only the
  8-bit form is described in detail at the source.
* Unsigned operands only. Signed multiplication is not addressed.

The design is described as being used in image sharpening and compression.
Those applications are not included, because no kernels or data sizes are
specified for them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_debam_decoder` | all 4 codes x all 256 B, bitwise reference; 11-case bound against 3B |
| `tb_and_pp_row` | exhaustive |
| `tb_debam_ppg` | all 65536 (a, b); every row against its arithmetic value; every code reached in every group |
| `tb_csa_3to2` | random and corner vectors; `x+y+z = sum + 2*carry` and per-bit majority/parity |
| `tb_debam_accumulator` | random and partial-product-shaped rows; sum modulo 2^16 |
| `tb_rca` | random and full-ripple vectors |
| `tb_debam_mult` | default 8 x 8 top, all 65536 pairs: exact match with an arithmetic model of the approximation, `p <= a*b`, `p == a*b` when no pair is 11, and counts of each mechanism (each decoder code per group, inexact 11 rows, both exact rows, exact and approximate results); prints the error statistics above |
| `tb_debam_mult_n16` | 16 x 16 variant, 50 000 random pairs plus corners |

To run one with Verilator:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/debam_pkg.sv tb/tb_debam_mult.sv --top-module tb_debam_mult -o sim
    ./obj_dir/sim

Every testbench finishes in well under a second.
