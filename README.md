# Approximate radix-4 Booth multipliers (ABM1–ABM4)

Many workloads — image and video processing, audio, machine learning — tolerate small arithmetic
errors. A multiplier that is allowed to be slightly wrong in its low-order bits can drop gates from
its encoders and its reduction tree, and so become smaller, faster and cheaper in energy. This
repository holds synthesizable SystemVerilog for a family of such multipliers: signed (two's
complement) radix-4 Booth multipliers in which three parts of the circuit are simplified on
purpose:

1. **the Booth encoder/selector** of the low-order partial-product bits (two simplified encoders,
   ABE-1 and ABE-2),
2. **the partial-product array**, which loses its last negation bit so that it keeps N/2 rows
   instead of N/2+1 (the *approximate regular array*),
3. **the 4-2 compressors** that reduce the low-order columns (an approximate compressor without
   carry-in or carry-out).

Combining one approximate encoder with the approximate array gives the two "single" designs,
ABM1 and ABM2; adding the approximate compressor gives the two "composite" designs, ABM3 and
ABM4. One parameter, the approximation factor **P**, sets how many low-order product columns are
approximated, trading accuracy for hardware.

| design | encoder in columns < P | regular array (last Neg dropped) | approximate 4-2 compressor in columns < P |
|--------|------------------------|----------------------------------|-------------------------------------------|
| ABM1   | ABE-1                  | yes                              | no                                        |
| ABM2   | ABE-2                  | yes                              | no                                        |
| ABM3   | ABE-1                  | yes                              | yes                                       |
| ABM4   | ABE-2                  | yes                              | yes                                       |

The default configuration is 8 × 8 bits → 16-bit product, P = 8. The multiplier core is
parameterized in N (even, ≥ 4; 16-bit operands are tested) and P (0 … 2N).

## How an exact radix-4 Booth multiplier builds its array

The multiplier `b` is scanned in overlapping 3-bit groups (b<sub>2i+1</sub>, b<sub>2i</sub>,
b<sub>2i−1</sub>), with b<sub>−1</sub> = 0. Each group is a Booth digit
d = −2·b<sub>2i+1</sub> + b<sub>2i</sub> + b<sub>2i−1</sub> ∈ {−2, −1, 0, 1, 2}, so an N-bit
multiplier yields only N/2 partial products d<sub>i</sub>·A·4<sup>i</sup>.

Bit j of row i is produced by one small cell from b<sub>2i+1</sub>, b<sub>2i</sub>,
b<sub>2i−1</sub>, a<sub>j</sub> and a<sub>j−1</sub>:

    pp_ij = (b2i ^ b2i-1) & (b2i+1 ^ a_j)                       // digit +-1: A, inverted if negative
          | ~(b2i ^ b2i-1) & (b2i+1 ^ b2i) & (b2i+1 ^ a_j-1)    // digit +-2: A shifted left

A negative multiple comes out in one's complement; the missing +1 is a separate **Neg** bit,
neg<sub>i</sub> = b<sub>2i+1</sub> & ~(b<sub>2i</sub> & b<sub>2i−1</sub>) (the group 111 is
digit 0 and needs none). Each row has N+1 bits (the multiplicand is sign-extended by one bit,
a<sub>N</sub> = a<sub>N−1</sub>; a<sub>−1</sub> = 0). Sign extension is folded into a few
constant and complemented bits, so the whole 8 × 8 array looks like this (columns 15 … 0;
`#` = pp bit, `s`/`~s` = sign bit s<sub>i</sub> = pp<sub>i,N</sub> or its complement, `1` =
constant one, `n` = Neg bit of the row above):

    column   15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
    row 0                ~s  s  s  #  #  #  #  #  #  #  #  #
    row 1             1  ~s  #  #  #  #  #  #  #  #  #     n0
    row 2       1 ~s  #  #  #  #  #  #  #  #  #     n1
    row 3   ~s  #  #  #  #  #  #  #  #  #     n2
    row 4                            n3                        <- the extra row

The last Neg bit, n3 at column 6, would need a fifth row of its own. All other columns are at
most four dots tall.

## The three approximations

### Approximate Booth encoders (columns below P)

Every pp bit whose column 2i+j is below P is produced by a cheaper cell instead of the exact
selector; Neg bits are always exact.

* **ABE-1** keeps only the ±A term: `pp = (b2i ^ b2i-1) & (b2i+1 ^ a_j)`. Digits ±2 read as
  zero. Over the 32-entry truth table it changes a 1 into a 0 in 4 entries and never a 0 into a 1.
* **ABE-2** is a single XOR: `pp = a_j ^ b2i+1`. It changes a 0 into a 1 in 6 entries (digit 0
  groups 000 and 111, and ±2 cases with a<sub>j</sub> ≠ a<sub>j−1</sub>) and a 1 into a 0 in 2,
  so its errors have both signs and partly cancel.

Counting 0→1 and 1→0 flips against each other, both encoders are off by a net 4 of 32 truth-table
entries (mean 0.125 per entry). ABE-1 reaches that with 4 flips, ABE-2 with 8, so ABE-2's error
per flip is half that of ABE-1.

### Approximate regular array

The last Neg bit is simply discarded, so the array has N/2 rows. The product is then
2<sup>N−2</sup> too small whenever the top Booth digit is negative, which happens for 3 of the
8 values of the top three multiplier bits.

### Approximate 4-2 compressor (ABM3, ABM4; columns below P)

The compressor takes four dots of one column, as the pairs (P1, P2) and (P3, P4), and returns a
sum of the same weight and a carry of twice the weight, with no carry chain between compressors:

    sum   = (P1 ^ P2) | (P3 ^ P4)
    carry = (P1 | P2) & (P3 | P4)

sum + 2·carry is exact for 9 of 16 inputs. It reads 3 instead of 2 when each pair holds one 1, and
is 2 too low when both 1s are in the same pair or all four inputs are 1. In every column below P
the rows are taken four at a time (rows 0–3, 4–7, …; missing inputs are 0). For N = 8 a column is
at most four dots tall, so one compressor per column replaces the whole reduction there; for
wider operands only this first level is approximate. Everything else — the columns from P
upward, and the compressor outputs — is added exactly by the final adder.

## Accuracy

The accuracy measure is the normalised mean error distance,
NMED = mean(|exact − approximate|) / 2<sup>2N−1</sup>, over all operand pairs.
`tb/tb_abm_nmed.sv` measures it exhaustively (all 65 536 signed pairs) for the four 8-bit designs
at P = 4 … 14. Values are in units of 10<sup>−2</sup>; the row "pub." is the simulated NMED
published for these multipliers, against which the testbench checks a factor-of-two band:

| design |      | P=4   | P=6   | P=8   | P=10  | P=12  | P=14   |
|--------|------|-------|-------|-------|-------|-------|--------|
| ABM1   | RTL  | 0.084 | 0.139 | 0.432 | 1.251 | 3.405 | 7.617  |
|        | pub. | 0.082 | 0.137 | 0.427 | 1.269 | 3.369 | 7.022  |
| ABM2   | RTL  | 0.079 | 0.105 | 0.422 | 1.441 | 4.307 | 10.249 |
|        | pub. | 0.076 | 0.104 | 0.409 | 1.4   | 4.089 | 10.138 |
| ABM3   | RTL  | 0.088 | 0.157 | 0.515 | 1.714 | 9.245 | 21.013 |
|        | pub. | 0.082 | 0.137 | 0.607 | 2.447 | 9.827 | 20.871 |
| ABM4   | RTL  | 0.087 | 0.135 | 0.516 | 1.814 | 8.189 | 22.893 |
|        | pub. | 0.076 | 0.162 | 0.598 | 2.377 | 9.778 | 17.24  |

The single designs agree within 9%. The composite designs agree to within about 35%.
The likely reason is that the exact placement of the approximate compressors is this design's
own choice (see below). Error grows roughly exponentially with P, and adding the compressor never
lowers the error. `tb/tb_abm16_nmed.sv` does the same for 16-bit operands at P = 16 on 200 000
random pairs (NMED ≈ 0.003 × 10<sup>−2</sup> for all four).

## Top level: `abm_top`

`abm_top` (parameters N = 8, P = 8) puts the four designs side by side behind two operand
buffers, following the classic chain buffer → Booth encoder → partial-product generator → final
adder:

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| in_valid | in | 1 | capture `a` and `b` at this clock edge |
| a, b | in | N | multiplicand, multiplier (two's complement) |
| out_valid | out | 1 | high one clock after `in_valid` |
| product_abm1 … product_abm4 | out | 2N | approximate products of ABM1 … ABM4 |

Timing: the operands are registered on the edge where `in_valid` is high; the four products are
combinational from the registers, so they appear together with `out_valid` one clock later and
hold until the next capture. The multipliers themselves have no clock; to use one alone,
instantiate `approx_booth_multiplier` with the parameters of the table above.

## Module hierarchy

    abm_top
    ├── operand_buffer ×2            load-enabled operand register
    └── approx_booth_multiplier ×4   (ENC, APPROX_ARRAY, APPROX_COMP select ABM1..4)
        ├── booth_pp_array           Booth encoding, pp rows, Neg and sign-extension bits
        │   ├── booth_pp_exact       exact selector cell
        │   ├── abe1_cell            ABE-1 cell
        │   └── abe2_cell            ABE-2 cell
        └── booth_pp_accumulator     approximate compressors + exact final adder
            └── approx_compressor42
    abm_pkg                          enc_e (ENC_EXACT / ENC_ABE1 / ENC_ABE2), default N and P

`approx_booth_multiplier` with `ENC = ENC_EXACT, APPROX_ARRAY = 0, APPROX_COMP = 0` is an exact
Booth multiplier. It is used by the tests as a baseline.

## Where this RTL makes its own choices

* **Meaning of P.** P is read as the number of low-order product columns approximated, both for
  the encoders and, in ABM3/ABM4, for the compressors. The close match of the NMED table supports
  this reading.
* **Compressor polarity.** The compressor is written for true-polarity dots with the equations
  above. Other readings with complemented signals were tried; a carry of P1P2 + P3P4, for
  instance, gives a composite-design NMED 33–43% below the published one at P = 12–14.
* **Compressor placement** (four rows per compressor, every column below P, first level only for
  N > 8) and the **exact reduction** (written as a multi-operand sum rather than a gate-level
  Dadda tree) are choices of this design.
* **Neg-bit logic** and the **sign-extension encoding** are the standard ones for radix-4 Booth;
  the exact configuration is checked against a·b for all 8-bit pairs.
* **Operand buffers** are registers with load enable and synchronous reset, and the valid flag
  is added; a clocked interface is not part of the multiplier itself.
* The analytical error model that predicts NMED from the error rates of the three approximate
  parts is not hardware and is not included; the testbenches measure NMED directly.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line. With
Verilator 5, from the repository root:

    verilator --binary --timing -Wno-fatal --top-module tb_abm_top \
        -y rtl -y tb +libext+.sv rtl/abm_pkg.sv tb/abm_ref_pkg.sv tb/tb_abm_top.sv
    ./obj_dir/Vtb_abm_top

Replace `tb_abm_top` by any other testbench name (`tb_abm_nmed`, `tb_abm16_nmed`,
`tb_approx_booth_multiplier`, `tb_booth_pp_array`, `tb_booth_pp_accumulator`,
`tb_booth_pp_exact`, `tb_abe1_cell`, `tb_abe2_cell`, `tb_approx_compressor42`,
`tb_operand_buffer`). Each runs in seconds.

| testbench | what it establishes |
|-----------|---------------------|
| tb_abm_top | full top at default parameters; 1-cycle latency, hold, all four products against the reference model; counts that every approximation (ABE-1, ABE-2, dropped Neg, compressor) actually changed a result |
| tb_abm_nmed | the 8-bit NMED table above, exhaustive |
| tb_abm16_nmed | 16-bit variants and exact configuration on random pairs |
| tb_approx_booth_multiplier | all four variants and the exact configuration, exhaustive 8-bit |
| tb_booth_pp_array | exact array sums to a·b; the dropped Neg bit costs 2<sup>N−2</sup> exactly in 3/8 of cases; approximate dots match |
| tb_booth_pp_accumulator | random dot matrices, with and without compressors |
| tb_abe1_cell, tb_abe2_cell | truth tables, flip counts (0/4 and 6/2 for 0→1/1→0) and the net error per entry |
| tb_booth_pp_exact, tb_approx_compressor42, tb_operand_buffer | cell-level exhaustive / random checks |

`tb/abm_ref_pkg.sv` is the reference model the testbenches compare against. It is written from
the Booth-digit arithmetic and the compressor's error pattern, not from the RTL gate equations.

To change the design point, set `N` and `P` on `abm_top` (or on `approx_booth_multiplier`);
`P` may be anything from 0 (exact encoders and compressors; only the dropped Neg bit remains) to
2N.
