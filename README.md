# Fixed-width modified Booth multiplier with sorting-network error compensation

An N x N multiplier whose result is only N bits wide: the upper half of the
2N-bit product of two's complement operands, as lossy datapaths such as filters
and image processing keep it. A fixed-width multiplier saves area by not
building the low columns of the partial product matrix. Dropping them outright
(direct truncation) biases the result by up to several LSBs. This design keeps
almost all the savings and brings the error close to that of a full multiplier
that is rounded afterwards (post-truncation). It does so with three small
pieces of logic:

1. **Exact folding of two low bits (lambda / omega).** Two bits from the
   dropped region are moved up exactly, so fewer bits remain to be estimated.
2. **A data-dependent carry estimate (SC-generator).** The carry that the
   dropped columns would have produced is estimated from the number of
   non-zero Booth digits. A bit-sorting network counts those digits.
3. **Keeping column N-1.** That column is summed with the rest, but only its
   carries reach the output.

The RTL follows the structure of the published 8 x 8 design "Area Efficient
Fixed Width Modified Booth Multiplier". It is written so that any even N >= 4
elaborates the same way. The default is N = 8.

## The partial product matrix

Radix-4 (modified) Booth encoding turns the multiplier B into N/2 digits
d_j in {-2,-1,0,+1,+2}. Digit j is taken from bits b(2j+1) b(2j) b(2j-1),
with b(-1) = 0. Row j is d_j * A, shifted left by 2j. Each row is N+1 bits
wide: p(j,0..N-1) plus the sign s_j. A negative row is stored as the one's
complement of |d_j|*A. Its "+1" is a separate correction bit c_j, placed at
column 2j. Sign extension uses the usual trick: row 0 carries ~s0 s0 s0 above
its MSB, and every later row carries ~s_j followed by a constant 1. Those
constants add up to 2^(2N), so they vanish modulo 2^(2N).

For N = 8, only columns 7 to 15 are built; the dots are the dropped bits,
including c0..c2, the correction bits of rows 0..2, and the pre-added last-row LSB.
Column 7 (N-1), between the bars, is summed, but its sum bit is thrown away:

```
position    15   14   13   12   11   10    9    8 |    7 |    6    5    4    3    2    1    0
row 0                                w2   w1   w0 |  p07 |    .    .    .    .    .    .    .
row 1                            1  ~s1  p17  p16 |  p15 |    .    .    .    .    .    .    .
row 2                  1  ~s2  p27  p26  p25  p24 |  p23 |    .    .    .    .    .    .    .
row 3        1  ~s3  p37  p36  p35  p34  p33  p32 |  p31 |    .    .    .    .    .    .    .
                                                  |   ~l |
                                                  |   a1 |
result     P15  P14  P13  P12  P11  P10   P9   P8 |      |
```

Here `~l` is lambda-bar, `w2 w1 w0` are the omega bits and `a1` is the single
compensation bit for N = 8.

### Lambda and omega (`error_comp_fun`)

The last row's LSB p(N/2-1,0) and its correction bit c(N/2-1) both sit in
column N-2. Adding them in advance gives a sum epsilon, which is dropped, and
a carry lambda at column N-1. A post-truncated multiplier adds a rounding 1 at
column N-1. Adding that 1 to lambda leaves ~lambda in column N-1 and a carry
lambda into column N. That carry is absorbed into row 0's sign bits:
{omega2, omega1, omega0} = {~s0, s0, s0} + lambda. This sum never overflows.
In gates:

```
epsilon = a0 & o(N/2-1)
lambda  = ~epsilon & ~z(N/2-1) & b(N-1)
omega0  = s0 ^ lambda,   omega1 = s0 & ~lambda,   omega2 = ~omega1
```

These steps are exact. The only approximation in the design is the estimate
of the carry out of the remaining dropped bits.

### The carry estimate (`sc_generator`, `oem_sorter`)

A zero digit contributes nothing to the dropped columns. The average dropped
value therefore grows with k, the number of non-zero digits. The design adds
I = floor((k-1)/2) at column N-1 (0 for k <= 1). That is half an output LSB
for each unit of I, on top of the ~lambda and rounding terms.

Counting k with adders is avoided. The N/2 flags ~z_j go through an odd-even
merge sorting network. On single bits, each compare-exchange is just an OR
(the larger value, moved to the lower index) and an AND. After sorting,
beta[i] = 1 exactly when more than i digits are non-zero. So the compensation
bits are simply alpha_i = beta[2i] for i = 1..m, with m = floor((N/2-1)/2).
Their sum is I. For N = 8 there is one bit, alpha_1 = (k >= 3). Only the
cone of the sorter that drives beta[2], beta[4], ... is kept in synthesis.
For N = 8 that cone is seven gates.

When N/2 is not a power of two, the sorter is padded with constant-zero
inputs. This makes sizes such as N = 12 work.

### Summation (`add_tree`)

All retained bits go into a Dadda tree of full and half adders. The stage
heights are 2, 3, 4, 6, 9, and so on. At each stage, every column gets just
enough adders to fall to the target height. A final carry-propagate adder,
written as `+`, sums the last two rows. The placement is not written by hand.
`fwb_pkg` lists which bits each column holds and in what order (`present`,
`slot`, `col_height`). It also replays the Dadda schedule at elaboration
(`dadda_info`), so the generate loops in `add_tree` place every cell. For
N = 8, the column heights from position 7 upward are
6,4,4,4,3,2,2,1,1. The tree has 3 stages with 10 full adders and 6 half
adders.

## Accuracy

Measured over all 65,536 operand pairs at N = 8, comparing the signed result
with the exact product / 2^8:

| metric | value (output LSBs) |
| --- | --- |
| mean error | -0.0078 |
| mean-square error | 0.137 |
| largest error | 1.17 |

At N = 12 and N = 16 (random operands) the mean error is about +0.02 LSB and
the mean-square error 0.13 to 0.15. The average dropped value for each
pattern of non-zero digits matches the published 8-bit table to within 0.001.
The end-to-end testbench checks this.

## Module hierarchy and interfaces

| module | role |
| --- | --- |
| `fw_booth_mult` | top: `a`, `b` (N bits in), `p` (N bits out), parameter `N` (default 8) |
| `pp_row` | one partial product row: its own `booth_encoder` plus N bit generators `p = o&(a_k^n) \| t&(a_(k-1)^n)` and the sign bit |
| `booth_encoder` | triplet to `{n, t, o, z, c}` (`fwb_pkg::booth_enc_t`) |
| `error_comp_fun` | lambda-bar and omega |
| `sc_generator` | compensation bits alpha from the zero flags |
| `oem_sorter` | odd-even merge bit sorter, parameter `W` (power of two) |
| `add_tree` | Dadda tree plus final adder; `full_adder`, `half_adder` cells |
| `fwb_pkg` | encoder struct, matrix layout and Dadda schedule functions |

Everything is combinational. There is no clock, register or handshake; `p`
follows `a` and `b` after the gate delay. A pipelined version would need
registers at the caller's choice of stage.

`pp_row` produces all N bits of a row. The top connects only the bits in
retained columns, and synthesis removes the generators of the others. The
published design builds the retained bits only; after synthesis the result is
the same.

## Departures from the published design, and choices made here

- Gate-level drawings of the encoder, the bit generator, the lambda/omega
  logic and the sorter were turned into Boolean equations. The functions are
  the published ones; the exact gate mix is left to synthesis.
- The omega equations follow the published truth table, which is also what
  adding lambda to ~s0 s0 s0 gives. Epsilon is `a0 & o` of the last digit.
- The compensation is I = floor((k-1)/2), following alpha_i = beta[2i].
- The published design builds its full adder as an 11-transistor GDI cell and
  its XOR as a 6-transistor transmission-gate cell, and lays both out by hand.
  None of that can be expressed in RTL. Here they are plain logic.
- The published component count lists 17 full and 3 half adders for the
  whole 8-bit multiplier. This RTL's tree has 10 full and 6 half adders plus
  an 8-bit carry-propagate adder. It feeds the sign-extension constants in as
  ordinary inputs and lets synthesis fold them. The published tree evidently
  merged them by hand in a way that is not described.
- The final adder and the Dadda schedule are standard choices. The published
  design names a Dadda tree without detailing it.
- Generalisation beyond N = 8 (the same construction, with a padded sorter)
  is this design's extension. The published design treats N = 8, and shows
  the sorter for 16 bits.

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/fwb_pkg.sv tb/fwb_ref_pkg.sv \
    tb/tb_fw_booth_mult.sv --top-module tb_fw_booth_mult
./obj_dir/Vtb_fw_booth_mult
```

| testbench | what it covers |
| --- | --- |
| `tb_fw_booth_mult` | top at N = 8, all 65,536 operand pairs, mechanism coverage (lambda, all four omega cases, every compensation value, zero / negative / 2A digits), error statistics, per-pattern dropped-value averages |
| `tb_fw_booth_mult_sizes` | top at N = 4 (exhaustive), N = 12 and N = 16 (100,000 operand pairs each, corner values included) |
| `tb_booth_encoder`, `tb_pp_row`, `tb_error_comp_fun`, `tb_oem_sorter`, `tb_sc_generator`, `tb_full_adder`, `tb_add_tree` | each block on its own, exhaustively where the input space allows |

`tb/fwb_ref_pkg.sv` is the reference model. It works only from the arithmetic
of the digits and rows, not from the circuit. Expected output:

```
floor((A*B + 2^(N-1)*(1 + I) - Smin) / 2^N) mod 2^N
```

Here Smin is the value of every bit below column N-1, with the last row's LSB
and correction bit counted only as their sum bit. The model supports N up to
30.

To change the width, set `N` on `fw_booth_mult`. It must be even and at
least 4.
