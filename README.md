# DA-based 8x8 2-D DCT with an error-compensated adder tree

This is a multiplier-free 8x8 two-dimensional discrete cosine transform (DCT) core. It takes
one row of eight 9-bit samples per clock. It puts out one vector of eight 12-bit DCT
coefficients per clock, 10 clocks after the first row of a block.

Every constant multiplication is done with distributed arithmetic (DA). Each cosine
coefficient is a 9-bit binary fraction. A product `sum_i C_i * x_i` is then
`sum_j 2^-j * y_j`, where the DA word `y_j` is the sum of the inputs whose coefficient has bit
`j` set. Forming the words takes only adders. A plain DA design then adds the shifted words
serially, one per clock. Here all nine words are added at once in an **error-compensated
adder tree (ECAT)**:

- only the bits that land in the kept part of the result are added;
- the carry that the dropped low bits would have produced is estimated by a small
  compensation circuit.

This keeps the tree small and gives about the accuracy of full-precision rounding. That in
turn allows 9-bit coefficients where 12 to 13 bits are usual.

The RTL follows a published design: a DA-based DCT with an error-compensated adder tree. What
comes from that design and what is an implementation choice is marked below and in each
file's header.

## Block structure

```
 X0..X7 (9b) --> dct1d (row pass) --12b--> transpose_buffer --12b--> dct1d (column pass) --> sat --> Z0..Z7 (12b)
                  |                          8x8 x 12b regs             15-bit words
                  +-- da_butterfly_matrix --> 8 x ecat
                        butterflies (12 add/sub)   each: ecat_comp + adder tree
                        dae (A0,A1 -> Z0,Z4)
                        dae (B0,B1 -> Z2,Z6)
                        dao (b0..b3 -> Z1,Z3,Z5,Z7)
```

| module | what it is |
|---|---|
| `dct_pkg` | widths, DA precision, coefficient generator `coef()`, DA bit selector `coef_bit()`, odd-part coefficient map |
| `dct2d_top` | the 2-D core: row pass, transpose buffer, column pass, output saturation, valid/column flags |
| `dct1d` | 8-point 1-D DCT: `da_butterfly_matrix`, then eight `ecat`s; output register (latency 1) |
| `da_butterfly_matrix` | two butterfly stages, two `dae`, one `dao`: delivers the 9 DA words of every output |
| `dae` | DA element for a 2x2 matrix: one adder (u0+u1) plus bit-wise word selection |
| `dao` | DA element for the 4x4 odd matrix: shared pair and triple sums plus word selection |
| `ecat` | error-compensated adder tree for Q words of P bits |
| `ecat_comp` | compensation bias sigma from the Q first-dropped-column bits |
| `transpose_buffer` | single 8x8 register array with alternating row/column addressing |

## The error-compensated adder tree

This is the part of the design that takes the most explaining.

`ecat #(P, Q)` receives Q signed P-bit words `y_0 .. y_(Q-1)`; word `j` carries weight
`2^-j`. It returns the P-bit value nearest to

    Y = 1/2 * sum_j y_j * 2^-j

Place the words on a grid of P result columns followed by Q fraction columns. Word `j` is
shifted right by `j+1` places; word 0 also moves one place, which gives one bit of headroom.
Word `j` then splits into three parts:

| part | bits of word `j` | handled by |
|---|---|---|
| main part (MP) | upper `P-1-j` bits, i.e. `y_j >>> (j+1)` | added exactly by the tree |
| TP_major | bit `j`, weight 1/2 LSB | one bit per word, all in the first dropped column |
| TP_minor | bits `j-1 .. 0`, weights 1/4, 1/8, ... | never added |

Only the Q main parts and a bias `sigma` go into the adder tree. `sigma` stands in for the
rounded value of everything that was dropped:

    sigma = Round(TP_major + E[TP_minor]),   TP_major = S/2,   S = number of ones among the Q TP_major bits
    E[TP_minor] = (Q - 2 + 2^(1-Q)) / 4      (all dropped bits equally likely 0 or 1)

TP_major is known exactly, since it is a popcount of Q bits. TP_minor is replaced by its mean.
Because S/2 is a multiple of 1/2, the rounding reduces to three cases (k = Q/4):

| Q | sigma |
|---|---|
| 0..3 | `(S + 1) >> 1` |
| 4k, 4k+1 | `k + (S >> 1)` |
| 4k+2, 4k+3 | `k + ((S + 1) >> 1)` |

For the DCT setting (Q = 9) this gives `sigma = 2 + (S >> 1)`, at most 6, so 3 bits.

**Departure.** The source prints the last case as `(k-1) + Round(S/2)`. Its own error table
contradicts that formula: the formula would allow a maximum error of 2.016 LSB at
(P,Q) = (12,6), while the table gives 1.5. The mean of TP_minor also gives `k`. So `k` is
used. With it, a random-word test reproduces the published statistics:

| (P,Q) | mean abs error, measured | published | mse, measured | published | max abs bound |
|---|---|---|---|---|---|
| (12,3) | 0.2655 | 0.2656 | 0.1007 | 0.1016 | 0.625 |
| (12,6) | 0.3775 | 0.3789 | 0.2171 | 0.2184 | 1.5 |
| (12,9) | 0.3780 | 0.3804 | 0.2209 | 0.2222 | 2.002 |
| (12,12) | 0.4758 | 0.4738 | 0.3500 | 0.3472 | 3.0 |
| (8,6) | - | - | 0.2227 | 0.218 | 1.5 |

For comparison, plain truncation of the same words has a mean error of 2.51 LSB at (12,6).

**Structured data.** The estimate of TP_minor assumes random low bits. When the dropped bits
are all zero, for example when every DA word is 0 as for the AC terms of a flat row, the tree
still adds `sigma = 2` (Q = 9). That is within the scheme's worst-case bound, but it is a
systematic offset. In the 2-D core a perfectly flat block therefore shows about +7 LSB on the
first-row coefficients F(0,v), v > 0. On mixed image-like and random test blocks the
2-D mean absolute error is about 1.4 LSB, the largest error about 9 LSB, and the
coefficient-domain PSNR about 42.7 dB (peak 255).

`ecat_comp` computes the popcount behaviourally; synthesis turns it into a small full/half-adder
counter. The adder tree in `ecat` has a fixed shape. `sigma` is added to the narrowest shifted
word, and for even Q then to the next one. The remaining words are added in pairs (`y0+y1`,
`y2+y3`, ...). The pair sums are then folded into the running sum one by one, narrowest pair
first. Each adder is one bit wider than its wider operand, capped at P, so the low-weight words
use short adders. At (P,Q) = (12,6) the adders are 7, 8, 10, 12, 11 and 12 bits wide, as in the
original 12-bit, six-word example. Other Q use the same rule.

## The 1-D DCT datapath

`dct1d` computes the orthonormal 8-point DCT

    Z_n = 1/2 * c_n * sum_m x_m cos((2m+1) n pi / 16),  c_0 = 1/sqrt(2), c_n = 1 otherwise

The 1/2 is the adder tree's built-in halving. `c_0` is folded into the DC coefficient `C4`.

1. First butterfly: `a_i = x_i + x_(7-i)`, `b_i = x_i - x_(7-i)`.
2. Second butterfly on the even half: `A0 = a0 + a3`, `A1 = a1 + a2`, `B0 = a0 - a3`,
   `B1 = a1 - a2`. Together with step 1 that is 12 adders/subtractors.
3. DA elements, with the truncated 9-bit coefficients `Ck = floor(256 cos(k pi / 16))` =
   251, 236, 212, 181, 142, 97, 49 for k = 1..7:
   - `[Z0 Z4] = [[C4 C4] [C4 -C4]] [A0 A1]` and `[Z2 Z6] = [[C2 C6] [C6 -C2]] [B0 B1]` each
     use a `dae` with one adder.
   - `[Z1 Z3 Z5 Z7]` come from `b0..b3` through the `dao`, with rows
     `C1 C3 C5 C7 / C3 -C7 -C1 -C5 / C5 -C1 C7 C3 / C7 -C5 C3 -C1`.
4. The coefficient bit 0 has weight -1. The DA elements negate word 0, so the ECATs only add.
5. Eight ECATs (P = WI + 3, Q = 9) run side by side. The outputs are registered.

The 9-bit coefficients have this bit layout for the DC row (C4 = 181 = 0.10110101b):

| weight | -2^0 | 2^-1 | 2^-2 | 2^-3 | 2^-4 | 2^-5 | 2^-6 | 2^-7 | 2^-8 |
|---|---|---|---|---|---|---|---|---|---|
| Z0 word | 0 | A0+A1 | 0 | A0+A1 | A0+A1 | 0 | A0+A1 | 0 | A0+A1 |
| Z4 word | -A1 | A0 | A1 | A0 | A0 | A1 | A0 | A1 | A0+A1 |

The source does not say how the coefficients were quantised; its DC table fixes only C4 = 181.
Truncation is used because it matches the adder count the source gives for the odd element.
The truncated odd rows need exactly nine different input sums: six pairs and three triples
(`b0+b1+b2`, `b0+b1+b3`, `b1+b2+b3`), each triple reusing a pair. Rounding would need a fourth
triple. The total is 12 + 1 + 1 + 9 = 23 adders per 1-D DCT and 46 for the 2-D core, the
published figures. Truncation costs some accuracy: rounded coefficients would give about 0.2
LSB less mean error in the 2-D result. `dct_pkg::coef()` is the single place to change this.

Word width: the DA words are `P = WI + 3` bits, enough for the sum of eight inputs. For the
9-bit row pass this is the 12-bit internal word length of the source. The column pass reads
12-bit words from the transpose buffer and so runs with 15-bit words. The source does not give
the column-pass width.

## The 2-D core and its timing

`dct2d_top` streams with no valid input and no stall. Block `k` occupies the 8 input clocks
starting `8k` clocks after the first clock with `RST` low. Row `r` of the block is on
`X0..X7` in clock `8k + r`.

- **Row pass.** Clock 0 presents a row. The registered row-pass result holds it in clock 1.
- **Transpose buffer.** It is one 8x8 array of 12-bit registers. In every clock one line is
  read and the incoming vector is written into the same line. A line is a row while
  `mode = 0` and a column while `mode = 1`; the mode flips every 8 clocks. A block that was
  written as rows is read out as columns while the next block is written into those columns,
  and that block is later read out as rows. No second buffer is needed, and data always leave
  transposed. The reset of the buffer is `RST` delayed by one clock, so that its line counter
  lines up with the registered row pass.
- **Column pass.** The first column of block `k` is read in clock `8k + 9`. The registered
  column result appears in clock `8k + 10`: **latency 10 clocks**, the figure the source gives.

Outputs:

- `Z_VALID` goes high with the first output vector and stays high.
- `Z_COL` = t says which vector this is: `Zu = F(u, t)`. Here `u` is the vertical frequency
  (across rows) and `t` the horizontal one (along a row).
- `F(u,v) = 1/4 c_u c_v sum_x sum_y f(x,y) cos((2x+1) u pi/16) cos((2y+1) v pi/16)`.

The 15-bit column result is saturated to 12 bits. With 9-bit inputs the ideal range is
-2048..2040. The extreme blocks tested (all -256, all +255, checkerboards, half-planes) stay
within -2041..2042, so the saturation is a guard that normal inputs do not reach.

| port | dir | width | meaning |
|---|---|---|---|
| `CLK` | in | 1 | clock |
| `RST` | in | 1 | synchronous, active high; clears the pipeline registers and the buffer |
| `X0..X7` | in | 9 signed | one row of a block per clock |
| `Z0..Z7` | out | 12 signed | one column of the 2-D DCT per clock |
| `Z_VALID` | out | 1 | `Z0..Z7` valid |
| `Z_COL` | out | 3 | horizontal frequency index of the current vector |

Throughput is 8 samples per clock. A 1080p60 stream (124.4 Msamples/s) needs a 15.6 MHz clock.
The source reports 125 MHz in a 0.18 um process. No clock rate was checked for this RTL.

## Where this RTL departs from the source design

- Compensation case `Q mod 4 in {2,3}` uses `k`, not `k-1` (see above).
- The coefficients are truncated. This is inferred from the adder count; the source does not
  say how they were quantised.
- The column-pass word width (15 bits) and the final saturation are implementation choices.
- `Z_VALID` and `Z_COL` are additions. So is the delayed reset of the transpose buffer.
- The transpose buffer organisation is this implementation's own. The source gives only the
  word length and the overall latency.
- The hand-built full/half-adder compensation circuit is replaced by a behavioural popcount
  that computes the same bias.
- The adder-tree shape is only given for (P,Q) = (12,6). The shape used at Q = 9 is this
  design's extension of the same rule.
- Gate counts, clock rate, power and layout figures are not reproduced.

## Simulating

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dct_pkg.sv tb/tb_dct2d_top.sv \
          --top-module tb_dct2d_top && ./obj_dir/Vtb_dct2d_top
```

Replace `tb_dct2d_top` by any of the other testbenches:

| testbench | what it checks |
|---|---|
| `tb_dct2d_top` | 40 streamed blocks at default size against a floating-point 2-D DCT (per-coefficient error bound worked out from the inputs, mean <= 2 LSB, PSNR >= 40 dB); 10-clock latency, continuous output, both transpose modes, restart after a reset in mid-stream |
| `tb_dct1d` | row-pass (9-bit) and column-pass (12-bit) 1-D DCT; bit-level bound against exact DA sums and the real DCT; 1-clock latency |
| `tb_da_butterfly_matrix` | DA words recombine exactly to `sum K(n,m) x_m` |
| `tb_dae`, `tb_dao` | DA words of each element recombine exactly to the integer products |
| `tb_ecat` | per-sample error bounds and the error statistics in the table above, five (P,Q) settings |
| `tb_ecat_comp` | every TP_major pattern for Q = 3, 4, 6, 9, 12 against `Round(S/2 + E[TP_minor])` |
| `tb_transpose_buffer` | six streamed blocks come out transposed, with `rd_valid` and line-index timing |

## Changing the design

- **DA precision.** `dct_pkg::DA_Q` sets the coefficient precision. The coefficients are
  computed at elaboration as `floor(cos(k pi/16) * 2^(DA_Q-1))`, so no table needs editing.
  `ecat` and `ecat_comp` follow `Q` automatically.
- **Widths.** `IN_W`, `TB_W` and `OUT_W` in `dct_pkg` set the sample, buffer and output widths.
  `dct1d` derives its word width as input width + 3.
- **Other matrices.** `dae` takes any 2x2 matrix as signed cosine indices (`K00..K11`). `dao`
  has the odd DCT matrix built in through `dct_pkg::odd_k`. Its output words must be wide
  enough for the sums it forms; see its header.
