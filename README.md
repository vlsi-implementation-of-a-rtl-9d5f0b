# Multiplier-free 8x8 DCT with a shared recursive CORDIC

This is a small 2-D discrete cosine transform (DCT) for JPEG-style image and
video encoders. It is meant for low-cost sensor nodes. It computes the
orthonormal 8x8 DCT

    Y = C X C^T,    C(m,n) = 1/2 c(m) cos(pi m (2n+1) / 16),  c(0) = 1/sqrt(2)

with no multipliers. It does this with three ideas:

* **Loeffler factorisation.** The 8-point transform is split into butterflies
  and three plane rotations: 3pi/8 in the even half, 3pi/16 and pi/16 in the
  odd half.
* **One recursive CORDIC for all three rotations.** One iterative
  shift-and-add CORDIC does all three rotations, one after the other. Each
  rotation takes 11 micro-rotations, and each micro-rotation passes through
  two registers in the feedback loop. The CORDIC has no angle accumulator:
  because the angles are constants, the sign of every micro-rotation comes
  from a small fixed table.
* **Sharing everywhere else.** Each constant factor is a short sum of powers
  of two, built once and time-shared:
  * the CORDIC gain correction, about 0.60725;
  * the output normalisation 1/(2 sqrt 2);
  * the 1/2 factors.

  One 1-D unit serves both the row pass and the column pass. A 64-word x
  12-bit transposition memory sits between the two passes.

Throughput is traded for area. The 1-D unit accepts one 8-point vector every
`6N+5` cycles, where N is the number of CORDIC iterations. An 8x8 block
therefore takes about 1145 cycles at N = 11, or about 11.5 us at 100 MHz.
That covers a 512x512 RGB image in about 141 ms. A build option with one
register in the CORDIC loop (`CORDIC_LOOP_REGS = 1`) brings this down to
about 665 cycles per block.

## Block structure

```
             in_row[0..7] ──►┐
                             ├─ 8 x 2:1 mux ─► dct1d ─┬─► transpose_mem (row pass)
 transpose_mem column ──────►┘      ▲                 └─► out_coef (column pass)
                                    └── phase: rows / columns
```

| module             | role |
|--------------------|------|
| `dct2d_top`        | Row/column sequencing, input multiplexers, routing of results |
| `dct1d`            | 8-point Loeffler DCT: butterflies, shared rotation unit, shared scaling |
| `cordic_recursive` | Iterative rotation-mode CORDIC, one micro-rotation per two clocks (per clock with `LOOP_REGS = 1`) |
| `cordic_scale`     | x * (2^-1 + 2^-3 - 2^-6) = 0.609375 x, the CORDIC gain correction |
| `scale_factor_1`   | x * (2^-2 + 2^-4 + 2^-5 + 2^-7 + 2^-9) = 0.353516 x, about 1/(2 sqrt 2) |
| `scale_factor_2`   | x * (2^-2 + 2^-4 + 2^-9 + 2^-10) = 0.315430 x, about 1/3.1694 (optional X2/X6 path) |
| `transpose_mem`    | 8x8 x 12-bit register array: writes a row, reads a column |
| `dct_pkg`          | Sizes, the angle enum and the rotation-direction table |

## The 1-D unit (`dct1d`)

With `a_k = x_k + x_(7-k)` and `d_k = x_k - x_(7-k)` for k = 0..3:

| stage | work |
|-------|------|
| 1-3   | Butterflies give `s0 = a0+a1+a2+a3`, `s4 = (a0+a3)-(a1+a2)`, `e0 = a0-a3`, `e1 = a1-a2`, and `d0..d3` unchanged. |
| 4     | The shared CORDIC rotates `(e0, e1)` by 3pi/8, `(d0, d3)` by 3pi/16, then `(d1, d2)` by pi/16. |
| 5-6   | The shared `cordic_scale` removes the CORDIC gain from the six results, one per clock. The results wait in six holding registers. |
| 7     | Odd butterflies. `(b7, b4)` is the 3pi/16 result and `(b6, b5)` is the pi/16 result. `X1' = (b7+b5)+(b4+b6)`, `X7' = (b7+b5)-(b4+b6)`, `X3' = b7-b5`, `X5' = b4-b6`. |
| 8-9   | `scale_factor_1` is shared by X0 (`s0`), X4 (`s4`), X1' and X7'. X3' and X5' are halved by a shift. X2 and X6 are the y and x outputs of the 3pi/8 rotation, halved. Outputs are rounded to nearest and saturated to 12 bits. |

Why these factors are right: for N = 8 the orthonormal DCT is 1/(2 sqrt 2)
times Loeffler's scaled outputs. Loeffler's X3 and X5 carry an extra sqrt 2,
so they only need 1/2. The even rotation is a true rotation once the CORDIC
gain is removed, so it needs 1/2 as well.

Internally, words are `DATA_W + 6` integer bits plus `FRAC` (default 6)
fraction bits: 24 bits in total. Every shift is arithmetic and truncates.

**Rotation-direction table** (`dct_pkg`, iterations 0 to 10):

| angle  | sigma_0 .. sigma_10 | angle reached |
|--------|---------------------|---------------|
| 3pi/8  | + + - + + - + + - - + | 67.50 deg |
| 3pi/16 | + - + + - - - + - + + | 33.73 deg |
| pi/16  | + - - + - + + + + - + | 11.25 deg |

The CORDIC step is `x' = x - sigma 2^-i y` and `y' = y + sigma 2^-i x`. The
result is the rotated vector times the gain prod sqrt(1 + 2^-2i), which is
1.64676 after 11 steps.

### The X2/X6 scaling and `EVEN_SF2`

The reference structure routes X2 and X6 through a second shift-add
constant, 1/3.1694, after the CORDIC gain correction. Done literally, that
would give X2 and X6 only 63 % of their true value. Without the gain
correction they would be 3.9 % high. So by default (`EVEN_SF2 = 0`) X2 and
X6 are gain-corrected and halved, which is exact up to the 0.35 % error of
the 0.609375 gain constant.

`EVEN_SF2 = 1` reads the 1/3.1694 unit as a combined "1/(2 x gain)" factor:
the 3pi/8 outputs skip `cordic_scale` and go through `scale_factor_2`. This
is kept so the alternative can be compared. Expect X2 and X6 about 4 % high.

### Timing

For N iterations (`iter_num`, 1 to 11; 11 is the nominal setting):

| quantity | default, two loop registers | N = 11 | `CORDIC_LOOP_REGS = 1` | N = 11 |
|----------|------------------|--------|------------------|--------|
| One rotation, start to done | 2N | 22 | N+1 | 12 |
| 1-D latency, from input handshake to `out_valid` | 6N+13 | 79 | 3N+16 | 49 |
| 1-D issue interval (the rotation unit is the bottleneck) | 6N+5 | 71 | 3N+8 | 41 |
| One isolated 8x8 block, first row to last column | 2((6N+13)+7(6N+5))+1 | 1153 | 2((3N+16)+7(3N+8))+1 | 673 |
| Streamed blocks, because the next block's rows overlap the previous block's columns | about 16(6N+5)+9 | 1145 | about 16(3N+8)+9 | 665 |

The CORDIC loop is the mechanism behind the first row. The input
multiplexers choose either new operands or the fed-back result and load a
register pair. The shift-and-add stage writes a second register pair, which
feeds back to the multiplexers. One micro-rotation therefore costs two clocks.
With `CORDIC_LOOP_REGS = 1` the adders write straight back into the single
register pair, and one micro-rotation costs one clock. The path between
registers grows only by the input multiplexer, so the option nearly halves
the cycle count for about the same clock rate. Both structures compute the
same values.

`iter_num` is a run-time trade of accuracy against speed. Change it only
between blocks.

## Interfaces

`dct2d_top` (parameters `DATA_W = 12`, `FRAC = 6`, `CORDIC_LOOP_REGS = 2`):

* `in_valid` / `in_ready` / `in_row[0:7]`: one row of a block per handshake,
  rows 0 to 7 in order. Samples are signed 12-bit. For JPEG they are pixels
  minus 128.
* `out_valid` / `out_ready` / `out_coef[0:7]` / `out_col`: one column of Y
  per handshake (`out_coef[k] = Y[k][out_col]`), columns 0 to 7 in order.
  The column is held until `out_ready` is high.
* `iter_num[3:0]`: CORDIC iterations.
* `rst_n`: active-low asynchronous reset. It clears control state only.

`dct1d` uses the same handshake for 8-point vectors and also carries a
`TAG_W`-bit sideband. The top uses the tag to tell row results (which go to
the memory) from column results (which go to the output).

## Accuracy

These figures come from simulation against floating-point references:

* **1-D.** Every output is within 2 LSB + 0.6 % of the vector's largest
  coefficient.
* **2-D.** Every coefficient is within 3 LSB + 1 % of the block's largest
  coefficient. Most of this budget is the 0.35 % error of the shift-add
  gain constant, applied twice.
* **Image level.** `tb_dct2d_image` codes synthetic 512x512 and 768x512 RGB
  pictures as baseline JPEG does: transform, quantise with the standard
  luminance table, then reconstruct. The hardware transform loses 0.011 to
  0.012 dB of PSNR against an exact DCT. The pictures are made from smooth
  gradients, texture and noise, because no photographs are used.

## Where this RTL departs from, or adds to, the reference structure

* **X2/X6 factor:** see `EVEN_SF2` above. The default follows the DCT
  definition, not the 1/3.1694 routing.
* **CORDIC loop:** the default follows the reference loop, with a register
  before and after the adders. `CORDIC_LOOP_REGS = 1` is an addition of this
  RTL. It keeps one register in the loop.
* **Result path:** the final coefficients leave straight from the 1-D unit
  during the column pass. They are not read back out of the transposition
  memory.
* **Choices of this RTL:** the handshakes, the reset, the word length,
  rounding and saturation, the rotation order and the pass sequencing.
  The reference structure does not specify them.
* **Not included:** the quantiser, zig-zag scan and Huffman coder of a full
  JPEG encoder. This block feeds them.

## Simulating

Each testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dct_pkg.sv tb/tb_dct2d_top.sv \
          --top-module tb_dct2d_top -Mdir obj_top && obj_top/Vtb_dct2d_top
```

Verilator finds the other modules through `-Irtl`, because each module is in
`rtl/<module>.sv`.

| testbench             | what it covers |
|-----------------------|----------------|
| `tb_scale_factor_1`, `tb_scale_factor_2`, `tb_cordic_scale` | Shift-add constants against x·c, one-cycle latency |
| `tb_cordic_recursive` | All three angles and 1 to 11 iterations against a floating-point model of the table; done timing; back-to-back starts; both loop structures |
| `tb_transpose_mem`    | Row writes, column reads, write enable |
| `tb_dct1d`            | Streaming, latency and interval, random gaps and back-pressure, `iter_num = 6`, saturation, and an `EVEN_SF2 = 1` instance |
| `tb_dct2d_top`        | End to end at default parameters. Checks values, column order and block timing. Counts each mechanism: row pass, column pass, input stalls, output back-pressure, overlap of consecutive blocks and the reduced-iteration mode |
| `tb_dct2d_loop1`      | End to end as above, with `CORDIC_LOOP_REGS = 1` and its 673-cycle block time |
| `tb_dct2d_image`      | The image-level workload above. It takes about a minute |
