# Fixed-kernel 2D convolvers, specialised at elaboration

A 2D convolver that is built for one known kernel can be far smaller than a
general one. A coefficient of zero needs no multiplier and no adder input; a
coefficient of plus or minus a power of two needs only wiring (a shift) and
possibly a negation; equal coefficients next to each other in a row can share
one product over time; and a kernel that factors into a column vector times a
row vector can be computed in two 1D passes with 2m instead of m*m
coefficient units.

This RTL applies all of these decisions automatically. The kernel is a
parameter (an array of integers, i.e. already quantised fixed-point
coefficients); constant functions examine it during elaboration and generate
exactly the units it needs. Change the kernel parameter and a different,
equally specialised convolver comes out.

## Datapath

```
            window (ROWS x COLS pixels, one per clock)
                 |
   +-------------v--------------+      +----------------------------+
   | mult_array                 |      | adder_tree                 |
   |  per kernel position:      | NZ   |  ceil(log2 NZ) levels,     |
   |   0      -> nothing        |----->|  a register after each     |----> res
   |   +-2^n  -> shift (+neg)   | prod |  level; an odd value is    |
   |   other  -> const multiply |      |  carried to the next level |
   |   equal right neighbour    |      +----------------------------+
   |          -> reuse register |
   |  one register stage        |
   +----------------------------+
```

`conv2d_direct` is this parallel architecture. `NZ` is the number of non-zero
coefficients; the adder tree has exactly `NZ` inputs, so zero positions shrink
it as well as the multiplier array.

### How each kernel position is classified

| coefficient            | hardware                               | adder-tree input |
|------------------------|----------------------------------------|------------------|
| 0                      | none                                   | no               |
| +1, +2, +4, ...        | `x <<< n`                              | yes              |
| -1, -2, -4, ...        | `-(x <<< n)`                           | yes              |
| anything else          | `x * C` (synthesis builds shift-add terms or uses a hard multiplier) | yes |
| equal to its right neighbour (with `PRECOMP`) | a register loaded from the neighbour's product register | yes |

For example the 3x3 Sobel kernel `[-1 0 1; -2 0 2; -1 0 1]` becomes six shift
units, no multiplier and a six-input adder tree; the 5x5 Gaussian
`[1 4 7 4 1; 4 16 26 16 4; 7 26 41 26 7; ...]` (scale 1/273) becomes 16 shift
units and 9 constant multipliers (for 7, 26 and 41).

### Pre-computed products (the subtle part)

With `PRECOMP = 1`, a position whose coefficient equals the one to its right
gets no unit at all. The reasoning: in a sliding window every pixel moves one
column to the left per beat, so the pixel now at column `c` was at column
`c+1` one beat ago, where it was multiplied by the same coefficient. That
product is still in the product register of column `c+1`; position `c` simply
copies it on the next valid beat. A run of equal coefficients becomes a chain
of registers fed by one unit at its right end.

This is only correct under a contract on the input stream:

* every valid window is the previous valid window shifted left by one column,
  with the new column entering at index `COLS-1`, and
* after reset the stream starts from an all-zero window (the product
  registers are cleared by reset, which matches it).

A column shift register cleared at reset, as in any line-buffer front end,
delivers exactly this, including across the jump from one band of rows to the
next. Windows that do not slide this way (unrelated windows, a restart without
reset) need `PRECOMP = 0`. Only horizontal repeats are shared; vertical
repeats would need a window that slides vertically per beat.

### Separable kernels

`conv_sep` takes one pixel column per beat. A vertical `M x 1` convolver
reduces the column to one value, a shift register keeps the last `M` of these,
and a horizontal `1 x M` convolver weights them. Both passes are
`conv2d_direct` instances, so they get zero skipping, shift units and
pipelined adder trees too. The shift register always slides by one and is
cleared at reset, so the horizontal pass always uses pre-computed products.
Per output this needs `2M` coefficient positions and `2(M-1)` adders, against
`M*M` and `M*M-1` for the parallel form (10 and 8 instead of 25 and 24 for
5x5; 38 and 36 instead of 361 and 360 for 19x19).

## Numbers and widths

* Pixels are unsigned, 8 bits by default (`IN_W`/`PIX_W`).
* All internal arithmetic is signed and uses one width, the smallest that can
  hold the largest possible result: `max|input| * sum(|coefficient|)` plus a
  sign bit, computed at elaboration. Nothing overflows inside, so products and
  partial sums are exact.
* The result is that exact sum, sign-extended to `OUT_W` (32 by default; an
  elaboration error fires if `OUT_W` is too small). No rounding or rescaling
  is done: with the Gaussian scaled by 273 the result is 273 times the
  normalised filter output. Divide or shift outside if a pixel is wanted.
* The kernel is applied as written, element by element with the window (the
  usual image-processing correlation); flip it to get textbook convolution.
  The symmetric kernels used here are unaffected.

Quantised Gaussians in `conv_pkg` follow `floor(g / g_max * (2^N - 1))`, so
the largest coefficient is `2^N - 1` (65535 for 16 bits, 255 for 8 bits).

## Timing

| block           | latency (clocks from input valid to output valid)        |
|-----------------|-----------------------------------------------------------|
| `mult_array`    | 1                                                         |
| `adder_tree`    | `ceil(log2 N)` (a wire when `N = 1`)                      |
| `conv2d_direct` | `1 + ceil(log2 NZ)`; 6 for the 5x5 Gaussian               |
| `conv_sep`      | `(1 + ceil(log2 NZ_V)) + 1 + (1 + ceil(log2 NZ_H))`; 8 for 5x5 Sobel |

Every block accepts one input per clock and has no back-pressure; a valid bit
travels with the data and idle beats are allowed anywhere. The clock period is
set by one constant multiplier or one adder, whatever the kernel size. Reset
(`rst_n`) is active low and synchronous.

## Top level: `conv_gen_top`

Two generated convolvers side by side, each with its own ports:

* `u_2d`: `conv2d_direct` with the 5x5 Gaussian, scale 1/273
  (`win_valid`, `win[25]` row-major with column 4 newest, `res2d_valid`,
  `res2d`). `PRECOMP_2D = 1`, so the window stream must follow the contract
  above (with this kernel no two horizontal neighbours are equal, so it does
  not matter in practice, but it does for other kernels).
* `u_sep`: `conv_sep` with the 5x5 Sobel y kernel
  `[2 2 4 2 2; 1 1 2 1 1; 0 0 0 0 0; -1 -1 -2 -1 -1; -2 -2 -4 -2 -2]`,
  factored as `[2 1 0 -1 -2]^T x [1 1 2 1 1]` (`col_valid`, `col[5]` with
  `col[0]` the top row, `ressep_valid`, `ressep`). The vertical pass skips its
  zero tap and uses only shifts; in the horizontal pass two of the five
  products are shared registers.

There is no line buffer: the design starts where a window (or column) of
pixels is available. The top brings out plain signals and arrays.

## Generating another convolver

Kernels are flat, row-major `int` arrays. `conv_pkg` holds the ones used in
the tests: `GAUSS5_273`, `SOBEL5_Y`, `SOBEL5_V`, `SOBEL5_H`, `SOBEL3_X`,
`BINOM3`, `BINOM3_1D` (`[1 2 1]`), `GAUSS3_Q16` (sigma 1, 16 bit),
`GAUSS5_S12_Q16`, `GAUSS5_S12_Q8` and `GAUSS5_S12_Q4` (sigma 1.2; the 4-bit one has zero corners), `GAUSS7_S15_Q8` (sigma 1.5).

```systemverilog
conv2d_direct #(.ROWS(3), .COLS(3), .KERNEL(conv_pkg::SOBEL3_X),
                .PRECOMP(1'b0), .OUT_W(16))
  u_sobel (.clk, .rst_n, .in_valid, .win, .out_valid, .res);

conv_sep #(.M(3), .KV(conv_pkg::BINOM3_1D), .KH(conv_pkg::BINOM3_1D))
  u_blur (.clk, .rst_n, .in_valid, .col, .out_valid, .res);
```

`conv_sep` trusts that the wanted kernel is the outer product `KV x KH`; it
does not check a 2D kernel for separability.

## Files

| file | contents |
|------|----------|
| `rtl/conv_pkg.sv` | unit-kind enum, coefficient classification and width functions, kernel tables |
| `rtl/const_mult.sv` | one coefficient unit: shift, negated shift or constant multiplier |
| `rtl/mult_array.sv` | the array of units, zero skipping, pre-computed product sharing, product register |
| `rtl/adder_tree.sv` | pipelined adder tree |
| `rtl/conv2d_direct.sv` | parallel convolver: `mult_array` + `adder_tree` |
| `rtl/conv_sep.sv` | separable convolver: vertical pass, column shift register, horizontal pass |
| `rtl/conv_gen_top.sv` | top: one convolver of each kind |
| `tb/tb_*.sv` | self-checking testbench per module; `tb_conv_gen_top` runs the top at its default parameters |
| `tb/conv2d_harness.sv`, `tb/sep_harness.sv` | reusable stimulus/checker for one convolver instance |

## Verification

Every testbench computes its expected values itself, by plain summation of
coefficient times pixel, and checks every output value and the clock at which
it arrives. Each ends by printing `TB_RESULT checks=N failures=M`, and has a
watchdog.

* `tb_const_mult`: eight coefficients covering every unit kind, random and
  extreme operands.
* `tb_adder_tree`: trees of 7 (odd counts), 8 and 1 inputs, random bubbles.
* `tb_mult_array`: the Sobel 5x5 array with shared products on a sliding
  window, and the Gaussian array on unrelated windows.
* `tb_conv2d_direct`: 3x3 Sobel, 3x3 Gaussian (16-bit), 5x5 Gaussian sigma 1.2
  (16-bit and 4-bit, the latter with skipped zero corners), 5x5 Sobel with
  shared products, 7x7 Gaussian sigma 1.5.
* `tb_conv_sep`: 5x5 Sobel and 3x3 binomial, checked against the full 2D
  kernel rather than its factors.
* `tb_gauss_quant`: the same 40x20 synthetic image through three 5x5
  Gaussian (sigma 1.2) convolvers with 16-, 8- and 4-bit coefficients. Besides
  the exact checks it normalises each result by its coefficient sum and
  measures the mean squared error against a real-valued Gaussian filter:
  about 6e-9 (16 bit), 2e-4 (8 bit) and 0.27 (4 bit) grey levels squared.
  These figures exclude output rounding; rounding to integer pixels would add
  up to about 1/12.
* `tb_conv_gen_top`: the top at its default parameters on a 32x12 random image
  (with a saturated and a black patch) scanned band by band with random idle
  beats. It also counts how often each mechanism was exercised (idle beats,
  skipped zeros, shift units, constant multipliers, shared products, odd
  adder-tree levels, negative results) and fails if one never was.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```sh
verilator --binary --timing --assert -Irtl rtl/conv_pkg.sv \
  rtl/const_mult.sv rtl/mult_array.sv rtl/adder_tree.sv rtl/conv2d_direct.sv \
  rtl/conv_sep.sv rtl/conv_gen_top.sv tb/tb_conv_gen_top.sv \
  --top-module tb_conv_gen_top -Mdir obj && ./obj/Vtb_conv_gen_top
```

`tb_conv2d_direct` also needs `tb/conv2d_harness.sv`, `tb_conv_sep` needs
`tb/sep_harness.sv`, and `tb_gauss_quant` needs only the files up to
`conv2d_direct.sv`. All tests finish in well under a second.

## Limits and departures

* The coefficient generation, quantisation-error analysis and
  architecture-selection front end is a software flow and is not part of
  this RTL. Kernels enter already quantised, and the architecture is chosen by
  instantiating `conv2d_direct` or `conv_sep`.
* General constant multipliers are written as `x * C` and left to synthesis.
  No hand-built canonical-signed-digit or shift-add network is generated.
* Output scaling, rounding and clipping to 8 bits are not included (see
  *Numbers and widths*).
* No line buffer or border handling: outputs for windows that overlap the
  previous band or the zero start-up columns are produced like any other and
  must be discarded by the user.
* Only horizontally adjacent equal coefficients share products. Other
  repeats, such as mirror-symmetric positions, still get one unit each.
* Resource and accuracy figures for FPGA implementations (logic elements,
  registers, embedded multipliers) have not been reproduced; only functional
  behaviour and cycle timing are verified.
* The 3x3 (sigma 1), 5x5 4-bit (sigma 1.2) and 7x7 (sigma 1.5) Gaussian
  tables were computed with the quantisation rule above, not taken from a
  published table. The 8-bit
  sigma 1.2 table is used as published, including a 45 where the rule gives
  44.
