# Systolic 2D-DFT for arbitrary transform lengths

This is a fully pipelined N x N two-dimensional discrete Fourier transform
for any N from 3 up, prime lengths included, written in synthesizable
SystemVerilog. The architecture is designed around odd N. Even N is
supported by an extension described below. It takes one row of N 16-bit integers per clock and delivers
one column of the transformed matrix per clock. A new matrix can follow every
N cycles. The default size is 5 x 5.

The 2D transform is done as two passes of 1D transforms:

```
F'(m, l) = sum_n f(m, n) W^(l n)          (rows)
F(k, l)  = sum_m F'(m, l) W^(k m)         (columns),   W = exp(-j 2 pi / N)
```

Two identical systolic 1D-DFT arrays do the two passes. A double-buffered
flip-flop memory between them turns rows into columns.

## The 1D algorithm: folding the DFT in half

An N-point DFT needs N^2 complex multiply-adds. For odd N, with
M = (N-1)/2, the inputs are paired symmetrically:

```
x(n) = f(n) + f(N-n),    y(n) = f(n) - f(N-n),    n = 1..M
```

Since W^(-kn) is the complex conjugate of W^(kn), write W^(kn) = C + jS.
Then one pair of outputs, F(k) and F(N-k), comes from only four real inner
products of length M:

```
F1(k) = sum Re x(n) * C      F2(k) = sum Im y(n) * S
F3(k) = sum Im x(n) * C      F4(k) = sum Re y(n) * S

F(k)   = f(0) + (F1 - F2) + j (F3 + F4)
F(N-k) = f(0) + (F1 + F2) + j (F3 - F4)
F(0)   = f(0) + sum x(n)
```

The DFT needs no power-of-two length. All M output pairs can be computed at
the same time, and each one is a set of plain real multiply-accumulates with
fixed coefficients. That regularity is what a systolic array needs.

## The systolic array (`dft1d`)

```
            col 1      col 2    ...  col M
 row 0:    [SB1]  -s-> [SB1] -> ... [SB1] -s-> [SB2]  -> F(0)
             |x,y        |x,y          |x,y       | f(0)
 row 1:    [PC11] -F-> [PC12] -> ...[PC1M] -F-> [SB3]  -> F(1), F(N-1)
             |           |             |          | f(0)
 row M:    [PCM1] -F-> [PCM2] -> ...[PCMM] -F-> [SB3]  -> F(M), F(M+1)
```

- **SB1** (`sb1`), one per column n, has three complex adder cells. It forms
  x(n) and y(n), sends them down its column, and adds x(n) to a running sum
  that travels right along the first row.
- **SB2** (`sb2`) is one complex adder. It adds f(0) to the running sum to give
  the DC output F(0), and starts f(0) down the last column.
- **PC(k, n)** (`pc`) is a processing cell. It holds the constant W^(kn), built
  at elaboration. Four multipliers and four adders in it add one term to each
  of F1..F4. The four partial sums travel right along row k; x and y travel
  down.
- **SB3** (`sb3`), one per row k, combines F1..F4 with f(0) into F(k) and
  F(N-k). It uses six real adders and passes f(0) on down.

Every cell registers its outputs, so no signal goes through more than one
cell per clock. The critical path is a multiply followed by an add inside a
PC. The array must see data and partial sums meet in step, so the inputs are
skewed:

| signal | registers added |
|---|---|
| input pair of column n (f(n), f(N-n)) | n - 1 |
| f(0) to SB2 | M |
| output of SB3 in row k | M - k |
| F(0) from SB2 | M |

Counting the input edge as cycle 1, SB2 delivers after M+1 cycles and the
SB3 of row k after M+1+k cycles. The output alignment registers then present
all N outputs of a vector together, **N cycles** after the vector entered.
Every cycle can carry a new vector. A valid bit runs alongside the data, and
there is no back-pressure.

Per 1D array, the resources are 4M^2 multipliers and 4M^2 + 12M + 2 real adders
(PCs 4M^2, SB1 6M, SB3 6M, SB2 2). For N = 5 that is 16 multipliers and 42
adders.

### Even lengths

For even N, the input f(N/2) has no partner, and M = N/2 - 1. The extra terms
are:

```
F(k), F(N-k) gain (-1)^k f(N/2)
F(0)   = f(0) + f(N/2) + sum x(n)
F(N/2) = f(0) + (-1)^(N/2) f(N/2) + sum (-1)^n x(n)
```

The array handles them with three changes:

- Each SB1 gets a fourth complex adder, which keeps the alternating sum of
  x(n).
- `sb_even` takes the place of SB2. It forms F(0) and F(N/2), and it also
  forms f(0) + f(N/2) and f(0) - f(N/2).
- The SB3 of row k is fed f(0) + (-1)^k f(N/2) instead of f(0).

With these changes the latency is N-1 cycles. This extension is this design's
own; the architecture only says that even lengths need a modification.

## The transposition buffer (`tbuf_ram`, `tbuf_ctrl`)

The first array produces rows of F', but the second array needs columns. The
buffer holds 2 x N x N complex words of 32 bits, in two banks:

- **Write.** Each valid output row of the first array is written whole into
  row `wr_row` of bank `wr_bank`. After row N-1 the bank is marked full and
  writing moves to the other bank.
- **Read.** While a bank is full, one whole column per cycle is read from it
  by a combinational mux and fed to the second array. After column N-1 the
  bank is released.

When rows stream without gaps, one bank fills while the other is read, and
the banks trade roles every N cycles. The controller has no other states than
its counters and the two full flags. An assertion checks that a row is never
written into a bank still waiting to be read. That cannot happen when at most
one row arrives per cycle.

A column exists only once all N rows of the matrix have passed the first
array. So the first output column of a matrix leaves `dft2d_top` **3N cycles
after its first row entered** (2N+1 after its last row). For even N this is
3N-2 cycles. A matrix completes every N cycles.

## Number format and arithmetic (`fp16_add`, `fp16_mul`, `int2fp`)

Every real value is a 16-bit float: 1 sign bit, a 5-bit exponent with bias
15, and a 10-bit fraction with a hidden one. A complex word is `{re, im}`,
32 bits (`dft_pkg::cfp16_t`).

- **`fp16_add`** aligns the smaller operand by a right shift. It keeps 16
  extra bits and a sticky bit. It then adds or subtracts, normalises with a
  leading-one search, and rounds to nearest, ties to even. The result is the
  exact sum, rounded once.
- **`fp16_mul`** forms the 11 x 11 bit significand product with radix-4
  modified Booth recoding (six partial products). It adds the exponents,
  normalises and rounds the same way.
- **`int2fp`** converts a 16-bit two's-complement sample to the real part,
  rounded; the imaginary part is zero.
- **Range rules.** An exponent field of 0 is zero, so results below 2^-14
  flush to +0. An exponent field of 31 is infinity, and overflow gives
  infinity. There is no NaN.
- **Coefficients.** `dft_pkg::twiddle` computes the constants W^p during
  elaboration, with integer arithmetic only. It folds the angle into the
  first quadrant, sums Taylor series in Q30, and rounds to the 16-bit format.
  Changing `N_LEN` regenerates them.

**Range warning.** The largest finite value is 65504. A 2D-DFT of full-scale
16-bit integers exceeds it: the DC term of a 5 x 5 matrix can reach 25 x 32767.
Such a result becomes infinity. To stay in range, keep the sum of the
absolute input values of one matrix below 65504. The format has 11 significant bits, so results carry a relative
error of a few times 2^-11 of the input magnitude.

## Top level (`dft2d_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous reset, active low |
| `in_valid`, `in_row[N]` | in | one row of signed 16-bit samples; rows 0..N-1 in order |
| `row_valid`, `row_dft[N]` | out | 1D-DFT of each input row, F'(m, l); the design doubles as a 1D-DFT engine |
| `out_valid`, `out_col_idx`, `out_col[N]` | out | column l of the result: `out_col[k] = F(k, l)`; l = 0..N-1 in order |
| `buf_wr_bank`, `buf_rd_bank` | out | which buffer bank is being written / read |

Gaps between rows, inside a matrix or between matrices, are allowed. The only
parameter is `N_LEN` (at least 3, default 5).

How far `N_LEN` can grow:
- The array needs M^2 processing cells per pass: 4 at N = 5, 225 at N = 32,
  2500 at N = 101.
- N = 32 is simulated end to end.
- N = 101 passes lint, but its simulation model builds very slowly.
- Larger sizes are a matter of area.

## How this differs from the architecture it follows

- **Latency.** The architecture quotes a latency of 2N cycles. This design
  needs 3N cycles from the first row, or 2N+1 from the last row, because a
  column is complete only once all rows are done. The throughput of one
  matrix per N cycles is met.
- **What SB3 adds.** The text says SB3 adds the DC component from SB2. The
  equations need f(0), so SB2 forwards f(0) and SB3 adds that.
- **Adder counts.** The text gives SB3 five add/subtract operations; it uses
  six. SB1's three adder cells are taken to be complex adders: x, y and the
  running DC sum. With that reading, the adder total per 1D block is the
  4M^2 + 12M + 2 given above, which is also the architecture's own count.
- **Multipliers.** They are floating point Booth multipliers with constant
  coefficients. The look-up-table (ROM) and CORDIC alternatives are not used.
- **Buffer writes.** The buffer is written one aligned row per cycle, not in
  a skewed diagonal order. The output alignment registers of the 1D array
  make that possible.
- **Even lengths.** The architecture's hardware covers odd N only. The
  even-length extension is this design's own.
- **Own choices.** Rounding, zero/infinity handling, reset and the valid
  signalling are this design's choices. So are the running-sum placement of
  the DC adder chain and the integer Taylor-series generation of the
  coefficients.

## Files

`rtl/`:
- `dft_pkg.sv`: types `fp16_t`, `cfp16_t`, `acc4_t`; coefficient functions
- `fp16_add.sv`, `fp16_mul.sv`, `cfp16_addsub.sv`, `int2fp.sv`: arithmetic
- `sb1.sv`, `sb2.sv`, `pc.sv`, `sb3.sv`: array cells
- `sb_even.sv`: the block that replaces SB2 for even N
- `pipe_delay.sv`: register chain used for skew and alignment
- `dft1d.sv`: systolic 1D-DFT array
- `tbuf_ram.sv`, `tbuf_ctrl.sv`: transposition buffer and its controller
- `dft2d_top.sv`: complete 2D-DFT

`tb/`:
- `fp16_ref_pkg.sv`: reference model of the number format, in double
  precision with one final rounding
- `dft_model_pkg.sv`: the textbook DFT, and the split algorithm evaluated in
  the hardware's order of operations for bit-exact comparison
- one self-checking testbench per block, `tb_<module>.sv`. The helpers
  `cfp16_addsub` and `pipe_delay` are tested through the blocks that use them.

`tb_dft1d` runs N = 5, 11 and 8. `tb_dft2d_top` streams 40 random 5 x 5
matrices, back to back and with gaps. It checks:
- every row result and every output column bit for bit;
- the results against the textbook 2D-DFT, within a tolerance;
- the first-column latency and the one-matrix-per-N-cycles rate.

`tb_dft2d_n32` runs the complete design at N = 32 and checks it the same
way. `tb_pc` also checks the coefficient generator against `$cos`/`$sin`
for every odd N up to 257.

Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5, for example the complete design:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dft2d_top \
  rtl/dft_pkg.sv tb/fp16_ref_pkg.sv tb/dft_model_pkg.sv rtl/*.sv tb/tb_dft2d_top.sv
./obj_dir/Vtb_dft2d_top
```

A single block needs only the packages, its own file and the files it
instantiates, for example `rtl/fp16_add.sv tb/tb_fp16_add.sv` for the adder.
To try another size, set `N_LEN` on `dft2d_top` or `dft1d`, for example
`-GN_LEN=7` on the Verilator command line when the design is the top.
