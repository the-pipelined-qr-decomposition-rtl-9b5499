# Pipelined Givens-rotation QR decomposition with CORDIC

This design factors a matrix `A` (M x N, M >= N, default 4 x 4) into `A = QR`
and outputs the upper-triangular `R`. It uses Givens rotations only, and it
computes every rotation with CORDIC. So the whole datapath is shifts and
add/subtract units: there is no multiplier, divider or square-root unit. Every
CORDIC iteration is one pipeline stage. The array accepts one matrix column
per clock and returns one column of `R` per clock after a fixed latency.
A new 4 x 4 matrix can therefore start every 4 clocks.

The structure, the CORDIC modes, the idea of fixing the CORDIC stretch with
pre- and post-scaling, and the four adder architectures come from a published
description of this architecture. Several details are this implementation's
own: the stream format, the exact scaling exponents, the widths, the guard
bits and the quadrant handling. Each RTL file's header comment says which
parts are which, and the section "Departures and limits" lists them all.

## How a matrix flows through the array

```
 column n of A          stage 0                 stage 1            stage 2        stage 3
 a0n a1n a2n a3n --> PreProc -> Proc -> PostProc ------------------------------------> Delay -> r0n
                               |  rows 1..3, column 0 now zero
                               +--> PreProc -> Proc -> PostProc ----------------> Delay -> r1n
                                              |  rows 2..3
                                              +--> PreProc -> Proc -> PostProc -> Delay -> r2n
                                                             |  row 3
                                                             +--> PreProc -> PostProc --> r3n
```

* **Stage s** (`qr_stage`) receives rows `s..M-1` of the partly reduced
  matrix as parallel streams. It produces row `s` of `R` and hands the
  remaining `M-s-1` rows, now zero in column `s`, to stage `s+1`.
* **Proc** (`givens_proc`) holds `M-s-1` CORDIC Givens units in a chain. Row
  `s` is the *pivot*. Unit `j` rotates the pivot against row `s+j`, which
  zeroes that row's entry in column `s`. The pivot that leaves the last unit
  is row `s` of `R`. Row `s+j` is delayed by `(j-1)` unit latencies so that
  it meets the pivot at unit `j`. The rotated rows are then delayed again so
  that they leave together.
* **PreProc / PostProc** (`pre_proc`, `post_proc`) multiply rows by powers of
  the CORDIC gain `K`. They use linear-mode CORDIC for this. The section "Gain
  bookkeeping" explains why.
* **Delay** (`delay_line`) blocks align the finished `R` rows. All `N` rows of
  one column leave in the same cycle.

Every stream word carries a tag: a valid bit and the column index. A stage
knows that column `s` is its *leading* column from the tag. Columns left of
`s` are carried along but ignored, and `post_proc` forces them to zero in `R`.

## The Givens unit: one angle, found once, applied to a whole row

`cordic_givens` is a circular CORDIC (`mu = 1`). Its iterations are

```
x(i+1) = x(i) - d(i) * y(i) * 2^-i
y(i+1) = y(i) + d(i) * x(i) * 2^-i
```

* For the **leading element pair**, the unit works in vectoring mode,
  `d(i) = -sign(x(i) * y(i))`. The pair `(pivot[s], row[s])` turns onto the x
  axis: `x -> K*sqrt(x^2+y^2)` and `y -> 0`. Each pipeline stage stores its
  `d(i)` in a one-bit register.
* For the **following elements** of the same two rows, the unit works in
  rotation mode with the stored `d(i)`. They are turned by exactly the same
  angle, which is a Givens rotation of the two rows.

Elements move through the stages in order. So the leading element of the next
matrix overwrites a stage's `d(i)` only after the last element of the current
matrix has used it. No angle value (`z`) is ever formed.

Vectoring only converges for `x >= 0`. Stage 0 of the unit is therefore a
quadrant step. If the leading `x` is negative, both elements are negated (a
rotation by pi), and the decision is stored for the following elements. As a
result, every diagonal element `r(k,k)` with `k < M-1` is non-negative. In a
square matrix the last one, `r(M-1,M-1)`, keeps its sign.

## Gain bookkeeping (pre- and post-scaling)

Every circular CORDIC pass multiplies both outputs by `K = 1.646760258121`.
The pivot of stage `s` passes through `M-s-1` units, so it gains one factor
`K` per unit. A fresh partner row has not passed any unit. The two inputs of a
rotation must carry the *same* gain, or the angle is wrong. This design
handles the stretch the following way:

1. **Stage 0 pre-scaling** multiplies row `r` by
   `K^-2(M-1)` for `r = 0, 1` and by `K^-(2M-1-r)` for `r >= 2`.
   For M = 4 that is `diag(K^-6, K^-6, K^-5, K^-4)`. Before unit `j`, the
   pivot and row `j` then both carry `K^-(2(M-1)-j+1)`. After the last unit,
   `R` row 0 carries `K^-(M-1)`.
2. The rows handed on by unit `j` carry `K^-(2(M-1)-j)`. For stage `s+1` the
   partner rows then already match. Only the new pivot is one factor short,
   so **later stages multiply their pivot by `K`** and pass the other rows
   unchanged.
3. In general, `R` row `s` leaves its rotation chain stretched by
   `K^-(M-1-s)`. **Post-scaling** multiplies it by `K^(M-1-s)`, which is
   `S' = diag(K^(M-1), ..., K, 1)`.

The factors below 1 keep all intermediate values no larger than the true
column norms, so nothing overflows. The cost is precision: `K^-6` removes
about 4.3 bits. The array therefore computes internally with `GUARD = 6`
extra fraction bits. With them, `R` is exact to about half an output LSB on
average. Without them (14-bit internal words) the mean error was about 27 LSB.

The functions `pre_exp`, `post_exp` and the latency functions in `qr_pkg`
encode these rules for any `M`.

## Linear CORDIC as a constant multiplier

`cordic_linear` runs linear rotation mode (`mu = 0`, `d(i) = sign(z(i))`,
`e(i) = 2^-i`). It starts from `y = 0` and `z = c`, and `y` converges to
`x*c`. For factors of 2 or more (`K^2`, `K^3`), the iterations start at a
negative index, i.e. left shifts (`IMIN = -floor(e*log2 K)`). For small
factors (`K^-6` = 0.0498), the unit carries `GY` extra fraction bits so that
the product keeps its relative precision. The result is rounded to the word
format. Its latency is `FRAC + GY - IMIN + 1` cycles.

## Adders

Every add/subtract in every CORDIC stage is an `addsub` unit. Its adder
architecture is selected by the `ARCH` parameter (`qr_pkg::adder_arch_e`):

| `ARCH`      | module        | structure |
|-------------|---------------|-----------|
| `ADD_RCA`   | `adder_rca`   | chain of `full_adder` cells |
| `ADD_CLA`   | `adder_cla`   | 4-bit groups with sum-of-products carries, plus a group look-ahead unit (default, the fastest) |
| `ADD_CSEL`  | `adder_csel`  | ripple groups computed for carry-in 0 and 1, chosen by the incoming carry |
| `ADD_CSKIP` | `adder_cskip` | ripple groups; a group whose bits all propagate passes its carry-in straight on |

Because one CORDIC iteration is one pipeline stage, the clock period is
bounded by one adder's delay. The adder choice therefore sets the clock rate
of the whole array.

## Interface and timing (`qr_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears valid bits and stored directions) |
| `in_valid` | in | 1 | `in_col` holds the next column |
| `in_col[M]` | in | W | `a(m,n)`, m = 0..M-1, for the current column n |
| `out_valid` | out | 1 | `out_r` holds a column of `R` |
| `out_colidx` | out | 8 | its column index n |
| `out_r[N]` | out | W | `r(k,n)`, k = 0..N-1 (zero below the diagonal) |

* **Number format:** W-bit two's complement with FRAC fraction bits (default
  14 and 11). Inputs must satisfy `|a| < 1`; an assertion checks this. Then
  `|r| <= sqrt(M)` fits.
* **Matrix framing:** every N valid columns form one matrix. A column counter
  supplies the tag. Idle cycles (`in_valid = 0`) are allowed anywhere. There
  is no back-pressure.
* **Latency:** fixed. It is `qr_top.LATENCY` and is 199 clocks at the
  defaults (stage 0: 25 + 3*19, stage 1: 20 + 2*19, stage 2: 20 + 19,
  stage 3: 20). Throughput is one column per clock.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `M`, `N` | 4, 4 | matrix rows and columns (M >= N) |
| `W` | 14 | input/output word width |
| `FRAC` | 11 | fraction bits of the input/output words |
| `GUARD` | 6 | extra internal fraction bits |
| `NITER` | 18 | circular CORDIC iterations (internal fraction bits + 1) |
| `ARCH` | `ADD_CLA` | adder architecture |

With the defaults, coarse synthesis gives about 61k word-level cells and
19k flip-flop bits, mostly pipeline registers.

## Accuracy and verification

Each module has a self-checking testbench in `tb/` with the same name plus a
`tb_` prefix. Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

* The adders are checked with corner operands and random operands at 14 and
  9 bits. `addsub` is checked with all four architectures.
* The CORDIC units are compared with real-number products and rotations, and
  their latency is checked.
* `pre_proc`, `post_proc`, `givens_proc` and `qr_stage` are checked against a
  real-number Givens reduction at the internal format. Each checks both
  values and latency.
* `tb_qr_top` runs the default array on 300 random 4 x 4 matrices. It uses
  random idle cycles in the first half and back-to-back matrices in the
  second half. `R` is compared with a double-precision Givens QR of the same
  quantised inputs. Measured error: mean 0.55 LSB, worst entry 34 LSB. The
  worst cases are badly conditioned matrices. The testbench also checks the
  latency and the column indices. It requires that negative pivots (quadrant
  step), idle cycles, back-to-back matrices, and vectoring and rotation
  passes each occurred.

## Departures and limits

* **Scaling exponents.** The pre-scaling exponents are derived above for this
  fixed-pivot pipeline. They differ from the nominal per-row factors
  `K^-(M-m)` and `K^-M ... K^-1` of the source description, which do not
  balance the rotation gains here. The post-scaling `diag(K^(M-1), ..., 1)`
  is as described.
* **Rotation order.** The pivot row is rotated against each lower row in
  turn. The source shows the stage structure but not the links between
  stages.
* **Widths and guard bits.** The 14-bit word comes from the adder study. The
  internal 20-bit words (`GUARD = 6`), the per-unit guard bits and the
  iteration counts are this design's choices, made for accuracy.
* **Quadrant step.** The negation of a negative pivot and the omitted angle
  accumulator are implementation choices.
* **Adder variants in the full array.** The ripple-carry, carry-select and
  carry-skip builds of the array are verified only through `addsub` and the
  adder testbenches, not end to end. Their arrays hold thousands of
  full-adder instances and take too long to build for a routine test. Every
  architecture computes the same sum, so they differ from the tested
  carry look-ahead array only in timing.
* **Not modelled.** The delays the adder study quotes in clock cycles are not
  modelled: all adders are combinational inside one pipeline stage. FPGA
  resource counts are not reproduced. Mapping to DSP slices is not done.
* **Overflow.** There is no saturation. Inputs outside `|a| < 1` can
  overflow.

## Simulating

All files are plain SystemVerilog. `qr_pkg.sv` must come first. For example,
to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_qr_top \
    rtl/qr_pkg.sv rtl/*.sv tb/tb_qr_top.sv
./obj_dir/Vtb_qr_top
```

Replace the top module and testbench file to run any other test. A lint
check of the design is
`verilator --lint-only -Wall -Irtl rtl/qr_pkg.sv rtl/qr_top.sv -y rtl`.

## Files

* `rtl/qr_pkg.sv` holds the shared types (`tag_t`, `adder_arch_e`), `K`, the
  scaling exponents and the latency functions.
* `rtl/qr_top.sv` contains the array, built from `qr_stage`. Each
  `qr_stage` holds a `pre_proc`, a `givens_proc` and a `post_proc`.
  `givens_proc` is built from `cordic_givens` and `delay_line` units.
  `pre_proc` and `post_proc` are built from `cordic_linear`.
* Inside every CORDIC stage, `addsub` selects one of `adder_rca`,
  `adder_cla`, `adder_csel` or `adder_cskip`. `adder_rca` is built from
  `full_adder` cells.
