# Two-pixel-per-cycle 2-D 9/7 wavelet transform with flipped lifting

This is synthesizable SystemVerilog for one level of the two-dimensional
discrete wavelet transform (DWT) with the Daubechies 9/7 wavelet, the
irreversible filter of JPEG 2000. A raster image goes in two pixels per clock.
Four subbands (LL, HL, LH, HH) come out two coefficients per clock.

The design rests on two ideas:

* **Flipped lifting.** Each lifting equation is divided by its own constant.
  The constant multiplier then sits on an input node and not in the adder
  chain. The longest register-to-register path holds one multiplier, or
  a memory read and two adders.
* **Two inputs and two outputs per step, line by line.** The column
  transform takes two vertically adjacent pixels per cycle. A small
  transposing buffer of three registers turns its output into pairs of
  horizontally adjacent samples for the row transform. The only large
  storage is one state word per image column.

Constant multiplications use a radix-8 Booth multiplier with a carry-save
(Wallace-style) reduction tree.

## The arithmetic

### The lifting scheme being computed

The 9/7 lifting scheme for one line `x(0..N-1)`, with N even:

```
y(2n+1) = x(2n+1) + α·(x(2n)   + x(2n+2))      predict 1
y(2n)   = x(2n)   + β·(y(2n-1) + y(2n+1))      update 1
H(n)    = y(2n+1) + γ·(y(2n)   + y(2n+2))      predict 2
L(n)    = y(2n)   + δ·(H(n-1)  + H(n))         update 2
L ← L/K,  H ← H·K/2                             scaling
```

The constants are α = −1.586134342, β = −0.052980118, γ = 0.882911076,
δ = 0.443506852 and K = 1.230174105. The scaling step is the JPEG 2000
normalisation: the low-pass band has DC gain 1.

### Flipping

Dividing the first predict step by α gives `y(2n+1)/α = x(2n+1)/α + x(2n) + x(2n+2)`.
Only the odd input is multiplied, and the two neighbours are added without a
multiplier. The update step is divided by αβ in the same way:
`y(2n)/(αβ) = x(2n)/(αβ) + y(2n-1)/α + y(2n+1)/α`. It reuses the flipped
predict outputs directly.

One **lifting pair** (predict and update) is therefore, for a line with even
samples `e(n)` and odd samples `o(n)`:

```
hi(n) = CO·o(n) + e(n) + e(n+1)
lo(n) = CE·e(n) + hi(n-1) + hi(n)
```

### Merging predict and update

The hardware does not compute `hi` and `lo` in that form. Expanding `lo(n)`
shows that `e(n)` appears three times. Two intermediate variables per pair
index regroup the sums:

```
D1(n)   = CO·o(n) + e(n)                    odd product plus its left neighbour
D2(n)   = (CE+1)·e(n) + D1(n-1)             even product plus the previous D1
hi(n-1) = D1(n-1) + e(n)
lo(n-1) = D2(n-1) + hi(n-1)
```

Each step takes the pair `(e(n), o(n))`. It finishes `hi` and `lo` of the
previous index and starts `D1` and `D2` of the new one. The even node is
multiplied by `CE+1`, so only two words per line, `D1` and `D2`, are
carried from one step of a line to the next. Each step uses two
multipliers and four adders, and at most two adders are chained. Because
`e` is an integer, `round((CE+1)·e) = round(CE·e) + e`, so this form gives
bit for bit the same result as the two-equation form.

The transform needs two lifting pairs in series, with these constants
(`CE+1` is what `dwt_pkg` stores):

| pair | CO (odd node) | CE+1 (even node) | outputs |
|------|---------------|------------------|---------|
| 1    | 1/α = −0.630464 | 1/(αβ) + 1 = 12.900004 | y(2n+1)/α, y(2n)/(αβ) |
| 2    | 1/(βγ) = −21.378149 | 1/(γδ) + 1 = 3.553775 | H/(αβγ), L/(αβγδ) |

Pair 2 takes the already-scaled outputs of pair 1. Its constants absorb
pair 1's factors, so the lifting constants are never multiplied anywhere
else. The outputs of pair 2 are the true H and L multiplied by 1/(αβγ) ≈ 13.5
and 1/(αβγδ) ≈ 30.4. The scaling unit removes these factors. The flipped
values grow large, so internal samples are 32-bit integers. The growth also
means that rounding each product to an integer costs very little precision.

### Scaling: one constant per subband

The column and row factors are folded together with the normalisation into
one constant per subband. Let fL = αβγδ/K = 0.0267488 and fH = αβγ·K/2 = 0.0456360.

| subband | factor  | constant (24 fraction bits) |
|---------|---------|-----------------------------|
| LL      | fL²     | 12004                       |
| HL, LH  | fL·fH   | 20480                       |
| HH      | fH²     | 34941                       |

### Number formats

These are this design's choices. All constants live in `rtl/dwt_pkg.sv`.

* Pixels are 8-bit unsigned.
* Internal samples are 32-bit signed integers.
* Lifting constants are 18-bit signed with 12 fraction bits. Each product
  is rounded to the nearest integer, with ties rounded up.
* Scaling constants are 18-bit signed with 24 fraction bits. Outputs are
  rounded and saturated to 16-bit signed integers.

Compared with a double-precision 9/7 transform, every output coefficient is
within ±1 of the exactly rounded value. The testbenches check this on
random and structured images.

## Dataflow and sample order

```
pixels ─► input_unit ─► column_filter ─► column_filter ─► transposing_buffer
 (2/clk)               (pair 1, α/β)    (pair 2, γ/δ)          │
                                                               ▼
 coefficients ◄── scaling_unit ◄── row_filter ◄── row_filter ◄─┘
    (2/clk)                        (pair 2)       (pair 1)
```

**Column direction.** A *scan* is one pair of rows, 2m and 2m+1. On each
cycle of a scan the input unit delivers `x(2m, j)` and `x(2m+1, j)`, with
columns `j = 0 … W-1` in order. Each column is one lifting line. The column
filter therefore keeps one state word per column in `lift_state_mem`, which
is W words deep, and visits the columns round-robin. A state word holds the
two intermediate sums `D1` and `D2` of the previous pair. The output for
scan m is produced while scan m+1 streams in.

**Transposing buffer.** The column filters emit `L(j), H(j)`: the column-low
and column-high samples of column j. The row filter wants `(x(2k), x(2k+1))`
of one row. On an even column the buffer stores `L(j)` and `H(j)`. On the
odd column that follows, it sends `(L(j-1), L(j))` at once and stores `H(j)`.
On the next cycle it sends `(H(j-1), H(j))`. The rate is still two samples
per cycle.

**Row direction.** The row filter therefore sees the column-low row and the
column-high row of the same scan interleaved, pair by pair. These are its
two lifting lines, so its state buffer is only two words.

**Output.** Each output cycle carries a subband position `(m, k)` and a band
bit:

* `out_band = 0`: `out_lo = LL(m,k)` and `out_hi = HL(m,k)`.
* `out_band = 1`: `out_lo = LH(m,k)` and `out_hi = HH(m,k)`.

HL means high-pass along the rows and low-pass along the columns. Subbands
come out in raster order of `(m, k)`, and the two bands of a position leave
on consecutive cycles.

## Line ends: symmetric extension and flush tokens

Every border uses whole-sample symmetric extension, as in JPEG 2000:
`x(N) = x(N-2)` and `y(-1) = y(1)`. For the lifting pair this means two
rules:

* **Left or top end.** `hi(-1) = hi(0)`. On the first pair the filter
  stores `D2 = CE·e(0)`, computed as `(CE+1)·e(0) − e(0)`. A flag marks the
  saved word as belonging to pair 0. The next step then adds `hi(0)` twice.
* **Right or bottom end.** `e(N/2) = e(N/2-1)`. The last outputs need a
  sample that does not exist, so the filter needs one more step with no
  data. On the last data pair the filter stores `D1 = CO·o + 2e`, which is
  already the final `hi`, and marks its line as *pending*. The next step
  sent to that line must be a **flush token**. On the token the filter
  emits the last outputs with `out_last`.

A filter passes on any flush token that finds no pending line. A chain of
two lifting pairs is therefore closed by two tokens per line. The first token
is consumed by pair 1, which turns it into pair 1's last data step. Pair 2
consumes the second.

The tokens are paced in two places:

* **`input_unit`.** After the last scan of a frame it sends two scans of W
  flush tokens. These close the columns.
* **`transposing_buffer`.** After the last pair of each row it sends four
  tokens: low row, high row, low row, high row. These close the rows.

The transposing buffer's tokens need four free cycles. The input unit
therefore lowers `pix_ready` for `GAP = 4` cycles after every scan, and
after each flush scan. An assertion fires if data ever reaches a line that
still waits for its flush (`lifting_filter`), or reaches the transposing
buffer before it has closed the previous row.

## Timing

* **Lifting stage pipeline.** Each lifting pair has three register stages:
  1. Input registers.
  2. The two Booth multipliers (`CO·o`, `(CE+1)·e`) and their product registers.
  3. A state read, four adders (`D1`, `D2`, `hi`, `lo`), the state write,
     and the output registers.

  An output leaves a lifting stage 3 cycles after the pair that completes it
  enters.
* **Throughput.** One pixel pair is accepted per cycle while `pix_ready` is
  high. A W×H frame occupies the input for `(H/2 + 2)·(W + GAP)` cycles:
  33 800 cycles for 256×256, about 97 % of the ideal W·H/2. The next frame
  can start immediately after.
* **Latency.** Subband row m is complete about two scans after input scan
  m+1, because each column stage delays by one scan.
* **Critical path.** At most one 32×18 Booth multiplier plus rounding, or
  a state-memory read followed by two chained 32-bit adders.

## Modules

| file | role |
|------|------|
| `rtl/dwt_pkg.sv` | widths, lifting and scaling constants |
| `rtl/booth_r8_mult.sv` | signed radix-8 Booth multiplier, carry-save reduction tree, combinational |
| `rtl/lift_state_mem.sv` | state memory: W words for columns, 2 words for rows; synchronous write, same-cycle read |
| `rtl/lifting_filter.sv` | one flipped lifting pair over DEPTH interleaved lines (the core of both filters) |
| `rtl/column_filter.sv` | lifting pair along columns, DEPTH = image width, `STAGE` 0 or 1 |
| `rtl/row_filter.sv` | lifting pair along rows, DEPTH = 2, `STAGE` 0 or 1 |
| `rtl/input_unit.sv` | pixel handshake, position tags, first/last scan flags, idle cycles and column flush scans |
| `rtl/transposing_buffer.sv` | column order to row order (3 registers, 2 multiplexers), row flush tokens |
| `rtl/scaling_unit.sv` | per-subband constant multiplication, rounding, saturation |
| `rtl/dwt2d_top.sv` | the chain above |

The top has three parameters:

* `IMG_W`: default 256. Must be even and at least 4.
* `IMG_H`: default 256. Must be even and at least 2.
* `GAP`: default 4. Must be at least 4.

Storage is dominated by the two column state memories. Each has IMG_W words
of 79 bits at the default size: `D1` and `D2` (32 bits each) plus a 15-bit
position tag. That is about 20 kbit per memory.

### Top-level interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `pix_valid`, `pix_ready` | in/out | 1 | handshake; a pair moves when both are 1; `pix_ready` does not depend on `pix_valid` |
| `pix_e`, `pix_o` | in | 8 | `x(2m, j)` and `x(2m+1, j)`: j runs over the columns, m over the row pairs |
| `out_valid` | out | 1 | two coefficients valid |
| `out_band` | out | 1 | 0: LL/HL, 1: LH/HH |
| `out_row`, `out_col` | out | log2(H/2), log2(W/2) | subband position (m, k) |
| `out_lo`, `out_hi` | out | 16 | the coefficients, signed |

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl -Itb rtl/dwt_pkg.sv \
          tb/tb_dwt2d_top.sv --top-module tb_dwt2d_top -Mdir obj_top
./obj_top/Vtb_dwt2d_top
```

Substitute any other testbench for `tb_dwt2d_top`. These are the testbenches:

* **`tb_dwt2d_top`** runs the default 256×256 design on three frames:
  gradient with noise, pure noise, and a constant. The last frame has
  random input pauses. It compares all coefficients with a floating-point
  9/7 transform and checks that every position arrives once. It checks the
  frame period, and that each mechanism occurs: column and row flushes,
  token pass-through, border mirroring, input waits and both bands. It runs
  in about 15 s.
* **`tb_dwt2d_small`** runs the same checks on 8×6 frames.
* **Per-block testbenches** use bit-exact integer models written with plain
  multiplication:
  * `tb_column_filter`
  * `tb_row_filter`
  * `tb_booth_r8_mult`: compared against `*`
  * `tb_scaling_unit`
  * `tb_transposing_buffer`
  * `tb_input_unit`
  * `tb_lift_state_mem`

## What is fixed by the architecture and what is chosen here

Taken from the architecture description:

* The flipped 9/7 lifting and the merged predictor/updater with two inputs
  and two outputs.
* Columns first, then rows, then a scaling unit.
* Column filter built from registers, radix-8 Booth multipliers, adders and
  a RAM. Row filter built from the same parts with a small buffer.
* Two filter instances per direction.
* A three-register, two-multiplexer transposing buffer.
* Three pipeline stages, with one multiplier on the critical path.

Chosen here:

* All widths and number formats. The original schematic labels its adders
  and multipliers as 8-bit parts. Flipped values grow by a factor of about
  30 per direction, so 8 bits cannot hold them, and 32 bits are used here.
* The numerical values of α…δ and the JPEG 2000 scaling convention.
* Symmetric border extension.
* The flush-token protocol with its idle cycles.
* The valid/ready input handshake and the position tags.
* The exact wiring inside a filter stage.
* One datapath. The original block diagram draws four copies of each unit,
  but their division of work is not specified. A single core already meets
  the two-in/two-out rate.

Not provided:

* More than one decomposition level. Feeding LL back for further levels is
  left to the user.
* An inverse transform.
* A radix-4 variant for comparison.
