# Two 8x8 IDCT engines: a regular MAC array and an irregular Loeffler-12 datapath

Video decoders (MPEG, JPEG) spend much of their arithmetic in the 8x8 inverse
discrete cosine transform. A direct matrix evaluation of the two separable
1D passes needs 1024 multiplications and 896 additions per block. Fast
algorithms cut that to roughly 11-13 multiplications per 8-point transform,
but the fewer the operations, the less regular the data flow, and the harder
it is to turn into hardware.

This RTL builds both ends of that trade-off, after the study *From Algorithms
to Hardware Architectures: A Comparison of Regular and Irregular Structured
IDCT Algorithms*:

* **Irregular engine (`lf_*`).** The Loeffler algorithm in its
  12-multiplication form: one more multiplication than the theoretical
  minimum, so that no data path holds more than one multiplication. It runs on
  **one multiplier and four add/sub units**, loop-pipelined with an
  **initiation interval of 12 cycles and a latency of 24 cycles** per 8-point
  transform. This is the configuration the study picks for RTL synthesis.
* **Regular engine (`rg_*`).** The 8x8 matrix is split into an even and an odd
  4x4 product. Multiply/accumulate (MAC) units evaluate those products, and
  one butterfly combines them. The number of MACs sets the speed.

Both take 12-bit coefficients and produce 9-bit pixels (the MPEG ranges).
Both pass an IEEE 1180-1990 style accuracy test over 60,000 blocks. They sit
side by side in `idct_top` and share only clock and reset.

## Arithmetic shared by both engines

* Each 1D pass computes sqrt(8) times the orthonormal 8-point IDCT:
  x(k) = X(0) + sqrt(2) * sum over m=1..7 of X(m) cos((2k+1) m pi/16).
  Two passes scale the result by 8, and the final rounding divides by 8.
* Constants are integers scaled by 2^13 (`IDCT_CB`).
* The row pass reads 12-bit integers. Between the passes the transpose memory
  holds 20-bit words with 3 fraction bits (`IDCT_PF`, `IDCT_TW`).
* The column pass rounds to nearest and saturates to [-256, 255].
* Rows are transformed first and columns second. Row results go into the
  transpose memory at address col*8+row, so each column pass reads 8
  consecutive words.

These widths and fraction bits are this design's choice. They were sized
with the accuracy test rather than taken from the study.

## The Loeffler-12 datapath (`lf_idct1d` = `lf_ctrl` + `lf_datapath`)

This part takes the most effort to follow. It is a statically scheduled,
modulo-pipelined datapath, the kind of circuit a high-level synthesis tool
produces. Here it is written by hand.

### The algorithm

The inputs are X0..X7 and the outputs x0..x7. cN is short for cos(N*pi/16).

*Even part (3 multiplications).* This is a "fast rotation": one shared
product, then one product and one addition per output.
```
m1 = (X2+X6)*k1   m2 = X6*k2   m3 = X2*k3
e0 = X0+X4        e1 = X0-X4
tmp10 = e0 + (m1+m3)   tmp13 = e0 - (m1+m3)
tmp11 = e1 + (m1+m2)   tmp12 = e1 - (m1+m2)
```

*Odd part (9 multiplications, each on its own path).*
```
z5 = ((X7+X3)+(X5+X1))*k12
z3 = (X7+X3)*k10 + z5          z4 = (X5+X1)*k11 + z5
t0 = X7*k4 + (X7+X1)*k8 + z3   t1 = X5*k5 + (X5+X3)*k9 + z4
t2 = X3*k6 + (X5+X3)*k9 + z3   t3 = X1*k7 + (X7+X1)*k8 + z4
```

*Output butterfly.*
```
x0,x7 = tmp10 +/- t3   x1,x6 = tmp11 +/- t2
x2,x5 = tmp12 +/- t1   x3,x4 = tmp13 +/- t0
```

That is 12 multiplications and 32 additions/subtractions (25 additions and
7 subtractions). The constants k1..k12 are sqrt(2) times sums of cosines,
listed with their formulas in `idct_pkg.sv`.

### Fixed point

* Registers are 28 bits wide with 6 fraction bits.
* Inputs are shifted into that format when they are loaded.
* Every product is rounded back to 6 fraction bits straight away.
* Every output is rounded as it leaves: to 3 fraction bits in the row pass,
  or to an integer divided by 8 in the column pass.

### Schedule

One iteration (one 8-point transform) lasts 24 cycles. A new iteration
starts every 12 cycles. The multiplier works every cycle, and at most four
add/sub operations run in any cycle, counting both overlapped iterations.

| cycle | input | multiplier | add/sub (this iteration) |
|---|---|---|---|
| 0-7 | X1 X7 X3 X5 X2 X6 X0 X4 | | |
| 2 | | X1*k7 | X7+X1 |
| 3 | | X7*k4 | X7+X3 |
| 4 | | (X7+X1)*k8 | X5+X1, X5+X3 |
| 5 | | (X7+X3)*k10 | z5 input, two odd partial sums |
| 6 | | X3*k6 | X2+X6 |
| 7 | | z5 input*k12 | |
| 8 | | (X5+X1)*k11 | e0, e1, z3 |
| 9 | | (X5+X3)*k9 | t0, partial t2, z4 |
| 10 | | X5*k5 | t3, partial t1, t2 |
| 11 | | (X2+X6)*k1 | t1 |
| 12 | | X6*k2 | |
| 13 | | X2*k3 | m1+m2 |
| 14 | | | m1+m3, tmp11, tmp12 |
| 15 | | | tmp10, tmp13, output x1 |
| 16-22 | | | outputs x3 x4 x0 x7 x6 x2 x5 (one per cycle) |

Outputs appear one cycle after they are computed, in cycles 16 to 23. The
study leaves the port order free; the order used here is this design's.

### How it is built

* **`lf_ctrl`** holds a modulo-12 step counter (`slot`) and a case table. For
  each step the table gives one control word (`lf_cw_t`): an optional input
  load, one multiplier operation and four add/sub operations.
* Each operation names its operand and result registers and whether it
  belongs to the iteration in its first 12 cycles (stage A) or its second 12
  cycles (stage B).
* **`lf_datapath`** has a file of 18 registers of 28 bits (504 bits). It
  simply executes the control word: operands are read from the named
  registers and results are written to the named registers.
* The registers are shared between values. A value lives from the cycle after
  it is written until its last read. Two values can share a register when
  their lifetimes, taken modulo 12, do not overlap. This must also hold across
  the two overlapped iterations, because the same register serves both.
* At most 18 of the 44 values are live at once, and the assignment reaches
  that bound. The lifetime and register of every value are listed at the top
  of `rtl/lf_ctrl.sv`.
* The output order x1 x3 x4 x0 x7 x6 x2 x5 was chosen to keep lifetimes
  short. The two outputs built from `tmp13` leave early, so `tmp13` and `t0`
  free their registers early.
* The study reports 388 register bits after the synthesis tool shared
  registers. Its word widths are not given; this design uses 28 bits
  throughout.

### Core protocol

* `start_ready` is high in step 11.
* `start_valid` in that cycle claims the iteration that begins next cycle,
  with a pass bit and a 3-bit tag.
* In cycles 0-7 the core drives `in_req` and `in_idx`. `in_data` must return
  X(in_idx) in the same cycle; an asynchronous memory read does that.
* `out_valid`, `out_idx`, `out_tag` and `out_data` follow in cycles 16-23.

## The 2D Loeffler engine (`lf_idct2d`)

* An input memory (IMEM, 64x12 bits) is loaded by address while the engine
  is idle.
* `start` runs one block:
  1. 8 row iterations read IMEM and write the transposed results to TMEM
     (64x20 bits).
  2. After the 64th write, 8 column iterations read TMEM.
  3. The pixels stream out with their addresses, one per cycle while
     outputs are produced.
* Waiting for the whole row pass costs a pipeline drain per pass. A block
  takes 234 to 246 cycles from `start` to `done`. The spread comes from
  waiting for the step counter.

## The regular MAC engine (`rg_idct2d`)

The 8-point IDCT splits by the symmetry of its matrix:
f(i) = C1[i]·(X0,X2,X4,X6) + C2[i]·(X1,X3,X5,X7) and
f(7-i) = C1[i]·even − C2[i]·odd, for i = 0..3.

* `NMAC/2` MACs (`mac_unit`) work on each part. Every cycle one even and one
  odd sample are read from IMEM (or TMEM in the column pass) and broadcast to
  the MACs of their part.
* Each MAC gets its own coefficient from `coef_rom`, which holds C1 and C2
  scaled by 2^13, and sums four products.
* A part needs 4/(NMAC/2) rounds, so a transform takes 32/NMAC cycles: 16, 8
  or 4 cycles for NMAC = 2, 4 or 8. The default is 4. NMAC = 1, where one MAC
  would serve both parts, is not supported.
* After each round the sums move to holding registers. A single `butterfly`
  then takes one even/odd pair per cycle. It forms the sum and the
  difference, rounds them and writes both to TMEM (row pass) or to the output
  (column pass). Memories with two read and two write ports support this.
* `rg_ctrl` consists of counters for pass, vector, round and step, plus the
  derived enables. After each pass it idles NMAC/2+2 cycles so that the last
  butterfly results reach memory.
* Products accumulate at full precision and are rounded only in the
  butterfly.
* A block takes 2·(256/NMAC + NMAC/2 + 2) + 1 cycles: 137 for NMAC = 4.
* Pixels leave in pairs (f(i), f(7-i) of one column) with their addresses.
  Bit 5 of `out_addr[0]` is always 0 because f(i) with i < 4 always lies in
  the upper half of the block.

## Interfaces (`idct_top`)

The engines have identical load and start ports, with prefixes `lf_` and
`rg_`:

* `*_load_we`, `*_load_addr[5:0]` (row*8+col) and `*_load_data[11:0]`, while
  `*_busy` is low.
* `*_start` is a one-cycle pulse.
* `*_done` pulses after the last pixel.

They differ in their pixel outputs:

* `lf_out_valid`, `lf_out_addr`, `lf_out_data[8:0]`: one pixel per cycle.
* `rg_out_valid`, `rg_out_addr[2]`, `rg_out_data[2]`: two pixels per cycle.

Reset `rst_n` is active low and asynchronous. It resets control state only;
memories and data registers are not reset.

## Accuracy and verification

| test (`tb/`) | what it shows |
|---|---|
| `tb_ieee1180` | 6 x 10,000 blocks (pixel ranges [-256,255], [-5,5], [-300,300], each also sign-inverted), both engines. Peak error 1; overall MSE ≤ 0.0089 (Loeffler-12) and ≤ 0.0075 (MAC); per-position MSE ≤ 0.012; mean errors within the limits. The Loeffler engine's overall mean error (up to 0.00125) is close to the 0.0015 limit, because every product is rounded half-up. It uses the simulator's random source, not the generator defined by the standard. About 12 s. |
| `tb_idct_top` | End-to-end run of both engines at default sizes against a floating-point IDCT. Exact block timing. Counts overlapped iterations, both passes, later MAC rounds, shared butterfly use and saturation, and fails if any of them never happens. |
| `tb_lf_idct1d` | Back-to-back iterations: 12-cycle interval, 24-cycle latency, input order, and results against a floating-point 1D-IDCT. |
| `tb_lf_ctrl` | Replays the schedule table. Operands are ready before use, there are 12 multiplications and 32 add/sub operations, and at most 4 add/sub operations per step. Evaluated in floating point, the table must give the 1D-IDCT. The schedule is also replayed on the 18 physical registers for four overlapped iterations, which checks that no shared register is overwritten while its value is live. Also checks the start bookkeeping. |
| `tb_lf_datapath` | Bit-exact check of load scaling, rounded multiplication, add/sub, output rounding and saturation, and register addressing. |
| `tb_lf_idct2d`, `tb_rg_idct2d` | The 2D engines alone against the floating-point reference. |
| `tb_rg_mac_sweep` | The regular engine with NMAC = 2, 4 and 8 side by side on the same blocks: every pixel, and 16, 8 and 4 cycles per 8-point transform. |
| `tb_rg_ctrl`, `tb_mac_unit`, `tb_butterfly`, `tb_coef_rom`, `tb_idct_mem` | Unit tests. |

`tb/idct_ref_pkg.sv` provides the reference: IEEE 1180 style block
generation and a floating-point IDCT. To simulate with Verilator:

```
verilator --binary --timing -Wno-fatal rtl/idct_pkg.sv \
    $(ls rtl/*.sv | grep -v idct_pkg) tb/idct_ref_pkg.sv tb/tb_ieee1180.sv \
    --top-module tb_ieee1180 && obj_dir/Vtb_ieee1180
```

The package comes first. `-Wno-fatal` keeps the testbenches' width warnings
from stopping the build. Every testbench ends with a line
`TB_RESULT checks=N failures=M`.

## Where this departs from the study, and what to trust

* **Data flow graph and schedule.** The study's schedule is not available in
  detail. The 12-multiplication graph above matches its operation counts (12
  multiplications, 25 additions, 7 subtractions) and its resources (1
  multiplier, 4 add/sub units, II 12, latency 24, 2 overlapped iterations).
  The exact graph may differ. The longest path here holds one multiplication
  and five add/sub operations, where the study lists four additions.
* **Register count.** 18 shared registers of 28 bits give 504 register bits,
  against 388 in the study. The register count is the minimum for this
  schedule; the difference is in the word widths, which are not given.
* **Other behavioural-synthesis options.** The study's other options (II 5,
  6, 11 and 20 with 1-3 multipliers) are not built.
* **Choices made here.** These are not from the study:
  * the bit widths, fraction bits and constant precision (13 bits, inside the
    study's 12-14 bit range);
  * the input/output orders;
  * the load/start/stream protocol;
  * the MAC count default;
  * rounding only at the butterfly in the MAC engine.
* **Row/column passes.** The two passes do not overlap across blocks. Each
  engine finishes a block before it accepts the next one.
