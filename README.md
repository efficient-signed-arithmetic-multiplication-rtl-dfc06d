# Signed matrix multiplication on a memristor crossbar, without sign extension

A memristor crossbar multiplies a vector by a matrix in one analog step: every row is driven
with an input, every cell conducts according to the bit it stores, and each bit-line collects the
sum of its rows' products. The cells only hold positive conductances, though, and each holds
one bit, so an 8-bit two's complement weight has to be spread over 8 bit-lines and an 8-bit input
over 8 analog steps. Doing two's complement arithmetic the usual way would mean storing and
driving sign-extension bits up to the full output width. With 256 rows and 8-bit data that is
24 bits, three times the array and three times the steps.

This RTL is the digital periphery of a compute-in-memory tile that avoids this overhead. The
sign-extension bits are never stored in the array and never driven onto it. Their contribution
is always a copy of a value the periphery already holds:

* the column sum of a weight's sign bit (the **virtual bit-lines**);
* the partial result of the input's sign bit (the **virtual input segments**).

The periphery reuses that value in a few extra rounds of a small adder loop. A run-time
configuration switches between signed and unsigned data and between data sizes, with the same
hardware and the same data layout.

## Data layout and what one operation computes

* The crossbar has `ROWS` × `COLS` one-bit cells: 256 × 256 by default.
* One ADC serves `COLS_PER_ADC` neighbouring bit-lines: 8 by default, so 32 ADCs.
* Each row holds one element of the multiplicand (the *array data*) in every ADC group.
  Bit `c` of the element is stored on bit-line `c` of the group.
* Row `r` is multiplied by the multiplier element `x_r` (the *input data*). `x_r` is held in the
  row data buffer.

One operation computes, for every ADC group `u`,

    result[u] = Σ_r  x_r · w_{r,u}

This is one output row of a matrix-matrix product, 32 output elements at a time. `x` and `w`
may each be signed or unsigned, 1 to 16 bits wide. Elements of up to 8 bits use one ADC.
Elements of 9 to 16 bits use an even/odd pair of ADCs (see *Numbers wider than one ADC*).

The input is applied one bit per analog step, least significant bit first. A step works as
follows:

1. The buffer presents bit `s` of every row to the 1-bit row drivers.
2. After the read time (10 cycles at 1 GHz), the sample-and-hold circuits capture all bit-lines.
3. Each ADC converts its 8 bit-lines, one per cycle.

A bit-line level is the number of rows whose input bit and cell are both 1.

## The addition unit: shifting without shifters

Each ADC feeds one addition unit. The unit turns the stream of column counts into the result
through three stages. Each stage is a loop of an adder and a register, and each loop gets its
weighting for free.

**Stage 2, over the columns of a number.** Column `c` has weight `2^c`. The loop does not shift
the count left; it moves the partial sum right instead:

    sum      = ADC register + R1temp        (CW+1 bits)
    R2temp[c] = sum[0]                       (this bit is final)
    R1temp   = sum >> 1

After the last column, R1temp is copied above the collected bits, and R2temp holds
`Σ_c 2^c · count_c`. The adder stays `CW + 1` bits wide. Here CW = log2(rows) = 8 bits, the ADC
width. The straightforward design would need an adder as wide as the whole partial result and
a shifter with a variable shift amount.

**Stage 3, over the input bits.** This is the same loop, one level up. R2temp of input bit `s`
is added to R3temp in an adder of `R2W + 1` bits, where R2W = 8 + 8 = 16. Bit 0 of the sum goes
to R4temp[s] and the rest stays in R3temp.

**Stage 1, over row groups.** This stage is needed only if not all rows can be activated
together, for example when the ADC resolution is too small. The rows are then activated in
groups, and the unit keeps one register per bit-line. A mux, an adder and a demux add each
group's conversion into that register. The final sum becomes the ADC register that stage 2
reads. With one group (the default), stage 1 is just the ADC register.

## Signed data: virtual bit-lines and virtual input segments

This is the part of the design that needs the most care.

**Signed weights.** A two's complement weight of `k` bits, sign-extended to the output width,
repeats its bit `k-1` in every higher column. So every virtual column has the same count as
column `k-1`, and that count is still in the ADC register after the last real column. Stage 2
therefore runs `e2` more rounds without a new conversion:

    e2 = log2(rows summed)          (8 for 256 rows)

A sum of `N` signed `k`-bit numbers fits in `k + log2 N` bits. So after `k + e2` rounds, the
collected bits are the exact two's complement partial sum. R2temp is sign-extended from there,
and whatever is left in R1temp would only repeat the sign. More rounds are never needed: the
remaining sign-extension columns (up to the full product width) only repeat the most significant
bit, which the sign extension of R2temp supplies.

Example with three rows, each holding `w = 100₂ = −4` and input bit 1. The column counts are
0, 0, 3, and `k = 3`, `e2 = 2`.

| round         | ADC reg | R1temp before | sum | bit to R2temp | R1temp after |
|---------------|---------|---------------|-----|---------------|--------------|
| column 0      | 0       | 0             | 0   | 0             | 0            |
| column 1      | 0       | 0             | 0   | 0             | 0            |
| column 2      | 3       | 0             | 3   | 1             | 1            |
| virtual 1     | 3       | 1             | 4   | 0             | 2            |
| virtual 2     | 3       | 2             | 5   | 1             | 2            |

R2temp = `10100₂` = −12 = 3 × (−4).

**Signed inputs.** Likewise, the input bits above bit `m-1` all equal the sign bit. Their
partial sums equal that of bit `m-1`, and that partial sum is still in R2temp. Stage 3 runs `e3`
extra rounds with no analog step at all. The numbers come from

    S_out = k + m + log2(rows)      (output width, 24 for 8-bit data and 256 rows)
    e3    = S_out − m

R4temp then holds `S_out` bits of a two's complement result, which are sign-extended.

**Signed partial sums in stage 3.** When the weights are signed, R2temp is signed. Both adder
operands then get a 1-bit sign extension, and R3temp keeps the shifted sum as a two's complement
number. This is what lets a 17-bit stage-3 adder replace the 24-bit one that the full sign
extension would need.

The four combinations of signed and unsigned weights and inputs all use the same hardware. Only
these change:

* the round counts `e2` and `e3`;
* whether R2temp and R4temp are sign-extended;
* whether the stage-3 operands are sign-extended.

The price of the scheme is latency. For 8-bit signed weights, every input bit costs 8 extra
stage-2 cycles. For signed inputs, each operation adds 16 stage-3 cycles. No extra array area,
analog steps or ADC conversions are needed.

## Numbers wider than one ADC (stage 4)

A 9- to 16-bit weight is stored over two neighbouring ADC groups:

* The lower group holds bits 0–7, which are plain unsigned bits. Its unit runs without virtual
  bit-lines or stage-3 sign extension.
* The upper group holds the rest, including the sign bit. Its unit applies the virtual
  bit-lines.

Both units run the same virtual input segments. Their results differ in weight by 8 bits. The
stage-4 combiner adds them in the same style as the other stages:

    sum = R4temp(unit) + Rfinal_temp
    the low 8 bits go to Rfinal
    the shifted rest stays in Rfinal_temp
    the last sum fills the top of Rfinal

This needs a 41-bit adder instead of a 48-bit one. The tile chooses this mode by itself whenever
`mpd_bits > COLS_PER_ADC`. The combined results then appear on `pair_result`.

## Configuration (`cim_pkg::cim_cfg_t`)

| field        | meaning                                                                   |
|--------------|---------------------------------------------------------------------------|
| `mpd_bits`   | multiplicand (weight) width, 1–16                                         |
| `mpr_bits`   | multiplier (input) width, 1–16                                            |
| `mpd_signed` | weights are two's complement                                              |
| `mpr_signed` | inputs are two's complement                                               |
| `log2_rows`  | ceil(log2(number of rows holding data)); sets `e2` and `S_out`            |
| `act_log2`   | log2(rows activated per analog step); `ROWS >> act_log2` row groups       |

Rows that hold no data must be 0 in the row data buffer.

## Interface of `cim_tile` and timing

| port                                      | use                                                         |
|-------------------------------------------|-------------------------------------------------------------|
| `prog_en, prog_row, prog_data[COLS]`      | write one row of cells per cycle                            |
| `buf_wr_en, buf_wr_row, buf_wr_data[16]`  | write one row of the row data buffer per cycle             |
| `start, cfg`                              | start an operation (ignored while `busy`)                   |
| `busy, done`                              | `done` pulses on the last busy cycle                        |
| `unit_result[32]` (40 bits)               | one result per ADC, for weights of up to 8 bits             |
| `pair_result[16]` (48 bits)               | results of ADC pairs, for 9- to 16-bit weights              |
| `cycles`                                  | busy cycles of the last operation                           |

Results are sign-extended when either operand is signed. They stay valid until the next
`start`. Reset is asynchronous and active low. It clears the periphery, but not the crossbar
cells or the row data buffer.

The controller runs strictly sequentially. With `M = mpr_bits`, `NG` row groups and
`KS = min(mpd_bits, 8)` (8 when split), an operation takes this many busy cycles:

    1 + M·(NG·(READ_CYC+1) + (NG−1)·KS + KS + 1 + e2 + 2) + e3 + 1 + (split ? 2 : 0)

* 8-bit signed × 8-bit signed over 256 rows: 8·(11 + 9 + 8 + 2) + 16 + 2 = 258 cycles.
* Signed weights with unsigned inputs: 242 cycles.
* Both unsigned: 178 cycles.

## Blocks

| file                        | block                                                                  |
|-----------------------------|------------------------------------------------------------------------|
| `cim_pkg.sv`                | configuration and control-word types                                   |
| `cim_tile.sv`               | top: wiring, per-unit configuration, stage-4 pairs, cycle counter      |
| `tile_controller.sv`        | state machine issuing the per-cycle control word                       |
| `row_data_buffer.sv`        | input buffer, one row per crossbar row, one bit position out           |
| `crossbar_array.sv`         | behavioural model: 1T1R array with 1-bit row drivers                   |
| `sample_hold.sv`            | behavioural model: one S&H per bit-line                                |
| `adc.sv`                    | behavioural model: 8-bit ADC shared by 8 bit-lines, saturating         |
| `stage1_row_accum.sv`       | per-bit-line accumulation over row groups, ADC register               |
| `stage2_column_slide.sv`    | R1temp/R2temp loop, virtual bit-lines                                  |
| `stage3_segment_slide.sv`   | R3temp/R4temp loop, virtual input segments                             |
| `addition_unit.sv`          | stages 1–3 for one ADC                                                 |
| `stage4_combine.sv`         | Rfinal_temp/Rfinal loop for numbers spread over several ADCs           |

The crossbar, the sample-and-hold and the ADC are analog in a real tile. They are modelled at
the level of counts: a bit-line level is an integer count of conducting cells. Variation, HRS
leakage, IR drop, settling and programming time are not modelled. The row drivers and the
programming drivers have no model of their own: they appear as the crossbar's `row_in`, `row_act`
and `prog_*` ports. All other files are synthesizable RTL.

## Where this design makes its own choices

* **Cells and drivers.** One bit per cell and 1-bit row drivers are built in. Multi-level cells
  and multi-bit input segments are not supported: with them, the virtual bit-lines would no
  longer be plain copies of a column.
* **ADC range.** The ADC has 8 bits, but a bit-line of 256 rows can reach 256. The ADC
  saturates, so results are exact only while no bit-line count exceeds 255. This can only happen
  if every row has both input bit and cell at 1. To avoid it, activate the rows in two groups
  (`act_log2 = 7`), or leave one row empty.
* **Widths.** The largest data width (16) and the result widths (40 and 48 bits) are choices of
  this design. The stage-1 and stage-2 register widths (8) and R2temp/R3temp (16) follow the
  sizing rule log2(rows) + data width.
* **Schedule.** The controller does not overlap the next analog step with stage-2 and stage-3
  work, and it does not overlap stage 4 with the lower stages. An overlapping schedule would be
  faster; the results would be the same.
* **Row groups.** Row groups are contiguous blocks of `2^act_log2` rows.
* **ADC pairing.** Numbers wider than one ADC always use an even/odd pair of neighbouring ADCs.
* **Tiling.** The tile computes one matrix-vector product of up to 256 rows. Larger matrices
  need several tiles or several programming passes, and adding their partial results is outside
  the tile. For the workloads such a tile is meant for (an MNIST MLP, 784-80-60-10; Polybench
  gemm and 3m with 8-bit data), the data types fit but the matrices do not fit in one tile.
  Layer 1 of the MLP alone needs 12 tile loads, gemm 175 and 3m 116.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Use any testbench, for example:

    verilator --binary --timing --assert -Irtl rtl/cim_pkg.sv tb/tb_cim_tile.sv \
              --top-module tb_cim_tile -o sim
    ./obj_dir/sim

* **`tb_cim_tile`** runs the whole tile at a reduced size: 16 × 32 array, 4 bit-lines per ADC,
  8-bit data. It covers all four signedness combinations, multi-step row activation, partly
  filled arrays, split numbers through stage 4 and random configurations. It checks every result
  against a directly computed sum of products, and every cycle count against the formula above.
  It also counts the virtual bit-line rounds, virtual input rounds, row-group steps, stage-4
  steps and signed/unsigned switches, and fails if any of them never happened.
* **`tb_cim_tile_full`** runs the tile at its default size (256 × 256, 32 ADCs). It runs 8-bit
  signed × 8-bit signed, then 8-bit signed weights × 8-bit unsigned inputs, over all 256 rows.
  It takes about ten seconds.
* **`tb_mnist_mlp`** pushes one image through a 784-80-60-10 perceptron at full size: 15 tile
  loads, 8-bit unsigned pixels, then binary activations (`mpr_bits = 1`). The weights are
  random. The testbench adds the partial sums across tiles and checks each layer against a
  direct computation.
* **`tb_polybench_gemm`** runs a 6 × 300 by 300 × 40 signed 8-bit matrix product at full size.
  It has two row blocks, one of them partly filled, and two column blocks. It also checks the
  cycle count of each operation.
* The other testbenches check one block each against an independent reference. The stage
  testbenches use their own sequencers, not the tile controller.
