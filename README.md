# FeFET XNOR-crossbar engine for binary convolution layers

This engine runs a binary convolution layer, with weights and activations
both in {+1, -1}, on a crossbar whose cells compute the product themselves.
Each cell stores one weight bit in a pair of ferroelectric FETs (FeFETs).
It conducts onto its column line exactly when the input bit on its row equals
that weight, which is an XNOR. The current on a column is then a popcount, and
the popcount gives the ±1 inner product of one input window with one filter.

A real layer rarely fits in one array: a VGG-16 layer needs 4608 × 512 cells
against 64 × 64. So the engine cuts the layer into array-sized tiles. It
programs a tile once and then reuses it for **S consecutive convolution
windows** ("strided moves") before it reprograms the array. Each of those S
windows keeps its own row of partial-sum registers. Programming costs one
cycle per column and reading costs one cycle per window, so the order of
computation sets the run time almost alone. S is the knob that trades
register area against reprogramming.

The RTL is SystemVerilog-2017. The analog parts are behavioural models: the
FeFET cell, the column current summation, the current-to-voltage
comparator and the ADC. Everything digital is synthesizable.

## Binary arithmetic used throughout

A ±1 value is coded as a bit: 1 for +1, 0 for −1. For a window slice `x` and
a filter slice `w` of K rows, `c = popcount(XNOR(x, w))` and the ±1 inner
product is `2c − K`. A layer's output bit is `sum ≥ θ`. Here θ is a signed
per-output-channel threshold that folds in batch normalization, and θ = 0 is
the plain sign, with 0 mapped to +1.

The unrolled window of output pixel `pix` has `K = Cin·WF·HF` rows. A fully
connected layer is the case WF = HF = 1 with a single output pixel. The engine
does not care how they are ordered. The testbenches use row
`u = (p·HF + q)·Cin + c` for filter tap (p, q) and channel c.

## The cell and the array (`fefet_xnor_cell`, `fefet_crossbar`, `fefet_line_driver`)

Lines of the M × N array:

| line | runs along | carries |
|---|---|---|
| HL, HLb | row | input bit and its inverse |
| BL, BLb | row | write data / read gate voltage |
| WL | column | column select (write), VDD (read) |
| VL | column | summed cell current (read) |

The array has two line schemes. `fefet_pkg::line_level_e` encodes the levels,
and `fefet_line_driver` produces them:

| operation | HL | HLb | WL | BL | BLb |
|---|---|---|---|---|---|
| read | in | ~in | VDD (all) | VR | VR |
| write 1 | 0 | 0 | +VWL selected, −VWL others | +VW | −VW |
| write 0 | 0 | 0 | +VWL selected, −VWL others | −VW | +VW |

Writes go one column per cycle. HL and HLb are held at 0 V during a write,
so no drain current flows and unselected cells see no disturbance. The driver
also grounds HL and HLb on rows beyond the current tile's length, so those
rows carry no current on a short last tile. This masking is a choice made in
this design.

The cell model keeps its weight in a level-sensitive latch that stands for
the nonvolatile polarization. The 4096 latches that synthesis reports in the
array are therefore intended. The cell's VL output is one unit of current.
The array's `vl_count[j]` is the number of conducting cells in column j.
Voltages, currents, delay and power are not modelled.

## The column interface (`interface_column`)

Every column ends in one interface, and there are two ways to binarize its
current:

* **Direct path** (`iv_comparator`): a current-to-voltage op-amp and a
  comparator. Vref is set to `ceil((K + θ)/2)` cell currents, so the output
  is `2c − K ≥ θ`. This path is used when the whole window fits in M rows.
* **Accumulation path**, used when the window is split into row tiles:
  * `column_adc` converts the current to `2c − K`. Its offset point is K and
    its step is half a cell current.
  * `psum_adder` adds that code to the register row of the window, or to 0
    on the window's first row tile. The adder saturates. There is one adder
    per column.
  * `psum_regs` holds S signed registers of `ACC_W` bits per column.
  * On the last row tile, `binarizer` compares the new sum with θ.

A MUX picks the path, and the chosen bit is registered. It appears one cycle
after the read that completed the window.

## Tiling and the strided-move order (`stride_controller`)

With `row_tiles = ceil(K/M)`, `col_tiles = ceil(Cout/N)` and `npix = WO·HO`,
the controller runs this loop nest:

```
for ct in col_tiles                      // N output channels at a time
  for g in ceil(npix/S) groups           // S windows share one tile program
    for rt in row_tiles                  // M rows of the window at a time
      program N columns (1 cycle each)   // weight request (ct, rt, col)
      read each window of the group      // input request (pix, rt); partial
                                         //   sum of slot s in register row s
```

The number of busy cycles is exactly

```
col_tiles · row_tiles · (npix + ceil(npix/S) · N)
```

With S = 1 this order is the "vertical move": every window reprograms the
tile, which takes `col_tiles·row_tiles·npix·(1+N)` cycles. The last column
tile is programmed in full even when Cout is not a multiple of N. Its extra
columns give don't-care outputs.

These counts come from simulating a layer with Cin = 16, 3×3 filters,
Cout = 64 and 8×8 outputs on the 64×64 array:

| S | 1 | 2 | 4 | 8 | 16 | 32 | 64 |
|---|---|---|---|---|---|---|---|
| cycles | 12480 | 6336 | 3264 | 1728 | 960 | 576 | 384 |
| column writes | 12288 | 6144 | 3072 | 1536 | 768 | 384 | 192 |

The register area grows as S·N·B bits. The default, S = 16, is where the
energy-delay-area product of this structure is lowest.

## The partial-sum width, and what it costs

The default partial-sum width is B = `ACC_W` = 6 bits, which holds sums from
−32 to 31. One 64-row tile alone can already give a code of ±64, so for
deep windows the running sum often saturates. The adder saturates rather than
wrapping, which keeps the sign as long as the sum stays in range.

The VGG-16 workload test (Cin = Cout = 512, 3×3 filters, 32×32 outputs,
random data) shows the effect. About 98 % of the output bits pass through a
saturated sum, and only about 74 % equal the sign of the exact sum. The
engine matches a bit-exact model of its saturating arithmetic on every
output.

For exact results, set `ACC_W ≥ clog2(K)+2`; 15 bits covers K = 4608.
Register area and energy grow linearly with `ACC_W`. The reduced end-to-end
test uses `ACC_W = 12`, and its results are exact.

## Top level (`fefet_bcnn_accel`)

The input and output buffers around the array are outside this RTL. The top
instead exposes request/response ports that the surrounding system answers
**combinationally, in the same cycle**.

| port | dir | meaning |
|---|---|---|
| `start`, `cfg_k`, `cfg_cout`, `cfg_npix` | in | start a layer; K = Cin·WF·HF, Cout, npix = WO·HO (16 bits each, non-zero); sampled in the start cycle while idle |
| `busy`, `done` | out | busy for the cycle count above; `done` pulses one cycle afterwards |
| `wt_valid`, `wt_ctile`, `wt_rtile`, `wt_col` → `wt_bits[M]` | out/in | bit r = weight of unrolled row `rt·M + r` of filter `ct·N + col` |
| `in_valid`, `in_pix`, `in_rtile` → `in_bits[M]` | out/in | bit r = unrolled row `rt·M + r` of window `pix` |
| `cur_ctile` → `theta[N]` | out/in | signed thresholds of the channels of the current column tile |
| `out_valid`, `out_pix`, `out_ctile`, `out_bits[N]` | out | result bits of one output pixel for N channels |
| `weights[N]` | out | stored array contents (observation) |

Reset is active-low and asynchronous. An assertion in the controller
requires a non-empty layer at `start`.

Parameters, with their defaults:

| parameter | default | meaning |
|---|---|---|
| `M` | 64 | array rows |
| `N` | 64 | array columns |
| `S` | 16 | partial-sum register rows |
| `ACC_W` | 6 | partial-sum width B |

The package also fixes the 16-bit geometry and threshold fields (`GEOM_W`,
`THR_W`).

## What is modelled and what is this design's own

Taken from the published design:
* the two-FeFET XNOR cell;
* the row/column organisation of the array;
* the read and column-write line levels;
* the two-path column interface (comparator, or ADC + shared adder +
  registers + binarization, then a MUX);
* the tiling and the strided-move order, with its cycle count;
* the defaults M = N = 64, S = 16 and B = 6.

Choices made in this design:
* the unit-current abstraction of the cells;
* the ADC scaling, with the code equal to `2c − K`;
* the batch-normalization threshold θ, applied through Vref on the direct
  path and in the binarizer on the ADC path;
* saturation in the adder;
* grounding HL and HLb to mask unused rows;
* the register-file ports, reset and one-cycle output latency;
* the order of the two outer loops;
* the combinational request/response interface in place of buffers.

Not modelled:
* device physics, voltages, power, delay and wire parasitics;
* the input/output buffers;
* multi-array systems;
* FeFET-based nonvolatile adders.

## Files

`rtl/`:

| file | contents |
|---|---|
| `fefet_pkg.sv` | line-level and mode enums, field widths |
| `fefet_xnor_cell.sv` | cell model (behavioural) |
| `fefet_crossbar.sv` | M × N array model (behavioural) |
| `fefet_line_driver.sv` | read/write line levels |
| `iv_comparator.sv` | direct path (behavioural) |
| `column_adc.sv` | ADC (behavioural) |
| `psum_adder.sv` | saturating adder |
| `psum_regs.sv` | S partial-sum registers |
| `binarizer.sv` | threshold compare |
| `interface_column.sv` | one column interface |
| `stride_controller.sv` | tile sequencer |
| `fefet_bcnn_accel.sv` | top |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`), plus:

| testbench | what it runs |
|---|---|
| `tb_fefet_bcnn_accel.sv` | three small conv layers and one fully connected layer at reduced size, exact sums |
| `tb_fefet_bcnn_accel_full.sv` | two layers at default parameters |
| `tb_vgg16_conv_layer.sv` | the full VGG-16 layer: 2,949,120 cycles, 29.5 ms at 100 MHz, about a minute of simulation |
| `tb_register_row_sweep.sv` | seven engines, S = 1 to 64 |

Each testbench prints `TB_RESULT checks=N failures=F` and has a cycle
watchdog. The layer tests also check the busy-cycle count. They count every
mechanism they exercise (programming, tile reuse, both interface paths,
masked rows, short groups and tiles, non-zero thresholds, saturation) and
fail if one never occurred.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fefet_bcnn_accel \
  -y rtl -y tb +libext+.sv rtl/fefet_pkg.sv tb/tb_fefet_bcnn_accel.sv
./obj_dir/Vtb_fefet_bcnn_accel
```

Replace the top-module name to run another testbench. All data comes from
`$urandom`, and no files are read. To try another array size, register count
or width, override `M`, `N`, `S` or `ACC_W` on `fefet_bcnn_accel`. The layer
geometry is a runtime input.
