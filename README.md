# Cross-check test for an infrared focal-plane-array readout

A focal plane array (FPA) is a detector array bonded to a CMOS readout chip. To test it one cell
at a time you need M·N measurements for M columns and N rows, and that gets too slow as arrays
grow. The cross-check test gets the count down to M + N. Turn on every column and one row, and the
output current is the sum of that row's M cells. Turn on every row and one column, and you get the
sum of that column's N cells. A faulty cell at column i, row j then shows up twice: as a wrong row
sum for row j and as a wrong column sum for column i. The faulty cell is the crossing of the two.

All the readout chip needs for this is select shift registers that can be preset (all lines on) as
well as cleared and loaded with a single token. Each unit cell also has a built-in current source.
Before bonding, that source stands in for the detector, so the chip and the test scheme can be
exercised without a sensor.

This RTL models the readout chip at the size of the 4 × 4 demonstration chip. It adds a digital
test controller that runs the procedure and interprets the results.

## Blocks

| file | role | kind |
|---|---|---|
| `rtl/fpa_pkg.sv` | shared enums (shift-register command, measurement kind, test mode) and default sizes | package |
| `rtl/sel_shift_reg.sv` | cyclic select shift register with shift, serial load, clear, preset | synthesizable |
| `rtl/fpa_unit_cell.sv` | unit cell: bump pad, built-in current source, readout, row switch | behavioural (real currents) |
| `rtl/column_switches.sv` | column MOS switches summing the selected column lines | behavioural |
| `rtl/fpa_readout_chip.sv` | row decoder + column selector + N × M cells (the readout chip) | behavioural around synthesizable registers |
| `rtl/cross_check_sequencer.sv` | drives both registers for a normal scan or a cross-check and samples the meter | synthesizable |
| `rtl/cross_check_analyzer.sv` | compares samples with the expected value, crosses failing rows and columns | synthesizable |
| `rtl/fpa_cross_check_top.sv` | chip + sequencer + analyzer | top |

In the analog parts, currents are SystemVerilog `real` values in amperes. The detector pixels and
the bench current meter are outside the design. The top takes the detector currents as `i_bump`
(index `r*M + c`), puts the chip's output current out on `i_out`, and takes the meter's code back
on `meas_code`. `tb/current_meter.sv` is a meter model that rounds `i_out / LSB`.

## Select shift registers

The row decoder and the column selector are each one `sel_shift_reg` (N and M stages), and each
stage output is one select line. Each clock applies one command:

| command | effect |
|---|---|
| `SR_SHIFT` | rotate by one stage, last stage wraps into stage 0 (normal scan) |
| `SR_LOAD` | shift, with `din` entering stage 0 (places a token after a clear) |
| `SR_CLEAR` | all lines off |
| `SR_PRESET` | all lines on (selects every row or every column) |
| `SR_HOLD` | keep |

The new pattern appears one clock after the command. `rst_n` clears all stages asynchronously.
This design's choices: the serial form of load and making clear and preset synchronous commands.

## Test sequence and timing

`cross_check_sequencer` runs one of two tests.

- **Normal scan** (`MODE_NORMAL`): it clears both registers, then loads a token into each. The
  column token steps every measurement and the row token steps once per column wrap, for M·N
  single-cell measurements.
- **Cross-check** (`MODE_CROSS`), phase 1: the column register is preset and a row token is
  stepped through the N rows, giving the row sums.
- **Cross-check**, phase 2: the row register is preset and a column token is stepped through the
  M columns, giving the column sums.

After each pattern change the sequencer waits `SETTLE` clocks, which stand for the analog settling
time. It then samples `meas_code` and emits a record on the next clock: `meas_valid`, `meas_kind`
(`MK_CELL`/`MK_ROW`/`MK_COL`), `meas_row`, `meas_col` and `meas_value`. Clocks from the edge that
accepts `start` to the first clock with `done` high:

- normal scan: `M*N*(SETTLE+2) + 2`. At the defaults (4 × 4, `SETTLE = 4`) that is 98.
- cross-check: `(N+M)*(SETTLE+2) + 3`. At the defaults that is 51.

`done` lasts one clock. `busy` is high from the accepted `start` through `done`, and a `start`
while busy is ignored. Assertions in the top check that every record had the select pattern its
kind requires.

## Fault location and its limits

`cross_check_analyzer` compares every record with its expected code:

- `unit_code` for a cell;
- `M*unit_code` for a row;
- `N*unit_code` for a column.

Any deviation larger than `tol` marks that cell, row or column as failing. The results are valid
from `done` until the next `start`:

- `cell_fail`: the failing cells of a normal scan.
- `row_fail`, `col_fail`: the failing rows and columns of a cross-check.
- `candidates`: every crossing of a failing row with a failing column.
- `single_fault`: exactly one row and one column fail. `fault_row` and `fault_col` then give the
  faulty cell.
- `multi_fault`: more than one row or column fails. The candidates then include crossings that may
  be healthy, so the faulty cells are not located uniquely.
- `inconsistent`: rows fail but no column does, or the reverse. This happens when two faulty cells
  in one row or column have deviations that cancel in that line's sum.

The scheme is exact for a single faulty cell. With several faulty cells it is only a screen.
`unit_code` is expected from the tester, for instance one cell's code from a normal scan. The
single tolerance window used for every kind of measurement is this design's choice.

## Departures and assumptions

- The test procedure is run by a digital sequencer. In the original scheme it is applied from
  outside by test equipment: the steps, their order and their counts are the scheme's, while the
  state machine, settling wait, record format and cycle counts are this design's own.
- The unit cell's readout circuit is an ideal current follower. The built-in source is 10 nA by
  default (`I_SRC`), and `cs_en` enables all sources. A cell whose source has been cut is modelled
  with the `DAMAGED_MASK` parameter, because the real cell has no pin for it.
- Column switches are ideal, and the output node adds the currents of all selected column lines.
- The 16-bit code width, the meter resolution used in the testbenches (0.1 nA per code, so 100 per
  cell) and `SETTLE = 4` are all assumed.
- Only the registers, sequencer and analyzer are synthesizable. The cell array is real-valued, so
  the top as a whole is a simulation model.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops at a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/fpa_pkg.sv tb/tb_fpa_cross_check_top.sv --top-module tb_fpa_cross_check_top
./obj_dir/Vtb_fpa_cross_check_top
```

| testbench | what it checks |
|---|---|
| `tb_sel_shift_reg` | token scan with wrap, preset, clear/load, random commands against a model, async reset |
| `tb_fpa_unit_cell`, `tb_column_switches` | current models against direct formulas |
| `tb_fpa_readout_chip` | select lines and output current for cell, row, column and random patterns, with one damaged cell |
| `tb_cross_check_sequencer` | record order and contents, M·N against N + M counts, clock counts, settling, start ignored while busy |
| `tb_cross_check_analyzer` | masks, candidates and flags for single, multiple, cancelling and random faults |
| `tb_fpa_cross_check_top` | end to end (see below) |
| `tb_fpa_full_size` | the top at its defaults: calibrate the unit code from a normal scan, fault-free cross-check, then normal scan and cross-check with one faulty pixel |

The end-to-end testbench uses a harness, `tb/fpa_bench.sv`, which recomputes every measurement and
result from the cell currents. It runs three arrays: 4 × 4, 4 × 4 with a damaged source, and
5 rows × 6 columns. It first tests with the built-in sources before bonding, then with detector
currents. The faults it injects are one weak pixel, a second fault elsewhere, and two faults that
cancel. At the end it checks that each mechanism occurred at least once: normal scan, cross-check,
mode switch, built-in source, detector current, single fault located, damaged source located,
multiple faults, cancelling faults, and a faulty cell in a normal scan.

To change the array size, set `M` and `N` on `fpa_cross_check_top`. The registers, sequencer and
analyzer are fully parameterized.
