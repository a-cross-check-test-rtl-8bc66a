// fpa_cross_check_top: focal-plane-array readout chip together with its
// cross-check test controller.
//
// The readout chip (row decoder, column selector, N x M unit cells with
// built-in current sources) puts the summed current of its selected cells
// on i_out. An external current meter converts i_out to meas_code. The
// sequencer sets the select patterns for each test and samples meas_code;
// the analyzer compares each sample with the expected multiple of one
// cell's current and crosses failing rows and columns to locate faulty
// cells. A normal scan takes M*N measurements, the cross-check test N + M.
//
// Interface: start with mode (MODE_NORMAL or MODE_CROSS) begins a test when
// busy is low; done pulses at the end and result_valid then stays high until
// the next start. cs_en turns on the built-in current sources (used before
// the detector is bonded). i_bump[r*M + c] is the current of the detector
// pixel bonded to row r, column c. unit_code is the expected code of one
// cell, tol the allowed deviation of any measurement. The measurement
// records, the select lines and the analyzer's results are brought out.
// Timing is that of cross_check_sequencer.
//
// The chip's structure and the test procedure follow the cross-check
// scheme; the digital test controller, the meter interface and the result
// flags are this design's choices. The chip's cell array is a behavioural
// model, so this top is not synthesizable as a whole; the sequencer,
// analyzer and shift registers are.
module fpa_cross_check_top
  import fpa_pkg::*;
#(
  parameter int unsigned  M            = M_COLS,
  parameter int unsigned  N            = N_ROWS,
  parameter int unsigned  SETTLE       = 4,
  parameter int unsigned  CODE_W       = MEAS_CODE_W,
  parameter real          I_SRC        = 10.0e-9,
  parameter bit [N*M-1:0] DAMAGED_MASK = '0,
  localparam int unsigned RW           = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW           = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW           = $clog2(M*N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  test_mode_t        mode,
  input  logic              cs_en,
  input  real               i_bump [N*M],
  output real               i_out,
  input  logic [CODE_W-1:0] meas_code,
  input  logic [CODE_W-1:0] unit_code,
  input  logic [CODE_W-1:0] tol,
  output logic              busy,
  output logic              done,
  output logic [NW-1:0]     meas_count,
  output logic              meas_valid,
  output meas_kind_t        meas_kind,
  output logic [RW-1:0]     meas_row,
  output logic [CW-1:0]     meas_col,
  output logic [CODE_W-1:0] meas_value,
  output logic [N-1:0]      row_sel,
  output logic [M-1:0]      col_sel,
  output logic              result_valid,
  output logic [N*M-1:0]    cell_fail,
  output logic [N-1:0]      row_fail,
  output logic [M-1:0]      col_fail,
  output logic [N*M-1:0]    candidates,
  output logic              single_fault,
  output logic [RW-1:0]     fault_row,
  output logic [CW-1:0]     fault_col,
  output logic              multi_fault,
  output logic              inconsistent
);

  sr_cmd_t row_cmd, col_cmd;
  logic    row_din, col_din;

  fpa_readout_chip #(
    .M           (M),
    .N           (N),
    .I_SRC       (I_SRC),
    .DAMAGED_MASK(DAMAGED_MASK)
  ) u_chip (
    .clk    (clk),
    .rst_n  (rst_n),
    .row_cmd(row_cmd),
    .row_din(row_din),
    .col_cmd(col_cmd),
    .col_din(col_din),
    .cs_en  (cs_en),
    .i_bump (i_bump),
    .i_out  (i_out),
    .row_sel(row_sel),
    .col_sel(col_sel)
  );

  cross_check_sequencer #(
    .M     (M),
    .N     (N),
    .SETTLE(SETTLE),
    .CODE_W(CODE_W)
  ) u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .mode      (mode),
    .meas_code (meas_code),
    .row_cmd   (row_cmd),
    .row_din   (row_din),
    .col_cmd   (col_cmd),
    .col_din   (col_din),
    .meas_valid(meas_valid),
    .meas_kind (meas_kind),
    .meas_row  (meas_row),
    .meas_col  (meas_col),
    .meas_value(meas_value),
    .busy      (busy),
    .done      (done),
    .meas_count(meas_count)
  );

  cross_check_analyzer #(
    .M     (M),
    .N     (N),
    .CODE_W(CODE_W)
  ) u_ana (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (start && !busy),
    .meas_valid  (meas_valid),
    .meas_kind   (meas_kind),
    .meas_row    (meas_row),
    .meas_col    (meas_col),
    .meas_value  (meas_value),
    .unit_code   (unit_code),
    .tol         (tol),
    .test_done   (done),
    .result_valid(result_valid),
    .cell_fail   (cell_fail),
    .row_fail    (row_fail),
    .col_fail    (col_fail),
    .candidates  (candidates),
    .single_fault(single_fault),
    .fault_row   (fault_row),
    .fault_col   (fault_col),
    .multi_fault (multi_fault),
    .inconsistent(inconsistent)
  );

  // The select patterns of a measurement follow the scheme: one row and one
  // column (cell), one row and every column (row), every row and one column
  // (column).
  a_row_pattern: assert property (@(posedge clk) disable iff (!rst_n)
    meas_valid && meas_kind == MK_ROW |-> $past(col_sel) == '1 && $onehot($past(row_sel)));
  a_col_pattern: assert property (@(posedge clk) disable iff (!rst_n)
    meas_valid && meas_kind == MK_COL |-> $past(row_sel) == '1 && $onehot($past(col_sel)));
  a_cell_pattern: assert property (@(posedge clk) disable iff (!rst_n)
    meas_valid && meas_kind == MK_CELL |-> $onehot($past(row_sel)) && $onehot($past(col_sel)));

endmodule
