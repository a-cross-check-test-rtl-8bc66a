// cross_check_analyzer: judges the measured currents of a test and crosses
// the row and column results to locate faulty cells.
//
// Every measurement record is compared with its expected code: unit_code
// for a single cell, M*unit_code for a full row (all M columns on) and
// N*unit_code for a full column (all N rows on). A record whose value
// differs from the expectation by more than tol marks that cell, row or
// column as failing. A cell is a candidate when both its row and its
// column fail; when exactly one row and one column fail the fault is
// located uniquely (single_fault, fault_row, fault_col). If several rows
// or columns fail, the candidates cover every crossing (multi_fault). If
// rows fail but no column does, or the reverse, the row and column
// results contradict each other (inconsistent): faulty cells in one line
// whose deviations cancel can hide from that line's measurement.
//
// Interface: clear (one clock, at the start of a test) resets all results.
// Records arrive on meas_valid. test_done (one clock, after the last
// record) sets result_valid, which stays high until the next clear. The
// masks are combinational from the stored results, so they are ready with
// result_valid. Cell r, column c is bit r*M + c of cell_fail and
// candidates. unit_code and tol must be stable during a test.
//
// The expected values (M or N times one cell's current) and the crossing of
// failing rows and columns follow the cross-check scheme; the tolerance
// window, the flags and the result interface are this design's choices.
module cross_check_analyzer
  import fpa_pkg::*;
#(
  parameter int unsigned M      = M_COLS,
  parameter int unsigned N      = N_ROWS,
  parameter int unsigned CODE_W = MEAS_CODE_W,
  localparam int unsigned RW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW    = (M > 1) ? $clog2(M) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              meas_valid,
  input  meas_kind_t        meas_kind,
  input  logic [RW-1:0]     meas_row,
  input  logic [CW-1:0]     meas_col,
  input  logic [CODE_W-1:0] meas_value,
  input  logic [CODE_W-1:0] unit_code,
  input  logic [CODE_W-1:0] tol,
  input  logic              test_done,
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

  // Wide enough for max(M, N) * unit_code and a sign.
  localparam int unsigned XW = CODE_W + $clog2((M > N ? M : N) + 1) + 1;

  logic signed [XW-1:0] expected;
  logic signed [XW-1:0] diff;
  logic                 out_of_tol;

  always_comb begin
    unique case (meas_kind)
      MK_ROW:  expected = XW'(M) * XW'(unit_code);
      MK_COL:  expected = XW'(N) * XW'(unit_code);
      default: expected = XW'(unit_code);
    endcase
    diff       = XW'(meas_value) - expected;
    out_of_tol = ((diff < 0) ? -diff : diff) > XW'(tol);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_fail    <= '0;
      row_fail     <= '0;
      col_fail     <= '0;
      result_valid <= 1'b0;
    end else if (clear) begin
      cell_fail    <= '0;
      row_fail     <= '0;
      col_fail     <= '0;
      result_valid <= 1'b0;
    end else begin
      if (meas_valid && out_of_tol) begin
        unique case (meas_kind)
          MK_ROW:  row_fail[meas_row] <= 1'b1;
          MK_COL:  col_fail[meas_col] <= 1'b1;
          default: cell_fail[int'(meas_row) * M + int'(meas_col)] <= 1'b1;
        endcase
      end
      if (test_done) result_valid <= 1'b1;
    end
  end

  // Crossing of the row and column results.
  logic [RW:0] n_rows;
  logic [CW:0] n_cols;

  always_comb begin
    n_rows    = '0;
    n_cols    = '0;
    fault_row = '0;
    fault_col = '0;
    for (int r = 0; r < N; r++) begin
      if (row_fail[r]) begin
        n_rows    = n_rows + 1'b1;
        fault_row = RW'(r);
      end
      for (int c = 0; c < M; c++) candidates[r*M + c] = row_fail[r] & col_fail[c];
    end
    for (int c = 0; c < M; c++) begin
      if (col_fail[c]) begin
        n_cols    = n_cols + 1'b1;
        fault_col = CW'(c);
      end
    end
    single_fault = (n_rows == 1) && (n_cols == 1);
    multi_fault  = (n_rows != 0) && (n_cols != 0) && !single_fault;
    inconsistent = (n_rows == 0) != (n_cols == 0);
  end

endmodule
