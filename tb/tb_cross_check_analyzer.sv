// tb_cross_check_analyzer: self-checking test of the xchk-check analyzer.
// Each trial makes an array of cell currents (codes) around a unit value,
// with zero, one or several faulty cells, and feeds the analyzer the
// records of a normal scan or of a xchk-check (row sums, then column
// sums), the way the sequencer does. The expected fail masks, candidate
// cells and flags are worked out here from the same cell values.
// Directed trials cover a single fault, two faults in different rows and
// columns, and two faults in one row whose deviations cancel.
module tb_cross_check_analyzer;
  import fpa_pkg::*;

  localparam int unsigned M = 5;
  localparam int unsigned N = 3;
  localparam int unsigned CODE_W = 12;
  localparam int unsigned RW = $clog2(N);
  localparam int unsigned CW = $clog2(M);
  localparam int unsigned UNIT = 100;
  localparam int unsigned TOL = 20;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              clear = 1'b0;
  logic              meas_valid = 1'b0;
  meas_kind_t        meas_kind = MK_CELL;
  logic [RW-1:0]     meas_row = '0;
  logic [CW-1:0]     meas_col = '0;
  logic [CODE_W-1:0] meas_value = '0;
  logic [CODE_W-1:0] unit_code = CODE_W'(UNIT);
  logic [CODE_W-1:0] tol = CODE_W'(TOL);
  logic              test_done = 1'b0;
  logic              result_valid;
  logic [N*M-1:0]    cell_fail, candidates;
  logic [N-1:0]      row_fail;
  logic [M-1:0]      col_fail;
  logic              single_fault, multi_fault, inconsistent;
  logic [RW-1:0]     fault_row;
  logic [CW-1:0]     fault_col;

  int cur [N*M];
  int checks = 0;
  int failures = 0;
  int n_single = 0, n_multi = 0, n_incons = 0;

  cross_check_analyzer #(.M(M), .N(N), .CODE_W(CODE_W)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .meas_valid(meas_valid),
    .meas_kind(meas_kind), .meas_row(meas_row), .meas_col(meas_col),
    .meas_value(meas_value), .unit_code(unit_code), .tol(tol),
    .test_done(test_done), .result_valid(result_valid), .cell_fail(cell_fail),
    .row_fail(row_fail), .col_fail(col_fail), .candidates(candidates),
    .single_fault(single_fault), .fault_row(fault_row), .fault_col(fault_col),
    .multi_fault(multi_fault), .inconsistent(inconsistent));

  always #5 clk = ~clk;

  function automatic bit off(int v, int e);
    return (v > e + int'(TOL)) || (v < e - int'(TOL));
  endfunction

  task automatic send(input meas_kind_t k, input int r, input int c, input int v);
    meas_valid = 1'b1;
    meas_kind  = k;
    meas_row   = RW'(r);
    meas_col   = CW'(c);
    meas_value = CODE_W'(v);
    @(posedge clk);
    #1 meas_valid = 1'b0;
    // idle gap, values on the bus must be ignored
    meas_value = CODE_W'($urandom);
    @(posedge clk);
    #1;
  endtask

  task automatic trial(input bit xchk);
    logic [N*M-1:0] e_cell, e_cand;
    logic [N-1:0]   e_row;
    logic [M-1:0]   e_col;
    int nr, nc, s, er, ec;
    clear = 1'b1;
    @(posedge clk);
    #1 clear = 1'b0;
    checks++;
    if (result_valid || row_fail != '0 || col_fail != '0 || cell_fail != '0) begin
      failures++;
      $display("FAIL clear");
    end
    e_cell = '0; e_row = '0; e_col = '0; e_cand = '0;
    nr = 0; nc = 0; er = 0; ec = 0;
    if (xchk) begin
      for (int r = 0; r < N; r++) begin
        s = 0;
        for (int c = 0; c < M; c++) s += cur[r*M + c];
        e_row[r] = off(s, M * UNIT);
        send(MK_ROW, r, 0, s);
      end
      for (int c = 0; c < M; c++) begin
        s = 0;
        for (int r = 0; r < N; r++) s += cur[r*M + c];
        e_col[c] = off(s, N * UNIT);
        send(MK_COL, 0, c, s);
      end
    end else begin
      for (int k = 0; k < N*M; k++) begin
        e_cell[k] = off(cur[k], UNIT);
        send(MK_CELL, k / M, k % M, cur[k]);
      end
    end
    for (int r = 0; r < N; r++) if (e_row[r]) begin nr++; er = r; end
    for (int c = 0; c < M; c++) if (e_col[c]) begin nc++; ec = c; end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++) e_cand[r*M + c] = e_row[r] & e_col[c];
    test_done = 1'b1;
    @(posedge clk);
    #1 test_done = 1'b0;
    checks++;
    if (!result_valid || cell_fail != e_cell || row_fail != e_row || col_fail != e_col || candidates != e_cand) begin
      failures++;
      $display("FAIL masks cell=%h/%h row=%b/%b col=%b/%b cand=%h/%h", cell_fail, e_cell,
               row_fail, e_row, col_fail, e_col, candidates, e_cand);
    end
    checks++;
    if (single_fault != (nr == 1 && nc == 1) || multi_fault != (nr > 0 && nc > 0 && !(nr == 1 && nc == 1))
        || inconsistent != ((nr == 0) != (nc == 0))) begin
      failures++;
      $display("FAIL flags single=%b multi=%b incons=%b (rows %0d cols %0d)",
               single_fault, multi_fault, inconsistent, nr, nc);
    end
    if (nr == 1 && nc == 1) begin
      n_single++;
      checks++;
      if (int'(fault_row) != er || int'(fault_col) != ec) begin
        failures++;
        $display("FAIL located (%0d,%0d) expected (%0d,%0d)", fault_row, fault_col, er, ec);
      end
    end
    if (multi_fault) n_multi++;
    if (inconsistent) n_incons++;
  endtask

  task automatic fill_good();
    for (int k = 0; k < N*M; k++) cur[k] = int'(UNIT) + $urandom_range(4, 0) - 2;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // fault-free
    fill_good();
    trial(1'b1);
    trial(1'b0);
    // one dead cell at row 2, column 1
    fill_good();
    cur[2*M + 1] = 0;
    trial(1'b1);
    trial(1'b0);
    // two faults in different rows and columns
    fill_good();
    cur[0*M + 4] = 0;
    cur[1*M + 0] = 250;
    trial(1'b1);
    // two faults in one row whose deviations cancel: the row passes
    fill_good();
    cur[1*M + 1] = 40;
    cur[1*M + 3] = 160;
    trial(1'b1);
    // random arrays
    for (int t = 0; t < 40; t++) begin
      fill_good();
      for (int f = 0; f < int'($urandom_range(2, 0)); f++)
        cur[$urandom_range(N*M - 1, 0)] = $urandom_range(300, 0);
      trial(1'($urandom));
    end
    checks++;
    if (n_single == 0 || n_multi == 0 || n_incons == 0) begin
      failures++;
      $display("FAIL coverage single=%0d multi=%0d inconsistent=%0d", n_single, n_multi, n_incons);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
