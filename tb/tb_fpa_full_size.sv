// tb_fpa_full_size: the top at its default configuration (4 x 4 array,
// SETTLE = 4), taken through the chip's verification order with the
// built-in current sources on. First a normal scan of the fault-free array
// measures every cell and sets the expected unit code to their mean; then
// a cross-check of the fault-free array must find nothing; then, with one
// pixel drawing an extra 12 nA, a normal scan must flag exactly that cell
// and a cross-check must locate it. Every cell, row and column code and
// the clock counts (M*N against N + M measurements) are checked.
module tb_fpa_full_size;
  import fpa_pkg::*;

  localparam int M = 4, N = 4, SETTLE = 4, FR = 1, FC = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  test_mode_t  mode = MODE_NORMAL;
  real         bump [N*M];
  real         i_out;
  logic [15:0] meas_code, meas_value;
  logic        busy, done, meas_valid, result_valid, single_fault, multi_fault, inconsistent;
  logic [4:0]  meas_count;
  meas_kind_t  meas_kind;
  logic [1:0]  meas_row, meas_col, fault_row, fault_col;
  logic [3:0]  row_sel, col_sel, row_fail, col_fail;
  logic [15:0] cell_fail, candidates;
  logic [15:0] unit_code = 16'd0;
  bit          faulty = 1'b0;
  int          sum_cells;

  int checks = 0;
  int failures = 0;

  fpa_cross_check_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .mode(mode), .cs_en(1'b1),
    .i_bump(bump), .i_out(i_out), .meas_code(meas_code), .unit_code(unit_code),
    .tol(16'd20), .busy(busy), .done(done), .meas_count(meas_count),
    .meas_valid(meas_valid), .meas_kind(meas_kind), .meas_row(meas_row),
    .meas_col(meas_col), .meas_value(meas_value), .row_sel(row_sel),
    .col_sel(col_sel), .result_valid(result_valid), .cell_fail(cell_fail),
    .row_fail(row_fail), .col_fail(col_fail), .candidates(candidates),
    .single_fault(single_fault), .fault_row(fault_row), .fault_col(fault_col),
    .multi_fault(multi_fault), .inconsistent(inconsistent));

  current_meter #(.CODE_W(16), .LSB(0.1e-9)) u_meter (.i_in(i_out), .code(meas_code));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Expected code: 100 per cell plus 120 for the faulty one.
  function automatic int exp_code(meas_kind_t k, int r, int c);
    int v = 0;
    for (int rr = 0; rr < N; rr++)
      for (int cc = 0; cc < M; cc++)
        if ((k == MK_CELL && rr == r && cc == c) || (k == MK_ROW && rr == r) || (k == MK_COL && cc == c))
          v += (faulty && rr == FR && cc == FC) ? 220 : 100;
    return v;
  endfunction

  task automatic run(input test_mode_t md, input int exp_n, input int exp_cycles);
    int n = 0, cycles = 0;
    mode  = md;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    while (!done && cycles < 10000) begin
      cycles++;
      @(posedge clk);
      #1;
      if (meas_valid) begin
        check(int'(meas_value) == exp_code(meas_kind, int'(meas_row), int'(meas_col)),
              $sformatf("%s (%0d,%0d) code %0d", meas_kind.name(), meas_row, meas_col, meas_value));
        if (meas_kind == MK_CELL) sum_cells += int'(meas_value);
        n++;
      end
    end
    check(n == exp_n && int'(meas_count) == exp_n, $sformatf("%s: %0d measurements", md.name(), n));
    check(cycles == exp_cycles, $sformatf("%s: %0d clocks, expected %0d", md.name(), cycles, exp_cycles));
    @(posedge clk);
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N*M; k++) bump[k] = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    // Fault-free: calibrate the unit code from a normal scan, then cross-check.
    sum_cells = 0;
    run(MODE_NORMAL, M*N, M*N*(SETTLE + 2) + 2);
    unit_code = 16'(sum_cells / (M*N));
    check(unit_code == 16'd100, $sformatf("calibrated unit code %0d", unit_code));
    run(MODE_CROSS, M + N, (M + N)*(SETTLE + 2) + 3);
    check(result_valid && row_fail == '0 && col_fail == '0 && !single_fault && !multi_fault && !inconsistent,
          "fault-free cross-check");
    // One faulty pixel.
    faulty = 1'b1;
    bump[FR*M + FC] = 12.0e-9;
    run(MODE_NORMAL, M*N, M*N*(SETTLE + 2) + 2);
    check(result_valid && cell_fail == (16'h1 << (FR*M + FC)), $sformatf("scan cell_fail=%h", cell_fail));
    run(MODE_CROSS, M + N, (M + N)*(SETTLE + 2) + 3);
    check(result_valid && single_fault && !multi_fault && !inconsistent, "cross-check flags");
    check(int'(fault_row) == FR && int'(fault_col) == FC, $sformatf("located (%0d,%0d)", fault_row, fault_col));
    check(candidates == (16'h1 << (FR*M + FC)), $sformatf("candidates=%h", candidates));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
