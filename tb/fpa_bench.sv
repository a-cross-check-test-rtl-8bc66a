// fpa_bench: test harness around one fpa_cross_check_top and a current
// meter, used by the end-to-end testbench. The task run() starts one test
// (normal scan or cross-check) and checks it against values worked out
// here from the cell currents: each measurement's code (the meter's
// rounding of the summed current of the cells the kind selects), the
// record order, the number of measurements, the clocks from start to done
// and, at the end, the analyzer's masks, candidate cells and flags. It
// counts which mechanisms each test exercised.
module fpa_bench #(
  parameter int unsigned  M            = 4,
  parameter int unsigned  N            = 4,
  parameter int unsigned  SETTLE       = 2,
  parameter bit [N*M-1:0] DAMAGED_MASK = '0
) (
  input logic clk,
  input logic rst_n
);
  import fpa_pkg::*;

  localparam int unsigned CODE_W = 16;
  localparam real         ISRC   = 10.0e-9;
  localparam real         LSB    = 0.1e-9;
  localparam int          UNIT   = 100;
  localparam int          TOL    = 20;
  localparam int unsigned RW     = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CW     = (M > 1) ? $clog2(M) : 1;

  logic              start = 1'b0;
  test_mode_t        mode = MODE_NORMAL;
  logic              cs_en = 1'b0;
  real               bump [N*M];
  real               i_out;
  logic [CODE_W-1:0] meas_code;
  logic              busy, done, meas_valid, result_valid;
  logic [$clog2(M*N+1)-1:0] meas_count;
  meas_kind_t        meas_kind;
  logic [RW-1:0]     meas_row, fault_row;
  logic [CW-1:0]     meas_col, fault_col;
  logic [CODE_W-1:0] meas_value;
  logic [N-1:0]      row_sel, row_fail;
  logic [M-1:0]      col_sel, col_fail;
  logic [N*M-1:0]    cell_fail, candidates;
  logic              single_fault, multi_fault, inconsistent;

  int checks = 0;
  int failures = 0;
  // mechanism counters
  int n_normal = 0, n_cross = 0, n_mode_switch = 0, n_bist = 0, n_detector = 0;
  int n_single = 0, n_multi = 0, n_incons = 0, n_cell_fail = 0, n_damaged_found = 0;
  test_mode_t last_mode = MODE_NORMAL;
  bit         any_run = 1'b0;

  fpa_cross_check_top #(
    .M(M), .N(N), .SETTLE(SETTLE), .CODE_W(CODE_W), .I_SRC(ISRC), .DAMAGED_MASK(DAMAGED_MASK)
  ) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .mode(mode), .cs_en(cs_en),
    .i_bump(bump), .i_out(i_out), .meas_code(meas_code),
    .unit_code(CODE_W'(UNIT)), .tol(CODE_W'(TOL)), .busy(busy), .done(done),
    .meas_count(meas_count), .meas_valid(meas_valid), .meas_kind(meas_kind),
    .meas_row(meas_row), .meas_col(meas_col), .meas_value(meas_value),
    .row_sel(row_sel), .col_sel(col_sel), .result_valid(result_valid),
    .cell_fail(cell_fail), .row_fail(row_fail), .col_fail(col_fail),
    .candidates(candidates), .single_fault(single_fault), .fault_row(fault_row),
    .fault_col(fault_col), .multi_fault(multi_fault), .inconsistent(inconsistent));

  current_meter #(.CODE_W(CODE_W), .LSB(LSB)) u_meter (.i_in(i_out), .code(meas_code));

  initial for (int k = 0; k < N*M; k++) bump[k] = 0.0;

  function automatic real cell_i(int k);
    return bump[k] + ((cs_en && !DAMAGED_MASK[k]) ? ISRC : 0.0);
  endfunction

  function automatic int to_code(real i);
    return $rtoi(i / LSB + 0.5);
  endfunction

  function automatic bit off(int v, int e);
    return (v > e + TOL) || (v < e - TOL);
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL [%0dx%0d] %s", N, M, msg);
  endtask

  task automatic run(input test_mode_t md);
    int cycles = 0, n = 0, exp_n, exp_cycles, v, ev, er, ec, nr, nc, fr, fc;
    meas_kind_t ek;
    real s;
    logic [N*M-1:0] e_cell, e_cand;
    logic [N-1:0]   e_row;
    logic [M-1:0]   e_col;

    if (any_run && md != last_mode) n_mode_switch++;
    any_run = 1'b1;
    last_mode = md;
    if (cs_en) n_bist++;
    for (int k = 0; k < N*M; k++) if (bump[k] != 0.0) begin n_detector++; break; end
    if (md == MODE_CROSS) n_cross++; else n_normal++;

    exp_n      = (md == MODE_CROSS) ? int'(N + M) : int'(N * M);
    exp_cycles = (md == MODE_CROSS) ? int'((N + M) * (SETTLE + 2) + 3) : int'(N * M * (SETTLE + 2) + 2);
    e_cell = '0; e_row = '0; e_col = '0;

    mode  = md;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    while (!done && cycles < 100000) begin
      cycles++;
      @(posedge clk);
      #1;
      if (meas_valid) begin
        if (md == MODE_CROSS) begin
          ek = (n < int'(N)) ? MK_ROW : MK_COL;
          er = (n < int'(N)) ? n : 0;
          ec = (n < int'(N)) ? 0 : n - int'(N);
        end else begin
          ek = MK_CELL;
          er = n / int'(M);
          ec = n % int'(M);
        end
        s = 0.0;
        for (int r = 0; r < int'(N); r++)
          for (int c = 0; c < int'(M); c++)
            if ((ek == MK_CELL && r == er && c == ec) || (ek == MK_ROW && r == er) || (ek == MK_COL && c == ec))
              s += cell_i(r*int'(M) + c);
        ev = to_code(s);
        v  = int'(meas_value);
        checks++;
        if (meas_kind != ek || int'(meas_row) != er || int'(meas_col) != ec || v != ev)
          fail($sformatf("record %0d: %s (%0d,%0d)=%0d expected %s (%0d,%0d)=%0d",
                         n, meas_kind.name(), meas_row, meas_col, v, ek.name(), er, ec, ev));
        unique case (ek)
          MK_ROW:  e_row[er] = off(ev, int'(M) * UNIT);
          MK_COL:  e_col[ec] = off(ev, int'(N) * UNIT);
          default: e_cell[er*int'(M) + ec] = off(ev, UNIT);
        endcase
        n++;
      end
    end
    checks++;
    if (n != exp_n || int'(meas_count) != exp_n)
      fail($sformatf("%s: %0d measurements, expected %0d", md.name(), n, exp_n));
    checks++;
    if (cycles != exp_cycles)
      fail($sformatf("%s: %0d clocks, expected %0d", md.name(), cycles, exp_cycles));
    @(posedge clk);
    #1;
    nr = 0; nc = 0; fr = 0; fc = 0;
    for (int r = 0; r < int'(N); r++) if (e_row[r]) begin nr++; fr = r; end
    for (int c = 0; c < int'(M); c++) if (e_col[c]) begin nc++; fc = c; end
    for (int r = 0; r < int'(N); r++)
      for (int c = 0; c < int'(M); c++) e_cand[r*int'(M) + c] = e_row[r] & e_col[c];
    checks++;
    if (!result_valid || cell_fail != e_cell || row_fail != e_row || col_fail != e_col || candidates != e_cand)
      fail($sformatf("results: cell=%h/%h row=%b/%b col=%b/%b", cell_fail, e_cell, row_fail, e_row, col_fail, e_col));
    checks++;
    if (single_fault != (nr == 1 && nc == 1) || multi_fault != (nr > 0 && nc > 0 && !(nr == 1 && nc == 1))
        || inconsistent != ((nr == 0) != (nc == 0)))
      fail($sformatf("flags single=%b multi=%b inconsistent=%b, rows %0d cols %0d",
                     single_fault, multi_fault, inconsistent, nr, nc));
    if (single_fault) begin
      n_single++;
      checks++;
      if (int'(fault_row) != fr || int'(fault_col) != fc)
        fail($sformatf("located (%0d,%0d) expected (%0d,%0d)", fault_row, fault_col, fr, fc));
      if (cs_en && DAMAGED_MASK[int'(fault_row)*int'(M) + int'(fault_col)]) n_damaged_found++;
    end
    if (multi_fault) n_multi++;
    if (inconsistent) n_incons++;
    if (cell_fail != '0) n_cell_fail++;
  endtask

endmodule
