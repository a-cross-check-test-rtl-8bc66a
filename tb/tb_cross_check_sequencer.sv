// tb_cross_check_sequencer: self-checking test of the test sequencer. The
// testbench models both select registers from the commands the sequencer
// issues and returns as meas_code a bit map of the selected cells (bit
// r*M + c), so every measurement record shows exactly which cells were on.
// Checks: the record order, kinds and indices; that each value is one cell,
// one full row or one full column as the kind says; M*N records for a
// normal scan and N + M for a cross-check; the cycle counts from start to
// done; that the pattern was stable SETTLE clocks before each sample; that
// start is ignored while busy.
module tb_cross_check_sequencer;
  import fpa_pkg::*;

  localparam int unsigned M = 3;
  localparam int unsigned N = 4;
  localparam int unsigned SETTLE = 3;
  localparam int unsigned CODE_W = 12;
  localparam int unsigned RW = $clog2(N);
  localparam int unsigned CW = $clog2(M);

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start = 1'b0;
  test_mode_t        mode = MODE_NORMAL;
  logic [CODE_W-1:0] meas_code;
  sr_cmd_t           row_cmd, col_cmd;
  logic              row_din, col_din;
  logic              meas_valid;
  meas_kind_t        meas_kind;
  logic [RW-1:0]     meas_row;
  logic [CW-1:0]     meas_col;
  logic [CODE_W-1:0] meas_value;
  logic              busy, done;
  logic [$clog2(M*N+1)-1:0] meas_count;

  logic [N-1:0] rm = '0;
  logic [M-1:0] cm = '0;
  int stable = 0;        // clocks the current pattern has been held
  int stable_at_sample;  // value of stable when the sample was taken

  int checks = 0;
  int failures = 0;

  cross_check_sequencer #(.M(M), .N(N), .SETTLE(SETTLE), .CODE_W(CODE_W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .mode(mode), .meas_code(meas_code),
    .row_cmd(row_cmd), .row_din(row_din), .col_cmd(col_cmd), .col_din(col_din),
    .meas_valid(meas_valid), .meas_kind(meas_kind), .meas_row(meas_row),
    .meas_col(meas_col), .meas_value(meas_value), .busy(busy), .done(done),
    .meas_count(meas_count));

  always #5 clk = ~clk;

  // Select-register model and the "which cells are on" code.
  always_comb begin
    meas_code = '0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++)
        if (rm[r] && cm[c]) meas_code[r*M + c] = 1'b1;
  end

  always @(posedge clk) begin
    logic [N-1:0] rn;
    logic [M-1:0] cn;
    stable_at_sample <= stable;
    unique case (row_cmd)
      SR_SHIFT:  rn = {rm[N-2:0], rm[N-1]};
      SR_LOAD:   rn = {rm[N-2:0], row_din};
      SR_CLEAR:  rn = '0;
      SR_PRESET: rn = '1;
      default:   rn = rm;
    endcase
    unique case (col_cmd)
      SR_SHIFT:  cn = {cm[M-2:0], cm[M-1]};
      SR_LOAD:   cn = {cm[M-2:0], col_din};
      SR_CLEAR:  cn = '0;
      SR_PRESET: cn = '1;
      default:   cn = cm;
    endcase
    stable <= (rn == rm && cn == cm) ? stable + 1 : 0;
    rm <= rn;
    cm <= cn;
  end

  function automatic logic [CODE_W-1:0] cells(meas_kind_t k, int r, int c);
    logic [CODE_W-1:0] v = '0;
    for (int rr = 0; rr < N; rr++)
      for (int cc = 0; cc < M; cc++)
        if ((k == MK_CELL && rr == r && cc == c) || (k == MK_ROW && rr == r) || (k == MK_COL && cc == c))
          v[rr*M + cc] = 1'b1;
    return v;
  endfunction

  task automatic run(input test_mode_t md);
    int cycles = 0;
    int n = 0;
    int exp_n, exp_cycles;
    meas_kind_t ek;
    int er, ec;
    exp_n      = (md == MODE_CROSS) ? (N + M) : (N * M);
    exp_cycles = (md == MODE_CROSS) ? ((N + M) * (SETTLE + 2) + 3) : (N * M * (SETTLE + 2) + 2);
    mode  = md;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    while (1) begin
      cycles++;
      if (cycles == 5) begin
        // A second start while busy must be ignored.
        mode = (md == MODE_CROSS) ? MODE_NORMAL : MODE_CROSS;
        start = 1'b1;
      end else begin
        start = 1'b0;
      end
      @(posedge clk);
      #1;
      if (meas_valid) begin
        if (md == MODE_CROSS) begin
          ek = (n < N) ? MK_ROW : MK_COL;
          er = (n < N) ? n : 0;
          ec = (n < N) ? 0 : n - N;
        end else begin
          ek = MK_CELL;
          er = n / M;
          ec = n % M;
        end
        checks++;
        if (meas_kind != ek || int'(meas_row) != er || int'(meas_col) != ec) begin
          failures++;
          $display("FAIL record %0d kind=%s row=%0d col=%0d expected %s %0d %0d",
                   n, meas_kind.name(), meas_row, meas_col, ek.name(), er, ec);
        end
        checks++;
        if (meas_value != cells(ek, er, ec)) begin
          failures++;
          $display("FAIL record %0d selected cells %b expected %b", n, meas_value, cells(ek, er, ec));
        end
        checks++;
        if (stable_at_sample < SETTLE - 1) begin
          failures++;
          $display("FAIL record %0d sampled after %0d stable clocks", n, stable_at_sample + 1);
        end
        n++;
      end
      if (done) break;
      if (cycles > 10000) break;
    end
    checks++;
    if (n != exp_n || int'(meas_count) != exp_n) begin
      failures++;
      $display("FAIL %s: %0d records, meas_count=%0d, expected %0d", md.name(), n, meas_count, exp_n);
    end
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", md.name(), cycles, exp_cycles);
    end
    @(posedge clk);
    #1;
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy after done");
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (busy || done || meas_valid) begin failures++; $display("FAIL after reset"); end
    run(MODE_NORMAL);
    run(MODE_CROSS);
    run(MODE_CROSS);
    run(MODE_NORMAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
