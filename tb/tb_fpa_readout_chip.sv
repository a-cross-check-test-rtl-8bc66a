// tb_fpa_readout_chip: self-checking test of the readout chip model. A
// reference model of both select registers follows the same commands; the
// output current is compared with the sum, over every selected cell, of its
// bump current plus its built-in source current (none for the damaged
// cell). Covers the normal one-cell selection, a full row and a full
// column, and random command streams.
module tb_fpa_readout_chip;
  import fpa_pkg::*;

  localparam int unsigned M = 3;
  localparam int unsigned N = 4;
  localparam real ISRC = 5.0e-9;
  localparam int unsigned DMG = 1 * M + 2;   // cell row 1, column 2
  localparam bit [N*M-1:0] MASK = (N*M)'(1) << DMG;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  sr_cmd_t      row_cmd = SR_HOLD, col_cmd = SR_HOLD;
  logic         row_din = 1'b0, col_din = 1'b0;
  logic         cs_en = 1'b0;
  real          i_bump [N*M];
  real          i_out;
  logic [N-1:0] row_sel;
  logic [M-1:0] col_sel;
  logic [N-1:0] rm = '0;
  logic [M-1:0] cm = '0;
  int n_row_tests = 0, n_col_tests = 0, n_cell_tests = 0;

  int checks = 0;
  int failures = 0;

  fpa_readout_chip #(.M(M), .N(N), .I_SRC(ISRC), .DAMAGED_MASK(MASK)) dut (
    .clk(clk), .rst_n(rst_n), .row_cmd(row_cmd), .row_din(row_din),
    .col_cmd(col_cmd), .col_din(col_din), .cs_en(cs_en), .i_bump(i_bump),
    .i_out(i_out), .row_sel(row_sel), .col_sel(col_sel));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] nxt_r(logic [N-1:0] q, sr_cmd_t c, logic d);
    unique case (c)
      SR_SHIFT:  return {q[N-2:0], q[N-1]};
      SR_LOAD:   return {q[N-2:0], d};
      SR_CLEAR:  return '0;
      SR_PRESET: return '1;
      default:   return q;
    endcase
  endfunction

  function automatic logic [M-1:0] nxt_c(logic [M-1:0] q, sr_cmd_t c, logic d);
    unique case (c)
      SR_SHIFT:  return {q[M-2:0], q[M-1]};
      SR_LOAD:   return {q[M-2:0], d};
      SR_CLEAR:  return '0;
      SR_PRESET: return '1;
      default:   return q;
    endcase
  endfunction

  task automatic step(input sr_cmd_t rc, input logic rd, input sr_cmd_t cc, input logic cd);
    real e;
    row_cmd = rc; row_din = rd; col_cmd = cc; col_din = cd;
    @(posedge clk);
    rm = nxt_r(rm, rc, rd);
    cm = nxt_c(cm, cc, cd);
    #1;
    e = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++)
        if (rm[r] && cm[c]) e += i_bump[r*M + c] + ((cs_en && (r*M + c) != DMG) ? ISRC : 0.0);
    checks++;
    if (row_sel !== rm || col_sel !== cm) begin
      failures++;
      $display("FAIL select lines row=%b/%b col=%b/%b", row_sel, rm, col_sel, cm);
    end
    checks++;
    if ((i_out - e) > 1.0e-15 || (e - i_out) > 1.0e-15) begin
      failures++;
      $display("FAIL i_out=%g expected %g (row=%b col=%b)", i_out, e, rm, cm);
    end
    if (rm == '1 && $onehot(cm)) n_col_tests++;
    if (cm == '1 && $onehot(rm)) n_row_tests++;
    if ($onehot(rm) && $onehot(cm)) n_cell_tests++;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N*M; k++) i_bump[k] = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Before bonding: built-in sources only.
    cs_en = 1'b1;
    // Normal selection of every cell.
    step(SR_CLEAR, 1'b0, SR_CLEAR, 1'b0);
    step(SR_LOAD, 1'b1, SR_LOAD, 1'b1);
    for (int k = 0; k < N*M; k++) step((k % M == M-1) ? SR_SHIFT : SR_HOLD, 1'b0, SR_SHIFT, 1'b0);
    // Full rows.
    step(SR_CLEAR, 1'b0, SR_PRESET, 1'b0);
    step(SR_LOAD, 1'b1, SR_HOLD, 1'b0);
    for (int k = 0; k < N; k++) step(SR_SHIFT, 1'b0, SR_HOLD, 1'b0);
    // Full columns.
    step(SR_PRESET, 1'b0, SR_CLEAR, 1'b0);
    step(SR_HOLD, 1'b0, SR_LOAD, 1'b1);
    for (int k = 0; k < M; k++) step(SR_HOLD, 1'b0, SR_SHIFT, 1'b0);
    // After bonding: detector currents, sources on and off, random commands.
    for (int k = 0; k < 300; k++) begin
      if (k % 10 == 0) begin
        cs_en = 1'($urandom);
        for (int j = 0; j < N*M; j++) i_bump[j] = real'($urandom_range(100, 0)) * 1.0e-10;
      end
      step(sr_cmd_t'($urandom_range(4, 0)), 1'($urandom), sr_cmd_t'($urandom_range(4, 0)), 1'($urandom));
    end
    checks++;
    if (n_row_tests < N || n_col_tests < M || n_cell_tests < N*M) begin
      failures++;
      $display("FAIL coverage rows=%0d cols=%0d cells=%0d", n_row_tests, n_col_tests, n_cell_tests);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
