// tb_fpa_cross_check_top: end-to-end test of the readout chip with its
// cross-check controller, following the chip's verification: built-in
// current sources on, a normal cell-by-cell scan, then the cross-check on
// a fault-free array; a chip with one cut current source, which the
// cross-check must locate; then detector (bump) currents with one, two and
// mutually cancelling faulty pixels, and a non-square array. Each bench
// checks every measurement, the measurement counts (M*N against N + M) and
// the clock counts; this testbench checks that every mechanism happened.
module tb_fpa_cross_check_top;
  import fpa_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  // 4 x 4 like the demonstration chip; one with cell (2,1) damaged; 5 rows x 6 columns.
  fpa_bench #(.M(4), .N(4), .SETTLE(2))                               b_ok  (.clk(clk), .rst_n(rst_n));
  fpa_bench #(.M(4), .N(4), .SETTLE(3), .DAMAGED_MASK(16'h1 << 9))    b_dmg (.clk(clk), .rst_n(rst_n));
  fpa_bench #(.M(6), .N(5), .SETTLE(1))                               b_big (.clk(clk), .rst_n(rst_n));

  int checks = 0;
  int failures = 0;

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else begin
      $display("mechanism %-28s %0d", what, count);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    fork
      begin
        // Before bonding: built-in sources, fault-free chip.
        b_ok.cs_en = 1'b1;
        b_ok.run(MODE_NORMAL);
        b_ok.run(MODE_CROSS);
        // After bonding: detector currents, sources off.
        b_ok.cs_en = 1'b0;
        for (int k = 0; k < 16; k++) b_ok.bump[k] = 9.5e-9 + real'($urandom_range(10, 0)) * 0.1e-9;
        b_ok.run(MODE_CROSS);
        b_ok.bump[3*4 + 2] = 1.0e-9;                 // one weak pixel
        b_ok.run(MODE_CROSS);
        b_ok.run(MODE_NORMAL);
        b_ok.bump[0*4 + 0] = 25.0e-9;                // a second fault elsewhere
        b_ok.run(MODE_CROSS);
        b_ok.bump[0*4 + 0] = 10.0e-9;
        b_ok.bump[3*4 + 0] = 19.0e-9;                // cancels the weak pixel in row 3
        b_ok.run(MODE_CROSS);
      end
      begin
        // Laser-cut current source: found by a single cross-check.
        b_dmg.cs_en = 1'b1;
        b_dmg.run(MODE_NORMAL);
        b_dmg.run(MODE_CROSS);
      end
      begin
        b_big.cs_en = 1'b1;
        b_big.run(MODE_CROSS);
        b_big.bump[4*6 + 5] = -8.0e-9;               // leaky pixel in the last row and column
        b_big.run(MODE_CROSS);
        b_big.run(MODE_NORMAL);
      end
    join
    checks   += b_ok.checks + b_dmg.checks + b_big.checks;
    failures += b_ok.failures + b_dmg.failures + b_big.failures;
    need(b_ok.n_normal + b_dmg.n_normal + b_big.n_normal, "normal scan");
    need(b_ok.n_cross + b_dmg.n_cross + b_big.n_cross, "cross-check test");
    need(b_ok.n_mode_switch + b_dmg.n_mode_switch + b_big.n_mode_switch, "mode switch");
    need(b_ok.n_bist + b_dmg.n_bist + b_big.n_bist, "built-in current source");
    need(b_ok.n_detector + b_big.n_detector, "detector bump current");
    need(b_ok.n_single + b_dmg.n_single + b_big.n_single, "single fault located");
    need(b_dmg.n_damaged_found, "damaged source located");
    need(b_ok.n_multi, "multiple faults");
    need(b_ok.n_incons, "cancelling faults");
    need(b_ok.n_cell_fail + b_dmg.n_cell_fail + b_big.n_cell_fail, "faulty cell in normal scan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
