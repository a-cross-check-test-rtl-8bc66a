// tb_column_switches: self-checking test of the column switch model: the
// output is the sum of exactly the selected column currents, checked for
// no column, one column, all columns and random selections.
module tb_column_switches;

  localparam int unsigned M = 6;

  logic [M-1:0] col_sel;
  real          i_col [M];
  real          i_out;
  real          expect_i;

  int checks = 0;
  int failures = 0;

  column_switches #(.M(M)) dut (.col_sel(col_sel), .i_col(i_col), .i_out(i_out));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 100; k++) begin
      for (int c = 0; c < M; c++) i_col[c] = real'(c + 1) * 1.0e-9 * real'(1 + (k % 5));
      if (k == 0)      col_sel = '0;
      else if (k == 1) col_sel = '1;
      else if (k < 2 + M) col_sel = M'(1) << (k - 2);
      else             col_sel = M'($urandom);
      #1;
      expect_i = 0.0;
      for (int c = 0; c < M; c++) if (col_sel[c]) expect_i += real'(c + 1) * 1.0e-9 * real'(1 + (k % 5));
      checks++;
      if ((i_out - expect_i) > 1.0e-15 || (expect_i - i_out) > 1.0e-15) begin
        failures++;
        $display("FAIL sel=%b i_out=%g expected %g", col_sel, i_out, expect_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
