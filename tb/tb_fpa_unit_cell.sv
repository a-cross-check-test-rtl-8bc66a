// tb_fpa_unit_cell: self-checking test of the unit-cell model: the row
// switch gates the current, the built-in source adds I_SRC when enabled,
// the bump (detector) current passes through, and a damaged cell's source
// gives nothing.
module tb_fpa_unit_cell;

  localparam real ISRC = 7.0e-9;

  logic row_sel, cs_en;
  real  i_bump, i_col_ok, i_col_dmg;

  int checks = 0;
  int failures = 0;

  fpa_unit_cell #(.I_SRC(ISRC), .DAMAGED(1'b0)) u_ok  (.row_sel(row_sel), .cs_en(cs_en), .i_bump(i_bump), .i_col(i_col_ok));
  fpa_unit_cell #(.I_SRC(ISRC), .DAMAGED(1'b1)) u_dmg (.row_sel(row_sel), .cs_en(cs_en), .i_bump(i_bump), .i_col(i_col_dmg));

  function automatic bit close(real a, real b);
    return ((a - b) < 1.0e-15) && ((b - a) < 1.0e-15);
  endfunction

  task automatic check(input real got, input real exp, input string what);
    checks++;
    if (!close(got, exp)) begin
      failures++;
      $display("FAIL %s: %g expected %g", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      row_sel = 1'($urandom);
      cs_en   = 1'($urandom);
      i_bump  = (k % 3 == 0) ? 0.0 : real'($urandom_range(500, 0)) * 1.0e-10;
      #1;
      check(i_col_ok,  row_sel ? (i_bump + (cs_en ? ISRC : 0.0)) : 0.0, "good cell");
      check(i_col_dmg, row_sel ? i_bump : 0.0, "damaged cell");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
