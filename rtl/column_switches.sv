// column_switches: behavioural model (not synthesizable) of the column
// selector's MOS switches.
//
// Each column line carries the sum of the currents of its selected cells.
// A switch gated by the column shift register connects the line to the
// common readout output; since the output node sums every connected line,
// selecting all columns gives the current of a full row and selecting one
// column gives the current of the cells selected in that column.
//
// Interface: col_sel[c] closes switch c; i_col[c] is column line c's current
// in amperes; i_out is the summed current. Ideal switches, no delay.
//
// The switch bank follows the described column selector; treating the
// switches as ideal and the output as a current-summing node is this
// model's choice.
module column_switches #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] col_sel,
  input  real          i_col [M],
  output real          i_out
);

  always_comb begin
    i_out = 0.0;
    for (int c = 0; c < M; c++) begin
      if (col_sel[c]) i_out = i_out + i_col[c];
    end
  end

endmodule
