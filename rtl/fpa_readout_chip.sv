// fpa_readout_chip: the focal-plane-array readout circuit, with a
// behavioural (not synthesizable) cell array.
//
// Structure: a row decoder (N-stage select shift register), a column
// selector (M-stage select shift register driving the column switches) and
// an N x M array of unit cells. A cell whose row line is on drives its
// current onto its column line; the column lines add the currents of all
// selected cells; the column switches connect the selected lines to the
// single output, i_out. The shift registers are synthesizable; the cells,
// the column lines and the switches are analog and modelled with real
// currents.
//
// With one row and one column on, i_out is one cell's current (normal
// readout). With all columns preset and one row on it is the current of a
// full row; with all rows preset and one column on, a full column.
//
// Interface: row_cmd/row_din and col_cmd/col_din drive the two registers
// (see sel_shift_reg; patterns change one clock after the command). cs_en
// switches on every cell's built-in current source. i_bump[r*M + c] is the
// detector current into the bump pad of row r, column c. row_sel/col_sel
// expose the select lines. DAMAGED_MASK bit r*M + c models a cell whose
// current source is cut.
//
// The block structure follows the described readout circuit; the flat
// index of the cell array, the exposed select lines and the damage mask
// are this design's choices.
module fpa_readout_chip
  import fpa_pkg::*;
#(
  parameter int unsigned M            = M_COLS,
  parameter int unsigned N            = N_ROWS,
  parameter real         I_SRC        = 10.0e-9,
  parameter bit [N*M-1:0] DAMAGED_MASK = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  sr_cmd_t      row_cmd,
  input  logic         row_din,
  input  sr_cmd_t      col_cmd,
  input  logic         col_din,
  input  logic         cs_en,
  input  real          i_bump [N*M],
  output real          i_out,
  output logic [N-1:0] row_sel,
  output logic [M-1:0] col_sel
);

  // Row decoder and column selector registers.
  sel_shift_reg #(.LEN(N)) u_row_sr (
    .clk  (clk),
    .rst_n(rst_n),
    .cmd  (row_cmd),
    .din  (row_din),
    .sel  (row_sel)
  );

  sel_shift_reg #(.LEN(M)) u_col_sr (
    .clk  (clk),
    .rst_n(rst_n),
    .cmd  (col_cmd),
    .din  (col_din),
    .sel  (col_sel)
  );

  // Cell array.
  real i_cell [N*M];

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < M; c++) begin : g_col
      fpa_unit_cell #(
        .I_SRC  (I_SRC),
        .DAMAGED(DAMAGED_MASK[r*M + c])
      ) u_cell (
        .row_sel(row_sel[r]),
        .cs_en  (cs_en),
        .i_bump (i_bump[r*M + c]),
        .i_col  (i_cell[r*M + c])
      );
    end
  end

  // Column lines: every cell of a column drives the same line.
  real i_colline [M];

  always_comb begin
    for (int c = 0; c < M; c++) begin
      i_colline[c] = 0.0;
      for (int r = 0; r < N; r++) i_colline[c] = i_colline[c] + i_cell[r*M + c];
    end
  end

  column_switches #(.M(M)) u_col_sw (
    .col_sel(col_sel),
    .i_col  (i_colline),
    .i_out  (i_out)
  );

endmodule
