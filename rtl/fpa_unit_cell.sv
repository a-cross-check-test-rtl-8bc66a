// fpa_unit_cell: behavioural model (not synthesizable) of one readout unit
// cell.
//
// The cell holds a bump pad to which a detector pixel is flip-chip bonded,
// the cell's readout circuit, a built-in test current source attached to
// the bump pad, and the row-select MOS switch that connects the cell to its
// column line. Before bonding the pad floats, so the built-in source stands
// in for the detector and lets the readout (and later the bond) be tested.
//
// Model: currents are real values in amperes. The readout circuit is taken
// as an ideal current follower, so with the row switch closed the column
// line receives the bump current plus, when cs_en is high, the source
// current I_SRC; with the switch open it receives nothing. DAMAGED = 1
// models a cell whose current source has been cut (it then supplies no
// current). The model is static: settling is left to the test controller.
//
// The parts of the cell follow the described unit cell; the ideal follower,
// the source value and the damage parameter are this model's choices.
module fpa_unit_cell #(
  parameter real I_SRC   = 10.0e-9,
  parameter bit  DAMAGED = 1'b0
) (
  input  logic row_sel,
  input  logic cs_en,
  input  real  i_bump,
  output real  i_col
);

  real i_cell;

  always_comb begin
    i_cell = i_bump;
    if (cs_en && !DAMAGED) i_cell = i_cell + I_SRC;
    i_col = row_sel ? i_cell : 0.0;
  end

endmodule
