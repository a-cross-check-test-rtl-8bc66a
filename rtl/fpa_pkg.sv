// fpa_pkg: types and constants shared by the focal-plane-array readout and
// its cross-check test controller.
//
// The readout chip addresses its N x M cell array with two cyclic shift
// registers (rows and columns). Each register is driven by a small command
// code, sr_cmd_t. The test controller reports every current it measures as a
// record tagged with what was selected: one cell, one full row, or one full
// column (meas_kind_t). The default array is 4 x 4, the size of the
// demonstration chip; the command and kind encodings are this design's own.
package fpa_pkg;

  // Default array size: M columns by N rows.
  parameter int unsigned M_COLS = 4;
  parameter int unsigned N_ROWS = 4;

  // Width of a measured-current code.
  parameter int unsigned MEAS_CODE_W = 16;

  // Shift-register command applied on one clock edge.
  typedef enum logic [2:0] {
    SR_HOLD   = 3'd0,  // keep the pattern
    SR_SHIFT  = 3'd1,  // rotate by one stage (cyclic)
    SR_LOAD   = 3'd2,  // shift in the serial bit din at stage 0
    SR_CLEAR  = 3'd3,  // all stages off
    SR_PRESET = 3'd4   // all stages on
  } sr_cmd_t;

  // What a measurement selected.
  typedef enum logic [1:0] {
    MK_CELL = 2'd0,    // one row and one column on (normal operation)
    MK_ROW  = 2'd1,    // one row on, all columns on (cross-check step 1)
    MK_COL  = 2'd2     // all rows on, one column on (cross-check step 2)
  } meas_kind_t;

  // Test mode requested from the sequencer.
  typedef enum logic {
    MODE_NORMAL = 1'b0, // cell-by-cell scan, M*N measurements
    MODE_CROSS  = 1'b1  // cross-check, N + M measurements
  } test_mode_t;

endpackage
