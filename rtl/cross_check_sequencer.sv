// cross_check_sequencer: test controller that drives the readout chip's row
// and column select shift registers and samples the measured output
// current, either cell by cell or with the cross-check test.
//
// MODE_NORMAL scans the array as in normal readout: one row and one column
// token, the column token stepping through every column and the row token
// stepping once per wrap, for M*N measurements. MODE_CROSS runs the
// cross-check test in two phases: (1) all columns preset and a single row
// token stepped through the N rows, measuring the current of each full row;
// (2) all rows preset and a single column token stepped through the M
// columns, measuring each full column. That is N + M measurements.
//
// Each phase starts with a clear/preset cycle and a load cycle (a 1 loaded
// into stage 0). After every pattern change the controller waits SETTLE
// clocks for the analog output to settle, then samples meas_code and emits
// one measurement record (meas_valid with kind, row, column and value) on
// the next clock, then shifts the token. Cycles from the clock that accepts
// start to the first clock with done high:
//   normal : M*N*(SETTLE+2) + 2
//   cross  : (N+M)*(SETTLE+2) + 3
// done is a one-clock pulse; busy is high from the accepted start to done.
// start is ignored while busy. meas_count holds the number of measurements
// of the current or last test.
//
// The test steps, their order and their counts follow the cross-check
// procedure; the state machine, the settling wait, the record format and
// the exact cycle counts are this design's choices.
module cross_check_sequencer
  import fpa_pkg::*;
#(
  parameter int unsigned M      = M_COLS,
  parameter int unsigned N      = N_ROWS,
  parameter int unsigned SETTLE = 4,
  parameter int unsigned CODE_W = MEAS_CODE_W,
  localparam int unsigned RW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW    = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW    = $clog2(M*N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  test_mode_t        mode,
  input  logic [CODE_W-1:0] meas_code,
  // shift-register controls
  output sr_cmd_t           row_cmd,
  output logic              row_din,
  output sr_cmd_t           col_cmd,
  output logic              col_din,
  // measurement records
  output logic              meas_valid,
  output meas_kind_t        meas_kind,
  output logic [RW-1:0]     meas_row,
  output logic [CW-1:0]     meas_col,
  output logic [CODE_W-1:0] meas_value,
  // status
  output logic              busy,
  output logic              done,
  output logic [NW-1:0]     meas_count
);

  typedef enum logic [2:0] {
    S_IDLE, S_CLR, S_LOAD, S_WAIT, S_MEAS, S_STEP, S_DONE
  } state_t;

  localparam int unsigned WW = (SETTLE > 1) ? $clog2(SETTLE) : 1;

  state_t        state;
  meas_kind_t    phase;
  logic [RW-1:0] r_idx;
  logic [CW-1:0] c_idx;
  logic [WW-1:0] wait_cnt;

  wire last_row = (r_idx == RW'(N - 1));
  wire last_col = (c_idx == CW'(M - 1));

  // Shift-register commands, decoded from the state and phase.
  always_comb begin
    row_cmd = SR_HOLD;
    col_cmd = SR_HOLD;
    row_din = 1'b0;
    col_din = 1'b0;
    unique case (state)
      S_CLR: begin
        row_cmd = (phase == MK_COL) ? SR_PRESET : SR_CLEAR;
        col_cmd = (phase == MK_ROW) ? SR_PRESET : SR_CLEAR;
      end
      S_LOAD: begin
        if (phase != MK_COL) begin
          row_cmd = SR_LOAD;
          row_din = 1'b1;
        end
        if (phase != MK_ROW) begin
          col_cmd = SR_LOAD;
          col_din = 1'b1;
        end
      end
      S_STEP: begin
        unique case (phase)
          MK_CELL: begin
            col_cmd = SR_SHIFT;
            if (last_col) row_cmd = SR_SHIFT;
          end
          MK_ROW:  row_cmd = SR_SHIFT;
          MK_COL:  col_cmd = SR_SHIFT;
          default: ;
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      phase      <= MK_CELL;
      r_idx      <= '0;
      c_idx      <= '0;
      wait_cnt   <= '0;
      meas_valid <= 1'b0;
      meas_kind  <= MK_CELL;
      meas_row   <= '0;
      meas_col   <= '0;
      meas_value <= '0;
      done       <= 1'b0;
      meas_count <= '0;
    end else begin
      meas_valid <= 1'b0;
      done       <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            phase      <= (mode == MODE_CROSS) ? MK_ROW : MK_CELL;
            r_idx      <= '0;
            c_idx      <= '0;
            meas_count <= '0;
            state      <= S_CLR;
          end
        end
        S_CLR:  state <= S_LOAD;
        S_LOAD: begin
          wait_cnt <= '0;
          state    <= S_WAIT;
        end
        S_WAIT: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == WW'(SETTLE - 1)) state <= S_MEAS;
        end
        S_MEAS: begin
          meas_valid <= 1'b1;
          meas_kind  <= phase;
          meas_row   <= r_idx;
          meas_col   <= c_idx;
          meas_value <= meas_code;
          meas_count <= meas_count + 1'b1;
          unique case (phase)
            MK_CELL: state <= (last_row && last_col) ? S_DONE : S_STEP;
            MK_ROW: begin
              if (last_row) begin
                phase <= MK_COL;
                r_idx <= '0;
                c_idx <= '0;
                state <= S_CLR;
              end else begin
                state <= S_STEP;
              end
            end
            MK_COL:  state <= last_col ? S_DONE : S_STEP;
            default: state <= S_DONE;
          endcase
        end
        S_STEP: begin
          wait_cnt <= '0;
          state    <= S_WAIT;
          unique case (phase)
            MK_CELL: begin
              if (last_col) begin
                c_idx <= '0;
                r_idx <= r_idx + 1'b1;
              end else begin
                c_idx <= c_idx + 1'b1;
              end
            end
            MK_ROW:  r_idx <= r_idx + 1'b1;
            MK_COL:  c_idx <= c_idx + 1'b1;
            default: ;
          endcase
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) || done;

  initial begin
    assert (SETTLE >= 1) else $error("cross_check_sequencer: SETTLE must be at least 1");
  end

  // A measurement record never coincides with the end-of-test pulse.
  a_meas_not_done: assert property (@(posedge clk) disable iff (!rst_n) !(meas_valid && done));

endmodule
