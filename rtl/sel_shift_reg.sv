// sel_shift_reg: cyclic select shift register of the readout chip.
//
// One instance of N stages is the row decoder, one of M stages drives the
// column selector's MOS switches; each stage output is one select line. In
// normal operation a single stage is on, and SHIFT moves it to the next
// row or column, wrapping from the last stage back to stage 0. For the
// cross-check test PRESET turns every line on (all rows or all columns
// selected), while CLEAR followed by LOAD of a 1 places a single token at
// stage 0.
//
// Interface: cmd is sampled on every rising clk edge (see fpa_pkg::sr_cmd_t).
//   SHIFT  sel[k] <= sel[k-1], sel[0] <= sel[LEN-1]
//   LOAD   sel[k] <= sel[k-1], sel[0] <= din   (serial load, no wrap)
//   CLEAR  all 0;  PRESET all 1;  HOLD keeps the pattern.
// rst_n clears all stages asynchronously. The new pattern appears one clock
// after the command.
//
// The cyclic structure and the load, clear and preset functions follow the
// readout circuit described for the chip; the serial form of LOAD, the
// command encoding and making clear/preset synchronous commands (with one
// asynchronous reset) are this design's choices.
module sel_shift_reg
  import fpa_pkg::*;
#(
  parameter int unsigned LEN = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  sr_cmd_t        cmd,
  input  logic           din,
  output logic [LEN-1:0] sel
);

  logic [LEN-1:0] sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= '0;
    end else begin
      unique case (cmd)
        SR_HOLD:   sel_q <= sel_q;
        SR_SHIFT:  sel_q <= {sel_q[LEN-2:0], sel_q[LEN-1]};
        SR_LOAD:   sel_q <= {sel_q[LEN-2:0], din};
        SR_CLEAR:  sel_q <= '0;
        SR_PRESET: sel_q <= '1;
        default:   sel_q <= sel_q;
      endcase
    end
  end

  assign sel = sel_q;

  initial begin
    assert (LEN >= 2) else $error("sel_shift_reg: LEN must be at least 2");
  end

endmodule
