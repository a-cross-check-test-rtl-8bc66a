// current_meter: behavioural model of the bench current meter that reads
// the readout chip's output current.
//
// The code is i_in / LSB rounded to the nearest integer and clipped to the
// code range; negative currents read as 0. The conversion is immediate, so
// the code follows the selected current combinationally.
module current_meter #(
  parameter int unsigned CODE_W = 16,
  parameter real         LSB    = 0.1e-9
) (
  input  real               i_in,
  output logic [CODE_W-1:0] code
);

  real q;

  always_comb begin
    q = i_in / LSB + 0.5;
    if (q < 0.0)                                code = '0;
    else if (q >= real'(2.0 ** CODE_W - 1.0))   code = '1;
    else                                        code = CODE_W'($rtoi(q));
  end

endmodule
