`timescale 1ns / 1ps
// analog_folding: behavioural model of the analog folding stage.
// This is an analog part; the model is not synthesizable logic.
//
// The sum of the CRT partial sums lies between 0 and N*M code steps; the
// value the residues encode is that sum modulo M. The folding stage does
// this last reduction in analog form: it takes the magnitude of the
// (inverted) summing-amplifier output and folds it into one span V_SPAN =
// M * V_LSB, producing a sawtooth of the input:
//   v_out = |v_in| - V_SPAN * floor(|v_in| / V_SPAN).
// fold_count reports how many spans were removed (0 .. N-1), so that a test
// can see the folding act. The architecture gives only the name and the
// sawtooth symbol; the magnitude input, the ideal transfer and the small
// tolerance EPS (which absorbs rounding of real arithmetic at the fold
// points) are this model's choices.
module analog_folding #(
  parameter real V_SPAN = 2.8768,   // M * V_LSB, volts
  parameter real EPS    = 1.0e-9    // volts
) (
  input  real v_in,
  output real v_out,
  output int  fold_count
);

  real mag;
  int  n;

  always_comb begin
    mag = (v_in < 0.0) ? -v_in : v_in;
    n   = 0;
    while (mag >= V_SPAN - EPS) begin
      mag = mag - V_SPAN;
      n   = n + 1;
    end
    if (mag < 0.0) mag = 0.0;
    v_out      = mag;
    fold_count = n;
  end

endmodule
