`timescale 1ns / 1ps
// summing_amp: behavioural model of the inverting summing operational
// amplifier. This is an analog part; the model is not synthesizable logic.
//
// The DAC voltages reach the inverting input through equal resistors R_IN,
// with feedback resistor R_F, so the ideal output is
//   v_out = -(R_F / R_IN) * (v_in[0] + ... + v_in[N-1]).
// This analog addition replaces the wide modular adder of a digital CRT
// converter. With R_IN = R_F, as drawn, the gain is -1. The ideal op-amp
// (no offset, no limited swing) and the fixed delay T_SUM (the t_summer
// term of t_all = t_rom + t_DAC + t_summer) are this model's choices.
module summing_amp
  import rns_pkg::*;
#(
  parameter int unsigned N_IN  = N_CH,
  parameter real         R_F   = 10.0e3,  // feedback resistor, ohm
  parameter real         R_IN  = 10.0e3,  // input resistors, ohm
  parameter real         T_SUM = 0.3      // amplifier delay, ns
) (
  input  real v_in [N_IN],
  output real v_out
);

  real sum;

  always_comb begin
    sum = 0.0;
    for (int i = 0; i < N_IN; i++) sum = sum + v_in[i];
  end

  assign #(T_SUM) v_out = -(R_F / R_IN) * sum;

endmodule
