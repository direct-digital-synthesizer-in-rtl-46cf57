`timescale 1ns / 1ps
// partial_dac: behavioural model of one partial digital-to-analog converter.
// This is an analog part; the model is not synthesizable logic.
//
// Each residue channel has its own DAC, which turns the CRT partial sum S_i
// (an unsigned PS_W-bit code, 0 <= S_i < M) into a voltage
//   v_out = S_i * V_LSB
// after a settling delay T_DAC. V_LSB is the same for every channel, so the
// voltages of the channels can be added directly. Ideal, linear behaviour
// with a fixed delay is this model's choice; the architecture gives only
// the DAC's function. T_DAC is the t_DAC term of the conversion delay
// t_all = t_rom + t_DAC + t_summer.
module partial_dac
  import rns_pkg::*;
#(
  parameter int unsigned PS_W_P = PS_W,
  parameter real         V_LSB  = 1.0e-4,  // volts per code step
  parameter real         T_DAC  = 0.2      // settling delay, ns
) (
  input  logic [PS_W_P-1:0] code,
  output real               v_out
);

  assign #(T_DAC) v_out = real'(code) * V_LSB;

endmodule
