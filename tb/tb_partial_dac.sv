`timescale 1ns / 1ps
// tb_partial_dac: checks the partial DAC model's transfer and delay.
// Codes (zero, full scale and random) are applied; half the settling delay
// later the output must still hold the previous voltage, and after the
// delay it must equal code * V_LSB.
module tb_partial_dac;
  import rns_pkg::*;

  localparam real V_LSB = 1.0e-4;
  localparam real T_DAC = 0.2;

  logic [PS_W-1:0] code;
  real             v_out;
  int unsigned checks = 0, failures = 0;

  partial_dac #(.V_LSB(V_LSB), .T_DAC(T_DAC)) dut (.code, .v_out);

  function automatic bit close(input real a, input real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PS_W-1:0] prev;
    code = '0;
    #5;
    for (int t = 0; t < 1000; t++) begin
      prev = code;
      case (t)
        0:       code = '1;
        1:       code = '0;
        default: code = PS_W'($urandom);
      endcase
      #(T_DAC / 2.0);
      checks++;
      if (!close(v_out, real'(prev) * V_LSB) && prev != code) begin
        failures++; $display("output moved before the settling delay");
      end
      #(T_DAC);
      checks++;
      if (!close(v_out, real'(code) * V_LSB)) begin
        failures++;
        if (failures < 10) $display("code %0d: v_out %f want %f", code, v_out, real'(code) * V_LSB);
      end
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
