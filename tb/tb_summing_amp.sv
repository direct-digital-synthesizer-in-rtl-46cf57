`timescale 1ns / 1ps
// tb_summing_amp: checks the inverting summing amplifier model.
// Random input voltages are applied; after the amplifier delay the output
// must equal -(R_F / R_IN) * sum of inputs, for unity gain (the default)
// and for a second instance with gain 2. Before the delay it must hold.
module tb_summing_amp;
  import rns_pkg::*;

  real v_in [N_CH];
  real v_out, v_out2;
  int unsigned checks = 0, failures = 0;

  summing_amp dut (.v_in, .v_out);
  summing_amp #(.R_F(20.0e3), .R_IN(10.0e3)) dut2 (.v_in, .v_out(v_out2));

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
    real s, prev;
    for (int i = 0; i < N_CH; i++) v_in[i] = 0.0;
    #5;
    s = 0.0;
    for (int t = 0; t < 1000; t++) begin
      prev = s;
      s = 0.0;
      for (int i = 0; i < N_CH; i++) begin
        v_in[i] = real'($urandom % 30000) * 1.0e-4;
        s += v_in[i];
      end
      #0.1;
      checks++;
      if (!close(v_out, -prev)) begin failures++; $display("output moved before the delay"); end
      #1;
      checks += 2;
      if (!close(v_out, -s)) begin
        failures++;
        if (failures < 10) $display("t=%0d: v_out %f want %f", t, v_out, -s);
      end
      if (!close(v_out2, -2.0 * s)) failures++;
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
