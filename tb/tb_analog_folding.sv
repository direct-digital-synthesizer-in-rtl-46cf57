`timescale 1ns / 1ps
// tb_analog_folding: checks the folding stage model.
// Input voltages of either sign, built as -(X + n*M) * V_LSB for random
// X < M and n in 0..2, must give v_out = X * V_LSB and fold_count = n.
// Every fold count must occur.
module tb_analog_folding;
  import rns_pkg::*;

  localparam real V_LSB  = 1.0e-4;
  localparam real V_SPAN = real'(M_TOTAL) * V_LSB;

  real v_in, v_out;
  int  fold_count;
  int unsigned checks = 0, failures = 0;
  int unsigned seen [3] = '{0, 0, 0};

  analog_folding #(.V_SPAN(V_SPAN)) dut (.v_in, .v_out, .fold_count);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned x;
    int n;
    for (int t = 0; t < 3000; t++) begin
      x = longint'($urandom) % M_TOTAL;
      if (t < 3) x = 0;
      n = t % 3;
      v_in = real'(x + longint'(n) * M_TOTAL) * V_LSB;
      if (t % 2 == 0) v_in = -v_in;
      #1;
      checks += 2;
      if ((v_out - real'(x) * V_LSB > 1.0e-7) || (real'(x) * V_LSB - v_out > 1.0e-7)) begin
        failures++;
        if (failures < 10) $display("x=%0d n=%0d: v_out %f", x, n, v_out);
      end
      if (fold_count != n) begin
        failures++;
        if (failures < 10) $display("x=%0d n=%0d: fold_count %0d", x, n, fold_count);
      end else seen[n]++;
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("fold count %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
