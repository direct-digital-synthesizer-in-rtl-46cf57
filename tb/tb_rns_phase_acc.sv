`timescale 1ns / 1ps
// tb_rns_phase_acc: checks the RNS phase accumulator against a binary
// reference accumulator modulo M.
// Random frequency words A < M are applied as residues (A mod m_i) and held
// for random runs of clocks; the reference phase is (phase + A) mod M in
// plain binary, and every clock each channel must equal the reference mod
// m_i. The enable is dropped at random to check that the phase holds.
// Counts reference wraps through M and hold cycles; both must occur.
module tb_rns_phase_acc;
  import rns_pkg::*;

  logic                        clk = 1'b0;
  logic                        rst_n, en;
  logic [N_CH-1:0][RES_W-1:0]  fcw_rns, phase_rns;
  int unsigned checks = 0, failures = 0;
  int unsigned wraps = 0, holds = 0;

  rns_phase_acc dut (.clk, .rst_n, .en, .fcw_rns, .phase_rns);

  always #5 clk = ~clk;

  initial begin
    #(10 * 30000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_word(input longint unsigned a);
    for (int c = 0; c < N_CH; c++) fcw_rns[c] = RES_W'(a % longint'(MODULI[c]));
  endtask

  initial begin
    longint unsigned a, ref_phase;
    int unsigned run;
    rst_n = 1'b0; en = 1'b1;
    set_word(longint'($urandom) % M_TOTAL);
    @(posedge clk); #1;
    rst_n = 1'b1;
    ref_phase = 0;
    for (int seg = 0; seg < 200; seg++) begin
      a = (seg == 0) ? 1 : longint'($urandom) % M_TOTAL;
      set_word(a);
      run = (seg == 0) ? 40 : 1 + $urandom % 100;
      for (int unsigned k = 0; k < run; k++) begin
        en = ($urandom % 8) != 0;
        @(posedge clk); #1;
        if (en) begin
          if (ref_phase + a >= M_TOTAL) wraps++;
          ref_phase = (ref_phase + a) % M_TOTAL;
        end else holds++;
        for (int c = 0; c < N_CH; c++) begin
          checks++;
          if (longint'(phase_rns[c]) != ref_phase % longint'(MODULI[c])) begin
            failures++;
            if (failures < 10) $display("seg %0d ch%0d: got %0d want %0d", seg, c,
                                        phase_rns[c], ref_phase % longint'(MODULI[c]));
          end
        end
      end
    end
    $display("phase wraps=%0d hold cycles=%0d", wraps, holds);
    checks++; if (wraps == 0) begin failures++; $display("no wrap seen"); end
    checks++; if (holds == 0) begin failures++; $display("no hold seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
