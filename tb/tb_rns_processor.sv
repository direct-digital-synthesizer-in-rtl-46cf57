`timescale 1ns / 1ps
// tb_rns_processor: checks phase offset, modulation and amplitude scaling
// done on residues against the same operations in binary modulo M.
// Random P, O, D, A < M are applied as residues; one clock later channel i
// must equal (A * ((P + O + D) mod M)) mod M, reduced mod m_i. Includes the
// unity case (A = 1, O = D = 0), which must pass the phase unchanged.
module tb_rns_processor;
  import rns_pkg::*;

  logic                        clk = 1'b0;
  logic                        rst_n;
  logic [N_CH-1:0][RES_W-1:0]  phase_rns, ofs_rns, mod_rns, amp_rns, y_rns;
  int unsigned checks = 0, failures = 0;

  rns_processor dut (.clk, .rst_n, .phase_rns, .ofs_rns, .mod_rns, .amp_rns, .y_rns);

  always #5 clk = ~clk;

  initial begin
    #(10 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_CH-1:0][RES_W-1:0] to_rns(input longint unsigned x);
    for (int c = 0; c < N_CH; c++) to_rns[c] = RES_W'(x % longint'(MODULI[c]));
  endfunction

  initial begin
    longint unsigned p, o, d, a, y, y_prev;
    rst_n = 1'b0;
    phase_rns = '0; ofs_rns = '0; mod_rns = '0; amp_rns = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    y_prev = 0;
    for (int t = 0; t < 10000; t++) begin
      p = longint'($urandom) % M_TOTAL;
      o = longint'($urandom) % M_TOTAL;
      d = longint'($urandom) % M_TOTAL;
      a = longint'($urandom) % M_TOTAL;
      if (t % 4 == 0) begin o = 0; d = 0; a = 1; end
      phase_rns = to_rns(p); ofs_rns = to_rns(o); mod_rns = to_rns(d); amp_rns = to_rns(a);
      y = (a * ((p + o + d) % M_TOTAL)) % M_TOTAL;
      #2;
      // latency: before the edge the output still holds the previous result
      checks++;
      if (y_rns != to_rns(y_prev)) begin
        failures++; $display("output changed before the clock edge");
      end
      y_prev = y;
      @(posedge clk); #1;
      for (int c = 0; c < N_CH; c++) begin
        checks++;
        if (longint'(y_rns[c]) != y % longint'(MODULI[c])) begin
          failures++;
          if (failures < 10) $display("t=%0d ch%0d: got %0d want %0d", t, c, y_rns[c],
                                      y % longint'(MODULI[c]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
