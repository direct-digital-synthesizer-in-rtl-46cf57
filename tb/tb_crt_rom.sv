`timescale 1ns / 1ps
// tb_crt_rom: checks the three CRT partial-sum ROMs together, exhaustively.
// For every X in [0, M) the residues X mod m_i address the ROMs; one clock
// later the partial sums must satisfy, independently of how the ROMs were
// built: S_i < M, S_i mod m_j = 0 for j != i, S_i mod m_i = X mod m_i, and
// (S_1 + S_2 + S_3) mod M = X (the Chinese remainder reconstruction).
module tb_crt_rom;
  import rns_pkg::*;

  logic                        clk = 1'b0;
  logic                        rst_n;
  logic [N_CH-1:0][RES_W-1:0]  r;
  logic [N_CH-1:0][PS_W-1:0]   ps;
  int unsigned checks = 0, failures = 0;

  for (genvar c = 0; c < N_CH; c++) begin : g_rom
    crt_rom #(.MOD(MODULI[c])) dut (.clk, .rst_n, .r(r[c]), .ps(ps[c]));
  end

  always #5 clk = ~clk;

  initial begin
    #(10 * 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned sum;
    rst_n = 1'b0;
    r = '1;
    @(posedge clk); #1;
    checks++;
    if (ps !== '0) begin failures++; $display("reset value wrong"); end
    rst_n = 1'b1;
    for (longint unsigned x = 0; x < M_TOTAL; x++) begin
      for (int c = 0; c < N_CH; c++) r[c] = RES_W'(x % longint'(MODULI[c]));
      @(posedge clk); #1;
      sum = 0;
      for (int c = 0; c < N_CH; c++) begin
        sum += longint'(ps[c]);
        checks++;
        if (longint'(ps[c]) >= M_TOTAL) failures++;
        for (int j = 0; j < N_CH; j++) begin
          checks++;
          if (j == c) begin
            if (longint'(ps[c]) % longint'(MODULI[j]) != x % longint'(MODULI[j])) failures++;
          end else begin
            if (longint'(ps[c]) % longint'(MODULI[j]) != 0) failures++;
          end
        end
      end
      checks++;
      if (sum % M_TOTAL != x) begin
        failures++;
        if (failures < 10) $display("X=%0d: sum of partial sums %0d", x, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
