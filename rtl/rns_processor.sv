`timescale 1ns / 1ps
// rns_processor: phase shift, modulation and amplitude scaling of the
// synthesized signal, carried out on the residues.
//
// For every channel i, with all operands residues modulo m_i:
//   y_i = | amp_i * | phase_i + ofs_i + mod_i |_{m_i} |_{m_i}
// i.e. Y = | AMP * (PHASE + OFS + MOD) |_M in the full dynamic range, using
// only the channel-wise addition and multiplication of the RNS. ofs is a
// static phase offset, mod a per-clock modulation word (phase modulation),
// amp a scale factor; amp = 1 and ofs = mod = 0 pass the phase unchanged.
// The architecture names these three operations for this block but not
// their form; the add/add/multiply order and the single register stage are
// this design's choices. A scaled value is meaningful only while the
// product stays below M, as for any RNS multiplication.
//
// Interface: inputs sampled on each rising clk edge, y_rns valid one clock
// later (latency 1, one sample per clock). Synchronous active-low reset.
module rns_processor
  import rns_pkg::*;
#(
  parameter int unsigned N_CH_P  = N_CH,
  parameter int unsigned RES_W_P = RES_W,
  parameter int unsigned MODS [N_CH_P] = MODULI
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N_CH_P-1:0][RES_W_P-1:0] phase_rns,
  input  logic [N_CH_P-1:0][RES_W_P-1:0] ofs_rns,
  input  logic [N_CH_P-1:0][RES_W_P-1:0] mod_rns,
  input  logic [N_CH_P-1:0][RES_W_P-1:0] amp_rns,
  output logic [N_CH_P-1:0][RES_W_P-1:0] y_rns
);

  for (genvar c = 0; c < N_CH_P; c++) begin : g_ch
    localparam logic [RES_W_P:0]     M  = (RES_W_P+1)'(MODS[c]);
    localparam logic [2*RES_W_P-1:0] MW = (2*RES_W_P)'(MODS[c]);
    logic [RES_W_P:0]     s1, s2;
    logic [RES_W_P-1:0]   p1, p2;
    logic [2*RES_W_P-1:0] prod;
    logic [RES_W_P-1:0]   y;

    always_comb begin
      s1   = {1'b0, phase_rns[c]} + {1'b0, ofs_rns[c]};
      p1   = (s1 >= M) ? RES_W_P'(s1 - M) : RES_W_P'(s1);
      s2   = {1'b0, p1} + {1'b0, mod_rns[c]};
      p2   = (s2 >= M) ? RES_W_P'(s2 - M) : RES_W_P'(s2);
      prod = p2 * amp_rns[c];
      y    = RES_W_P'(prod % MW);
    end

    always_ff @(posedge clk) begin
      if (!rst_n) y_rns[c] <= '0;
      else        y_rns[c] <= y;
    end
  end

endmodule
