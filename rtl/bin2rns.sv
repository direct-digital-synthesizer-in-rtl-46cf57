`timescale 1ns / 1ps
// bin2rns: binary to residue number system converter for the frequency
// control word (FCW).
//
// Distributed-arithmetic conversion. The FCW_W-bit word is cut into
// NF = ceil(FCW_W / FMT_W) formats of FMT_W bits; format j has weight
// 2^(j*FMT_W). For every channel i and format j a 2^FMT_W-entry table holds
// | f * 2^(j*FMT_W) |_{m_i} for each format value f. The residue is the
// modular sum of the NF table outputs:
//   x_i = | sum_j | f_j * 2^(j*FMT_W) |_{m_i} |_{m_i}.
// This scheme (formats, weights, modular summation) follows the converter
// the architecture describes; the format width B = FMT_W = 5 and the output
// register are this design's choices. The tables are computed at elaboration.
//
// Interface: fcw is sampled every clock; rns_out holds its residues one
// clock later (latency 1, one conversion per clock). Synchronous active-low
// reset clears rns_out to zero.
module bin2rns
  import rns_pkg::*;
#(
  parameter int unsigned N_CH_P  = N_CH,
  parameter int unsigned RES_W_P = RES_W,
  parameter int unsigned MODS [N_CH_P] = MODULI,
  parameter int unsigned FCW_W_P = FCW_W,
  parameter int unsigned FMT_W_P = FMT_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [FCW_W_P-1:0]                fcw,
  output logic [N_CH_P-1:0][RES_W_P-1:0]    rns_out
);

  localparam int unsigned NF   = (FCW_W_P + FMT_W_P - 1) / FMT_W_P;
  localparam int unsigned NENT = 1 << FMT_W_P;

  typedef logic [NENT-1:0][RES_W_P-1:0] lut_t;

  // Table of | f * 2^(j*FMT_W) |_m for f = 0 .. 2^FMT_W - 1.
  function automatic lut_t build_lut(input longint unsigned m, input int unsigned j);
    lut_t t;
    longint unsigned w = 1;
    for (int unsigned s = 0; s < j * FMT_W_P; s++) w = (w * 2) % m;
    for (int unsigned f = 0; f < NENT; f++) t[f] = RES_W_P'(((longint'(f) % m) * w) % m);
    return t;
  endfunction

  // FCW zero-extended to a whole number of formats.
  logic [NF*FMT_W_P-1:0] fcw_ext;
  assign fcw_ext = (NF * FMT_W_P)'(fcw);

  for (genvar c = 0; c < N_CH_P; c++) begin : g_ch
    localparam longint unsigned M = longint'(MODS[c]);
    logic [NF-1:0][RES_W_P-1:0] part;
    logic [RES_W_P-1:0]         acc;

    for (genvar j = 0; j < NF; j++) begin : g_fmt
      localparam lut_t LUT = build_lut(M, j);
      assign part[j] = LUT[fcw_ext[j*FMT_W_P +: FMT_W_P]];
    end

    // Modular summation of the format residues.
    always_comb begin
      logic [RES_W_P:0] s;
      acc = '0;
      for (int unsigned j = 0; j < NF; j++) begin
        s   = {1'b0, acc} + {1'b0, part[j]};
        acc = (s >= (RES_W_P+1)'(M)) ? RES_W_P'(s - (RES_W_P+1)'(M)) : RES_W_P'(s);
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n) rns_out[c] <= '0;
      else        rns_out[c] <= acc;
    end
  end

endmodule
