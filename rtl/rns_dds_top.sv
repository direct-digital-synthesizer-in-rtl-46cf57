`timescale 1ns / 1ps
// rns_dds_top: direct digital synthesizer whose phase path works in the
// residue number system (RNS) and whose residue-to-analog conversion uses
// the Chinese remainder theorem (CRT) in analog form, with no
// residue-to-binary converter and no sine ROM.
//
// Signal path, one sample per clock:
//   fcw (binary) -> bin2rns -> rns_phase_acc -> rns_processor
//     -> crt_rom per channel -> partial_dac per channel
//     -> summing_amp -> analog_folding -> x_out
// The phase X advances by fcw every clock modulo M = prod(m_i), so x_out is
// a sawtooth of frequency f_clk * fcw / M. Each channel's ROM gives its CRT
// partial sum S_i; the DACs and the summer add them in analog form, and the
// folding stage takes the sum modulo M, so x_out = X_y * V_LSB where X_y is
// the value the processed residues encode.
//
// Interface (all digital inputs sampled on the rising edge of clk):
//   rst_n      synchronous active-low reset, clears every register
//   en         phase accumulator advance enable
//   fcw        binary frequency control word, 0 <= fcw < M, PS_W_P bits
//   ofs_rns    phase offset, one residue per channel
//   mod_rns    phase modulation word, one residue per channel, per clock
//   amp_rns    amplitude scale, one residue per channel (1 = unity)
//   phase_rns  accumulator state (residues of the phase)
//   ps_code    CRT partial sums driving the DACs
//   x_out      analog output voltage (real)
//   fold_count spans removed by the folding stage for the current sample
// Timing: fcw reaches the accumulator input 1 clock after it is applied; a
// phase state appears as ps_code 2 clocks later (processor and ROM
// registers) and as x_out after the DAC and amplifier delays.
// The block structure and the CRT partial-sum scheme follow the
// architecture; the moduli, widths, register placement and the analog
// models' ideal behaviour are this design's choices.
module rns_dds_top
  import rns_pkg::*;
#(
  parameter int unsigned N_CH_P  = N_CH,
  parameter int unsigned RES_W_P = RES_W,
  parameter int unsigned MODS [N_CH_P] = MODULI,
  parameter int unsigned FMT_W_P = FMT_W,
  parameter int unsigned PS_W_P  = PS_W,    // must be ceil(log2(prod MODS))
  parameter real         V_LSB   = 1.0e-4
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             en,
  input  logic [PS_W_P-1:0] fcw,
  input  logic [N_CH_P-1:0][RES_W_P-1:0]   ofs_rns,
  input  logic [N_CH_P-1:0][RES_W_P-1:0]   mod_rns,
  input  logic [N_CH_P-1:0][RES_W_P-1:0]   amp_rns,
  output logic [N_CH_P-1:0][RES_W_P-1:0]   phase_rns,
  output logic [N_CH_P-1:0][PS_W_P-1:0] ps_code,
  output real                              x_out,
  output int                               fold_count
);

  function automatic longint unsigned range_p(input int unsigned mods [N_CH_P]);
    longint unsigned p = 1;
    for (int i = 0; i < N_CH_P; i++) p = p * longint'(mods[i]);
    return p;
  endfunction

  localparam longint unsigned RANGE  = range_p(MODS);
  localparam int unsigned     FCW_WP = PS_W_P;
  localparam int unsigned     PS_WP  = PS_W_P;

  if (PS_W_P != $clog2(RANGE)) begin : g_bad_width
    $error("PS_W_P must equal ceil(log2 of the product of the moduli)");
  end

  logic [N_CH_P-1:0][RES_W_P-1:0] fcw_rns;
  logic [N_CH_P-1:0][RES_W_P-1:0] y_rns;
  real                            v_dac [N_CH_P];
  real                            v_sum;

  bin2rns #(
    .N_CH_P(N_CH_P), .RES_W_P(RES_W_P), .MODS(MODS),
    .FCW_W_P(FCW_WP), .FMT_W_P(FMT_W_P)
  ) u_bin2rns (
    .clk, .rst_n, .fcw, .rns_out(fcw_rns)
  );

  rns_phase_acc #(
    .N_CH_P(N_CH_P), .RES_W_P(RES_W_P), .MODS(MODS)
  ) u_acc (
    .clk, .rst_n, .en, .fcw_rns, .phase_rns
  );

  rns_processor #(
    .N_CH_P(N_CH_P), .RES_W_P(RES_W_P), .MODS(MODS)
  ) u_proc (
    .clk, .rst_n, .phase_rns, .ofs_rns, .mod_rns, .amp_rns, .y_rns
  );

  for (genvar c = 0; c < N_CH_P; c++) begin : g_ch
    crt_rom #(
      .RES_W_P(RES_W_P), .PS_W_P(PS_WP), .MOD(MODS[c]), .RANGE(RANGE)
    ) u_rom (
      .clk, .rst_n, .r(y_rns[c]), .ps(ps_code[c])
    );

    partial_dac #(
      .PS_W_P(PS_WP), .V_LSB(V_LSB)
    ) u_dac (
      .code(ps_code[c]), .v_out(v_dac[c])
    );
  end

  summing_amp #(
    .N_IN(N_CH_P)
  ) u_sum (
    .v_in(v_dac), .v_out(v_sum)
  );

  analog_folding #(
    .V_SPAN(real'(RANGE) * V_LSB)
  ) u_fold (
    .v_in(v_sum), .v_out(x_out), .fold_count
  );

endmodule
