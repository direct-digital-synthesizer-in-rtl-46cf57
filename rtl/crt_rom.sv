`timescale 1ns / 1ps
// crt_rom: CRT partial-sum ROM of one residue channel.
//
// For modulus m_i of a system with dynamic range M, M_i = M / m_i, the ROM
// maps the residue r to the Chinese-remainder partial sum
//   S_i(r) = | r * |M_i^-1|_{m_i} * M_i |_M = | r * |M_i^-1|_{m_i} |_{m_i} * M_i .
// The full value is X = | S_1 + ... + S_N |_M, which the synthesizer forms
// in analog form after one DAC per channel, so no wide modular adder and no
// residue-to-binary converter is needed. The ROM has 2^RES_W words of PS_W
// bits (2^k x 3k bits for k-bit residues with three channels), as the
// architecture specifies. Addresses r >= m_i never occur and read as zero.
// The contents are computed at elaboration from the moduli.
//
// Interface: synchronous read; ps is the partial sum of the residue
// presented one clock earlier (latency 1). Synchronous active-low reset
// clears ps.
module crt_rom
  import rns_pkg::*;
#(
  parameter int unsigned     RES_W_P = RES_W,
  parameter int unsigned     PS_W_P  = PS_W,
  parameter int unsigned     MOD     = MODULI[0],
  parameter longint unsigned RANGE   = M_TOTAL
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [RES_W_P-1:0] r,
  output logic [PS_W_P-1:0]  ps
);

  localparam int unsigned NENT = 1 << RES_W_P;
  typedef logic [NENT-1:0][PS_W_P-1:0] rom_t;

  function automatic rom_t build_rom();
    rom_t t;
    longint unsigned mi  = RANGE / longint'(MOD);
    longint unsigned inv = mod_inverse(mi, longint'(MOD));
    for (int unsigned a = 0; a < NENT; a++)
      t[a] = (a < MOD) ? PS_W_P'(((longint'(a) * inv) % longint'(MOD)) * mi) : '0;
    return t;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (!rst_n) ps <= '0;
    else        ps <= ROM[r];
  end

endmodule
