`timescale 1ns / 1ps
// rns_phase_acc: phase accumulator in the residue number system.
//
// The phase advances by the frequency control word A every clock, modulo the
// dynamic range M, so the output frequency is f_out = f_clk * A / M. The
// accumulator is split into N_CH independent channels, one per modulus m_i.
// Channel i is a finite state machine whose state is the phase residue
// |phase|_{m_i} and whose input is the FCW residue |A|_{m_i}; its next state
// is | state + input |_{m_i}. No carry passes between channels, so the
// critical path is one small modular add (a k-bit add and a compare/
// subtract), whatever the size of M. The channel split and the FSM view
// follow the architecture; the add-then-correct form of the next-state logic
// and the reset value of zero phase are this design's choices.
//
// Interface: fcw_rns is sampled on each rising clk edge while en is high;
// phase_rns is the registered phase state. Synchronous active-low reset.
// fcw_rns residues must be below their moduli; an assertion checks that
// the state always is.
module rns_phase_acc
  import rns_pkg::*;
#(
  parameter int unsigned N_CH_P  = N_CH,
  parameter int unsigned RES_W_P = RES_W,
  parameter int unsigned MODS [N_CH_P] = MODULI
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  logic [N_CH_P-1:0][RES_W_P-1:0] fcw_rns,
  output logic [N_CH_P-1:0][RES_W_P-1:0] phase_rns
);

  for (genvar c = 0; c < N_CH_P; c++) begin : g_fsm
    localparam logic [RES_W_P:0] M = (RES_W_P+1)'(MODS[c]);
    logic [RES_W_P:0]   sum;
    logic [RES_W_P-1:0] next_state;

    always_comb begin
      sum        = {1'b0, phase_rns[c]} + {1'b0, fcw_rns[c]};
      next_state = (sum >= M) ? RES_W_P'(sum - M) : RES_W_P'(sum);
    end

    always_ff @(posedge clk) begin
      if (!rst_n)  phase_rns[c] <= '0;
      else if (en) phase_rns[c] <= next_state;
    end

    // A residue must stay inside its modulus.
    a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 {1'b0, phase_rns[c]} < M);
  end

endmodule
