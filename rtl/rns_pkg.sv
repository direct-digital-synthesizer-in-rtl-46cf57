`timescale 1ns / 1ps
// rns_pkg: shared constants and helpers of the residue number system (RNS)
// direct digital synthesizer.
//
// A phase value X in [0, M) is carried as N_CH residues x_i = X mod m_i, with
// pairwise coprime moduli m_i and dynamic range M = m_1 * m_2 * ... * m_N.
// Addition and multiplication then act on each residue on its own, with no
// carry between channels. X is recovered with the Chinese remainder theorem:
//   X = | sum_i | x_i * |M_i^-1|_{m_i} |_{m_i} * M_i |_M ,  M_i = M / m_i.
//
// Three channels follow the three-channel structure of the synthesizer.
// The moduli {32, 31, 29} are this design's choice: one power of two (the
// form 2^(p+2), here p = 3) and two odd primes, all of k = 5 bits, so that
// M = 28768 fits in 3k = 15 bits and each CRT partial-sum ROM is the
// 2^k x 3k bit table the architecture calls for.
package rns_pkg;

  localparam int unsigned N_CH  = 3;   // number of residue channels
  localparam int unsigned RES_W = 5;   // k, bits per residue
  localparam int unsigned MODULI [N_CH] = '{32, 31, 29};

  // Product of the moduli (dynamic range M).
  function automatic longint unsigned range_of(input int unsigned mods [N_CH]);
    longint unsigned p = 1;
    for (int i = 0; i < N_CH; i++) p = p * mods[i];
    return p;
  endfunction

  localparam longint unsigned M_TOTAL = range_of(MODULI);  // 28768
  localparam int unsigned     PS_W    = 3 * RES_W;          // partial sum width
  localparam int unsigned     FCW_W   = $clog2(M_TOTAL);    // binary FCW width, 15
  localparam int unsigned     FMT_W   = RES_W;              // B, bits per format

  typedef logic [RES_W-1:0]            residue_t;
  typedef logic [N_CH-1:0][RES_W-1:0]  rns_word_t;
  typedef logic [N_CH-1:0][PS_W-1:0]   ps_word_t;

  // |a + b|_m for a, b already in [0, m).
  function automatic longint unsigned mod_add(input longint unsigned a,
                                              input longint unsigned b,
                                              input longint unsigned m);
    longint unsigned s = a + b;
    return (s >= m) ? s - m : s;
  endfunction

  // Multiplicative inverse of a modulo m, by search (elaboration time only).
  function automatic longint unsigned mod_inverse(input longint unsigned a,
                                                  input longint unsigned m);
    for (longint unsigned x = 1; x < m; x++)
      if (((a % m) * x) % m == 1) return x;
    return 0;
  endfunction

  // CRT weight of channel modulus m in range mt: |M_i^-1|_{m_i} * M_i.
  function automatic longint unsigned crt_weight(input longint unsigned m,
                                                 input longint unsigned mt);
    longint unsigned mi = mt / m;
    return mod_inverse(mi, m) * mi;
  endfunction

endpackage
