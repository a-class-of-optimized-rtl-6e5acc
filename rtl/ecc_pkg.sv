// ecc_pkg: constants and vector types shared by the (32,19) block-code encoder
// and its syndrome generator.
//
// The code maps a 19-bit message m onto a 32-bit codeword X = [p : m] with
// 13 parity bits p = m P. All vectors use 1-based ranges so that an index is the
// subscript used for the bit in the code's equations: msg[i] is m_i, par[j] is
// p_j, grp[g] is the group value M_g and cw[c] is codeword column c. Columns
// 1..13 hold p1..p13 and columns 14..32 hold m1..m19 (the generator matrix is
// G = [P : I]). The sizes are those of the code; the 1-based numbering is a
// choice of this RTL made for readability.
package ecc_pkg;

  localparam int unsigned N    = 32;     // codeword length n
  localparam int unsigned K    = 19;     // message length k
  localparam int unsigned R    = N - K;  // parity bits n-k = 13
  localparam int unsigned NGRP = 5;      // shared three-bit message groups M1..M5

  typedef logic [K:1]    msg_t;  // m1..m19
  typedef logic [R:1]    par_t;  // p1..p13, also the syndrome S1..S13
  typedef logic [NGRP:1] grp_t;  // M1..M5
  typedef logic [N:1]    cw_t;   // codeword columns 1..32

endpackage
