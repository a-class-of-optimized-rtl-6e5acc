// ecc_ref_pkg: reference model of the (32,19) block code for the testbenches.
//
// The model works from the coefficient matrix P of the generator matrix
// G = [P : I], one 13-bit row per message bit (bit j of row i set when m_i
// enters p_j), rather than from the grouped XOR trees of the RTL. Parity is the
// XOR of the rows of all set message bits; group predictions are taken from a
// count of ones; the parity check column of codeword position c is the unit
// vector e_c for c <= 13 and row c-13 of P otherwise.
package ecc_ref_pkg;

  localparam logic [13:1] PROW [1:19] = '{
    13'b0000011111001,  // m1
    13'b0000111110010,  // m2
    13'b1001111100100,  // m3
    13'b0011111001000,  // m4
    13'b1111110010000,  // m5
    13'b0000000111111,  // m6
    13'b1000001111110,  // m7
    13'b0000011111100,  // m8
    13'b1000111111000,  // m9
    13'b1001111110000,  // m10
    13'b1011111100000,  // m11
    13'b1111111000000,  // m12
    13'b0000101010101,  // m13
    13'b0101010101010,  // m14
    13'b0000101000111,  // m15
    13'b1111000111000,  // m16
    13'b1001100110011,  // m17
    13'b0110011001100,  // m18
    13'b1011111010000   // m19
  };

  function automatic logic [13:1] ref_parity(input logic [19:1] m);
    logic [13:1] p = '0;
    for (int i = 1; i <= 19; i++) if (m[i]) p ^= PROW[i];
    return p;
  endfunction

  function automatic logic [32:1] ref_codeword(input logic [19:1] m);
    return {m, ref_parity(m)};
  endfunction

  // Odd number of ones in a three-bit group -> 1.
  function automatic logic ref_predict(input logic a, input logic b, input logic c);
    return ($countones({a, b, c}) % 2) == 1;
  endfunction

  function automatic logic [5:1] ref_groups(input logic [19:1] m);
    return {ref_predict(m[16], m[17], m[19]),
            ref_predict(m[3],  m[4],  m[5]),
            ref_predict(m[9],  m[10], m[11]),
            ref_predict(m[1],  m[2],  m[3]),
            ref_predict(m[6],  m[7],  m[8])};
  endfunction

  function automatic logic [13:1] ref_hcol(input int c);
    logic [13:1] h = '0;
    if (c <= 13) h[c] = 1'b1;
    else         h = PROW[c-13];
    return h;
  endfunction

  // Syndrome of an error pattern e, computed column by column.
  function automatic logic [13:1] ref_syndrome(input logic [32:1] e);
    logic [13:1] s = '0;
    for (int c = 1; c <= 32; c++) if (e[c]) s ^= ref_hcol(c);
    return s;
  endfunction

endpackage
