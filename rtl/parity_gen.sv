// parity_gen: parity bits p1..p13 of the (32,19) block code, p = m P.
//
// Each parity bit is an XOR tree over message bits and the shared group values
// M1..M5 from mm_group, written term for term as the grouped parity equations of
// the code (the "with grouping" encoder). Expanding the groups gives the
// coefficient matrix P, i.e. the first 13 columns of the generator matrix:
//   p1  = m1 m6 m13 m15 m17
//   p2  = m2 m6 m7 m14 m15 m17
//   p3  = m3 m6 m7 m8 m13 m15 m18
//   p4  = m1 m4 m6 m7 m8 m9 m14 m16 m18
//   p5  = m1 m2 m5 m6 m7 m8 m9 m10 m13 m16 m17 m19
//   p6  = m1 m2 m3 m6 m7 m8 m9 m10 m11 m14 m16 m17
//   p7  = m1 m2 m3 m4 m7 m8 m9 m10 m11 m12 m13 m15 m18 m19
//   p8  = m1 m2 m3 m4 m5 m8 m9 m10 m11 m12 m14 m18 m19
//   p9  = m2 m3 m4 m5 m9 m10 m11 m12 m13 m15 m17 m19
//   p10 = m3 m4 m5 m10 m11 m12 m14 m16 m17 m19
//   p11 = m4 m5 m11 m12 m16 m18 m19
//   p12 = m5 m12 m14 m16 m18
//   p13 = m3 m5 m7 m9 m10 m11 m12 m16 m17 m19
// (each line is the XOR of the listed bits). A group is first identified in one
// parity equation (M1 in p3, M2 and M3 in p6, M4 in p9, M5 in p10) and reused in
// later ones. The code's equations keep the three bits written out in the
// equation where the group is identified; this RTL reads the shared group value
// there too, which is the same function and lets all users share one XOR.
//
// Interface: msg (m1..m19) and grp (M1..M5) in, par (p1..p13) out. Purely
// combinational; the widest tree (p7) XORs 10 terms after grouping.
module parity_gen
  import ecc_pkg::*;
(
  input  msg_t msg,
  input  grp_t grp,
  output par_t par
);

  always_comb begin
    par[1]  = msg[1] ^ msg[6] ^ msg[13] ^ msg[15] ^ msg[17];
    par[2]  = msg[2] ^ msg[6] ^ msg[7] ^ msg[14] ^ msg[15] ^ msg[17];
    par[3]  = msg[3] ^ grp[1] ^ msg[13] ^ msg[15] ^ msg[18];
    par[4]  = msg[1] ^ msg[4] ^ grp[1] ^ msg[9] ^ msg[14] ^ msg[16] ^ msg[18];
    par[5]  = msg[1] ^ msg[2] ^ msg[5] ^ grp[1] ^ msg[9] ^ msg[10] ^ msg[13]
            ^ msg[16] ^ msg[17] ^ msg[19];
    par[6]  = grp[2] ^ grp[1] ^ grp[3] ^ msg[14] ^ msg[16] ^ msg[17];
    par[7]  = grp[2] ^ msg[4] ^ msg[7] ^ msg[8] ^ grp[3] ^ msg[12] ^ msg[13]
            ^ msg[15] ^ msg[18] ^ msg[19];
    par[8]  = grp[2] ^ msg[4] ^ msg[5] ^ msg[8] ^ grp[3] ^ msg[12] ^ msg[14]
            ^ msg[18] ^ msg[19];
    par[9]  = msg[2] ^ grp[4] ^ grp[3] ^ msg[12] ^ msg[13] ^ msg[15] ^ msg[17]
            ^ msg[19];
    par[10] = grp[4] ^ msg[10] ^ msg[11] ^ msg[12] ^ msg[14] ^ grp[5];
    par[11] = msg[4] ^ msg[5] ^ msg[11] ^ msg[12] ^ msg[16] ^ msg[18] ^ msg[19];
    par[12] = msg[5] ^ msg[12] ^ msg[14] ^ msg[16] ^ msg[18];
    par[13] = msg[3] ^ msg[5] ^ msg[7] ^ grp[3] ^ msg[12] ^ grp[5];
  end

endmodule
