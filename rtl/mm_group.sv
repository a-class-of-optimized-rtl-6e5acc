// mm_group: majority-message grouping unit of the optimized (32,19) encoder.
//
// Several three-bit sets of message bits occur together in more than one parity
// equation. Each such set is XORed once here and the result, the group's
// "prediction" (1 when the group holds an odd number of ones, 0 when even), is
// shared by every parity bit that contains the set, so the parity trees below
// get shorter. The five groups and where they are reused:
//   M1 = m6  ^ m7  ^ m8    (p3; reused in p4, p5, p6)
//   M2 = m1  ^ m2  ^ m3    (p6; reused in p7, p8)
//   M3 = m9  ^ m10 ^ m11   (p6; reused in p7, p8, p9, p13)
//   M4 = m3  ^ m4  ^ m5    (p9; reused in p10)
//   M5 = m16 ^ m17 ^ m19   (p10; reused in p13)
// The groups and the odd/even prediction rule are the code's own; building each
// prediction as a single three-input XOR is this design's reading of that rule.
//
// Interface: msg (m1..m19) in, grp (M1..M5) out. Purely combinational, one
// three-input XOR level. m12..m15 and m18 belong to no group and are not read
// here; the full message is still taken so that the port matches the encoder's.
module mm_group
  import ecc_pkg::*;
(
  input  msg_t msg,
  output grp_t grp
);

  always_comb begin
    grp[1] = msg[6]  ^ msg[7]  ^ msg[8];
    grp[2] = msg[1]  ^ msg[2]  ^ msg[3];
    grp[3] = msg[9]  ^ msg[10] ^ msg[11];
    grp[4] = msg[3]  ^ msg[4]  ^ msg[5];
    grp[5] = msg[16] ^ msg[17] ^ msg[19];
  end

endmodule
