// enc32_19: optimized encoder for the (32,19) SEC-DAEC-TAEC block code.
//
// The codeword is X = m G with G = [P : I], i.e. X = [p : m]: 13 parity bits
// followed by the 19 message bits unchanged. The parity p = m P is formed in two
// levels: mm_group first XORs the five three-bit message groups M1..M5 that
// recur across the parity equations, then parity_gen XORs each parity bit from
// message bits and those shared group values. This grouping is what shortens
// the encoder compared with one flat XOR tree per parity bit.
//
// Interface: msg (m1..m19) in, cw out with cw[13:1] = p1..p13 and
// cw[32:14] = m1..m19. Purely combinational, no clock; a caller registers it as
// needed (see ecc32_19_top).
module enc32_19
  import ecc_pkg::*;
(
  input  msg_t msg,
  output cw_t  cw
);

  grp_t grp;
  par_t par;

  mm_group   u_group  (.msg(msg), .grp(grp));
  parity_gen u_parity (.msg(msg), .grp(grp), .par(par));

  assign cw = {msg, par};

endmodule
