// syndrome_gen: syndrome S = Y H^T of a received (32,19) word.
//
// A received word Y = X ^ E carries parity bits in columns 1..13 and message
// bits in columns 14..32. The syndrome is the received parity XORed with the
// parity recomputed from the received message bits, which is Y times the
// transposed parity check matrix H = [I : P^T] for the [p : m] codeword order.
// It is zero for every codeword; for an error pattern E it equals E H^T. With
// this code every single, double-adjacent and triple-adjacent error gives its
// own non-zero syndrome, which is what a later correcting stage would decode.
// Recomputing the parity with the same grouped mm_group/parity_gen logic as the
// encoder is this design's choice; the error correction itself is not part of
// this RTL.
//
// Interface: rx (32 bits, codeword order) in; syn (S1..S13) and err (syndrome
// non-zero) out. Purely combinational.
module syndrome_gen
  import ecc_pkg::*;
(
  input  cw_t  rx,
  output par_t syn,
  output logic err
);

  msg_t rx_msg;
  grp_t grp;
  par_t par;

  assign rx_msg = rx[N:R+1];

  mm_group   u_group  (.msg(rx_msg), .grp(grp));
  parity_gen u_parity (.msg(rx_msg), .grp(grp), .par(par));

  assign syn = rx[R:1] ^ par;
  assign err = |syn;

endmodule
