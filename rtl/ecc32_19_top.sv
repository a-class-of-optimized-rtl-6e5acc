// ecc32_19_top: (32,19) block-code encoder and syndrome checker for a
// fault-secure memory word.
//
// Write path: a 19-bit message is encoded by enc32_19 into the 32-bit codeword
// [p : m] and registered. Read path: a 32-bit word read back is passed through
// syndrome_gen; its 13-bit syndrome and an error flag are registered and brought
// out for an error-correcting stage outside this design. The two paths are
// independent and each accepts one word per cycle with no back-pressure.
//
// Timing: combinational logic from the inputs to one output register stage, so
// enc_valid_o / chk_valid_o follow enc_valid_i / chk_valid_i by one clock.
// Data registers load only on a valid input and keep their value otherwise.
// Reset (rst_n, active low, synchronous) clears the valid flags and the data
// registers. The code itself is from the encoder design; the registers, the
// valid signals and the reset are this design's own choices.
module ecc32_19_top
  import ecc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // encoder
  input  logic enc_valid_i,
  input  msg_t enc_msg_i,
  output logic enc_valid_o,
  output cw_t  enc_cw_o,
  // syndrome check
  input  logic chk_valid_i,
  input  cw_t  chk_rx_i,
  output logic chk_valid_o,
  output par_t chk_syn_o,
  output logic chk_err_o
);

  cw_t  cw;
  par_t syn;
  logic err;

  enc32_19     u_enc (.msg(enc_msg_i), .cw(cw));
  syndrome_gen u_syn (.rx(chk_rx_i), .syn(syn), .err(err));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enc_valid_o <= 1'b0;
      enc_cw_o    <= '0;
      chk_valid_o <= 1'b0;
      chk_syn_o   <= '0;
      chk_err_o   <= 1'b0;
    end else begin
      enc_valid_o <= enc_valid_i;
      chk_valid_o <= chk_valid_i;
      if (enc_valid_i) enc_cw_o <= cw;
      if (chk_valid_i) begin
        chk_syn_o <= syn;
        chk_err_o <= err;
      end
    end
  end

  // The error flag is exactly "syndrome non-zero".
  a_err_matches_syn: assert property (@(posedge clk) disable iff (!rst_n)
    chk_valid_o |-> (chk_err_o == (chk_syn_o != '0)));

endmodule
