// dec_round: one round of the proposed AES-256 decryption, combinational,
// the exact inverse of enc_round for the same round key.
// FIRST = 1 undoes encryption round 14:
//   AddRoundKey -> InvShiftRows -> modulo subtraction -> inverse modified SubBytes.
// FIRST = 0 undoes an encryption round 13..1:
//   AddRoundKey -> InvMixColumns -> modulo subtraction -> InvShiftRows ->
//   XOR with round key -> inverse modified SubBytes.
// The step order is the one the source draws for decryption. The closing
// AddRoundKey with rk[0] is done by the decryption core.
module dec_round
  import aes_pkg::*;
#(
  parameter bit FIRST = 1'b0
) (
  input  block_t state,
  input  block_t rkey,
  output block_t out
);
  block_t ark, pre_isb;

  add_round_key u_ark (.state(state), .rkey(rkey), .out(ark));

  if (FIRST) begin : g_first
    block_t isr;
    inv_shift_rows  u_isr (.state(ark), .out(isr));
    mod_sub         u_ms  (.state(isr), .rkey(rkey), .out(pre_isb));
  end else begin : g_mid
    block_t imc, ms, isr;
    inv_mix_columns u_imc (.state(ark), .out(imc));
    mod_sub         u_ms  (.state(imc), .rkey(rkey), .out(ms));
    inv_shift_rows  u_isr (.state(ms), .out(isr));
    add_round_key   u_xor (.state(isr), .rkey(rkey), .out(pre_isb));
  end

  inv_mod_subbytes u_isb (.state(pre_isb), .rkey(rkey), .out(out));
endmodule
