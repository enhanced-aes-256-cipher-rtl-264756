// inv_mod_subbytes: inverse of the modified SubBytes step. Each byte goes
// through the inverse S-box and is then XORed with XORK_i of its row, where
// XORK_i is the XOR of the four bytes of row i of the round key:
//   out[i][j] = INV_SBOX[state[i][j]] ^ XORK_i.
// The order (inverse S-box first, then the row key) is what makes it the exact
// inverse of mod_subbytes. Combinational.
module inv_mod_subbytes
  import aes_pkg::*;
(
  input  block_t state,
  input  block_t rkey,   // same round key that the encryption round used
  output block_t out
);
  byte_t xork [4];

  always_comb begin
    for (int i = 0; i < 4; i++) xork[i] = row_xor(rkey, i);
    for (int n = 0; n < 16; n++)
      out[127-8*n -: 8] = inv_sbox(get_byte(state, n)) ^ xork[n % 4];
  end
endmodule
