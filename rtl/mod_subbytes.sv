// mod_subbytes: the modified SubBytes step of the proposed cipher round.
// Four key bytes XORK_0..XORK_3 are formed, XORK_i being the XOR of the four
// bytes in row i of the round key matrix. Every byte in row i of the state is
// XORed with XORK_i and then passed through the AES S-box:
//   out[i][j] = SBOX[state[i][j] ^ XORK_i].
// This follows the source's equations for the step. State and key use the
// standard AES byte order (byte n is row n%4, column n/4). Combinational.
module mod_subbytes
  import aes_pkg::*;
(
  input  block_t state,
  input  block_t rkey,   // round key of the current round
  output block_t out
);
  byte_t xork [4];

  always_comb begin
    for (int i = 0; i < 4; i++) xork[i] = row_xor(rkey, i);
    for (int n = 0; n < 16; n++)
      out[127-8*n -: 8] = sbox(get_byte(state, n) ^ xork[n % 4]);
  end
endmodule
