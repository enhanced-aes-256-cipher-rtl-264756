// add_round_key: AddRoundKey, the bitwise XOR of the 128-bit state with a
// 128-bit round key. The same unit serves as the extra "XOR" step that the
// modified encryption round inserts after the modified SubBytes (and that
// decryption undoes in the same way, since XOR is its own inverse).
// Purely combinational: out = state ^ rkey, no clock, no latency.
module add_round_key
  import aes_pkg::*;
(
  input  block_t state,  // 128-bit state, AES byte order
  input  block_t rkey,   // 128-bit round key
  output block_t out
);
  always_comb out = state ^ rkey;
endmodule
