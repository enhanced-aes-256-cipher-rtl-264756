// mod_sub: the "modulo subtraction" step of decryption, inverse of mod_add.
// Each round-key byte is subtracted from the state byte in the same
// position, modulo 256:  out[n] = (state[n] - rkey[n]) mod 2^8.
// Byte-wise modulo 256 is this design's choice (see mod_add). Combinational.
module mod_sub
  import aes_pkg::*;
(
  input  block_t state,
  input  block_t rkey,
  output block_t out
);
  always_comb
    for (int n = 0; n < 16; n++)
      out[127-8*n -: 8] = get_byte(state, n) - get_byte(rkey, n);
endmodule
