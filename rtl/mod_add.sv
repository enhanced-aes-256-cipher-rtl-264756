// mod_add: the "modulo addition" step that the proposed cipher round adds.
// Each state byte is added to the round-key byte in the same position,
// modulo 256 (carries do not cross byte boundaries):
//   out[n] = (state[n] + rkey[n]) mod 2^8.
// The source names the step and its key input but not the modulus or the
// operand width; the byte-wise modulo-256 form is this design's choice because
// it keeps the byte structure of the round and is exactly undone by mod_sub.
// Combinational.
module mod_add
  import aes_pkg::*;
(
  input  block_t state,
  input  block_t rkey,
  output block_t out
);
  always_comb
    for (int n = 0; n < 16; n++)
      out[127-8*n -: 8] = get_byte(state, n) + get_byte(rkey, n);
endmodule
