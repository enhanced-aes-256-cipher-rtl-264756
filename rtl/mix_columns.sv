// mix_columns: AES MixColumns. Each column (a0..a3) is multiplied in GF(2^8)
// by the circulant matrix [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2], using
// xtime for the factor 2 and xtime(a)^a for the factor 3. Combinational.
module mix_columns
  import aes_pkg::*;
(
  input  block_t state,
  output block_t out
);
  always_comb
    for (int c = 0; c < 4; c++) begin
      automatic byte_t a0 = get_byte(state, 4*c);
      automatic byte_t a1 = get_byte(state, 4*c+1);
      automatic byte_t a2 = get_byte(state, 4*c+2);
      automatic byte_t a3 = get_byte(state, 4*c+3);
      out[127-8*(4*c)   -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      out[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      out[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      out[127-8*(4*c+3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
endmodule
