// shift_rows: AES ShiftRows. Row r of the 4x4 state is rotated left by r
// byte positions (row 0 unchanged, row 1 by one, ...):
//   out[r][c] = in[r][(c+r) mod 4].
// Byte n of the 128-bit vector is row n%4, column n/4. Pure wiring.
module shift_rows
  import aes_pkg::*;
(
  input  block_t state,
  output block_t out
);
  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        out[127-8*(4*c+r) -: 8] = get_byte(state, 4*((c+r)%4) + r);
endmodule
