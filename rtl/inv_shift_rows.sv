// inv_shift_rows: inverse ShiftRows. Row r is rotated right by r positions:
//   out[r][c] = in[r][(c-r) mod 4].
// Byte n of the 128-bit vector is row n%4, column n/4. Pure wiring.
module inv_shift_rows
  import aes_pkg::*;
(
  input  block_t state,
  output block_t out
);
  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        out[127-8*(4*c+r) -: 8] = get_byte(state, 4*((c+4-r)%4) + r);
endmodule
