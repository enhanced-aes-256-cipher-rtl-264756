// inv_mix_columns: AES InvMixColumns. Each column is multiplied in GF(2^8)
// by [14 11 13 9; 9 14 11 13; 13 9 14 11; 11 13 9 14], built from repeated
// xtime (function gmul of aes_pkg). Combinational.
module inv_mix_columns
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
      out[127-8*(4*c)   -: 8] = gmul(a0, 4'd14) ^ gmul(a1, 4'd11) ^ gmul(a2, 4'd13) ^ gmul(a3, 4'd9);
      out[127-8*(4*c+1) -: 8] = gmul(a0, 4'd9)  ^ gmul(a1, 4'd14) ^ gmul(a2, 4'd11) ^ gmul(a3, 4'd13);
      out[127-8*(4*c+2) -: 8] = gmul(a0, 4'd13) ^ gmul(a1, 4'd9)  ^ gmul(a2, 4'd14) ^ gmul(a3, 4'd11);
      out[127-8*(4*c+3) -: 8] = gmul(a0, 4'd11) ^ gmul(a1, 4'd13) ^ gmul(a2, 4'd9)  ^ gmul(a3, 4'd14);
    end
endmodule
