// key_pre: key pre-processing ahead of the AES-256 key schedule.
// Before any round key is derived, the cipher key is given an extra
// substitution step and a round-constant addition, so that the raw key is
// never used directly: every one of the 32 key bytes goes through the AES
// S-box, and the first round constant (01) is XORed into the most significant
// byte of each of the eight 32-bit key words:
//   w'_i = SubWord(w_i) ^ {8'h01, 24'h0},  i = 0..7.
// The source calls for a substitution step and a round-constant addition
// before subkey creation; which bytes receive the constant is this design's
// choice. Combinational.
module key_pre
  import aes_pkg::*;
(
  input  key256_t key,      // cipher key as given by the user
  output key256_t key_out   // pre-processed key = {rk0, rk1}
);
  always_comb
    for (int i = 0; i < 8; i++)
      key_out[255-32*i -: 32] = sub_word(key[255-32*i -: 32]) ^ {rcon(1), 24'h0};
endmodule
