// key_gen: one step of the AES-256 key schedule, producing round key n from
// the two round keys before it (n = 2..14, given on rc):
//   t  = (n even) ? SubWord(RotWord(last word of rk[n-1])) ^ {Rcon(n/2), 0}
//                 : SubWord(last word of rk[n-1])
//   rk[n].w0 = rk[n-2].w0 ^ t,  rk[n].wj = rk[n-2].wj ^ rk[n].w(j-1).
// This is the standard AES-256 schedule, two round keys (eight words) at a
// time seen as a sliding 256-bit window. Its port names (key, rc, keyout)
// follow the Key_Generation unit of the source's round schematic; the 256-bit
// key window is this design's choice, as AES-256 needs two previous round
// keys. Only the first round key of the window and the last word of the
// second are used, as in any AES-256 schedule step, so lint reports the
// other key bits as unused. Combinational.
module key_gen
  import aes_pkg::*;
(
  input  key256_t key,    // {rk[n-2], rk[n-1]}
  input  rnd_t    rc,     // n, index of the round key produced
  output block_t  keyout  // rk[n]
);
  word_t t;
  word_t w [4];

  always_comb begin
    if (!rc[0]) t = sub_word(rot_word(key[31:0])) ^ {rcon(32'(rc) >> 1), 24'h0};
    else        t = sub_word(key[31:0]);
    w[0] = key[255:224] ^ t;
    w[1] = key[223:192] ^ w[0];
    w[2] = key[191:160] ^ w[1];
    w[3] = key[159:128] ^ w[2];
    keyout = {w[0], w[1], w[2], w[3]};
  end
endmodule
