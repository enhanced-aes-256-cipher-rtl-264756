// key_gen_inv: one backward step of the AES-256 key schedule, used by the
// decryption pipeline to walk the round keys from the last to the first
// without storing them. From rk[n-1] and rk[n] (n = 2..14 on rc) it
// recovers rk[n-2]:
//   rk[n-2].w0 = rk[n].w0 ^ t,  rk[n-2].wj = rk[n].wj ^ rk[n].w(j-1),
// with t computed from rk[n-1] exactly as in key_gen. Recomputing round keys
// backwards is this design's choice; the source only shows a key expansion
// feeding every decryption round. Of rk[n-1] only the last word is needed,
// so lint reports its other bits as unused. Combinational.
module key_gen_inv
  import aes_pkg::*;
(
  input  key256_t key,    // {rk[n-1], rk[n]}
  input  rnd_t    rc,     // n
  output block_t  keyout  // rk[n-2]
);
  word_t t;

  always_comb begin
    if (!rc[0]) t = sub_word(rot_word(key[159:128])) ^ {rcon(32'(rc) >> 1), 24'h0};
    else        t = sub_word(key[159:128]);
    keyout = {key[127:96] ^ t,
              key[95:64]  ^ key[127:96],
              key[63:32]  ^ key[95:64],
              key[31:0]   ^ key[63:32]};
  end
endmodule
