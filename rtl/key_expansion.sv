// key_expansion: full key expansion of the modified AES-256. The cipher key
// is first pre-processed (key_pre: extra substitution and round-constant
// addition), then expanded with the AES-256 schedule (key_gen, thirteen
// steps) into the fifteen 128-bit round keys rk[0]..rk[14]. rk[0] and rk[1]
// are the two halves of the pre-processed key. Combinational; the decryption
// core uses it to obtain the last two round keys from the cipher key.
module key_expansion
  import aes_pkg::*;
(
  input  key256_t            key,
  output block_t [NR:0]      rk     // rk[r] = round key of round r
);
  key256_t kp;

  key_pre u_pre (.key(key), .key_out(kp));

  assign rk[0] = kp[255:128];
  assign rk[1] = kp[127:0];

  for (genvar n = 2; n <= NR; n++) begin : g_step
    key_gen u_gen (.key({rk[n-2], rk[n-1]}), .rc(rnd_t'(n)), .keyout(rk[n]));
  end
endmodule
