// enc_round: one round of the proposed AES-256 encryption, combinational.
// Rounds 1..13 (FINAL = 0), in the order the source gives:
//   modified SubBytes -> XOR with round key -> ShiftRows ->
//   modulo addition of round key -> MixColumns -> AddRoundKey.
// Round 14 (FINAL = 1):
//   modified SubBytes -> modulo addition -> ShiftRows -> AddRoundKey.
// Every keyed step of a round uses that round's key rk; the source draws a
// separate key arrow to each step, and using the one round key for all of them
// is this design's reading of it.
module enc_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  block_t state,
  input  block_t rkey,
  output block_t out
);
  block_t sb, sr, ma, pre_ark;

  mod_subbytes u_sb (.state(state), .rkey(rkey), .out(sb));

  if (!FINAL) begin : g_mid
    block_t xo, mc;
    add_round_key   u_xor (.state(sb), .rkey(rkey), .out(xo));
    shift_rows      u_sr  (.state(xo), .out(sr));
    mod_add         u_ma  (.state(sr), .rkey(rkey), .out(ma));
    mix_columns     u_mc  (.state(ma), .out(mc));
    assign pre_ark = mc;
  end else begin : g_final
    mod_add         u_ma  (.state(sb), .rkey(rkey), .out(ma));
    shift_rows      u_sr  (.state(ma), .out(sr));
    assign pre_ark = sr;
  end

  add_round_key u_ark (.state(pre_ark), .rkey(rkey), .out(out));
endmodule
