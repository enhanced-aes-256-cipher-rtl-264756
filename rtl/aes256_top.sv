// aes256_top: the modified AES-256 as a whole, an encryption pipeline
// (aescipher256) and a decryption pipeline (aesdecipher256) side by side,
// sharing clock and reset.
//
// Each direction accepts one 128-bit block per clock on its own
// valid/data input and returns the result 15 cycles later on its own
// valid/data output; the two directions run independently and may be used in
// the same cycle. Each direction has its own 256-bit key input, sampled with
// its block, so the two directions need not use the same key at the same
// time; giving them separate key ports is this design's choice.
module aes256_top
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // encryption
  input  logic    enc_in_valid,
  input  block_t  enc_datain,
  input  key256_t enc_key,
  output logic    enc_out_valid,
  output block_t  enc_dataout,
  // decryption
  input  logic    dec_in_valid,
  input  block_t  dec_datain,
  input  key256_t dec_key,
  output logic    dec_out_valid,
  output block_t  dec_dataout
);
  aescipher256 u_enc (
    .clk, .rst_n, .in_valid(enc_in_valid), .datain(enc_datain), .key(enc_key),
    .out_valid(enc_out_valid), .dataout(enc_dataout));

  aesdecipher256 u_dec (
    .clk, .rst_n, .in_valid(dec_in_valid), .datain(dec_datain), .key(dec_key),
    .out_valid(dec_out_valid), .dataout(dec_dataout));
endmodule
