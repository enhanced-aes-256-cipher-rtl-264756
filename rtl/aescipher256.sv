// aescipher256: pipelined encryption core of the modified AES-256.
//
// The 256-bit key is pre-processed (key_pre) into {rk0, rk1}; the plaintext
// is XORed with rk0 (initial AddRoundKey) and enters a 15-stage pipeline:
// stage 0 holds the whitened block, stage r (1..14) the block after round r
// (enc_round, round 14 being the final round without MixColumns). Round keys
// are generated on the fly: next to the block, each stage carries the 256-bit
// window {rk[r], rk[r+1]} and a key_gen per stage derives the next round key,
// so a new key may accompany every block.
//
// Interface: a block is accepted on every rising clock edge where in_valid is
// high (datain and key sampled together); its ciphertext appears on dataout
// with out_valid exactly 15 cycles later. Throughput is one 128-bit block per
// clock. rst_n (active low, synchronous) clears only the valid bits; the data
// registers load only when their stage receives a valid block.
//
// The module name and the datain/key/dataout ports follow the simulation
// shown in the source; the pipelining, valid handshake and reset are this
// design's choices (the source does not give the timing of its core).
module aescipher256
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  block_t  datain,    // plaintext
  input  key256_t key,       // cipher key
  output logic    out_valid,
  output block_t  dataout    // ciphertext
);
  block_t  [NR:0]   state_q;   // state_q[r]: block after round r
  key256_t [NR-1:0] keys_q;    // keys_q[r]:  {rk[r], rk[r+1]}
  logic    [NR:0]  vld_q;

  key256_t kp;
  block_t  s0;

  key_pre       u_pre  (.key(key), .key_out(kp));
  add_round_key u_ark0 (.state(datain), .rkey(kp[255:128]), .out(s0));

  always_ff @(posedge clk) begin
    if (!rst_n) vld_q[0] <= 1'b0;
    else        vld_q[0] <= in_valid;
    if (in_valid) begin
      state_q[0] <= s0;
      keys_q[0]  <= kp;
    end
  end

  for (genvar r = 1; r <= NR; r++) begin : g_round
    block_t rs;

    enc_round #(.FINAL(r == NR)) u_round (
      .state(state_q[r-1]), .rkey(keys_q[r-1][127:0]), .out(rs));

    always_ff @(posedge clk) begin
      if (!rst_n) vld_q[r] <= 1'b0;
      else        vld_q[r] <= vld_q[r-1];
      if (vld_q[r-1]) state_q[r] <= rs;
    end

    if (r < NR) begin : g_key
      block_t nk;
      key_gen u_kg (.key(keys_q[r-1]), .rc(rnd_t'(r + 1)), .keyout(nk));
      always_ff @(posedge clk)
        if (vld_q[r-1]) keys_q[r] <= {keys_q[r-1][127:0], nk};
    end
  end

  assign dataout   = state_q[NR];
  assign out_valid = vld_q[NR];

  // Pipeline rule: every accepted block leaves exactly NR+1 cycles later.
  a_latency : assert property (@(posedge clk) disable iff (!rst_n)
                               in_valid |-> ##(NR+1) out_valid);
endmodule
