// aesdecipher256: pipelined decryption core of the modified AES-256.
//
// key_expansion turns the cipher key into all round keys, of which only the
// last two, {rk13, rk14}, enter the pipeline. Stage 0 holds the ciphertext
// after the undoing of round 14 (dec_round FIRST). Stages 1..13 undo rounds
// 13..1; each carries the window {rk[r], rk[r+1]} and steps it backwards with
// key_gen_inv. Stage 14 applies the closing AddRoundKey with rk0 and holds
// the plaintext.
//
// Interface and timing are those of aescipher256: a block is accepted on each
// rising edge with in_valid high, its plaintext leaves on dataout with
// out_valid 15 cycles later, one block per clock. rst_n (active low,
// synchronous) clears the valid bits only.
//
// The step order inside the rounds follows the source; pipelining, the
// backward key walk, handshake and reset are this design's choices.
module aesdecipher256
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  block_t  datain,    // ciphertext
  input  key256_t key,       // cipher key (the same one used to encrypt)
  output logic    out_valid,
  output block_t  dataout    // plaintext
);
  block_t  [NR:0]   state_q;   // state_q[j]: block after undoing round NR-j
  key256_t [NR-1:0] keys_q;    // keys_q[j]:  {rk[NR-1-j], rk[NR-j]}
  logic    [NR:0]  vld_q;

  block_t [NR:0] rk;
  block_t        s0;

  key_expansion u_kx    (.key(key), .rk(rk));
  dec_round #(.FIRST(1'b1)) u_first (.state(datain), .rkey(rk[NR]), .out(s0));

  always_ff @(posedge clk) begin
    if (!rst_n) vld_q[0] <= 1'b0;
    else        vld_q[0] <= in_valid;
    if (in_valid) begin
      state_q[0] <= s0;
      keys_q[0]  <= {rk[NR-1], rk[NR]};
    end
  end

  for (genvar j = 1; j < NR; j++) begin : g_round
    // this stage undoes encryption round r = NR - j with rk[r]
    block_t rs, pk;

    dec_round #(.FIRST(1'b0)) u_round (
      .state(state_q[j-1]), .rkey(keys_q[j-1][255:128]), .out(rs));
    key_gen_inv u_kgi (.key(keys_q[j-1]), .rc(rnd_t'(NR - j + 1)), .keyout(pk));

    always_ff @(posedge clk) begin
      if (!rst_n) vld_q[j] <= 1'b0;
      else        vld_q[j] <= vld_q[j-1];
      if (vld_q[j-1]) begin
        state_q[j] <= rs;
        keys_q[j]  <= {pk, keys_q[j-1][255:128]};
      end
    end
  end

  // closing AddRoundKey with rk0
  block_t pt;
  add_round_key u_ark0 (.state(state_q[NR-1]), .rkey(keys_q[NR-1][255:128]), .out(pt));

  always_ff @(posedge clk) begin
    if (!rst_n) vld_q[NR] <= 1'b0;
    else        vld_q[NR] <= vld_q[NR-1];
    if (vld_q[NR-1]) state_q[NR] <= pt;
  end

  assign dataout   = state_q[NR];
  assign out_valid = vld_q[NR];

  // Pipeline rule: every accepted block leaves exactly NR+1 cycles later.
  a_latency : assert property (@(posedge clk) disable iff (!rst_n)
                               in_valid |-> ##(NR+1) out_valid);
endmodule
