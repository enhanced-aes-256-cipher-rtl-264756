// tb_aes256_top: end-to-end testbench of the whole design at its default
// (and only) size. Random plaintexts enter the encryption pipeline with
// random gaps and a key that changes every few blocks; each ciphertext is
// checked against the reference model and then looped straight back into the
// decryption pipeline with the key it was made with, and the recovered
// plaintext is checked against the original. Both latencies must be exactly
// 15 cycles. Midway, reset is pulsed while both pipelines are full: the
// blocks in flight must vanish and traffic must resume correctly after it.
// The events the design has to handle are counted, and each must occur at
// least once: back-to-back blocks, gaps, key changes, both directions busy
// in the same cycle, and a reset with blocks in flight.
module tb_aes256_top;
  import aes_ref_pkg::*;
  localparam int LATENCY = 15;
  localparam int NBLK    = 600;

  logic clk = 0, rst_n = 0;
  logic enc_in_valid = 0, enc_out_valid, dec_in_valid = 0, dec_out_valid;
  logic [127:0] enc_datain = '0, enc_dataout, dec_datain = '0, dec_dataout;
  logic [255:0] enc_key = '0, dec_key = '0;

  int checks = 0, failures = 0, cycle = 0;
  int sent = 0, enc_done = 0, dec_done = 0;
  int n_b2b = 0, n_gap = 0, n_keychg = 0, n_both = 0, n_reset = 0, n_dropped = 0;

  typedef struct { logic [127:0] pt; logic [255:0] key; logic [127:0] ct; int t; } item_t;
  item_t encq[$], decq[$];

  aes256_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    item_t it, lb;
    bit    loop, prev_enc;
    int    rst_hold;
    logic [255:0] k;
    prev_enc = 0;
    rst_hold = 0;
    k = '0;
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (sent < NBLK || encq.size() != 0 || decq.size() != 0) begin
      @(negedge clk);
      // outputs of the last clock edge
      loop = 0;
      if (enc_out_valid) begin
        if (encq.size() == 0) check(0, "unexpected ciphertext");
        else begin
          it = encq.pop_front();
          check(enc_dataout == it.ct, "ciphertext");
          check(cycle - it.t == LATENCY, "encryption latency");
          enc_done++;
          lb = it;
          loop = 1;
        end
      end
      if (dec_out_valid) begin
        if (decq.size() == 0) check(0, "unexpected plaintext");
        else begin
          it = decq.pop_front();
          check(dec_dataout == it.pt, "plaintext");
          check(cycle - it.t == LATENCY, "decryption latency");
          dec_done++;
        end
      end
      // reset pulse with both pipelines busy
      if (rst_hold > 0) begin
        rst_hold--;
        if (rst_hold == 0) rst_n = 1;
        continue;
      end
      if (n_reset == 0 && sent >= NBLK / 2 && encq.size() > 5 && decq.size() > 5) begin
        n_reset++;
        n_dropped += encq.size() + decq.size();
        encq.delete();
        decq.delete();
        rst_n = 0;
        enc_in_valid = 0;
        dec_in_valid = 0;
        prev_enc = 0;
        rst_hold = 2;
        continue;
      end
      // encryption input
      enc_in_valid = (sent < NBLK) && (sent < 16 || $urandom % 5 != 0);
      if (enc_in_valid) begin
        if (sent == 0) begin
          enc_datain = 128'h0000_0000_0045_4c45_4354_524f_4e49_4353;   // "ELECTRONICS"
          k = 256'h0000_0000_0000_0000_0000_0050_5347_434f_4c4c_4547_454f_5445_4348_4e4f_4c4f_4759;
        end else begin
          enc_datain = rand128();
          if (sent % 5 == 0) begin
            k = rand256();
            n_keychg++;
          end
        end
        enc_key = k;
        encq.push_back('{enc_datain, k, r_encrypt(enc_datain, k, 1), cycle});
        if (prev_enc) n_b2b++;
        sent++;
      end else if (sent < NBLK) n_gap++;
      prev_enc = enc_in_valid;
      // decryption input: the ciphertext just produced, with its key
      dec_in_valid = loop;
      if (loop) begin
        dec_datain = lb.ct;
        dec_key    = lb.key;
        decq.push_back('{lb.pt, lb.key, lb.ct, cycle});
        if (enc_in_valid) n_both++;
      end
    end
    check(n_b2b > 0, "back-to-back blocks happened");
    check(n_gap > 0, "input gaps happened");
    check(n_keychg > 0, "key changes happened");
    check(n_both > 0, "both directions busy in one cycle");
    check(n_reset > 0 && n_dropped > 0, "reset with blocks in flight");
    check(dec_done > NBLK / 2, "most blocks made the round trip");
    $display("sent=%0d encrypted=%0d decrypted=%0d back_to_back=%0d gaps=%0d key_changes=%0d both_busy=%0d resets=%0d dropped=%0d",
             sent, enc_done, dec_done, n_b2b, n_gap, n_keychg, n_both, n_reset, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
