// tb_aescipher256: self-checking testbench for the encryption pipeline.
// Streams 400 blocks with random gaps (in_valid low) and a key that changes
// every few blocks, and checks every ciphertext against the reference model
// and its latency (exactly 15 clock cycles from acceptance to out_valid).
// Also counts back-to-back acceptances to confirm one block per clock.
// The first block is the 11-character text "ELECTRONICS" (ASCII, zero
// padded at the left) under the ASCII key "PSGCOLLEGEOTECHNOLOGY".
module tb_aescipher256;
  import aes_ref_pkg::*;
  localparam int LATENCY = 15;
  localparam int NBLK    = 400;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [127:0] datain = '0, dataout;
  logic [255:0] key = '0;
  int checks = 0, failures = 0, cycle = 0, sent = 0, got = 0, back_to_back = 0;

  typedef struct { logic [127:0] exp; int t; } item_t;
  item_t q[$];

  aescipher256 dut (.*);

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    logic [255:0] k;
    logic prev;
    prev = 0;
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    k = 256'h0;
    while (sent < NBLK) begin
      @(negedge clk);
      in_valid = (sent < 20) || ($urandom % 4 != 0);
      if (in_valid) begin
        if (sent == 0) begin
          datain = 128'h0000_0000_0045_4c45_4354_524f_4e49_4353;          // "ELECTRONICS"
          k = 256'h0000_0000_0000_0000_0000_0050_5347_434f_4c4c_4547_454f_5445_4348_4e4f_4c4f_4759; // "PSGCOLLEGEOTECHNOLOGY"
        end else begin
          datain = rand128();
          if (sent % 7 == 1) k = rand256();
        end
        key = k;
        q.push_back('{r_encrypt(datain, key, 1), cycle});
        if (prev) back_to_back++;
        sent++;
      end
      prev = in_valid;
    end
    @(negedge clk);
    in_valid = 0;
  end

  // monitor
  initial begin
    while (got < NBLK) begin
      @(negedge clk);
      if (out_valid) begin
        item_t it;
        if (q.size() == 0) begin
          check(0, "unexpected output");
          continue;
        end
        it = q.pop_front();
        if (got == 0) $display("ELECTRONICS -> %h", dataout);
        check(dataout == it.exp, "ciphertext");
        check(cycle - it.t == LATENCY, "latency");
        got++;
      end
    end
    check(back_to_back > 20, "back-to-back blocks were sent");
    check(q.size() == 0, "all blocks came out");
    $display("blocks=%0d back_to_back=%0d", got, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
