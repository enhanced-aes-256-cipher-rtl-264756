// tb_key_expansion: self-checking testbench for key_expansion. All 15 round keys for random keys; also checks the reference model itself against the FIPS-197 AES-256 example.
// Expected values come from the independent reference model in aes_ref_pkg
// (and, where noted, from published AES example values). Ends with one
// TB_RESULT line; a watchdog stops the run if it hangs.
module tb_key_expansion;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [255:0] k;
  logic [14:0][127:0] y;
  logic [127:0] rk [15];
  key_expansion dut (.key(k), .rk(y));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    // the reference, run as plain AES-256, must give the FIPS-197 C.3 ciphertext
    check(r_encrypt(128'h00112233445566778899aabbccddeeff,
                    256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 0),
          128'h8ea2b7ca516745bfeafc49904b496089, "reference model vs FIPS-197");
    for (int i = 0; i < 300; i++) begin
      k = (i == 0) ? '0 : rand256(); #1;
      r_expand(k, 1, rk);
      for (int r = 0; r < 15; r++) check(y[r], rk[r], "round key");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
