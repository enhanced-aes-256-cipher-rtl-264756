// tb_add_round_key: self-checking testbench for add_round_key. Random state/key pairs against the XOR of the two.
// Expected values come from the independent reference model in aes_ref_pkg
// (and, where noted, from published AES example values). Ends with one
// TB_RESULT line; a watchdog stops the run if it hangs.
module tb_add_round_key;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s, k, y;
  add_round_key dut (.state(s), .rkey(k), .out(y));

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
    s = 128'h00112233445566778899aabbccddeeff; k = 128'h000102030405060708090a0b0c0d0e0f; #1;
    check(y, 128'h00102030405060708090a0b0c0d0e0f0, "FIPS-197 round 0");
    for (int i = 0; i < 2000; i++) begin
      s = rand128(); k = rand128(); #1;
      check(y, s ^ k, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
