// tb_mod_subbytes: self-checking testbench for mod_subbytes. Checks every S-box entry (zero key) and random state/key pairs.
// Expected values come from the independent reference model in aes_ref_pkg
// (and, where noted, from published AES example values). Ends with one
// TB_RESULT line; a watchdog stops the run if it hangs.
module tb_mod_subbytes;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s, k, y;
  mod_subbytes dut (.state(s), .rkey(k), .out(y));

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
    k = '0;
    for (int x = 0; x < 256; x++) begin
      s = {16{8'(x)}}; #1;
      check(y, {16{sb_t[x]}}, "S-box entry");
    end
    // a key whose rows XOR to 01,02,04,08 shifts the S-box input row by row
    k = {8'h01, 8'h02, 8'h04, 8'h08, 96'h0}; s = '0; #1;
    check(y, {4{sb_t[1], sb_t[2], sb_t[4], sb_t[8]}}, "row keys");
    for (int i = 0; i < 2000; i++) begin
      s = rand128(); k = rand128(); #1;
      check(y, r_subbytes(s, k, 1, 0), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
