// tb_inv_mod_subbytes: self-checking testbench for inv_mod_subbytes. Checks every inverse S-box entry and random state/key pairs.
// Expected values come from the independent reference model in aes_ref_pkg
// (and, where noted, from published AES example values). Ends with one
// TB_RESULT line; a watchdog stops the run if it hangs.
module tb_inv_mod_subbytes;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s, k, y;
  inv_mod_subbytes dut (.state(s), .rkey(k), .out(y));

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
      s = {16{sb_t[x]}}; #1;
      check(y, {16{8'(x)}}, "inverse S-box entry");
    end
    for (int i = 0; i < 2000; i++) begin
      s = rand128(); k = rand128(); #1;
      check(y, r_subbytes(s, k, 1, 1), "random");
    end
    for (int i = 0; i < 500; i++) begin
      s = rand128(); k = rand128(); s = r_subbytes(s, k, 1, 0); #1;
      check(r_subbytes(y, k, 1, 0), s, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
