// tb_mod_add: self-checking testbench for mod_add. Checks byte-wise modulo-256 addition, including carries that must not cross bytes.
// Expected values come from the independent reference model in aes_ref_pkg
// (and, where noted, from published AES example values). Ends with one
// TB_RESULT line; a watchdog stops the run if it hangs.
module tb_mod_add;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s, k, y;
  mod_add dut (.state(s), .rkey(k), .out(y));

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
    s = {16{8'hff}}; k = {16{8'h01}}; #1;
    check(y, '0, "wrap-around");
    for (int i = 0; i < 2000; i++) begin
      s = rand128(); k = rand128(); #1;
      check(y, r_modarith(s, k, 0), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
