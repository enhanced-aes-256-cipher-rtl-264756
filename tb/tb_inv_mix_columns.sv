// tb_inv_mix_columns: self-checking testbench for inv_mix_columns. Checks the known column 8e 4d a1 bc -> db 13 53 45 and random states.
// Expected values come from the independent reference model in aes_ref_pkg
// (and, where noted, from published AES example values). Ends with one
// TB_RESULT line; a watchdog stops the run if it hangs.
module tb_inv_mix_columns;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s, y;
  inv_mix_columns dut (.state(s), .out(y));

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
    s = {4{32'h8e4da1bc}}; #1;
    check(y, {4{32'hdb135345}}, "known column");
    for (int i = 0; i < 2000; i++) begin
      s = rand128(); #1;
      check(y, r_mix(s, 1), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
