// tb_key_pre: self-checking testbench for key_pre. Random keys against the reference pre-processing.
// Expected values come from the independent reference model in aes_ref_pkg
// (and, where noted, from published AES example values). Ends with one
// TB_RESULT line; a watchdog stops the run if it hangs.
module tb_key_pre;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [255:0] k, y;
  key_pre dut (.key(k), .key_out(y));

  task automatic check(logic [255:0] got, logic [255:0] exp, string what);
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
    k = '0; #1;
    check(y, {8{32'h62636363}}, "zero key");
    for (int i = 0; i < 2000; i++) begin
      k = rand256(); #1;
      check(y, r_key_pre(k), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
