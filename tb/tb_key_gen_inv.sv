// tb_key_gen_inv: self-checking testbench for key_gen_inv. Every backward step n = 14..2 for random keys against the reference schedule.
// Expected values come from the independent reference model in aes_ref_pkg
// (and, where noted, from published AES example values). Ends with one
// TB_RESULT line; a watchdog stops the run if it hangs.
module tb_key_gen_inv;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [255:0] k;
  logic [3:0]   rc;
  logic [127:0] y;
  logic [127:0] rk [15];
  key_gen_inv dut (.key(k), .rc(rc), .keyout(y));

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
    for (int i = 0; i < 200; i++) begin
      r_expand(rand256(), i % 2 == 1, rk);
      for (int n = 14; n >= 2; n--) begin
        k = {rk[n-1], rk[n]}; rc = 4'(n); #1;
        check(y, rk[n-2], "backward step");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
