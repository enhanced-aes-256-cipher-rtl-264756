// tb_dec_round: self-checking testbench for dec_round. Each decryption round must undo the matching encryption round of the reference model.
// Expected values come from the independent reference model in aes_ref_pkg
// (and, where noted, from published AES example values). Ends with one
// TB_RESULT line; a watchdog stops the run if it hangs.
module tb_dec_round;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s, k, ym, yf, x;
  dec_round #(.FIRST(1'b0)) dut_m (.state(s), .rkey(k), .out(ym));
  dec_round #(.FIRST(1'b1)) dut_f (.state(s), .rkey(k), .out(yf));

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
    for (int i = 0; i < 2000; i++) begin
      x = rand128(); k = rand128();
      s = r_mix(r_modarith(r_shift_rows(r_subbytes(x, k, 1, 0) ^ k, 0), k, 0), 0) ^ k; #1;
      check(ym, x, "undo middle round");
      s = r_shift_rows(r_modarith(r_subbytes(x, k, 1, 0), k, 0), 0) ^ k; #1;
      check(yf, x, "undo final round");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
