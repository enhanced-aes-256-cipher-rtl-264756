// tb_avalanche: avalanche-effect experiment on the encryption pipeline.
// Five 128-bit plaintexts, each paired with a copy that differs in one bit,
// are encrypted one at a time under the ASCII key "PSGCOLLEGEOTECHNOLOGY"
// (zero padded at the left to 256 bits). The state of every pipeline stage
// is read as the block passes, so the state after each of the 14 rounds is
// known for both copies; the avalanche effect of a round is the fraction of
// the 128 state bits that differ between the two copies. Every round state
// is checked against the reference model; the table of avalanche figures is
// printed next to the same figures for unmodified AES-256 (reference model
// with the modifications off) for comparison.
module tb_avalanche;
  import aes_ref_pkg::*;
  localparam logic [255:0] KEY =
    256'h0000_0000_0000_0000_0000_0050_5347_434f_4c4c_4547_454f_5445_4348_4e4f_4c4f_4759;
  localparam logic [127:0] PT [5] = '{
    128'h6AAB3E2CE1EB488AEDE3E5C271E7B59D, 128'h0AE231D3CC3865DAB650465BE5A61D62,
    128'h2A60EF8D9F0F6909612E7CE1734F33D6, 128'hAFDEAE30C1D4A939E89011467C11C955,
    128'hAEF6A545B7B00CA10225CBE70EE25907};
  localparam logic [127:0] PT_FLIP [5] = '{
    128'h6AAB3E2CE1EB688AEDE3E5C271E7B59D, 128'h0AE231D3CC3865DAB650465BE5A61D63,
    128'h2A60EF8D9F0F6929612E7CE1734F33D6, 128'hAFDEAE30C1D4A939E89011467C11C954,
    128'hAEF6A545B7B00CA14225CBE70EE25907};

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [127:0] datain = '0, dataout;
  logic [255:0] key = KEY;
  int checks = 0, failures = 0;
  logic [127:0] st [2][15];       // [copy][round] states seen in the pipeline
  int mod_pct [5][15], std_pct [5][15];

  aescipher256 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encrypt one block alone and capture the state after every round
  task automatic run(logic [127:0] p, int copy);
    @(negedge clk);
    datain = p;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    for (int r = 0; r <= 14; r++) begin
      st[copy][r] = dut.state_q[r];
      checks++;
      if (st[copy][r] !== r_encrypt(p, KEY, 1, r)) begin
        failures++;
        $display("FAIL state after round %0d", r);
      end
      @(negedge clk);
    end
    checks++;
    if (dataout !== st[copy][14]) failures++;
  endtask

  initial begin
    string line;
    int sum_m, sum_s;
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 5; e++) begin
      run(PT[e], 0);
      run(PT_FLIP[e], 1);
      for (int r = 1; r <= 14; r++) begin
        mod_pct[e][r] = $countones(st[0][r] ^ st[1][r]) * 100 / 128;
        std_pct[e][r] = $countones(r_encrypt(PT[e], KEY, 0, r) ^ r_encrypt(PT_FLIP[e], KEY, 0, r)) * 100 / 128;
      end
      $display("sample %0d ciphertext %h / %h", e + 1, st[0][14], st[1][14]);
    end
    $display("avalanche effect in %% of state bits, per round (AES / modified AES)");
    for (int e = 0; e < 5; e++) begin
      line = $sformatf("sample %0d:", e + 1);
      for (int r = 1; r <= 14; r++) line = {line, $sformatf(" %0d/%0d", std_pct[e][r], mod_pct[e][r])};
      $display("%s", line);
    end
    for (int r = 1; r <= 14; r++) begin
      sum_m = 0;
      sum_s = 0;
      for (int e = 0; e < 5; e++) begin
        sum_m += mod_pct[e][r];
        sum_s += std_pct[e][r];
      end
      $display("round %2d mean: AES %0d%%  modified %0d%%", r, sum_s / 5, sum_m / 5);
    end
    // after the full cipher, roughly half of the bits should differ
    for (int e = 0; e < 5; e++) begin
      checks++;
      if (mod_pct[e][14] < 30 || mod_pct[e][14] > 70) begin
        failures++;
        $display("FAIL sample %0d final avalanche %0d%%", e + 1, mod_pct[e][14]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
