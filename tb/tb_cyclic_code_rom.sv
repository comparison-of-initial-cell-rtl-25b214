// tb_cyclic_code_rom: checks the properties the stage-2 code words must
// have, computed from chip values: each word reads back as listed, is
// orthogonal to the inner primary code, has periodic autocorrelation
// sidelobes of at most 4, and the 256-chip bursts of any two different
// group/slot pairs correlate to at most 96 (peak 256).
module tb_cyclic_code_rom;
  import csd_pkg::*;
  import csd_ref_pkg::*;
  logic [4:0] addr = '0;
  logic [15:0] word;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  cyclic_code_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int burst_corr(logic [15:0] w1, int s1, logic [15:0] w2, int s2);
    int inner = 0, outer = 0;
    for (int i = 0; i < 16; i++) inner += word_chip(w1, i) * word_chip(w2, i);
    for (int m = 0; m < 16; m++) outer += word_chip(w1, m + s1) * word_chip(w2, m + s2);
    return inner * outer;
  endfunction

  initial begin
    logic [15:0] w [32];
    int worst;
    for (int g = 0; g < 32; g++) begin
      int dot, ac;
      addr = 5'(g);
      #1;
      w[g] = word;
      checks++;
      if (word != WORDS[g]) begin failures++; $display("FAIL: word %0d = %h", g, word); end
      dot = 0;
      for (int i = 0; i < 16; i++) dot += word_chip(word, i) * A_SEQ[i];
      checks++;
      if (dot != 0) begin failures++; $display("FAIL: word %0d not orthogonal to primary code", g); end
      for (int l = 1; l < 16; l++) begin
        ac = 0;
        for (int m = 0; m < 16; m++) ac += word_chip(word, m) * word_chip(word, m + l);
        checks++;
        if (ac > 4 || ac < -4) begin failures++; $display("FAIL: word %0d lag %0d autocorr %0d", g, l, ac); end
      end
    end
    worst = 0;
    for (int g1 = 0; g1 < 32; g1++)
      for (int g2 = g1; g2 < 32; g2++)
        for (int s1 = 0; s1 < 15; s1++)
          for (int s2 = 0; s2 < 15; s2++) begin
            int c;
            if (g1 == g2 && s1 >= s2) continue;
            c = burst_corr(w[g1], s1, w[g2], s2);
            if (c < 0) c = -c;
            if (c > worst) worst = c;
          end
    checks++;
    if (worst > 96) begin failures++; $display("FAIL: worst cross-correlation %0d", worst); end
    checks++;
    if (burst_corr(w[5], 3, w[5], 3) != 256) begin failures++; $display("FAIL: peak"); end
    $display("worst cross-correlation %0d of 256", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
