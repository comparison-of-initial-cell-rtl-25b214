// tb_ssc_matched_filter: random 256-chip blocks and random code words; after
// the 256 chips and 16 partial sums are shifted in, the correlation for each
// of 16 rotations of code register 2 is compared with a direct 256-term sum
// of chip(16m+i) * c(i) * c((m+s) mod 16).
module tb_ssc_matched_filter;
  import csd_pkg::*;
  import csd_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, code_load = 1'b0, chip_en = 1'b0, sub_en = 1'b0, rot_en = 1'b0;
  logic [15:0] code_word = '0;
  logic signed [3:0] din = '0;
  logic signed [12:0] corr;
  int checks = 0, failures = 0;

  ssc_matched_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int chips [256];
    logic [15:0] w;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int trial = 0; trial < 20; trial++) begin
      w = (trial < 10) ? WORDS[trial] : 16'($urandom);
      for (int n = 0; n < 256; n++) chips[n] = (trial == 0) ? 7 * ssc_chip(0, 4, n) : int'($urandom_range(0, 15)) - 8;
      @(negedge clk);
      code_word = w; code_load = 1'b1;
      @(negedge clk);
      code_load = 1'b0;
      for (int n = 0; n < 256; n++) begin
        din = 4'(chips[n]); chip_en = 1'b1;
        sub_en = (n % 16 == 0) && (n != 0);
        @(negedge clk);
      end
      chip_en = 1'b0; sub_en = 1'b1;
      @(negedge clk);
      sub_en = 1'b0;
      for (int s = 0; s < 16; s++) begin
        int expv;
        expv = 0;
        for (int n = 0; n < 256; n++) expv += chips[n] * word_chip(w, n % 16) * word_chip(w, n / 16 + s);
        checks++;
        if (int'(corr) != expv) begin
          failures++;
          $display("FAIL: trial %0d s %0d corr %0d expected %0d", trial, s, corr, expv);
        end
        if (trial == 0 && s == 4) begin
          checks++;
          if (int'(corr) != 7 * 256) begin failures++; $display("FAIL: matched peak %0d", corr); end
        end
        rot_en = 1'b1;
        @(negedge clk);
        rot_en = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
