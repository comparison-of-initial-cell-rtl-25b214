// tb_psch_matched_filter: random 4-bit chips with primary-code bursts
// embedded; every output is compared with a direct 256-term correlation of
// the input history (window ending LAT = 2 chips before), and the peak value
// of a clean burst (256 * amplitude) is checked.
module tb_psch_matched_filter;
  import csd_pkg::*;
  import csd_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, corr_valid;
  logic signed [3:0] din = '0;
  logic signed [12:0] corr;
  int checks = 0, failures = 0;
  int hist [4000];
  int n_peak = 0;

  psch_matched_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_corr(int t);
    int s = 0;
    for (int n = 0; n < 256; n++) s += psc_chip(n) * ((t - 255 + n >= 0) ? hist[t - 255 + n] : 0);
    return s;
  endfunction

  initial begin
    int v, expv;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      // clean burst of amplitude 3 at chips 1000..1255, extreme values elsewhere sometimes
      if (t >= 1000 && t < 1256) v = 3 * psc_chip(t - 1000);
      else if (t >= 2000 && t < 2256) v = -8 * (psc_chip(t - 2000) < 0 ? 1 : 0) + 7 * (psc_chip(t - 2000) > 0 ? 1 : 0);
      else v = int'($urandom_range(0, 15)) - 8;
      hist[t] = v;
      @(negedge clk);
      din = 4'(v); en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      if (t >= 2) begin
        expv = ref_corr(t - 2);
        checks++;
        if (!corr_valid || int'(corr) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d corr %0d expected %0d", t, corr, expv);
        end
        if (t - 2 == 1255) begin
          checks++;
          if (int'(corr) != 768) begin failures++; $display("FAIL: peak %0d", corr); end
          n_peak++;
        end
        if (t - 2 == 2255) begin
          checks++;
          begin
            int np = 0;
            for (int n = 0; n < 256; n++) np += (psc_chip(n) > 0);
            if (int'(corr) != 7 * np + 8 * (256 - np)) begin failures++; $display("FAIL: extreme peak %0d", corr); end
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
