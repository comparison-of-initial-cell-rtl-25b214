// tb_scr_code_gen: for several groups, all 16 I and Q code chips are
// compared, chip by chip, with the scrambling code reference (x shifted by the
// code number, y, and both shifted by 131072 for Q). Each group is loaded
// with a jump to a slot k; the chips from the start of slot k to beyond the
// end of the frame are checked (which includes the restart at frame_start),
// with gaps between chips. Also checks that the jump takes k cycles.
module tb_scr_code_gen;
  import csd_pkg::*;
  import csd_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, chip_en = 1'b0, frame_start = 1'b0, load = 1'b0, run = 1'b0, ready;
  logic [3:0] load_slot = '0;
  logic [4:0] group = '0;
  logic [15:0] code_i, code_q;
  int checks = 0, failures = 0;

  scr_code_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int groups [4] = '{0, 7, 19, 31};
    int slots  [4] = '{0, 14, 5, 13};
    build_sequences();
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    foreach (groups[t]) begin
      int k0, wait_cycles;
      group = 5'(groups[t]);
      k0 = slots[t];
      @(negedge clk);
      load = 1'b1; load_slot = 4'(k0);
      @(negedge clk);
      load = 1'b0;
      wait_cycles = 0;
      while (!ready) begin @(negedge clk); wait_cycles++; end
      checks++;
      if (wait_cycles != k0) begin failures++; $display("FAIL: jump to slot %0d took %0d cycles", k0, wait_cycles); end
      run = 1'b1;
      for (int c = 2560 * k0; c < 2560 * k0 + 2560 + 38400 * (k0 >= 13 ? 1 : 0) + 600; c++) begin
        int i;
        i = c % 38400;
        @(negedge clk);
        chip_en = 1'b1;
        frame_start = (i == 0);
        #1;
        for (int k = 0; k < 16; k++) begin
          int n;
          n = 16 * (16 * groups[t] + k);
          checks++;
          if (code_i[k] != scr_i(n, i) || code_q[k] != scr_q(n, i)) begin
            failures++;
            if (failures < 10) $display("FAIL: group %0d code %0d chip %0d", groups[t], k, i);
          end
        end
        @(negedge clk);
        chip_en = 1'b0;
        frame_start = 1'b0;
      end
      run = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
