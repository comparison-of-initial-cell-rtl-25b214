// tb_frame_timer: a chip position counter drives the timer; after a sync
// with slot boundary B and slot number s (given at the chip following the
// burst end, as stage 2 would later), frame_start must come exactly at the
// first chip of slot 0, i.e. (15 - s - 1) slot starts after the next one, and
// then every 38400 chips; start3 must come at the first slot start after the
// sync with start_slot = s+1 mod 15, and from there sym_first / sym_last must
// mark chips 0 and 255 of every 256-chip symbol counted from the slot start.
module tb_frame_timer;
  import csd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, chip_en = 1'b0, sync = 1'b0;
  logic [11:0] pos = '0, slot_boundary = '0;
  logic [3:0] slot_id = '0, slot_cnt;
  logic frame_start, start3, sym_first, sym_last, running;
  logic [3:0] start_slot;
  int checks = 0, failures = 0;

  frame_timer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int b, int s);
    // chip t (t = 0 at the first chip of slot s) sits at position (b - 255 + t) mod 2560
    int p0, nfs, nsym, n3;
    p0 = (b - 255 + 2560) % 2560;
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    nfs = 0; nsym = 0; n3 = 0;
    for (int t = 0; t < (15 - s) * 2560 + 2 * 38400; t++) begin
      int fc;
      @(negedge clk);
      pos = 12'((p0 + t) % 2560);
      chip_en = 1'b1;
      if (t == 256 + 500) begin sync = 1'b1; slot_boundary = 12'(b); slot_id = 4'(s); end
      #1;
      fc = t - (15 - s) * 2560;     // chip within frame, valid once >= 0
      checks++;
      if (frame_start != (fc >= 0 && fc % 38400 == 0)) begin
        failures++; $display("FAIL: b %0d s %0d t %0d frame_start %0b", b, s, t, frame_start);
      end
      nfs += frame_start;
      checks++;
      if (start3 != (t == 2560)) begin failures++; $display("FAIL: b %0d s %0d t %0d start3 %0b", b, s, t, start3); end
      if (start3) begin
        n3++;
        checks++;
        if (int'(start_slot) != (s + 1) % 15) begin failures++; $display("FAIL: start slot %0d", start_slot); end
      end
      checks++;
      if (sym_first != (t >= 2560 && t % 256 == 0) || sym_last != (t >= 2560 && t % 256 == 255)) begin
        failures++; if (failures < 10) $display("FAIL: b %0d s %0d t %0d sym %0b %0b", b, s, t, sym_first, sym_last);
      end
      nsym += sym_last;
      @(negedge clk);
      chip_en = 1'b0; sync = 1'b0;
    end
    checks += 3;
    if (nfs != 2) begin failures++; $display("FAIL: %0d frame starts", nfs); end
    if (nsym != ((15 - s) * 2560 + 2 * 38400 - 2560) / 256) begin failures++; $display("FAIL: %0d symbols", nsym); end
    if (n3 != 1) begin failures++; $display("FAIL: %0d stage-3 starts", n3); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(255, 0);
    run(1000, 14);
    run(100, 7);
    run(2559, 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
