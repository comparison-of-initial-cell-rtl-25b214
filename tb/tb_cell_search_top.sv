// tb_cell_search_top: end-to-end test of the cell search receiver.
//
// A cell in a random code group, using a random primary scrambling code of
// that group, transmits P-SCH, S-SCH and CPICH with a random 90-degree carrier
// rotation and light noise; the receiver starts at a random chip offset into
// the frame. The test checks the slot boundary, code group, slot number and
// the final long code against the transmitted values, checks that stage 3
// starts at the true start of the next slot and that each frame restart of
// the code generator is at the true frame start, that stage 2 ends before the
// next slot begins, and that every mechanism of the design occurred. The
// offset is chosen so that the decoded burst is in slot 13: stage 3 then
// starts in slot 14 and crosses a frame start while it votes.
// N_SLOTS is reduced to 3 to keep the run short (the full-size test uses 15).
module tb_cell_search_top;
  import csd_pkg::*;
  import csd_ref_pkg::*;

  localparam int unsigned NS = 3;
  localparam int RATIO = 5;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, chip_valid = 1'b0;
  iq_t  din = '0;
  logic stage1_done, stage2_done, frame_sync, code_found;
  logic [POS_W-1:0] slot_boundary;
  logic [GROUP_W-1:0] code_group;
  logic [SLOTID_W-1:0] slot_id;
  logic [LONG_W-1:0] long_code;

  cell_search_top #(.N_SLOTS(NS), .THRESHOLD(28)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int off, grp, pcode, rot;
  longint chip_no = 0, cyc = 0;
  longint drv_chip = 0;   // index of the chip on din
  int n_start3 = 0, n_s1 = 0, n_capture = 0, n_s2 = 0, n_frame = 0, n_votes = 0, n_found = 0, n_sym = 0;
  longint capture_chip = -1, s2_chip = -1, found_chip = -1;
  int exp_slot;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (60 * 38400 * RATIO) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.u_sampler.captured) begin
      n_capture++;
      capture_chip = drv_chip;
    end
    if (dut.s2_pulse) begin
      n_s2++;
      s2_chip = drv_chip;
    end
    if (dut.u_ft.frame_start) begin
      n_frame++;
      check(((drv_chip + off) % 38400) == 0, $sformatf("frame start at chip %0d", drv_chip));
    end
    if (dut.u_ft.start3) begin
      n_start3++;
      check(((drv_chip + off) % 2560) == 0, $sformatf("stage 3 start at chip %0d", drv_chip));
      check(((drv_chip + off) / 2560) % 15 == (slot_id + 1) % 15, "stage 3 start slot");
    end
    if (dut.u_ft.sym_last) n_sym++;
    if (dut.u_votes.valid) n_votes++;
  end

  initial begin
    int ri, rq, ni, nq;
    build_sequences();
    void'($urandom(32'd12345));
    // slot boundary B = 255 - off mod 2560; the burst is captured at chip
    // NS*2560 + B, which must lie in transmitted slot 13
    begin
      int r, b;
      r = $urandom_range(0, 2500);
      b = (255 - r + 2560) % 2560;
      if (b < 10) r += 20;
      b = (255 - r + 2560) % 2560;
      for (int j = 0; j < 15; j++)
        if ((((NS * 2560 + b) + r + 2560 * j) / 2560) % 15 == 13) off = r + 2560 * j;
    end
    grp   = $urandom_range(0, 31);
    pcode = 16 * grp + $urandom_range(0, 15);
    rot   = $urandom_range(0, 3);
    $display("offset %0d group %0d code %0d rotation %0d", off, grp, pcode, rot);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    enable <= 1'b1;
    while (!code_found) begin
      ni = $urandom_range(0, 3) == 0 ? $urandom_range(0, 2) - 1 : 0;
      nq = $urandom_range(0, 3) == 0 ? $urandom_range(0, 2) - 1 : 0;
      tx_chip(int'(chip_no) + off, grp, pcode, rot, ni, nq, ri, rq);
      din        <= '{i: sample_t'(ri), q: sample_t'(rq)};
      chip_valid <= 1'b1;
      drv_chip   <= chip_no;
      @(posedge clk);
      chip_valid <= 1'b0;
      chip_no++;
      if (stage1_done && n_s1 == 0) begin
        n_s1 = 1;
        check(chip_no == NS * 2560 + 2 || chip_no == NS * 2560 + 1,
              $sformatf("stage 1 done after %0d chips", chip_no));
      end
      repeat (RATIO - 1) @(posedge clk);
    end
    found_chip = chip_no;
    n_found = 1;
    repeat (10) @(posedge clk);

    // expected values
    check(slot_boundary == POS_W'((255 - off % 2560 + 2560) % 2560),
          $sformatf("slot boundary %0d expected %0d", slot_boundary, (255 - off % 2560 + 2560) % 2560));
    check(code_group == GROUP_W'(grp), $sformatf("code group %0d expected %0d", code_group, grp));
    exp_slot = int'(((capture_chip + off) / 2560) % 15);
    check(slot_id == SLOTID_W'(exp_slot), $sformatf("slot id %0d expected %0d", slot_id, exp_slot));
    check(long_code == LONG_W'(pcode), $sformatf("long code %0d expected %0d", long_code, pcode));
    check(stage2_done && frame_sync, "stage 2 done and frame sync");
    // stage 2 must finish before the next slot of the captured burst starts
    check(s2_chip - capture_chip < 2304, $sformatf("stage 2 took %0d chips", s2_chip - capture_chip));
    // threshold 28: at least 29 votes; first symbol after frame start onward
    check(n_votes >= 29, $sformatf("votes %0d", n_votes));
    // mechanisms
    check(n_s1 == 1, "stage 1 completed");
    check(n_capture == 1, "burst captured");
    check(n_s2 == 1, "stage 2 decoded");
    check(n_frame >= 1, "frame start seen");
    check(n_start3 == 1, "stage 3 started once");
    check(n_sym >= 29, "CPICH symbols integrated");
    check(n_found == 1, "threshold crossed");
    $display("mechanisms: start3=%0d ", n_start3);
    $display("mechanisms: stage1=%0d capture=%0d stage2=%0d frame_starts=%0d symbols=%0d votes=%0d found=%0d",
             n_s1, n_capture, n_s2, n_frame, n_sym, n_votes, n_found);
    $display("acquisition: %0d chips (%0d fast cycles), stage 2 %0d chips", found_chip, cyc, s2_chip - capture_chip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
