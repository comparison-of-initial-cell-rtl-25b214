// tb_acquisition_sweep: acquisition time for the evaluated configurations:
// stage-1 accumulation over 2, 4, 8 and 15 slots, each with the thresholds
// 28 (false alarm 1e-3) and 37 (false alarm 1e-4). Eight receivers take the
// same received signal (random cell, code, offset, 90-degree rotation, light
// noise). Each must find the right long code, and its acquisition time must
// lie between N*2560 + (T+1)*256 chips (the least the stages need) and
// N*2560 + 2*2560 + (T+1)*256 + 256 (waiting at most one slot for the burst
// and one slot for stage 3 to start). Times are printed in ms at
// 3.84 Mchip/s.
module tb_acquisition_sweep;
  import csd_pkg::*;
  import csd_ref_pkg::*;

  localparam int NCFG = 8;
  localparam int NSL [NCFG] = '{2, 4, 8, 15, 2, 4, 8, 15};
  localparam int THR [NCFG] = '{28, 28, 28, 28, 37, 37, 37, 37};

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, chip_valid = 1'b0;
  iq_t  din = '0;
  logic [NCFG-1:0] found;
  logic [LONG_W-1:0] long_code [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_rx
    logic s1d, s2d, fs;
    logic [POS_W-1:0] sb;
    logic [GROUP_W-1:0] cg;
    logic [SLOTID_W-1:0] sid;
    cell_search_top #(.N_SLOTS(NSL[c]), .THRESHOLD(THR[c])) dut (
      .clk, .rst_n, .enable, .chip_valid, .din,
      .stage1_done(s1d), .slot_boundary(sb), .stage2_done(s2d), .code_group(cg),
      .slot_id(sid), .frame_sync(fs), .code_found(found[c]), .long_code(long_code[c]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (40 * 38400 * 5) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int off, grp, pcode, rot, ri, rq, ni, nq;
    int t_found [NCFG];
    int chip_no;
    build_sequences();
    foreach (t_found[c]) t_found[c] = -1;
    off   = $urandom_range(0, 38399);
    grp   = $urandom_range(0, 31);
    pcode = 16 * grp + $urandom_range(0, 15);
    rot   = $urandom_range(0, 3);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    enable <= 1'b1;
    chip_no = 0;
    while (!(&found)) begin
      ni = $urandom_range(0, 3) == 0 ? $urandom_range(0, 2) - 1 : 0;
      nq = $urandom_range(0, 3) == 0 ? $urandom_range(0, 2) - 1 : 0;
      tx_chip(chip_no + off, grp, pcode, rot, ni, nq, ri, rq);
      din        <= '{i: sample_t'(ri), q: sample_t'(rq)};
      chip_valid <= 1'b1;
      @(posedge clk);
      chip_valid <= 1'b0;
      chip_no++;
      repeat (4) @(posedge clk);
      for (int c = 0; c < NCFG; c++) if (found[c] && t_found[c] < 0) t_found[c] = chip_no;
    end
    $display("slots  threshold  acquisition (chips)  (ms)");
    for (int c = 0; c < NCFG; c++) begin
      int lo, hi;
      lo = NSL[c] * 2560 + (THR[c] + 1) * 256;
      hi = NSL[c] * 2560 + 2 * 2560 + (THR[c] + 1) * 256 + 256;
      $display("%5d  %9d  %19d  %6.2f", NSL[c], THR[c], t_found[c], real'(t_found[c]) / 3840.0);
      checks += 2;
      if (long_code[c] != LONG_W'(pcode)) begin failures++; $display("FAIL: cfg %0d long code %0d expected %0d", c, long_code[c], pcode); end
      if (t_found[c] < lo || t_found[c] > hi) begin failures++; $display("FAIL: cfg %0d time %0d outside %0d..%0d", c, t_found[c], lo, hi); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
