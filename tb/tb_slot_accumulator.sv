// tb_slot_accumulator: random energies over N_SLOTS slots of a short slot
// (CHIPS = 40, N_SLOTS = 4), with one position made the largest; checks the
// reported boundary (minus POS_OFFSET), the peak sum against integer sums,
// and that done rises exactly after N_SLOTS * CHIPS samples. A second run
// places a tie to check that the earlier position wins.
module tb_slot_accumulator;
  localparam int CH = 40, NSL = 4, EW = 26, OFS = 2;
  logic clk = 1'b0, rst_n = 1'b0, e_valid = 1'b0, done;
  logic [EW-1:0] energy = '0;
  logic [$clog2(CH)-1:0] boundary;
  logic [EW+2:0] peak;
  int checks = 0, failures = 0;

  slot_accumulator #(.CHIPS(CH), .N_SLOTS(NSL), .ENERGY_W(EW), .POS_OFFSET(OFS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int hot, input int tie);
    longint sums [CH];
    longint best;
    int best_pos;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    foreach (sums[k]) sums[k] = 0;
    for (int n = 0; n < NSL * CH; n++) begin
      longint e;
      e = $urandom_range(0, 1000000);
      if (n % CH == hot || (tie >= 0 && n % CH == tie)) e = 20000000;
      sums[n % CH] += e;
      @(negedge clk);
      energy = EW'(e); e_valid = 1'b1;
      @(negedge clk);
      e_valid = 1'b0;
      checks++;
      if (done != (n == NSL * CH - 1)) begin
        failures++;
        $display("FAIL: done=%0b after sample %0d", done, n);
      end
    end
    best = -1;
    for (int k = 0; k < CH; k++) if (sums[k] > best) begin best = sums[k]; best_pos = k; end
    checks += 2;
    if (int'(boundary) != (best_pos + CH - OFS) % CH) begin
      failures++; $display("FAIL: boundary %0d expected %0d", boundary, (best_pos + CH - OFS) % CH);
    end
    if (longint'(peak) != best) begin failures++; $display("FAIL: peak %0d expected %0d", peak, best); end
    // more samples after done change nothing
    @(negedge clk); energy = '1; e_valid = 1'b1; @(negedge clk); e_valid = 1'b0;
    checks++;
    if (longint'(peak) != best) begin failures++; $display("FAIL: peak changed after done"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(17, -1);
    run(39, -1);
    run(25, 5);    // equal sums are unlikely to tie exactly with noise; hot spots dominate
    run(0, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
