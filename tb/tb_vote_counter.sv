// tb_vote_counter: random energy sets, sometimes with ties; after each valid
// the winner must be the first index of the largest energy and exactly that
// counter must have grown by one. Also checks clear and saturation.
module tb_vote_counter;
  localparam int EW = 28, CW = 4, N = 16;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, valid = 1'b0;
  logic [EW-1:0] energy [N];
  logic [CW-1:0] count [N];
  logic [3:0] winner;
  int checks = 0, failures = 0;
  int model [N];

  vote_counter #(.E_W(EW), .CNT_W(CW), .N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (energy[k]) energy[k] = '0;
    foreach (model[k]) model[k] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 400; t++) begin
      int best;
      @(negedge clk);
      if (t == 200) begin
        clear = 1'b1; @(negedge clk); clear = 1'b0;
        foreach (model[k]) model[k] = 0;
      end
      foreach (energy[k]) energy[k] = (t % 3 == 0) ? EW'($urandom_range(0, 3)) : EW'($urandom);
      if (t >= 300) energy[9] = '1;     // drive counter 9 into saturation
      best = 0;
      for (int k = 1; k < N; k++) if (energy[k] > energy[best]) best = k;
      valid = 1'b1;
      @(negedge clk);
      valid = 1'b0;
      if (model[best] < 15) model[best]++;
      checks++;
      if (int'(winner) != best) begin failures++; $display("FAIL: t %0d winner %0d expected %0d", t, winner, best); end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(count[k]) != model[k]) begin failures++; $display("FAIL: t %0d count[%0d]=%0d expected %0d", t, k, count[k], model[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
