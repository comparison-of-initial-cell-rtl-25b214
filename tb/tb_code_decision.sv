// tb_code_decision: counters grow one vote at a time toward the thresholds
// 28 and 37 (false alarm 1e-3 and 1e-4); code_found must rise on the cycle
// after the leading counter first exceeds the threshold, with that counter's
// index, and hold it while other counters later overtake. Ties go to the
// lower index.
module tb_code_decision;
  localparam int CW = 8, N = 16;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [CW-1:0] count [N];
  logic [CW-1:0] threshold = 8'd28;
  logic code_found;
  logic [3:0] code_idx;
  int checks = 0, failures = 0;

  code_decision #(.CNT_W(CW), .N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int thr, int win, int tie);
    foreach (count[k]) count[k] = '0;
    threshold = CW'(thr);
    @(negedge clk);
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    for (int v = 1; v <= thr + 5; v++) begin
      for (int k = 0; k < N; k++) if (k != win && k != tie) count[k] = CW'($urandom_range(0, thr - 5));
      count[win] = CW'(v);
      if (tie >= 0) count[tie] = CW'(v);
      @(negedge clk);
      checks++;
      if (code_found != (v > thr)) begin failures++; $display("FAIL: thr %0d votes %0d found %0b", thr, v, code_found); end
      if (v > thr) begin
        checks++;
        if (int'(code_idx) != ((tie >= 0 && tie < win) ? tie : win)) begin failures++; $display("FAIL: idx %0d", code_idx); end
      end
    end
    // another counter overtakes: decision holds
    count[(win + 1) % N] = CW'(thr + 20);
    @(negedge clk);
    checks++;
    if (!code_found || int'(code_idx) != ((tie >= 0 && tie < win) ? tie : win)) begin failures++; $display("FAIL: decision not held"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    run(28, 5, -1);
    run(37, 12, -1);
    run(28, 9, 3);
    run(37, 0, -1);
    run(28, 15, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
