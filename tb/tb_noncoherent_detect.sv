// tb_noncoherent_detect: random I/Q pairs, including the extreme values,
// against I*I + Q*Q computed in integers; checks the one-cycle latency.
module tb_noncoherent_detect;
  localparam int W = 13;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [W-1:0] i_in = '0, q_in = '0;
  logic [2*W-1:0] energy;
  int checks = 0, failures = 0;

  noncoherent_detect #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ei, eq, exp_e;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 500; n++) begin
      ei = (n == 0) ? -4096 : (n == 1) ? 4095 : longint'($urandom_range(0, 8191)) - 4096;
      eq = (n == 0) ? -4096 : (n == 1) ? -4096 : longint'($urandom_range(0, 8191)) - 4096;
      @(negedge clk);
      i_in = W'(ei); q_in = W'(eq); in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      exp_e = ei * ei + eq * eq;
      checks++;
      if (!out_valid || longint'(energy) != exp_e) begin
        failures++;
        $display("FAIL: %0d %0d -> %0d (valid %0b), expected %0d", ei, eq, energy, out_valid, exp_e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
