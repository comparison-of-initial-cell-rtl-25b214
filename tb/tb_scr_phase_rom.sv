// tb_scr_phase_rom: every entry must equal 18 consecutive chips of the x
// sequence starting at chip 256*g, generated here by stepping the recursion
// x(i+18) = x(i+7) + x(i) from x(0) = 1, x(1..17) = 0.
module tb_scr_phase_rom;
  import csd_pkg::*;
  import csd_ref_pkg::*;
  logic [4:0] addr = '0;
  logic [17:0] phase;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  scr_phase_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_sequences();
    for (int g = 0; g < 32; g++) begin
      logic [17:0] e;
      for (int j = 0; j < 18; j++) e[j] = xs[256 * g + j];
      addr = 5'(g);
      #1;
      checks++;
      if (phase != e) begin failures++; $display("FAIL: group %0d phase %h expected %h", g, phase, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
