// tb_sch_sampler: chips carry their own index; after stage1_done and a
// boundary B, the frozen buffer must hold exactly the 256 chips ending at
// the first chip at position B, stay unchanged while chips keep arriving,
// and re-capture after release once 256 fresh chips have entered. The position counter is checked against
// the chip count. CHIPS is reduced to 400.
module tb_sch_sampler;
  import csd_pkg::*;
  localparam int CH = 400;
  logic clk = 1'b0, rst_n = 1'b0, chip_en = 1'b0, stage1_done = 1'b0, release_buf = 1'b0;
  iq_t din = '0, rd_data;
  logic [8:0] slot_boundary = '0, pos;
  logic captured, frozen;
  logic [7:0] rd_addr = '0;
  int checks = 0, failures = 0;

  sch_sampler #(.CHIPS(CH), .LEN(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic iq_t tag(int n);
    return '{i: sample_t'(n), q: sample_t'(n >> 4)};
  endfunction

  task automatic check_buffer(int last);
    for (int a = 0; a < 256; a++) begin
      rd_addr = 8'(a);
      #1;
      checks++;
      if (rd_data != tag(last - 255 + a)) begin
        failures++;
        if (failures < 5) $display("FAIL: last %0d buffer[%0d] = %h expected %h", last, a, rd_data, tag(last - 255 + a));
      end
    end
  endtask

  initial begin
    int n = 0, cap_chip = -1, ncap = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    slot_boundary = 9'd123;
    while (n < 6 * CH) begin
      @(negedge clk);
      if (n == 700) stage1_done = 1'b1;
      checks++;
      if (int'(pos) != n % CH) begin failures++; $display("FAIL: pos %0d at chip %0d", pos, n); end
      din = tag(n); chip_en = 1'b1;
      @(negedge clk);
      chip_en = 1'b0;
      if (captured) begin
        ncap++;
        cap_chip = n;
        checks++;
        if (n % CH != 123 || n < 700) begin failures++; $display("FAIL: capture at chip %0d", n); end
        check_buffer(n);
      end
      if (n == cap_chip + 90 && ncap == 1) check_buffer(cap_chip);    // still frozen
      if (n == cap_chip + 100 && ncap == 1) begin
        release_buf = 1'b1; @(negedge clk); release_buf = 1'b0;
      end
      n++;
    end
    // captures at 923 and 1323, and none at 1723 without a release
    checks++;
    if (ncap != 2) begin failures++; $display("FAIL: %0d captures", ncap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
