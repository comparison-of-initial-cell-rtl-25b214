// tb_descrambler: random chips and random code bits; each symbol energy is
// compared with the integer result of sum(r * conj(c)) over the symbol,
// squared. Symbols of 256 chips with idle cycles between chips; one symbol
// carries a clean pilot (1+j)*code to check the matched value 2*(2*256)^2.
module tb_descrambler;
  import csd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, chip_en = 1'b0, sym_first = 1'b0, sym_last = 1'b0, ci = 1'b0, cq = 1'b0;
  iq_t din = '0;
  logic [27:0] energy;
  logic e_valid;
  int checks = 0, failures = 0;

  descrambler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int sym = 0; sym < 20; sym++) begin
      longint ai, aq, e_exp;
      ai = 0; aq = 0;
      for (int n = 0; n < 256; n++) begin
        int ri, rq, vi, vq;
        bit bi, bq;
        bi = 1'($urandom); bq = 1'($urandom);
        vi = bi ? -1 : 1; vq = bq ? -1 : 1;
        if (sym == 3) begin            // pilot (1+j)(vi + j vq), no noise
          ri = vi - vq; rq = vi + vq;
        end else if (sym == 4) begin   // extreme values
          ri = -8; rq = -8;
        end else begin
          ri = int'($urandom_range(0, 15)) - 8; rq = int'($urandom_range(0, 15)) - 8;
        end
        // (ri + j rq)(vi - j vq)
        ai += ri * vi + rq * vq;
        aq += rq * vi - ri * vq;
        @(negedge clk);
        din = '{i: sample_t'(ri), q: sample_t'(rq)};
        ci = bi; cq = bq; chip_en = 1'b1;
        sym_first = (n == 0); sym_last = (n == 255);
        @(negedge clk);
        chip_en = 1'b0; sym_first = 1'b0; sym_last = 1'b0;
        checks++;
        if (e_valid != (n == 255)) begin failures++; $display("FAIL: e_valid at chip %0d", n); end
      end
      e_exp = ai * ai + aq * aq;
      checks++;
      if (longint'(energy) != e_exp) begin failures++; $display("FAIL: sym %0d energy %0d expected %0d", sym, energy, e_exp); end
      if (sym == 3) begin
        checks++;
        if (longint'(energy) != 2 * 512 * 512) begin failures++; $display("FAIL: pilot energy %0d", energy); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
