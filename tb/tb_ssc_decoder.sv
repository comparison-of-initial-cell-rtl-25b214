// tb_ssc_decoder: the decoder reads a 256-chip buffer modelled in the
// testbench. Each trial fills it with the burst of a random group and slot
// (plus the primary code, a random 90-degree rotation and noise, as sent by a
// base station) and checks the decoded group and slot number, the energy of
// the winning hypothesis, and the decoding time of 32 * 273 + 3 cycles from
// the start edge to done.
module tb_ssc_decoder;
  import csd_pkg::*;
  import csd_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [7:0] rd_addr;
  iq_t rd_data;
  logic [4:0] code_group;
  logic [3:0] slot_id;
  logic [ENERGY_W-1:0] best_energy;
  iq_t mem [256];
  int checks = 0, failures = 0;

  assign rd_data = mem[rd_addr];
  ssc_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int trial = 0; trial < 12; trial++) begin
      int g, s, rot, cycles, ei, eq;
      longint e_exp;
      g   = (trial == 0) ? 0 : (trial == 1) ? 31 : $urandom_range(0, 31);
      s   = (trial == 0) ? 0 : (trial == 1) ? 14 : $urandom_range(0, 14);
      rot = $urandom_range(0, 3);
      ei = 0; eq = 0;
      for (int n = 0; n < 256; n++) begin
        int ti, tq, ri, rq;
        ti = 2 * psc_chip(n) + 2 * ssc_chip(g, s, n) + ((trial > 1) ? int'($urandom_range(0, 2)) - 1 : 0);
        tq = 2 * psc_chip(n) + 2 * ssc_chip(g, s, n);
        case (rot)
          0: begin ri = ti;  rq = tq;  end
          1: begin ri = -tq; rq = ti;  end
          2: begin ri = -ti; rq = -tq; end
          default: begin ri = tq; rq = -ti; end
        endcase
        mem[n] = '{i: sample_t'(ri), q: sample_t'(rq)};
        ei += ri * ssc_chip(g, s, n);
        eq += rq * ssc_chip(g, s, n);
      end
      e_exp = longint'(ei) * ei + longint'(eq) * eq;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      checks += 4;
      if (code_group != 5'(g)) begin failures++; $display("FAIL: group %0d expected %0d", code_group, g); end
      if (slot_id != 4'(s)) begin failures++; $display("FAIL: slot %0d expected %0d", slot_id, s); end
      if (longint'(best_energy) != e_exp) begin failures++; $display("FAIL: energy %0d expected %0d", best_energy, e_exp); end
      if (cycles != 32 * 273 + 3) begin failures++; $display("FAIL: %0d cycles", cycles); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL: still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
