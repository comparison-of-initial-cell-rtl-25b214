// ssc_matched_filter: stage-2 two-level matched filter for the cyclic-code
// synchronisation burst, one phase (I or Q).
//
// Matched filter 1 correlates 16 consecutive chips (shift register 1) with
// code register 1; matched filter 2 correlates the 16 resulting partial sums
// (shift register 2) with code register 2. Both code registers are loaded
// with the group's ROM word. Rotating code register 2 by one chip per cycle
// steps through the slot hypotheses without recomputing matched filter 1, so
// one group is tested against all 15 slot numbers in 15 cycles once the 256
// chips have been shifted in.
//
// Interface (all on the fast clock): code_load loads both code registers;
// chip_en shifts din into shift register 1; sub_en shifts the output of
// matched filter 1 into shift register 2; rot_en rotates code register 2.
// corr is combinational: sum over m of c2(m) * P(m), where P(m) is the m-th
// partial sum shifted in and c2 is code register 2 (after s rotations,
// c2(m) = c(m+s mod 16)).
module ssc_matched_filter
  import csd_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 code_load,
  input  logic [15:0]          code_word,
  input  logic                 chip_en,
  input  logic signed [W-1:0]  din,
  input  logic                 sub_en,
  input  logic                 rot_en,
  output logic signed [W+8:0]  corr
);
  localparam int unsigned P_W = W + 5;
  localparam int unsigned C_W = W + 9;

  logic signed [W-1:0]   sr1 [SUB_LEN];  // sr1[0] = newest chip
  logic signed [P_W-1:0] sr2 [SUB_LEN];  // sr2[0] = newest partial sum
  logic [15:0]           code1, code2;
  logic signed [P_W-1:0] mf1;

  // matched filter 1: sum_i c(i) * chip(16m+i); chip 16m+i sits in sr1[15-i]
  always_comb begin
    mf1 = '0;
    for (int i = 0; i < SUB_LEN; i++) begin
      if (code1[i]) mf1 = mf1 - P_W'(sr1[SUB_LEN-1-i]);
      else          mf1 = mf1 + P_W'(sr1[SUB_LEN-1-i]);
    end
  end

  // matched filter 2: sum_m c2(m) * P(m); P(m) sits in sr2[15-m]
  always_comb begin
    corr = '0;
    for (int m = 0; m < SUB_LEN; m++) begin
      if (code2[m]) corr = corr - C_W'(sr2[SUB_LEN-1-m]);
      else          corr = corr + C_W'(sr2[SUB_LEN-1-m]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < SUB_LEN; k++) begin
        sr1[k] <= '0;
        sr2[k] <= '0;
      end
      code1 <= '0;
      code2 <= '0;
    end else begin
      if (code_load) begin
        code1 <= code_word;
        code2 <= code_word;
      end else if (rot_en) begin
        code2 <= {code2[0], code2[15:1]};
      end
      if (chip_en) begin
        sr1[0] <= din;
        for (int k = 1; k < SUB_LEN; k++) sr1[k] <= sr1[k-1];
      end
      if (sub_en) begin
        sr2[0] <= mf1;
        for (int k = 1; k < SUB_LEN; k++) sr2[k] <= sr2[k-1];
      end
    end
  end
endmodule
