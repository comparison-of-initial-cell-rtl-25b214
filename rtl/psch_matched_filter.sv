// psch_matched_filter: stage-1 hierarchical matched filter for the 256-chip
// primary synchronisation code, one phase (I or Q) of the input.
//
// The primary code is a 16 x 16 hierarchical code: chip 16*m+i equals
// inner(i) * outer(m). A 16-sample shift register (shift register 1) and a
// sign-flipping adder tree (adder tree 1) correlate the last 16 chips with the
// inner code; a 241-entry shift register (shift register 2) keeps those partial
// sums, and a second adder tree adds every 16th of them with the outer signs.
// This costs 32 additions per chip instead of 256, as in the described stage 1.
// The code itself is the standard W-CDMA primary code (csd_pkg).
//
// Interface: one chip per cycle with en high. On every en, corr is updated
// and corr_valid pulses one cycle later. The value given after input chip t is
// the correlation of the 256 chips ending at chip t-LAT (LAT = 2): one
// register stage in each shift register.
module psch_matched_filter
  import csd_pkg::*;
#(
  parameter int unsigned W   = DATA_W,
  parameter logic [15:0] INNER = PSC_INNER,
  parameter logic [15:0] OUTER = PSC_OUTER
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic signed [W-1:0]        din,
  output logic signed [W+8:0]        corr,
  output logic                       corr_valid
);
  localparam int unsigned P_W = W + 5;
  localparam int unsigned C_W = W + 9;
  localparam int unsigned SR2_LEN = SUB_LEN * (SUB_LEN - 1) + 1;  // 241

  logic signed [W-1:0]   sr1 [SUB_LEN];   // sr1[k] = chip t-k
  logic signed [P_W-1:0] sr2 [SR2_LEN];   // sr2[k] = partial sum t-k
  logic signed [P_W-1:0] p_sum;
  logic signed [C_W-1:0] c_sum;

  // adder tree 1: p(t) = sum_i inner(i) * r(t-15+i)
  always_comb begin
    p_sum = '0;
    for (int i = 0; i < SUB_LEN; i++) begin
      if (INNER[i]) p_sum = p_sum - P_W'(sr1[SUB_LEN-1-i]);
      else          p_sum = p_sum + P_W'(sr1[SUB_LEN-1-i]);
    end
  end

  // adder tree 2: corr(t) = sum_m outer(m) * p(t - 16*(15-m))
  always_comb begin
    c_sum = '0;
    for (int m = 0; m < SUB_LEN; m++) begin
      if (OUTER[m]) c_sum = c_sum - C_W'(sr2[SUB_LEN*(SUB_LEN-1-m)]);
      else          c_sum = c_sum + C_W'(sr2[SUB_LEN*(SUB_LEN-1-m)]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < SUB_LEN; k++) sr1[k] <= '0;
      for (int k = 0; k < SR2_LEN; k++) sr2[k] <= '0;
      corr       <= '0;
      corr_valid <= 1'b0;
    end else begin
      corr_valid <= en;
      if (en) begin
        sr1[0] <= din;
        for (int k = 1; k < SUB_LEN; k++) sr1[k] <= sr1[k-1];
        sr2[0] <= p_sum;
        for (int k = 1; k < SR2_LEN; k++) sr2[k] <= sr2[k-1];
        corr <= c_sum;
      end
    end
  end
endmodule
