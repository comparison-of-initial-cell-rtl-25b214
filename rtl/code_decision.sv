// code_decision: stage-3 second comparator block and threshold test.
//
// A comparator tree selects the largest of the 16 vote counters. When it
// exceeds the threshold (strictly greater), the search is declared
// successful: code_found rises and the code index within the group is
// latched. The threshold is set from the wanted false alarm probability,
// P_FA = exp(-threshold / V); the described thresholds are 28 for
// P_FA = 1e-3 and 37 for P_FA = 1e-4. Ties keep the lower index.
//
// Interface: clear drops the decision. code_found and code_idx are
// registered and hold until clear or reset.
module code_decision
  import csd_pkg::*;
#(
  parameter int unsigned CNT_W = 8,
  parameter int unsigned N     = CODES_PER_GROUP,
  localparam int unsigned I_W  = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [CNT_W-1:0]  count [N],
  input  logic [CNT_W-1:0]  threshold,
  output logic              code_found,
  output logic [I_W-1:0]    code_idx
);
  logic [CNT_W-1:0] best;
  logic [I_W-1:0]   best_idx;

  always_comb begin
    logic [CNT_W-1:0] val [2*N];
    logic [I_W-1:0]   idx [2*N];
    for (int k = 0; k < N; k++) begin
      val[N+k] = count[k];
      idx[N+k] = I_W'(k);
    end
    for (int n = N - 1; n >= 1; n--) begin
      if (val[2*n+1] > val[2*n]) begin
        val[n] = val[2*n+1];
        idx[n] = idx[2*n+1];
      end else begin
        val[n] = val[2*n];
        idx[n] = idx[2*n];
      end
    end
    val[0]   = '0;
    idx[0]   = '0;
    best     = val[1];
    best_idx = idx[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_found <= 1'b0;
      code_idx   <= '0;
    end else if (clear) begin
      code_found <= 1'b0;
      code_idx   <= '0;
    end else if (!code_found && best > threshold) begin
      code_found <= 1'b1;
      code_idx   <= best_idx;
    end
  end
endmodule
