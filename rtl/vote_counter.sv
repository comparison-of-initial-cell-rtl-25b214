// vote_counter: stage-3 first comparator block and vote counters.
//
// After every CPICH symbol the 16 descrambler energies go through a
// comparator tree (16 -> 8 -> 4 -> 2 -> 1, each node a compare and a
// multiplexer that passes on the larger energy and its index). The counter
// of the winning code is incremented; it is one vote per symbol. Ties keep
// the lower code index. Counters saturate at their maximum. Voting counters
// and the comparator follow the described stage 3; one vote per symbol, the
// tie rule and the saturation are this design's choices.
//
// Interface: valid qualifies energy; clear zeroes all counters. count and
// winner are registered: they change one cycle after valid.
module vote_counter
  import csd_pkg::*;
#(
  parameter int unsigned E_W   = 28,
  parameter int unsigned CNT_W = 8,
  parameter int unsigned N     = CODES_PER_GROUP,
  localparam int unsigned I_W  = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              valid,
  input  logic [E_W-1:0]    energy [N],
  output logic [CNT_W-1:0]  count  [N],
  output logic [I_W-1:0]    winner
);
  logic [I_W-1:0] win;

  // pairwise comparator tree; levels stored in one flat array
  // (node n of a level holds the best of its two children)
  always_comb begin
    logic [E_W-1:0] val [2*N];
    logic [I_W-1:0] idx [2*N];
    for (int k = 0; k < N; k++) begin
      val[N+k] = energy[k];
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
    val[0] = '0;
    idx[0] = '0;
    win = idx[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) count[k] <= '0;
      winner <= '0;
    end else if (clear) begin
      for (int k = 0; k < N; k++) count[k] <= '0;
    end else if (valid) begin
      winner <= win;
      if (count[win] != '1) count[win] <= count[win] + 1'b1;
    end
  end
endmodule
