// noncoherent_detect: non-coherent detection block, energy = I^2 + Q^2.
//
// Squaring the in-phase and quadrature correlations and adding them removes
// the unknown carrier phase, so the search never needs a phase estimate. The
// same block follows the matched filters in stage 1 and stage 2.
//
// Interface: in_valid qualifies i and q; energy is registered and valid one
// cycle later with out_valid. energy is unsigned and 2*W bits wide, which
// holds 2 * (-2^(W-1))^2 exactly.
module noncoherent_detect #(
  parameter int unsigned W = 13
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   i_in,
  input  logic signed [W-1:0]   q_in,
  output logic [2*W-1:0]        energy,
  output logic                  out_valid
);
  logic signed [2*W-1:0] i_sq, q_sq;
  logic [2*W-1:0] sum;

  always_comb begin
    i_sq = i_in * i_in;
    q_sq = q_in * q_in;
    sum  = (2*W)'(i_sq) + (2*W)'(q_sq);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      energy    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) energy <= sum;
    end
  end
endmodule
